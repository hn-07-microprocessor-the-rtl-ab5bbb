// hn07_timer0: 8-bit Timer0 with an 8-bit programmable prescaler.
//
// Two modes, as the document gives them: timing mode counts the system clock,
// counter mode counts edges of the external input t0cki. The prescaler is an
// 8-bit counter; with it Timer0 becomes a 16-bit timer. Control is in OPTION
// (0x81, reset 0xFF), laid out as on the PIC family (this design's choice):
//   bit6 INTEDG (edge of extint, used by the interrupt controller)
//   bit5 T0CS   0 = system clock, 1 = t0cki
//   bit4 T0SE   0 = rising, 1 = falling edge of t0cki
//   bit3 PSA    1 = prescaler bypassed
//   bit2:0 PS   prescale ratio 2^(PS+1), 1:2 .. 1:256
// t0cki passes through a two-flop synchroniser, so it must stay high and low
// for more than one system clock. Writing TMR0 (0x01) loads it and clears the
// prescaler. t0_ovf pulses for one clock when TMR0 rolls over from 0xFF.
module hn07_timer0
  import hn07_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  daddr_t     sfr_raddr,
  output logic [7:0] sfr_rdata,
  input  daddr_t     sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic       sfr_we,
  input  logic       t0cki,
  output logic       intedg,
  output logic       t0_ovf
);
  logic [7:0] tmr0, option, pre;
  logic [2:0] cki_s;
  logic       src_tick, pre_done, tick;

  always_comb begin
    if (option[5])
      src_tick = option[4] ? (!cki_s[1] && cki_s[2]) : (cki_s[1] && !cki_s[2]);
    else
      src_tick = 1'b1;
    pre_done = pre == 8'((16'd2 << option[2:0]) - 16'd1);
    tick     = src_tick && (option[3] || pre_done);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr0   <= '0;
      option <= '1;
      pre    <= '0;
      cki_s  <= '0;
      t0_ovf <= 1'b0;
    end else begin
      cki_s  <= {cki_s[1:0], t0cki};
      t0_ovf <= 1'b0;
      if (src_tick) pre <= pre_done ? 8'h00 : pre + 8'd1;
      if (sfr_we && sfr_waddr == A_TMR0) begin
        tmr0 <= sfr_wdata;
        pre  <= '0;
      end else if (tick) begin
        tmr0 <= tmr0 + 8'd1;
        if (tmr0 == 8'hFF) t0_ovf <= 1'b1;
      end
      if (sfr_we && sfr_waddr == A_OPTION) option <= sfr_wdata;
    end
  end

  assign intedg = option[6];

  always_comb begin
    unique case (sfr_raddr)
      A_TMR0:   sfr_rdata = tmr0;
      A_OPTION: sfr_rdata = option;
      default:  sfr_rdata = 8'h00;
    endcase
  end
endmodule
