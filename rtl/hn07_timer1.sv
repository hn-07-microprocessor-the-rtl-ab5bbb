// hn07_timer1: 16-bit Timer1 with a 3-bit prescaler.
//
// Timing mode counts the system clock, counter mode counts rising edges of
// t1cki (two-flop synchronised). The 3-bit prescaler (1:1, 1:2, 1:4, 1:8)
// makes it a 19-bit timer, as the document states. Registers, in the PIC
// layout (this design's choice): TMR1L 0x0E, TMR1H 0x0F, T1CON 0x10 with
//   bit5:4 T1CKPS prescale 2^T1CKPS, bit1 TMR1CS 1 = t1cki, bit0 TMR1ON.
// t1_ovf pulses one clock when the count wraps from 0xFFFF. tmr1_clr (from
// the CCP special-event compare) clears count and prescaler. The count is
// exported for CCP1 capture and compare. Writing TMR1L, TMR1H or T1CON
// clears the prescaler.
module hn07_timer1
  import hn07_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  daddr_t      sfr_raddr,
  output logic [7:0]  sfr_rdata,
  input  daddr_t      sfr_waddr,
  input  logic [7:0]  sfr_wdata,
  input  logic        sfr_we,
  input  logic        t1cki,
  input  logic        tmr1_clr,
  output logic [15:0] tmr1,
  output logic        t1_ovf
);
  logic [7:0] t1con;
  logic [2:0] pre;
  logic [2:0] cki_s;
  logic       src_tick, pre_done, tick;

  always_comb begin
    src_tick = t1con[0] && (t1con[1] ? (cki_s[1] && !cki_s[2]) : 1'b1);
    pre_done = pre == 3'((4'd1 << t1con[5:4]) - 4'd1);
    tick     = src_tick && pre_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr1   <= '0;
      t1con  <= '0;
      pre    <= '0;
      cki_s  <= '0;
      t1_ovf <= 1'b0;
    end else begin
      cki_s  <= {cki_s[1:0], t1cki};
      t1_ovf <= 1'b0;
      if (src_tick) pre <= pre_done ? 3'd0 : pre + 3'd1;
      if (tick) begin
        tmr1 <= tmr1 + 16'd1;
        if (tmr1 == 16'hFFFF) t1_ovf <= 1'b1;
      end
      if (tmr1_clr) begin
        tmr1 <= '0;
        pre  <= '0;
      end
      if (sfr_we) begin
        if (sfr_waddr == A_TMR1L) begin tmr1[7:0]  <= sfr_wdata; pre <= '0; end
        if (sfr_waddr == A_TMR1H) begin tmr1[15:8] <= sfr_wdata; pre <= '0; end
        if (sfr_waddr == A_T1CON) begin t1con      <= sfr_wdata; pre <= '0; end
      end
    end
  end

  always_comb begin
    unique case (sfr_raddr)
      A_TMR1L: sfr_rdata = tmr1[7:0];
      A_TMR1H: sfr_rdata = tmr1[15:8];
      A_T1CON: sfr_rdata = t1con;
      default: sfr_rdata = 8'h00;
    endcase
  end
endmodule
