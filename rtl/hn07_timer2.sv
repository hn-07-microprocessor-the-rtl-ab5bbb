// hn07_timer2: 8-bit Timer2 with prescaler, period register and postscaler.
//
// Timing mode only (system clock), as the document states. The 4-bit
// prescaler (1:1, 1:4, 1:16) and the 4-bit postscaler (1:1 .. 1:16) make it a
// 16-bit timer. TMR2 counts up to the period register PR2 and then restarts
// at 0; each restart pulses t2_match (the PWM period boundary) and advances
// the postscaler, which pulses t2_int every TOUTPS+1 periods. Registers, in
// the PIC layout (this design's choice): TMR2 0x11, T2CON 0x12
//   bit6:3 TOUTPS, bit2 TMR2ON, bit1:0 T2CKPS (00 1:1, 01 1:4, 1x 1:16),
// PR2 0x92 (reset 0xFF). Writing TMR2 or T2CON clears the prescaler.
// pwm_frac gives two prescaler bits below TMR2 so that CCP1 can compare a
// 10-bit duty cycle against {TMR2, pwm_frac}; with 1:1 prescale it is 0.
module hn07_timer2
  import hn07_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  daddr_t     sfr_raddr,
  output logic [7:0] sfr_rdata,
  input  daddr_t     sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic       sfr_we,
  output logic [7:0] tmr2,
  output logic [1:0] pwm_frac,
  output logic       t2_match,
  output logic       t2_int
);
  logic [7:0] pr2, t2con;
  logic [3:0] pre, post;
  logic       pre_done, tick;

  always_comb begin
    unique casez (t2con[1:0])
      2'b00:   pre_done = 1'b1;
      2'b01:   pre_done = pre[1:0] == 2'b11;
      default: pre_done = pre == 4'hF;
    endcase
    tick = t2con[2] && pre_done;
    unique casez (t2con[1:0])
      2'b00:   pwm_frac = 2'b00;
      2'b01:   pwm_frac = pre[1:0];
      default: pwm_frac = pre[3:2];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr2 <= '0; pr2 <= '1; t2con <= '0; pre <= '0; post <= '0;
      t2_match <= 1'b0; t2_int <= 1'b0;
    end else begin
      t2_match <= 1'b0;
      t2_int   <= 1'b0;
      if (t2con[2]) pre <= pre_done ? 4'h0 : pre + 4'h1;
      if (tick) begin
        if (tmr2 == pr2) begin
          tmr2     <= '0;
          t2_match <= 1'b1;
          if (post == t2con[6:3]) begin
            post   <= '0;
            t2_int <= 1'b1;
          end else begin
            post <= post + 4'h1;
          end
        end else begin
          tmr2 <= tmr2 + 8'd1;
        end
      end
      if (sfr_we) begin
        if (sfr_waddr == A_TMR2)  begin tmr2 <= sfr_wdata; pre <= '0; end
        if (sfr_waddr == A_T2CON) begin t2con <= sfr_wdata; pre <= '0; end
        if (sfr_waddr == A_PR2)   pr2 <= sfr_wdata;
      end
    end
  end

  always_comb begin
    unique case (sfr_raddr)
      A_TMR2:  sfr_rdata = tmr2;
      A_T2CON: sfr_rdata = t2con;
      A_PR2:   sfr_rdata = pr2;
      default: sfr_rdata = 8'h00;
    endcase
  end
endmodule
