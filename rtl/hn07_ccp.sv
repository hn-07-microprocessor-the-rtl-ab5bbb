// hn07_ccp: CCP1, capture / compare / PWM unit.
//
// The document gives the three functions and their sizes: 16-bit capture,
// 16-bit compare (both on Timer1) and 10-bit PWM (on Timer2). The mode field
// and register layout are the PIC ones (this design's choice):
//   CCPR1L 0x15, CCPR1H 0x16, CCP1CON 0x17 = {2'b0, DC1B[1:0], MODE[3:0]}
//   MODE 0100/0101 capture every falling/rising edge of ccp1i,
//        0110/0111 capture every 4th/16th rising edge,
//        1000 compare: ccp1o set on match (cleared when the mode is written),
//        1001 compare: ccp1o cleared on match (set when the mode is written),
//        1010 compare: interrupt only, 1011 compare: also clear Timer1,
//        11xx PWM.
// Capture copies Timer1 into CCPR1 and pulses ccp_int. Compare pulses ccp_int
// on the first cycle TMR1 equals CCPR1. PWM: the 10-bit duty {CCPR1L, DC1B}
// is latched at each Timer2 period start and ccp1o is high while
// {TMR2, pwm_frac} is below it; the period is set by PR2. ccp1i is
// synchronised by two flops; ccp1o is registered.
module hn07_ccp
  import hn07_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  daddr_t      sfr_raddr,
  output logic [7:0]  sfr_rdata,
  input  daddr_t      sfr_waddr,
  input  logic [7:0]  sfr_wdata,
  input  logic        sfr_we,
  input  logic [15:0] tmr1,
  input  logic [7:0]  tmr2,
  input  logic [1:0]  pwm_frac,
  input  logic        t2_match,
  input  logic        ccp1i,
  output logic        ccp1o,
  output logic        ccp_int,
  output logic        tmr1_clr
);
  logic [15:0] ccpr;
  logic [7:0]  ccpcon;
  logic [9:0]  duty;
  logic [2:0]  in_s;
  logic [3:0]  ecnt;
  logic        rise, fall, cap_ev, match, match_q;
  logic        is_cap, is_cmp, is_pwm;

  assign rise   = in_s[1] && !in_s[2];
  assign fall   = !in_s[1] && in_s[2];
  assign is_cap = ccpcon[3:2] == 2'b01;
  assign is_cmp = ccpcon[3:2] == 2'b10;
  assign is_pwm = ccpcon[3:2] == 2'b11;
  assign match  = is_cmp && tmr1 == ccpr;

  always_comb begin
    unique case (ccpcon[1:0])
      2'b00:   cap_ev = fall;
      2'b01:   cap_ev = rise;
      2'b10:   cap_ev = rise && ecnt[1:0] == 2'b11;
      default: cap_ev = rise && ecnt == 4'hF;
    endcase
    cap_ev = cap_ev && is_cap;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ccpr <= '0; ccpcon <= '0; duty <= '0; in_s <= '0; ecnt <= '0;
      match_q <= 1'b0; ccp1o <= 1'b0; ccp_int <= 1'b0; tmr1_clr <= 1'b0;
    end else begin
      in_s     <= {in_s[1:0], ccp1i};
      match_q  <= match;
      ccp_int  <= 1'b0;
      tmr1_clr <= 1'b0;
      if (is_cap && rise) ecnt <= ecnt + 4'd1;
      if (cap_ev) begin
        ccpr    <= tmr1;
        ccp_int <= 1'b1;
      end
      if (match && !match_q) begin
        ccp_int <= 1'b1;
        unique case (ccpcon[1:0])
          2'b00:   ccp1o    <= 1'b1;
          2'b01:   ccp1o    <= 1'b0;
          2'b11:   tmr1_clr <= 1'b1;
          default: ;
        endcase
      end
      if (is_pwm) begin
        if (t2_match) duty <= {ccpr[7:0], ccpcon[5:4]};
        ccp1o <= {tmr2, pwm_frac} < duty;
      end
      if (sfr_we) begin
        if (sfr_waddr == A_CCPR1L) ccpr[7:0]  <= sfr_wdata;
        if (sfr_waddr == A_CCPR1H) ccpr[15:8] <= sfr_wdata;
        if (sfr_waddr == A_CCP1CON) begin
          ccpcon <= sfr_wdata;
          ecnt   <= '0;
          if (sfr_wdata[3:0] == 4'b1000) ccp1o <= 1'b0;
          if (sfr_wdata[3:0] == 4'b1001) ccp1o <= 1'b1;
          if (sfr_wdata[3:2] == 2'b00)   ccp1o <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    unique case (sfr_raddr)
      A_CCPR1L:  sfr_rdata = ccpr[7:0];
      A_CCPR1H:  sfr_rdata = ccpr[15:8];
      A_CCP1CON: sfr_rdata = ccpcon;
      default:   sfr_rdata = 8'h00;
    endcase
  end
endmodule
