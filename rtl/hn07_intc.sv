// hn07_intc: the HN-07 interrupt controller.
//
// Collects the eight interrupt sources the document lists: external
// interrupt (extint), change on port pins, Timer0, Timer1, Timer2, USART
// receive, USART transmit and CCP1. Event sources arrive as one-cycle pulses
// and set a sticky flag; the USART flags are levels (receive buffer full,
// transmit buffer empty) as in the PIC family. Flags and enables are held in
// three SFRs laid out as on the PIC16C67 (this design's choice):
//   INTCON 0x0B: GIE PEIE T0IE INTE RBIE T0IF INTF RBIF
//   PIR1   0x0C: -  -    RCIF TXIF -    CCP1IF TMR2IF TMR1IF
//   PIE1   0x8C: same bit positions as PIR1, enables
// irq = GIE and any enabled pending flag; wake (from SLEEP) ignores GIE. The
// CPU clears GIE with irq_ack when it takes the interrupt and sets it again
// with retfie. A hardware set wins over a software clear in the same cycle.
// extint is synchronised (two flops) and its edge chosen by intedg (1 =
// rising). The port-change source flags any change on the four sampled pins.
module hn07_intc
  import hn07_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // SFR bus
  input  daddr_t     sfr_raddr,
  output logic [7:0] sfr_rdata,
  input  daddr_t     sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic       sfr_we,
  // sources
  input  logic       extint,
  input  logic       intedg,
  input  logic [3:0] pchg_pins,
  input  logic       t0_ovf,
  input  logic       t1_ovf,
  input  logic       t2_int,
  input  logic       ccp_int,
  input  logic       rc_full,
  input  logic       tx_empty,
  // CPU
  input  logic       irq_ack,
  input  logic       retfie,
  output logic       irq,
  output logic       wake
);
  logic [7:0] intcon, pie1;
  logic [2:0] pir1_ev;                // CCP1IF TMR2IF TMR1IF
  logic [7:0] pir1;
  logic [2:0] ext_s;
  logic [3:0] pc_s1, pc_s2, pc_q;
  logic       ext_edge, pchg;
  logic       pend;

  assign ext_edge = intedg ? (ext_s[1] && !ext_s[2]) : (!ext_s[1] && ext_s[2]);
  assign pchg     = pc_s2 != pc_q;
  assign pir1     = {2'b00, rc_full, tx_empty, 1'b0, pir1_ev};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      intcon  <= '0;
      pie1    <= '0;
      pir1_ev <= '0;
      ext_s   <= '0;
      pc_s1   <= '0; pc_s2 <= '0; pc_q <= '0;
    end else begin
      ext_s <= {ext_s[1:0], extint};
      pc_s1 <= pchg_pins;
      pc_s2 <= pc_s1;
      pc_q  <= pc_s2;
      if (sfr_we && sfr_waddr == A_INTCON) intcon  <= sfr_wdata;
      if (sfr_we && sfr_waddr == A_PIE1)   pie1    <= sfr_wdata;
      if (sfr_we && sfr_waddr == A_PIR1)   pir1_ev <= sfr_wdata[2:0];
      if (irq_ack) intcon[7] <= 1'b0;
      if (retfie)  intcon[7] <= 1'b1;
      if (t0_ovf)   intcon[2]  <= 1'b1;
      if (ext_edge) intcon[1]  <= 1'b1;
      if (pchg)     intcon[0]  <= 1'b1;
      if (t1_ovf)   pir1_ev[0] <= 1'b1;
      if (t2_int)   pir1_ev[1] <= 1'b1;
      if (ccp_int)  pir1_ev[2] <= 1'b1;
    end
  end

  always_comb begin
    pend = (intcon[5] && intcon[2]) || (intcon[4] && intcon[1]) ||
           (intcon[3] && intcon[0]) || (intcon[6] && |(pie1 & pir1));
    irq  = intcon[7] && pend;
    wake = pend;
    unique case (sfr_raddr)
      A_INTCON: sfr_rdata = intcon;
      A_PIR1:   sfr_rdata = pir1;
      A_PIE1:   sfr_rdata = pie1;
      default:  sfr_rdata = 8'h00;
    endcase
  end
endmodule
