// tb_hn07_timer1: Timer1 counting the system clock at each prescale ratio,
// counting t1cki edges, the overflow pulse, the clear input and the on/off
// control.
`timescale 1ns/1ps
module tb_hn07_timer1;
  import hn07_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  daddr_t sfr_raddr = '0, sfr_waddr = '0;
  logic [7:0] sfr_rdata, sfr_wdata = '0;
  logic sfr_we = 1'b0, t1cki = 1'b0, tmr1_clr = 1'b0, t1_ovf;
  logic [15:0] tmr1;
  int checks = 0, failures = 0, ovf_n = 0;

  hn07_timer1 dut (.*);
  `include "tb_sfr_tasks.svh"
  logic [15:0] ovf_at = '1;
  always_ff @(posedge clk) if (t1_ovf) begin ovf_n <= ovf_n + 1; ovf_at <= tmr1; end

  initial begin
    logic [15:0] a;
    logic [7:0] lo, hi;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    a = tmr1; repeat (50) @(negedge clk); check("off", int'(tmr1 - a), 0);
    for (int ps = 0; ps < 4; ps++) begin
      wr(A_T1CON, 8'(ps << 4) | 8'h01);
      a = tmr1; repeat (100 * (1 << ps)) @(negedge clk);
      check($sformatf("prescale %0d", ps), int'(16'(tmr1 - a)), 100);
    end
    rd(A_TMR1L, lo); rd(A_TMR1H, hi); check("read 16 bits", int'({hi, lo}), int'(tmr1));
    // overflow
    wr(A_T1CON, 8'h00);
    wr(A_TMR1H, 8'hFF); wr(A_TMR1L, 8'hF8);
    ovf_n = 0;
    wr(A_T1CON, 8'h01);
    repeat (12) @(negedge clk);
    check("one overflow", ovf_n, 1);
    // the pulse comes with the roll-over: the count already reads 0
    check("overflow at wrap", int'(ovf_at), 0);
    check("wrapped", int'(tmr1 < 16'h10), 1);
    // clear from CCP
    @(negedge clk); tmr1_clr = 1; @(negedge clk); tmr1_clr = 0;
    check("cleared", int'(tmr1), 0);
    // external clock
    wr(A_T1CON, 8'h03);
    a = tmr1;
    repeat (25) begin t1cki = 1; repeat (3) @(negedge clk); t1cki = 0; repeat (3) @(negedge clk); end
    repeat (3) @(negedge clk);
    check("external", int'(16'(tmr1 - a)), 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
