// tb_hn07_ccp: CCP1 with Timer1/Timer2 values driven by the testbench.
// Capture on falling, rising, every 4th and every 16th rising edge (CCPR1
// must hold the Timer1 value of that edge); compare set, clear, interrupt
// only and special event (Timer1 clear); PWM duty: the number of high clocks
// per period must equal the 10-bit duty value, for several duties.
`timescale 1ns/1ps
module tb_hn07_ccp;
  import hn07_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  daddr_t sfr_raddr = '0, sfr_waddr = '0;
  logic [7:0] sfr_rdata, sfr_wdata = '0;
  logic sfr_we = 1'b0;
  logic [15:0] tmr1 = '0;
  logic [7:0]  tmr2 = '0;
  logic [1:0]  pwm_frac = '0;
  logic t2_match = 1'b0, ccp1i = 1'b0, ccp1o, ccp_int, tmr1_clr;
  int checks = 0, failures = 0, int_n = 0, clr_n = 0;

  hn07_ccp dut (.*);
  `include "tb_sfr_tasks.svh"
  always_ff @(posedge clk) begin
    if (ccp_int)  int_n <= int_n + 1;
    if (tmr1_clr) clr_n <= clr_n + 1;
  end

  task automatic edge_in(input logic lvl);
    @(negedge clk); ccp1i = lvl; repeat (4) @(negedge clk);
  endtask

  task automatic capture_test(input logic [3:0] mode, input int edges_needed, input bit falling);
    logic [7:0] lo, hi;
    wr(A_CCP1CON, {4'h0, mode});
    ccp1i = falling; repeat (4) @(negedge clk);
    int_n = 0;
    for (int e = 1; e <= edges_needed; e++) begin
      tmr1 = 16'($urandom);
      edge_in(!falling); edge_in(falling);
    end
    rd(A_CCPR1L, lo); rd(A_CCPR1H, hi);
    check($sformatf("capture mode %b value", mode), int'({hi, lo}), int'(tmr1));
    check($sformatf("capture mode %b interrupts", mode), int_n, 1);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1'b1;
    capture_test(4'b0100, 1, 1'b1);
    capture_test(4'b0101, 1, 1'b0);
    capture_test(4'b0110, 4, 1'b0);
    capture_test(4'b0111, 16, 1'b0);
    // compare: set output on match
    wr(A_CCPR1L, 8'h34); wr(A_CCPR1H, 8'h12);
    tmr1 = 16'h1230;
    wr(A_CCP1CON, 8'h08);
    check("compare set: initial low", int'(ccp1o), 0);
    int_n = 0;
    for (int i = 0; i < 8; i++) begin @(negedge clk); tmr1 = tmr1 + 1; end
    repeat (2) @(negedge clk);
    check("compare set: high", int'(ccp1o), 1);
    check("compare set: one interrupt", int_n, 1);
    wr(A_CCP1CON, 8'h09);
    check("compare clear: initial high", int'(ccp1o), 1);
    tmr1 = 16'h1233; repeat (2) @(negedge clk); tmr1 = 16'h1234; repeat (2) @(negedge clk);
    check("compare clear: low", int'(ccp1o), 0);
    wr(A_CCP1CON, 8'h0B);
    tmr1 = 16'h0000; clr_n = 0; repeat (2) @(negedge clk);
    tmr1 = 16'h1234; repeat (3) @(negedge clk);
    check("special event clears timer1", clr_n, 1);
    // PWM: period = 4 * (PR2 + 1) with PR2 = 63 -> 256 counts
    for (int k = 0; k < 4; k++) begin
      int duty, high;
      duty = (k == 0) ? 66 : (k == 3) ? 0 : $urandom_range(1, 255);
      wr(A_CCPR1L, 8'(duty >> 2));
      wr(A_CCP1CON, 8'h0C | 8'((duty & 3) << 4));
      high = 0;
      for (int rep = 0; rep < 3; rep++) begin
        for (int c = 0; c < 256; c++) begin
          @(negedge clk);
          tmr2 = 8'(c >> 2); pwm_frac = 2'(c); t2_match = (c == 0);
          if (rep == 2) high += int'(ccp1o);
        end
      end
      check($sformatf("pwm duty %0d", duty), high, duty);
    end
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
