// tb_hn07_timer0: Timer0 in timing mode without and with the prescaler
// (count increments over a known number of clocks), overflow pulse and its
// timing, and counter mode on rising and falling t0cki edges.
`timescale 1ns/1ps
module tb_hn07_timer0;
  import hn07_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  daddr_t sfr_raddr = '0, sfr_waddr = '0;
  logic [7:0] sfr_rdata, sfr_wdata = '0;
  logic sfr_we = 1'b0, t0cki = 1'b0, intedg, t0_ovf;
  int checks = 0, failures = 0, ovf_n = 0;

  hn07_timer0 dut (.*);
  `include "tb_sfr_tasks.svh"
  always_ff @(posedge clk) if (t0_ovf) ovf_n <= ovf_n + 1;

  task automatic delta(input int clocks, output int d);
    logic [7:0] a, b;
    rd(A_TMR0, a); repeat (clocks) @(negedge clk); rd(A_TMR0, b);
    d = int'(8'(b - a));
  endtask
  task automatic edges(input int n);
    repeat (n) begin
      t0cki = 1; repeat (3) @(negedge clk); t0cki = 0; repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    int d;
    logic [7:0] v;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    rd(A_OPTION, v); check("OPTION reset", int'(v), 8'hFF);
    wr(A_OPTION, 8'h08);                     // timer, PSA = 1
    delta(100, d); check("1:1", d, 100);
    for (int ps = 0; ps < 8; ps++) begin
      wr(A_OPTION, 8'(ps));                  // PSA = 0
      delta(10 * (2 << ps), d); check($sformatf("prescale ps=%0d", ps), d, 10);
    end
    // overflow after 16 increments
    wr(A_OPTION, 8'h08);
    ovf_n = 0;
    wr(A_TMR0, 8'hF0);
    repeat (15) @(negedge clk); check("no overflow yet", ovf_n, 0);
    repeat (2) @(negedge clk);  check("overflow", ovf_n, 1);
    // counter mode
    wr(A_OPTION, 8'h28);                     // T0CS, rising, PSA
    rd(A_TMR0, v); edges(10); repeat (4) @(negedge clk);
    rd(A_TMR0, sfr_wdata); check("counter rising", int'(8'(sfr_wdata - v)), 10);
    wr(A_OPTION, 8'h38);                     // falling edge
    rd(A_TMR0, v); edges(7); repeat (4) @(negedge clk);
    rd(A_TMR0, sfr_wdata); check("counter falling", int'(8'(sfr_wdata - v)), 7);
    wr(A_OPTION, 8'h20);                     // rising, prescale 1:2
    wr(A_TMR0, 8'h00);
    edges(12); repeat (4) @(negedge clk);
    rd(A_TMR0, v); check("counter 1:2", int'(v), 6);
    check("intedg", int'(intedg), 0);
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
