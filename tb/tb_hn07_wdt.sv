// tb_hn07_wdt: watchdog on a separate 7 ns clock against a 10 ns system
// clock. Checks the time-out period for several prescale settings (256 *
// 2^PS watchdog clocks, allowing a few clocks for the two synchronisers),
// that regular clears prevent a time-out, that wdte low stops it, and that
// WDTCON reads back.
`timescale 1ns/1ps
module tb_hn07_wdt;
  import hn07_pkg::*;
  logic clk = 1'b0, clkwdt = 1'b0, rst_n = 1'b0;
  always #5   clk    = !clk;
  always #3.5 clkwdt = !clkwdt;
  daddr_t sfr_raddr = '0, sfr_waddr = '0;
  logic [7:0] sfr_rdata, sfr_wdata = '0;
  logic sfr_we = 1'b0, wdte = 1'b0, clr = 1'b0, timeout;
  int checks = 0, failures = 0, to_n = 0;

  hn07_wdt dut (.*);
  `include "tb_sfr_tasks.svh"
  always_ff @(posedge clk) if (timeout && rst_n) to_n <= to_n + 1;

  task automatic clear();
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
  endtask

  initial begin
    logic [7:0] v;
    realtime t0;
    int wclk;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    rd(A_WDTCON, v); check("WDTCON reset", int'(v), 7);
    wdte = 1'b0;
    repeat (3000) @(negedge clk);
    check("disabled: no time-out", to_n, 0);
    for (int ps = 0; ps < 3; ps++) begin
      wr(A_WDTCON, 8'(ps));
      repeat (10) @(negedge clk);
      clear();
      to_n = 0;
      wdte = 1'b1;
      t0 = $realtime;
      wait (to_n == 1);
      wclk = int'(($realtime - t0) / 7.0);
      check_range($sformatf("time-out ps=%0d (clkwdt periods)", ps), wclk,
                  256 * (1 << ps), 256 * (1 << ps) + 8);
      wdte = 1'b0;
      repeat (20) @(negedge clk);
    end
    // regular clears keep it quiet
    wr(A_WDTCON, 8'd0);
    wdte = 1'b1;
    to_n = 0;
    repeat (20) begin repeat (100) @(negedge clk); clear(); end
    check("cleared: no time-out", to_n, 0);
    repeat (300) @(negedge clk);
    check("time-out after clears stop", to_n, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
