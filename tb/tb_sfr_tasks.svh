// Shared testbench helpers for blocks on the HN-07 SFR bus. Expect in scope:
// clk, sfr_raddr, sfr_rdata, sfr_waddr, sfr_wdata, sfr_we, checks, failures.
task automatic check(input string what, input int got, input int exp);
  checks++;
  if (got != exp) begin
    failures++;
    $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
  end
endtask
task automatic check_range(input string what, input int got, input int lo, input int hi);
  checks++;
  if (got < lo || got > hi) begin
    failures++;
    $display("FAIL %s: got %0d expected %0d..%0d", what, got, lo, hi);
  end
endtask
task automatic wr(input hn07_pkg::daddr_t a, input logic [7:0] d);
  @(negedge clk); sfr_waddr = a; sfr_wdata = d; sfr_we = 1'b1;
  @(negedge clk); sfr_we = 1'b0;
endtask
task automatic rd(input hn07_pkg::daddr_t a, output logic [7:0] d);
  sfr_raddr = a; #1; d = sfr_rdata;
endtask
