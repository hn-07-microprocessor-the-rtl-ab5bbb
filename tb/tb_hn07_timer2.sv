// tb_hn07_timer2: Timer2 period (PR2 + 1 counts), prescaler 1:1/1:4/1:16,
// postscaler 1:1..1:16, counted as t2_match and t2_int pulses over a known
// number of clocks, and the TMR2 range never exceeding PR2.
`timescale 1ns/1ps
module tb_hn07_timer2;
  import hn07_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  daddr_t sfr_raddr = '0, sfr_waddr = '0;
  logic [7:0] sfr_rdata, sfr_wdata = '0, tmr2, pr2_now = 8'hFF;
  logic [1:0] pwm_frac;
  logic sfr_we = 1'b0, t2_match, t2_int;
  int checks = 0, failures = 0, m_n = 0, i_n = 0, over = 0;

  hn07_timer2 dut (.*);
  `include "tb_sfr_tasks.svh"
  always_ff @(posedge clk) begin
    if (t2_match) m_n <= m_n + 1;
    if (t2_int)   i_n <= i_n + 1;
    if (rst_n && tmr2 > pr2_now) over <= over + 1;
  end

  initial begin
    logic [7:0] v;
    int pre [3] = '{1, 4, 16};
    repeat (2) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    rd(A_PR2, v); check("PR2 reset", int'(v), 8'hFF);
    wr(A_PR2, 8'd9); pr2_now = 8'd9;
    for (int p = 0; p < 3; p++) begin
      for (int post = 0; post < 16; post += 5) begin
        wr(A_T2CON, 8'(post << 3) | 8'h04 | 8'(p));
        wr(A_TMR2, 8'h00);
        m_n = 0; i_n = 0;
        repeat (10 * pre[p] * (post + 1) * 3 + 2) @(negedge clk);
        check($sformatf("periods pre=%0d post=%0d", pre[p], post + 1), m_n, 3 * (post + 1));
        check($sformatf("interrupts pre=%0d post=%0d", pre[p], post + 1), i_n, 3);
      end
    end
    check("TMR2 <= PR2", over, 0);
    wr(A_T2CON, 8'h00);
    rd(A_TMR2, v); repeat (20) @(negedge clk); rd(A_TMR2, sfr_wdata);
    check("off", int'(sfr_wdata), int'(v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
