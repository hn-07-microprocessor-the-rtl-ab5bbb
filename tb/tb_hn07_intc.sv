// tb_hn07_intc: drives each of the eight interrupt sources and checks the
// flag it sets, that irq follows enable and GIE, that wake ignores GIE, that
// irq_ack clears GIE and retfie sets it, that software clears flags, and
// that extint respects the selected edge.
`timescale 1ns/1ps
module tb_hn07_intc;
  import hn07_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  daddr_t sfr_raddr = '0, sfr_waddr = '0;
  logic [7:0] sfr_rdata, sfr_wdata = '0;
  logic sfr_we = 1'b0;
  logic extint = 1'b0, intedg = 1'b1;
  logic [3:0] pchg_pins = '0;
  logic t0_ovf = 0, t1_ovf = 0, t2_int = 0, ccp_int = 0, rc_full = 0, tx_empty = 0;
  logic irq_ack = 0, retfie = 0, irq, wake;
  int checks = 0, failures = 0;

  hn07_intc dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask
  task automatic wr(input daddr_t a, input logic [7:0] d);
    @(negedge clk); sfr_waddr = a; sfr_wdata = d; sfr_we = 1'b1;
    @(negedge clk); sfr_we = 1'b0;
  endtask
  task automatic rdb(input daddr_t a, output logic [7:0] d);
    sfr_raddr = a; #1; d = sfr_rdata;
  endtask
  task automatic pulse(input int which);
    @(negedge clk);
    case (which)
      0: t0_ovf = 1; 1: t1_ovf = 1; 2: t2_int = 1; 3: ccp_int = 1;
      default: ;
    endcase
    @(negedge clk);
    t0_ovf = 0; t1_ovf = 0; t2_int = 0; ccp_int = 0;
  endtask

  initial begin
    logic [7:0] d;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    check("no irq after reset", int'(irq), 0);
    // Timer0 flag, INTCON enable, GIE
    pulse(0);
    rdb(A_INTCON, d); check("T0IF", int'(d), 8'h04);
    check("no wake w/o enable", int'(wake), 0);
    wr(A_INTCON, 8'h24);               // T0IE + T0IF
    check("wake", int'(wake), 1);
    check("irq needs GIE", int'(irq), 0);
    wr(A_INTCON, 8'hA4);
    check("irq", int'(irq), 1);
    @(negedge clk); irq_ack = 1; @(negedge clk); irq_ack = 0;
    rdb(A_INTCON, d); check("ack clears GIE", int'(d), 8'h24);
    wr(A_INTCON, 8'h20);               // clear flag
    @(negedge clk); retfie = 1; @(negedge clk); retfie = 0;
    rdb(A_INTCON, d); check("retfie sets GIE", int'(d), 8'hA0);
    check("flag cleared -> no irq", int'(irq), 0);
    // peripheral flags
    wr(A_INTCON, 8'hC0); wr(A_PIE1, 8'h37);
    pulse(1); rdb(A_PIR1, d); check("TMR1IF", int'(d), 8'h01); check("irq t1", int'(irq), 1);
    pulse(2); rdb(A_PIR1, d); check("TMR2IF", int'(d), 8'h03);
    pulse(3); rdb(A_PIR1, d); check("CCP1IF", int'(d), 8'h07);
    wr(A_PIR1, 8'h00); rdb(A_PIR1, d); check("PIR1 cleared", int'(d), 0);
    check("no irq", int'(irq), 0);
    rc_full = 1; #1; rdb(A_PIR1, d); check("RCIF", int'(d), 8'h20); check("irq rc", int'(irq), 1);
    rc_full = 0; tx_empty = 1; #1; rdb(A_PIR1, d); check("TXIF", int'(d), 8'h10); check("irq tx", int'(irq), 1);
    tx_empty = 0;
    wr(A_PIE1, 8'h00); wr(A_PIR1, 8'h00);
    // external interrupt, rising then falling edge
    wr(A_INTCON, 8'h90);
    extint = 1; repeat (4) @(negedge clk);
    rdb(A_INTCON, d); check("INTF rising", int'(d), 8'h92); check("irq int", int'(irq), 1);
    wr(A_INTCON, 8'h10);
    extint = 0; repeat (4) @(negedge clk);
    rdb(A_INTCON, d); check("no INTF on falling", int'(d), 8'h10);
    intedg = 0; extint = 1; repeat (4) @(negedge clk); extint = 0; repeat (4) @(negedge clk);
    rdb(A_INTCON, d); check("INTF falling", int'(d), 8'h12);
    // port change
    wr(A_INTCON, 8'h08);
    pchg_pins = 4'b0100; repeat (5) @(negedge clk);
    rdb(A_INTCON, d); check("RBIF", int'(d), 8'h09); check("wake rb", int'(wake), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
