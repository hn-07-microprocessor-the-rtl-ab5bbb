// tb_hn07_ioport: writes the latch and direction registers of a port through
// the SFR bus and checks the pin outputs, output enables and read-back
// (PORT reads the pins, TRIS reads the direction register).
`timescale 1ns/1ps
module tb_hn07_ioport;
  import hn07_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  daddr_t sfr_raddr = '0, sfr_waddr = '0;
  logic [7:0] sfr_rdata, sfr_wdata = '0, pin_in = '0, pin_out, pin_oe;
  logic sfr_we = 1'b0;
  int checks = 0, failures = 0;

  hn07_ioport #(.PORT_ADDR(A_PORTC), .TRIS_ADDR(A_TRISC)) dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask
  task automatic wr(input daddr_t a, input logic [7:0] d);
    @(negedge clk); sfr_waddr = a; sfr_wdata = d; sfr_we = 1'b1;
    @(negedge clk); sfr_we = 1'b0;
  endtask
  task automatic rd(input daddr_t a, output logic [7:0] d);
    sfr_raddr = a; #1; d = sfr_rdata;
  endtask

  initial begin
    logic [7:0] d, lat, tris;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    check("reset oe", int'(pin_oe), 0);
    rd(A_TRISC, d); check("reset tris", int'(d), 8'hFF);
    for (int n = 0; n < 50; n++) begin
      lat = 8'($urandom); tris = 8'($urandom);
      wr(A_PORTC, lat); wr(A_TRISC, tris);
      wr(A_PORTA, ~lat);                 // another port's address: ignored
      pin_in = 8'($urandom);
      check("out", int'(pin_out), int'(lat));
      check("oe", int'(pin_oe), int'(8'(~tris)));
      rd(A_PORTC, d); check("read pins", int'(d), int'(pin_in));
      rd(A_TRISC, d); check("read tris", int'(d), int'(tris));
      rd(A_PORTA, d); check("other addr", int'(d), 0);
    end
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
