// tb_hn07_dpram: random simultaneous reads and writes on the dual-port RAM
// compared with an array model; checks the one-clock read latency and that
// a read of the word being written returns the old value.
`timescale 1ns/1ps
module tb_hn07_dpram;
  logic       clk = 1'b0;
  always #5 clk = !clk;
  logic [8:0] raddr, waddr;
  logic [7:0] rdata, wdata;
  logic       we;
  logic [7:0] model [512];
  int checks = 0, failures = 0;

  hn07_dpram dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    logic [7:0] exp;
    we = 1'b1;
    for (int i = 0; i < 512; i++) begin
      waddr = 9'(i); wdata = 8'($urandom); model[i] = wdata; raddr = 0;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      raddr = 9'($urandom); waddr = (n % 5 == 0) ? raddr : 9'($urandom);
      wdata = 8'($urandom); we = 1'($urandom);
      exp = model[raddr];
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL addr %h got %h exp %h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
