// tb_hn07_usart: the USART in its three modes.
//   async: transmitted frames are decoded here by sampling txdto at bit
//     centres (start bit length and data checked), frames sent by the
//     testbench are received (data, RCIF, FERR on a bad stop bit, OERR on
//     overrun), and a txdto->rxdli loopback carries several bytes.
//   sync master: the word on txdto is sampled here on rising txcko edges;
//     a single receive (SREN) clocks in a word driven here.
//   sync slave: the testbench drives rxcki, sends a word into rxdli and
//     samples the word the USART shifts out on txdto.
`timescale 1ns/1ps
module tb_hn07_usart;
  import hn07_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  daddr_t sfr_raddr = '0, sfr_waddr = '0;
  logic [7:0] sfr_rdata, sfr_wdata = '0;
  logic sfr_we = 1'b0, sfr_re = 1'b0;
  logic rx_tb = 1'b1, rxcki = 1'b0, loop = 1'b0;
  logic rxdli, txdto, txcko, tx_empty, rc_full;
  int checks = 0, failures = 0;
  localparam int BIT = 32;               // SPBRG = 1: 2 clocks per tick, 16 ticks per bit

  assign rxdli = loop ? txdto : rx_tb;
  hn07_usart dut (.*);
  `include "tb_sfr_tasks.svh"

  task automatic pop(output logic [7:0] d);
    rd(A_RCREG, d);
    @(negedge clk); sfr_waddr = A_RCREG; sfr_re = 1'b1; @(negedge clk); sfr_re = 1'b0;
  endtask
  task automatic send_async(input logic [7:0] d, input logic stop);
    logic [9:0] f;
    f = {stop, d, 1'b0};
    for (int i = 0; i < 10; i++) begin rx_tb = f[i]; repeat (BIT) @(negedge clk); end
    rx_tb = 1'b1; repeat (BIT) @(negedge clk);
  endtask
  task automatic recv_async(output logic [7:0] d, output int start_len);
    int n = 0;
    while (txdto) @(negedge clk);
    while (!txdto) begin n++; @(negedge clk); end
    start_len = n;
    repeat (BIT / 2 - 1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin d[i] = txdto; repeat (BIT) @(negedge clk); end
    check("async stop bit", int'(txdto), 1);
  endtask

  initial begin
    logic [7:0] d, v;
    int slen, clocks;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    rd(A_TXSTA, v); check("TRMT at reset", int'(v[1]), 1);
    check("TXIF at reset", int'(tx_empty), 1);
    // ---------------- asynchronous ----------------
    wr(A_SPBRG, 8'd1);
    wr(A_RCSTA, 8'h90);                   // SPEN, CREN
    wr(A_TXSTA, 8'h20);                   // TXEN, async
    check("idle line high", int'(txdto), 1);
    wr(A_TXREG, 8'hA5);
    recv_async(d, slen);
    check("async tx data", int'(d), 8'hA5);
    check_range("async start bit length", slen, BIT - 1, BIT + 1);
    send_async(8'h3C, 1'b1);
    check("RCIF", int'(rc_full), 1);
    rd(A_RCSTA, v); check("no FERR", int'(v[2]), 0);
    pop(d); check("async rx data", int'(d), 8'h3C);
    check("RCIF cleared", int'(rc_full), 0);
    send_async(8'h81, 1'b0);
    rd(A_RCSTA, v); check("FERR", int'(v[2]), 1);
    pop(d); check("data with FERR", int'(d), 8'h81);
    send_async(8'h11, 1'b1); send_async(8'h22, 1'b1);
    rd(A_RCSTA, v); check("OERR", int'(v[1]), 1);
    pop(d); check("first byte kept", int'(d), 8'h11);
    wr(A_RCSTA, 8'h80); wr(A_RCSTA, 8'h90);
    rd(A_RCSTA, v); check("OERR cleared by CREN", int'(v[1]), 0);
    // loopback, back-to-back transmit through the buffer
    loop = 1'b1;
    for (int i = 0; i < 3; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      wait (tx_empty); wr(A_TXREG, b);
      wait (rc_full); @(negedge clk);
      pop(d); check($sformatf("loopback %0d", i), int'(d), int'(b));
    end
    loop = 1'b0;
    repeat (4 * BIT) @(negedge clk);
    // ---------------- synchronous master ----------------
    wr(A_TXSTA, 8'hB0);                   // CSRC, TXEN, SYNC
    wr(A_RCSTA, 8'h80);
    wr(A_TXREG, 8'h6B);
    d = '0; clocks = 0;
    fork
      begin
        for (int i = 0; i < 8; i++) begin
          @(posedge txcko); d[i] = txdto; clocks++;
        end
      end
      begin repeat (200) @(negedge clk); end
    join_any
    disable fork;
    check("sync master tx data", int'(d), 8'h6B);
    check("sync master 8 clocks", clocks, 8);
    repeat (20) @(negedge clk);
    rd(A_TXSTA, v); check("TRMT after sync tx", int'(v[1]), 1);
    wr(A_SPBRG, 8'd3);
    wr(A_TXSTA, 8'h90);                   // CSRC, SYNC, TXEN = 0
    v = 8'hD4;
    rx_tb = v[0];
    wr(A_RCSTA, 8'hA0);                   // SPEN, SREN
    for (int i = 1; i <= 8; i++) begin
      @(posedge txcko); @(negedge txcko);
      rx_tb = (i < 8) ? v[i] : 1'b1;
    end
    repeat (10) @(negedge clk);
    check("sync master rx RCIF", int'(rc_full), 1);
    pop(d); check("sync master rx data", int'(d), 8'hD4);
    rd(A_RCSTA, v); check("SREN cleared", int'(v[5]), 0);
    repeat (20) @(negedge clk);
    check("clock stops", int'(txcko), 0);
    // ---------------- synchronous slave ----------------
    wr(A_TXSTA, 8'h10);                   // slave, SYNC
    wr(A_RCSTA, 8'h90);                   // SPEN, CREN
    v = 8'h5E;
    for (int i = 0; i < 8; i++) begin
      rx_tb = v[i]; repeat (5) @(negedge clk);
      rxcki = 1'b1; repeat (5) @(negedge clk);
      rxcki = 1'b0;
    end
    repeat (6) @(negedge clk);
    check("sync slave rx RCIF", int'(rc_full), 1);
    pop(d); check("sync slave rx data", int'(d), 8'h5E);
    wr(A_RCSTA, 8'h80);
    wr(A_TXSTA, 8'h30);                   // slave, SYNC, TXEN
    wr(A_TXREG, 8'hC7);
    repeat (4) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (5) @(negedge clk);
      d[i] = txdto;
      rxcki = 1'b1; repeat (5) @(negedge clk);
      rxcki = 1'b0;
    end
    repeat (6) @(negedge clk);
    check("sync slave tx data", int'(d), 8'hC7);
    rd(A_TXSTA, v); check("TRMT after slave tx", int'(v[1]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
