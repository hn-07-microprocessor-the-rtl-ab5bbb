// tb_hn07_cpu: self-checking test of the 5-stage HN-07 core with its RAM.
//
// A program built with hn07_asm_pkg runs from a behavioural program memory
// (combinational read). It exercises back-to-back dependences (bypass), every
// ALU class, flags, banked and indirect addressing, skips, GOTO/CALL/RETURN/
// RETLW, a computed jump through PCL, an interrupt and SLEEP/wake-up. Results
// land in RAM and are compared with values worked out here. Cycle counts:
// straight-line code must retire one instruction per clock and a GOTO must
// take two clocks; both are measured between RAM writes of marker
// instructions. Banked addressing uses all three STATUS bank bits. The SFR read bus returns 0x00 (no peripherals); an
// interrupt source is modelled here with a GIE bit set by RETFIE and
// cleared by irq_ack, and a pending flag cleared by a write to address 0x0C.
`timescale 1ns/1ps
module tb_hn07_cpu;
  import hn07_pkg::*;
  import hn07_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic [15:0] prgaddr;
  logic [13:0] prgdata;
  raddr_t      ram_raddr, ram_waddr;
  daddr_t      sfr_raddr, sfr_waddr;
  logic [7:0]  ram_rdata, ram_wdata, sfr_wdata;
  logic        ram_we, sfr_we, sfr_re, irq, wake, irq_ack, retfie, clrwdt, sleep;

  logic [13:0] rom [1024];
  assign prgdata = rom[prgaddr[9:0]];

  hn07_cpu dut (
    .clk, .rst_n, .prgaddr, .prgdata,
    .ram_raddr, .ram_rdata, .ram_we, .ram_waddr, .ram_wdata,
    .sfr_raddr, .sfr_rdata(8'h00), .sfr_waddr, .sfr_wdata, .sfr_we, .sfr_re,
    .irq, .wake, .irq_ack, .retfie, .clrwdt, .sleep
  );
  hn07_dpram u_ram (.clk, .raddr(ram_raddr), .rdata(ram_rdata), .we(ram_we),
                    .waddr(ram_waddr), .wdata(ram_wdata));

  // interrupt source model
  logic gie = 1'b0, pend = 1'b0;
  assign irq  = gie && pend;
  assign wake = pend;
  always_ff @(posedge clk) begin
    if (irq_ack) gie <= 1'b0;
    if (retfie)  gie <= 1'b1;
    if (sfr_we && sfr_waddr == 10'h00C) pend <= 1'b0;
  end

  // shadow of RAM writes and their cycle numbers
  // RAM word that holds data address a (bank 0 unless given)
  function automatic int idx(input int a);
    return int'(ram_index(daddr_t'(a)));
  endfunction
  int     cyc = 0;
  int     wr_cyc [512];
  logic [7:0] shadow [512];
  int     clrwdt_n = 0, ack_n = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (ram_we) begin
      shadow[ram_waddr] <= ram_wdata;
      wr_cyc[ram_waddr] <= cyc;
    end
    if (clrwdt && rst_n) clrwdt_n <= clrwdt_n + 1;
    if (irq_ack && rst_n) ack_n <= ack_n + 1;
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // program assembly
  int pc;
  task automatic emit(input insn_t i); rom[pc] = i; pc++; endtask

  localparam logic [6:0] STATUS = 7'h03, FSR = 7'h04, INDF = 7'h00, PCL = 7'h02, PCLATH = 7'h0A;
  int loop_a, sub_a, ret_a, pcl_tgt, idle_a;

  initial begin
    for (int i = 0; i < 1024; i++) rom[i] = NOP();
    for (int i = 0; i < 512; i++) shadow[i] = 8'h00;
    pc = 0;
    emit(GOTO(16'h010));
    // interrupt service routine at 0x004
    pc = 4;
    emit(MOVLW(8'hC3));  emit(MOVWF(7'h58));
    emit(CLRF(7'h0C));            // clears the pending source (tb model)
    emit(RETFIE());
    // main program at 0x010
    pc = 16'h010;
    // 1: bypass, back-to-back
    emit(MOVLW(8'h05)); emit(MOVWF(7'h60)); emit(MOVLW(8'h03)); emit(ADDWF(7'h60, F));
    emit(INCF(7'h60, F)); emit(INCF(7'h60, F));                  // 0x20 = 0x0A
    // 2: timing markers around 6 straight-line instructions
    emit(MOVWF(7'h48));
    emit(NOP()); emit(NOP()); emit(NOP()); emit(NOP()); emit(NOP()); emit(NOP());
    emit(MOVWF(7'h49));
    emit(GOTO(pc + 1));
    emit(MOVWF(7'h4A));                                          // GOTO: 2 cycles
    // 3: loop with DECFSZ / GOTO
    emit(MOVLW(8'h04)); emit(MOVWF(7'h61)); emit(CLRF(7'h62));
    loop_a = pc;
    emit(INCF(7'h62, F)); emit(DECFSZ(7'h61, F)); emit(GOTO(loop_a));
    // 4: call / return / retlw
    sub_a = 16'h100; ret_a = 16'h108;
    emit(CALL(sub_a)); emit(CALL(ret_a)); emit(MOVWF(7'h64));
    // 5: carry, RLF, BTFSS on STATUS right after the flag write
    emit(MOVLW(8'hF0)); emit(MOVWF(7'h65)); emit(MOVLW(8'h20)); emit(ADDWF(7'h65, F));
    emit(BTFSS(STATUS, 0)); emit(GOTO(16'h3FF));
    emit(RLF(7'h65, F));                                         // 0x10 -> 0x21
    emit(MOVLW(8'h01)); emit(MOVWF(7'h66));
    // 6: ALU mix
    emit(MOVLW(8'h3C)); emit(MOVWF(7'h67)); emit(MOVLW(8'h0F));
    emit(SUBWF(7'h67, F));                                       // 0x2D
    emit(SWAPF(7'h67, W)); emit(MOVWF(7'h68));                   // 0xD2
    emit(COMF(7'h68, F));                                        // 0x2D
    emit(MOVLW(8'hAA)); emit(XORLW(8'hFF)); emit(ANDLW(8'h3F)); emit(IORLW(8'h80));
    emit(MOVWF(7'h69));                                          // 0x95
    emit(MOVLW(8'h10)); emit(SUBLW(8'h05)); emit(MOVWF(7'h6A));  // 0xF5
    emit(RRF(7'h6A, F));                                         // C was 0 -> 0x7A
    emit(BCF(7'h69, 7)); emit(BSF(7'h69, 1));                    // 0x17
    emit(MOVF(7'h69, W)); emit(ADDLW(8'h01)); emit(MOVWF(7'h6B)); // 0x18
    emit(DECF(7'h6B, F));                                        // 0x17
    emit(CLRW()); emit(IORWF(7'h6B, W)); emit(ANDWF(7'h69, W)); emit(XORWF(7'h60, W));
    emit(MOVWF(7'h6C));                                          // 0x17^0x0A = 0x1D
    emit(MOVLW(8'hFF)); emit(MOVWF(7'h6D)); emit(INCFSZ(7'h6D, F)); emit(GOTO(16'h3FF));
    // 7: bank 1 and indirect
    emit(BSF(STATUS, 5)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(MOVLW(8'h99)); emit(MOVWF(7'h60));                      // RAM 0xA0
    emit(BCF(STATUS, 5)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(MOVLW(8'h70)); emit(MOVWF(FSR)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(MOVLW(8'hAB)); emit(MOVWF(INDF));                       // RAM 0x70
    // bank 4 (STATUS[7]) direct, then indirect into page STATUS[7:6] = 10
    emit(BSF(STATUS, 7)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(MOVLW(8'h3C)); emit(MOVWF(7'h45));                      // data 0x245
    emit(MOVLW(8'hC7)); emit(MOVWF(FSR)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(MOVLW(8'h6D)); emit(MOVWF(INDF));                       // data 0x2C7
    emit(BCF(STATUS, 7)); emit(NOP()); emit(NOP()); emit(NOP());
    // 8: computed jump through PCL (PCLATH = 0x02, target 0x220)
    emit(MOVLW(8'h02)); emit(MOVWF(PCLATH)); emit(MOVLW(8'h20)); emit(MOVWF(PCL));
    emit(GOTO(16'h3FF));
    // returns here from 0x220
    idle_a = pc;
    emit(MOVLW(8'h5A)); emit(MOVWF(7'h6F));
    emit(SLEEP());
    emit(MOVLW(8'h11)); emit(MOVWF(7'h59));                      // after wake-up
    emit(CLRWDT());
    emit(MOVLW(8'hD0)); emit(MOVWF(7'h7F));                      // done marker
    emit(GOTO(pc));
    // subroutines
    pc = sub_a; emit(MOVLW(8'h55)); emit(MOVWF(7'h63)); emit(RETURN());
    pc = ret_a; emit(RETLW(8'h77));
    // PCL target
    pc = 16'h220; emit(MOVLW(8'h01)); emit(MOVWF(7'h6E));
    emit(MOVLW(8'h00)); emit(MOVWF(PCLATH)); emit(NOP()); emit(NOP()); emit(NOP());
    emit(GOTO(idle_a));
    // trap
    pc = 16'h3FF; emit(MOVWF(7'h7E)); 

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // enable the interrupt model once the program runs, raise a request
    wait (shadow[idx('h62)] == 8'h02);
    gie = 1'b1;
    @(posedge clk); pend = 1'b1;
    wait (shadow[idx('h58)] == 8'hC3);
    // wait for sleep, then wake up
    wait (sleep);
    repeat (20) @(posedge clk);
    check("asleep: no write of 0x51 yet", int'(shadow[idx('h59)]), 0);
    gie = 1'b0;
    pend = 1'b1;
    @(posedge clk);
    pend = 1'b0;
    wait (shadow[idx('h7F)] == 8'hD0);
    repeat (5) @(posedge clk);

    check("bypass add/inc", int'(u_ram.mem[idx('h60)]), 8'h0A);
    check("straight line 1 insn/clock", wr_cyc[idx('h49)] - wr_cyc[idx('h48)], 7);
    check("goto 2 clocks", wr_cyc[idx('h4A)] - wr_cyc[idx('h49)], 3);
    check("loop count", int'(u_ram.mem[idx('h62)]), 4);
    check("loop counter", int'(u_ram.mem[idx('h61)]), 0);
    check("call/return", int'(u_ram.mem[idx('h63)]), 8'h55);
    check("retlw", int'(u_ram.mem[idx('h64)]), 8'h77);
    check("carry add", int'(u_ram.mem[idx('h65)]), 8'h21);
    check("btfss carry", int'(u_ram.mem[idx('h66)]), 1);
    check("subwf", int'(u_ram.mem[idx('h67)]), 8'h2D);
    check("comf/swapf", int'(u_ram.mem[idx('h68)]), 8'h2D);
    check("bcf/bsf", int'(u_ram.mem[idx('h69)]), 8'h17);
    check("sublw/rrf", int'(u_ram.mem[idx('h6A)]), 8'h7A);
    check("decf", int'(u_ram.mem[idx('h6B)]), 8'h17);
    check("w ops", int'(u_ram.mem[idx('h6C)]), 8'h1D);
    check("incfsz", int'(u_ram.mem[idx('h6D)]), 0);
    check("bank 1 write", int'(u_ram.mem[idx('hE0)]), 8'h99);
    check("indirect write", int'(u_ram.mem[idx('h70)]), 8'hAB);
    check("bank 4 direct write", int'(u_ram.mem[idx('h245)]), 8'h3C);
    check("page 2 indirect write", int'(u_ram.mem[idx('h2C7)]), 8'h6D);
    check("pcl jump", int'(u_ram.mem[idx('h6E)]), 1);
    check("pcl return", int'(u_ram.mem[idx('h6F)]), 8'h5A);
    check("isr ran", int'(u_ram.mem[idx('h58)]), 8'hC3);
    check("one interrupt", ack_n, 1);
    check("woke up", int'(u_ram.mem[idx('h59)]), 8'h11);
    check("no trap", int'(shadow[idx('h7E)]), 0);
    check("clrwdt pulses (sleep+clrwdt)", clrwdt_n, 2);
    check("sleep low at end", int'(sleep), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
