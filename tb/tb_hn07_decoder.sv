// tb_hn07_decoder: checks the control word of one encoding of each
// instruction class against the expected operation, destinations, flags and
// skip kind, listed by hand from the instruction set table.
`timescale 1ns/1ps
module tb_hn07_decoder;
  import hn07_pkg::*;
  import hn07_asm_pkg::*;
  logic [13:0] ir;
  ctrl_t       c;
  int checks = 0, failures = 0;

  hn07_decoder dut (.ir, .ctrl(c));

  // expected: op, use_lit, we_f, we_w, {z,c,dc}, skip, sleep, clrwdt, illegal
  task automatic t(input string name, input insn_t i, input alu_op_t op, input bit lit,
                   input bit wf, input bit ww, input logic [2:0] fl, input skip_t sk,
                   input bit slp = 0, input bit cw = 0, input bit ill = 0);
    ir = i;
    #1;
    checks++;
    if ((c.op != op && (wf || ww || sk != SKIP_NONE)) || c.use_lit != lit || c.we_f != wf ||
        c.we_w != ww || {c.upd_z, c.upd_c, c.upd_dc} != fl || c.skip != sk ||
        c.sleep != slp || c.clrwdt != cw || c.illegal != ill) begin
      failures++;
      $display("FAIL %s: %p", name, c);
    end
  endtask

  initial begin
    t("movwf",  MOVWF(7'h20),    ALU_PASSW, 0, 1, 0, 3'b000, SKIP_NONE);
    t("nop",    NOP(),           ALU_PASSF, 0, 0, 0, 3'b000, SKIP_NONE);
    t("clrf",   CLRF(7'h20),     ALU_CLR,   0, 1, 0, 3'b100, SKIP_NONE);
    t("clrw",   CLRW(),          ALU_CLR,   0, 0, 1, 3'b100, SKIP_NONE);
    t("subwf",  SUBWF(7'h21, W), ALU_SUB,   0, 0, 1, 3'b111, SKIP_NONE);
    t("decf",   DECF(7'h21, F),  ALU_DEC,   0, 1, 0, 3'b100, SKIP_NONE);
    t("iorwf",  IORWF(7'h21, F), ALU_IOR,   0, 1, 0, 3'b100, SKIP_NONE);
    t("andwf",  ANDWF(7'h21, W), ALU_AND,   0, 0, 1, 3'b100, SKIP_NONE);
    t("xorwf",  XORWF(7'h21, F), ALU_XOR,   0, 1, 0, 3'b100, SKIP_NONE);
    t("addwf",  ADDWF(7'h21, F), ALU_ADD,   0, 1, 0, 3'b111, SKIP_NONE);
    t("movf",   MOVF(7'h21, W),  ALU_PASSF, 0, 0, 1, 3'b100, SKIP_NONE);
    t("comf",   COMF(7'h21, F),  ALU_COM,   0, 1, 0, 3'b100, SKIP_NONE);
    t("incf",   INCF(7'h21, F),  ALU_INC,   0, 1, 0, 3'b100, SKIP_NONE);
    t("decfsz", DECFSZ(7'h21, F),ALU_DEC,   0, 1, 0, 3'b000, SKIP_IF_ZERO);
    t("rrf",    RRF(7'h21, F),   ALU_RRF,   0, 1, 0, 3'b010, SKIP_NONE);
    t("rlf",    RLF(7'h21, W),   ALU_RLF,   0, 0, 1, 3'b010, SKIP_NONE);
    t("swapf",  SWAPF(7'h21, F), ALU_SWAP,  0, 1, 0, 3'b000, SKIP_NONE);
    t("incfsz", INCFSZ(7'h21, W),ALU_INC,   0, 0, 1, 3'b000, SKIP_IF_ZERO);
    t("bcf",    BCF(7'h21, 3),   ALU_BCF,   0, 1, 0, 3'b000, SKIP_NONE);
    t("bsf",    BSF(7'h21, 3),   ALU_BSF,   0, 1, 0, 3'b000, SKIP_NONE);
    t("btfsc",  BTFSC(7'h21, 3), ALU_BTST,  0, 0, 0, 3'b000, SKIP_IF_ZERO);
    t("btfss",  BTFSS(7'h21, 3), ALU_BTST,  0, 0, 0, 3'b000, SKIP_IF_NZ);
    t("call",   CALL(5),         ALU_PASSF, 0, 0, 0, 3'b000, SKIP_NONE);
    t("goto",   GOTO(5),         ALU_PASSF, 0, 0, 0, 3'b000, SKIP_NONE);
    t("movlw",  MOVLW(8'h12),    ALU_PASSK, 1, 0, 1, 3'b000, SKIP_NONE);
    t("retlw",  RETLW(8'h12),    ALU_PASSK, 1, 0, 1, 3'b000, SKIP_NONE);
    t("iorlw",  IORLW(8'h12),    ALU_IOR,   1, 0, 1, 3'b100, SKIP_NONE);
    t("andlw",  ANDLW(8'h12),    ALU_AND,   1, 0, 1, 3'b100, SKIP_NONE);
    t("xorlw",  XORLW(8'h12),    ALU_XOR,   1, 0, 1, 3'b100, SKIP_NONE);
    t("sublw",  SUBLW(8'h12),    ALU_SUB,   1, 0, 1, 3'b111, SKIP_NONE);
    t("addlw",  ADDLW(8'h12),    ALU_ADD,   1, 0, 1, 3'b111, SKIP_NONE);
    t("return", RETURN(),        ALU_PASSF, 0, 0, 0, 3'b000, SKIP_NONE);
    t("retfie", RETFIE(),        ALU_PASSF, 0, 0, 0, 3'b000, SKIP_NONE);
    t("sleep",  SLEEP(),         ALU_PASSF, 0, 0, 0, 3'b000, SKIP_NONE, 1, 0);
    t("clrwdt", CLRWDT(),        ALU_PASSF, 0, 0, 0, 3'b000, SKIP_NONE, 0, 1);
    t("illegal",14'h0001,        ALU_PASSF, 0, 0, 0, 3'b000, SKIP_NONE, 0, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
