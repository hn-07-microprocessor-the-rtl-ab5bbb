// hn07_asm_pkg: instruction encoders used by the HN-07 testbenches to build
// test programs in memory. One function per instruction, each returning the
// 14-bit word. d = 1 writes the file register, d = 0 writes W.
package hn07_asm_pkg;
  typedef logic [13:0] insn_t;
  localparam bit F = 1'b1, W = 1'b0;

  function automatic insn_t byte_op(input logic [3:0] op, input logic [6:0] f, input bit d);
    return {2'b00, op, d, f};
  endfunction
  function automatic insn_t NOP();                             return 14'h0000; endfunction
  function automatic insn_t MOVWF(input logic [6:0] f);       return byte_op(4'h0, f, 1'b1); endfunction
  function automatic insn_t CLRF (input logic [6:0] f);       return byte_op(4'h1, f, 1'b1); endfunction
  function automatic insn_t CLRW();                            return 14'h0100; endfunction
  function automatic insn_t SUBWF(input logic [6:0] f, input bit d); return byte_op(4'h2, f, d); endfunction
  function automatic insn_t DECF (input logic [6:0] f, input bit d); return byte_op(4'h3, f, d); endfunction
  function automatic insn_t IORWF(input logic [6:0] f, input bit d); return byte_op(4'h4, f, d); endfunction
  function automatic insn_t ANDWF(input logic [6:0] f, input bit d); return byte_op(4'h5, f, d); endfunction
  function automatic insn_t XORWF(input logic [6:0] f, input bit d); return byte_op(4'h6, f, d); endfunction
  function automatic insn_t ADDWF(input logic [6:0] f, input bit d); return byte_op(4'h7, f, d); endfunction
  function automatic insn_t MOVF (input logic [6:0] f, input bit d); return byte_op(4'h8, f, d); endfunction
  function automatic insn_t COMF (input logic [6:0] f, input bit d); return byte_op(4'h9, f, d); endfunction
  function automatic insn_t INCF (input logic [6:0] f, input bit d); return byte_op(4'hA, f, d); endfunction
  function automatic insn_t DECFSZ(input logic [6:0] f, input bit d); return byte_op(4'hB, f, d); endfunction
  function automatic insn_t RRF  (input logic [6:0] f, input bit d); return byte_op(4'hC, f, d); endfunction
  function automatic insn_t RLF  (input logic [6:0] f, input bit d); return byte_op(4'hD, f, d); endfunction
  function automatic insn_t SWAPF(input logic [6:0] f, input bit d); return byte_op(4'hE, f, d); endfunction
  function automatic insn_t INCFSZ(input logic [6:0] f, input bit d); return byte_op(4'hF, f, d); endfunction
  function automatic insn_t BCF  (input logic [6:0] f, input int b); return {4'b0100, 3'(b), f}; endfunction
  function automatic insn_t BSF  (input logic [6:0] f, input int b); return {4'b0101, 3'(b), f}; endfunction
  function automatic insn_t BTFSC(input logic [6:0] f, input int b); return {4'b0110, 3'(b), f}; endfunction
  function automatic insn_t BTFSS(input logic [6:0] f, input int b); return {4'b0111, 3'(b), f}; endfunction
  function automatic insn_t CALL (input int a);                return {3'b100, 11'(a)}; endfunction
  function automatic insn_t GOTO (input int a);                return {3'b101, 11'(a)}; endfunction
  function automatic insn_t MOVLW(input logic [7:0] k);        return {6'b110000, k}; endfunction
  function automatic insn_t RETLW(input logic [7:0] k);        return {6'b110100, k}; endfunction
  function automatic insn_t IORLW(input logic [7:0] k);        return {6'b111000, k}; endfunction
  function automatic insn_t ANDLW(input logic [7:0] k);        return {6'b111001, k}; endfunction
  function automatic insn_t XORLW(input logic [7:0] k);        return {6'b111010, k}; endfunction
  function automatic insn_t SUBLW(input logic [7:0] k);        return {6'b111100, k}; endfunction
  function automatic insn_t ADDLW(input logic [7:0] k);        return {6'b111110, k}; endfunction
  function automatic insn_t RETURN();                          return 14'h0008; endfunction
  function automatic insn_t RETFIE();                          return 14'h0009; endfunction
  function automatic insn_t SLEEP();                           return 14'h0063; endfunction
  function automatic insn_t CLRWDT();                          return 14'h0064; endfunction
endpackage
