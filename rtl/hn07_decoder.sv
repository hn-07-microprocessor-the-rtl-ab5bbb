// hn07_decoder: the "ALU decode" half of pipeline stage 3.
//
// Turns a 14-bit instruction into the control word (hn07_pkg::ctrl_t) that
// the ALU and write-back stages use: the ALU operation, whether the B operand
// is the literal or the file register, which destinations (f, W) and flags
// (Z, C, DC) are written, and whether the instruction is a conditional skip,
// SLEEP or CLRWDT. Purely combinational.
//
// The document says the HN-07 has 37 14-bit instructions but does not list
// them; this decoder implements the 35-instruction mid-range PIC encoding.
// Jumps, calls and returns (GOTO, CALL, RETURN, RETLW, RETFIE) are acted on in
// the address-decode stage; here they only get their W write (RETLW).
module hn07_decoder
  import hn07_pkg::*;
(
  input  logic [13:0] ir,
  output ctrl_t       ctrl
);
  always_comb begin
    ctrl         = '0;
    ctrl.op      = ALU_PASSF;
    ctrl.skip    = SKIP_NONE;
    unique case (ir[13:12])
      2'b00: begin
        ctrl.rd_f = 1'b1;
        ctrl.we_f = ir[7];
        ctrl.we_w = !ir[7];
        unique case (ir[11:8])
          4'h0: begin
            ctrl.rd_f = 1'b0;
            ctrl.we_w = 1'b0;
            if (ir[7]) begin
              ctrl.op = ALU_PASSW;                 // MOVWF
            end else begin
              ctrl.we_f = 1'b0;
              unique casez (ir[6:0])
                7'b00?0000: ;                       // NOP
                7'h08, 7'h09: ;                     // RETURN, RETFIE (stage 2)
                7'h63: ctrl.sleep  = 1'b1;          // SLEEP
                7'h64: ctrl.clrwdt = 1'b1;          // CLRWDT
                default: ctrl.illegal = 1'b1;
              endcase
            end
          end
          4'h1: begin ctrl.op = ALU_CLR; ctrl.rd_f = 1'b0; ctrl.upd_z = 1'b1; end // CLRF/CLRW
          4'h2: begin ctrl.op = ALU_SUB;  ctrl.upd_z = 1'b1; ctrl.upd_c = 1'b1; ctrl.upd_dc = 1'b1; end
          4'h3: begin ctrl.op = ALU_DEC;  ctrl.upd_z = 1'b1; end
          4'h4: begin ctrl.op = ALU_IOR;  ctrl.upd_z = 1'b1; end
          4'h5: begin ctrl.op = ALU_AND;  ctrl.upd_z = 1'b1; end
          4'h6: begin ctrl.op = ALU_XOR;  ctrl.upd_z = 1'b1; end
          4'h7: begin ctrl.op = ALU_ADD;  ctrl.upd_z = 1'b1; ctrl.upd_c = 1'b1; ctrl.upd_dc = 1'b1; end
          4'h8: begin ctrl.op = ALU_PASSF; ctrl.upd_z = 1'b1; end
          4'h9: begin ctrl.op = ALU_COM;  ctrl.upd_z = 1'b1; end
          4'hA: begin ctrl.op = ALU_INC;  ctrl.upd_z = 1'b1; end
          4'hB: begin ctrl.op = ALU_DEC;  ctrl.skip = SKIP_IF_ZERO; end  // DECFSZ
          4'hC: begin ctrl.op = ALU_RRF;  ctrl.upd_c = 1'b1; end
          4'hD: begin ctrl.op = ALU_RLF;  ctrl.upd_c = 1'b1; end
          4'hE: begin ctrl.op = ALU_SWAP; end
          4'hF: begin ctrl.op = ALU_INC;  ctrl.skip = SKIP_IF_ZERO; end  // INCFSZ
          default: ;
        endcase
      end
      2'b01: begin
        ctrl.rd_f = 1'b1;
        unique case (ir[11:10])
          2'b00: begin ctrl.op = ALU_BCF; ctrl.we_f = 1'b1; end
          2'b01: begin ctrl.op = ALU_BSF; ctrl.we_f = 1'b1; end
          2'b10: begin ctrl.op = ALU_BTST; ctrl.skip = SKIP_IF_ZERO; end // BTFSC
          default: begin ctrl.op = ALU_BTST; ctrl.skip = SKIP_IF_NZ; end // BTFSS
        endcase
      end
      2'b10: ;                                      // CALL, GOTO (stage 2)
      default: begin
        ctrl.use_lit = 1'b1;
        ctrl.we_w    = 1'b1;
        unique casez (ir[11:8])
          4'b00??: ctrl.op = ALU_PASSK;             // MOVLW
          4'b01??: ctrl.op = ALU_PASSK;             // RETLW
          4'b1000: begin ctrl.op = ALU_IOR; ctrl.upd_z = 1'b1; end
          4'b1001: begin ctrl.op = ALU_AND; ctrl.upd_z = 1'b1; end
          4'b1010: begin ctrl.op = ALU_XOR; ctrl.upd_z = 1'b1; end
          4'b110?: begin ctrl.op = ALU_SUB; ctrl.upd_z = 1'b1; ctrl.upd_c = 1'b1; ctrl.upd_dc = 1'b1; end
          4'b111?: begin ctrl.op = ALU_ADD; ctrl.upd_z = 1'b1; ctrl.upd_c = 1'b1; ctrl.upd_dc = 1'b1; end
          default: begin ctrl.we_w = 1'b0; ctrl.illegal = 1'b1; end
        endcase
      end
    endcase
  end
endmodule
