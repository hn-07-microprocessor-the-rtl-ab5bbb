// hn07_alu: the 8-bit ALU of pipeline stage 4.
//
// Inputs are the W register, the B operand (file register or literal, chosen
// by the caller), a 3-bit bit index for the bit operations, the carry in and
// the operation. Outputs are the result and the Z, DC and C flags the
// operation would produce; the control word decides which flags are kept.
// Subtraction is B - W with C = no borrow, as in the PIC family. Purely
// combinational. The document names the ALU and its inputs (W, the data read
// in stage 3, the control signals); the operation set is this design's.
module hn07_alu
  import hn07_pkg::*;
(
  input  alu_op_t    op,
  input  logic [7:0] w,
  input  logic [7:0] b,
  input  logic [2:0] bitsel,
  input  logic       cin,
  output logic [7:0] y,
  output logic       z,
  output logic       dc,
  output logic       c
);
  logic [8:0] sum;
  logic [4:0] nib;
  logic [7:0] mask;

  always_comb begin
    mask = 8'h01 << bitsel;
    sum  = '0;
    nib  = '0;
    c    = cin;
    dc   = 1'b0;
    unique case (op)
      ALU_PASSF: y = b;
      ALU_PASSW: y = w;
      ALU_PASSK: y = b;
      ALU_CLR:   y = 8'h00;
      ALU_ADD: begin
        sum = {1'b0, b} + {1'b0, w};
        nib = {1'b0, b[3:0]} + {1'b0, w[3:0]};
        y = sum[7:0]; c = sum[8]; dc = nib[4];
      end
      ALU_SUB: begin
        sum = {1'b0, b} + {1'b0, ~w} + 9'd1;
        nib = {1'b0, b[3:0]} + {1'b0, ~w[3:0]} + 5'd1;
        y = sum[7:0]; c = sum[8]; dc = nib[4];
      end
      ALU_AND:  y = b & w;
      ALU_IOR:  y = b | w;
      ALU_XOR:  y = b ^ w;
      ALU_COM:  y = ~b;
      ALU_INC:  y = b + 8'd1;
      ALU_DEC:  y = b - 8'd1;
      ALU_RRF:  begin y = {cin, b[7:1]}; c = b[0]; end
      ALU_RLF:  begin y = {b[6:0], cin}; c = b[7]; end
      ALU_SWAP: y = {b[3:0], b[7:4]};
      ALU_BCF:  y = b & ~mask;
      ALU_BSF:  y = b | mask;
      ALU_BTST: y = b & mask;
      default:  y = b;
    endcase
    z = (y == 8'h00);
  end
endmodule
