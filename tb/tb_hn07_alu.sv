// tb_hn07_alu: random test of the HN-07 ALU against a reference model
// written independently below (integer arithmetic), covering every operation
// and the Z, DC and C flags.
`timescale 1ns/1ps
module tb_hn07_alu;
  import hn07_pkg::*;
  alu_op_t    op;
  logic [7:0] w, b, y;
  logic [2:0] bitsel;
  logic       cin, z, dc, c;
  int checks = 0, failures = 0;

  hn07_alu dut (.op, .w, .b, .bitsel, .cin, .y, .z, .dc, .c);

  task automatic ref_model(output int ry, output int rc, output int rdc);
    int bi, wi;
    bi = int'(b); wi = int'(w); rc = int'(cin); rdc = 0;
    case (op)
      ALU_PASSF, ALU_PASSK: ry = bi;
      ALU_PASSW: ry = wi;
      ALU_CLR:   ry = 0;
      ALU_ADD:   begin ry = (bi + wi) % 256; rc = (bi + wi) > 255; rdc = ((bi % 16) + (wi % 16)) > 15; end
      ALU_SUB:   begin ry = (bi - wi + 256) % 256; rc = bi >= wi; rdc = (bi % 16) >= (wi % 16); end
      ALU_AND:   ry = bi & wi;
      ALU_IOR:   ry = bi | wi;
      ALU_XOR:   ry = bi ^ wi;
      ALU_COM:   ry = 255 - bi;
      ALU_INC:   ry = (bi + 1) % 256;
      ALU_DEC:   ry = (bi + 255) % 256;
      ALU_RRF:   begin ry = bi / 2 + 128 * int'(cin); rc = bi % 2; end
      ALU_RLF:   begin ry = (bi * 2) % 256 + int'(cin); rc = bi / 128; end
      ALU_SWAP:  ry = (bi % 16) * 16 + bi / 16;
      ALU_BCF:   ry = bi & (255 - (1 << bitsel));
      ALU_BSF:   ry = bi | (1 << bitsel);
      default:   ry = bi & (1 << bitsel);
    endcase
  endtask

  initial begin
    int ry, rc, rdc;
    for (int n = 0; n < 4000; n++) begin
      op = alu_op_t'($urandom_range(0, 17));
      w = 8'($urandom); b = 8'($urandom); bitsel = 3'($urandom); cin = 1'($urandom);
      if (n < 18) op = alu_op_t'(n);
      #1;
      ref_model(ry, rc, rdc);
      checks++;
      if (int'(y) != ry || int'(z) != (ry == 0) || int'(c) != rc ||
          ((op == ALU_ADD || op == ALU_SUB) && int'(dc) != rdc)) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%0d w=%h b=%h cin=%b: y=%h z=%b c=%b dc=%b exp y=%h c=%0d dc=%0d",
                   op, w, b, cin, y, z, c, dc, ry, rc, rdc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
