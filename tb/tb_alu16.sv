// tb_alu16: operand selection of the processor ALU (PC or RegA on A;
// RegB, sign-extended offset, 1 or 0 on B) with each operation.
module tb_alu16;
  import cpu16_pkg::*;
  `include "tb_common.svh"
  word_t pc, ra, rb, inst, y;
  logic srcA, b1, b0, zero, neg;
  aluop_e op;
  alu16 dut (.pc, .rega(ra), .regb(rb), .inst, .srcA, .srcB1(b1), .srcB0(b0), .op, .aluout(y), .zero, .neg);
  initial begin
    for (int i = 0; i < 400; i++) begin
      word_t a, b, e;
      pc = word_t'($urandom); ra = word_t'($urandom); rb = word_t'($urandom); inst = word_t'($urandom);
      srcA = 1'($urandom); {b1, b0} = 2'($urandom); op = aluop_e'($urandom_range(0, 4));
      #1;
      a = srcA ? ra : pc;
      case ({b1, b0})
        2'b00: b = rb;
        2'b01: b = {{9{inst[6]}}, inst[6:0]};
        2'b10: b = 16'd1;
        default: b = 16'd0;
      endcase
      case (op)
        ALU_ADD: e = a + b;
        ALU_SUB: e = a - b;
        ALU_AND: e = a & b;
        ALU_OR:  e = a | b;
        default: e = {15'd0, $signed(a) < $signed(b)};
      endcase
      chk(y == e && zero == (e == 0) && neg == e[15],
          $sformatf("srcA=%b srcB=%b%b op=%0d -> %h want %h", srcA, b1, b0, op, y, e));
    end
    `TB_FINISH
  end
endmodule
