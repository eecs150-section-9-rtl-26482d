// alu_core: 16-bit combinational ALU, the "ALU block diagram" of the notes.
//
// Inputs are two operands A and B and an operation code; outputs are the
// result S and two status bits: N (result negative, its sign bit) and Z
// (result is zero). Operations: add, subtract, bitwise and, bitwise or and
// set-on-less-than (S = 1 when A < B as signed numbers, else 0). The set of
// operations is the one the processor's instruction table needs; their 3-bit
// encoding (cpu16_pkg::aluop_e) is this design's choice. Unused codes give 0.
// Purely combinational, no clock.
module alu_core
  import cpu16_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  aluop_e       op,
  output logic [W-1:0] s,
  output logic         n,
  output logic         z
);

  always_comb begin
    unique case (op)
      ALU_ADD: s = a + b;
      ALU_SUB: s = a - b;
      ALU_AND: s = a & b;
      ALU_OR:  s = a | b;
      ALU_SLT: s = W'($signed(a) < $signed(b));
      default: s = '0;
    endcase
  end

  assign n = s[W-1];
  assign z = (s == '0);

endmodule
