// alu16: the processor's ALU with its two operand selectors.
//
// The A operand is the program counter (srcA = 0) or register-file port A
// (srcA = 1). The B operand, chosen by {srcB1, srcB0}, is register-file port
// B (00), the instruction's 7-bit offset sign-extended (01), the constant 1
// used to step the PC (10) or the constant 0 (11). The operation code comes
// from the controller. Outputs are the result ALUout and the status bits
// zero and neg that the controller tests. Combinational.
//
// The operand sources PC, RegA, RegB and Inst and the select names follow
// the processor schematic; which code selects which source, and the
// constants 1 and 0, are this design's choice.
module alu16
  import cpu16_pkg::*;
(
  input  word_t  pc,
  input  word_t  rega,
  input  word_t  regb,
  input  word_t  inst,
  input  logic   srcA,
  input  logic   srcB1,
  input  logic   srcB0,
  input  aluop_e op,
  output word_t  aluout,
  output logic   zero,
  output logic   neg
);

  word_t opa, opb;

  assign opa = srcA ? rega : pc;

  always_comb begin
    unique case ({srcB1, srcB0})
      SRCB_REGB: opb = regb;
      SRCB_OFFS: opb = inst_offset(inst);
      SRCB_ONE:  opb = word_t'(1);
      SRCB_ZERO: opb = '0;
      default:   opb = '0;
    endcase
  end

  alu_core #(.W(XLEN)) u_core (
    .a(opa), .b(opb), .op(op), .s(aluout), .n(neg), .z(zero)
  );

endmodule
