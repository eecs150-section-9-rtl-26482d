// regfile8: the processor's register file, eight 16-bit registers.
//
// Read side: every rising clock edge copies register rs (Inst[12:10]) to
// output RegA and register rt (Inst[9:7]) to RegB, so the operands read in
// the decode cycle are stable through the execute cycles that follow
// (A <- rs, B <- rt). Write side: when regWrite is asserted at a rising
// edge, the chosen register is written. wrRegSel picks the destination,
// rd = Inst[6:4] (0) or rt = Inst[9:7] (1); wrDataSel picks the data, the
// ALU result (0) or the memory buffer register MBR (1).
// The control names and the Inst, ALUout and MBR inputs come from the
// processor schematic; select polarities, registered read ports and the
// absence of a reset (and of a fixed-zero register) are this design's
// choice. A read and a write of the same register in one cycle return the
// old value.
module regfile8
  import cpu16_pkg::*;
(
  input  logic  clk,
  input  logic  regWrite,
  input  logic  wrRegSel,
  input  logic  wrDataSel,
  input  word_t Inst,
  input  word_t ALUout,
  input  word_t MBR,
  output word_t RegA,
  output word_t RegB
);

  word_t regs [NREGS];
  ridx_t wa;
  word_t wd;

  assign wa = wrRegSel  ? inst_rt(Inst) : inst_rd(Inst);
  assign wd = wrDataSel ? MBR : ALUout;

  always_ff @(posedge clk) begin
    if (regWrite) regs[wa] <= wd;
    RegA <= regs[inst_rs(Inst)];
    RegB <= regs[inst_rt(Inst)];
  end

endmodule
