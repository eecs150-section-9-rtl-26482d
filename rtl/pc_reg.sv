// pc_reg: the program counter.
//
// On a rising clock edge with reset asserted the PC becomes 0. Otherwise,
// when ld is asserted it loads either the ALU result (PCsel = 0: PC + 1
// after a fetch, or a branch target) or the 13-bit jump target of the
// instruction register, zero-extended (PCsel = 1). Without ld it holds.
// The inputs reset, ld, PCsel, Inst and ALUout are those of the schematic;
// a synchronous reset and the PCsel polarity are this design's choice.
module pc_reg
  import cpu16_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  ld,
  input  logic  PCsel,
  input  word_t Inst,
  input  word_t ALUout,
  output word_t PC
);

  always_ff @(posedge clk) begin
    if (reset)   PC <= '0;
    else if (ld) PC <= PCsel ? inst_target(Inst) : ALUout;
  end

endmodule
