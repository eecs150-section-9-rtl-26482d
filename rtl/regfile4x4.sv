// regfile4x4: a register file of four words of four bits (16 flip-flops)
// with separate read and write addresses, so a read and a write can happen
// in the same cycle.
//
// Write: at a rising clk edge with WE asserted, word {WB,WA} takes D.
// Read: combinational; while RE is asserted Q shows word {RB,RA}, otherwise
// Q reads 0 (the packaged part's outputs would float). RB and WB are the
// high address bits. Pin names follow the notes' symbol; the clock pin, the
// address bit order and the 0-when-disabled output are this design's.
// A read of the word being written returns the old contents.
module regfile4x4 #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         RE,
  input  logic         RB,
  input  logic         RA,
  input  logic         WE,
  input  logic         WB,
  input  logic         WA,
  input  logic [W-1:0] D,
  output logic [W-1:0] Q
);

  logic [W-1:0] words [4];

  always_ff @(posedge clk)
    if (WE) words[{WB, WA}] <= D;

  assign Q = RE ? words[{RB, RA}] : '0;

endmodule
