// reg_ld_oe: a group of W flip-flops with a load enable and an output
// enable, the packaged register of the notes (eight bits by default).
//
// On a rising CLK edge with LD asserted the register takes D; otherwise it
// holds. OE connects the stored value to the outputs Q. In the packaged part
// the outputs float (high impedance) while OE is low; here they read 0
// instead, so that several such registers can share a bus built as an
// AND-OR structure (see bus_or). Qint is the stored value, always visible.
// The pin set LD, OE, D, Q, CLK and the eight-bit width come from the notes;
// the 0-when-disabled output and the lack of a reset are this design's.
module reg_ld_oe #(
  parameter int unsigned W = 8
) (
  input  logic         CLK,
  input  logic         LD,
  input  logic         OE,
  input  logic [W-1:0] D,
  output logic [W-1:0] Q,
  output logic [W-1:0] Qint
);

  always_ff @(posedge CLK)
    if (LD) Qint <= D;

  assign Q = OE ? Qint : '0;

endmodule
