// sram1kx4: a static RAM of 1024 words of 4 bits, with the pins of the
// packaged part: ten address lines A, read enable RD (also the chip's
// output enable / chip select), write enable WR and four data lines.
//
// The part has no clock. A write is a pulse on WR: the word at A takes the
// data lines io_in when WR falls, the end of the pulse, so address and data
// must be stable while WR is high. While RD is asserted and WR is not, the
// chip drives the word at A on io_out and raises io_oe; otherwise io_out
// reads 0 and io_oe is low. The bidirectional data lines of the part are
// split into io_in, io_out and io_oe here, so that a two-state simulator
// and synthesis both see plain logic. Contents persist as long as power is
// on; there is no reset. Size and pin names follow the notes; the write
// timing and the split data lines are this design's.
module sram1kx4 #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 4
) (
  input  logic [$clog2(WORDS)-1:0] A,
  input  logic                     RD,
  input  logic                     WR,
  input  logic [W-1:0]             io_in,
  output logic [W-1:0]             io_out,
  output logic                     io_oe
);

  logic [W-1:0] cells [WORDS];

  always_ff @(negedge WR)
    cells[A] <= io_in;

  assign io_oe  = RD && !WR;
  assign io_out = io_oe ? cells[A] : '0;

endmodule
