// cpu_memory: the processor's unified (Princeton) memory of 16-bit words,
// with a display register as its last word.
//
// Addresses 0 .. DEPTH-1 are ordinary words; address DEPTH is the display
// word, whose contents are always visible on output mlast (the lights of
// the schematic). Reads are combinational: while mr is asserted, rdata is
// the word at mabus (0 for an address past DEPTH). Writes happen on the
// rising clock edge while mw is asserted, taking the value on the data bus
// wdata; writes past DEPTH are ignored.
// A separate load port (prog_we, prog_addr, prog_data) writes a word on a
// clock edge; it lets a program be placed in memory while the processor is
// held in reset. With DEPTH = 255 the memory has 255 words plus the
// display, matching the notes; the asynchronous read, the load port and the
// handling of out-of-range addresses are this design's choice.
module cpu_memory
  import cpu16_pkg::*;
#(
  parameter int unsigned DEPTH = 255
) (
  input  logic  clk,
  input  word_t mabus,
  input  word_t wdata,
  input  logic  mr,
  input  logic  mw,
  output word_t rdata,
  output word_t mlast,
  input  logic  prog_we,
  input  word_t prog_addr,
  input  word_t prog_data
);

  word_t mem [DEPTH+1];

  always_ff @(posedge clk) begin
    if (prog_we && prog_addr <= word_t'(DEPTH))
      mem[prog_addr[$clog2(DEPTH+1)-1:0]] <= prog_data;
    else if (mw && mabus <= word_t'(DEPTH))
      mem[mabus[$clog2(DEPTH+1)-1:0]] <= wdata;
  end

  assign rdata = (mr && mabus <= word_t'(DEPTH)) ? mem[mabus[$clog2(DEPTH+1)-1:0]] : '0;
  assign mlast = mem[DEPTH];

endmodule
