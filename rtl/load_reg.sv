// load_reg: W-bit register with a load enable, used for the instruction
// register (IR), the memory buffer register (MBR) and the register that
// holds the ALU result for the memory address bus.
//
// On a rising clock edge it takes d when ld is asserted and holds otherwise;
// reset clears it. Output q is the stored value. The registers and their
// load controls are the notes'; the reset is this design's choice.
module load_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)   q <= '0;
    else if (ld) q <= d;
  end

endmodule
