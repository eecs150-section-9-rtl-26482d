// acc_datapath: an accumulator datapath for one-address instructions,
// AC <- AC op Mem[addr].
//
// REG holds the operand that arrives from memory (mem_d, loaded when
// reg_ld is asserted). The accumulator AC is one ALU input and receives the
// ALU output (when ac_ld is asserted), so it is both the implicit operand
// and the destination. The ALU (alu_core) computes AC op REG and reports
// N and Z of its result. All registers update on the rising clk edge;
// reset clears them. Widths (16 bits) and the structure follow the notes;
// the operation codes are those of alu_core, and reset is this design's.
module acc_datapath
  import cpu16_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] mem_d,
  input  logic         reg_ld,
  input  logic         ac_ld,
  input  aluop_e       op,
  output logic [W-1:0] ac,
  output logic         n,
  output logic         z
);

  logic [W-1:0] regq, alu_s;

  always_ff @(posedge clk) begin
    if (reset) begin
      regq <= '0;
      ac   <= '0;
    end else begin
      if (reg_ld) regq <= mem_d;
      if (ac_ld)  ac   <= alu_s;
    end
  end

  alu_core #(.W(W)) u_alu (.a(ac), .b(regq), .op(op), .s(alu_s), .n(n), .z(z));

endmodule
