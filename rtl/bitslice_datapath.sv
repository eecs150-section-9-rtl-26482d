// bitslice_datapath: an N-bit datapath made by repeating bit_slice N times
// (the notes draw the 1-bit and 2-bit cases). All slices share the control
// inputs; the carry-out of slice i feeds the carry-in of slice i+1, with
// CI entering slice 0 and CO leaving slice N-1. Word-wide views: the
// accumulator ac and the registers R0 (r0), rs, rt and rd. Timing is that
// of bit_slice: registers update on the rising clk edge, the ALU and the
// carry chain are combinational.
module bitslice_datapath #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic [N-1:0] mem,
  input  logic         from_ac,
  input  logic [3:0]   ld,
  input  logic         ac_ld,
  input  logic [2:0]   a_sel,
  input  logic [2:0]   b_sel,
  input  logic [1:0]   alu_op,
  input  logic         CI,
  output logic         CO,
  output logic [N-1:0] ac,
  output logic [N-1:0] r0,
  output logic [N-1:0] rs,
  output logic [N-1:0] rt,
  output logic [N-1:0] rd
);

  logic [N:0] c;
  assign c[0] = CI;
  assign CO   = c[N];

  for (genvar i = 0; i < N; i++) begin : g_slice
    logic [3:0] rbits;
    bit_slice u_s (
      .clk, .mem_bit(mem[i]), .from_ac, .ld, .ac_ld, .a_sel, .b_sel, .alu_op,
      .ci(c[i]), .co(c[i+1]), .ac(ac[i]), .r(rbits)
    );
    assign r0[i] = rbits[0];
    assign rs[i] = rbits[1];
    assign rt[i] = rbits[2];
    assign rd[i] = rbits[3];
  end

endmodule
