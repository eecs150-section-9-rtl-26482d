// bit_slice: one bit of a bit-sliced datapath: a one-bit ALU, an
// accumulator bit AC and four register bits R0, rs, rt, rd.
//
// Two operand lines run past the registers to the ALU: a_sel and b_sel
// (0 = AC, 1 = R0, 2 = rs, 3 = rt, 4 = rd) choose what each carries. The
// ALU computes, by alu_op: 0 add (a full adder using carry-in ci and giving
// carry-out co), 1 and, 2 or, 3 pass A; co is 0 except for add. On the
// rising clk edge AC takes the ALU result when ac_ld is asserted, and
// register i takes the load line when ld[i] is asserted. The load line
// carries the memory bit mem_bit, or AC when from_ac is asserted.
// The parts of a slice and the carry chain between slices are the notes';
// the select codes, the operation set and the AC-to-register path are this
// design's reading of the figure.
module bit_slice (
  input  logic       clk,
  input  logic       mem_bit,
  input  logic       from_ac,
  input  logic [3:0] ld,
  input  logic       ac_ld,
  input  logic [2:0] a_sel,
  input  logic [2:0] b_sel,
  input  logic [1:0] alu_op,
  input  logic       ci,
  output logic       co,
  output logic       ac,
  output logic [3:0] r
);

  logic a, b, sum, cout, res, lline;

  function automatic logic pick(input logic [2:0] s, input logic acc, input logic [3:0] rr);
    case (s)
      3'd0:    return acc;
      3'd1:    return rr[0];
      3'd2:    return rr[1];
      3'd3:    return rr[2];
      3'd4:    return rr[3];
      default: return 1'b0;
    endcase
  endfunction

  assign a = pick(a_sel, ac, r);
  assign b = pick(b_sel, ac, r);

  full_adder u_fa (.Ain(a), .Bin(b), .Cin(ci), .Sum(sum), .Cout(cout));

  always_comb begin
    case (alu_op)
      2'd0:    res = sum;
      2'd1:    res = a & b;
      2'd2:    res = a | b;
      default: res = a;
    endcase
  end

  assign co    = (alu_op == 2'd0) ? cout : 1'b0;
  assign lline = from_ac ? ac : mem_bit;

  always_ff @(posedge clk) begin
    if (ac_ld) ac <= res;
    for (int i = 0; i < 4; i++)
      if (ld[i]) r[i] <= lline;
  end

endmodule
