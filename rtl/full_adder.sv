// full_adder: adds Ain, Bin and carry-in Cin, built from two half adders as
// in the notes: the first adds Bin and Cin, the second adds Ain to that
// sum. Sum is the second half adder's sum; Cout is 1 when either half adder
// produced a carry (the two carries are never both 1). Combinational.
// The two-half-adder structure is the notes'; the OR that merges the
// carries follows from the full adder's function.
module full_adder (
  input  logic Ain,
  input  logic Bin,
  input  logic Cin,
  output logic Sum,
  output logic Cout
);

  logic s1, c1, c2;

  half_adder u_ha1 (.A(Bin), .B(Cin), .S(s1),  .C(c1));
  half_adder u_ha2 (.A(Ain), .B(s1),  .S(Sum), .C(c2));

  assign Cout = c1 | c2;

endmodule
