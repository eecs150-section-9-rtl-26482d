// half_adder: adds two bits. S is their sum bit (A xor B) and C the carry
// (A and B). Combinational. It is the innermost level of the notes'
// adder hierarchy: half adder -> full adder -> n-bit adder. It is written
// from the half adder's function.
module half_adder (
  input  logic A,
  input  logic B,
  output logic S,
  output logic C
);

  assign S = A ^ B;
  assign C = A & B;

endmodule
