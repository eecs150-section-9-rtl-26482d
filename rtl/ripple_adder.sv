// ripple_adder: a W-bit adder built by repeating one full adder per bit
// and chaining the carries, the iterative datapath construction of the
// notes (every bit is the same cell; 4, 8, 16 or 32 bits are the same
// design with a different W). s = a + b + cin, cout is the carry out of
// the top bit. Combinational; the delay grows with W as the carry ripples.
// The iterative structure is the notes'; the 16-bit default matches the
// notes' 16-bit datapath.
module ripple_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.Ain(a[i]), .Bin(b[i]), .Cin(c[i]), .Sum(s[i]), .Cout(c[i+1]));
  end

  assign cout = c[W];

endmodule
