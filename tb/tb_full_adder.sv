// tb_full_adder: exhaustive check of the full adder against A + B + Cin.
module tb_full_adder;
  `include "tb_common.svh"
  logic a, b, ci, s, co;
  full_adder dut (.Ain(a), .Bin(b), .Cin(ci), .Sum(s), .Cout(co));
  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, ci} = 3'(i);
      #1;
      chk({co, s} == 2'(a) + 2'(b) + 2'(ci), $sformatf("FA %b+%b+%b -> %b%b", a, b, ci, co, s));
    end
    `TB_FINISH
  end
endmodule
