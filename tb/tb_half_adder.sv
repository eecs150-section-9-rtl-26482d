// tb_half_adder: exhaustive check of the half adder against A + B.
module tb_half_adder;
  `include "tb_common.svh"
  logic a, b, s, c;
  half_adder dut (.A(a), .B(b), .S(s), .C(c));
  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      chk({c, s} == 2'(a) + 2'(b), $sformatf("HA %b+%b -> c=%b s=%b", a, b, c, s));
    end
    `TB_FINISH
  end
endmodule
