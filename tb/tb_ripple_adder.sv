// tb_ripple_adder: 16-bit ripple adder against the + operator, on corner
// cases (full carry ripple) and random operands.
module tb_ripple_adder;
  `include "tb_common.svh"
  localparam int W = 16;
  logic [W-1:0] a, b, s;
  logic ci, co;
  ripple_adder #(.W(W)) dut (.a, .b, .cin(ci), .s, .cout(co));
  task automatic try(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] exp;
    a = x; b = y; ci = c; #1;
    exp = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    chk({co, s} == exp, $sformatf("%h+%h+%b -> %b %h, want %h", x, y, c, co, s, exp));
  endtask
  initial begin
    try('1, '0, 1'b1);       // carry ripples through every bit
    try('1, '1, 1'b1);
    try('0, '0, 1'b0);
    try(16'h7fff, 16'h0001, 1'b0);
    for (int i = 0; i < 500; i++) try(W'($urandom), W'($urandom), 1'($urandom));
    `TB_FINISH
  end
endmodule
