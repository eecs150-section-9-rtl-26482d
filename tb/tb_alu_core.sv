// tb_alu_core: every ALU operation on random and corner operands, against
// a reference written with SystemVerilog operators; also the N and Z flags.
module tb_alu_core;
  import cpu16_pkg::*;
  `include "tb_common.svh"
  logic [15:0] a, b, s;
  aluop_e op;
  logic n, z;
  alu_core #(.W(16)) dut (.a, .b, .op, .s, .n, .z);
  function automatic logic [15:0] ref_alu(input aluop_e o, input logic [15:0] x, input logic [15:0] y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_SLT: return ($signed(x) < $signed(y)) ? 16'd1 : 16'd0;
      default: return 16'd0;
    endcase
  endfunction
  task automatic try(input aluop_e o, input logic [15:0] x, input logic [15:0] y);
    logic [15:0] e;
    op = o; a = x; b = y; #1;
    e = ref_alu(o, x, y);
    chk(s == e, $sformatf("op %0d %h %h -> %h want %h", o, x, y, s, e));
    chk(n == e[15] && z == (e == 0), $sformatf("flags op %0d n=%b z=%b", o, n, z));
  endtask
  initial begin
    aluop_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    foreach (ops[k]) begin
      try(ops[k], 16'h0005, 16'h0005);
      try(ops[k], 16'hfffe, 16'h0003);   // -2 vs 3
      try(ops[k], 16'h0003, 16'hfffe);
      try(ops[k], 16'h8000, 16'h7fff);
      for (int i = 0; i < 100; i++) try(ops[k], 16'($urandom), 16'($urandom));
    end
    `TB_FINISH
  end
endmodule
