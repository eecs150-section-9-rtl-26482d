// tb_acc_datapath: runs one-address operations AC <- AC op Mem, checking
// AC and the N and Z flags against a model.
module tb_acc_datapath;
  import cpu16_pkg::*;
  `include "tb_common.svh"
  logic rst, rld, ald, n, z;
  logic [15:0] md, ac, m_ac, m_reg;
  aluop_e op;
  acc_datapath #(.W(16)) dut (.clk, .reset(rst), .mem_d(md), .reg_ld(rld), .ac_ld(ald), .op, .ac, .n, .z);
  function automatic logic [15:0] f(input aluop_e o, input logic [15:0] x, input logic [15:0] y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      default: return {15'd0, $signed(x) < $signed(y)};
    endcase
  endfunction
  initial begin
    rst = 1; rld = 0; ald = 0; md = 0; op = ALU_ADD;
    @(posedge clk); #1; rst = 0; m_ac = 0; m_reg = 0;
    chk(ac == 0 && z, "reset");
    for (int i = 0; i < 200; i++) begin
      logic [15:0] r;
      // cycle 1: operand from memory into REG
      @(negedge clk); md = 16'($urandom); rld = 1; ald = 0; m_reg = md;
      // cycle 2: AC <- AC op REG
      @(negedge clk); rld = 0; ald = 1; op = aluop_e'($urandom_range(0, 4));
      #1; r = f(op, m_ac, m_reg);
      chk(n == r[15] && z == (r == 0), $sformatf("flags op %0d", op));
      @(posedge clk); #1; m_ac = r;
      chk(ac == m_ac, $sformatf("op %0d AC=%h want %h", op, ac, m_ac));
      @(negedge clk); ald = 0;
    end
    `TB_FINISH
  end
endmodule
