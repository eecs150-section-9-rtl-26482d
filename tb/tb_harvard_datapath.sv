// tb_harvard_datapath: fills both memories through the load ports, then
// plays the role of the missing controller. Each round fetches a two-byte
// instruction (IR loads twice, the PC steps through its ALU each time),
// loads REG from the data word the IR addresses, applies AC <- AC op REG,
// and sometimes stores AC back or moves the PC by the IR offset.
// Everything is compared with a model kept in the testbench.
module tb_harvard_datapath;
  import cpu16_pkg::*;
  `include "tb_common.svh"

  logic rst, reg_ld, ac_ld, dmem_wr, ir_ld, pc_ld, pc_a_zero, pc_b_ir, imem_we, dmem_we, n, z;
  aluop_e alu_op, pc_op;
  logic [7:0] imem_addr, imem_data, dmem_addr;
  word_t dmem_data, pc, ir, regq, ac;

  harvard_datapath #(.DDEPTH(256), .IDEPTH(256)) dut (.reset(rst), .*);

  logic [7:0] m_imem [256];
  word_t m_dmem [256];
  word_t m_pc, m_ir, m_reg, m_ac;

  function automatic word_t f(input aluop_e o, input word_t x, input word_t y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      default: return word_t'($signed(x) < $signed(y));
    endcase
  endfunction

  task automatic idle();
    reg_ld = 0; ac_ld = 0; dmem_wr = 0; ir_ld = 0; pc_ld = 0; pc_a_zero = 0; pc_b_ir = 0;
    pc_op = ALU_ADD; alu_op = ALU_ADD; imem_we = 0; dmem_we = 0;
  endtask

  task automatic step_check(input string what);
    @(posedge clk); #1;
    chk(pc == m_pc && ir == m_ir && regq == m_reg && ac == m_ac,
        $sformatf("%s: pc=%h ir=%h reg=%h ac=%h want %h %h %h %h", what, pc, ir, regq, ac, m_pc, m_ir, m_reg, m_ac));
    @(negedge clk); idle();
  endtask

  initial begin
    rst = 1; idle(); imem_addr = 0; imem_data = 0; dmem_addr = 0; dmem_data = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 8'(a); imem_data = 8'($urandom); m_imem[a] = imem_data;
      dmem_we = 1; dmem_addr = 8'(a); dmem_data = word_t'($urandom); m_dmem[a] = dmem_data;
    end
    @(negedge clk); idle(); rst = 0;
    m_pc = 0; m_ir = 0; m_reg = 0; m_ac = 0;
    for (int i = 0; i < 150; i++) begin
      // fetch two instruction bytes
      for (int k = 0; k < 2; k++) begin
        ir_ld = 1; pc_ld = 1; pc_op = ALU_ADD;
        m_ir = {m_ir[7:0], m_imem[m_pc[7:0]]}; m_pc = m_pc + 1;
        step_check("fetch");
      end
      // operand: REG <- Dmem[IR]
      reg_ld = 1; m_reg = m_dmem[m_ir[7:0]];
      step_check("load path");
      // AC <- AC op REG
      ac_ld = 1; alu_op = aluop_e'($urandom_range(0, 4));
      #1; chk(n == f(alu_op, m_ac, m_reg)[15] && z == (f(alu_op, m_ac, m_reg) == 0), "flags");
      m_ac = f(alu_op, m_ac, m_reg);
      step_check("accumulate");
      // sometimes store AC, sometimes move the PC by the IR or set it
      case ($urandom_range(0, 3))
        0: begin dmem_wr = 1; m_dmem[m_ir[7:0]] = m_ac; step_check("store path"); end
        1: begin pc_ld = 1; pc_b_ir = 1; pc_op = ALU_ADD; m_pc = m_pc + m_ir; step_check("pc + ir"); end
        2: begin pc_ld = 1; pc_b_ir = 1; pc_a_zero = 1; pc_op = ALU_OR; m_pc = m_ir; step_check("pc <- ir"); end
        default: ;
      endcase
    end
    // store AC and read it back through the load path
    dmem_wr = 1; m_dmem[m_ir[7:0]] = m_ac; step_check("final store");
    reg_ld = 1; m_reg = m_ac; step_check("load back the stored word");
    `TB_FINISH
  end
endmodule
