// tb_pc_reg: reset to 0, load of the ALU result (PCsel = 0), load of the
// zero-extended 13-bit jump target (PCsel = 1), hold without ld.
module tb_pc_reg;
  `include "tb_common.svh"
  logic rst, ld, sel;
  logic [15:0] inst, alu, pc, model;
  pc_reg dut (.clk, .reset(rst), .ld, .PCsel(sel), .Inst(inst), .ALUout(alu), .PC(pc));
  initial begin
    rst = 1; ld = 1; sel = 0; inst = '1; alu = '1;
    @(posedge clk); #1; chk(pc == 0, "reset to zero");
    rst = 0; model = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ld = 1'($urandom); sel = 1'($urandom); inst = 16'($urandom); alu = 16'($urandom);
      if (ld) model = sel ? {3'b000, inst[12:0]} : alu;
      @(posedge clk); #1;
      chk(pc == model, $sformatf("ld=%b sel=%b pc=%h want %h", ld, sel, pc, model));
    end
    `TB_FINISH
  end
endmodule
