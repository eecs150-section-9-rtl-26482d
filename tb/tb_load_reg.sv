// tb_load_reg: the register loads d on a clock edge only when ld is high,
// holds otherwise, and clears on reset.
module tb_load_reg;
  `include "tb_common.svh"
  logic rst, ld;
  logic [15:0] d, q, model;
  load_reg #(.W(16)) dut (.clk, .reset(rst), .ld, .d, .q);
  initial begin
    rst = 1; ld = 0; d = '0;
    @(posedge clk); #1; chk(q == 0, "reset clears");
    rst = 0; model = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ld = 1'($urandom); d = 16'($urandom);
      if (ld) model = d;
      @(posedge clk); #1;
      chk(q == model, $sformatf("ld=%b q=%h want %h", ld, q, model));
    end
    `TB_FINISH
  end
endmodule
