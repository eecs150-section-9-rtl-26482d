// tb_xfer_mux: one source per cycle through the common mux, copied into
// any set of registers.
module tb_xfer_mux;
  `include "tb_common.svh"
  logic [7:0] ext, common;
  logic [3:0] ld;
  logic [2:0] sel;
  logic [3:0][7:0] q, model;
  xfer_mux #(.W(8)) dut (.clk, .ext_d(ext), .ld, .sel, .common, .q);
  initial begin
    @(negedge clk); ext = 8'h11; ld = 4'hf; sel = 3'd4; model = {4{8'h11}};
    for (int i = 0; i < 300; i++) begin
      logic [7:0] v;
      @(negedge clk);
      ext = 8'($urandom); ld = 4'($urandom); sel = 3'($urandom_range(0, 4));
      v = (sel == 4) ? ext : model[sel];
      #1; chk(common == v, $sformatf("common %h want %h", common, v));
      for (int r = 0; r < 4; r++) if (ld[r]) model[r] = v;
      @(posedge clk); #1;
      chk(q == model, $sformatf("q=%h want %h", q, model));
    end
    `TB_FINISH
  end
endmodule
