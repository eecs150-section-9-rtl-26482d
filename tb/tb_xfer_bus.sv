// tb_xfer_bus: one driver (a register or the external input) on the bus
// per cycle, loaded into any set of registers.
module tb_xfer_bus;
  `include "tb_common.svh"
  logic [7:0] ext, bus;
  logic eoe;
  logic [3:0] oe, ld;
  logic [3:0][7:0] q, model;
  xfer_bus #(.W(8)) dut (.clk, .ext_d(ext), .ext_oe(eoe), .oe, .ld, .bus, .q);
  initial begin
    oe = 0; eoe = 0; ld = 0; ext = 0;
    @(negedge clk); ext = 8'h3c; eoe = 1; oe = 0; ld = 4'hf; model = {4{8'h3c}};
    for (int i = 0; i < 300; i++) begin
      int s;
      logic [7:0] v;
      @(negedge clk);
      s = $urandom_range(0, 4);
      ext = 8'($urandom); eoe = (s == 4); oe = (s < 4) ? 4'(1 << s) : 4'd0; ld = 4'($urandom);
      v = (s == 4) ? ext : model[s];
      #1; chk(bus == v, $sformatf("bus %h want %h (driver %0d)", bus, v, s));
      for (int r = 0; r < 4; r++) if (ld[r]) model[r] = v;
      @(posedge clk); #1;
      chk(q == model, $sformatf("q=%h want %h", q, model));
    end
    `TB_FINISH
  end
endmodule
