// tb_xfer_p2p: random per-register sources and loads, including swaps that
// need every register to read its source in the same cycle.
module tb_xfer_p2p;
  `include "tb_common.svh"
  logic [7:0] ext;
  logic [3:0] ld;
  logic [3:0][2:0] sel;
  logic [3:0][7:0] q, model, nxt;
  xfer_p2p #(.W(8)) dut (.clk, .ext_d(ext), .ld, .sel, .q);
  initial begin
    for (int r = 0; r < 4; r++) begin
      @(negedge clk); ext = 8'(r * 16 + 1); ld = 4'(1 << r); sel = {4{3'd4}}; model[r] = ext;
    end
    // swap register 0 and register 1 in one cycle
    @(negedge clk); ld = 4'b0011; sel[0] = 3'd1; sel[1] = 3'd0;
    @(posedge clk); #1;
    chk(q[0] == model[1] && q[1] == model[0], "swap r0/r1 in one cycle");
    {model[0], model[1]} = {model[1], model[0]};
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ext = 8'($urandom); ld = 4'($urandom);
      for (int r = 0; r < 4; r++) sel[r] = 3'($urandom_range(0, 4));
      nxt = model;
      for (int r = 0; r < 4; r++) if (ld[r]) nxt[r] = (sel[r] == 4) ? ext : model[sel[r]];
      model = nxt;
      @(posedge clk); #1;
      chk(q == model, $sformatf("q=%h want %h", q, model));
    end
    `TB_FINISH
  end
endmodule
