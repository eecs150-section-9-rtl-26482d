// tb_reg_ld_oe: LD on a rising edge loads D, otherwise the value holds;
// Q shows the value only while OE is asserted.
module tb_reg_ld_oe;
  `include "tb_common.svh"
  logic ld, oe;
  logic [7:0] d, q, qi, model;
  reg_ld_oe #(.W(8)) dut (.CLK(clk), .LD(ld), .OE(oe), .D(d), .Q(q), .Qint(qi));
  initial begin
    @(negedge clk); ld = 1; oe = 0; d = 8'h5a; model = 8'h5a;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      chk(qi == model && q == (oe ? model : 8'd0), $sformatf("ld=%b oe=%b q=%h qi=%h want %h", ld, oe, q, qi, model));
      @(negedge clk);
      ld = 1'($urandom); oe = 1'($urandom); d = 8'($urandom);
      if (ld) model = d;
    end
    `TB_FINISH
  end
endmodule
