// tb_regfile4x4: random writes and reads with RE/WE, including a read and
// a write in the same cycle to different and equal words.
module tb_regfile4x4;
  `include "tb_common.svh"
  logic re, rb, ra, we, wb, wa;
  logic [3:0] d, q;
  logic [3:0] model [4];
  regfile4x4 dut (.clk, .RE(re), .RB(rb), .RA(ra), .WE(we), .WB(wb), .WA(wa), .D(d), .Q(q));
  initial begin
    re = 0;
    for (int w = 0; w < 4; w++) begin
      @(negedge clk); we = 1; {wb, wa} = 2'(w); d = 4'(w + 5); model[w] = d;
    end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      re = 1'($urandom); {rb, ra} = 2'($urandom); we = 1'($urandom); {wb, wa} = 2'($urandom); d = 4'($urandom);
      #1;
      chk(q == (re ? model[{rb, ra}] : 4'd0), $sformatf("read w%0d re=%b q=%h", {rb, ra}, re, q));
      @(posedge clk);
      if (we) model[{wb, wa}] = d;
    end
    `TB_FINISH
  end
endmodule
