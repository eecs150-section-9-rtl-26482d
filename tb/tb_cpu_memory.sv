// tb_cpu_memory: load port and bus writes, combinational reads gated by
// mr, the display word at address DEPTH on mlast, and out-of-range
// addresses. Runs at the full 255-word size.
module tb_cpu_memory;
  `include "tb_common.svh"
  localparam int DEPTH = 255;
  logic [15:0] ma, wd, rd, mlast, pa, pd;
  logic mr, mw, pwe;
  logic [15:0] model [DEPTH+1];
  cpu_memory #(.DEPTH(DEPTH)) dut (.clk, .mabus(ma), .wdata(wd), .mr, .mw, .rdata(rd), .mlast,
                                   .prog_we(pwe), .prog_addr(pa), .prog_data(pd));
  initial begin
    mr = 0; mw = 0; pwe = 0; ma = 0; wd = 0; pa = 0; pd = 0;
    for (int a = 0; a <= DEPTH; a++) begin
      @(negedge clk); pwe = 1; pa = 16'(a); pd = 16'(a * 7 + 1); model[a] = pd;
    end
    @(negedge clk); pwe = 0;
    chk(mlast == model[DEPTH], "display word after load");
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      ma = ($urandom_range(0, 9) == 0) ? 16'($urandom_range(DEPTH + 1, 1000)) : 16'($urandom_range(0, DEPTH));
      mr = 1'($urandom); mw = !mr && 1'($urandom); wd = 16'($urandom);
      #1;
      if (mr) chk(rd == (ma <= DEPTH ? model[ma] : 16'd0), $sformatf("read %0d -> %h", ma, rd));
      else    chk(rd == 0, "rdata 0 without mr");
      if (mw && ma <= DEPTH) model[ma] = wd;
      @(posedge clk); #1;
      chk(mlast == model[DEPTH], $sformatf("mlast %h want %h", mlast, model[DEPTH]));
    end
    `TB_FINISH
  end
endmodule
