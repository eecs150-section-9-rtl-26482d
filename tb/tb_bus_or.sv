// tb_bus_or: with one enabled driver the bus carries that driver's value;
// with none it reads 0.
module tb_bus_or;
  `include "tb_common.svh"
  localparam int N = 3, W = 16;
  logic [N-1:0] en;
  logic [N-1:0][W-1:0] drv;
  logic [W-1:0] bus;
  bus_or #(.N(N), .W(W)) dut (.clk, .en, .drv, .bus);
  initial begin
    en = '0; drv = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) drv[k] = W'($urandom);
      en = '0;
      if (i % 4 != 0) en[$urandom_range(0, N-1)] = 1'b1;
      #1;
      if (en == '0) chk(bus == '0, "idle bus reads 0");
      else for (int k = 0; k < N; k++)
        if (en[k]) chk(bus == drv[k], $sformatf("driver %0d: %h want %h", k, bus, drv[k]));
    end
    `TB_FINISH
  end
endmodule
