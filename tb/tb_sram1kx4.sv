// tb_sram1kx4: write pulses on WR store io_in at address A; reads with RD
// return the word and raise io_oe; RD during WR does not drive.
module tb_sram1kx4;
  `include "tb_common.svh"
  logic [9:0] a;
  logic rd, wr, oe;
  logic [3:0] din, dout;
  logic [3:0] model [1024];
  sram1kx4 dut (.A(a), .RD(rd), .WR(wr), .io_in(din), .io_out(dout), .io_oe(oe));
  task automatic write(input logic [9:0] ad, input logic [3:0] v);
    a = ad; din = v; #2 wr = 1; #3 wr = 0; #2; model[ad] = v;
  endtask
  initial begin
    rd = 0; wr = 0; a = 0; din = 0;
    for (int i = 0; i < 1024; i++) write(10'(i), 4'($urandom));
    for (int i = 0; i < 800; i++) begin
      if ($urandom_range(0, 2) == 0) write(10'($urandom), 4'($urandom));
      a = 10'($urandom); rd = 1'($urandom); #2;
      chk(oe == rd && dout == (rd ? model[a] : 4'd0), $sformatf("read %0d rd=%b -> %h oe=%b", a, rd, dout, oe));
    end
    rd = 1; a = 10'd3; din = 4'hf; #1 wr = 1; #1;
    chk(!oe, "no drive while writing");
    #1 wr = 0; #1; model[3] = 4'hf;
    chk(oe && dout == 4'hf, "read after write");
    `TB_FINISH
  end
endmodule
