// tb_regfile8: writes to rd or rt with ALU or MBR data, registered reads
// of rs and rt one cycle later, against an array model.
module tb_regfile8;
  `include "tb_common.svh"
  logic we, rsel, dsel;
  logic [15:0] inst, alu, mbr, ra, rb;
  logic [15:0] model [8];
  regfile8 dut (.clk, .regWrite(we), .wrRegSel(rsel), .wrDataSel(dsel), .Inst(inst),
                .ALUout(alu), .MBR(mbr), .RegA(ra), .RegB(rb));
  initial begin
    // fill every register through the rd path
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      we = 1; rsel = 0; dsel = 0; inst = {9'd0, 3'(r), 4'd0}; alu = 16'(r * 16'h1111 + 3); mbr = '0;
      model[r] = alu;
    end
    for (int i = 0; i < 400; i++) begin
      logic [15:0] exp_a, exp_b;
      @(negedge clk);
      we = 1'($urandom); rsel = 1'($urandom); dsel = 1'($urandom);
      inst = 16'($urandom); alu = 16'($urandom); mbr = 16'($urandom);
      exp_a = model[inst[12:10]]; exp_b = model[inst[9:7]];   // read sees old value
      if (we) model[rsel ? inst[9:7] : inst[6:4]] = dsel ? mbr : alu;
      @(posedge clk); #1;
      chk(ra == exp_a, $sformatf("RegA r%0d=%h want %h", inst[12:10], ra, exp_a));
      chk(rb == exp_b, $sformatf("RegB r%0d=%h want %h", inst[9:7], rb, exp_b));
    end
    `TB_FINISH
  end
endmodule
