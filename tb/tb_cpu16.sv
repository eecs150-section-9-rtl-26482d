// tb_cpu16: loads the shared test program (cpu_prog.svh) through the load
// port while reset is held, runs it to halt, and checks the stored
// results, the display word and the exact cycle count. It also checks the
// fetch-decode-execute timing of the first instructions (three cycles per
// register-to-register instruction) and that a halted processor stays put.
module tb_cpu16;
  import cpu16_pkg::*;
  `include "tb_common.svh"
  `include "cpu_prog.svh"

  logic rst, pwe, halted;
  word_t pa, pd, mlast, pc, ir;
  int cycles;

  cpu16 #(.DEPTH(255)) dut (.clk, .reset(rst), .prog_we(pwe), .prog_addr(pa), .prog_data(pd),
                            .mlast, .halted, .pc_out(pc), .ir_out(ir));

  // Observed memory writes, taken from the memory's bus inputs.
  word_t seen [256];
  always @(posedge clk)
    if (!rst && dut.mw) seen[dut.mabus[7:0]] <= dut.mdbus;

  initial begin
    rst = 1; pwe = 0; pa = 0; pd = 0;
    for (int a = 0; a < 256; a++) seen[a] = 16'hdead;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); pwe = 1; pa = word_t'(a); pd = (a < PROG_LEN) ? prog_word(a) : 16'h0000;
    end
    @(negedge clk); pwe = 0;
    @(negedge clk); rst = 0;
    // first instruction: IR loaded after one cycle, PC stepped to 1
    @(posedge clk); #1;
    chk(ir == prog_word(0) && pc == 1, $sformatf("fetch: ir=%h pc=%0d", ir, pc));
    @(posedge clk); #1; @(posedge clk); #1;  // decode, execute
    @(posedge clk); #1;
    chk(ir == prog_word(1) && pc == 2, $sformatf("3 cycles per instruction: ir=%h pc=%0d", ir, pc));
    cycles = 4;
    while (!halted && cycles < 2000) begin
      @(posedge clk); #1; cycles++;
    end
    chk(halted, "halted");
    chk(cycles == PROG_CYCLES, $sformatf("cycles to halt %0d want %0d", cycles, PROG_CYCLES));
    chk(seen[40] == 8, "sw mem[40]");
    chk(seen[50] == 0 && seen[51] == 8 && seen[52] == 8, $sformatf("r1 r3 r4 = %0d %0d %0d", seen[50], seen[51], seen[52]));
    chk(seen[53] == 1 && seen[54] == 7 && seen[55] == 1, $sformatf("r5 r6 r7 = %0d %0d %0d", seen[53], seen[54], seen[55]));
    chk(mlast == 8, $sformatf("display %0d", mlast));
    chk(pc == 31, $sformatf("pc after halt %0d", pc));
    repeat (10) @(posedge clk);
    #1 chk(halted && pc == 31, "halt holds until reset");
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    chk(pc == 0 && !halted, "reset restarts at 0");
    `TB_FINISH
  end
endmodule
