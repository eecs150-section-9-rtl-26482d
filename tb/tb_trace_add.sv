// tb_trace_add: follows the add instruction r3 = r1 + r2 through the
// processor one clock at a time and checks each register transfer:
//   step 1 (fetch):   mabus = PC, memory read, IR <- mem[PC], PC <- PC + 1
//   step 2 (decode):  A <- r1, B <- r2
//   step 3 (execute): r3 <- A + B
// The registers r1 and r2 are set up by two addi instructions first; the
// add is followed by a store of r3 to memory word 126, then halt.
module tb_trace_add;
  import cpu16_pkg::*;
  `include "tb_common.svh"

  logic rst, pwe, halted;
  word_t pa, pd, mlast, pc, ir;
  word_t prog [8];

  cpu16 dut (.clk, .reset(rst), .prog_we(pwe), .prog_addr(pa), .prog_data(pd),
             .mlast, .halted, .pc_out(pc), .ir_out(ir));

  initial begin
    prog[0] = enc_r(FN_SUB, 3'd0, 3'd0, 3'd0);         // r0 = 0
    prog[1] = enc_i(OP_ADDI, 3'd1, 3'd0, 7'd21);       // r1 = 21
    prog[2] = enc_i(OP_ADDI, 3'd2, 3'd0, 7'h7b);       // r2 = -5
    prog[3] = enc_r(FN_ADD, 3'd3, 3'd1, 3'd2);         // r3 = r1 + r2 = 16
    prog[4] = enc_i(OP_ADDI, 3'd4, 3'd0, 7'd63);       // r4 = 63
    prog[5] = enc_i(OP_SW, 3'd3, 3'd4, 7'd63);         // mem[126] = r3
    prog[6] = enc_j(OP_HALT, 13'd0);
    prog[7] = '0;
    rst = 1; pwe = 0; pa = 0; pd = 0;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); pwe = 1; pa = word_t'(a); pd = prog[a];
    end
    @(negedge clk); pwe = 0; rst = 0;
    // three instructions of three cycles each bring the PC to the add
    repeat (9) @(posedge clk);
    #1 chk(pc == 3, $sformatf("pc before the add %0d", pc));
    // step 1: fetch
    chk(dut.PCmaEN && dut.mr && dut.mabus == 16'd3 && dut.mdbus == prog[3], "step 1: PC on mabus, memory read");
    chk(dut.ALUout == 16'd4 && dut.PCld && dut.IRld, "step 1: ALU forms PC + 1, IR and PC load");
    @(posedge clk); #1;
    chk(ir == prog[3] && pc == 4, $sformatf("after step 1: IR=%h PC=%0d", ir, pc));
    // step 2: decode, operands read
    chk(!dut.regWrite && !dut.PCld && !dut.mr && !dut.mw, "step 2: no transfer but the operand read");
    @(posedge clk); #1;
    chk(dut.RegA == 16'd21 && dut.RegB == 16'hfffb, $sformatf("after step 2: A=%0d B=%h", dut.RegA, dut.RegB));
    // step 3: execute
    chk(dut.op == ALU_ADD && dut.ALUout == 16'd16 && dut.regWrite && !dut.wrRegSel && !dut.wrDataSel,
        "step 3: ALU adds, register file writes rd from the ALU");
    @(posedge clk); #1;
    chk(dut.PCmaEN && pc == 4, "after step 3: next fetch begins");
    // result reaches memory through the store
    wait (halted);
    #1 chk(dut.u_mem.mem[126] == 16'd16, $sformatf("stored r3 = %0d", dut.u_mem.mem[126]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
