// tb_controller: steps the control FSM through every instruction and
// checks, cycle by cycle, the control word it produces and the number of
// cycles each instruction takes: 3 for register and immediate
// arithmetic and j, 5 for lw, 4 for sw, 3 or 4 for beq (not taken or
// taken); halt stays halted until reset; undefined codes do nothing.
module tb_controller;
  import cpu16_pkg::*;
  `include "tb_common.svh"

  logic rst, neg, zero;
  word_t inst;
  logic RegBmdEN, ALUmaEN, PCmaEN, mw, mr, PCld, PCsel, wrRegSel, wrDataSel, regWrite, IRld, MBRld;
  logic srcB1, srcB0, srcA, halted;
  aluop_e op;

  controller dut (.clk, .reset(rst), .neg, .zero, .Inst(inst), .RegBmdEN, .ALUmaEN, .PCmaEN, .mw, .mr,
                  .PCld, .PCsel, .wrRegSel, .wrDataSel, .regWrite, .IRld, .MBRld, .op, .srcB1, .srcB0,
                  .srcA, .halted);

  // control word: {RegBmdEN, ALUmaEN, PCmaEN, mw, mr, PCld, PCsel, wrRegSel,
  //                wrDataSel, regWrite, IRld, MBRld, op[2:0], srcB[1:0], srcA, halted}
  typedef logic [18:0] cw_t;
  function automatic cw_t cw(input logic bmd, ama, pma, w, r, pld, psel, wrs, wds, rw, irl, mbl,
                             input logic [2:0] o, input logic [1:0] sb, input logic sa, input logic h);
    return {bmd, ama, pma, w, r, pld, psel, wrs, wds, rw, irl, mbl, o, sb, sa, h};
  endfunction
  cw_t actual;
  assign actual = {RegBmdEN, ALUmaEN, PCmaEN, mw, mr, PCld, PCsel, wrRegSel, wrDataSel, regWrite,
                   IRld, MBRld, op, srcB1, srcB0, srcA, halted};

  localparam cw_t FETCH  = {1'b0,1'b0,1'b1,1'b0,1'b1,1'b1,1'b0,1'b0,1'b0,1'b0,1'b1,1'b0,3'd0,2'b10,1'b0,1'b0};
  localparam cw_t DECODE = {12'b0, 3'd0, 2'b00, 1'b1, 1'b0};

  // Run one instruction from its fetch; exp holds the execute-cycle words.
  task automatic run(input word_t i, input logic z, input cw_t exp[$], input string name);
    @(posedge clk); #1;  // now in fetch; the instruction is needed from decode on
    inst = i; zero = z;
    chk(actual == FETCH, $sformatf("%s: fetch word %h", name, actual));
    @(posedge clk); #1;
    chk(actual == DECODE, $sformatf("%s: decode word %h", name, actual));
    foreach (exp[k]) begin
      @(posedge clk); #1;
      chk(actual == exp[k], $sformatf("%s: exec cycle %0d word %h want %h", name, k, actual, exp[k]));
    end
    // the cycle count (2 + exp.size()) is checked by the next call, which
    // expects a fetch on the following cycle
  endtask

  initial begin
    cw_t e[$];
    rst = 1; neg = 0; zero = 0; inst = '0;
    @(posedge clk); #1;
    chk(actual == FETCH, "reset goes to fetch");
    @(negedge clk); rst = 0;
    // the first run() call waits one edge, so re-enter fetch with a reset pulse
    rst = 1; @(posedge clk); #1; rst = 0;
    inst = enc_r(FN_ADD, 3'd3, 3'd1, 3'd2); zero = 0;
    chk(actual == FETCH, "fetch after reset");
    @(posedge clk); #1; chk(actual == DECODE, "add: decode");
    @(posedge clk); #1; chk(actual == cw(0,0,0,0,0,0,0,0,0,1,0,0,3'd0,2'b00,1,0), "add: rd <- A + B");
    // The remaining instructions use run(), which starts at the edge into fetch.
    e = '{cw(0,0,0,0,0,0,0,0,0,1,0,0,3'd1,2'b00,1,0)};  run(enc_r(FN_SUB, 1, 2, 3), 0, e, "sub");
    e = '{cw(0,0,0,0,0,0,0,0,0,1,0,0,3'd2,2'b00,1,0)};  run(enc_r(FN_AND, 1, 2, 3), 0, e, "and");
    e = '{cw(0,0,0,0,0,0,0,0,0,1,0,0,3'd3,2'b00,1,0)};  run(enc_r(FN_OR,  1, 2, 3), 0, e, "or");
    e = '{cw(0,0,0,0,0,0,0,0,0,1,0,0,3'd4,2'b00,1,0)};  run(enc_r(FN_SLT, 1, 2, 3), 0, e, "slt");
    e = '{cw(0,0,0,0,0,0,0,1,0,1,0,0,3'd0,2'b01,1,0)};  run(enc_i(OP_ADDI, 1, 2, 7'd5), 0, e, "addi");
    e = '{cw(0,0,0,0,0,0,0,0,0,0,0,0,3'd0,2'b01,1,0),
          cw(0,1,0,0,1,0,0,0,0,0,0,1,3'd0,2'b00,1,0),
          cw(0,0,0,0,0,0,0,1,1,1,0,0,3'd0,2'b00,1,0)};  run(enc_i(OP_LW, 1, 2, 7'd9), 0, e, "lw");
    e = '{cw(0,0,0,0,0,0,0,0,0,0,0,0,3'd0,2'b01,1,0),
          cw(1,1,0,1,0,0,0,0,0,0,0,0,3'd0,2'b00,1,0)};  run(enc_i(OP_SW, 1, 2, 7'd9), 0, e, "sw");
    e = '{cw(0,0,0,0,0,0,0,0,0,0,0,0,3'd1,2'b00,1,0)};  run(enc_i(OP_BEQ, 1, 2, 7'd4), 0, e, "beq not taken");
    e = '{cw(0,0,0,0,0,0,0,0,0,0,0,0,3'd1,2'b00,1,0),
          cw(0,0,0,0,0,1,0,0,0,0,0,0,3'd0,2'b01,0,0)};  run(enc_i(OP_BEQ, 1, 2, 7'd4), 1, e, "beq taken");
    e = '{cw(0,0,0,0,0,1,1,0,0,0,0,0,3'd0,2'b00,1,0)};  run(enc_j(OP_J, 13'd77), 0, e, "j");
    e = '{};                                            run({OP_NONE6, 13'd0}, 0, e, "undefined opcode");
    e = '{};                                            run(enc_r(funct_e'(4'd9), 1, 2, 3), 0, e, "undefined funct");
    // halt: stays halted
    e = '{};                                            run(enc_j(OP_HALT, 13'd0), 0, e, "halt");
    for (int k = 0; k < 20; k++) begin
      @(posedge clk); #1;
      chk(actual == cw(0,0,0,0,0,0,0,0,0,0,0,0,3'd0,2'b00,1,1), "halted holds");
    end
    @(negedge clk); rst = 1; @(posedge clk); #1; rst = 0;
    chk(actual == FETCH, "reset leaves halt");
    `TB_FINISH
  end
endmodule
