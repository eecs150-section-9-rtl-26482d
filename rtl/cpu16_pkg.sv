// cpu16_pkg: shared types and constants of the 16-bit multi-cycle processor.
//
// Every instruction is one 16-bit word. The three formats share the 3-bit
// opcode in bits [15:13]:
//   R-type: op[15:13] rs[12:10] rt[9:7] rd[6:4] funct[3:0]
//   I-type: op[15:13] rs[12:10] rt[9:7] offset[6:0]   (offset is signed)
//   J-type: op[15:13] target[12:0]
// Opcode and funct numbers follow the instruction table of the source
// lecture notes. The ALU operation codes are this design's choice: they are
// made equal to the R-type funct codes so that the controller can pass
// funct[2:0] straight to the ALU.
package cpu16_pkg;

  localparam int unsigned XLEN      = 16;  // datapath and instruction width
  localparam int unsigned NREGS     = 8;   // 3-bit register indices
  localparam int unsigned RIDX      = 3;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RIDX-1:0] ridx_t;

  typedef enum logic [2:0] {
    OP_RTYPE = 3'd0,
    OP_LW    = 3'd1,
    OP_SW    = 3'd2,
    OP_BEQ   = 3'd3,
    OP_ADDI  = 3'd4,
    OP_J     = 3'd5,
    OP_NONE6 = 3'd6,   // unassigned
    OP_HALT  = 3'd7
  } opcode_e;

  typedef enum logic [3:0] {
    FN_ADD = 4'd0,
    FN_SUB = 4'd1,
    FN_AND = 4'd2,
    FN_OR  = 4'd3,
    FN_SLT = 4'd4
  } funct_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } aluop_e;

  // ALU B-input select, {srcB1, srcB0}
  localparam logic [1:0] SRCB_REGB = 2'b00;  // register file port B
  localparam logic [1:0] SRCB_OFFS = 2'b01;  // sign-extended Inst[6:0]
  localparam logic [1:0] SRCB_ONE  = 2'b10;  // constant 1 (PC increment)
  localparam logic [1:0] SRCB_ZERO = 2'b11;  // constant 0

  // Field extraction helpers
  function automatic opcode_e inst_op(input word_t i);
    return opcode_e'(i[15:13]);
  endfunction
  function automatic ridx_t inst_rs(input word_t i);
    return i[12:10];
  endfunction
  function automatic ridx_t inst_rt(input word_t i);
    return i[9:7];
  endfunction
  function automatic ridx_t inst_rd(input word_t i);
    return i[6:4];
  endfunction
  function automatic logic [3:0] inst_funct(input word_t i);
    return i[3:0];
  endfunction
  function automatic word_t inst_offset(input word_t i);
    return {{(XLEN-7){i[6]}}, i[6:0]};
  endfunction
  function automatic word_t inst_target(input word_t i);
    return {3'b000, i[12:0]};
  endfunction

  // Instruction encoders, used by testbenches to build programs
  function automatic word_t enc_r(input funct_e f, input ridx_t rd, input ridx_t rs, input ridx_t rt);
    return {OP_RTYPE, rs, rt, rd, f};
  endfunction
  function automatic word_t enc_i(input opcode_e o, input ridx_t rt, input ridx_t rs, input logic [6:0] off);
    return {o, rs, rt, off};
  endfunction
  function automatic word_t enc_j(input opcode_e o, input logic [12:0] tgt);
    return {o, tgt};
  endfunction

endpackage
