// controller: the processor's control unit, a Moore state machine with
// several cycles per instruction.
//
// After reset it enters Fetch: the PC drives the memory address bus, memory
// is read, the word is loaded into the instruction register and the ALU
// computes PC + 1, which the PC loads. Decode follows; in it the register
// file reads rs and rt, and the next state is chosen from the opcode
// Inst[15:13] and, for register-type instructions, funct Inst[3:0]. Each
// instruction then has its own execute states:
//   add/sub/and/or/slt  1 state : rd <- A op B                   (3 cycles)
//   addi                1 state : rt <- A + offset               (3 cycles)
//   lw                  3 states: address, MBR <- mem, rt <- MBR (5 cycles)
//   sw                  2 states: address, mem <- B              (4 cycles)
//   beq                 1 or 2  : A - B, then PC <- PC + offset  (3 or 4)
//   j                   1 state : PC <- target                   (3 cycles)
//   halt                stays in Halt until reset
// An unassigned opcode or funct returns to Fetch, doing nothing. The branch
// offset is added to the PC after its increment in Fetch.
//
// Outputs depend on the state only; the one data condition used is zero
// (for beq), which steers the next state. The neg input is part of the
// controller's interface in the schematic, but no instruction of the set
// tests it, so it is left unused. halted is an extra status output.
// Signal names follow the controller symbol of the notes; the state
// sequences, select encodings and the halted output are this design's.
module controller
  import cpu16_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   neg,
  input  logic   zero,
  input  word_t  Inst,
  output logic   RegBmdEN,
  output logic   ALUmaEN,
  output logic   PCmaEN,
  output logic   mw,
  output logic   mr,
  output logic   PCld,
  output logic   PCsel,
  output logic   wrRegSel,
  output logic   wrDataSel,
  output logic   regWrite,
  output logic   IRld,
  output logic   MBRld,
  output aluop_e op,
  output logic   srcB1,
  output logic   srcB0,
  output logic   srcA,
  output logic   halted
);

  typedef enum logic [4:0] {
    S_FETCH, S_DECODE,
    S_ADD, S_SUB, S_AND, S_OR, S_SLT,
    S_ADDI,
    S_LW_ADDR, S_LW_MEM, S_LW_WB,
    S_SW_ADDR, S_SW_MEM,
    S_BEQ_CMP, S_BEQ_TAKE,
    S_J,
    S_HALT
  } state_e;

  state_e state, next;

  always_ff @(posedge clk) begin
    if (reset) state <= S_FETCH;
    else       state <= next;
  end

  // Next-state logic
  always_comb begin
    next = S_FETCH;
    unique case (state)
      S_FETCH:  next = S_DECODE;
      S_DECODE: begin
        unique case (inst_op(Inst))
          OP_RTYPE: begin
            unique case (inst_funct(Inst))
              FN_ADD:  next = S_ADD;
              FN_SUB:  next = S_SUB;
              FN_AND:  next = S_AND;
              FN_OR:   next = S_OR;
              FN_SLT:  next = S_SLT;
              default: next = S_FETCH;
            endcase
          end
          OP_LW:   next = S_LW_ADDR;
          OP_SW:   next = S_SW_ADDR;
          OP_BEQ:  next = S_BEQ_CMP;
          OP_ADDI: next = S_ADDI;
          OP_J:    next = S_J;
          OP_HALT: next = S_HALT;
          default: next = S_FETCH;
        endcase
      end
      S_LW_ADDR: next = S_LW_MEM;
      S_LW_MEM:  next = S_LW_WB;
      S_SW_ADDR: next = S_SW_MEM;
      S_BEQ_CMP: next = zero ? S_BEQ_TAKE : S_FETCH;
      S_HALT:    next = S_HALT;
      default:   next = S_FETCH;
    endcase
  end

  // Output logic (Moore): everything idle unless the state asserts it.
  always_comb begin
    RegBmdEN  = 1'b0;  ALUmaEN  = 1'b0;  PCmaEN   = 1'b0;
    mw        = 1'b0;  mr       = 1'b0;
    PCld      = 1'b0;  PCsel    = 1'b0;
    wrRegSel  = 1'b0;  wrDataSel = 1'b0; regWrite = 1'b0;
    IRld      = 1'b0;  MBRld    = 1'b0;
    op        = ALU_ADD;
    {srcB1, srcB0} = SRCB_REGB;
    srcA      = 1'b1;
    halted    = 1'b0;
    unique case (state)
      S_FETCH: begin
        PCmaEN = 1'b1; mr = 1'b1; IRld = 1'b1;
        srcA = 1'b0; {srcB1, srcB0} = SRCB_ONE; op = ALU_ADD;
        PCld = 1'b1; PCsel = 1'b0;
      end
      S_DECODE: ;  // register file reads rs and rt
      S_ADD, S_SUB, S_AND, S_OR, S_SLT: begin
        unique case (state)
          S_SUB:   op = ALU_SUB;
          S_AND:   op = ALU_AND;
          S_OR:    op = ALU_OR;
          S_SLT:   op = ALU_SLT;
          default: op = ALU_ADD;
        endcase
        regWrite = 1'b1; wrRegSel = 1'b0; wrDataSel = 1'b0;
      end
      S_ADDI: begin
        {srcB1, srcB0} = SRCB_OFFS; op = ALU_ADD;
        regWrite = 1'b1; wrRegSel = 1'b1; wrDataSel = 1'b0;
      end
      S_LW_ADDR, S_SW_ADDR: begin
        {srcB1, srcB0} = SRCB_OFFS; op = ALU_ADD;
      end
      S_LW_MEM: begin
        ALUmaEN = 1'b1; mr = 1'b1; MBRld = 1'b1;
      end
      S_LW_WB: begin
        regWrite = 1'b1; wrRegSel = 1'b1; wrDataSel = 1'b1;
      end
      S_SW_MEM: begin
        ALUmaEN = 1'b1; RegBmdEN = 1'b1; mw = 1'b1;
      end
      S_BEQ_CMP: op = ALU_SUB;
      S_BEQ_TAKE: begin
        srcA = 1'b0; {srcB1, srcB0} = SRCB_OFFS; op = ALU_ADD;
        PCld = 1'b1; PCsel = 1'b0;
      end
      S_J: begin
        PCld = 1'b1; PCsel = 1'b1;
      end
      S_HALT: halted = 1'b1;
      default: ;
    endcase
  end

  // Unused by the instruction set, see header.
  logic unused_neg;
  assign unused_neg = neg;

  // Memory is never read and written in the same cycle, and only one
  // source drives each bus.
  a_no_rw:   assert property (@(posedge clk) disable iff (reset) !(mr && mw));
  a_mabus:   assert property (@(posedge clk) disable iff (reset) !(PCmaEN && ALUmaEN));
  a_mdbus:   assert property (@(posedge clk) disable iff (reset) !(mr && RegBmdEN));

endmodule
