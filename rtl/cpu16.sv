// cpu16: a 16-bit multi-cycle processor with a single memory for program
// and data (Princeton organisation), after a 16-bit cut-down of the MIPS
// R2000 used in teaching.
//
// Datapath: program counter (pc_reg), instruction register and memory
// buffer register (load_reg), eight-register file (regfile8), ALU with its
// operand selectors (alu16) and a register holding the last ALU result.
// Two buses join the processor and memory: the memory address bus (mabus)
// is driven by the PC or by the ALU result register; the memory data bus
// (mdbus) is driven by the memory on a read or by register-file port B on
// a store. Both are built as bus_or structures. The PC is stepped through
// the ALU, and the ALU result feeds the PC and the register file directly.
// The controller sequences fetch, decode and execute (see controller.sv).
//
// Interface: clk, synchronous reset (PC <- 0, controller to Fetch); the
// display word mlast of memory; halted is high once a halt instruction has
// executed. The program load port (prog_*) writes memory directly and is
// meant for use while reset is held. Memory size DEPTH defaults to 255.
module cpu16
  import cpu16_pkg::*;
#(
  parameter int unsigned DEPTH = 255
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  prog_we,
  input  word_t prog_addr,
  input  word_t prog_data,
  output word_t mlast,
  output logic  halted,
  output word_t pc_out,
  output word_t ir_out
);

  // Control signals
  logic   RegBmdEN, ALUmaEN, PCmaEN, mw, mr, PCld, PCsel;
  logic   wrRegSel, wrDataSel, regWrite, IRld, MBRld;
  logic   srcB1, srcB0, srcA, zero, neg;
  aluop_e op;

  // Datapath signals
  word_t PC, Inst, MBR, RegA, RegB, ALUout, ALUreg;
  word_t mabus, mdbus, memrd;

  controller u_ctrl (
    .clk, .reset, .neg, .zero, .Inst,
    .RegBmdEN, .ALUmaEN, .PCmaEN, .mw, .mr, .PCld, .PCsel,
    .wrRegSel, .wrDataSel, .regWrite, .IRld, .MBRld,
    .op, .srcB1, .srcB0, .srcA, .halted
  );

  pc_reg u_pc (
    .clk, .reset, .ld(PCld), .PCsel, .Inst, .ALUout, .PC
  );

  load_reg #(.W(XLEN)) u_ir (
    .clk, .reset, .ld(IRld), .d(mdbus), .q(Inst)
  );

  load_reg #(.W(XLEN)) u_mbr (
    .clk, .reset, .ld(MBRld), .d(mdbus), .q(MBR)
  );

  regfile8 u_rf (
    .clk, .regWrite, .wrRegSel, .wrDataSel, .Inst, .ALUout, .MBR, .RegA, .RegB
  );

  alu16 u_alu (
    .pc(PC), .rega(RegA), .regb(RegB), .inst(Inst),
    .srcA, .srcB1, .srcB0, .op, .aluout(ALUout), .zero, .neg
  );

  // ALU result register: loads every cycle, drives the address bus for
  // loads and stores.
  load_reg #(.W(XLEN)) u_alureg (
    .clk, .reset, .ld(1'b1), .d(ALUout), .q(ALUreg)
  );

  // Memory address bus: PC2mabus and ALU2mabus drivers.
  bus_or #(.N(2), .W(XLEN)) u_mabus (
    .clk, .en({ALUmaEN, PCmaEN}), .drv({ALUreg, PC}), .bus(mabus)
  );

  // Memory data bus: memory read data and Reg2mdbus driver.
  bus_or #(.N(2), .W(XLEN)) u_mdbus (
    .clk, .en({RegBmdEN, mr}), .drv({RegB, memrd}), .bus(mdbus)
  );

  cpu_memory #(.DEPTH(DEPTH)) u_mem (
    .clk, .mabus, .wdata(mdbus), .mr, .mw, .rdata(memrd), .mlast,
    .prog_we, .prog_addr, .prog_data
  );

  assign pc_out = PC;
  assign ir_out = Inst;

endmodule
