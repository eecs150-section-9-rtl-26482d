// harvard_datapath: the datapath of an accumulator processor with separate
// instruction and data memories (a Harvard organisation), without its
// control unit.
//
// Data side: REG takes a word from the data memory (load path); the ALU
// computes AC op REG; AC takes the ALU result; AC can be written back to
// the data memory (store path). The data memory holds 16-bit words and is
// addressed by the low byte of the instruction register, so the IR acts as
// the data side's memory address register and REG as its buffer register.
// Instruction side: the PC addresses the instruction memory of 8-bit
// words; the IR takes the word there; a second ALU computes the next PC
// from the PC (or 0) and the constant 1 (or the IR), with its own
// operation code, so the PC is stepped, offset or set through that ALU.
//
// Because instruction words are 8 bits and the IR is 16, each IR load
// shifts the previous low byte up and takes the new word into the low
// byte: two loads give a full 16-bit instruction (for example an
// operation byte followed by an operand-address byte).
//
// Timing: all registers load on the rising clk edge when their load input
// is asserted; reset clears them. Memory reads are combinational; a data
// memory write (dmem_wr) stores AC at the rising edge. Load ports write
// either memory directly, for placing a program and its data.
//
// The registers, the two ALUs, the memory word widths and which register
// addresses which memory follow the course notes. Memory sizes (256 words
// each), the IR byte-shift, the PC-ALU operand choices and the load ports
// are this design's; the instruction set and the control state machine
// are not given there and are not built, so every control is an input.
module harvard_datapath
  import cpu16_pkg::*;
#(
  parameter int unsigned DDEPTH = 256,
  parameter int unsigned IDEPTH = 256
) (
  input  logic        clk,
  input  logic        reset,
  // data side controls
  input  logic        reg_ld,
  input  logic        ac_ld,
  input  aluop_e      alu_op,
  input  logic        dmem_wr,
  // instruction side controls
  input  logic        ir_ld,
  input  logic        pc_ld,
  input  aluop_e      pc_op,
  input  logic        pc_a_zero,   // PC ALU A input: 0 instead of PC
  input  logic        pc_b_ir,     // PC ALU B input: IR instead of 1
  // memory load ports
  input  logic        imem_we,
  input  logic [7:0]  imem_addr,
  input  logic [7:0]  imem_data,
  input  logic        dmem_we,
  input  logic [7:0]  dmem_addr,
  input  word_t       dmem_data,
  // state and status
  output word_t       pc,
  output word_t       ir,
  output word_t       regq,
  output word_t       ac,
  output logic        n,
  output logic        z
);

  localparam int unsigned DA = $clog2(DDEPTH);
  localparam int unsigned IA = $clog2(IDEPTH);

  word_t      dmem [DDEPTH];
  logic [7:0] imem [IDEPTH];

  word_t      alu_s, pc_next, dmem_rd;
  logic [7:0] imem_rd;
  logic       pc_n, pc_z;

  // Memories: combinational read, clocked write.
  assign dmem_rd = dmem[ir[DA-1:0]];
  assign imem_rd = imem[pc[IA-1:0]];

  always_ff @(posedge clk) begin
    if (dmem_we)      dmem[dmem_addr[DA-1:0]] <= dmem_data;
    else if (dmem_wr) dmem[ir[DA-1:0]]        <= ac;
    if (imem_we)      imem[imem_addr[IA-1:0]] <= imem_data;
  end

  // Data ALU: AC op REG
  alu_core #(.W(XLEN)) u_alu (.a(ac), .b(regq), .op(alu_op), .s(alu_s), .n(n), .z(z));

  // Instruction-side ALU: next PC
  alu_core #(.W(XLEN)) u_pcalu (
    .a(pc_a_zero ? word_t'(0) : pc), .b(pc_b_ir ? ir : word_t'(1)), .op(pc_op),
    .s(pc_next), .n(pc_n), .z(pc_z)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      pc   <= '0;
      ir   <= '0;
      regq <= '0;
      ac   <= '0;
    end else begin
      if (pc_ld)  pc   <= pc_next;
      if (ir_ld)  ir   <= {ir[7:0], imem_rd};
      if (reg_ld) regq <= dmem_rd;
      if (ac_ld)  ac   <= alu_s;
    end
  end

  // The PC ALU's flags have no user: the notes draw none for it.
  logic unused_pc_flags;
  assign unused_pc_flags = pc_n ^ pc_z;

endmodule
