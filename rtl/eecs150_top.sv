// eecs150_top: the designs of these computer-organisation notes, side by
// side. They do not form one machine; each keeps its own ports, prefixed:
//   cpu_*   cpu16, the 16-bit multi-cycle processor with its memory
//   acc_*   acc_datapath, the accumulator datapath (AC <- AC op Mem)
//   hv_*    harvard_datapath, the accumulator processor datapath with
//           separate instruction and data memories (controls are ports)
//   bs_*    bitslice_datapath, the bit-sliced datapath (N slices)
//   add_*   ripple_adder, the iterative n-bit adder of full adders
//   rf_*    regfile4x4, the 4-word by 4-bit register file
//   sram_*  sram1kx4, the 1024 x 4 static RAM
//   reg_*   reg_ld_oe, the 8-bit register with load and output enable
//   p2p_*, mux_*, bus_*  the three ways to connect registers
// All clocked blocks share clk; only the processor and the accumulator
// datapath have a reset. See each module for its timing.
module eecs150_top
  import cpu16_pkg::*;
#(
  parameter int unsigned CPU_DEPTH = 255,
  parameter int unsigned BS_N      = 2,
  parameter int unsigned ADD_W     = 16,
  parameter int unsigned XFER_W    = 8
) (
  input  logic                       clk,
  // processor
  input  logic                       cpu_reset,
  input  logic                       cpu_prog_we,
  input  word_t                      cpu_prog_addr,
  input  word_t                      cpu_prog_data,
  output word_t                      cpu_mlast,
  output logic                       cpu_halted,
  output word_t                      cpu_pc,
  output word_t                      cpu_ir,
  // accumulator datapath
  input  logic                       acc_reset,
  input  word_t                      acc_mem_d,
  input  logic                       acc_reg_ld,
  input  logic                       acc_ac_ld,
  input  aluop_e                     acc_op,
  output word_t                      acc_ac,
  output logic                       acc_n,
  output logic                       acc_z,
  // Harvard accumulator datapath
  input  logic                       hv_reset,
  input  logic                       hv_reg_ld,
  input  logic                       hv_ac_ld,
  input  aluop_e                     hv_alu_op,
  input  logic                       hv_dmem_wr,
  input  logic                       hv_ir_ld,
  input  logic                       hv_pc_ld,
  input  aluop_e                     hv_pc_op,
  input  logic                       hv_pc_a_zero,
  input  logic                       hv_pc_b_ir,
  input  logic                       hv_imem_we,
  input  logic [7:0]                 hv_imem_addr,
  input  logic [7:0]                 hv_imem_data,
  input  logic                       hv_dmem_we,
  input  logic [7:0]                 hv_dmem_addr,
  input  word_t                      hv_dmem_data,
  output word_t                      hv_pc,
  output word_t                      hv_ir,
  output word_t                      hv_reg,
  output word_t                      hv_ac,
  output logic                       hv_n,
  output logic                       hv_z,
  // bit-sliced datapath
  input  logic [BS_N-1:0]            bs_mem,
  input  logic                       bs_from_ac,
  input  logic [3:0]                 bs_ld,
  input  logic                       bs_ac_ld,
  input  logic [2:0]                 bs_a_sel,
  input  logic [2:0]                 bs_b_sel,
  input  logic [1:0]                 bs_alu_op,
  input  logic                       bs_ci,
  output logic                       bs_co,
  output logic [BS_N-1:0]            bs_ac,
  output logic [BS_N-1:0]            bs_r0,
  output logic [BS_N-1:0]            bs_rs,
  output logic [BS_N-1:0]            bs_rt,
  output logic [BS_N-1:0]            bs_rd,
  // ripple-carry adder
  input  logic [ADD_W-1:0]           add_a,
  input  logic [ADD_W-1:0]           add_b,
  input  logic                       add_cin,
  output logic [ADD_W-1:0]           add_s,
  output logic                       add_cout,
  // 4 x 4 register file
  input  logic                       rf_RE,
  input  logic [1:0]                 rf_raddr,
  input  logic                       rf_WE,
  input  logic [1:0]                 rf_waddr,
  input  logic [3:0]                 rf_D,
  output logic [3:0]                 rf_Q,
  // 1024 x 4 SRAM
  input  logic [9:0]                 sram_A,
  input  logic                       sram_RD,
  input  logic                       sram_WR,
  input  logic [3:0]                 sram_io_in,
  output logic [3:0]                 sram_io_out,
  output logic                       sram_io_oe,
  // 8-bit register with LD and OE
  input  logic                       reg_LD,
  input  logic                       reg_OE,
  input  logic [7:0]                 reg_D,
  output logic [7:0]                 reg_Q,
  output logic [7:0]                 reg_Qint,
  // register transfer, point to point
  input  logic [XFER_W-1:0]          p2p_ext_d,
  input  logic [3:0]                 p2p_ld,
  input  logic [3:0][2:0]            p2p_sel,
  output logic [3:0][XFER_W-1:0]     p2p_q,
  // register transfer, common mux
  input  logic [XFER_W-1:0]          mux_ext_d,
  input  logic [3:0]                 mux_ld,
  input  logic [2:0]                 mux_sel,
  output logic [XFER_W-1:0]          mux_common,
  output logic [3:0][XFER_W-1:0]     mux_q,
  // register transfer, common bus
  input  logic [XFER_W-1:0]          bus_ext_d,
  input  logic                       bus_ext_oe,
  input  logic [3:0]                 bus_oe,
  input  logic [3:0]                 bus_ld,
  output logic [XFER_W-1:0]          bus_value,
  output logic [3:0][XFER_W-1:0]     bus_q
);

  cpu16 #(.DEPTH(CPU_DEPTH)) u_cpu (
    .clk, .reset(cpu_reset), .prog_we(cpu_prog_we), .prog_addr(cpu_prog_addr),
    .prog_data(cpu_prog_data), .mlast(cpu_mlast), .halted(cpu_halted),
    .pc_out(cpu_pc), .ir_out(cpu_ir)
  );

  acc_datapath #(.W(XLEN)) u_acc (
    .clk, .reset(acc_reset), .mem_d(acc_mem_d), .reg_ld(acc_reg_ld),
    .ac_ld(acc_ac_ld), .op(acc_op), .ac(acc_ac), .n(acc_n), .z(acc_z)
  );

  harvard_datapath #(.DDEPTH(256), .IDEPTH(256)) u_hv (
    .clk, .reset(hv_reset), .reg_ld(hv_reg_ld), .ac_ld(hv_ac_ld), .alu_op(hv_alu_op),
    .dmem_wr(hv_dmem_wr), .ir_ld(hv_ir_ld), .pc_ld(hv_pc_ld), .pc_op(hv_pc_op),
    .pc_a_zero(hv_pc_a_zero), .pc_b_ir(hv_pc_b_ir), .imem_we(hv_imem_we),
    .imem_addr(hv_imem_addr), .imem_data(hv_imem_data), .dmem_we(hv_dmem_we),
    .dmem_addr(hv_dmem_addr), .dmem_data(hv_dmem_data), .pc(hv_pc), .ir(hv_ir),
    .regq(hv_reg), .ac(hv_ac), .n(hv_n), .z(hv_z)
  );

  bitslice_datapath #(.N(BS_N)) u_bs (
    .clk, .mem(bs_mem), .from_ac(bs_from_ac), .ld(bs_ld), .ac_ld(bs_ac_ld),
    .a_sel(bs_a_sel), .b_sel(bs_b_sel), .alu_op(bs_alu_op), .CI(bs_ci),
    .CO(bs_co), .ac(bs_ac), .r0(bs_r0), .rs(bs_rs), .rt(bs_rt), .rd(bs_rd)
  );

  ripple_adder #(.W(ADD_W)) u_add (
    .a(add_a), .b(add_b), .cin(add_cin), .s(add_s), .cout(add_cout)
  );

  regfile4x4 u_rf (
    .clk, .RE(rf_RE), .RB(rf_raddr[1]), .RA(rf_raddr[0]),
    .WE(rf_WE), .WB(rf_waddr[1]), .WA(rf_waddr[0]), .D(rf_D), .Q(rf_Q)
  );

  sram1kx4 u_sram (
    .A(sram_A), .RD(sram_RD), .WR(sram_WR), .io_in(sram_io_in),
    .io_out(sram_io_out), .io_oe(sram_io_oe)
  );

  reg_ld_oe #(.W(8)) u_reg (
    .CLK(clk), .LD(reg_LD), .OE(reg_OE), .D(reg_D), .Q(reg_Q), .Qint(reg_Qint)
  );

  xfer_p2p #(.W(XFER_W)) u_p2p (
    .clk, .ext_d(p2p_ext_d), .ld(p2p_ld), .sel(p2p_sel), .q(p2p_q)
  );

  xfer_mux #(.W(XFER_W)) u_mux (
    .clk, .ext_d(mux_ext_d), .ld(mux_ld), .sel(mux_sel), .common(mux_common), .q(mux_q)
  );

  xfer_bus #(.W(XFER_W)) u_bus (
    .clk, .ext_d(bus_ext_d), .ext_oe(bus_ext_oe), .oe(bus_oe), .ld(bus_ld),
    .bus(bus_value), .q(bus_q)
  );

endmodule
