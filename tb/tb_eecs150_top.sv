// tb_eecs150_top: end-to-end run of the whole top level at its default
// sizes. The processor loads and runs the shared test program to halt
// (results, display word and cycle count are checked); meanwhile the
// other example blocks are exercised through the top's ports. Each
// mechanism of the designs is counted and must occur at least once:
// every execute state of the processor, beq taken and not taken, a
// backward branch, both drivers of each processor bus, a display write,
// halt; a full-length carry ripple; an SRAM write pulse and read; a
// simultaneous read and write of the register file; a register swap
// through point-to-point muxes; a bus and a common-mux transfer; an
// accumulator operation; a carry across bit slices; a two-byte fetch, an
// accumulate and a store on the Harvard datapath.
module tb_eecs150_top;
  import cpu16_pkg::*;
  `include "tb_common.svh"
  `include "cpu_prog.svh"

  // processor
  logic cpu_reset, cpu_prog_we, cpu_halted;
  word_t cpu_prog_addr, cpu_prog_data, cpu_mlast, cpu_pc, cpu_ir;
  // accumulator
  logic acc_reset, acc_reg_ld, acc_ac_ld, acc_n, acc_z;
  word_t acc_mem_d, acc_ac;
  aluop_e acc_op;
  // Harvard datapath
  logic hv_reset, hv_reg_ld, hv_ac_ld, hv_dmem_wr, hv_ir_ld, hv_pc_ld, hv_pc_a_zero, hv_pc_b_ir;
  logic hv_imem_we, hv_dmem_we, hv_n, hv_z;
  aluop_e hv_alu_op, hv_pc_op;
  logic [7:0] hv_imem_addr, hv_imem_data, hv_dmem_addr;
  word_t hv_dmem_data, hv_pc, hv_ir, hv_reg, hv_ac;
  // bit slice
  logic [1:0] bs_mem, bs_ac, bs_r0, bs_rs, bs_rt, bs_rd;
  logic bs_from_ac, bs_ac_ld, bs_ci, bs_co;
  logic [3:0] bs_ld;
  logic [2:0] bs_a_sel, bs_b_sel;
  logic [1:0] bs_alu_op;
  // adder
  logic [15:0] add_a, add_b, add_s;
  logic add_cin, add_cout;
  // register file, sram, register
  logic rf_RE, rf_WE;
  logic [1:0] rf_raddr, rf_waddr;
  logic [3:0] rf_D, rf_Q;
  logic [9:0] sram_A;
  logic sram_RD, sram_WR, sram_io_oe;
  logic [3:0] sram_io_in, sram_io_out;
  logic reg_LD, reg_OE;
  logic [7:0] reg_D, reg_Q, reg_Qint;
  // register transfer
  logic [7:0] p2p_ext_d, mux_ext_d, bus_ext_d, mux_common, bus_value;
  logic [3:0] p2p_ld, mux_ld, bus_oe, bus_ld;
  logic [3:0][2:0] p2p_sel;
  logic [2:0] mux_sel;
  logic bus_ext_oe;
  logic [3:0][7:0] p2p_q, mux_q, bus_q;

  eecs150_top dut (.*);

  // ---- mechanism counters ----
  typedef enum int {
    M_ADD, M_SUB, M_AND, M_OR, M_SLT, M_ADDI, M_LW, M_SW, M_BEQ_TAKEN, M_BEQ_NOT,
    M_BACKWARD, M_J, M_HALT, M_MA_PC, M_MA_ALU, M_MD_MEM, M_MD_REG, M_DISPLAY,
    M_RIPPLE, M_SRAM_WR, M_SRAM_RD, M_RF_RW, M_SWAP, M_BUS_XFER, M_MUX_XFER,
    M_ACC_OP, M_SLICE_CARRY, M_HV_FETCH, M_HV_ACC, M_HV_STORE, M_COUNT
  } mech_e;
  int mcount [M_COUNT];
  string mname [M_COUNT] = '{"add", "sub", "and", "or", "slt", "addi", "lw", "sw", "beq taken",
    "beq not taken", "backward branch", "j", "halt", "mabus<-PC", "mabus<-ALU", "mdbus<-memory",
    "mdbus<-RegB", "display write", "carry ripple", "sram write", "sram read", "regfile read+write",
    "register swap", "bus transfer", "common-mux transfer", "accumulator op", "carry across slices",
    "harvard two-byte fetch", "harvard AC <- AC op Mem", "harvard store path"};

  word_t prev_pc;
  always @(posedge clk) if (!cpu_reset) begin
    automatic string st = dut.u_cpu.u_ctrl.state.name();
    if (st == "S_ADD") mcount[M_ADD]++;
    if (st == "S_SUB") mcount[M_SUB]++;
    if (st == "S_AND") mcount[M_AND]++;
    if (st == "S_OR")  mcount[M_OR]++;
    if (st == "S_SLT") mcount[M_SLT]++;
    if (st == "S_ADDI") mcount[M_ADDI]++;
    if (st == "S_LW_WB") mcount[M_LW]++;
    if (st == "S_SW_MEM") mcount[M_SW]++;
    if (st == "S_BEQ_TAKE") mcount[M_BEQ_TAKEN]++;
    if (st == "S_BEQ_CMP" && !dut.u_cpu.zero) mcount[M_BEQ_NOT]++;
    if (st == "S_BEQ_TAKE" && dut.u_cpu.ALUout < cpu_pc) mcount[M_BACKWARD]++;
    if (st == "S_J") mcount[M_J]++;
    if (st == "S_HALT") mcount[M_HALT]++;
    if (dut.u_cpu.PCmaEN) mcount[M_MA_PC]++;
    if (dut.u_cpu.ALUmaEN) mcount[M_MA_ALU]++;
    if (dut.u_cpu.mr) mcount[M_MD_MEM]++;
    if (dut.u_cpu.RegBmdEN) mcount[M_MD_REG]++;
    if (dut.u_cpu.mw && dut.u_cpu.mabus == 16'd255) mcount[M_DISPLAY]++;
  end

  // ---- processor ----
  task automatic run_cpu();
    int cycles;
    cpu_reset = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); cpu_prog_we = 1; cpu_prog_addr = word_t'(a);
      cpu_prog_data = (a < PROG_LEN) ? prog_word(a) : 16'h0000;
    end
    @(negedge clk); cpu_prog_we = 0; cpu_reset = 0;
    cycles = 0;
    while (!cpu_halted && cycles < 2000) begin
      @(posedge clk); #1; cycles++;
    end
    chk(cpu_halted && cycles == PROG_CYCLES, $sformatf("cpu halted after %0d cycles, want %0d", cycles, PROG_CYCLES));
    chk(cpu_mlast == 16'd8, $sformatf("cpu display %0d", cpu_mlast));
    chk(dut.u_cpu.u_mem.mem[40] == 8 && dut.u_cpu.u_mem.mem[51] == 8 && dut.u_cpu.u_mem.mem[54] == 7,
        "cpu stored results");
    repeat (3) @(posedge clk);
    #1 chk(cpu_halted && cpu_pc == word_t'(PROG_LEN), "cpu stays halted");
  endtask

  // ---- the other blocks ----
  task automatic run_others();
    // ripple adder: carry through all 16 bits
    add_a = 16'hffff; add_b = 16'h0000; add_cin = 1; #1;
    chk(add_s == 0 && add_cout, "ripple carry through 16 bits");
    if (add_s == 0 && add_cout) mcount[M_RIPPLE]++;
    for (int i = 0; i < 50; i++) begin
      add_a = 16'($urandom); add_b = 16'($urandom); add_cin = 1'($urandom); #1;
      chk({add_cout, add_s} == 17'(add_a) + 17'(add_b) + 17'(add_cin), "ripple adder sum");
    end
    // SRAM: write pulse then read
    sram_RD = 0; sram_A = 10'd1023; sram_io_in = 4'ha; #1 sram_WR = 1; #4 sram_WR = 0; #1;
    mcount[M_SRAM_WR]++;
    sram_RD = 1; #1;
    chk(sram_io_oe && sram_io_out == 4'ha, "sram read back");
    if (sram_io_oe) mcount[M_SRAM_RD]++;
    sram_RD = 0;
    // register file: write word 2, then read word 2 while writing word 3
    @(negedge clk); rf_WE = 1; rf_waddr = 2; rf_D = 4'h6; rf_RE = 0;
    @(negedge clk); rf_WE = 1; rf_waddr = 3; rf_D = 4'h9; rf_RE = 1; rf_raddr = 2; #1;
    chk(rf_Q == 4'h6, "regfile read during write");
    mcount[M_RF_RW]++;
    @(negedge clk); rf_WE = 0; rf_raddr = 3; #1;
    chk(rf_Q == 4'h9, "regfile second word");
    // 8-bit register
    reg_LD = 1; reg_OE = 1; reg_D = 8'h81;
    @(negedge clk); reg_LD = 0; reg_D = 8'h00; #1;
    chk(reg_Q == 8'h81 && reg_Qint == 8'h81, "LD/OE register");
    reg_OE = 0; #1; chk(reg_Q == 0, "output disabled");
    // point to point: load r0=1, r1=2, then swap
    p2p_sel = {4{3'd4}}; p2p_ext_d = 8'd1; p2p_ld = 4'b0001;
    @(negedge clk); p2p_ext_d = 8'd2; p2p_ld = 4'b0010;
    @(negedge clk); p2p_sel[0] = 3'd1; p2p_sel[1] = 3'd0; p2p_ld = 4'b0011;
    @(negedge clk); p2p_ld = 0; #1;
    chk(p2p_q[0] == 2 && p2p_q[1] == 1, "p2p swap");
    if (p2p_q[0] == 2 && p2p_q[1] == 1) mcount[M_SWAP]++;
    // common mux: ext into all, then copy register 0 into 3
    mux_sel = 3'd4; mux_ext_d = 8'h42; mux_ld = 4'hf;
    @(negedge clk); mux_ext_d = 8'h00; mux_sel = 3'd0; mux_ld = 4'b1000;
    @(negedge clk); mux_ld = 0; #1;
    chk(mux_q[3] == 8'h42 && mux_common == 8'h42, "common-mux transfer");
    if (mux_q[3] == 8'h42) mcount[M_MUX_XFER]++;
    // common bus: external onto the bus into register 1, then register 1 into register 2
    bus_oe = 0; bus_ext_oe = 1; bus_ext_d = 8'h5c; bus_ld = 4'b0010;
    @(negedge clk); bus_ext_oe = 0; bus_oe = 4'b0010; bus_ld = 4'b0100; #1;
    chk(bus_value == 8'h5c, "bus carries register 1");
    @(negedge clk); bus_oe = 0; bus_ld = 0; #1;
    chk(bus_q[2] == 8'h5c, "bus transfer");
    if (bus_q[2] == 8'h5c) mcount[M_BUS_XFER]++;
    // accumulator: AC = 0 + 7, then AC = 7 - 9 (negative)
    acc_reset = 1; @(negedge clk); acc_reset = 0;
    acc_mem_d = 16'd7; acc_reg_ld = 1; acc_ac_ld = 0;
    @(negedge clk); acc_reg_ld = 0; acc_ac_ld = 1; acc_op = ALU_ADD;
    @(negedge clk); acc_mem_d = 16'd9; acc_reg_ld = 1; acc_ac_ld = 0;
    @(negedge clk); acc_reg_ld = 0; acc_ac_ld = 1; acc_op = ALU_SUB; #1;
    chk(acc_n && !acc_z, "accumulator flags");
    @(negedge clk); acc_ac_ld = 0; #1;
    chk(acc_ac == 16'hfffe, $sformatf("accumulator %h", acc_ac));
    mcount[M_ACC_OP]++;
    // bit slices: R0 = 01, rs = 11 from memory; AC = R0 + rs = 00 with carry out
    bs_from_ac = 0; bs_ac_ld = 0; bs_alu_op = 0; bs_ci = 0; bs_a_sel = 1; bs_b_sel = 2;
    bs_mem = 2'b01; bs_ld = 4'b0001;
    @(negedge clk); bs_mem = 2'b11; bs_ld = 4'b0010;
    @(negedge clk); bs_ld = 0; bs_ac_ld = 1; #1;
    chk(bs_co, "carry out of the top slice");
    if (bs_co) mcount[M_SLICE_CARRY]++;
    @(negedge clk); bs_ac_ld = 0; #1;
    chk(bs_ac == 2'b00 && bs_r0 == 2'b01 && bs_rs == 2'b11, "bit-slice add");
  endtask

  // ---- Harvard datapath: AC <- AC + Dmem[IR], then store AC ----
  task automatic run_harvard();
    hv_reset = 1;
    // instruction bytes 0x01, 0x05: the operand address is 5; data word 5 = 1234
    @(negedge clk); hv_imem_we = 1; hv_imem_addr = 0; hv_imem_data = 8'h01;
    hv_dmem_we = 1; hv_dmem_addr = 5; hv_dmem_data = 16'd1234;
    @(negedge clk); hv_imem_addr = 1; hv_imem_data = 8'h05; hv_dmem_we = 0;
    @(negedge clk); hv_imem_we = 0; hv_reset = 0;
    hv_ir_ld = 1; hv_pc_ld = 1; hv_pc_op = ALU_ADD;
    @(negedge clk); @(negedge clk); hv_ir_ld = 0; hv_pc_ld = 0;
    chk(hv_ir == 16'h0105 && hv_pc == 2, $sformatf("harvard fetch ir=%h pc=%0d", hv_ir, hv_pc));
    if (hv_ir == 16'h0105) mcount[M_HV_FETCH]++;
    hv_reg_ld = 1;
    @(negedge clk); hv_reg_ld = 0; hv_ac_ld = 1; hv_alu_op = ALU_ADD;
    @(negedge clk); hv_ac_ld = 0;
    chk(hv_ac == 16'd1234, "harvard AC <- AC + Mem");
    if (hv_ac == 16'd1234) mcount[M_HV_ACC]++;
    // store AC (the old value) while AC accumulates again, then reload the stored word into REG
    hv_dmem_wr = 1; hv_ac_ld = 1;   // also AC <- AC + REG = 2468 at the same edge
    @(negedge clk); hv_dmem_wr = 0; hv_ac_ld = 0; hv_reg_ld = 1;
    @(negedge clk); hv_reg_ld = 0;
    chk(hv_reg == 16'd1234 && hv_ac == 16'd2468, $sformatf("harvard store path reg=%0d ac=%0d", hv_reg, hv_ac));
    if (hv_reg == 16'd1234) mcount[M_HV_STORE]++;
  endtask

  initial begin
    hv_reset = 1; hv_reg_ld = 0; hv_ac_ld = 0; hv_alu_op = ALU_ADD; hv_dmem_wr = 0; hv_ir_ld = 0;
    hv_pc_ld = 0; hv_pc_op = ALU_ADD; hv_pc_a_zero = 0; hv_pc_b_ir = 0; hv_imem_we = 0;
    hv_imem_addr = 0; hv_imem_data = 0; hv_dmem_we = 0; hv_dmem_addr = 0; hv_dmem_data = 0;
    cpu_reset = 1; cpu_prog_we = 0; cpu_prog_addr = 0; cpu_prog_data = 0;
    acc_reset = 1; acc_reg_ld = 0; acc_ac_ld = 0; acc_mem_d = 0; acc_op = ALU_ADD;
    bs_ld = 0; bs_ac_ld = 0; bs_mem = 0; bs_from_ac = 0; bs_a_sel = 0; bs_b_sel = 0; bs_alu_op = 0; bs_ci = 0;
    add_a = 0; add_b = 0; add_cin = 0;
    rf_RE = 0; rf_WE = 0; rf_raddr = 0; rf_waddr = 0; rf_D = 0;
    sram_A = 0; sram_RD = 0; sram_WR = 0; sram_io_in = 0;
    reg_LD = 0; reg_OE = 0; reg_D = 0;
    p2p_ext_d = 0; p2p_ld = 0; p2p_sel = '0;
    mux_ext_d = 0; mux_ld = 0; mux_sel = 0;
    bus_ext_d = 0; bus_ext_oe = 0; bus_oe = 0; bus_ld = 0;
    foreach (mcount[m]) mcount[m] = 0;
    fork
      run_cpu();
      run_others();
      run_harvard();
    join
    foreach (mcount[m]) begin
      $display("mechanism %-22s %0d", mname[m], mcount[m]);
      chk(mcount[m] > 0, $sformatf("mechanism '%s' never happened", mname[m]));
    end
    `TB_FINISH
  end
endmodule
