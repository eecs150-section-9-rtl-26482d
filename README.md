# A 16-bit multi-cycle processor and the circuits it is built from

This is a small stored-program computer of the kind used to teach computer organisation.
It is a 16-bit cut-down of the MIPS R2000. One memory holds both program and data (a
Princeton organisation). A Moore state machine runs each instruction as a fixed sequence of
register transfers: fetch, decode, then one to three execute cycles. All arithmetic goes
through one ALU, and that includes stepping the program counter. Next to the processor sit
the smaller circuits that such a course builds it from: an adder built up from half adders,
an accumulator datapath, the datapath of an accumulator machine with separate instruction and
data memories, a bit-sliced datapath, register files, a static RAM, and three ways
of wiring registers together. The top level `eecs150_top` holds them all side by side, each
with its own ports. They are separate examples and do not form one machine.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The only part that is not a plain
clocked circuit is the SRAM, whose writes are timed by its write-enable pulse, as on the real
chip.

## Instruction set

Every instruction is one 16-bit word, and the opcode is always in bits [15:13].

| format | [15:13] | [12:10] | [9:7] | [6:4] | [3:0] |
|--------|---------|---------|-------|-------|-------|
| R      | op      | rs      | rt    | rd    | funct |
| I      | op      | rs      | rt    | offset[6:0] (signed) ||
| J      | op      | target[12:0] ||||

| instruction | op | funct | effect |
|-------------|----|-------|--------|
| add  | 0 | 0 | rd = rs + rt |
| sub  | 0 | 1 | rd = rs - rt |
| and  | 0 | 2 | rd = rs & rt |
| or   | 0 | 3 | rd = rs \| rt |
| slt  | 0 | 4 | rd = (rs < rt), signed, 1 or 0 |
| lw   | 1 | – | rt = mem[rs + offset] |
| sw   | 2 | – | mem[rs + offset] = rt |
| beq  | 3 | – | if rs == rt: pc = pc + offset |
| addi | 4 | – | rt = rs + offset |
| j    | 5 | – | pc = target (zero-extended) |
| halt | 7 | – | stop until reset |

Some details to keep in mind when writing programs:

- **Offsets.** The 7-bit offset is sign-extended, so it covers -64 to +63.
- **Branch base.** `beq` adds the offset to the PC that has already been stepped past the
  branch. A taken branch at address `a` goes to `a + 1 + offset`.
- **No zero register.** Register 0 is an ordinary register and powers up unknown. A program
  that needs zero makes it first, for example with `sub r0, r0, r0`.
- **Unused encodings.** Opcode 6 and funct codes 5–15 are not assigned. They do nothing
  and the processor fetches the next instruction.

`cpu16_pkg` has the encoders `enc_r`, `enc_i` and `enc_j` for building programs.

## How an instruction runs

The controller (`controller.sv`) is a Moore machine: its outputs depend on its state alone.
It has two shared states and then a short private sequence for each instruction:

| state | register transfers in that cycle |
|-------|-----------------------------------|
| Fetch | mabus ← PC; memory read; IR ← mdbus; PC ← PC + 1 (through the ALU: A = PC, B = 1) |
| Decode | register file: A ← R[rs], B ← R[rt]; next state chosen from op and funct |
| add/sub/and/or/slt | R[rd] ← A op B |
| addi | R[rt] ← A + offset |
| lw 1, 2, 3 | ALUreg ← A + offset; then mabus ← ALUreg, read, MBR ← mdbus; then R[rt] ← MBR |
| sw 1, 2 | ALUreg ← A + offset; then mabus ← ALUreg, mdbus ← B, write |
| beq 1 (, 2) | ALU computes A − B; if it is zero, PC ← PC + offset in a second cycle |
| j | PC ← target |
| Halt | nothing; stays here until reset |

So an instruction takes **3 cycles** (register arithmetic, addi, j, untaken beq), **4**
(sw, taken beq) or **5** (lw). Reset is synchronous. It sends the controller to Fetch and
clears the PC, so execution starts at address 0.

The timing rests on three facts about the datapath:

1. **The memory reads combinationally.** The word at the address appears on the data bus in
   the same cycle. Fetch can therefore read memory, load the IR and step the PC all in one
   cycle.
2. **The register file's read ports are registers.** At every clock edge they copy R[rs] and
   R[rt], using the register fields of the current IR. Those operands are stable during
   execute because the IR does not change until the next Fetch. The write port writes at
   the edge that ends the execute state. A read of the register being written in that same
   cycle returns the old value.
3. **The ALU result is used in two ways.** The PC and the register file take the ALU output
   directly. A separate ALU result register loads it at every clock edge. That register
   drives the memory address bus, which is why loads and stores spend a cycle forming the
   address first.

The data condition the controller uses is the ALU's `zero` flag. It is only looked at in the
beq compare state. The controller also has a `neg` input so that it can be extended, but no
instruction in the set tests it.

### Control signals

| signal | meaning when 1 |
|--------|----------------|
| PCmaEN / ALUmaEN | PC / ALU result register drives the memory address bus |
| RegBmdEN | register-file port B drives the memory data bus (store) |
| mr / mw | memory read / write |
| IRld / MBRld / PCld | load IR / MBR / PC |
| PCsel | PC loads the jump target (0: loads the ALU result) |
| srcA | ALU A input is register A (0: PC) |
| srcB1,srcB0 | ALU B input: 00 register B, 01 offset, 10 constant 1, 11 constant 0 |
| op | ALU operation: 0 add, 1 sub, 2 and, 3 or, 4 slt (same numbers as funct) |
| regWrite | write the register file |
| wrRegSel | destination is rt (0: rd) |
| wrDataSel | write data is MBR (0: ALU result) |

## Datapath and buses (`cpu16.sv`)

The datapath is made of these parts:

- `pc_reg`: the program counter.
- `load_reg`: used three times, for the instruction register, the memory buffer register and
  the ALU result register.
- `regfile8`: eight 16-bit registers.
- `alu16`: the ALU with its operand selectors. Its arithmetic is `alu_core`.
- `cpu_memory`: the memory.

Two buses connect the processor to the memory:

- **The address bus (mabus)** is driven by the PC or by the ALU result register.
- **The data bus (mdbus)** is driven by the memory on a read, or by register-file port B on a
  store.

On a chip these would be tri-state buses. Here each is a `bus_or`: every driver is ANDed
with its enable and the results are ORed together. That gives the same value as long as at
most one driver is enabled, and an undriven bus reads 0. The rule is checked in two places:

- `bus_or` asserts it at every clock.
- The controller asserts that memory is never read and written in the same cycle.

## Memory and display (`cpu_memory.sv`)

The memory has 255 ordinary 16-bit words at addresses 0–254. The display word is at address
255, and output `mlast` always shows its contents. Addresses above 255 read as 0 and ignore
writes. A program is placed in memory through the load port (`prog_we`, `prog_addr`,
`prog_data`) while the processor is held in reset. The port writes one word per clock edge.

## The other circuits

- **Adder hierarchy.** `half_adder` is the bottom level. `full_adder` is made of two half
  adders and an OR of their carries. `ripple_adder` chains W full adders (16 by default).
  Every bit is the same cell, so an 8- or 32-bit adder only needs a different W.
- **`alu_core`.** A 16-bit ALU with add, sub, and, or and slt. Besides the result it gives N
  (the sign bit) and Z (the result is zero). The processor and the accumulator datapath both
  use it.
- **`acc_datapath`.** An accumulator machine's datapath for one-address instructions,
  AC ← AC op Mem. REG holds the operand from memory, and the accumulator is both an ALU input
  and its destination. N and Z describe the ALU output.
- **`harvard_datapath`.** The datapath of an accumulator processor with separate memories
  (a Harvard organisation). The control unit is not included, so every control signal is an
  input.
  - **Instruction side.** The PC addresses an instruction memory of 8-bit words, and the IR
    takes the word there. A second ALU forms the next PC from the PC (or 0) and 1 (or the IR).
  - **Data side.** The IR's low byte addresses a data memory of 16-bit words. REG takes the
    word there (the load path), AC ← AC op REG, and AC can be written back (the store path).
  - **Filling the IR.** Instruction words are 8 bits and the IR is 16, so each IR load shifts
    in one byte. Two fetches give an operation byte and an address byte.
  - **Sizes.** Both memories have 256 words. Load ports fill them.
- **`bitslice_datapath`.** N copies of `bit_slice` (2 by default), joined by a ripple carry.
  One slice holds one bit each of AC, R0, rs, rt and rd, plus a 1-bit ALU (add with carry,
  and, or, pass). Two operand selectors (AC or any register) feed the ALU. The registers load
  from memory or from AC.
- **`regfile4x4`.** Four words of four bits with separate read and write addresses, so a read
  and a write can happen in the same cycle. Writes are clocked. Reads are combinational and
  gated by RE.
- **`sram1kx4`.** A 1024 × 4 static RAM with the pins of the packaged part. The word at `A`
  is written when `WR` falls, and it is read while `RD` is high and `WR` is low. The
  bidirectional data pins are split into `io_in`, `io_out` and `io_oe`.
- **`reg_ld_oe`.** An 8-bit register with a load enable (LD) and an output enable (OE). When
  OE is low its outputs read 0 instead of floating.
- **Register transfer: three ways to connect four registers.**
  - `xfer_p2p` gives each register its own input multiplexer. Several transfers, including a
    swap, can happen in one cycle.
  - `xfer_mux` uses one shared multiplexer, so one source is read per cycle but it can be
    copied into any set of registers.
  - `xfer_bus` uses one shared bus with output enables.

  Each has an extra external input so that values can be loaded in.

## Where the design fills gaps

The course notes give the instruction set, the names and connections of the datapath blocks,
the controller's ports, the fetch/decode/add sequence (three cycles) and the memory size. The
following are this design's own choices:

- **Execute sequences.** The sequences for lw, sw, beq, addi, j and halt.
- **Encodings.** The ALU operation codes and the srcB and PCsel encodings.
- **Unused encodings.** How unused opcodes are handled.
- **Register file timing.** Its registered read ports.
- **Memory timing.** The combinational memory read and the program load port.
- **Display address.** The display at address 255.
- **Extensions.** Offsets are sign-extended and jump targets are zero-extended.
- **Reset.** A synchronous reset for the PC, IR, MBR and controller. The register file has no
  reset.
- **Controller type.** The notes call the controller both a synchronous Mealy machine and a
  Moore machine. This design uses a Moore machine.
- **Tri-state parts.** Anything that would float (bus drivers, output enables, the SRAM's data
  pins) reads as 0 instead.
- **Bit-slice datapath.** Its operand selection and operation set are not given in the notes;
  the ones here are the simplest that use every part drawn.
- **Harvard machine.** For the accumulator machine with separate memories the notes give
  its registers, ALUs and memories but no instruction set and no controller, so only its
  datapath is built. How its 16-bit IR is filled from 8-bit instruction words, the PC-ALU
  operand choices and the memory sizes are this design's.

Each file's opening comment lists what it takes from the notes and what it chooses itself.

## Files

- `rtl/cpu16_pkg.sv`: shared types (opcodes, funct codes, ALU operations), field extraction
  and instruction encoders.
- `rtl/*.sv`: one module per file, named after the module. `eecs150_top` is the top level.
- `tb/tb_<module>.sv`: a self-checking testbench for each module. The exception is
  `bit_slice`, which is tested through `bitslice_datapath`.
  - Each ends by printing `TB_RESULT checks=N failures=M`.
  - Each has a watchdog.
  - `tb/tb_common.svh` holds the shared check task and watchdog.
  - `tb/cpu_prog.svh` holds the processor's test program.

## Simulating

With Verilator 5, for example for the processor:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpu16_pkg.sv tb/tb_cpu16.sv \
          --top-module tb_cpu16 -o sim && ./obj_dir/sim
```

Verilator finds each module through the `-I` paths by its file name. With `-Wall` it
reports unused bits of the package's field-extraction helpers; these warnings are harmless.
Replace `tb_cpu16` with any other testbench. `tb_trace_add` follows one add instruction
(r3 = r1 + r2) through the datapath clock by clock: fetch, operand read, then write-back.

`tb_eecs150_top` runs the whole top level at its default sizes:

- The processor runs the test program to halt.
- The other circuits are driven through the top's ports.
- Each mechanism is counted and must happen at least once. The mechanisms include every
  instruction, taken, untaken and backward branches, both drivers of each processor bus, the
  display write, carry ripple, the SRAM write pulse, a register swap, and bus and mux
  transfers.

## How far it has been checked

Every testbench compares its module with a model written separately inside the testbench.
The arithmetic blocks are checked exhaustively (the adders) or with random operands (the
ALUs). The processor test program touches every instruction, and its results, display word
and total cycle count (132 cycles to halt) are checked. The controller testbench checks the
full control word in every cycle of every instruction, as well as the cycle count of each
instruction. All of this is simulation on a two-state simulator. Nothing has been checked
against a gate-level netlist or real hardware.
