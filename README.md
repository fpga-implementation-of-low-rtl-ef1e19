# Two small 32-bit RISC processors

This repository holds two independent 32-bit processors in synthesizable
SystemVerilog. They sit side by side in one top module, `risc_system`.

* **The accumulator machine** (`risc_cpu`) is the main design. It is a
  single-accumulator processor with one memory for both program and data.
  Every instruction word has a 5-bit opcode and a 27-bit memory address. It has
  no instruction sequencer: a small clock generator splits the crystal clock
  into three related clocks, and each register loads when a purely
  combinational decoder decides that the current clock phase is the right one.
  The machine has 20 instructions. They cover integer arithmetic, logic, one-bit
  shifts, comparisons, load/store, jumps, and IEEE-754 single-precision add,
  subtract and multiply.
* **The register-file machine** (`rf_cpu`) is a control unit (a finite-state
  machine), a program ROM and a data path. The data path holds 32 general
  registers, an ALU, a load/store unit with a 16-word data memory and a branch
  unit. The control unit talks to the data path over four control bundles:
  RCL (register file), MCL (memory), ALUCL (ALU) and BUCL (branch unit). The
  machine has 17 instructions.

The two machines share no signal, and each has its own clock and reset pins.

## Accumulator machine

### Three clocks and four phases

`clk_gen` derives three clocks from the input `clk`:

| clock    | behaviour                                        | period   |
|----------|--------------------------------------------------|----------|
| `Clock1` | the input clock itself                           | 1 clk    |
| `Clock2` | toggles on every falling edge of `Clock1`        | 2 clk    |
| `Fetch`  | toggles on every rising edge of `Clock2`         | 4 clk    |

One `Fetch` period is one instruction, so the machine executes **one
instruction every four input clocks**. No instruction is faster or slower.
Inside that period, the levels of `Fetch` and `Clock2` name four phases:

* **Fetch high (fetch half).** The address multiplexer puts the PC on the
  memory address, and the memory drives the addressed word onto the data bus.
  At the rising `Clock1` edge where `Clock2` is also high, the decoder raises
  `LdIr` and the instruction register captures the word.
* **Fetch low (execute half).** The multiplexer now puts the IR's 27-bit
  address field on the memory address.
  * For an instruction with a memory operand, the memory drives the operand
    onto the bus.
  * For a store, the decoder raises `Wr` while `Clock2` is high. The bus buffer
    then puts the ALU output on the bus, and memory writes it at the next
    `Clock1` rising edge.
* **Falling edge of Fetch.** The program counter either increments or loads
  the IR address. It loads for `JMP`, and for `JZ` when the accumulator is zero.

### The ALU's temporary register

The ALU computes from the accumulator and the data bus. It holds its result in
a temporary register. That register's clock is `Clock1 | Clock2 | Fetch`,
which rises exactly once per instruction: at the last rising `Clock1` edge of
the execute half, when the operand is already on the bus.

The accumulator copies that temporary register when the **next** instruction
is loaded into the IR. `LdAcc` is decoded from the opcode still in the IR at
that moment, that is, from the instruction that just finished. As a result:

* the effect of an instruction on `Acc` appears one fetch phase after it
  executes;
* a store writes the temporary register onto the bus. During the store's
  execute half, that register still holds the value `Acc` received at the
  store's own fetch, so the store writes the current accumulator.

Read `control_decoder.sv` and `risc_cpu.sv` side by side to follow the timing;
the opening comment of each file lists the strobes per phase.

### Instruction set

| op | mnemonic | effect                                  |
|----|----------|-----------------------------------------|
| 0  | NOP      | —                                       |
| 1  | ADD      | Acc ← Acc + M[a]                        |
| 2  | SUB      | Acc ← Acc − M[a]                        |
| 3  | AND      | Acc ← Acc & M[a]                        |
| 4  | OR       | Acc ← Acc \| M[a]                       |
| 5  | XOR      | Acc ← Acc ^ M[a]                        |
| 6  | XNOR     | Acc ← ~(Acc ^ M[a])                     |
| 7  | NOT      | Acc ← ~Acc                              |
| 8  | SHL      | Acc ← Acc << 1                          |
| 9  | SHR      | Acc ← Acc >> 1 (logical)                |
| 10 | LDA      | Acc ← M[a]                              |
| 11 | STA      | M[a] ← Acc                              |
| 12 | JMP      | PC ← a                                  |
| 13 | JZ       | if Acc = 0: PC ← a                      |
| 14 | SLT      | Acc ← (Acc < M[a], signed) ? 1 : 0      |
| 15 | SEQ      | Acc ← (Acc = M[a]) ? 1 : 0              |
| 16 | FADD     | Acc ← Acc + M[a], IEEE-754 single       |
| 17 | FSUB     | Acc ← Acc − M[a], IEEE-754 single       |
| 18 | FMUL     | Acc ← Acc × M[a], IEEE-754 single       |
| 19 | HLT      | PC holds; the `halted` output is high   |

`risc_pkg::make_instr(op, addr)` builds a word.

The floating-point operations are plain functions in `fp_pkg`; they have no
clock or state of their own. They implement:

* round to nearest even;
* subnormal inputs and results flushed to zero;
* overflow to infinity;
* infinities and NaNs passed through.

They are combinational and long: on an FPGA they will set the clock rate.

### Reset

`RstReq` asynchronously sets the internal reset `InRst` and holds `Clock2`
and `Fetch` low. The resetter releases `InRst` at the `Clock2` edge where
`Fetch` rises, so the first instruction starts with a clean fetch half. The
first instruction is fetched from address 0.

**The flip-flops reset on an edge.** Keep `clk` running while `rst_req` rises.

### Memory

There is one memory for both program and data, with asynchronous read and
synchronous write. It holds 4096 words by default (`MEM_DEPTH`), and only the
low address bits are decoded, so higher addresses wrap.

The 27-bit address field could name 2^27 words. A memory that size is too
large to synthesize as an array.

A program can be preloaded through `INIT_FILE` (a `$readmemh` file).

## Register-file machine

### Instruction format

```
 31   27 26   22 21   17 16   12
+-------+-------+-------+-------+
|  op   |  rd   |  rs1  |  rs2  |   R-type
+-------+-------+-------+-------+-----------------+
|  op   |  rd   |  rs1  |         imm[15:0]       |   I-type (imm overlaps rs2)
+-------+-------+-------+-------------------------+
```

Instructions:

* **ALU operations:** ADD, SUB, AND, OR, XOR, XNOR, SLL, SRL, SLT (signed),
  ADDI.
* **LDI:** rd ← sign-extended immediate.
* **LD / ST:** the address is rs1 + sign-extended immediate. ST stores rd.
* **BEQ / BNE / BLT:** compare rd with rs1 and go to the absolute address imm.
* **JMP:** go to imm.

The encoders `rf_pkg::enc_r` and `enc_i` build words.

### Control unit states

Each state lasts one clock:

```
RESET (32 clocks) -> FETCH -> DECODE -> ALU | LDI | BRANCH | JMP        -> FETCH
                                     -> LD_ADDR -> LD_WB                -> FETCH
                                     -> ST_ADDR -> ST_WR                -> FETCH
```

* **RESET** clears the 32 registers through the register file's write port,
  one register per clock, so reset takes 32 clocks. One clock of `rst` is
  enough to enter it.
* Most instructions take **3 clocks**; loads and stores take **4**.
* In **LD_ADDR / ST_ADDR** the memory interface registers the effective
  address. The next state reads or writes the data memory.
* `instr_done` marks the last state of each instruction.
* A jump to its own address raises `halted`.
* An undefined opcode does nothing.

### Data path

Both register-file outputs feed every unit:

| unit           | input                | register port |
|----------------|----------------------|---------------|
| ALU            | operand a            | output1 (rs1) |
| ALU            | operand b            | output2 (rs2), or the sign-extended immediate |
| memory         | base address         | output1       |
| memory         | store data           | output2 (rd)  |
| branch unit    | compared operands    | output2 (rd) and output1 (rs1) |

The write-back multiplexer picks the ALU result, the immediate or the loaded
word for the register file's input port.

Other properties:

* The data memory is 16 × 32 and only the low four address bits are decoded.
* The program ROM holds 256 words (`ROM_DEPTH`). It is loaded from `ROM_FILE`.

## Where this departs from the original description, or fills gaps

The description gives the blocks, their signal names, the clock relations and
the instruction format of the accumulator machine. It gives the unit list and
the state-machine idea of the register-file machine. This design fills in the
rest:

* **Instruction sets.** The description names only the classes of
  instructions, so both opcode lists and encodings are this design's own. The
  17-instruction register-file set and its format are also this design's.
* **Clock generator.** It is built from two toggle flip-flops. A circuit whose
  outputs toggle on clock edges cannot be combinational.
* **Memory operands.** The two-operand ALU instructions read their second
  operand from memory over the data bus, which makes the machine
  memory-to-accumulator rather than strictly load/store. LDA and STA are the
  only instructions that move a word unchanged between memory and the
  accumulator.
* **Control decoder.** It takes `Clock2`, `Fetch` and the opcode, but not
  `Clock1`. Every strobe is a level that a `Clock1` edge samples, so the
  decoder has no use for `Clock1`. The strobe-per-phase table is this design's.
* **Zero flag.** `JZ` needs the accumulator's zero flag, so the accumulator has
  an extra `acc_zero` output wired to the decoder.
* **Data bus.** The shared bus with a tri-state buffer is built as a
  multiplexer: `Wr` selects the ALU output, `Rd` selects memory, and the bus is
  zero otherwise.
* **Memory sizes.** The unified memory holds 4096 words and the ROM 256. The
  16-word data memory follows the description.
* **Shifts.** They move one bit in the accumulator machine, and by `rs2[4:0]`
  in the register-file machine.
* **Reset.** The release point of the resetter and the register-clearing reset
  state are this design's.
* **Low power.** Nothing in the RTL targets low power. Clock gating and power
  gating appear in the description only as future work.

## Files

`rtl/` has one module or package per file:

* **Packages:** `risc_pkg`, `fp_pkg` and `rf_pkg`.
* **Accumulator machine:** `clk_gen`, `resetter`, `program_counter`,
  `instr_reg`, `accumulator`, `alu`, `addr_mux`, `bus_buffer`,
  `control_decoder`, `memory` and `risc_cpu`.
* **Register-file machine:** `register_file`, `rf_alu`, `mem_interface`,
  `branch_unit`, `rom`, `rf_datapath`, `rf_control_unit` and `rf_cpu`.
* **Top:** `risc_system`.
* **Demo programs:** `acc_demo.hex` and `rf_demo.hex` are the default contents
  of the accumulator machine's memory and of the program ROM. Both apply add,
  subtract, XNOR, OR, left shift, AND and XOR to `0xF0` and `0xAA` and store
  the results. The accumulator program results go to words 110-116, and it
  also computes 1.5 × 2.25 + 1.5 into word 117. The register-file program
  results go to data words 0-6. Each program then runs a short countdown loop
  and halts. The files are read by paths relative to the repository root, so
  run simulations and synthesis from there, or override `INIT_FILE` and
  `ROM_FILE`.

`tb/` has one self-checking testbench per module. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_risc_cpu` runs a random program in lock step with a reference model.
* `tb_rf_cpu` runs a random program in lock step with a reference model.
* `tb_risc_system` runs both machines with every parameter at its default, so
  they execute the demo programs. It first checks the preloaded words against
  programs it builds itself with the encoders. It then checks the results, the cycle counts (4 clocks per
  accumulator instruction; 3 or 4 per register-file instruction plus 32 for
  reset), and that each mechanism (jumps taken and not taken, stores, loads,
  branches, halts) happened at least once.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/fp_pkg.sv rtl/risc_pkg.sv rtl/rf_pkg.sv tb/tb_risc_system.sv \
    --top-module tb_risc_system -o sim
./obj_dir/sim
```

For any other testbench, replace the file and top name. Give the packages
that the module uses first. `tb_rom` reads `tb/tb_rom.hex` by a path relative
to the repository root.

## Limits

* **FP critical path.** The floating-point functions form a long
  combinational path in the accumulator machine's ALU.
* **No simulation against other RTL.** No test compares this RTL against an
  independent implementation of the original processors. The checks are
  against models written from the behaviour described here.
* **Unused address bits.** High address bits of the memories are ignored on
  purpose, and lint reports them as unused.
