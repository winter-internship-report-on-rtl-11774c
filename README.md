# Two teaching processors and a set of basic logic circuits

This RTL holds three independent designs:

1. **An 18-bit-instruction SIMD processor.** It works on 16-bit words. One instruction can treat a word as one 16-bit lane, two 8-bit lanes or four 4-bit lanes. The datapath is built from 4-bit pieces, and the lane width only decides which carries and shift bits cross from one piece to the next. The processor is not pipelined. Every instruction walks through fetch, decode, execute, memory and write-back, one clock each.
2. **A 16-bit MIPS-style processor** with a classic five-stage pipeline (IF, ID, EX, MEM, WB). It has no forwarding: data hazards are resolved by stalling.
3. **Eight small circuits** of the kind used in a first logic course: a 4:1 multiplexer, a 1:4 demultiplexer, a 74138-style 3-to-8 decoder, D and JK flip-flops, a clock-gated SR latch, a bidirectional shift register and an up/down counter.

Each processor also comes as a *connector* block, a self-contained circuit that can be dropped into a schematic:

* The SIMD one takes three operands and one instruction from input pins.
* The MIPS16 one loads its own program, runs it and reports its registers serially.

The top level, `esim_top`, puts all of these side by side. They share only the clock.

All files are SystemVerilog (IEEE 1800-2017). They pass a `verilator --lint-only -Wall` lint and elaborate in yosys with the slang front end.

---

## 1. The SIMD processor

### 1.1 Lanes, and how the 4-bit pieces make them

A 16-bit word is four 4-bit *nibbles*. The lane mode (`simd_pkg::lane_mode_t`) says how they group:

| mode | lanes | nibbles joined |
|------|-------|----------------|
| `MODE_H` | 1 × 16 bit | 0-1-2-3 |
| `MODE_O` | 2 × 8 bit | 0-1, 2-3 |
| `MODE_Q` | 4 × 4 bit | none |

All lane-aware units use this single idea:

* **`simd_adder`** chains four 4-bit adders. The carry out of nibble *i* enters nibble *i+1* only when the two nibbles are in the same lane. At the start of a lane the carry-in is `sub`. For subtraction `b` is inverted, so each lane computes `a - b` in two's complement. Each lane's result wraps at the lane width.
* **`simd_shifter`** holds a left shifter and a right shifter, both by one bit. At a nibble edge, the bit that enters is the neighbouring nibble's bit when both nibbles are in one lane, and 0 otherwise. Right shifts are logical.
* **`simd_multiplier`** is an unrolled shift-and-add array of 16 steps, built from the adder and shifter above. At step *k* it looks at the lowest bit of every lane of the right-shifted multiplier. Where that bit is 1, it adds the left-shifted multiplicand lane into the accumulator. The per-lane select mask is made by one more `simd_adder` that computes `0 - bit` inside each lane. Each lane ends up with the low 16, 8 or 4 bits of its own product. In narrow modes the later steps add zero.
* **`simd_alu`** combines these units into ADD, SUB, MUL, MAC (`a + b*c`), SHL, SHR, AND, OR, NOT and PASSB. PASSB gives `b` and is used by "set". The ALU is purely combinational.

### 1.2 Instruction set

The opcode is `instr[17:12]`. Opcodes 0–35 come in groups of three: the 16-, 8- and 4-bit forms of one operation (opcode mod 3 = 0, 1, 2).

| opcodes | operation | fields |
|---------|-----------|--------|
| 0–2 | `Rd = Rd + Rs` | Rd = [3:2], Rs = [1:0] |
| 3–5 | `Rd = Rd + imm` | Rd = [11:10], imm = [9:0] |
| 6–8 / 9–11 | subtract, register / immediate | as add |
| 12–14 / 15–17 | multiply, register / immediate | as add |
| 18–20 | `Rd = Rd + Rs1 * Rs2` (MAC) | Rd = [5:4], Rs1 = [3:2], Rs2 = [1:0] |
| 21–23 / 24–26 | shift Rd left / right by one | Rd = [1:0] |
| 27–29 / 30–32 | `Rd = Rd & Rs` / `Rd = Rd \| Rs` | Rd = [3:2], Rs = [1:0] |
| 33–35 | `Rd = ~Rd` | Rd = [1:0] |
| 36 | loopjump imm | imm = [9:0] |
| 37 | setloop imm | imm = [9:0] |
| 38–40 | load `Rd = MEM[imm]` | Rd = [11:10], imm = [9:0] |
| 41–43 | store `MEM[imm] = Rd` | Rd = [11:10], imm = [9:0] |
| 44–46 | set `Rd = imm` | Rd = [11:10], imm = [9:0] |
| 63 | halt | |

How the immediates and lane widths apply:

* **Immediates in 8- and 4-bit forms are replicated into every lane.** For example, `set4bit` with imm = `0x05A` gives `0xAAAA`. In 16-bit forms the 10-bit immediate is zero-extended.
* **Loads and stores always move the whole 16-bit word.** Their lane width has no effect.
* **Undefined opcodes do nothing.**

There are four registers, addressed by a 2-bit index.

The opcode numbers and field positions come from the processor's published sample program. The lane semantics were checked against the register values traced for that program; the testbench compares 16 stores with those values.

### 1.3 Timing: five states per instruction

`simd_cpu` is a state machine: `IDLE(0) → IF(1) → ID(2) → EX(3) → MEM(4) → WB(5) → IF …`, plus `HALT(6)`.

| state | what happens |
|-------|--------------|
| IF | `instruction_addr = PC`; the instruction RAM samples it |
| ID | decode; the operand registers load `Rd`, `Rs`/immediate and `Rs2` |
| EX | the ALU result is registered; setloop and loopjump act |
| MEM | `data_R` enables a data-RAM access, `data_W` marks a store, `data_addr = imm` |
| WB | the register file is written (ALU result or loaded word); the PC advances |

An ALU operation therefore spends one cycle loading its operands and one cycle computing. **Every instruction takes 5 cycles.** After reset the core spends one cycle in IDLE. A halt is recognised in ID, so a program of *N* instructions ending in halt raises `done` after `1 + 5(N-1) + 2` cycles. The testbenches check this count. The sample program executes 161 instructions in 803 cycles.

**Loop.** `setloop n` loads a 10-bit loop counter. `loopjump a` decrements the counter and jumps to `a` while the decremented value is non-zero. A body closed by loopjump therefore runs `n` times. This is this design's reading: the original material shows only `setloop = 2` and a jump back, without spelling out the count.

### 1.4 Memories and the system wrapper

* **`simd_imem`**: 1024 × 18 bits. Reads are synchronous, with data one cycle after the address. It has a write port for loading programs.
* **`simd_dmem`**: 1024 × 16 bits. The processor port uses the `data_R`/`data_W` handshake above; reads are registered. A second *host* port writes and reads at any time. If both ports write the same word in one cycle, the processor wins.
* **`simd_system`**: the core and both memories. To use it:
  1. Hold `rst` high.
  2. Load the program through `prog_*` and the data through `host_*`.
  3. Release `rst` and wait for `done`.
  4. Read the results through `host_addr` / `host_rdata`, one cycle after the address.

`data_R` and `data_W` are gated by `rst`, so no access leaves the core while it is in reset.

### 1.5 The pin-driven block (`simd_connector`)

`simd_connector` packages the processor for use as a single schematic symbol. It holds its own 8-word program. Word 3 is not stored: it is whatever is on the `inst_in` pins.

```
0: load16  R0 <- word 0        4: store16 R0 -> word 0
1: load16  R1 <- word 1        5: store16 R1 -> word 3
2: load16  R2 <- word 2        6: store16 R2 -> word 4
3: <inst_in>                   7: store16 R0 -> word 5
```

Data words 0, 1 and 2 are the pins `a`, `b` and `c`, sampled when the load reads them. Every other instruction address reads as halt.

With `inst_in` = `add16 R0, R1`, word 5 ends up holding `a + b`. One run takes 43 cycles from reset to `done`. The whole processor bus is brought out (`instruction_in`, `instruction_addr`, `data_in`, `data_out`, `data_addr`, `data_R`, `data_W`), so every fetch and store can be watched. Results can also be read back through `res_addr`/`res_data`.

---

## 2. The MIPS16 pipeline

### 2.1 Instruction set

| field | R-type | I-type |
|-------|--------|--------|
| [15:12] | opcode | opcode |
| [11:9] | rd | rd |
| [8:6] | rs | rs |
| [5:0] | rt = [5:3] | signed imm6 |

| op | meaning |
|----|---------|
| 0 NOP | |
| 1 ADD / 2 SUB / 3 AND / 4 OR / 5 XOR | `rd = rs op rt` |
| 6 SL / 7 SR / 8 SRU | `rd = rs << rt`, arithmetic `>>`, logical `>>` (amount ≥ 16 shifts everything out) |
| 9 ADDI | `rd = rs + imm` |
| 10 LD | `rd = mem[rs + imm]` |
| 11 ST | `mem[rs + imm] = rd` |
| 12 BZ | if `rs == 0`, PC ← address of the BZ + 1 + imm |

**Treat this encoding as a reconstruction.** Only some of it is anchored in the processor's published test program and the register values printed for it:

* The opcodes of ADD, SUB, ADDI, LD and ST, and the field layout, are fixed by that program and its results.
* AND…SRU follow the order of the ALU's command list (NC, ADD, SUB, AND, OR, XOR, SL, SR, SRU).
* BZ was chosen so that the program's eighth word loops back to address 0.

Register 0 always reads 0.

### 2.2 Pipeline, stalls and the branch delay slot

`mips16_core` has pipeline registers IF/ID, ID/EX, EX/MEM and MEM/WB:

* The instruction ROM (`mips16_imem`, 256 words, one per value of the 8-bit PC) and the data RAM (`mips16_dmem`, 256 words) are read combinationally. An instruction therefore needs exactly one cycle per stage.
* The register file is read in ID and written at the end of WB.

**Hazards (`mips16_hazard`).** There is no forwarding. If the instruction in ID uses a non-zero source register that is the destination of a writing instruction in EX, MEM or WB, the core stalls:

* PC and IF/ID hold;
* ID/EX receives a bubble;
* the check repeats every cycle until the writer has left WB.

Because WB is included in the comparison, a dependent instruction waits up to three cycles and never needs a register-file bypass.

**Branches** are resolved in ID, once any stall on `rs` has cleared. The instruction behind the branch has already been fetched and **always executes**: one delay slot.

In the published test program, that delay slot holds `ADDI R7, R7, 1`. R7 therefore counts loop iterations. 100 cycles after reset, three branches have been taken and R7 is 3, as in the printed result. The other printed values are R1=8, R2=16, R3=24, R4=40, R5=40, R6=0 and ram[10]=40. The testbenches check all of them.

Debug ports read any register (`dbg_reg_*`) and any data word (`dbg_mem_*`). The `stall` and `branch_taken` outputs make the two pipeline mechanisms visible.

### 2.3 The self-loading block (`mips16_connector`)

`mips16_connector` runs the core without a host. After reset it goes through three phases:

1. **Load.** It requests program words 0–18 on `prog_addr`, one per clock, and writes each word on `prog_data` into the instruction ROM. The core is held in reset meanwhile. `prog_data` is sampled in the same cycle it is requested, so the source must be a ROM or other combinational table.
2. **Run.** It lets the core run for 81 cycles.
3. **Report.** It outputs R0..R7 on `res`, one per clock, with the register number on `resou` and `res_valid` high.

The 19-word image size (`PROG_WORDS`) and the run length (`RUN_CYCLES`) are parameters.

With the test program, the report reads 0, 8, 16, 24, 40, 40, 0, 3. R7 = 3 means three taken branches fit in the 81 cycles.

---

## 3. The small circuits

| module | behaviour |
|--------|-----------|
| `mu_mux4` | `y = {a,b,c,d}[sel]`, 4-bit |
| `mu_demux4` | `din` to `y[sel]`, others 0 |
| `dec74138` | enabled when `e1_n=0, e2_n=0, e3=1`; then output `{a,b,c}` goes low; otherwise all high |
| `mu_dff` | D flip-flop, synchronous reset |
| `mu_jkff` | JK flip-flop (hold/reset/set/toggle), `qb = ~q`, synchronous reset added |
| `mu_srff` | gated SR latch: transparent while `clk` is high; `s=r=1` drives both outputs high as the NAND form does; holds while `clk` is low |
| `mu_univ_shift` | 4-bit shift register: right (din into bit 3) or left (din into bit 0); `s_left = dout[0]`, `s_right = dout[3]` |
| `mu_updown` | 4-bit counter: up or down, wraps both ways, synchronous reset |

Notes on these circuits:

* The demultiplexer routes select 2 to `y2` and select 3 to `y3`. A straight-from-source version of this circuit drove `y0` and `y2` for select 2, which is not demultiplexer behaviour.
* `mu_srff` is a real latch by design, and lint tools report it as one.

---

## 4. Top level

`esim_top` brings out every port of the designs under the prefixes `simd_*`, `simd_conn_*`, `mips_*`, `mips_conn_*` and `mu_*`:

* `mu_demux_y` packs `{y3, y2, y1, y0}`.
* `mu_dec_abc` is `{a, b, c}` and `mu_dec_en` is `{e1_n, e2_n, e3}`.
* The four clocked small circuits share `mu_reset`.
* The SR latch uses `clk` as its gate.

## 5. Files

* `rtl/simd_pkg.sv`: lane mode, ALU op, opcode constants, `decoded_t`, and the lane-immediate function.
* `rtl/mips16_pkg.sv`: opcodes and ALU commands of the MIPS16.
* `rtl/simd_*.sv`, `rtl/mips16_*.sv`, `rtl/mu_*.sv`, `rtl/dec74138.sv`, `rtl/esim_top.sv`: one module per file.
* `tb/<module>_tb.sv`: one self-checking testbench per module. Each ends with `TB_RESULT checks=N failures=M` and has a watchdog.
* `tb/simd_tb_pkg.sv`: holds the SIMD sample program (89 words) with its data, the traced store values, lane-by-lane reference arithmetic, and an instruction-level model of the SIMD processor.

## 6. Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/simd_pkg.sv rtl/mips16_pkg.sv tb/simd_tb_pkg.sv \
    --top-module esim_top_tb tb/esim_top_tb.sv -o sim
./obj_dir/sim
```

Replace `esim_top_tb` with any other testbench name.

Every testbench runs at the modules' default sizes. The whole-design test, `esim_top_tb`, finishes in well under a second. It runs the SIMD sample program to halt, two pin-driven runs of the SIMD connector, the MIPS16 test program on the bare core and on the self-loading block, and 600 cycles of randomised stimulus on the small circuits. It also counts each mechanism and fails if one never occurred: loop jump, halt, loads, stores, all three lane widths, pipeline stalls, taken branches, and every select, enable, set/reset/toggle, shift direction and counter wrap.

## 7. How far to trust it

**Checked against published values:**

* The SIMD datapath, decoder and control reproduce every traced value of the sample program's first pass. These are the 16 stored words, among them `mul16 0x5A72·0x5A5A → 0xE014` and `MAC8 → 0x1717`.
* The MIPS16 reproduces the printed register file and `ram[10]`. That includes R7 = 3 when read 100 cycles after reset.
* The self-loading block's serial report shows the published register values, among them R3 = 24 and R4 = 40.

**Checked against independent models:**

* The processors are compared with instruction-level models that execute one instruction at a time: the SIMD processor on 20 random programs, the MIPS16 on 30.
* Every lane-aware unit is compared with plain integer arithmetic, in all three modes.

**This design's own choices, not anchored in the source material:**

* the SIMD loop-count semantics;
* the connector blocks' single-edge timing, reset inputs and added read-back or valid signals;
* the synchronous-read memories and the host/load ports;
* the register and memory reset behaviour;
* the MIPS16 opcodes other than ADD/SUB/ADDI/LD/ST;
* BZ and its delay slot;
* the 256-word MIPS16 data RAM;
* the reset added to the JK flip-flop.

Each module's opening comment says which parts follow the original description and which are its own.
