# One clock for everything: a synchronous GCD circuit and a single-cycle mini-MIPS

This RTL implements two small circuits from an introductory course on computer organisation. Both follow one rule: **every register is clocked by the same clock.** When only some registers should change, that is decided by their *enable* inputs, never by gating the clock.

- **`gcd`** computes the greatest common divisor of two 8-bit numbers by repeated subtraction. It shows the rule on a tiny circuit.
- **`mini_mips`** is a single-cycle processor. It runs a subset of the MIPS instruction set: `lw`, `sw`, `beq`, `add`, `sub`, `and`, `or` and `slt`. Each instruction completes in one clock cycle.

`meeting20_top` places the two side by side. They share only the clock.

## Why the clock must not be gated

A first attempt at the GCD circuit clocks register X with `CLOCK AND (X > Y)`, and register Y with `CLOCK AND (X < Y)`. This goes wrong while the clock is high:

1. X loads `X − Y`.
2. The comparator output flips.
3. Y now sees its own rising clock edge and also updates, in the same clock pulse.

Worse, the comparator may settle before the subtractor and multiplexer in front of Y. Y can then load a wrong, negative difference. The outcome depends on gate and wire delays, so that circuit is not reproduced here.

The fix used throughout this RTL:

- every register sits on the one clock;
- a register with an enable (`en_reg`) loads `d` only when `en = 1`, and otherwise keeps its value.

## The GCD circuit (`gcd`)

```
             reset                          en = (X > Y) | reset
 x_in ──►┐    │                           ┌───────┐
         MUX ─┴──────────────────────────►│ X reg │──► x ──┬──► comparator (>, <, =)
 X−Y ───►┘                                └───────┘        └──► subtractors X−Y, Y−X
 (same for Y with y_in, Y−X and en = (X < Y) | reset)
```

- **While `reset` = 1:** both multiplexers select the external inputs and both enables are on, so X and Y load `x_in` and `y_in`.
- **After that, on each clock edge:** only the larger register is enabled, and it is replaced by the difference.
- **When X = Y:** neither register is enabled, both hold the GCD, and `equal` is 1.

Timing: the first step comes on the edge after reset. `equal` then rises after exactly as many clocks as the subtraction algorithm takes steps, for example 2 for (12, 18) and 254 for (255, 1).

Limits:

- A zero operand never finishes, because subtracting 0 changes nothing.
- The comparison is unsigned.
- `equal` is this design's addition. It is the comparator's "=" output, which the original drawing leaves unconnected.

## The mini-MIPS processor (`mini_mips`)

### Instruction subset and encodings

| instruction | format | opcode [31:26] | funct [5:0] | effect |
|---|---|---|---|---|
| `lw rt, imm(rs)` | I | 0x23 | – | `rt = MEM[rs + sext(imm)]` |
| `sw rt, imm(rs)` | I | 0x2B | – | `MEM[rs + sext(imm)] = rt` |
| `beq rs, rt, imm` | I | 0x04 | – | if `rs == rt`: `PC = PC + 4 + 4·sext(imm)` |
| `add rd, rs, rt` | R | 0x00 | 0x20 | `rd = rs + rt` |
| `sub rd, rs, rt` | R | 0x00 | 0x22 | `rd = rs − rt` |
| `and rd, rs, rt` | R | 0x00 | 0x24 | `rd = rs & rt` |
| `or rd, rs, rt` | R | 0x00 | 0x25 | `rd = rs \| rt` |
| `slt rd, rs, rt` | R | 0x00 | 0x2A | `rd = (rs − rt) < 0 ? 1 : 0` |

Field layout:

- **I-type:** `opcode(6) rs(5) rt(5) imm(16)`.
- **R-type:** `opcode(6) rs(5) rt(5) rd(5) shamt(5) funct(6)`. `shamt` is ignored by this subset.

For `lw` and `sw`, `rs` is the base register and `rt` is the data register, as in real MIPS. The source pseudo-code swaps those two roles in its comments, while its instruction-format figure puts the base in `rs`. This RTL follows the format figure.

The opcode and funct values are the standard MIPS ones. The source does not list them.

Any other opcode or funct executes as a no-op: PC + 4, nothing written.

### What happens in one clock cycle

There are no pipeline registers. Only three things change state, all on the rising edge: the PC, the register bank and the data memory. Everything between them is combinational:

```
 PC ─► imem ─► IR ─► (bit slices) ─► opcode/funct ─► control ─► ctl (ctrl_t)
                         │ rs, rt ──► regfile ──► rs_val, rt_val
                         │ imm_sext = sext(IR[15:0]), br_offset = 4·imm_sext
                                   alu_b = ctl.alu_src_imm ? imm_sext : rt_val
                                   alu(rs_val, alu_b, ctl.alu_op) ─► alu_y, zero
                                   dmem(addr = alu_y, wd = rt_val) ─► mem_rd
        write-back: regfile[ctl.reg_dst_rd ? rd : rt] = ctl.mem_to_reg ? mem_rd : alu_y
        next PC:    ctl.branch & zero ? PC + 4 + br_offset : PC + 4
```

How each instruction uses the ALU:

- **`lw`/`sw`:** it computes the address `rs + sext(imm)`.
- **`beq`:** it computes `rs − rt`, and the branch is taken when the ALU's `zero` output is 1.
- **R-type:** its result is written to `rd`.

The instruction and data memories are separate. That is what lets an instruction fetch and a data access happen in the same cycle.

Throughput: one instruction per clock, with no stalls and no hazards. Each instruction's writes land on the edge that ends its cycle, and the next instruction reads the new values combinationally.

### The ALU (`alu`)

The ALU has four function units behind one 4-input output multiplexer:

- a W-bit adder;
- bitwise AND;
- bitwise OR;
- a "set" unit that zero-extends bit 31 of the adder output to 32 bits.

`f[2]` does two jobs at once. It selects `~b` instead of `b` and feeds 1 into the adder's carry-in, so the adder computes `a + ~b + 1 = a − b`. `f[1:0]` selects the output:

| `f` | operation |
|---|---|
| `000` | AND |
| `001` | OR |
| `010` | ADD |
| `110` | SUB |
| `111` | SLT |

Two flag outputs:

- **`zero`:** the NOR of all 32 output bits.
- **`carry_out`:** the adder carry. The processor does not use it.

`slt` uses the plain sign bit of `a − b`, with no overflow correction. It therefore gives the wrong answer when `a − b` overflows, for example `a = 0x7FFFFFFF`, `b = 0xFFFFFFFF`.

This structure follows the source drawing: the B/NOT-B multiplexer, the shared carry-in, the AND/OR/adder/extend output multiplexer and the NOR zero detector. The assignment of the F bits is this design's own choice.

### Register bank (`regfile`)

- 32 × 32-bit registers.
- Two combinational read ports (`ra1`/`rd1`, `ra2`/`rd2`) and one write port (`wa`, `wd`, `we`), written on the rising edge.
- Register 0 always reads 0 and ignores writes, as in MIPS.
- A synchronous `rst` clears every register.

### Program counter (`pc_unit`)

- A 32-bit `en_reg` plus two adders: `PC + 4` and `PC + 4 + br_offset`.
- `br_offset` is `4·sext(imm)`, made from the instruction inside `mini_mips`.
- The processor ties `en` to 1, so the PC updates every cycle.
- Reset sets the PC to 0.

### Memories (`imem`, `dmem`)

Both memories:

- hold 2^AW words of 32 bits, with AW = 8 by default (256 words);
- take byte addresses but access whole words: bits [1:0] are ignored, and addresses wrap above bit AW + 1;
- read combinationally.

Differences:

- **`dmem`** writes on the clock edge when `we = 1`, and its contents are not reset.
- **`imem`** has a clocked load port (`we`, `waddr`, `wdata`) for filling it with a program. Hold the processor's `rst` high while loading.

### Decoder (`control`, `mips_pkg`)

`control` turns `opcode` and `funct` into a `ctrl_t` struct with these fields: `reg_write`, `reg_dst_rd`, `alu_src_imm`, `alu_op`, `mem_write`, `mem_to_reg` and `branch`. `mips_pkg` holds the opcode, funct and ALU-code enums and the struct.

The instruction set has no immediate-load instruction. The only way to get constants into registers is therefore `lw` from data memory that was filled in advance. The testbenches fill it through a hierarchical reference.

## Top level (`meeting20_top`)

| group | ports |
|---|---|
| shared | `clk` |
| processor | `rst`, `imem_we`, `imem_waddr[7:0]`, `imem_wdata[31:0]` in; `pc[31:0]`, `dmem_we`, `dmem_addr[31:0]`, `dmem_wdata[31:0]` out (the store bus, for observation) |
| GCD | `gcd_reset`, `gcd_x_in[7:0]`, `gcd_y_in[7:0]` in; `gcd_x`, `gcd_y`, `gcd_equal` out |

Parameters and their defaults:

- `IMEM_AW = 8` and `DMEM_AW = 8`. The source gives no memory sizes, so these are this design's choice.
- `GCD_W = 8`, the width used in the source.

## Where this RTL decides what the source leaves open

| point | choice made here |
|---|---|
| ALU control encoding | F[2] inverts B and sets carry-in; F[1:0] = AND, OR, adder, SLT |
| `slt` | sign bit of the 32-bit difference; no overflow correction |
| lw/sw register roles | rs = base, rt = data (the format figure and real MIPS, not the pseudo-code comments) |
| opcode/funct values | standard MIPS |
| register 0 | hard-wired to zero |
| resets | synchronous, active high: PC and registers to 0; memories not reset |
| memory sizes | 256 words each |
| program loading | extra write port on the instruction memory |
| unknown instructions | no-op |
| GCD comparator | unsigned; its "=" output is brought out as `equal` |

## Simulation

Every file under `rtl/` and `tb/` holds one module or package, and the file is named after it. Package files must come first on the command line. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mips_pkg.sv tb/tb_mips_asm_pkg.sv tb/tb_meeting20_top.sv --top-module tb_meeting20_top
./obj_dir/Vtb_meeting20_top
```

Every testbench prints `TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_alu` | directed and random operands for all five operations; output, carry and zero against plain arithmetic |
| `tb_en_reg` | hold, load and reset against a model |
| `tb_gcd` | 155 operand pairs; result against Euclid's algorithm; cycle count equals the number of subtraction steps; only the larger register changes each step |
| `tb_regfile` | random reads and writes against a shadow array; register 0; write visible only after the edge |
| `tb_imem`, `tb_dmem` | write and read-back; ignored low address bits; write-enable behaviour |
| `tb_pc_unit` | reset, +4 steps, forward and backward branches, hold when `en = 0` |
| `tb_control` | full control bundle for the 8 instructions; all other codes are no-ops |
| `tb_mini_mips` | a directed program plus 40 random programs, run in lockstep with an instruction-set model in the testbench (PC every cycle, every store; all registers stored at the end). Uses smaller memories (512-word instruction memory, 32-word data memory). |
| `tb_meeting20_top` | default sizes; both circuits compute the GCD of the same 10 pairs, with a MIPS program of `lw`/`slt`/`beq`/`sub` loops |

Details of `tb_meeting20_top`:

- Results are checked against Euclid's algorithm.
- The program must store its result in cycle `11 + 5·steps`. That is one instruction per clock: 10 set-up instructions, 5 per subtraction step, then the exit branch.
- The GCD circuit must finish in `steps` clocks.
- It counts each mechanism and fails if one never happens: each instruction type, taken and untaken `beq`, the ignored write to register 0, GCD load, X step, Y step and completion.

`tb_mips_asm_pkg` encodes instructions, so test programs read as `i_beq(1, 2, 6)`, `i_lw(1, 0, 0)` and so on.
