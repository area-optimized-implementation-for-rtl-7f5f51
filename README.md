# A small five-stage MIPS-32 core with a reduced instruction set

This is a 32-bit MIPS core cut down to the fifteen instructions that most
programs need: register arithmetic and logic, one immediate add, word loads
and stores, two conditional branches and a jump. Fewer instructions mean a
smaller decoder, a smaller ALU and less control logic. The aim is a core
small enough to sit inside a larger FPGA design as a building block.

The core has a classic five-stage pipeline: fetch, decode, execute, memory,
write-back. The instruction and data memories are separate. Programs are not
fixed at synthesis time. They are written into the instruction memory through
a load port while the system runs, and the core restarts at address 0 when
loading ends.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Every module has
a self-checking testbench.

## Instruction set

All instructions are 32 bits wide and use the standard MIPS-32 encodings.

| Instruction | Format | Effect | Opcode / funct |
|---|---|---|---|
| `add rd, rs, rt`  | R | rd = rs + rt; write dropped on signed overflow | 00 / 20 |
| `addu rd, rs, rt` | R | rd = rs + rt, wraps | 00 / 21 |
| `sub rd, rs, rt`  | R | rd = rs − rt; write dropped on signed overflow | 00 / 22 |
| `subu rd, rs, rt` | R | rd = rs − rt, wraps | 00 / 23 |
| `and rd, rs, rt`  | R | rd = rs & rt | 00 / 24 |
| `or rd, rs, rt`   | R | rd = rs \| rt | 00 / 25 |
| `slt rd, rs, rt`  | R | rd = (rs < rt, signed) ? 1 : 0 | 00 / 2A |
| `sll rd, rt, sa`  | R | rd = rt << sa | 00 / 00 |
| `srl rd, rt, sa`  | R | rd = rt >> sa (logical) | 00 / 02 |
| `addi rt, rs, imm`| I | rt = rs + sext(imm); write dropped on signed overflow | 08 |
| `lw rt, imm(rs)`  | I | rt = mem[rs + sext(imm)] | 23 |
| `sw rt, imm(rs)`  | I | mem[rs + sext(imm)] = rt | 2B |
| `beq rs, rt, off` | I | if rs == rt: PC = PC + 4 + (sext(off) << 2) | 04 |
| `bne rs, rt, off` | I | if rs != rt: PC = PC + 4 + (sext(off) << 2) | 05 |
| `j index`         | J | PC = {(PC+4)[31:28], index, 00} | 02 |

The core has 32 general-purpose registers. Register `r0` always reads 0, and
writes to it are dropped. `sll r0, r0, 0` (the all-zero word) is the usual
no-operation. Memory accesses are whole words. Address bits [1:0] are
ignored, and addresses wrap modulo the memory depth.

Encodings outside this table are dropped in decode. They act as
no-operations and do not appear on the retire strobe. There are no
exceptions: an overflowing `add`, `addi` or `sub` leaves its destination
unchanged and pulses `overflow_o`, and the program carries on with the next
instruction. This matches MIPS-32 apart from the missing trap.

## The pipeline

```
 IF            ID                          EX                  M             WB
 PC ─► imem ─► control, regfile read, ─►   ALU, branch   ─►    dmem    ─►    regfile
               hazard check, jump          decision                          write
      IF/ID                          ID/EX               EX/MEM        MEM/WB
```

* **IF.** The PC addresses the instruction memory, which reads
  asynchronously. PC + 4 and the instruction go into IF/ID.
* **ID.** The control unit decodes the opcode and function fields into a
  control bundle (`ctrl_t` in `mips_pkg`). The register file is read at `rs`
  and `rt`, and the immediate is sign-extended. The hazard detector decides
  whether the instruction may move on. A `j` is resolved here.
* **EX.** The ALU computes the result, the load/store address or the branch
  compare. For the compare it subtracts and looks at its zero flag. Shifts
  take their amount from the `sa` field. A `beq`/`bne` is resolved here.
* **M.** Loads read the data memory, which reads asynchronously. Stores write
  it on the clock edge.
* **WB.** The ALU result or the loaded word is written to the register file.

Each pipeline register is a packed struct with a `valid` bit. A bubble is an
entry with `valid` clear. A bubble has no effect and does not retire.

### Hazards: stall, no forwarding

There are no forwarding paths. Read-after-write hazards are resolved only by
the hazard detector in ID. The detector looks at the instruction's source
registers: `rs` for everything except `sll`/`srl`, and `rt` for R-type,
`sw`, `beq` and `bne`. If a source equals the destination of a
register-writing instruction now in EX or M, it stalls. `r0` never stalls.
During a stall:

* the PC and IF/ID hold their values;
* a bubble enters ID/EX;
* older instructions keep moving.

A producer in WB needs no stall. The register file passes a value being
written in the current cycle straight through to a read of the same register
(write-through). This is the "write in the first half cycle, read in the
second" of textbook pipelines, done with a bypass mux.

The cost of a dependency follows from this:

| Distance from producer to consumer | Stall cycles |
|---|---|
| next instruction | 2 |
| one instruction between | 1 |
| two or more between | 0 |

Loads follow the same rule as every other producer. A load followed at once
by a user of its result waits two cycles. A producer that overflowed writes
nothing, so it holds up a consumer only while it is in EX.

### Control flow: predict not taken

* **`j`** is recognised in ID. The PC takes the target on the next edge, and
  the instruction fetched behind the jump is dropped. This costs 1 cycle.
* **`beq`/`bne`** are decided in EX. The core keeps fetching sequentially, so
  a branch that is not taken costs nothing. A taken branch loads the target
  into the PC and drops the two younger instructions in IF/ID and ID/EX. This
  costs 2 cycles.
* There are no delay slots. The instructions after a taken branch or jump
  never execute. This is a departure from MIPS-32 as the architecture
  defines it.

PC priority is: taken branch, then jump, then stall, then PC + 4. A branch
in EX therefore overrides a jump or a stall in ID. The instructions it
overrides are exactly the ones it drops.

### Timing summary

Count cycles from the first cycle after reset is released. The instruction
at address 0 is fetched in cycle 0 and retires (`retire_o`) in cycle 4.
Instructions with no dependencies then retire one per cycle, so CPI is 1.
Add the stall cycles and the branch and jump penalties above to get the
timing of any program. The end-to-end testbench predicts every retire cycle
this way and checks it.

## Loading a program at run time

`mips_top` has a program-load port (`load_en`, `load_addr`, `load_data`).

1. Raise `load_en`. From the next clock edge the core is held in reset: the
   PC goes to 0, the pipeline is emptied and the registers are cleared.
2. Every cycle that `load_en` is high, `load_data` is written to instruction
   word `load_addr`.
3. Lower `load_en`. One edge later the core leaves reset and fetches from
   address 0.

The data memory is not cleared, so data can be kept from one program to the
next. `rst_n` is an asynchronous, active-low reset of the whole core. Memory
contents are not reset.

A simple way to end a program is a jump to itself (`j` to its own address).
The core then keeps fetching that jump and nothing else changes.

## Top-level ports (`mips_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `load_en` | in | 1 | hold the core and write one program word per cycle |
| `load_addr` | in | log2(IMEM_DEPTH) | instruction word index |
| `load_data` | in | 32 | machine-code word |
| `pc_o` | out | 32 | current fetch address |
| `retire_o` | out | 1 | an instruction leaves WB this cycle |
| `wb_we_o`, `wb_addr_o`, `wb_data_o` | out | 1, 5, 32 | register write retiring this cycle |
| `store_o`, `store_addr_o`, `store_data_o` | out | 1, 32, 32 | store in M this cycle |
| `overflow_o` | out | 1 | an add/addi/sub in M overflowed; its write was dropped |

Parameters: `IMEM_DEPTH` and `DMEM_DEPTH`, both 256 words by default and
powers of two. The observation outputs exist so that the core can be traced
from outside and is not optimised away when synthesised on its own.

## Files

| File | Contents |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, function codes, ALU operations, control bundle, pipeline-register structs |
| `rtl/mips_top.sv` | the pipeline: stage registers, stall/flush logic, load control, assertions |
| `rtl/mips_fetch.sv` | PC and next-PC selection |
| `rtl/mips_imem.sv` | instruction memory with load port |
| `rtl/mips_control.sv` | instruction decoder |
| `rtl/mips_regfile.sv` | 32 × 32 register file with write-through |
| `rtl/mips_hazard.sv` | read-after-write stall detector |
| `rtl/mips_alu.sv` | ALU with zero and overflow flags |
| `rtl/mips_dmem.sv` | data memory |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

`mips_top` contains two concurrent assertions. One checks that a stall holds
the PC unless a branch or jump redirects it. The other checks that a jump
never waits on the hazard detector.

## Verification

Each testbench checks its module against values worked out independently
and ends by printing `TB_RESULT checks=N failures=M`. Each has a watchdog.

* `tb_mips_alu`: every operation on corner operands and random operands,
  checked against 64-bit reference arithmetic.
* `tb_mips_regfile`, `tb_mips_imem`, `tb_mips_dmem`: random traffic
  checked against reference arrays. This includes `r0`, write-through and
  the ignored low address bits.
* `tb_mips_control`: each instruction with random register and immediate
  fields, checked against the expected control bundle. Random illegal
  encodings are checked as well.
* `tb_mips_fetch`: random stall/branch/jump requests, checked against the
  PC priority.
* `tb_mips_hazard`: directed and random register matches.
* `tb_mips_top`: the end-to-end test, run at the default sizes.
  - It contains an instruction-level model of the core. The model predicts
    every retiring register write, every store, every overflow and the cycle
    each instruction retires in.
  - It loads programs through the load port: a hand-written program (an
    array store and sum loop plus every instruction and overflow case), a
    straight-line program for the one-per-cycle rate, and 200 random
    programs. The random programs use registers r0–r7 so that hazards are
    common, and their branches and jumps only go forward. They also contain
    encodings outside the instruction set, which must act as no-operations.
  - It compares every event in order, then the whole data memory and
    register file.
  - It counts the pipeline's mechanisms and fails if any never happens:
    stalls, stalls behind a load, write-through, taken branches, jumps,
    overflows, program loads, writes to r0 and dropped encodings.

To run a test with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/mips_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top -o sim
./obj_dir/sim
```

Replace `tb_mips_top` with any other testbench name. The full end-to-end
run takes well under a second.

## Size

Yosys coarse synthesis of `mips_top` at the default sizes gives:

* 245 word-level cells;
* 1385 flip-flop bits, 1024 of them the register file;
* two 8 Kbit memories.

A design of this kind has been reported on a mid-size FPGA with 4656 slices,
9312 flip-flops, 9312 four-input LUTs and 232 I/O pins, using about 900
flip-flops, 2500 LUTs and 164 I/O pins. This core fits a device of that size:

* its 1385 flip-flop bits are well under 9312, and fewer still if the
  register file goes into distributed RAM;
* its 180 top-level I/O bits are under 232;
* its 16 Kbit of memory fits in block RAM.

LUT counts were not estimated.

## Where this design makes its own choices

The instruction set, the 32-register file with `r0` fixed at zero, the five
stages, the separate instruction and data memories, and a decode-stage
hazard detector that stalls all come from the architecture this core
implements. The following are this design's own:

* No forwarding. Every hazard is a stall, and results reach ID through the
  register file's write-through.
* Branches decided in EX with predict-not-taken and a 2-cycle penalty. Jumps
  decided in ID with a 1-cycle penalty. No delay slots.
* `addi` checks for overflow (as in MIPS-32). Overflow drops the write
  instead of trapping.
* Unknown encodings are no-operations.
* The program-load protocol, the reset behaviour, the asynchronous-read
  memories, the 256-word memory depths and the observation ports.
* No caches. The memories are single-cycle on-chip arrays.
