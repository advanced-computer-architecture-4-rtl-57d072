# Pipelining a small RISC-V processor, step by step

This is one tiny RISC-V processor built four ways. Each version runs the same
five instructions: `add`, `addi`, `lw`, `sw` and `bne`. The versions go from
a single-cycle datapath to a five-stage pipeline, so you can see what each
pipeline register costs and what it buys.

Two small circuits come with them. One is a multiply-add, `y = 3*b + c`,
which is cut into two stages by pipeline registers. The other is a path of
three gates between two registers, which is split by a third register.

The designs follow the lecture "Advanced Computer Architecture, 4.
Pipelining" (Tokyo Tech, CSC.T433). They use its structure, unit numbers
(m0 to m13) and signal names. Where the lecture is silent or its code has to
be fixed, this RTL makes its own choices. Those are listed in
[Departures and own choices](#departures-and-own-choices).

| design | stages | taken `bne` costs | load then use costs | module |
|---|---|---|---|---|
| single cycle | 1 | 0 | 0 | `proc5` |
| two-stage | IF, EX | 1 cycle | 0 | `proc6` |
| four-stage | IF, ID, EX(+memory), WB | 2 cycles | 0 | `proc8` |
| five-stage | IF, ID, EX, MA, WB | 2 cycles | 1 cycle | `proc9` |
| multiply-add | 2 | one result per cycle, latency 3 | | `madd` |
| three gate levels | 2 | one result per cycle, latency 2 | | `gate_levels` |

`pipelining_top` places all six designs side by side. They share only the
clock and the reset.

## The common datapath

All four processors are built from the same units. Only the pipeline
registers between them differ.

| unit | what it does | RTL |
|---|---|---|
| m1 | PC register | in each `procN` |
| m2 | PC + 4 | in each `procN` |
| m3 | instruction memory, combinational read | `imem` |
| m4 | immediate generator and instruction classifier | `gen_imm` |
| m5 | register file, 32 x 32 bits, x0 reads 0 | `rf` (proc5, proc6), `rf2` (proc8, proc9) |
| m6 | branch target PC + imm | in each `procN` |
| m7 | ALU operand 2: the immediate, or rs2 for R-type and `bne` | in each `procN` |
| m8 | ALU: `rs1 + op2`, and `rs1 != op2` for the branch | in each `procN` |
| m9 | data memory, combinational read, clocked write | `dmem` |
| m10 | write-back value: load data or ALU result | in each `procN` |
| m0 / m11 | next PC: PC+4, or the target if a branch is taken | in each `procN` |

The ALU only adds, so every instruction is executed as an addition. A load or
store address is `rs1 + imm`. `addi` and `add` produce a sum. `bne` uses the
same unit to compare two registers.

`gen_imm` sorts an instruction into the RISC-V formats by its major opcode.
It outputs seven flags (`r i s b u j ld`, struct `iclass_t`) and the
sign-extended immediate of that format. The processors use the flags as
follows:

* The register file is written unless the instruction is a store (`s`) or a
  branch (`b`).
* Operand 2 is rs2 for `r` and `b`, and the immediate otherwise.
* `ld` selects the load data for write-back.
* `s` enables the memory write.
* `b` together with the compare result `w_tkn` redirects the PC.

Other RV32I opcodes are decoded but not executed correctly. Do not run
`sub`, `lui`, `jal` and so on.

## proc5: one instruction per cycle

All units sit between the PC register and the register file. The clock
period has to cover the longest path. That path runs from the PC through the
instruction memory, the decoder, the operand mux, the adder and the data
memory, then through the write-back mux to the register file write data.
This is why the design gets pipelined.

## proc6: two stages and the wrong-path instruction

Pipeline register P1 (`P1_ir`, `P1_pc`, `P1_v`) splits fetch from
everything else. The PC of P1's instruction goes with it, so the branch
target becomes `P1_pc + imm`.

A branch resolves only in EX, one cycle after it was fetched. By then IF has
already fetched the next sequential instruction. proc6 lets that happen. If
the branch is taken (`w_miss = b & w_tkn & P1_v`), three things follow:

* The PC is loaded with the target.
* `P1_v` is cleared on that same edge.
* The instruction fetched in that cycle reaches EX as a bubble. It writes
  neither the register file nor the memory.

A taken branch therefore costs one cycle, and a branch that is not taken
costs nothing. Register hazards cannot occur: registers are read and written
in the same stage.

## proc8: four stages, forwarding and the bypassing register file

This is the part that needs the most care.

```
 IF            | P1 |  ID                    | P2 |  EX                   | P3 |  WB
 PC, imem, +4  |    |  gen_imm, rf2 read,    |    |  fwd muxes m11-m13,   |    |  m10, rf2 write
 next-PC m0    |    |  target m6, op2 m7     |    |  ALU m8, dmem m9      |    |
```

The memory access is part of EX. A load's data is captured in P3 together
with the ALU result (`P3_ldd`, `P3_alu`), and WB picks one of them with m10.

**Two instructions apart: the bypassing register file (`rf2`).** The
instruction in ID reads its registers in the same cycle as the instruction
in WB writes. Without help it would get the old value. `rf2` compares each
read address with the write address. On a match with the write enable high,
it returns the write data directly instead of the stored word. The register
is written at the end of the cycle as usual.

**One instruction apart: forwarding into EX.** When an instruction reaches
EX, the instruction just ahead of it is in WB and has not written its result
yet. Three muxes take that result, `w_rt`, from WB:

* m11 (`w_in1`): ALU input 1 when `P2_rs1` matches the WB destination.
* m12 (`w_in2`): ALU input 2 when `P2_rs2` matches and the instruction
  really uses rs2 as operand 2 (R-type or `bne`). For `addi`, `lw` and
  `sw`, operand 2 is the immediate. The rs2 field of `addi` and `lw` is
  immediate bits.
* m13 (`w_in3`): the store data when `P2_rs2` matches.

A match requires three conditions:

* The WB instruction writes the register file: it is valid, not a store and
  not a branch.
* Its destination is not x0.
* Its destination equals the EX source.

Loads need no stall. Their data is read inside EX, so it is already in P3
when the next instruction enters EX.

**Three or more apart:** the value is already in the register file.

**Branches** resolve in EX using the forwarded operands. The target was
computed in ID and carried in `P2_tpc`. On a taken branch:

* `P1_v` and `P2_v` are cleared, so the two younger instructions in IF and
  ID are flushed.
* The PC loads `P2_tpc`.

The cost is two cycles per taken branch.

## proc9: five stages, two forwarding sources and the load-use interlock

proc9 moves the data memory into its own stage, MA. P3 now sits between EX
and MA, and P4 between MA and WB. Forwarding into EX has two sources:

* MA (`P3_alu`), the previous instruction's ALU result. This source has
  priority, because it is the newer value.
* WB (`w_rt`), the instruction before that, which includes load data.

`rf2` still bridges WB to ID.

A load's data exists only at the end of MA, one cycle too late for an
instruction right behind it in EX. When a valid load is in EX and the
instruction in ID reads its destination register, the interlock acts (the
`stall` signal):

* IF and ID hold for one cycle. The PC and P1 are not written.
* A bubble enters EX.

The loaded value then comes from WB. A register counts as read when:

* rs1: any format except U and J.
* rs2: R, S and B formats.

Branches behave as in proc8. Note the longest path: it starts at P4, goes
through the forwarding muxes, the ALU compare and the next-PC mux, and ends
in the PC.

## Multiply-add: cutting a critical path

Inputs `b` (16 bits) and `c` (32 bits) are registered in `r_b` and `r_c`.
The product `3 * r_b` has 32 bits. The sum is registered in `r_y`, which
drives `y`.

* **`STAGES=1`, the original circuit:** the multiplier and the adder are in
  series between two register ranks. `y` shows `3*b + c` two clock edges
  after the inputs were applied.
* **`STAGES=2`, the pipelined circuit (default):** `r_d` captures the
  product. `r_e` captures `r_c` one cycle later, so that the adder sees `b`
  and `c` from the same input cycle. The multiplier alone is now stage 1,
  and the adder alone is stage 2. The latency is three edges, and a new pair
  is still accepted every cycle.

If you insert `r_d` without `r_e`, stage 2 adds a product to a `c` from a
different cycle. The second register is what makes it a pipeline.

## Gate levels: what sets the clock period

`gate_levels` is the smallest case of the same idea. Register A feeds an
AND gate, then an OR gate, then a second AND gate, which feeds register B.
That is three gate levels in series, and the clock period must cover all
three.

`SPLIT=1` (the default) places register C after the OR gate. The longest
register-to-register path then has two gate levels, and a result takes one
more cycle.

Each gate's second input (`p`, `q`, `r`) is a plain module input. The width
is one bit.

## Departures and own choices

Choices made where the lecture says nothing:

* **Memory sizes:** 1024 words of instruction memory and 1024 words of data
  memory (`IMEM_WORDS`, `DMEM_WORDS`). Accesses are whole words, and the
  address wraps modulo the size. Data memory is not cleared at reset.
* **Reset:** `rst` is synchronous and active high. It sets the PC to 0, the
  valid bits to 0 and `P1_ir` to a nop (`addi x0,x0,0`), and it clears the
  register file.
* **Ports:** the lecture's processors have only a clock. Here each processor
  also has:
  * a fill port for the instruction memory (`load`: `we`, `addr`, `data`),
    used while in reset;
  * a `commit` port, showing the instruction in the register-write stage
    (`valid`, `pc`, `we`, `rd`, `data`);
  * a `store` port, showing each data memory write (`valid`, `addr`,
    `data`).
* **`gen_imm` decoding:** follows the RISC-V base ISA encodings.
* **proc9:** the forwarding paths, the load-use interlock and the branch
  handling follow the approach of proc8. The lecture gives only the stage
  split and the critical path.

Details of proc8 settled by this RTL:

* **Forwarding condition:** forwarding requires a WB instruction that
  actually writes a register (valid, not a store, not a branch) and a
  nonzero destination. A store or branch in WB has immediate bits in its
  rd field, and must not forward.
* **Store and branch flags:** these are carried into P3 next to the load
  flag. The register file write enable in WB uses them, so stores and
  branches never write a register.

Left out:

* **The conservative branch scheme:** stalling fetch until a branch
  resolves. It is described only as an alternative, and is not built.
* **The intermediate multiply-add circuit:** the one with `r_d` but no
  `r_e`. It is not built.

## Using the RTL

Files:

* `rtl/rv_pkg.sv`: the shared types (`iclass_t`, `commit_t`, `store_t`,
  `imem_load_t`) and the opcode constants.
* One module per file in `rtl/`.
* Testbenches in `tb/`. They share `tb/rv_tb_pkg.sv`, which holds the
  instruction encoders, a random program generator and a reference model.

Simulate, for example, the four-stage processor, or the whole top at its
default parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rv_pkg.sv tb/rv_tb_pkg.sv tb/proc8_tb.sv --top-module proc8_tb
./obj_dir/Vproc8_tb

verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rv_pkg.sv tb/rv_tb_pkg.sv tb/pipelining_top_tb.sv --top-module pipelining_top_tb
./obj_dir/Vpipelining_top_tb
```

Each testbench ends with `TB_RESULT checks=N failures=M`.

To run your own program:

1. Hold `rst` high.
2. Write one instruction word per clock through `load`.
3. Pad the end with a few nops. The pipelines fetch past the last
   instruction.
4. Release `rst` and watch `commit`.

`rv_tb_pkg` has `enc_add`, `enc_addi`, `enc_lw`, `enc_sw` and `enc_bne` to
build the words.

## How far it has been checked

Every processor testbench runs the same set of programs:

* the lecture's dependency chains (`addi x1,x0,3; addi x2,x1,4; ...`);
* a taken `bne` with two instructions behind it;
* 30 random looping programs with dense register reuse on x0 to x7, loads
  and stores, and forward branches.

A reference model executes each program one instruction at a time. The
testbench checks the following against it:

* every commit: pc, write enable, destination and value;
* every store: address and data;
* the exact cycle of the last commit: pipeline fill + one cycle per
  instruction + the branch and load-use penalties in the table above.

The end-to-end testbench runs the same checks on all four processors at
once, with 40 random programs. At the same time it streams random data through
the multiply-add and the gate-level circuit.

It also counts how often each mechanism acts and fails if
any mechanism never acts. The mechanisms are:

* flushes;
* each forwarding mux;
* the register-file bypass;
* both forwarding sources of proc9;
* the load-use stall;
* writes to x0.

The smaller blocks have their own randomized testbenches. For each module,
a deliberately broken copy was confirmed to fail its testbench.

Not checked:

* timing or area on any technology;
* instructions outside the five supported ones;
* accesses outside the data memory size, which wrap around.
