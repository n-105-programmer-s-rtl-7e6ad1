# N-105: a 16-bit two-stage RISC soft core

The N-105 is a small 16-bit processor meant for teaching. It has sixteen
general purpose registers, a 5-bit-opcode instruction set of 22 instructions,
and a pipeline of only two stages: *fetch*, and *everything else*. It has no
memory management. It talks to a logically separate instruction memory and
data memory over two independent Avalon-MM master ports with 16-bit
transfers. This repository holds synthesizable SystemVerilog for the core,
a testbench for every unit and an end-to-end testbench. The end-to-end test
runs random programs and compares the result with an instruction-set
reference model.

The parts that take the most care to understand are the **branch delay
slot** and the **IFS skip**. Both follow from the short pipeline, and both
are described first.

## Program flow: pc, the delay slot and BSR/RET

`pc` is the address of the instruction being **fetched**. That is the
instruction *after* the one being executed. Branches never flush the
pipeline, so the instruction after a branch (its delay slot) always
executes:

| instruction | effect |
|---|---|
| `br imm11`  | `pc <- pc + imm11` |
| `bsr imm11` | `pc <- pc + imm11`, `r15 <- pc + 2` |
| `ret`       | `pc <- r15` |

Here `pc` is the address of the delay slot. `r15 = pc + 2` is therefore the
instruction after the delay slot, so a return does not run the delay slot a
second time. For example:

```
 0 one:   movi r2 4
 2        bsr  three      ; r15 <- 6, target 14
 4        movi r4 8       ; delay slot: runs before the call
 6 two:   movi r4 6
 8        movi r9 7
10        br   end
12        nop             ; delay slot of br
14 three: ret             ; pc <- r15 = 6
16        movi r1 4       ; delay slot of ret
18 end:   nop
```

Execution order: 0, 2, 4, 14, 16, 6, 8, 10, 12, 18. `r15` is an ordinary
register, so writing it and then executing `ret` is an indirect jump.

**How the fetch stage does it** (`n105_fetch`). The instruction register
(IR) holds the instruction being executed. A fetch is issued only when IR is
empty or is being consumed this cycle, so a returned word always has
somewhere to go. When execute takes a branch, the fetch of its delay slot
(at `pc`) is already under way, and it cannot be dropped: Avalon requires
the address to stay put while `waitrequest` is high. The target therefore
replaces `pc + 2` as the address *after* the delay slot:

* if the delay slot returns in the branch's own execute cycle, the target is
  loaded into `pc` at once;
* otherwise it is held in a one-entry pending register (`redirect_pending`)
  and loaded when the delay slot returns.

A branch in a delay slot follows the same rule: its `pc` is the first
branch's target. The result is the usual chained behaviour, and the
reference model does the same.

## Conditional execution: IFS

`ifs cc` tests a condition on the flags. If the condition is false, the
**next** instruction is skipped. A skipped instruction is still fetched and
still takes its execute cycle, but it has no effect. A skipped `ld` or `st`
makes no bus access, which is the only time a skip saves cycles. In the RTL
a `skip_q` flip-flop is set by a failing IFS, and it turns the next
instruction in IR into a no-op.

Condition codes, in the `cc` field (bits 11:8):

| code | name | true when | code | name | true when |
|---|---|---|---|---|---|
| 0 | cc | !C | 8 | gt | !(Z \| (N^V)) |
| 1 | cs | C | 9 | le | Z \| (N^V) |
| 2 | ne | !Z | 10 | vc | !V |
| 3 | eq | Z | 11 | vs | V |
| 4 | pl | !N | 12 | hi | !(C \| Z) |
| 5 | mi | N | 13 | ls | C \| Z |
| 6 | lt | N^V | 14 | (always) | 1 |
| 7 | ge | !(N^V) | 15 | (never) | 0 |

The formulas are the ISA's. Codes 0 to 13 follow the order of the ISA's
condition table. Codes 14 and 15 are this implementation's additions.

## Flags

There are four flags: N (negative), V (signed overflow), Z (zero) and C.
An instruction updates only the flags it sets. The others keep their value.

* `add sub cmp addi subi cmpi` set all four.
* `or and xor` (and therefore `nop` = `or r0 r0`) set N and Z. The ISA leaves
  V and C undefined after them; here they keep their value.
* Every other instruction, `not` and `mov` included, leaves the flags alone.

C is the carry out of an addition and the **borrow** of a subtraction
(C = 1 when rA < operand, unsigned). Only that reading makes the ISA's
`hi = !(C | Z)` mean "unsigned higher".

## Instruction encoding

```
15    12 11     8 7   5 4      0
[  A   ][   B    ][ x ][ opcode ]   register-register, and imm4 in B
[  A   ][      imm7    ][ opcode ]
[          imm11       ][ opcode ]
```

| opcode | instr | operation | opcode | instr | operation |
|---|---|---|---|---|---|
| 00000 | or   | ra \|= rb | 01100 | movi | ra = sext(imm7) |
| 00001 | and  | ra &= rb  | 01101 | addi | ra += zext(imm7) |
| 00010 | xor  | ra ^= rb  | 01110 | subi | ra -= zext(imm7) |
| 00011 | not  | ra = ~ra  | 01111 | cmpi | ra - sext(imm7) |
| 00100 | mov  | ra = rb   | 10000 | ld   | ra = [rb] |
| 00101 | add  | ra += rb  | 10100 | st   | [rb] = ra |
| 00110 | sub  | ra -= rb  | 11000 | br   | pc += sext(imm11) |
| 00111 | cmp  | ra - rb   | 11001 | bsr  | r15 = pc+2; pc += sext(imm11) |
| 01000 | lsli | ra <<= (16-imm4) mod 16 | 11010, 11011 | ret | pc = r15 |
| 01001 | lsri | ra >>= imm4 (logical) | 11111 | ifs | skip next if !cc(imm4) |
| 01010 | asri | ra >>= imm4 (arithmetic) | | | |
| 01011 | roti | ra rotated right by imm4 | | | |

`lsli` stores `16 - n` in its field, so the assembler writes `lsli r11 13`
and encodes 3. In hardware, every shift is one right rotation by the raw
field followed by a mask (`n105_alu`). That is why the left shift is encoded
this way. A field of 0 is a shift of 0.

Opcodes not in the table do nothing.

## Buses and timing

Both ports are Avalon-MM masters with `waitrequest` and no read pipelining.
The master holds address and command until `waitrequest` is low, and
`readdata` is taken in that cycle. Addresses are byte addresses. All
transfers are 16 bits, so addresses must be even. The data port drives
bit 0 unchanged, and alignment is the program's job.

* **Fetch**: one word per `1 + wait states` cycles. With a memory that
  adds one wait state, an instruction takes two cycles.
* **Execute**: ALU, branch and IFS instructions finish in the cycle they sit
  in IR.
* **LD/ST** (`n105_lsu`): the data master's outputs are registered. A
  transfer takes 2 execute cycles plus the slave's wait states, and the
  execute stage stalls meanwhile. The slave may stall it for as long as it
  likes.
* There are no register hazards. The register file is written at the end
  of the execute cycle, and the next instruction reads it in the next
  cycle.

`i_read` depends combinationally on `d_waitrequest`: the next fetch is issued
in the cycle a load or store completes.

Reset (`rst`, synchronous, active high) clears `pc` to `RESET_PC` (0), all
registers and all flags. Fetching starts in the first cycle after reset.

## Modules

| module | role |
|---|---|
| `n105_pkg`     | opcodes, ALU operations, condition codes, `flags_t`, decoded control word `ctrl_t` |
| `n105_core`    | top: wires the stages, write-back mux, IFS skip state, branch target |
| `n105_fetch`   | `pc`, instruction master, IR, delay-slot redirect |
| `n105_decode`  | instruction word to `ctrl_t` (immediates, flag masks, branch kinds) |
| `n105_regfile` | 16 x 16-bit, two asynchronous read ports, one write port |
| `n105_alu`     | logic, add/subtract with flags, shared rotator for all shifts |
| `n105_flags`   | NVZC register with per-flag enables and the condition evaluator |
| `n105_lsu`     | data master for `ld`/`st`, stall generation |

Top-level parameters: `AW` (address width, 16) and `RESET_PC` (0). The data
width and the register count are fixed by the instruction set.

The Avalon interconnect and the memories themselves are not part of the
core. `tb/n105_avalon_mem.sv` is a behavioural slave memory with a
configurable number of wait states, fixed or random. It also counts any
violation of the hold rule by the master.

## Choices where the ISA description leaves room

The following are this implementation's readings. Change them in the named
module if your toolchain assumes otherwise.

* **Branch offsets** are byte offsets (`pc + imm11`, taken literally), and
  bit 0 of every target is cleared (`n105_core`). If your assembler emits
  half-word offsets, shift `ctrl.imm` left by one in `n105_core`.
* **RET** is decoded for both 11010 and 11011, because both values appear
  for it (`n105_decode`).
* **Condition code numbers 8 to 15**: see the table above (`n105_flags`,
  `n105_pkg`).
* **ADDI and SUBI** zero-extend imm7. **MOVI and CMPI** sign-extend it.
* V and C are kept after logic operations. C is the borrow after a
  subtraction.
* The reset values of pc, registers and flags are all 0.

## Verification

Each unit has a self-checking testbench in `tb/` that ends with one
`TB_RESULT checks=N failures=M` line and has a watchdog:

* `tb_n105_alu`: every operation on corner and random operands, against
  integer arithmetic.
* `tb_n105_regfile`: random traffic against a shadow copy.
* `tb_n105_flags`: random per-flag updates, and all 16 conditions after each.
* `tb_n105_decode`: all 32 opcodes, random fields and don't-care bits,
  against the encoding table.
* `tb_n105_fetch`: random consume and redirect from an execute model, random
  wait states. It checks every IR word and its address against the
  delay-slot rule, and the fetch rate at 0 and 1 wait states.
* `tb_n105_lsu`: random loads and stores with random wait states, and
  transfer time `2 + w`.
* `tb_n105_core`: the whole core at its default parameters:
  * the call/return example above, with its register values and cycle count;
  * a counted loop (`ld`, `add`, `subi`, `ifs ne`, backward `br`) that sums
    ten data words;
  * fetch rate;
  * load/store timing;
  * 500 random programs with random wait states on both buses. After each
    program, the registers, the flags and all 64 KiB of data memory are
    compared with the reference model in `tb/n105_tb_pkg.sv`.

  It also counts how often each mechanism happened: IFS true, IFS skip,
  skipped load or store, redirect in the same cycle, redirect held pending,
  fetch wait, data wait, BSR, RET, load, store. A mechanism that never
  happened counts as a failure.

The reference model is written from the instruction definitions alone. It
shares no code with the RTL, but it makes the same choices listed above.

To simulate with Verilator, for example the core:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/n105_pkg.sv tb/n105_tb_pkg.sv rtl/n105_*.sv \
  tb/n105_avalon_mem.sv tb/tb_n105_core.sv --top-module tb_n105_core
./obj_dir/Vtb_n105_core
```

(`-Wno-fatal` only keeps Verilator's width warnings about the testbench
arithmetic from stopping the build.) A unit testbench needs only
`rtl/n105_pkg.sv`, its module, and `tb/n105_avalon_mem.sv` (for fetch and
lsu). The design resets everything it reads, so a two-state simulator with
random initial values gives the same results.
