# A pipelined Y86-64 `addq` processor, with stalling for data hazards

A processor that runs one instruction at a time must fit instruction fetch,
register read, the addition and the register write into one clock cycle.
Cutting that path into stages with registers between them lets a new
instruction start every cycle while older ones finish. This is the core idea
of the RTL here. `addq_cpu` is a four-stage pipeline that executes the Y86-64
instruction `addq rA, rB` (R[rB] ← R[rA] + R[rB]). It completes one
instruction per cycle when instructions are independent. When one
instruction needs the result of an instruction that has not yet been written
back, the hardware stalls.

Three more circuits stand beside it in the top level:

- `opq_jxx_cpu` is the same pipeline extended with `subq`/`andq`/`xorq`, a
  condition-code register and conditional jumps. A jump that depends on a
  flag not yet written stalls.
- `mem_stage` shows how the five-stage Y86 pipeline decides in its memory
  stage whether to read or write data memory.
- `times3_pipe` is a two-stage pipelined multiply-by-three.

The four share only the clock and reset.

## The four stages and their registers

| stage | work | register it fills |
|---|---|---|
| fetch / PC update | read 10 instruction bytes at the PC; split out rA, rB; PC + 2 | `pP` (pc), `fD` (rA, rB) |
| decode | read R[rA] and R[rB]; destination is rB | `dE` (valA, valB, dstE) |
| execute | valE = valA + valB | `eW` (valE, dstE) |
| writeback | R[dstE] ← valE, at the clock edge ending the cycle | — |

The registers are named after the two stages they sit between. Lower case
marks the sending side and upper case the receiving side. `f_rA` is what
fetch computes this cycle. `D_rA` (the port `D.rA`) is what decode reads
from `fD`, i.e. what fetch computed one cycle earlier. Each register is a
packed struct in `y86_pkg`. Each also has a *do-nothing* value: register
number `0xF` (`REG_NONE`) and zero data. Reset loads that value, and a
bubble (an inserted no-op) is that value. Reading `REG_NONE` gives 0, and
writing it does nothing. So a bubble flows through the pipeline without
effect.

Encoding: an `addq` is two bytes. Byte 0 is `0x60` (icode 6, ifun 0). Byte 1
holds rA in its high nibble and rB in its low nibble. Fetch reads the bytes
little-endian, so icode is bits 7:4, rA bits 15:12 and rB bits 11:8.
This processor executes only `addq`. Any other instruction code is fetched
as a no-op (both register numbers `REG_NONE`), and every instruction moves
the PC by 2.

Example with R[i] = 100·i, running `addq %r8,%r9; addq %r10,%r11;
addq %r12,%r13; addq %r9,%r8`. Cycle 0 is the first cycle after reset.

| cycle | PC | D.rA | D.rB | E.valA | E.valB | E.dstE | W.valE | W.dstE |
|---|---|---|---|---|---|---|---|---|
| 0 | 0x0 | | | | | | | |
| 1 | 0x2 | 8 | 9 | | | | | |
| 2 | 0x4 | 10 | 11 | 800 | 900 | 9 | | |
| 3 | 0x6 | 12 | 13 | 1000 | 1100 | 11 | 1700 | 9 |
| 4 | | 9 | 8 | 1200 | 1300 | 13 | 2100 | 11 |
| 5 | | | | 1700 | 800 | 8 | 2500 | 13 |
| 6 | | | | | | | 2500 | 8 |

Each instruction takes four cycles from fetch to the end of writeback. After
the pipeline fills, one finishes every cycle. The fourth instruction reads
%r9 in cycle 5, two cycles after the first one wrote it. There is no hazard.

## Data hazards and the stall

This is the part that needs care. The register file is read in decode
(combinationally). It is written at the clock edge that *ends* the writeback
cycle. Consider an instruction I fetched in cycle t. It reads its registers
in cycle t+1.

- An older instruction in **writeback** during cycle t writes at the end of
  t. I sees the new value in cycle t+1.
- An older instruction in **execute** during cycle t writes at the end of
  t+1. That is too late for I.
- An older instruction in **decode** during cycle t writes at the end of t+2.
  That is also too late.

`hazard_unit` compares the fetched rA and rB (ignoring `REG_NONE`) with the
destinations now in decode (`D.rB`) and in execute (`E.dstE`). Note that rB is
both a source and the destination of `addq`. On a match it does two things:

- **stall_F**: `pP` keeps its value, so the same instruction is fetched
  again next cycle.
- **bubble_D**: `fD` is loaded with `REG_NONE`, so decode sees a no-op.

Decode, execute and writeback keep moving. So the producing instruction
reaches writeback after at most two stall cycles, and the stall then ends by
itself.

Example: `addq %r8,%r9; addq %r9,%r8; addq %r10,%r11` with R[i] = 100·i.

| cycle | PC | stall | D.rA | D.rB | E.valA | E.valB | E.dstE | W.valE | W.dstE |
|---|---|---|---|---|---|---|---|---|---|
| 0 | 0x0 | 0 | F | F | | | F | | F |
| 1 | 0x2 | 1 | 8 | 9 | | | F | | F |
| 2 | 0x2 | 1 | F | F | 800 | 900 | 9 | | F |
| 3 | 0x2 | 0 | F | F | 0 | 0 | F | 1700 | 9 |
| 4 | 0x4 | 0 | 9 | 8 | | | F | | F |
| 5 | | 0 | 10 | 11 | 1700 | 800 | 8 | | F |
| 6 | | | | | 1000 | 1100 | 11 | 2500 | 8 |

R[9] is written at the end of cycle 3 and read in cycle 4. A result read by
the next instruction costs two stall cycles. A result read two instructions
later costs one. A result read three or more instructions later costs none.
Without the stall, the second instruction would read the old %r9 (900) and
produce 1700 instead of 2500.

Stalling is the only hazard mechanism. There is no forwarding (bypassing of
values still on their way to the register file).

## Control hazards: `opq_jxx_cpu`

This variant keeps the four stages and adds two things:

- The other OPq instructions: `subq` (rB − rA), `andq` and `xorq`.
- A condition-code register with a sign flag SF and a zero flag ZF. Reset
  sets SF=0 and ZF=1. Execute writes the flags of every OPq result at the end
  of its cycle.

A jump (`jXX`, 9 bytes: `0x7c` then an 8-byte little-endian destination) is
handled entirely in fetch. Fetch reads the flags and loads the destination
or PC + 9 into the PC. The jump itself then travels down the pipeline as a
bubble.

The flags a conditional jump reads are only up to date once no older OPq is
still in decode or execute. While one is, fetch stalls the jump: it holds the
PC and sends a bubble to decode. This is the same stall action as for a data
hazard. A conditional jump right behind an OPq therefore waits two cycles.
An unconditional `jmp` never waits.

Example: `addq %r8,%r9` at 0x0, `je 0xFFFF` at 0x2, `addq %r10,%r11` at 0xB.

| cycle | PC | SF/ZF | stall | D.rA | D.rB | E.valA | E.valB | E.dstE | W.valE | W.dstE |
|---|---|---|---|---|---|---|---|---|---|---|
| 0 | 0x0 | 0/1 | 0 | F | F | | | F | | F |
| 1 | 0x2 | 0/1 | 1 | 8 | 9 | | | F | | F |
| 2 | 0x2 | 0/1 | 1 | F | F | 800 | 900 | 9 | | F |
| 3 | 0x2 | 0/0 | 0 | F | F | 0 | 0 | F | 1700 | 9 |
| 4 | 0xB | 0/0 | 0 | F | F | | | F | | F |
| 5 | 0xD | 0/0 | 0 | 10 | 11 | | | F | | F |
| 6 | | 0/0 | | | | 1000 | 1100 | 11 | | F |

In cycle 3 the flags from the `addq` are in place (1700 ≠ 0, so ZF=0). The
`je` is resolved as not taken, and fetch continues at 0xB.

Conditions:

| jump | condition |
|---|---|
| `jmp` | always |
| `jle` | SF or ZF |
| `jl` | SF |
| `je` | ZF |
| `jne` | not ZF |
| `jge` | not SF |
| `jg` | not SF and not ZF |

These are the Y86-64 conditions with the overflow flag taken as 0. There is
no overflow flag. Instruction codes other than OPq and jXX are 1-byte no-ops.

## Memory-stage control (`mem_stage`, `mem_rw_ctrl`, `data_mem`)

In the five-stage Y86 pipeline (fetch, decode, execute, memory, writeback),
the decision to read or write data memory is made in the memory stage.
That is three cycles after fetch split out the instruction code. The code
therefore travels with its instruction through `fD`, `dE`, `eM` and `mW`
(the do-nothing value is `nop`). `mem_rw_ctrl` decodes the copy that has
reached the memory stage (`M_icode`):

- it reads memory for `mrmovq`, `popq` and `ret`;
- it writes memory for `rmmovq`, `pushq` and `call`.

Decoding the fetch-stage copy instead would apply the control to the wrong
instruction. Only this control path is built. The address and store data
that an execute stage would supply enter `eM` through ports, and the loaded
value leaves through `mW`.

`data_mem` is byte-addressed with 8-byte little-endian accesses. It reads
combinationally and writes at the clock edge.

## Pipelined times three (`times3_pipe`)

- Stage 1 computes 2A = A + A.
- Stage 2 adds 2A to a copy of A that was delayed one cycle to stay aligned
  with it.

Registers hold A(t+2), then {2A, A}(t+1), then 3A(t). One operand enters per
clock. A value on `a_in` appears tripled on `y` three clock edges later: one
edge to load the input register, then two pipeline stages.

## Interfaces

`pipelining_top` brings out each design's ports under a prefix.

- **`cpu_*`** (addq processor):
  - `imem_we/waddr/wdata`: load the program one byte per clock.
  - `rf_ld_we/addr/data`: load registers.
  - `rf_dbg_addr/data`: read a register.
  - `P`, `D`, `E`, `W`: the four pipeline registers, as structs.
  - `stall`: high in a cycle when fetch is stalled.

  Load the program and registers while `rst` is high. When `rst` drops, the
  PC is 0 and the pipeline holds bubbles.
- **`br_*`** (OPq + jXX processor): the same ports as `cpu_*`, plus
  `br_CC`, the flags.
- **`mem_*`** (memory stage): `f_icode` from fetch, `e_valE` / `e_valA`
  from execute; outputs `M_icode`, `mem_read`, `mem_write`, `W_icode` and
  `W_valM`.
- **`t3_a`, `t3_y`** (times three): 32-bit operand and result.

Reset is synchronous and active high everywhere. The register file, the
instruction memory and the data memory are not reset.

| parameter | default | where |
|---|---|---|
| `IMEM_BYTES` | 256 | `addq_cpu`, `opq_jxx_cpu` (instruction memory bytes, addresses wrap) |
| `DMEM_BYTES` | 256 | `mem_stage` (data memory bytes) |
| `WIDTH` | 32 | `times3_pipe` |

Data and PC are 64 bits. There are 15 registers (%rax–%r14), with `0xF` as
"none".

## Choices made in this RTL

- Handling of non-`addq` instruction codes, as no-ops.
- In `opq_jxx_cpu`: the `andq`/`xorq` functions, the 9-byte jump encoding and
  the jump conditions, which follow Y86-64, and the absence of an overflow
  flag.
- The program/register load ports.
- Memory sizes.
- The reset scheme.
- The value read from register `0xF` (0).
- Write priority: dstM over dstE, and both over the load port. dstM is tied
  to `0xF` in the processor.
- The 32-bit width of `times3_pipe`.
- The address/data fields carried in `eM`/`mW`.
- The memory-access instruction lists, which follow the standard Y86-64 set.

The stall logic follows the stall scheme shown by the timing table above:
hold the PC and bubble `fD`. A variant that holds `fD` and bubbles `dE`
instead gives the same timing and is not built.

## Not built

The full five-stage Y86 processor is not built. It would need memory
instructions, `call`/`ret`, a stack pointer, an overflow flag and a status
register. In that processor a conditional jump is resolved in execute, which
sends "taken" back to fetch, and costs two extra cycles. A `ret` waits three
extra cycles until the memory stage delivers the return address. The
datapath that those stalls control is not specified here, so they have no
RTL. The four-stage jump handling in `opq_jxx_cpu` resolves jumps in fetch
instead.

In the five-stage pipeline a data dependence can cost up to three stall
cycles. In these four-stage pipelines the maximum is two.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_addq_cpu` compares the pipeline registers cycle by cycle with three
  worked timing tables:
  - the independent sequence;
  - the two-stall hazard above;
  - `addq %r8,%r9; addq %r10,%r11; addq %r9,%r8; addq %r11,%r10`, which
    needs exactly one stall.

  It then runs 20 random programs. Final registers are compared with an
  instruction-level model. The stall count and the completion cycle are
  compared with a timing model: an instruction is fetched no earlier than
  three cycles after the instruction whose result it reads.
- `tb_opq_jxx_cpu` checks the control-hazard table above cycle by cycle, and
  a taken `je` after `subq %r8,%r8`. It then runs 30 random programs of
  OPq instructions, forward jumps and no-ops against an instruction-level
  model and a timing model: a conditional jump is fetched no earlier than
  three cycles after the last OPq before it.
- `tb_pipelining_top` runs the whole top at its default parameters:
  - a directed and a 120-instruction random `addq` program;
  - a store followed by a load through the memory stage;
  - a stream of operands through the times-three pipeline;
  - a count-down loop (`subq`, `jne` back) on `opq_jxx_cpu`: 9 taken jumps,
    1 fall-through and 20 control-stall cycles.

  It counts stalls, one- and two-cycle hazards, back-to-back completions,
  register reads of a value written in the previous cycle, memory reads and
  writes, times-three results, control stalls, and taken and not-taken
  jumps. It fails if any of these never happens.
- The others test each block against a reference model: random stimulus,
  plus exhaustive input for `hazard_unit` and `mem_rw_ctrl`.

Each testbench was also run against a deliberately broken copy of its module
and detected the fault.

Simulating with Verilator, for example:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/y86_pkg.sv tb/tb_pipelining_top.sv --top-module tb_pipelining_top -y rtl +libext+.sv
./obj_dir/Vtb_pipelining_top
```

Every module in `rtl/` lints with `verilator --lint-only -Wall` without
errors. The remaining warnings are about unused items:
- address bits above the memory size;
- instruction bytes that an `addq` does not use;
- package constants that a given module does not need;
- the fetch stage's instruction-code output, which the `addq`-only processor
  leaves unconnected.
