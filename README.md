# 32-bit MIPS-style pipeline with a single-instruction Booth multiplier

A plain RISC integer unit has no multiplier, so a 32 x 32 multiply is a loop of
at least 32 shift-and-add steps. This design is a 32-bit, five-stage, in-order
MIPS-style processor that adds one "CISC" instruction. `MUL` (and `MULI`) runs in
a dedicated second ALU built around a radix-2 Booth multiplier. The multiplier
finishes in **4 clock cycles**, holding the rest of the pipeline while it works.
All other operations go through an ordinary single-cycle ALU.

The RTL follows the published design *FPGA Implementation of 32-bit MIPS
Processor with CISC Multiplication Operation*. It was built for a Xilinx
Spartan-3E (Nexys board). That includes a board wrapper: every result the
processor writes back goes into a dual-clock block RAM, which a second,
external clock reads out towards a 7-segment display. Where the published
description is silent, this RTL makes its own choices. They are marked as such
below and in each file's header.

## Instruction set

Every instruction is 32 bits wide with a 6-bit opcode in `[31:26]`.

| format | fields |
|---|---|
| R | `opcode[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]` |
| I | `opcode[31:26] rs[25:21] rt[20:16] imm[15:0]` (imm always sign-extended) |
| J | `opcode[31:26] addr[25:0]` |

| opcode | funct | instruction | effect |
|---|---|---|---|
| 0 | 1..10 | ADD SUB MUL AND OR NOR NAND XOR DIV SLT | `rd <- rs op rt` |
| 1..10 | – | ADDI SUBI MULI ANDI ORI NORI NANDI XORI DIVI SLTI | `rt <- rs op sext(imm)` (same numbering as funct) |
| 11 | – | LW *(code chosen here)* | `rt <- MEM[rs + sext(imm)]` |
| 12 | – | SW *(code chosen here)* | `MEM[rs + sext(imm)] <- rt` |
| 13/14/15/16 | – | BEQ / BNE / BGT / BLT | if `rs ==/!=/>/< sext(imm)` (signed) then `PC <- rt` |
| 17 / 18 | – | SLL / SRL | `rt <- rs <</>> imm[4:0]` (logical) |
| 19 | – | J | `PC <- {PC+4[31:28], addr, 2'b00}` |
| 20 | – | JAL | `$ra <- $ra + 4; MEM[$ra] <- PC+4; PC <- {PC+4[31:28], addr, 2'b00}` |
| 21 | – | JR | `PC <- MEM[rs]; rs <- rs - 4` |

The branch and call instructions are unusual, and this RTL takes their
published definitions literally:

* **Branches compare a register with the immediate.** The branch target is
  not PC-relative. It is the *value of the second register field*, so
  `BEQ r1, r2, 25` means "if r1 == 25, jump to the address held in r2".
* **JAL/JR use a stack in data memory.** `$ra` (register 31) is a stack
  pointer, not a link register. JAL pre-increments it by 4 and stores the
  return address there. JR pops: it reads the target at `rs` and writes
  `rs - 4` back. Calls therefore nest to any depth. JR takes its register from
  the `rs` field (normally 31).
* The jump field is a *word* address (shifted left by two). So `J 2500`
  lands on byte address 10000.
* `MUL` writes the low 32 bits of the 64-bit signed product. `DIV` writes the
  quotient, truncated towards zero. The high product word (or the remainder)
  stays in ALU 2's result buffer, where it is visible on the `mul_buffer`
  port. No instruction reads it.
* Register 0 reads as zero. On reset, register *i* holds the value *i*. This
  gives the start values the reference Fibonacci program relies on (r0 = 0,
  r1 = 1).
* Unknown opcodes and function values execute as no-ops.

## Pipeline

```
 IF ──▶ ID ──▶ EX ──▶ MEM ──▶ WB
 PC     decode  ALU 1        data memory   register
 +4     regfile ALU 2 (mul/div) JR target  write
        J/JAL   branches
            ▲      │  ▲          │
            │      └──┴──────────┘  forwarding EX/MEM → EX, MEM/WB → EX
```

* **IF** reads the instruction memory at `PC` (asynchronous read) and
  computes `PC + 4`.
* **ID** decodes (`control_unit`) and reads two registers. The register
  file hands a value being written back in the same cycle straight to the
  read. ID also redirects fetch for J/JAL (one instruction cancelled). For
  JAL the `rs` read is forced to register 31.
* **EX** picks each operand from ID/EX, EX/MEM or MEM/WB (`forward_unit`),
  nearest producer first. It then runs either ALU 1 (`alu`) or ALU 2
  (`muldiv_unit`). EX also decides conditional branches: the ALU subtracts
  and its zero flag gives equality. A taken branch cancels the two younger
  instructions. EX forms the memory address (`rs + imm`; for JAL, the
  incremented `$ra`).
* **MEM** reads or writes the data memory (asynchronous read). For JR it
  takes the popped return address as the next PC and cancels the three
  younger instructions.
* **WB** writes the register file. Every write to a register other than 0
  also appears on `out_we`/`out_data`.

Hazards and their cost:

| situation | handling | cost |
|---|---|---|
| result used by the next 1–2 instructions | forwarded into EX | 0 |
| LW result used by the very next instruction | ID held, bubble into EX | 1 cycle |
| MUL / MULI in EX | IF, ID, EX held; MEM and WB drain | 4 cycles |
| DIV / DIVI in EX | same | 33 cycles |
| taken branch | fetch redirected from EX | 2 cycles |
| J / JAL | fetch redirected from ID | 1 cycle |
| JR | fetch redirected from MEM | 3 cycles |

There are no branch delay slots. A JR that redirects from MEM also aborts any
multiply or divide that the cancelled instruction in EX had started.

The published design fixes the five stages, forwarding into EX from the two
later stages, the two ALUs and the 4-cycle multiply hold. This RTL chose the
rest of the table: the load-use interlock, where each kind of jump resolves,
and the divide latency.

## The Booth multiplier (ALU 2)

`booth_multiplier` multiplies the signed multiplicand `x` by the signed
multiplier `y`. Following the published algorithm, it uses three registers of
n1 + n2 + 1 = 65 bits:

```
A = { x, 33'b0}          S = {-x, 33'b0}          P = {32'b0, y, 1'b0}
step:  P[1:0] = 01 → P += A     10 → P += S     00, 11 → P unchanged   (carry out dropped)
       then P >>>= 1 (arithmetic)
after 32 steps: product = P[64:1]
```

32 steps at one per clock would take 32 cycles. To keep the promised 4-cycle
multiply, this RTL chains **8 Booth steps per clock** (`STEPS_PER_CYCLE = 8`),
which gives eight 65-bit add/shift stages in a row. The first group of 8 runs
on the same clock edge that loads A, S and P, so:

```
cycle t      mult_cs=1, unit idle      → operands latched, steps 1–8
cycle t+1..3                            → steps 9–32
cycle t+4    mult_done=1 (one cycle), {ab_high, ab_low} = product
```

`ab_high`/`ab_low` then hold the product until the next one completes.
`mult_reset` abandons an operation. Changing `STEPS_PER_CYCLE` (a divisor of
32) trades cycles for combinational depth. The pipeline's hold length follows
it automatically.

**Known limitation:** with 65-bit registers the multiplicand −2³¹ cannot be
negated into S. For that single value the product is wrong whenever the
algorithm adds S. This is inherent in the published register widths and has
been kept. A 66-bit variant would remove it.

`muldiv_unit` wraps the multiplier and the divider. It starts the right one
on the first cycle an instruction of that kind sits in EX. It raises `stall`
until the result is ready, and in the cycle it drops `stall` it presents the
low result word. `divider` is this design's own: a restoring divider working
on operand magnitudes, one quotient bit per clock, fixing the signs at the
end. It takes 33 edges. Dividing by zero gives an all-ones quotient and
returns the dividend as the remainder.

## Board wrapper and result read-out

`fpga_top` holds the processor, a 512 x 32 simple dual-port RAM
(`output_bram`, one Spartan-3E block RAM) and two address counters:

* port A (`clka` = processor clock) writes each written-back result at the
  next address (`out_count`);
* port B (`clkb` = `ext_clk`, board pin B18) reads one address per external
  clock edge. Its registered output `doutb` is meant for the 7-segment
  display. Reset reaches the `ext_clk` domain through a two-flop synchroniser.

Running the Fibonacci test, the RAM fills with 1, 2, 3, 5, 8, 13, 21, 34, 55.
The published design names the RAM's ports and pins (clk B8, reset D18,
external clock B18). What is stored, the counters and the synchroniser are
choices made here. The 7-segment driver itself is not included.

Programs are loaded through the `imem_we/imem_waddr/imem_wdata` port while
`reset` is high. The PC starts at 0 when reset falls. `aluout`, `dataout` and
`signvalue` reproduce the signals of the reference simulation waveform: the EX
result, the instruction in ID, and the immediate of the instruction in EX.
`events` carries one-cycle flags for forwarding, stalls, branches, jumps,
returns and multiply/divide starts.

## Sizes and parameters

| parameter | default | origin |
|---|---|---|
| data path, registers | 32 bit, 32 registers | published |
| `STEPS_PER_CYCLE` | 8 (→ 4-cycle multiply) | chosen to meet the published 4 cycles |
| `IMEM_WORDS` | 4096 | chosen (covers the `J 2500` / `JAL 2591` examples) |
| `DMEM_WORDS` | 1024 | chosen |
| `OUT_DEPTH` | 512 | chosen (one block RAM) |

The published build reaches 177 MHz on a Spartan-3E. This RTL has not been
timed on that device; the 8-step combinational Booth chain is expected to be
its longest path.

## Files

`rtl/` (one module or package per file):

| file | role |
|---|---|
| `mips_pkg.sv` | opcodes, function values, ALU/branch enums, control word `ctrl_t`, `events_t` |
| `fpga_top.sv` | board-level top: core + result RAM + read-out counter |
| `mips_core.sv` | the five-stage pipeline, hazard and flush logic |
| `control_unit.sv` | instruction decoder |
| `register_file.sv` | 32 x 32 registers, 2R/1W, write bypass |
| `alu.sv` | ALU 1 |
| `muldiv_unit.sv` | ALU 2: stall control and result buffer |
| `booth_multiplier.sv` | 4-cycle radix-2 Booth multiplier |
| `divider.sv` | 33-cycle signed restoring divider |
| `forward_unit.sv` | EX operand bypass selection |
| `instruction_memory.sv`, `data_memory.sv` | word memories, asynchronous read |
| `output_bram.sv` | dual-clock result RAM |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_fib_waveform.sv` and the shared `tb_asm_pkg.sv`. That package holds
instruction encoders, a non-pipelined reference model of the instruction set,
and the test programs: Fibonacci, a directed program, and random programs.

## Simulating

With Verilator 5, for example the full design:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mips_pkg.sv tb/tb_asm_pkg.sv tb/tb_fpga_top.sv --top-module tb_fpga_top
./obj_dir/Vtb_fpga_top
```

Any other testbench works the same way with its own name. Verilator finds the
modules through `-Irtl`. Each testbench prints
`TB_RESULT checks=N failures=M`, and a watchdog ends a hung run as a failure.
All of them finish in well under a second.

What the tests establish:

* `tb_mips_core` and `tb_fpga_top` run the Fibonacci test, a directed
  program and random programs. They compare every register write, in order,
  with the reference model. The directed program covers 5000 × −5, MULI, DIV,
  DIVI, back-to-back dependences, load-use, all four branches taken and not
  taken, J, and nested JAL/JR. Both testbenches check that each multiply
  holds the pipeline exactly 4 cycles and each divide 33. They also check
  that every forwarding path, stall, branch, jump and return occurred. The
  top-level test reads the result RAM back over the external clock.
* `tb_mips_core` also runs the operand values of the instruction-set
  examples at their real addresses: `J 2500`, `JAL 2591` with a return
  through `JR`, `BEQ` against 25, a shift by 3, and immediates of 100.
* `tb_fib_waveform` replays the instruction words of the reference
  waveform. It checks the printed `aluout`/`dataout`/`signvalue` triples and
  the stored results 1 … 55.
* The unit tests compare each block against an independent model, with
  random and corner operands. For the multiplier this includes the published
  5000 × −5 = −25000 case, the 4-cycle latency and abort.

## Not included

* **Issue buffers.** The published block diagram draws small four-entry
  buffers in front of the ALUs (I/Load, Register, Mul/Div). Their behaviour is
  not described, and dynamic scheduling is named there only as future work.
  Operands travel in the ID/EX pipeline register instead.
* **The 7-segment display driver.** Its digit count, multiplexing and
  encoding are not specified, so `doutb` is brought out as a port.
* Byte and half-word memory accesses, exceptions, and a way to read the high
  product word or the remainder into a register.
