# Dex-II: a two-issue VLIW processor made of two lock-stepped RISC halves

Dex-II issues two 16-bit RISC operations per instruction. It does this with
two complete scalar pipelines placed side by side, not with one wide
datapath. Each half has its own program counter, instruction memory,
register file, execution units and data memory. The halves never stall or
arbitrate. They stay consistent through two rules:

- **Every operation word names both destinations.** It carries Dest Top and
  Dest Bot. The two words of one VLIW instruction carry the same pair, so
  each half knows which register the other half's result goes to. Each
  cycle the halves swap only their 16-bit results, and each half writes
  both.
- **Every store is done twice.** Each half's memory manager tells the other
  half about its store. Both data memories therefore get both stores.

All hazards are resolved by the program, not by hardware. This includes
using the same compare and branch in both halves, the spacing between a
compare and its branch, and never writing one address twice in one
instruction. The hardware stays simple: three pipeline stages, no
interlocks and no scoreboard.

The machine was built for a board of sixteen FPGAs joined by a crossbar.
Each FPGA holds one pipeline function, and each FPGA has a 256K x 16 SRAM.
One crossbar configuration can only make a few transfers, so each
instruction cycle is split into **six clock ticks ("phases")**. Each phase
has a fixed pattern of transfers. This RTL keeps that phase schedule
tick-exact. The per-FPGA functions are separate modules, wired point to
point instead of through a crossbar model.

## Block map

```
                       dex2_top
   phase_ctrl ── phase 0..5, xbar_cfg, cycle count
   ┌──────────── dex2_half (top: board PEs 1..8) ───────────────┐
   │ fetch_stage   PE1/PE2  PC, 2 x 16-bit imem, CC latch, branch │
   │ decode_stage  PE3/PE4  2 x register file, result mux,        │
   │                        forwarding, write-back                │
   │ alu_unit      PE5      add/sub/shift -> result               │
   │ alu_unit      PE6      same unit -> condition codes to fetch  │
   │ mul_unit      PE7      8x8 multiply by table look-up          │
   │ mem_unit      PE8      data memory, store mirroring           │
   └─────────────────────────────────────────────────────────────┘
        ▲ results (16 b) ▼                 ▲ stores (st, addr, data) ▼
   ┌──────────── dex2_half (bottom: PEs 16..9, mirrored) ────────┐
   │ PE16/15 fetch, PE14/13 decode, PE12/11 add/sub,              │
   │ PE10 multiply, PE9 memory manager                            │
   └─────────────────────────────────────────────────────────────┘
```

Each PE memory is a `pe_sram`: single port, synchronous read with one tick
of latency, 2^18 words x 16 bits by default. The register file of each
decode PE is the same memory with 5 address bits. Each half holds two
copies of it, one per operand port.

## The operation word

Each half executes one 32-bit operation word per instruction. The VLIW
instruction is the pair of words at the same address in the two halves.

| bits    | register format | immediate / branch format  |
|---------|-----------------|----------------------------|
| 31..27  | opcode          | opcode                     |
| 26..20  | unused          | 26 unused, 25..10 immediate or branch address |
| 19..15  | OpA             | (part of immediate)        |
| 14..10  | OpB             | (part of immediate)        |
| 9..5    | Dest Top        | Dest Top                   |
| 4..0    | Dest Bot        | Dest Bot                   |

| opcode | op   | meaning                      | unit            |
|--------|------|------------------------------|-----------------|
| 00000  | NOP  | result 0 (use destination R0) | memory manager |
| 00100  | LD   | Rd <- mem[OpB]               | memory manager  |
| 00101  | LDI  | Rd <- immediate              | memory manager  |
| 00110  | ST   | mem[OpB] <- OpA              | memory manager  |
| 00111  | MV   | Rd <- OpA                    | memory manager  |
| 01000  | BRA  | PC <- address                | fetch           |
| 01001  | BZ   | branch if Z                  | fetch           |
| 01010  | BN   | branch if N                  | fetch           |
| 01011  | BNZ  | branch if N or Z             | fetch           |
| 01100  | BNV  | branch if N or V             | fetch           |
| 10000  | ADD  | Rd <- OpA + OpB              | add/sub         |
| 10001  | SUB  | Rd <- OpA - OpB              | add/sub         |
| 10010  | SFTL | Rd <- OpA << 1               | add/sub         |
| 10011  | SFTR | Rd <- OpA >>> 1 (arithmetic) | add/sub         |
| 11000  | MULT | Rd <- OpA[7:0] * OpB[7:0]    | multiplier      |

Bits 31..30 select the unit whose result is written: 00 memory manager,
01 branch (no result), 10 add/sub, 11 multiplier. "Rd" is Dest Top for the
top half's result and Dest Bot for the bottom half's result. R0 reads as
zero, and a write to R0 is dropped. A scalar program uses only the top half
and sets Dest Bot = 0. It also repeats the compares and branches in the
bottom word so that both program counters agree (see
`tb/tb_bubble_sort.sv`).

Condition codes are V, N and Z:

- V is the carry out of the adder. For SUB this is the carry of
  a + ~b + 1, so V = 1 means "no borrow".
- N is bit 15 of the result.
- Z means the result is zero.

The codes are updated only by ADD, SUB, SFTL and SFTR. Every other
word leaves them unchanged.

## The six-phase instruction cycle

An instruction cycle is six ticks, phases 0..5. Phases advance only while
`run` is high. Three words are in flight: word *n* in fetch, *n-1* in
decode, and *n-2* in execute.

| phase | fetch (word n)          | decode (word n-1)                          | execute (word n-2)          |
|-------|-------------------------|--------------------------------------------|-----------------------------|
| 0     | imem reads address PC   | both register-file copies read OpA, OpB    | add/sub computes; multiplier and data memory take their address; ST writes |
| 1     | word assembled (ifetch) | operands latched (R0 -> 0)                 | add/sub sets V/N/Z; multiply and memory results ready |
| 2     | condition codes latched | own result taken through the result mux    |                             |
| 3     | PC <- target or PC+1    | results swapped with the other half; operands forwarded; **Dest Top written** | other half's store mirrored |
| 4     |                         | **Dest Bot written**                       |                             |
| 5     |                         | word moves decode -> execute, fetch -> decode; execute units latch operands | |

The consequences for the programmer:

- **No branch delay slot.** The PC changes in phase 3 of the cycle that
  fetches the branch, so the next word fetched is already the target.
- **A compare must come at least two words before its branch.** Fetch
  latches the condition codes in phase 2, from the word then in execute.
  For a branch at word *n* that is word *n-2*. One other word, often a
  NOP, has to sit between the compare and the branch. Both halves must
  execute the same compare and the same branch, because each half decides
  its branch alone.
- **Back-to-back dependences work without waiting.** In phase 3 the decode
  stage compares the OpA/OpB fields of word *n-1* with the destinations of
  word *n-2*. A match replaces the operand with that result. If both
  destinations match, the bottom result wins. A legal program only lets
  that happen when both results are equal. A dependence two words apart
  is satisfied by the register file itself: it was written in phases 3 and
  4 of the previous cycle.
- **Coherence is the program's job.** The two words of an instruction must
  not store different values to one address, and must not write different
  values to one register. Assertions check that neither happens, and
  that the Dest fields and the PCs of the two halves agree.

With six ticks per instruction, two operations per instruction are at most
a third of an operation per tick. The mapping to the FPGA board was timed
at 11 MHz, which is a little under 2 million instructions per second.

## Fetch (`fetch_stage`)

The fetch stage holds the program counter. The 32-bit word is kept in two
16-bit memories, high and low half, at the same address. In phase 3 a
taken branch loads bits 25..10 into the PC; otherwise the PC is
incremented. The branch decision is made by `dex2_pkg::branch_taken`.

## Decode and write-back (`decode_stage`)

The decode stage holds two register files per half, one for each read port.
Both copies are written with both results, so all four copies in the
machine stay equal. It has these parts:

- the 4-to-1 result mux;
- the result exchange (`own_res` out, `peer_res` in);
- the forwarding compare.

`IS_TOP` selects whether this half's own result belongs to Dest Top or to
Dest Bot. Each file has one port. It is used as follows:

- phase 0: read;
- phase 3: write Dest Top;
- phase 4: write Dest Bot;
- while halted: the host.

The register contents are not reset; the host loads them.

## Execute units

- **`alu_unit`**: add, subtract, and shifts by one place. Both units in a
  half are the same module. The first returns its result to decode. The
  second exists only to deliver the condition codes to the fetch stage.
- **`mul_unit`**: an 8x8 -> 16 multiplier with no arithmetic in it. The
  operands' low bytes form the address {a[7:0], b[7:0]} of a 64K-word
  product table in the PE memory. The host must load the table before the
  program runs: entry (a·256 + b) = a·b. The testbenches generate it this
  way. A different table turns the unit into any other two-byte function.
- **`mem_unit`**: executes LD, LDI, MV and ST on the half's data memory. It
  shows its own store to the other half on `xch_*` for the whole cycle, and
  writes the other half's store in phase 3. The address is the 16-bit
  operand, so programs reach the first 64K words. The host reaches all of
  memory.

## Host port and memory map

The SPARC host of the original board loads programs, tables and data
through the PE memories. The top models this with one port that is used
while `run` is low:

| `host_pe` | memory                    | `host_pe` | memory                     |
|-----------|---------------------------|-----------|----------------------------|
| 1         | top imem, bits 31..16     | 16        | bottom imem, bits 31..16   |
| 2         | top imem, bits 15..0      | 15        | bottom imem, bits 15..0    |
| 3, 4      | top register file A, B    | 14, 13    | bottom register file A, B  |
| 7         | top multiply table        | 10        | bottom multiply table      |
| 8         | top data memory           | 9         | bottom data memory         |

Read data appears on `host_rdata` two ticks after the request. PEs 5, 6, 11
and 12 have no memory in use and read as zero. Reset clears the PCs,
pipeline registers, condition codes and phase counter, but not the
memories. To start a program:

1. Assert `rst` for one tick.
2. Load the memories.
3. Raise `run`.

## Choices made where the description was silent or inconsistent

- **Branch conditions.** The instruction table gives BNZ as "negative or
  zero" and BNV as "negative or overflow". The fetch register-transfer
  description instead compares opcode bits 29..27 directly with the
  condition-code bits. This design follows the instruction table.
- **Missing opcodes.** No opcode is given for MULT; 11000 is used here.
  Opcode 00111 is listed a second time as ST, but the memory manager treats
  it as a register move, so it is MV here.
- **Shifts.** The shift distance (one place) and the fact that SFTR is
  arithmetic are this design's choices.
- **Forwarding priority.** When both destinations match an operand, the
  bottom result wins. This is also this design's choice.
- **Memory timing.** The PE memory here is a one-tick synchronous RAM. The
  board's memory latches the address in one clock and returns the data in
  the next, which matches the one-tick latency. It also needs an idle clock
  between a read and a following write. The phase schedule never reads and
  then writes one memory in back-to-back ticks, so it meets that rule too.
- **Crossbar.** The crossbar is not modelled. Its configuration number,
  equal to the phase, is an output only.
- **Multiply table loading.** The multiply unit's table is loaded by the
  host, as on the original board. It is not built into the RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/dex2_asm_pkg.sv`
holds the word encoders used to write test programs, and `Dex2Iss`, an
instruction-level reference model of both halves. The model applies both
words of an instruction at once, and each branch sees the condition codes
from two words earlier.

| testbench         | what it shows |
|-------------------|---------------|
| `tb_pe_sram`      | random reads and writes, one-tick read latency |
| `tb_phase_ctrl`   | 0..5 sequence, hold while halted, cycle count |
| `tb_alu_unit`     | random ADD/SUB/shift results and V/N/Z, codes held over other words |
| `tb_mul_unit`     | random products from a host-loaded table |
| `tb_mem_unit`     | LD/LDI/MV/ST and mirrored stores against a model memory |
| `tb_fetch_stage`  | PC sequence, every branch type with random codes, code-latch phase |
| `tb_decode_stage` | operand read, R0, both forwarding paths, both write phases, result mux |
| `tb_dex2_half`    | one half alone running scalar Fibonacci with a conditional restart; PC and registers every cycle, stores offered and mirrored |
| `tb_dex2_top`     | full default size. The two-issue Fibonacci program is checked tick-exact against register dumps every six ticks. A second program exercises every opcode, both forwarding paths, store mirroring, taken and untaken branches and an R0 destination. Each mechanism is counted, and one that never happens is a failure. Also compares the PC every cycle, all four register files, and both data memories with the reference model |
| `tb_bubble_sort`  | the two-issue, scalar and optimized scalar bubble sorts on the same random arrays; sorted result in both memories, cycle count equal to the model's word count, six ticks per cycle, two-issue faster |

On one random 24-word array, measured with `tb_bubble_sort`, the cycle
counts are:

- two-issue bubble sort: 2987 instruction cycles;
- scalar: 3159;
- optimized scalar (one NOP slot filled): 3135.

The gain is small. The loop is dominated by compare/NOP/branch sequences,
and these cannot be paired. An optimized two-issue version of the sort was
also published, but it is not included. As printed, it moves a decrement
of the outer index into the inner loop. Its swap then stores through the
wrong address, and the outer index never advances.

To run one test with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/dex2_pkg.sv tb/dex2_asm_pkg.sv \
  tb/tb_dex2_top.sv --top-module tb_dex2_top -o sim
./obj_dir/sim
```

For another test, swap in another `tb_*.sv` and its top module name. The
full-size top test loads two 64K-entry multiply tables through the host
port. It simulates about 1.3 ms of model time and takes well under a minute.

## Files

- `rtl/dex2_pkg.sv`: widths, opcodes, field extractors, condition-code
  type, branch decision.
- `rtl/pe_sram.sv`, `rtl/phase_ctrl.sv`, `rtl/fetch_stage.sv`,
  `rtl/decode_stage.sv`, `rtl/alu_unit.sv`, `rtl/mul_unit.sv`,
  `rtl/mem_unit.sv`: the blocks above.
- `rtl/dex2_half.sv`: one processor half.
- `rtl/dex2_top.sv`: both halves and the phase controller.
- `tb/`: the testbenches and the assembler/reference-model package.
