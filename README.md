# ROPE: a statically scheduled processor with a ring of pre-fetch elements

ROPE (Ring Of Pre-fetch Elements) is a processor for scientific code. It tries
to run one instruction every cycle with no cache, no branch predictor and no
scheduling hardware, even though its memories are slow and its code has a lot
of unpredictable, multi-way branching. There are two ideas behind it:

* **The compiler does all of the scheduling.** Every operation takes a fixed,
  known number of cycles. The hardware never checks whether an operand is
  ready; it writes each result exactly when the schedule expects it. The only
  thing that can hold the machine up is a *freeze*: either the next
  instruction has not arrived from memory yet, or a data-memory bank is still
  busy with an earlier request.
* **A conditional branch is split into three independent instructions.**
  *PRE-FETCH* starts fetching a possible target early. *Test* instructions
  set condition bits. *JUMP* picks the target whose condition mask matches
  those bits. Instruction memory is spread over a ring of small pre-fetch
  units, each with its own slow memory bank. The pre-fetches can therefore be
  issued many cycles before the jump, and all the targets of a 3- or 4-way
  jump can be waiting, fully fetched, when the jump issues. A taken jump then
  costs one instruction slot and no fetch time.

This repository holds synthesizable SystemVerilog for the whole processor: the
pre-fetch ring, the decoder, the pipelined data path and the banked, hashed
data memory. It also has a self-checking testbench for every block and an
end-to-end test that runs Livermore loop 24 (find the position of the minimum
of an array) at full size.

## Machine overview

```
             +------------------ data path ------------------------------+
             | instr_pointer  cond_bits  regfile  int_alu  fp_mul  fp_add |
             |                                    mem_interface --+       |
             +--------------------^----------------------------|---------+
                                  |                            | address_hash
                           instr_decoder                       | dmem_bank x NBANKS
                                  ^ instruction bus
   +----------------------- prefetch_ring ----------------------------+
   | -> prefetch_unit 0 -> prefetch_unit 1 -> ... -> prefetch_unit 31 --+ (wraps)
   |        imem_bank          imem_bank                 imem_bank       |
   +---------------------------------------------------------------------+
                ^ program-reload bus (writes any instruction address)
```

| Module | Role |
|---|---|
| `rope_top` | Wires everything together. Forms the freeze. Routes results to register-file write ports. |
| `prefetch_ring` | 32 `prefetch_unit`s, each with an `imem_bank`, connected in a ring. Drives the instruction bus. |
| `prefetch_unit` | Holds one instruction. Handles the start-fetch token, the activate token, PRE-FETCH and JUMP. |
| `imem_bank` | Instruction memory behind one unit. A fetch takes 6 cycles; a reload port writes it. |
| `instr_decoder` | Splits the instruction into its data op and control op. Gates both with *issue*. |
| `regfile` | 64 × 32-bit registers, several read and write ports. |
| `int_alu` | Integer add/sub/logic and signed tests, 2 cycles. |
| `fp_add` | IEEE single add/sub and compares, 4 cycles. |
| `fp_mul` | IEEE single multiply, 4 cycles. |
| `cond_bits` | 8 condition bits, written by test instructions. |
| `instr_pointer` | Address of the last issued instruction, read by `RDIP`. |
| `mem_interface` | One load/store per cycle, hash stage, bank-busy freeze, fixed 6-cycle load latency. |
| `address_hash` | Maps an address to (bank, row) by XOR-folding. |
| `dmem_bank` | One data bank: one operation at a time, then busy. |
| `stage_pipe` | Helper: a delay line that stalls with the freeze. |
| `rope_pkg` | Shared sizes, latencies, opcodes and instruction format. |

## The instruction word

Each 76-bit instruction (`instr_t` in `rope_pkg`) has two halves. Both take
effect in the cycle the instruction issues.

| Half | Fields (MSB first) | Bits |
|---|---|---|
| data op `dataop_t` | `op` 5, `rd` 6, `ra` 6, `rb` 6, `imm` 16 | 39 |
| control op `ctrlop_t` | `op` 2, `from_reg` 1, `label` 2, `mask` 16 (`care` 8, `value` 8), `addr` 16 | 37 |

Data ops:

| Group | Ops | Latency |
|---|---|---|
| Move path | `MOV rd←ra`, `LDI rd←sext(imm)`, `RDIP rd←instruction pointer` | 1 |
| Integer unit | `ADD`, `SUB`, `ADDI`, `AND`, `OR`, `XOR`, and signed tests `TLT`/`TGT`/`TEQ` | 2 |
| FP adder | `FADD`, `FSUB`, and tests `FTLT`/`FTGT` | 4 |
| FP multiplier | `FMUL` | 4 |
| Memory | `LD rd←mem[ra]`, `ST mem[ra]←rb` (no addressing modes) | 6 |

A test writes condition bit `rd` instead of register `rd`.

Control ops:

* **NEXT**: nothing to do. The ring passes execution on to the next address by
  itself.
* **PRE-FETCH** `addr (label; mask)`: the unit selected by the low bits of
  `addr` starts fetching `addr`. It stores `label` and `mask` and becomes a
  *target*. With `from_reg` set, the address comes from register
  `addr[5:0]`, which is how a procedure return or a computed target works.
* **JUMP** `label`: the target unit with this label whose mask matches the
  condition bits runs next.

A latency of *n* means an instruction issued in cycle *t* writes its result so
that an instruction issued in cycle *t + n* reads the new value. Registers are
read in the issue cycle. Nothing checks that a read comes after the matching
write; the program must be scheduled for the table above.

`RDIP` reads the instruction pointer, which holds the address of the
instruction issued just before it. So `RDIP` at address 9 gives 8.

## The pre-fetch ring

This is the part that makes ROPE different, and the part that needs the
closest reading.

### Where instructions live

There are `NUNITS = 2^n` units, 32 by default. Instruction address `A` lives
in the bank of unit `A mod 2^n`, at row `A / 2^n`. Only the row (the "high
address") travels around the ring. It passes unchanged from unit *i* to unit
*i+1*, except from the last unit to unit 0, where it is incremented. Once a
fetch of `A` starts on unit *i*, the neighbour to its right therefore knows it
must fetch `A+1`.

### State of one unit

| State | Meaning |
|---|---|
| `busy` | A fetch is under way. It completes 6 cycles after it started. |
| `target` | The word was requested by a PRE-FETCH. The unit waits for a JUMP with its label and ignores tokens from the left. |
| `holding` | The unit has fetched something since reset. Without it, an idle unit would look ready. |
| `active` | The unit holds the single *activate* token: its instruction is the one to issue. |

The unit also stores the address it holds or is fetching, the instruction,
the jump label and the condition mask.

### Two kinds of token

* **Start-fetch tokens** fetch straight-line code ahead of execution. A unit
  that starts a fetch sends `start_fetch_right` with its address one cycle
  later. A non-target unit receiving it starts fetching the next address, and
  so on around the ring. One unit per cycle is the same rate at which
  execution moves, so a wave launched early enough keeps every following
  instruction ready. A target unit swallows the token, which ends the wave.
  Several waves can be moving at once.
* **The activate token** marks the instruction being executed. When the
  active unit is ready and nothing is frozen, its instruction issues. On the
  same clock edge the token moves to the right neighbour, which can issue in
  the next cycle. The exception is a JUMP: it holds the token back and hands
  it to the matching target instead.

### Rules applied on each clock edge

1. A PRE-FETCH (`start_fetch_top`) makes the unit a target and starts the
   fetch. It wins over a start-fetch token from the left in the same cycle.
2. A start-fetch token from the left starts a fetch on a non-target unit. If
   that unit is busy, its running fetch is aborted. A target unit ignores the
   token.
3. A JUMP is compared by every target unit with the same label:
   * If the mask matches, the unit becomes active (and stops being a
     target). If its fetch is still running, the processor freezes until the
     fetch is done.
   * If the mask does not match, the unit becomes a non-target and fetches
     the address coming from its left neighbour. This fills its slot in
     whatever straight-line code passes through.
4. A fetch of the address a unit already holds, or is already fetching, does
   not restart the bank. The token is still passed on. Loops rely on this:
   re-issuing the PRE-FETCH of a loop head that is already loaded costs
   nothing, and so does the wave that re-covers it.
5. If the active unit is not ready, it raises `stall`, and the processor
   freezes.

### Timing to schedule against

* A PRE-FETCH issued in cycle *t* makes its unit ready in cycle *t + 6*. A
  JUMP issued in cycle *t + 5* therefore runs the target in *t + 6* with no
  lost cycle. A JUMP issued earlier freezes the machine for the difference.
* The instruction after the target is fetched by the wave that the target
  launched, one cycle behind it. Straight-line code after a target is
  therefore also ready on time.
* A *k*-way jump with a 6-cycle fetch needs about 6·*k* free units: each
  target plus the 5 units to its right must be loading. With 32 units, a
  4-way jump (24 units) fits.
* Code placement is the compiler's problem. All the targets of one jump must
  sit in different, non-overlapping stretches of the ring. Code reached from
  several places may have to be duplicated.

### Freeze and the ring

A freeze stops issue, the activate token and every functional-unit pipeline.
It does **not** stop start-fetch tokens or running fetches. Straight-line
code keeps being fetched while the machine waits, so the wait is not paid
again at the next instruction.

The price is that every freeze cycle moves a wave one more unit ahead of
execution. A wave that gets a whole ring (32 units) ahead starts overwriting
instructions that have not been executed yet. A program must therefore keep
this sum below `NUNITS`: the cycles between launching a wave and executing
its first instruction, plus the freeze cycles before the wave is swallowed by
a target unit. At the default sizes that is about 25 freeze cycles in one
straight-line stretch. Loops stop their waves at their own targets on every
iteration, so they are not affected.

### Reset and program loading

Reset leaves unit 0 active and its bank fetching address 0, as if a
start-fetch had just arrived. The first instruction issues five cycles after
reset is released. The program is written through the reload bus
(`load_we`, `load_addr`, `load_data`), one instruction per cycle. Do this
while `rst_n` is low.

## Condition bits and masks

The 8 condition bits are plain registers. They are set only by test
instructions, never as a side effect. A PRE-FETCH carries a mask made of two
8-bit fields, `care` and `value`. At the JUMP the unit matches when every bit
selected by `care` equals the same bit of `value`:
`((cond ^ value) & care) == 0`. One AND-term per target covers the usual
cases. For example, the three targets of `if x goto A elif y goto B else C`
are `C: x`, `B: !x && y`, `A: !x && !y`. A condition that needs an OR of
several such terms does not fit one mask: the program has to fold it into a
single test first, by combining values in registers.

Two bits of jump label let up to four jumps be prepared at once, with their
pre-fetches interleaved.

## Data path

* **Register file**: 64 × 32 bits. The top uses 4 read ports (`ra`, `rb`,
  the PRE-FETCH address register, and a host observation port) and 5 write
  ports (move path, integer unit, FP adder, FP multiplier, loads). Every unit
  can retire a result in the same cycle. If two ports write one register, the
  higher-numbered port wins. A correct schedule never does this.
* **Pipelines**: every unit accepts one operation per cycle. A freeze holds
  all pipelines in place, so a result is still written the scheduled number
  of *issued* cycles after its instruction.
* **Floating point**: IEEE-754 single precision with round to nearest even.
  Subnormal inputs and results are flushed to zero. There is no NaN or
  infinity handling: overflow gives an all-ones exponent with a zero
  fraction.

## Data memory

* `NBANKS = 8` banks. Each bank does one operation at a time and is then busy
  for 4 cycles. Different banks work in parallel.
* A request first spends one cycle in the address hash. The bank number is
  the XOR of all 3-bit slices of the address, and the row is the address
  without its low 3 bits. Each row thus holds one word from every bank, and
  strides that are a multiple of 8, which would hit a single bank with
  low-bit interleaving, are spread out. `HASH = 0` selects plain low-order
  interleaving.
* If the request's bank is still busy, `mem_freeze` stops the whole machine
  until the bank is free. Bank time runs during the freeze.
* Load data passes through a delay line that moves only when not frozen, so
  a load always delivers its value 6 issue cycles after it issued. Stores
  write the bank when they start. Loads and stores are performed in issue
  order.
* A host port (`host_*` on the top) reads and writes the data memory through
  its own copy of the hash, with no pipeline stage and no busy check. It is
  meant for loading data and reading
  results while the program is not running.

## Simulating

Any recent Verilator 5 works. From the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/rope_pkg.sv tb/rope_asm_pkg.sv tb/tb_rope_top.sv --top-module tb_rope_top
./obj_dir/Vtb_rope_top
```

Replace `tb_rope_top` with any other testbench. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops. Each has a watchdog that
counts a failure if the run hangs. `tb/rope_asm_pkg.sv` has small helpers
(`ins`, `pf`, `pfr`, `jmp`, `nop`) for writing programs as instruction words.

| Testbench | What it shows |
|---|---|
| `tb_rope_top` | Livermore loop 24 on the full default machine (see below). |
| `tb_rope_bsearch` | Binary search: 24 keys in a sorted array of 31 integers, three arrays. Every level ends in a four-way jump. Results, jump outcome counts and the 13-cycle level time are checked. |
| `tb_rope_bubble` | Bubble sort of 24 floats: random, sorted and reversed. Every compare ends in a four-way jump. Sorted memory, swap counts and the 13-cycle compare time are checked. |
| `tb_rope_matmul` | 4 x 4 single-precision matrix product, three random pairs. Every element of C is checked bit-exactly against a rounded reference, and each 26-cycle column step is checked. |
| `tb_prefetch_ring` | The 3-way jump example on 32 units. Each outcome follows the right address sequence across the ring wrap, with no lost cycle. A deliberately early jump loses exactly one cycle. |
| `tb_prefetch_unit` | Every rule of one unit, each in a directed case. |
| `tb_mem_interface` | Random loads and stores with frequent bank conflicts. The freeze is predicted cycle by cycle by an independent model, and load latency is checked. |
| `tb_int_alu`, `tb_fp_add`, `tb_fp_mul` | Random operands under random freezes against reference arithmetic, with exact latency. `tb_fp_mul` includes rounding ties. |
| `tb_regfile`, `tb_cond_bits`, `tb_instr_pointer`, `tb_address_hash`, `tb_dmem_bank`, `tb_imem_bank`, `tb_instr_decoder` | Unit-level random and directed checks. |

### Livermore loop 24 end to end

The program finds the first position of the minimum of an array of 40
floats. It is run twice: once on random data, and once with the last element
as the minimum. The loop body is 11 instructions. It loads `x[k]`, increments
`k`, pre-fetches the four targets of one 4-way jump, and tests `k > n` and
`x[k] < xm`. Its targets are:

* the loop head itself (no refetch needed, thanks to rule 4)
* an update block, which ends in a JUMP back to the loop across the wrap from
  unit 31 to unit 0
* an update followed by the exit
* the exit

The exit stores the results, provoking one bank conflict, and uses both FP
units. It leaves through a PRE-FETCH taken from a register that was filled by
`RDIP`.

The testbench checks the stored results and the exact number of cycles:
11 per element, 6 more per update, and no freeze inside the loop. It also
counts how often each mechanism happened and fails if any never did:

```
m=20 updates=2 cycles=467 (11.31 per element)
m=40 updates=6 cycles=487
mechanisms: boot_stall=10 mem_freeze=3 jumps=93 ->L=69 ->U=7 ->XU=1 ->X=1 same_addr_prefetch=78 wrap=7 pf_reg=2 rdip=2
TB_RESULT checks=36 failures=0
```

The original ROPE proposal reaches 5 cycles per element on this loop. It gets
there by unrolling three times and by compiler transformations that this
hand-written schedule does not attempt. The 11 cycles here come from the
6-cycle load and the 4-cycle compare in series, with one loop test per
element.

### Binary search, bubble sort and matrix multiplication

These three programs share one pattern. A loop body that ends in a
data-dependent jump exists in two copies, one for each action the last
outcome asks for. A single four-way JUMP picks between the two copies and
two exit blocks. This way the machine never spends a cycle deciding what to
do next.

* **Binary search** (`tb_rope_bsearch`) moves by steps 16, 8, 4, 2, 1. The
  next step comes from a small table in data memory.
* **Bubble sort** (`tb_rope_bubble`) keeps the running maximum in a register,
  so each compare costs one load and one store.
* **Matrix product** (`tb_rope_matmul`) keeps a row of A in registers. It
  overlaps the four loads of a column of B with the multiplies and adds of
  the element before.

```
binary search   cycles=2138 for 24 searches (5 levels each)
                mechanisms: ->NT=221 ->NS=139 ->XT=40 ->XS=32 halt=3 exit_fetch_freeze=144 mem_freeze=363 frozen_iterations=115 wrap=253
bubble sort     kind=0 swaps=132 cycles=4044 (276 compares, 14.65 cycles each)
matrix product  cycles=513 for 16 elements of C (64 multiply-adds)
                mechanisms: ->J=48 ->XI=12 ->R=15 halt=3 fetch_freeze=0 mem_freeze=9 frozen_iterations=3
```

## Parameters

| Parameter | Default | Where | Origin |
|---|---|---|---|
| `NUNITS` | 32 | `rope_top`, `prefetch_ring` | The proposal suggests 32 or 64. |
| `LAT_IFETCH` | 6 | `rope_pkg` | Non-sequential instruction fetch time of the proposal. |
| `LAT_INT`, `LAT_FADD`, `LAT_MEM`, `LAT_MOV` | 2, 4, 6, 1 | `rope_pkg` | Operation times of the proposal. |
| `LAT_FMUL` | 4 | `rope_pkg` | Own choice; no multiply time is given. |
| `LABEL_W` | 2 | `rope_pkg` | The proposal: "two or three bits". |
| `NCOND`, `NREG`, `XLEN` | 8, 64, 32 | `rope_pkg` | Own choice. |
| `IADDR_W`, `DADDR_W` | 16, 16 | `rope_pkg` | Own choice. |
| `NBANKS`, `BANK_BUSY`, `HASH` | 8, 4, 1 | `rope_top` | Own choice. The hash is an option in the proposal; the hash function is own. |

`NUNITS` must be a power of two. Changing a latency in `rope_pkg` changes the
hardware; programs (and `tb_rope_top`) must then be rescheduled.

## How this design relates to the original ROPE proposal

The proposal describes the ring, the unit's signals and rules, the three
control ops, the data-path organisation, the banked memory with freeze and
optional hash, and the operation times. Those are built as described. The
following are this design's own choices, because the proposal leaves them
open:

* The instruction encoding and the set of data ops.
* Word widths, register and condition-bit counts, and address widths.
* The condition-mask coding. The proposal explicitly leaves it unsettled.
* The `holding` and `active` bits of a unit, and the reset/boot sequence.
* Exactly when the activate token moves: on the issue edge, so the next
  instruction issues in the next cycle.
* That a freeze does not stop start-fetch tokens.
* The hash function, bank count and bank busy time. The hash cycle is counted
  inside the 6-cycle load time.
* The FP multiply latency, and the FP number format and rounding.

## Limits

* No interrupts, traps, virtual memory or I/O. The proposal hands these to
  separate, slower service processors, which are not part of this design.
  The reload bus, the host data port and the register observation port are
  where they would connect.
* No data caches. Banks always finish on time, so the only data-memory
  freeze is a busy bank.
* The instruction banks model the 6-cycle access with a counter, not the
  strobes of a real DRAM.
* Nothing detects a badly scheduled program. Examples: reading a register
  before its result arrives; two targets matching one JUMP; no target
  matching (the machine then waits forever); two results reaching one
  register in the same cycle; a start-fetch wave lapping execution.
  `prefetch_ring` asserts only that exactly one unit is active.
* The four whole programs (Livermore loop 24, binary search, bubble sort and
  matrix multiplication) were scheduled by hand, not by a compiler. The
  proposal gives no sizes for the last three, so the sizes are this design's
  own choice: 31 elements, 24 elements and 4 x 4.
* Hand placement did not avoid every data-bank conflict. Some binary-search
  levels and one matrix step per run lose a few cycles to a busy bank. The
  testbenches count these cycles and accept exactly them.
