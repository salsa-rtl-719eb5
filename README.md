# SALSA: a programmable systolic array for sequence alignment

SALSA is an accelerator for dynamic-programming sequence alignment
(Smith-Waterman, Needleman-Wunsch and their variants). It sits next to a
RISC-V host core as a co-processor. The host sends it RoCC-style custom
commands: a 7-bit function code plus two 64-bit operands. The main idea is a
fixed pipeline with a programmable systolic array. A linear chain of
processing elements (PEs) works in lock-step. Each PE holds one character of
the query. The database sequence streams through the chain one PE per clock,
so the array computes a whole anti-diagonal of the scoring matrix every cycle.
Alignment-specific ALUs do one matrix cell per clock. A general-purpose ALU
next to them lets software build other algorithms from the same hardware,
for example reductions, moves and boundary set-up.

This SystemVerilog follows the architecture of the SALSA paper ("SALSA: A
Domain Specific Architecture for Sequence Alignment", Di Tucci et al.). The
original was written in Chisel and published as an architecture, with no
instruction encoding, register roles or handshakes. Everything at that level
is this implementation's own, and the sections below say where.

The default configuration is the one the paper evaluates:

| parameter | default | meaning |
|---|---|---|
| `NUM_PE` | 160 | processing elements in the array |
| `PES_PER_GROUP` | 32 | PEs served by one sub-dispatcher and one sub-collector |
| `NUM_GLOBAL` | 16 | 32-bit global registers, read by every PE |
| `NUM_PRIV` | 20 | 32-bit private registers per PE |
| `NUM_OUT` | 5 | the last 5 private registers are output registers |
| `NUM_SHARED` | 6 | 32-bit shared output registers per PE |
| `FIFO_DEPTH` | 128 | 64-bit words in the array's input FIFO |
| `MEM_W` (package) | 64 | memory transaction width, one word per transaction |
| `ADDR_W` (package) | 40 | byte address width |

## How an alignment runs on the array

This is the part to understand first; everything else exists to feed it.

For a query `q` of length M and a database `d` of length N, PE *i* is
responsible for row *i+1* of the scoring matrix H. Database character
`d[j]` enters PE 0 at some step and moves one PE to the right per step. When
it reaches PE *i*, that PE computes H(i+1, j+1). The PE needs three
neighbours:

* **up**, H(i, j+1): computed by PE *i-1* one step earlier. It is in that
  PE's shared output register `S1`, which PE *i* reads directly.
* **diag**, H(i, j): the left neighbour's previous score. The PE copied it
  into its private register `P2` at the previous step.
* **left**, H(i+1, j): the PE's own last result, in `P1`.

The PE then passes the character (`S0`) and its new score (`S1`) on to the
right. A **valid bit** travels with the shared registers. An alignment ALU
updates a cell only when its left neighbour's valid bit is set. This makes
the start and the end of the wave exact: every PE sees every database
character exactly once, no matter how many steps the instruction runs.

The fixed register roles are defined in `salsa_pkg`:

| register | role |
|---|---|
| `P0` | query character of this PE |
| `P1` | H(i, j-1), own last score |
| `P2` | H(i-1, j-1), diagonal |
| `P3` | E(i, j-1), horizontal gap state (affine ALU only) |
| `P4` | running maximum of this PE's scores |
| `P15..P19` | output registers (with valid bits) |
| `S0`, `S1`, `S2` | character, H, and F (vertical gap, affine only) passed to the right |
| `G0..G4` | match score, mismatch score, linear gap, gap open, gap extension |

**Boundaries.** Column 0 of the matrix comes from values the program loads
into `P1` and `P2` of each PE:

* Smith-Waterman: zero.
* Needleman-Wunsch: `-(i+1)*gap` and `-i*gap`.

Row 0 comes from the **data selector** that feeds PE 0. Besides the database
character on lane 0, it drives two more lanes:

* Lane 1 (H) carries a running boundary score that grows by a signed step per
  element. Zero gives Smith-Waterman. Minus the gap gives the
  Needleman-Wunsch row `-j*gap`.
* Lane 2 (F) carries a very negative constant, so there is no vertical gap
  before row 1.

**The three alignment ALUs** compute, in one clock:

* SW: `H = max(0, diag + s, up - g, left - g)`.
* NW: the same without the zero.
* Affine SW (Gotoh): `E = max(E_left - ext, H_left - open)`,
  `F = max(F_up - ext, H_up - open)`, `H = max(0, diag + s, E, F)`.

Here `s` is the match score if the two characters are equal and the mismatch
score otherwise. A gap of length k costs `open + (k-1)*ext`.

**Getting results out.** A PE sends a value to memory by writing one of its
last `NUM_OUT` private registers with the instruction's *emit* flag set. This
raises the register's valid bit. With emit, the alignment ALUs write every H
into `P15`. Sub-collectors take the valid values, one per clock per group of
32 PEs, and clear the valid bits. The PE collector merges the groups
round-robin. The Load/Store unit writes each value to memory as one 64-bit
word `{pe[15:0], reg[7:0], 8'h00, value[31:0]}` at consecutive addresses from
the store base. Values of one PE leave in the order they were produced, and
the tag says which PE produced each one.

**Stalls.** The array is lock-step, so it has a single step signal. A step is
withheld when:

* the instruction feeds from the selector and the next element has not yet
  come out of the FIFO (a *data stall*), or
* the instruction emits and any output register is still waiting to be
  collected (an *output stall*).

The output stall is how a 64-bit memory port slows the whole array down when
every cell is stored. When only a maximum is wanted (MaxScore), nothing is
emitted during the sweep. The array then runs at one step per clock, and only
the data stall can hold it.

**MaxScore as a program.** MaxScore shows how the general-purpose ALU
combines with an alignment ALU:

1. A Smith-Waterman sweep without emit leaves each PE's row maximum in `P4`.
2. `S4 <= P4` runs for one step.
3. `S4 <= max(P4, left.S4)` runs for M-1 steps. Each step widens every PE's
   window by one neighbour, so the last query PE ends with the overall
   maximum.
4. A single-PE instruction copies it into an output register with emit. That
   value is the only word stored.

## Pipeline

Commands pass through four stages, with FIFOs between them. A full FIFO
stalls its producer.

1. **Fetch & Decode** (`salsa_fetch_decode`) accepts a command when its
   4-entry buffer has room and decodes it into an `instr_t` record. It drops
   unknown function codes and counts them (`bad_cmd_cnt_o`).
2. **Dispatch** (`salsa_dispatcher`) sends each instruction, in order, to a
   2-entry Load/Store queue or a 2-entry Compute queue. It lets loads and
   computation overlap unless they depend on each other:
   * a load into the FIFO never waits;
   * a load into PE or global registers waits until no compute instruction
     is outstanding;
   * a compute instruction waits until no register load is outstanding;
   * `STBASE` waits until every collected output has been stored;
   * `FENCE` waits until everything is idle.
   Counters raised at issue and lowered by the units' done pulses track what
   is outstanding.
3. **Load/Store** (`salsa_load_store`) owns the memory port. It keeps one
   transaction outstanding, and its multi-word loads step the address by
   8 bytes:
   * A register load steps the PE index per word, or writes every PE for a
     broadcast. It takes the low 32 bits of each word, or the high 32 bits
     if asked.
   * A global load steps the register index per word.
   * A FIFO load pushes whole words, but requests a word only when the FIFO
     has room for it.

   Pending stores go first between the words of a load. Without that, a
   FIFO load waiting for room could block the results that the stalled
   array is waiting to hand off.
4. **Compute** (`salsa_compute_unit`) holds these parts:
   * the PE dispatcher: one register stage, routing to a global register,
     the FIFO or the PE write bus;
   * one sub-dispatcher per 32 PEs: one register stage, decoding per-PE
     write enables and the instruction's active PE range;
   * the global registers, the 128 x 64 FIFO and the data selector;
   * the PE chain;
   * the sub-collectors and the PE collector;
   * the step controller.

   A compute instruction starts only when no register write is still in
   the dispatchers' pipeline. It then takes `steps` steps.

## Instruction encoding

The command's `funct` field selects the operation. The layout of `rs1` and
`rs2` is this implementation's choice.

| funct | name | rs1 | rs2 |
|---|---|---|---|
| 0 | `LOAD` | [39:0] byte address | [15:0] word count (0 = 1), [23:16] PE, [28:24] register, [30:29] type (0 private, 1 shared, 2 global, 3 FIFO), [31] broadcast, [32] take high half |
| 1 | `STBASE` | [39:0] address where collected outputs go | — |
| 2 | `COMP` | [1:0] ALU (0 GP, 1 SW, 2 NW, 3 affine SW), [5:2] GP op, [12:6] operand A, [19:13] operand B, [26:20] destination, [27] emit, [28] feed, [39:32] first PE, [47:40] last PE, [53:48] element width | [23:0] steps, [39:24] elements fed, [63:48] signed boundary step |
| 3 | `FENCE` | — | — |

Operands are `{type[1:0], index[4:0]}`. The types are 0 private, 1 own
shared, 2 global, 3 the left neighbour's shared register. PE 0's left
neighbour is the selector. Destinations are private or shared registers.

The general-purpose operations are ADD, SUB, MAX, MIN, AND, OR, XOR,
PASS A, EQ, LT, SHL and arithmetic SHR.

The element width is 1 to 32 bits and must divide 64; 0 means 32. Elements
are taken from the least significant end of each FIFO word. When the element
count runs out in the middle of a word, the rest of that word is dropped, so
each sequence should start on a word boundary.

A Smith-Waterman run with every cell stored is, for example:

```
LOAD  globals (5 words)          -> G0..G4
LOAD  query (M words)            -> P0 of PEs 0..M-1
LOAD  zero, broadcast            -> P1, P2, P4 (and NEG_INF -> P3 for affine)
STBASE result buffer
COMP  alu=SW emit feed PEs 0..M-1 width=2 steps=N+M-1 elements=N
LOAD  packed database            -> FIFO   (may follow the COMP: it streams in)
FENCE
```

## Interfaces and timing (`salsa_top`)

* **Host**: a command transfers on `cmd_valid_i && cmd_ready_o`, carrying
  `cmd_funct_i`, `cmd_rs1_i` and `cmd_rs2_i`. `busy_o` is high while any
  instruction, load, computation or store is still in progress. There is no
  response channel: software waits for `busy_o` to fall, or uses `FENCE`
  and then reads memory.
* **Memory**: a request transfers on `mem_req_valid_o && mem_req_ready_i`,
  with `mem_req_we_o`, `mem_req_addr_o` (byte address, 8-byte aligned) and
  `mem_req_wdata_o`. A raised request holds still until accepted; an
  assertion checks this. Reads return one beat on `mem_resp_valid_i`, in
  order, any number of cycles later. Writes complete on acceptance. No
  bursts.
* **Status**: `step_o`, `stall_data_o` and `stall_out_o` show the array
  controller's decision each cycle. `dep_stall_o` shows the dispatcher
  holding an instruction back for a dependency.
* **Clock and reset**: everything is on `clk_i`. Reset is synchronous and
  active low (`rst_ni`), and clears every register, including all PE
  registers.

Latencies:

* A command reaches the dispatcher 1 cycle after it is accepted.
* A loaded word reaches a PE register 3 cycles after the memory response:
  Load/Store register, PE dispatcher, sub-dispatcher.
* A compute step updates every active PE in the same clock.
* An emitted value is taken by its sub-collector at the earliest 1 cycle
  later.

## Measured behaviour

The end-to-end testbench uses a memory with a read latency of 3 cycles that
withholds `ready` on a quarter of the cycles at random. Under it the full
160-PE design takes:

| run (query x database) | cycles, first command to fence |
|---|---|
| SW 32x64, all cells stored | about 5,000 |
| SW 64x128, all cells stored | about 19,400 |
| MaxScore 32x64 | about 370 (95 array steps) |
| MaxScore 64x128 | about 690 (191 array steps) |

NW and affine SW match SW to within a few percent.

Storing every cell through a 64-bit port makes the array wait on the output
stall most of the time. The paper reports the same memory-bound behaviour.
These counts include loading the query and constants, and they depend on the
memory model. They are not a reproduction of the paper's timings.

## Where this implementation departs from the source or fills gaps

* All encodings, register roles, the valid bit, the boundary lanes of the
  selector, the output word format, the dispatcher's dependency rules, the
  collection order and all handshakes are this implementation's own.
* The paper mentions PEs writing outputs and results going to the
  Load/Store unit, but not their format or ordering.
* Alignment ALUs are single-cycle. The paper allows user ALUs to be
  multi-cycle; that is not provided.
* A compute instruction names an active PE range. The paper only says that
  all PEs do the same operation in parallel.
* The range is needed so that PEs beyond the query stay out of an alignment,
  and so that one PE alone can emit a result.
* The ALU select field is 2 bits and all four codes are in use. Adding a
  user ALU means widening `alu_sel_e`, adding the module and a case in
  `salsa_pe`.
* The memory width and address width are package constants (`MEM_W`,
  `ADDR_W`), not module parameters. The paper treats a wider port (for
  example 512 bits) as a build-time option. Here the store word format and
  the selector assume 64 bits.
* The host core and the memory controller are outside the design. The
  testbenches use a behavioural memory model (`tb/salsa_mem_model.sv`).
* Host commands have no response path (RoCC's `rd` write-back is unused);
  completion is visible on `busy_o`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_salsa_top` | full 160-PE design, end to end (below) |
| `tb_salsa_compute_unit` | 8 PEs in two groups: SW with every cell collected under back-pressure, data and output stalls, GP broadcast and single-PE emit |
| `tb_salsa_pe` | register writes, operand types, emit/valid/clear, a SW row against a reference, inactive PE |
| `tb_salsa_sw_alu`, `tb_salsa_nw_alu`, `tb_salsa_swa_alu`, `tb_salsa_gp_alu` | the ALUs against their equations on random inputs |
| `tb_salsa_data_selector` | element order for widths 2/4/8/16/32, boundary lane, data stall, dropping the tail of a word |
| `tb_salsa_load_store` | multi-loads of each type, high half, broadcast, FIFO room, stores, done pulses |
| `tb_salsa_dispatcher` | each dependency rule and queue-full blocking |
| `tb_salsa_fetch_decode` | field decoding of random commands, dropped unknown codes, full buffer |
| `tb_salsa_pe_subdispatcher`, `tb_salsa_pe_dispatcher`, `tb_salsa_pe_subcollector`, `tb_salsa_pe_collector`, `tb_salsa_fifo`, `tb_salsa_global_regs` | routing, ordering, round-robin, flags |

`tb_salsa_top` runs at the default parameters. A host model programs
SW, NW, affine SW and MaxScore on random DNA sequences of 32x64 and 64x128.
It compares every stored cell, or the single MaxScore result, with matrices
computed in the testbench. It also requires each mechanism to occur at least
once:

* data stall;
* output stall;
* dependency stall;
* memory back-pressure;
* memory traffic during array steps;
* a dropped unknown command.

It finishes in a few seconds of simulation.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/salsa_pkg.sv tb/tb_salsa_top.sv --top-module tb_salsa_top
./obj_dir/Vtb_salsa_top
```

Replace `tb_salsa_top` with any other testbench name. Testbenches start from
random register contents (`+verilator+rand+reset+2` exercises this), so
everything the design reads is reset or loaded first.

## Files

* `rtl/salsa_pkg.sv`: widths, opcodes, register roles, the instruction and
  transfer records.
* `rtl/salsa_top.sv`: the accelerator.
* `rtl/salsa_fetch_decode.sv`, `salsa_dispatcher.sv`, `salsa_load_store.sv`:
  the front stages.
* `rtl/salsa_compute_unit.sv`: the compute unit.
* `rtl/salsa_pe_dispatcher.sv`, `salsa_pe_subdispatcher.sv`,
  `salsa_global_regs.sv`, `salsa_data_selector.sv`: the input side of the
  compute unit.
* `rtl/salsa_pe_subcollector.sv`, `salsa_pe_collector.sv`: the output side
  of the compute unit.
* `rtl/salsa_pe.sv`, with `salsa_gp_alu.sv`, `salsa_sw_alu.sv`,
  `salsa_nw_alu.sv`, `salsa_swa_alu.sv`: the processing element and its ALUs.
* `rtl/salsa_fifo.sv`: the synchronous FIFO used throughout.
* `tb/`: the testbenches and the memory model.
