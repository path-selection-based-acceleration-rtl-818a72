# Path-selection branching on a 4x4 CGRA

A coarse-grained reconfigurable array (CGRA) runs loop kernels by giving
every processing element (PE) one instruction per cycle. Loops that contain
an if-then-else are awkward for such arrays. Predication executes both paths
and throws one result away. Dual-issue schemes fetch an instruction from
each path for every PE, every cycle, and drop one.

This design uses **path-selection-based branching (PSB)**. One designated PE
executes the branch condition and sends the outcome to the instruction fetch
unit (IFU). The branch also carries the length K, in cycles, of the
conditional paths. After one delay slot, the IFU fetches only the rows of
the path that was taken and jumps over the other. The else-path and the
if-path of a conditional share PEs, because only one of them ever reaches
the array. A modulo-scheduled loop therefore needs fewer PEs, or a shorter
initiation interval (II).

The RTL has these parts:

- a 4x4 array of PEs in a torus;
- an IFU with path selection;
- an instruction memory that holds one word per PE per row;
- one data memory bank per array row;
- self-checking testbenches for every module. The top-level test runs the
  reference example loop in both a pipelined and a non-pipelined
  arrangement.

## How a conditional executes

A conditional is written as a branch row, one delay-slot row, and a
*region* of 2K rows: first the else-path (K rows), then the if-path
(K rows). Both paths last exactly K cycles, padded with idle rows if
needed.

```
cycle   row issued             what happens
  1     BLT a, b | K           designated PE computes a < b; outcome and K are
                               registered in the PE at the end of the cycle
  2     delay slot             any work that does not depend on the outcome;
                               the IFU sees outcome+K and picks the next address
  3..   else rows  (a >= b)    base .. base+K-1, then jump to base+2K
        if rows    (a <  b)    jump to base+K, issue K rows, continue at base+2K
```

The total cycle count of a loop never depends on its branch outcomes,
because both paths take K cycles. The IFU therefore stops after a fixed
budget of rows (`cfg_cycles`).

Two region placements are supported. `cfg_modulo` selects one:

* **`cfg_modulo = 0`: region right after the delay slot.** This is the
  non-pipelined arrangement. For the example loop below, the rows are
  `0: branch`, `1: delay slot`, `2-3: else`, `4-5: if`. A not-taken
  iteration issues `0 1 2 3`. A taken iteration issues `0 1 4 5`.
* **`cfg_modulo = 1`: the loop body is the region.** This is the
  modulo-scheduled arrangement. The loop body holds two versions of the
  kernel, each II = K rows long: an else-version at `cfg_loop_start` and an
  if-version K rows later. Each version contains the branch of the *next*
  iteration. Each branch therefore picks the version used for the next pass,
  and the delay slot is the second row of the current pass. A prologue before
  the loop supplies the first branch.

A branch that resolves while a path is still being issued starts a new
region at once. This is what lets consecutive passes of the modulo kernel
chain. A branch with K = 0 is ignored. An address computed past
`cfg_loop_end` wraps once into the loop.

Only one PE, at row 0 column 1, is wired to the IFU. A mapping can be
shifted across the torus so that the branch lands on that PE. For a second,
independent condition, `BRP` branches on a predicate that arrives over the
predicate network from any other PE.

### Example: the reference loop at II = 2

```
for i: a[i] = a[i-1] + C1;  b[i] = b[i-1] - C2;
       if (a[i-1] < S) c[i] = b[i] * c[i-1] - C3;      // yt, ct
       else            c[i] = a[i] * C4 - b[i] * C5;   // xf, yf, cf
```

The loop uses PEs 0-3 of row 0, which form a ring through the torus. PE 1
is the designated PE. The paired operations share PEs: `yt` and `yf` both
run on PE 3, and `ct` and `cf` also run on PE 3, so no select operation is
needed.

| row | PE 0          | PE 1 (branch)      | PE 2          | PE 3              |
|-----|---------------|--------------------|---------------|-------------------|
| 3 F | xf = a * C4   | BLT a, S \| 2      | idle          | yf = b * C5       |
| 4 F | idle          | a = a + C1         | b = b - C2    | cf = xf - yf      |
| 5 T | idle          | BLT a, S \| 2      | idle          | yt = b * c        |
| 6 T | idle          | a = a + C1         | b = b - C2    | ct = yt - C3      |

Rows 0-2 are the prologue: initial values, the first branch, and the first
a/b update. A fifth PE, at row 1 column 3, stores each c into its row's
memory. `tb/tb_psb_cgra.sv` runs this program for 30 iterations in
3 + 2*30 cycles. It also runs the non-pipelined version at 4 cycles per
iteration. A third variant computes the condition on another PE and routes
it as a predicate, at 5 cycles per iteration. A fourth variant nests a
conditional inside the if-path, with K = 3. The inner conditional is handled
by partial predication: both alternatives are computed, a neighbour's
predicate drives a `SEL`, and the outer conditional still uses path
selection. This is the intended treatment of nested conditionals, where only
the outermost level is fused.

## Organisation

```
            +------------------- instruction row (16 words) -----------------+
            |                                                                 |
  host ---> psb_imem (64 rows x 16 PEs) <--- fetch address --- psb_ifu <-- br (valid, taken, K)
                                                                  ^            |
  host ---> psb_dmem x 4 (one per row) <--- row bus ---> psb_array (4x4 torus of psb_pe)
```

| module      | role |
|-------------|------|
| `psb_pkg`   | sizes, opcodes, operand-source codes, instruction/branch/memory structs |
| `psb_cgra`  | top level: IFU, instruction memory, array, four data banks, host ports |
| `psb_ifu`   | fetch sequencing, loop wrap, path selection, cycle budget |
| `psb_imem`  | instruction memory; synchronous row read, per-PE host write |
| `psb_array` | 4x4 PEs, torus links for data and predicates, row buses, designated PE |
| `psb_pe`    | operand and predicate muxes, FU, register files, output registers, branch registers |
| `psb_fu`    | combinational functional unit |
| `psb_rf`    | register file (data: 4x32 bit; predicates: 4x1 bit) |
| `psb_dmem`  | one data bank: single-cycle row port, host port |

### The PE

Each PE has two data operand muxes and a predicate mux.

Each data operand mux can select any of these sources:

- the output register of the north, south, east or west neighbour;
- the PE's own output register;
- its register file;
- its row's data bus;
- the sign-extended immediate.

The predicate mux can select any of these:

- a neighbour's predicate output;
- the PE's own predicate output;
- its predicate register file;
- constant 1 or 0.

Results go to the output register. They can also be written into the
register file. Comparisons also set the predicate output register, and
their result can be written into the predicate register file. Idle cycles,
stores and branches leave the output register unchanged, so a value stays
readable by the neighbours.

A load or store uses operand A as the address and operand B as the store
data. A load completes in the same cycle: the bank has an asynchronous
read. The word a row's bank delivered is offered to all PEs of that row as
the `BUS` operand in the next cycle. Only one PE per row should access
memory in a cycle. On a conflict the lowest column wins, and an assertion
reports it.

Operations: `NOP ADD SUB MUL AND OR XOR SHL SRL SRA MOV SEL LT LTU EQ NE
LOAD STORE BLT BRP`. `SEL` (`p ? A : B`) is the select operation of partial
predication, which remains available for small or nested conditionals
inside a path. `BLT` branches on signed A < B. `BRP` branches on the
selected predicate.

### Instruction word (`instr_t`, 44 bits, MSB first)

| field    | bits | meaning |
|----------|------|---------|
| `op`     | 5 | operation |
| `src_a`  | 3 | N, S, E, W, SELF, RF, BUS, IMM |
| `src_b`  | 3 | as `src_a` |
| `src_p`  | 3 | N, S, E, W, SELF, PRF, ONE, ZERO |
| `rf_ra`, `rf_rb` | 2+2 | register read addresses for RF operands |
| `rf_we`, `rf_wa` | 1+2 | write the result to the register file |
| `prf_a`, `prf_we`| 2+1 | predicate register address and write enable |
| `k`      | 4 | path length for `BLT`/`BRP` |
| `imm`    | 16 | immediate, sign-extended |

## Timing and the host protocol

1. Hold `rst_n` low for at least one clock cycle. Reset is synchronous. It
   clears the registers, register files and IFU state, but not the
   instruction or data memories: write every row the program can reach.
2. Write the program one PE word at a time with `imem_we`, `imem_addr`,
   `imem_pe` and `imem_wdata`. PE index = row*4 + column.
3. Write input data with `dmem_we`, `dmem_row`, `dmem_addr` and
   `dmem_wdata`.
4. Set `cfg_start`, `cfg_loop_start`, `cfg_loop_end`, `cfg_modulo` and
   `cfg_cycles`, then pulse `start`.
5. The IFU fetches one row per cycle. The row fetched in cycle t executes
   in cycle t+1.
6. `done` rises after the last fetch. The last row executes in the
   following cycle. Results can then be read through `dmem_rdata`, or seen
   on `pe_dout` and `pe_pout`.

`ev_taken`, `ev_not_taken`, `ev_skip` and `ev_wrap` pulse when the IFU
consumes a branch outcome, jumps over a path, or wraps the loop.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/psb_pkg.sv tb/psb_tb_pkg.sv tb/tb_psb_cgra.sv --top-module tb_psb_cgra
./obj_dir/Vtb_psb_cgra
```

Replace `tb_psb_cgra` with any other testbench.

| testbench       | checks |
|-----------------|--------|
| `tb_psb_cgra`   | four programs of the example loop at default sizes, compared with a model: modulo, non-pipelined, routed predicate, nested conditional. Cycle counts 3+2n, 1+4n, 1+5n and 1+5n. Every mechanism must be seen: taken, not taken, skip, wrap, routed-predicate branch, both outcomes of the inner select, loads, stores |
| `tb_psb_ifu`    | fetched address sequence for both region placements and for K = 3 with prologue and a shared trailing row; exact row budget; event pulses |
| `tb_psb_array`  | torus wiring in all four directions including wrap, predicate network with `SEL`, row bus store/load/bus operand, only the designated PE's branch reaches the IFU |
| `tb_psb_pe`     | 3000 random instructions against a shadow model of the PE |
| `tb_psb_fu`, `tb_psb_rf`, `tb_psb_imem`, `tb_psb_dmem` | unit checks against reference values |

Testbenches that need a PE instruction build it with `psb_tb_pkg::ins()`.

## What follows the PSB scheme and what is this implementation's own

These parts follow the published scheme:

- the 4x4 torus;
- the PE template: operand and predicate muxes, FU, register file,
  predicate register file, output registers, and a predicate network;
- a single designated PE that passes branch outcome and path length to the
  IFU;
- one delay slot;
- the IFU rule "else: issue K rows, then skip K; if: skip K, then issue K";
- the two-version layout of a modulo kernel;
- branching on a predicate routed to the designated PE.

These parts are choices of this implementation:

- **Sizes:** 32-bit data, 4 data and 4 predicate registers per PE, a 64-row
  instruction memory, and 256 words per data bank.
- **Instruction set and word:** the instruction encoding and the operation
  list.
- **Memory and timing:** one memory bank per row with single-cycle access,
  a synchronous instruction-memory read, and the BUS operand holding the
  previous cycle's load data.
- **Designated PE:** its position, row 0 column 1.
- **IFU control:** the cycle budget instead of a loop counter, the
  `cfg_modulo` switch between the two region placements, and the wrap and
  new-branch-overrides rules.
- **Host:** the host ports.

Limitations:

* The design was evaluated on loop kernels from SPEC2006 and BioBench. Those
  kernels and their compiled instruction streams are not available here,
  so only the reference example loop is run.
* No compiler is included. The PSB fusion pass and the mapper are
  software; programs are written by hand as in the testbenches.
* There is no loop counter and no loop exit other than the cycle budget.
  There is no epilogue: the IFU keeps wrapping the loop until the budget
  runs out.
* Data memory banks are private to their row. A value in another row's bank
  must be moved through the array.
* The area and frequency figures of the original 65 nm implementation do
  not apply to this RTL.
