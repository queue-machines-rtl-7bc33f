# A queue machine that compiles its own loops into a pipeline

This is a small processor whose programs are written for an *operand queue*
instead of a register file. It runs the whole program serially. When it
reaches a loop, it watches the first iteration go by, builds a spatial
pipeline from those instructions on a grid of functional units, and runs the
remaining iterations on that grid at up to one iteration per clock. The
compiler that places and routes the loop is a small piece of hardware. It
looks at each instruction once and keeps two counters.

The design follows the proposal in *Queue Machines: Hardware Compilation in
Hardware*. That proposal describes the machine's organisation, its
instructions, the placement algorithm and the virtualization schemes. It does
not describe encodings, widths, handshakes or sizes. Everything of that kind
here is this design's own choice, and each choice is listed below.

## Why a queue makes placement easy

A queue instruction takes its operands from the head of the queue and puts
its results at the tail. No instruction names a register. Instead, the order
of the instructions gives the data flow:

- A producer's result waits in the queue behind the results produced before it.
- Each result is consumed by whichever instruction reaches it first at the head.

Suppose a loop body's data-flow graph is drawn in levels, with every edge
going from one level to the next and no edges crossing. Then listing the
instructions level by level, each level in order, is a valid queue program.
The opposite also holds: given a queue program, the levels can be recovered
in one pass. That pass is what the hardware compiler does.

Data-flow graphs that are not of this shape are made so by the programmer or
a compiler, using three routing instructions:

- `dup` passes a value on to the next level.
- `swap` exchanges two values, so that edges do not cross.
- A *copy count* on any instruction (written `op_2`, `st_0`) sets how many
  copies of its result go to the tail: 0 to 3.

## Organisation

```
            +---------------------------------------------+
  host ---> |  qm_data_mem  (shared memory, one port per   |
            |               user: host, serial, each FU)   |
            +---------------------------------------------+
                 ^                ^                 ^
                 |                |                 |
         qm_serial_engine -- trace --> qm_row_placer -- cfg --> qm_spatial_engine
         (qm_operand_queue,           (compilation engine)     (ROWS x COLS qm_fu,
          qm_alu, qm_imem)                                      qm_interconnect,
                 |                                               configuration memory)
                 +------------- start / done (hand-off) ---------------+
```

| module | role |
|---|---|
| `qm_pkg` | opcodes, instruction word, fabric configuration word, operand counts |
| `qm_top` | the integrated machine and its host interface |
| `qm_serial_engine` | runs the program one instruction per cycle and manages loop hand-off |
| `qm_operand_queue` | the serial engine's operand queue (2 pops, 3 pushes per cycle) |
| `qm_alu` | the operation of one instruction; used by the serial engine and by every functional unit |
| `qm_imem` | program memory |
| `qm_row_placer` | the compilation engine: row, column and routing of each loop instruction |
| `qm_spatial_engine` | the fabric: functional units, row registers, configuration memory, row and width virtualization |
| `qm_fu` | one functional unit of the fabric |
| `qm_interconnect` | complete interconnect between two rows |
| `qm_data_mem` | shared memory, combinational read, lowest port wins a write conflict |
| `qm_lut_table` | 64-entry table for the 6-bit lookup instruction |

## Instruction set

Each instruction is a 16-bit word: `[15:11]` opcode, `[10:9]` copy count and
`[8:0]` immediate. The numbers below are the instruction's operands (read
from the head, first operand first) and its results (each result is written
*copy count* times).

| op | code | in | out | meaning |
|---|---|---|---|---|
| `nop` | 0 | 0 | 0 | fills a column; does not touch the queue |
| `dup` | 1 | 1 | n | passes its operand on |
| `swap` | 2 | 2 | 2 | reads x then y, writes y then x (copy count ignored) |
| `add`, `sub` | 3, 4 | 2 | n | 16-bit; `sub` is first minus second |
| `mul` | 5 | 2 | n | 16 x 4 bit: first operand times the low 4 bits of the second |
| `lut` | 6 | 1 | n | table[operand[5:0]] |
| `and`, `or`, `xor` | 7, 8, 9 | 2 | n | bitwise |
| `lt` | 10 | 2 | n | signed first < second gives 1, else 0 |
| `ld` | 11 | 0 | n | mem[idx + imm] |
| `st` | 12 | 1 | 0 | mem[idx + imm] = operand |
| `ldi` | 13 | 0 | n | sign-extended immediate |
| `idx` | 14 | 0 | n | the current loop index |
| `loopbegin` | 15 | 2 | 0 | reads min then max; imm is the step (0 means 1) |
| `loopend` | 16 | 0 | 0 | closes the loop |
| `bz` | 17 | 1 | 0 | branch to pc + imm (signed) if the operand is 0 |
| `jmp` | 18 | 0 | 0 | pc + imm (signed) |
| `halt` | 19 | 0 | 0 | stop |

`idx` is the loop index inside a loop and 0 outside one. So `ld`/`st`
addresses are absolute in straight-line code and index-relative in a loop
body. Everything from `nop` to `idx` is *loop-legal*: the fabric executes it.
A body that holds `bz`, `jmp`, `halt` or a nested loop is not compiled. It
runs serially instead.

Only one loop is active at a time; loops do not nest. The bounds come from
the queue and the step from the immediate, and the loop runs while
`idx < max` (signed).

## Loop hand-off

1. `loopbegin` pops the bounds. If `min >= max`, the serial engine skips to
   after the matching `loopend`, one word per cycle.
2. Otherwise the serial engine pulses `pl_start` to the placer and runs
   iteration `min` itself. Every instruction it executes in that iteration
   also goes to the placer (`pl_trace_valid`, `pl_trace_ins`).
3. At `loopend` the engine raises `pl_finish` and waits one cycle for the
   placer's verdict.
4. If the placement succeeded and iterations remain, it starts the fabric
   with the next index, the bound and the step. It then stays suspended until
   the fabric's `done`, and continues after `loopend`.
5. If the placement failed, the loop simply continues serially.

At `loopbegin` the queue must be empty apart from the two bounds. Otherwise
the body would read values the fabric cannot see, and the placer rejects the
loop. The fabric does not order memory accesses between iterations. Loops
handed to it must have no memory dependence from one iteration to the next.
Keeping that promise is the programmer's job.

`spatial_en = 0` disables the hand-off, and the same program then runs
entirely serially. The testbench uses that to check that both ways of running
a program leave identical memory.

## The compilation engine (`qm_row_placer`)

This is the part that takes the most thought. The placer sees each
instruction of the first iteration once, in program order. It keeps two
counters:

- `this_q`: operands of the previous row's list that instructions on the
  current row have not consumed yet.
- `next_q`: operands the current row has produced so far.

For an instruction with `in` operands and `out` results:

- If `in > this_q`, the current row cannot supply the operands. The
  instruction opens a new row: `this_q = next_q - in`, `next_q = out`, and
  the column counter restarts at 0.
- Otherwise the instruction joins the current row: `this_q -= in`,
  `next_q += out`, and the column counter increments.

Columns are filled from 0 upward in program order. Because the queue is
first-in first-out, each row's results form one list in program order, and
the next row consumes that list from the front. So the placer can also do the
routing with two more counters:

- `in_base` is how far the current row has read into the previous row's list.
- `out_base` is how far the current row has written into its own list.

Each placed instruction gets a configuration word `{valid, ins, in_base,
out_base}` at (row, column). On the fabric, unit (r, c) takes its operands
from positions `in_base` and `in_base+1` of row r-1's list. Its results fill
positions `out_base ...` of row r's list.

Worked example (the 18-instruction test body): four loads, then three rows
of routing and arithmetic, then three two-input operations with no copies
kept. The numbers are `row.col in_base/out_base, this_q next_q` after each
instruction:

| instr | placement | | instr | placement |
|---|---|---|---|---|
| `ld` | 0.0 -/0, 0 1 | | `dup_2` | 2.0 0/0, 4 2 |
| `ld` | 0.1 -/1, 0 2 | | `swap` | 2.1 1/2, 2 4 |
| `ld_2` | 0.2 -/2, 0 4 | | `xor_2` | 2.2 3/4, 0 6 |
| `ld_2` | 0.3 -/4, 0 6 | | `dup` | 3.0 0/0, 5 1 |
| `dup` | 1.0 0/0, 5 1 | | `sub_2` | 3.1 1/1, 3 3 |
| `add` | 1.1 1/1, 3 2 | | `swap` | 3.2 3/3, 1 5 |
| `mul_2` | 1.2 3/2, 1 4 | | `dup` | 3.3 5/5, 0 6 |
| `dup` | 1.3 5/4, 0 5 | | `add_0` `sub_0` `and_0` | 4.0 4.1 4.2, ending 0 0 |

The placer rejects a body (`ok = 0`) in these cases:

- it contains control flow (`compile_abort_ctrl`);
- it needs more rows or columns than the configuration memory holds
  (`compile_abort_size`);
- an instruction would read an operand produced before the loop;
- operands are left over at `loopend`.

Rejection is reported one cycle after `finish`, together with the row count.

## The fabric (`qm_spatial_engine`)

The fabric is `ROWS x COLS` functional units. Each unit executes every
loop-legal instruction and has its own memory and table port. Each row
registers its results, so one row is one pipeline stage. Iteration `i` is in
row `r` at step `i + r`. The loop index travels down the pipeline with its
iteration, and `ld`, `st` and `idx` in every row see their own iteration's
index. A row that is the last row of the loop passes nothing on.

The rows are connected in a ring: row 0 reads row `ROWS-1`. That connection
only matters under row virtualization. Between two rows, `qm_interconnect`
rebuilds the upper row's result list from its configuration words (unit c
fills positions `out_base ...`; for `swap`, the second position gets the
second result). It then hands each lower unit positions `in_base` and
`in_base+1`. Any position can reach any unit.

Timing, with N iterations handed to the fabric and R rows: `busy` is high for
N + R cycles after the start cycle, and `done` marks the last of them. One
iteration starts and one completes per cycle.

### Row virtualization

A loop of V rows with V > ROWS = P is run by pipeline reconfiguration, in
the manner of PipeRench. A configuration memory holds up to `VROWS` virtual
rows. At step t, physical row `t mod P` is loaded with virtual row `t mod V`.
So one physical row is always being reconfigured while the other P-1 compute,
and virtual row j+1 always lands on the physical row after the one holding
virtual row j. Iterations enter in groups of P-1, right behind the
configuration of virtual row 0, and ride the reconfiguration wave through all
V rows. Throughput is (P-1)/V iterations per step.

With K = ceil(N/(P-1)) groups and d = N-1-(K-1)(P-1), `busy` lasts
`V*K + d + 2` steps. For example, the 11-row test loop on 8 rows with 9
iterations gives K = 2, d = 1 and 25 cycles.

### Width virtualization

A row may be up to `VCOLS` instructions wide on `COLS` physical units. The
engine records the widest row written since `cfg_clear`. It runs each step as
M = ceil(width / COLS) micro-cycles, and in micro-cycle m unit c computes
virtual column `m*COLS + c`.

Every row has two registers per virtual column. The *staging* register
collects results during the step. At the step's last micro-cycle, the whole
virtual row moves to the *output* register. The next row reads the output
registers through an interconnect that spans all `VCOLS` columns. The
interconnect's operand list is then up to `3*VCOLS` entries long.

All rows use the same M. Every timing above is then counted in steps of M
cycles:

- direct mode: `busy = M*(N+R-1) + 1`;
- with row virtualization as well: `M*(V*K+d+1) + 1`.

With M = 1 this reduces to the plain fabric.

This is the register form of width virtualization: each physical row has a
complete interconnect over registers as wide as the widest virtual row. The
proposal also sketches a denser variant, where a small memory replaces those
registers. It also sketches a diagonal scheme for code written with only
neighbour-to-neighbour routing. Neither variant is built here.

## Sizes

| parameter | default | where |
|---|---|---|
| `ROWS`, `COLS` | 8, 8 | physical fabric |
| `VROWS` | 240 | deepest loop (virtual rows) |
| `VCOLS` | 32 | widest loop row (virtual columns) |
| `QDEPTH` | 64 | operand queue entries |
| `IAW` | 10 | 1024 program words |
| `AW` | 10 | 1024 data words of 16 bits |
| `DW` | 16 | data width (fixed in `qm_pkg`) |

The proposal gives none of these numbers. 8 x 8 holds the four-point
butterfly loop (8 rows, at most 6 instructions per row). 240 virtual rows
cover its deepest benchmark kernel (depth 235). The design has no
floating-point unit and no I/O space beyond the shared memory.

How the proposal's benchmark kernels fare at these sizes (operation counts
and depths are the proposal's; the widths are average row widths worked out
from them):

| kernel | ops / depth | avg. width | fits |
|---|---|---|---|
| dct1 | 537 / 49 | 11.0 | depth yes; width unknown, as it depends on the widest row |
| fft8 | 909 / 41 | 22.2 | depth yes; width unknown |
| haar16 | 918 / 17 | 54.0 | no: wider than 32 columns on average |
| rc6 | 330 / 42 | 7.9 | depth yes; width unknown |
| idea | 1462 / 235 | 6.2 | no: more instructions than the 1024-word program memory |
| popcount | 229 / 24 | 9.5 | depth yes; width unknown |

Wide rows also need queue room in the serial engine: the first iteration
runs serially, so a level with more than `QDEPTH` live operands overflows the
queue.

## Where this design departs from, or adds to, the proposal

- Encoding, opcode numbers, immediates, `lt`, `bz`, `jmp`, `halt`, `ldi` and
  `idx` are this design's own. The proposal needs some serial control flow
  around its loops but does not define it.
- The proposal counts on byte-sized instructions. The 16-bit word here
  carries an immediate instead.
- Loop bounds are taken from the queue and the step from the immediate. The
  loop index travels with each iteration.
- The placer rejects more than control flow: oversize bodies, reads of
  operands from before the loop, and leftovers. A rejected loop just runs
  serially.
- One row is one pipeline stage. The proposal allows units to be arbitrarily
  pipelined.
- Every functional unit has its own memory port, and a write conflict is
  resolved by port number. The fabric does not check memory dependences
  between iterations.
- Row virtualization issues iterations in groups of P-1 per reconfiguration
  round. The proposal describes the reconfiguration pattern but not how data
  is admitted.
- Width virtualization uses one micro-cycle count for all rows, and reloads
  a whole virtual row at once under row virtualization.
- Not built: the memory-based and the diagonal width-virtualization variants,
  a fabric restricted to neighbour-only interconnect, and the alternative
  column placement that averages the columns of an instruction's producers.
  Columns are always filled from 0 upward, and the interconnect is complete,
  so wiring length between rows is not bounded.
- Reset: control state has an asynchronous active-low reset. Memories and
  data registers are not reset.

## Host interface of `qm_top`

- `imem_we/waddr/wdata` loads the program.
- `lut_we/waddr/wdata` loads the lookup table.
- `hmem_addr/we/wdata/rdata` reads and writes data memory (combinational
  read).
- `start` (one cycle) clears the queue and runs from address 0.
- Status outputs:
  - `running` is high while the program runs;
  - `halted` is high after `halt`;
  - `error` is high after a queue underflow or overflow, a stray `loopend` or
    a nested loop;
  - `spatial_active` is high while the fabric runs;
  - `handoff` pulses at each hand-off;
  - `compile_done`, `compile_ok`, `compile_abort_ctrl` and
    `compile_abort_size` give each placement's outcome.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a hung run
with a failure. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/qm_pkg.sv tb/tb_qm_top.sv --top-module tb_qm_top
./obj_dir/Vtb_qm_top
```

`-y rtl` lets Verilator find the modules by name; the package is given first. Use any other `tb/tb_<module>.sv` in the same way.

- `tb_qm_top` runs at the default sizes, in about half a minute. It loads a
  program with branchy setup code and seven loops:
  - a four-point butterfly;
  - a loop with a branch (rejected);
  - a 10-wide loop (width virtualization, M = 2);
  - a 34-wide loop (rejected as too wide);
  - a zero-trip loop;
  - a lookup loop;
  - a six-row loop with `dup_2`, `swap`, `mul` and logic operations;
  - an 11-row loop (row virtualization).

  It runs the program once with the fabric and once without. It checks:
  - both final memories, word for word, against values computed in the
    testbench;
  - each loop's fabric time against the formulas above;
  - that every mechanism happened: hand-off, both rejection kinds, zero-trip
    skip, row and width virtualization, and queue overflow.
- `tb_qm_spatial_engine` configures a 4 x 2 fabric by hand. It covers direct,
  row-virtualized, width-virtualized and combined loops, with exact
  latencies.
- `tb_qm_row_placer` checks the worked example above, entry by entry, and
  each rejection rule.
- The others exercise their block against values computed in the
  testbench: every opcode, queue wrap and overflow, port priority.

To change a size, override the parameter on `qm_top`. `VCOLS` sets the
placer's column limit as well as the fabric's. Changing `DW` in `qm_pkg`
also requires revisiting the `mul` and `lut` widths in `qm_alu`.
