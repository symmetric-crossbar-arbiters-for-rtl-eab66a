# Wave front arbiters for a symmetric crossbar

A packet switch with **multi-queue input buffers** keeps a separate queue per
output port at each input. In any cycle, input *i* may therefore have packets
ready for several outputs at once. Output *j* may likewise be wanted by several
inputs. The crossbar between the buffers and the outputs can carry at most one
packet per input (row) and one per output (column) per cycle. Something has to
choose, every cycle, a set of crosspoints with no two in the same row or
column, and should choose as many as possible. The problem is the same seen
from the inputs or from the outputs, which is why the arbiter is called
*symmetric*. It cannot be split into independent per-input or per-output
arbiters, because granting a crosspoint takes both its row and its column out of
the contest.

This RTL implements two arbiters for that job, built from one cell:

* the **wave front arbiter (WFA)**, where arbitration starts at one
  top-priority crosspoint and spreads diagonally across the array;
* the **wrapped wave front arbiter (WWFA)**, where it starts from a whole
  wrapped diagonal of *n* crosspoints at once. The WWFA is about twice as fast
  for the same *n*.

Both rotate their priority every cycle for fairness. Each also has an optional
guard against starvation when output ports are blocked by flow control. The
top level, `xbar_switch`, joins an arbiter to an *n* × *n* crossbar of *d*-bit
buses. By default it is a 4 × 4 crossbar of 8-bit buses with a wave front
arbiter.

## The arbitration cell

There is one cell per crosspoint (*i*, *j*). A chain signal runs along each row
from west to east (`xi` → `xo`). It means "nobody earlier in this row has been
granted". A second chain runs down each column from north to south (`yi` →
`yo`) with the same meaning for the column. Two priority inputs, `xp` and
`yp`, mark the cell as the place where the row chain or the column chain
starts. They force the chain input to "free":

```
G  = R & ~OPB & (YI | YP) & (XI | XP)
YO = (YI | YP) & ~G
XO = (XI | XP) & ~G
```

`OPB` ("output port blocked") is the flow-control input of the cell's column.
A blocked column takes no part in the arbitration. The cell is purely
combinational (`rtl/arb_cell.sv`).

The chains close into rings. The last cell of a row feeds the first cell of
that row, and the bottom cell of a column feeds the top cell. The priority
inputs then decide where on each ring the wave starts.

* **WFA**: a horizontal token ring holds the priority *column*, and every cell
  of that column gets `xp = 1`. A vertical token ring holds the priority
  *row*, and every cell of that row gets `yp = 1`. The cell at their crossing
  is the single top-priority cell. A cell at wrapped distance (*a*, *b*) from
  it settles after *a* + *b* + 1 cell delays, so 2*n* − 1 in all.
* **WWFA**: one token ring holds a priority diagonal *k*. Every cell with
  (*row* + *col*) mod *n* = *k* gets both `xp` and `yp`. These *n* cells lie in
  different rows and columns, so all of them can be granted at once. Cell
  (*i*, *j*) settles after ((*i* + *j* − *k*) mod *n*) + 1 cell delays, so *n*
  in all.

Either way the result is a **maximal** matching. Every grant is for a
requested crosspoint of an unblocked column. No row or column gets two grants.
No requested crosspoint is left with both its row and its column free.

## Priority rotation and starvation

The token rings (`rtl/token_ring.sv`) reset with the token in stage 0. This
makes cell (0,0) the WFA's first top cell and makes diagonal 0 the WWFA's
first diagonal. Diagonal 0 is (0,0), (1,3), (2,2), (3,1) for *n* = 4.

* WFA: the column token moves on every cycle. The row token moves once per lap
  of the column token, in the cycle the column token leaves the last column.
  Each crosspoint is therefore the top cell once every *n*² cycles.
* WWFA: the diagonal token moves on every cycle, so each crosspoint is on the
  priority diagonal once every *n* cycles.

With plain rotation, a queue whose output port is blocked each time its
crosspoint holds the priority can wait forever while others are served. Set
`HOLD_PRIORITY = 1` to enable the guard (the default is 0, plain rotation):

* **WFA**: the rings do not move in a cycle in which the top cell is requested
  but not granted. With the top priority, that happens only when its port is
  blocked. The top cell keeps the priority until it has sent a packet.
* **WWFA**: in the first cycle a diagonal holds the priority, its requests are
  latched. The diagonal keeps the priority while any latched request has been
  neither granted nor withdrawn. A request that appears on the diagonal later
  does not extend its turn, so one diagonal cannot hold the priority
  indefinitely.

With the guard on, a ring may hold for many cycles. For that reason the rings
are static flip-flops with an enable, not dynamic shift registers.

## Getting rid of the combinational rings

This is the least obvious part of the implementation. If you modify
`arb_cell_array`, read this first.

Drawn as hardware, the array is a set of combinational loops: each row chain
and each column chain is a ring of gates. The loops never oscillate, because
at least one cell on each ring has its chain input overridden by `xp`/`yp`. But
synthesis, static timing analysis and cycle-based simulators see loops. Each
of these tools either rejects them or handles them badly.

`rtl/arb_cell_array.sv` therefore **unrolls** the rings. It builds a 2*n* ×
2*n* grid of the same cells, with every west and north boundary input tied to
0. Grid cell (*a*, *b*) gets the request, OPB and priority inputs of array cell
(*a* mod *n*, *b* mod *n*). The grants are read from the bottom-right *n* × *n*
quadrant.

Why this is exact: follow a cell's dependencies backwards (up through `yi`,
left through `xi`). With a WFA priority pattern (a whole priority column and
a whole priority row), such a path can take at most *n* − 1 steps left and
*n* − 1 steps up before it meets an override. With a WWFA pattern, each step
lowers the wave index (*i* + *j* − *k*) mod *n* by one, and the override sits
at index 0. Either way, a path that starts in the bottom-right quadrant ends at
an override before it reaches the tied-off boundary. So the quadrant computes
exactly what the wrapped array would settle to.

The cost is four times the cells (64 cells for *n* = 4, about 430 cells after
coarse synthesis). The logic depth is the same as the ring's, 2*n* − 1 or
*n* cells. The unrolling depends on the priority inputs: each row must contain
an `xp` cell and each column a `yp` cell, as both arbiters guarantee. If that
fails, the unrolled array gives fewer or no grants instead of an undefined ring.

## Modules

| File | Module | What it is |
|---|---|---|
| `rtl/xbar_pkg.sv` | package | `arb_scheme_t` (`ARB_WFA`, `ARB_WWFA`) and the diagonal index function |
| `rtl/arb_cell.sv` | `arb_cell` | one arbitration cell |
| `rtl/arb_cell_array.sv` | `arb_cell_array` | wrapped *n* × *n* array of cells, unrolled as above |
| `rtl/token_ring.sv` | `token_ring` | one-hot circular shift register with hold and lap output |
| `rtl/wfa_arbiter.sv` | `wfa_arbiter` | array + column ring + row ring + starvation guard |
| `rtl/wwfa_arbiter.sv` | `wwfa_arbiter` | array + diagonal ring + latched-request starvation guard |
| `rtl/crossbar.sv` | `crossbar` | *n* × *n* crossbar of *d*-bit buses (AND-OR per column) |
| `rtl/xbar_switch.sv` | `xbar_switch` | top: arbiter chosen by `SCHEME`, grants drive the crossbar |

### `xbar_switch` interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | one arbitration per cycle |
| `rst_n` | in | 1 | asynchronous, active low; resets the priority rings |
| `req` | in | `[N-1:0][N-1:0]` | `req[i][j]`: input buffer *i* has a packet for output *j* |
| `opb` | in | `[N-1:0]` | `opb[j] = 1`: output *j* blocked, no grant in column *j* |
| `grant` | out | `[N-1:0][N-1:0]` | granted crosspoints; also the crossbar control lines |
| `in_data` | in | `[N-1:0][D-1:0]` | row bus of each input buffer |
| `out_data` | out | `[N-1:0][D-1:0]` | column bus of each output port; 0 when no crosspoint is closed |

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 4 | ports per side |
| `D` | 8 | bus width in bits |
| `SCHEME` | `ARB_WFA` | `ARB_WFA` or `ARB_WWFA` |
| `HOLD_PRIORITY` | 0 | 1 enables the starvation guard |

**Timing.** `grant` is a combinational function of `req`, `opb` and the ring
state. `out_data` is combinational in `in_data` and `grant`. A buffer that
raises a request in a cycle learns in the same cycle whether it won, and its
data crosses the crossbar in that cycle. The buffer must then place the
granted queue's head packet on its row bus. The rings and the WWFA's request
latch change only at the rising clock edge. The arbiter is the longest path:
2*n* − 1 cell delays for the WFA and *n* for the WWFA, plus the crossbar.

The arbiters also bring out their ring state for observation: `top_col` and
`top_row` (WFA) and `top_diag` (WWFA), all one-hot.

Concurrent assertions in `xbar_switch` check that no row or column is granted
twice and that nothing unrequested is granted. `token_ring` asserts that the
token stays one-hot.

## What is not here

* **The multi-queue input buffers.** These are dynamically allocated buffers in
  which the queues share one storage pool. They are a separate design. The
  switch exposes their request, grant and data lines as ports. The testbenches
  model them behaviourally.
* **The evaluated network.** The switches are meant for multistage networks
  (for instance a 64 × 64 Omega network of three stages of 4 × 4 switches).
  Only the switch core is built here. One instance is one switch.
* **Circuit level.** The published cell is static CMOS with a worst-case
  arbitration delay of about 15.5 ns for 4 × 4 in a 2 µm process, inside a
  20 ns cycle. Its rings are two-phase dynamic latches. None of this is
  modelled. Each crosspoint switch of the crossbar is written as AND-OR gating.
* The other arbitration schemes used as comparisons (two-step, skewed
  two-step, FIFO, fixed-priority, longest-queue-first, statically optimal) are
  not implemented.

## Choices made in this implementation

* The rings are unrolled into a 2*n* × 2*n* grid (see above), not built as
  wrapped combinational loops.
* `opb` is active high (1 = blocked).
* `rst_n` is asynchronous and active low. The rings reset to stage 0.
* Token direction: column *j* → *j* + 1, row *i* → *i* + 1, diagonal
  *k* → *k* + 1.
* The crossbar control lines are the grant lines of the same cycle. No
  register is placed between arbitration and transfer.
* In the WWFA guard, a latched request is also dropped when its request line
  falls. Requests are not normally withdrawn, so this only matters for
  unusual buffer behaviour.
* The starvation guard is off by default. The rotating arbiter without it is
  the circuit as first laid out, and the guard is an optional addition.

## Verification

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_arb_cell` | all 64 input combinations of the cell against its truth table |
| `tb_token_ring` | reset state, random advance/hold for 400 cycles against a counter, lap output |
| `tb_arb_cell_array` | a worked 4 × 4 example with known WFA and WWFA grants, then 3000 random requests/OPB with random WFA and WWFA priority patterns at *n* = 4 and 3, against a sequential wave model (`tb_arb_ref_pkg`), plus legality and maximality |
| `tb_crossbar` | random data and crosspoint settings |
| `tb_wfa_arbiter` | plain and guarded WFA against the model every cycle, including ring positions; directed test that the guard keeps a blocked top cell's priority and grants it when the port frees |
| `tb_wwfa_arbiter` | the same for the WWFA; directed test that a request arriving late on the priority diagonal does not extend its turn |
| `tb_xbar_switch` | end to end, five switches (WFA/WWFA, guard on/off, and an 8 × 8 WFA) |
| `tb_xbar_switch_full` | end to end, the switch with all parameters at their defaults, 20 000 cycles |
| `tb_starvation` | 2 × 2 arbiters under a periodic blocking pattern that keeps output 0 blocked whenever queue (0,0) has the priority. Without the guard, neither arbiter ever serves (0,0) in 400 cycles. With the guard, (0,0) is served every 4 cycles on average and never waits more than 5 |
| `tb_static_throughput` | 2 × 2 throughput against closed-form results |
| `tb_switch_workloads` | saturated single switches at the evaluated buffer and switch sizes |

The end-to-end testbenches use `tb_switch_traffic`. It models four-slot
multi-queue input buffers fed by random traffic and output ports that block
when a small downstream buffer fills. Every cycle it checks the grant set for
legality and maximality. It checks that every output carries exactly the head
packet of the granted queue, that each queue's order is kept, and that every
injected packet is delivered after the final drain. It also counts the
mechanisms it saw and requires each to occur: cycles with several connections,
full permutations, blocked ports, refused arrivals and (with the guard) cycles
where the priority was held.

**Static throughput, 2 × 2.** Each crosspoint is requested independently with
probability *p*, and no port is blocked. The expected normalized throughput is
2*p* − 2*p*² + 1.5*p*³ − 0.5*p*⁴ for the WFA and 2*p* − 2*p*² + *p*³ for the
WWFA. Measured over 40 000 cycles each:

| *p* | WFA measured | WFA expected | WWFA measured | WWFA expected |
|---|---|---|---|---|
| 0.25 | 0.396 | 0.397 | 0.391 | 0.391 |
| 0.50 | 0.656 | 0.656 | 0.625 | 0.625 |
| 0.75 | 0.851 | 0.850 | 0.798 | 0.797 |
| 1.00 | 1.000 | 1.000 | 1.000 | 1.000 |

**Saturated single switch.** Every source offers a packet every cycle, and
outputs are never blocked. The table gives packets per output per cycle, with
arrivals to a full buffer refused:

| Configuration | Throughput | Mean latency (cycles) |
|---|---|---|
| 4 × 4, WFA, 4 slots | 0.86 | 4.6 |
| 4 × 4, WWFA, 4 slots | 0.83 | 4.8 |
| 4 × 4, WFA, 2 slots | 0.76 | 2.6 |
| 4 × 4, WFA, 6 slots | 0.90 | 6.7 |
| 2 × 2, WFA, 4 slots | 0.92 | 4.3 |
| 8 × 8, WFA, 4 slots | 0.83 | 4.9 |

The workload testbench checks only the trend that more buffer slots give more
throughput. These numbers come from this buffer model and traffic source. They
are not a reproduction of any published curve.

## Simulating

The RTL and testbenches are plain SystemVerilog-2017. With Verilator 5, from
the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  --top-module tb_xbar_switch \
  rtl/xbar_pkg.sv tb/tb_arb_ref_pkg.sv tb/tb_xbar_switch.sv
./obj_dir/Vtb_xbar_switch
```

The two packages go on the command line first, followed by the testbench.
Verilator finds the other modules through `-y`. To run another testbench,
change the top module and the last file. Every testbench finishes in well
under a second.

To make a different switch, override the parameters, for example
`xbar_switch #(.N(8), .D(32), .SCHEME(xbar_pkg::ARB_WWFA), .HOLD_PRIORITY(1'b1))`.
`N` must be at least 2. The unrolled array grows as 4*N*² cells.
