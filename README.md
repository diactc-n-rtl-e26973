# DiaCTC(N): a diagonalized contention-tolerant crossbar switch

A conventional input-queued crossbar needs a central scheduler that finds,
every time slot, a set of input/output pairs with no two inputs sending to the
same output. A contention-tolerant crossbar drops that requirement. Each input
port decides on its own which cell to send. When two ports send to the same
output in the same slot, the fabric does not reject either cell. The port
further down the output's column intercepts the upstream cell and keeps it in
its own queue, and sends it on later. Scheduling is then fully distributed:
one small scheduler per input port, no exchange of requests and grants.

In the plain version of this fabric every column runs from row 0 to row N-1.
Input N-1 then sits below every other port on every column. It collects the
most intercepted cells and is the first port to be overloaded. The
*diagonalized* fabric keeps the same SEs and wires. Only the order of the SEs
along each column changes. Column j starts at row j and wraps round to end at
row j-1 (mod N). Each row then holds exactly one column head and one column
tail, and the load of intercepted cells is spread evenly over the ports.

This repository holds synthesizable SystemVerilog for the 32-port switch
(`diactc_switch`). It has virtual output queues (VOQs) at each input. Each
input also has a staggered-polling scheduler with a random secondary choice.
Self-checking testbenches come with it.

## Blocks

| Module | What it is |
|---|---|
| `diactc_pkg` | cell type, `NO_CELL`, SE state enum |
| `se` | one crosspoint switching element, CR or RT state |
| `diactc_fabric` | N x N SE array with diagonalized column order |
| `voq_buffer` | the N VOQs of one input port |
| `ps_staggered` | primary sub-scheduler: polls VOQ `(i + t) mod N` |
| `ss_random` | secondary sub-scheduler: a pseudo-random non-empty VOQ |
| `sp_scheduler` | combines primary and secondary into the port's choice |
| `input_port` | `voq_buffer` + `sp_scheduler` |
| `diactc_switch` | top: N input ports, the fabric, registered outputs |

## One time slot

One clock cycle is one time slot, and every input and output port moves at
most one cell per slot. Within a cycle:

1. Each input port's scheduler looks at the non-empty flags of its own VOQs
   (registered state) and picks a VOQ `k`, or nothing.
2. The port puts the head-of-line cell of VOQ `k` on its row. It sets the SE
   where its row crosses column `k` to **RT** (receive-and-transmit). All
   other SEs of the row stay in **CR** (cross).
3. The fabric settles combinationally. A cell entering a column travels down
   the bus until the next SE in RT state. That SE's port takes the cell in,
   and the port's own cell continues down the bus. Whatever leaves the tail
   of column `j` goes to output `j`.
4. On the clock edge each port dequeues the cell it sent. It enqueues the
   intercepted cell, if any, and the external arrival, if any. Each output
   register captures its column's cell.

Latency through an empty switch is therefore 2 slots: a cell presented on
`in_cell` in slot t is written into its VOQ at the end of slot t. It crosses
the fabric in slot t+1 and is on `out_cell` during slot t+2.

## The SE and the column bus

An SE has inputs `state`, `row_in`, `col_in` and outputs `row_out`,
`col_out`, `rcv_out`:

| state | `col_out` | `rcv_out` | `row_out` |
|---|---|---|---|
| CR | `col_in` | none | `row_in` |
| RT | `row_in` | `col_in` | none |

Column order for N = 4 (H = head, T = tail; rows are input ports):

```
            col 0   col 1   col 2   col 3
  row 0       H       T      .       .
  row 1       .       H      T       .
  row 2       .       .      H       T
  row 3       T       .      .       H
```

Column 1's bus runs through rows 1, 2, 3 and then 0, and then reaches output 1.
Suppose ports 1, 2 and 3 all send to output 1 in the same slot. Port 2 then
intercepts port 1's cell and port 3 intercepts port 2's cell. Port 3's own
cell reaches output 1, unless port 0 also sends there. In that case port 0
intercepts it, and port 0's cell is the one delivered.

Consequences that the RTL relies on:

* The head SE's column input is tied to "no cell". This breaks the ring of
  each column, so the fabric has no combinational loop.
* Only one SE per row is ever in RT. A port therefore intercepts at most one
  cell per slot, always for the output it is sending to. So the intercepted
  cell joins the very VOQ that is being served in the same slot, and it can
  never overflow that VOQ. `voq_buffer` asserts this.
* A cell may be intercepted several times before it reaches its output. A
  cell sent from the tail row of its column is never intercepted. Cells of one
  flow can leave out of order. The architecture accepts this; the switch
  does not restore order.

In `diactc_fabric` each SE lives in its own generate block (`g_row[i].g_col[j]`).
The column link refers to the block of row `(i-1) mod N`. The row link and
the OR of the row's intercepted cells chain along `g_col[j-1]`.

## Scheduling: staggered polling with a random secondary

Each port's scheduler `S_i` has two sub-schedulers running in parallel.

* **Primary `PS_i`** polls VOQ `c_i(t) = (i + t) mod N`. Every port polls a
  different VOQ in every slot. The cells chosen by the primaries thus form a
  conflict-free matching and never intercept one another. The counter of port
  i starts at i when reset is released. All ports leave reset together, so
  they stay staggered without any communication.
* **Secondary `SS_i`** chooses among the non-empty VOQs. A 32-bit Galois LFSR
  (x^32+x^22+x^2+x+1), seeded per port, gives a start index. The first
  non-empty VOQ at or after that index, wrapping round, is taken. This is a
  cheap stand-in for a uniformly random pick. It favours a VOQ that follows a
  run of empty ones.
* `S_i` serves the primary's VOQ if that VOQ holds a cell. Otherwise it serves
  the secondary's choice, and if all VOQs are empty it sends nothing.
  Secondary choices are what cause interceptions: they keep ports busy at the
  price of conflicts.

## Input buffering

`voq_buffer` keeps N circular FIFOs of `DEPTH` cells in one array of
`N*DEPTH` cells, with a read pointer, write pointer and count per VOQ. Per
slot it takes up to two cells (intercepted and external) and gives one. If
both join the same VOQ, the intercepted cell goes first. An external cell is
dropped, and `in_drop` is raised, when its VOQ would hold more than `DEPTH`
cells at the end of the slot, counting that slot's departure and
interception. An external cell whose `dst` is not below N is ignored.

## Top-level interface (`diactc_switch`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | slot clock; asynchronous active-low reset, empties all VOQs |
| `in_cell[N]` | in | arrival at input i this slot (`cell_t`) |
| `in_drop[N]` | out | that arrival was dropped, VOQ full |
| `out_cell[N]` | out | cell delivered at output j (registered) |
| `tx_valid[N]` | out | port i sent a cell this slot |
| `intercepted[N]` | out | port i intercepted a cell this slot |
| `sel_primary[N]`, `sel_secondary[N]` | out | which sub-scheduler decided |

`cell_t` is `{valid, src[7:0], dst[7:0], data[63:0]}`. Only `dst` is used for
routing. `src` and `data` pass through unchanged. The 8-bit port fields allow
switches of up to 256 ports.

Parameters: `N` = 32 ports and `DEPTH` = 64 cells per VOQ (must be a power
of two). The 32-port size is the one the architecture is evaluated at. The
VOQ depth is this design's choice.

## What is taken from the architecture and what is chosen here

Taken from the architecture: the SE with its two states, the diagonalized
column order (head at row j, tail at row j-1 mod N), interception into the
downstream port, N VOQs per input port, the primary/secondary structure of
staggered polling with primary priority, and the random secondary pattern.
The size evaluated is N = 32.

Chosen here, because the architecture leaves them open:

* one slot per clock, with the fabric combinational within the slot;
* the cell format and widths;
* the VOQ depth (64), the drop-on-full policy for external cells, and the
  order of two cells written to one VOQ in the same slot;
* the primary rotation formula `(i + t) mod N` (the architecture only requires
  the indices to differ);
* the LFSR-plus-search realisation of the random secondary. It is not exactly
  uniform;
* a register stage at each output. Packet segmentation and reassembly are not
  part of this RTL, and cells of a flow may arrive out of order.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/diactc_pkg.sv tb/tb_diactc_switch.sv --top-module tb_diactc_switch
./obj_dir/Vtb_diactc_switch
```

| Testbench | Covers |
|---|---|
| `tb_se` | both SE states with random cells |
| `tb_diactc_fabric` | N=4 and N=7 fabrics against a column-walking model, including interceptions across the wrap and a hand-worked 4-port case |
| `tb_voq_buffer` | queue model; drops, intercept + external into one VOQ, a full VOQ rescued by a departure |
| `tb_ps_staggered` | `(i+t) mod N`, uniqueness across 5 ports |
| `tb_ss_random` | choice is in the non-empty set, null iff empty, spread over all VOQs |
| `tb_sp_scheduler` | primary-first rule; primary, secondary and idle outcomes |
| `tb_input_port` | the port against a VOQ model with fabric-like interceptions |
| `tb_diactc_switch` | 8 ports, depth 4, end to end with a scoreboard. Every intercepted cell must come from a port upstream of the interceptor on its column. It also checks the 2-slot latency, full rate with no interception under a permutation, uniform load 0.9, an all-to-one overload with drops, and conservation after a drain. Each mechanism (primary, secondary, interception, interception on the wrapped part of a column, drop, idle) must occur. |
| `tb_diactc_workloads` | the default 32-port, depth-64 switch under the evaluation traffic patterns |

`tb_diactc_workloads` offers each pattern at load 0.8 for 1500 slots, then
drains; uniform traffic is also run at loads 0.5 and 0.95. It checks every
delivery and the cell balance. For uniform traffic at 0.8 it also requires
that under 1% of cells are dropped and that interceptions are spread evenly.
That evenness is what the diagonal column order is for: the busiest port may
intercept at most 1.5 times as many cells as the least busy. With the
simulator's default seed the spread is 327 to 413 cells per port. Results
with that seed:

| Pattern | Load | Dropped | Intercepts | Mean delay (slots) |
|---|---|---|---|---|
| uniform Bernoulli | 0.5 | 0 | 9624 | 3.4 |
| uniform Bernoulli | 0.8 | 0 | 12027 | 56.6 |
| uniform Bernoulli | 0.95 | 0 | 8097 | 100.8 |
| bursty, mean burst 16 | 0.8 | 1.5% | 21129 | 192 |
| bursty, mean burst 32 | 0.8 | 6.3% | 20666 | 183 |
| bursty, mean burst 64 | 0.8 | 15.5% | 21652 | 149 |
| asymmetric (max/min flow ratio 10) | 0.8 | 0 | 13720 | 77.0 |
| Chang's (uniform, no i->i) | 0.8 | 0 | 11970 | 55.4 |
| diagonal (2/3 to i, 1/3 to i+1) | 0.8 | 0.6% | 11354 | 42.5 |

About 38,000 cells were offered per pattern at load 0.8. Delays are from a short run and
include queueing; they are not steady-state curves. The bursty and diagonal
patterns overflow 64-cell VOQs at this load. Raise `DEPTH` if loss-free
behaviour under long bursts is needed. The asymmetric pattern's flow ratio is
an assumption of the testbench.

## Known limits

* Cells of one flow can be delivered out of order (`tb_diactc_switch` counts
  reorderings). Nothing here restores order.
* The secondary choice is only approximately uniform.
* The fabric is one combinational path through up to N SEs per column. At
  N = 32 that path sets the clock rate. No pipelining inside the fabric is
  attempted.
