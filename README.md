# Regular distributed register (RDR) datapath for multi-cycle communication

At multi-gigahertz clock rates a global wire can take several clock cycles to
cross a die. A datapath built around one central register file must then either
stretch its clock to the slowest wire or fail timing. The regular distributed
register (RDR) architecture takes another route:

* The die is cut into a regular 2-D array of **islands**. Each island is small
  enough that reading a local register, passing the value through a local
  functional unit and writing it back fits in one clock cycle.
* Every island has its **own registers**, in banks. A value that must travel
  across the array leaves from a register that stays unchanged for as many
  cycles as the wire needs. The transfer is a *multi-cycle path*: it costs
  cycles, not clock period.
* Every island has its **own controller**. All controllers step through the
  same state sequence. Each one drives only its own island, with its own
  control words.

Long wires therefore never set the clock period; they only add cycles, and a
scheduler that knows the floorplan can hide most of those cycles.

This repository holds synthesizable SystemVerilog for the island and its parts
(functional units, banked register file, controller, steering logic). It also
holds a configurable array of islands with its global interconnect, and a
complete example: a 12-node DCT data-flow graph mapped onto a 2x2 island
array. That example is `rdr_dct_top`. It runs at one operation per unit
per cycle and returns its two results 7 cycles after `start`.

## The island (`rdr_island`)

```
            links to neighbours (register-driven and FU-driven nets)
                 ^  |                               ^  |
   +-------------|--v-------------------------------|--v-----+
   |  register file: bank 1 | bank 2 | ... | bank k        |
   |        |  ^                               FSM  ----->  | control word
   |        v  |                                            | every cycle
   |  operand muxes -> local computational cluster -> write mux
   |                   (ALU / MUL / DIV)                    |
   +--------------------------------------------------------+
```

| part | module | what it is |
|---|---|---|
| local computational cluster | `rdr_lcc` | up to one ALU (`rdr_alu`: add, sub), one multiplier (`rdr_mul`) and one divider (`rdr_div`), chosen by `HAS_ALU/HAS_MUL/HAS_DIV`; combinational |
| register file | `rdr_regfile` | `NBANKS` banks of `NREGS` registers, one write port, every register readable at once |
| controller | `rdr_island_fsm` | idle state plus one state per control step; outputs the island's control word |
| steering | inside `rdr_island` | operand multiplexers, write-data multiplexer, link drivers |

In one control step an island performs at most one operation and one register
write. It may also drive any of its links. The control word (`ctrl_t` in
`rdr_pkg`) holds all of it:

| field | meaning |
|---|---|
| `op` | `FU_NOP`, `FU_ADD`, `FU_SUB`, `FU_MUL`, `FU_DIV` |
| `a`, `b` | operand source: `SRC_ZERO`, `SRC_REG` (bank, index), `SRC_WIRE` (the register-driven net arriving on link *idx*), `SRC_EXT` (primary input *idx*) |
| `wr` | register write: enable, bank, index; data from the local FU (`WS_FU`), from the FU-driven net of a link (`WS_WFU`) or from the register-driven net of a link (`WS_WREG`) |
| `xo_reg[p]` | drive link *p*'s register-driven net from register (bank, index); 0 when disabled |
| `xo_fu[p]` | drive link *p*'s FU-driven net with this cycle's FU result; 0 when disabled |

## Multi-cycle communication: banks, hold times and the two kinds of net

This is the part that takes the most care. Transfers between islands come in
two kinds.

**Chained transfer (one cycle).** A short wire (half a clock period) can share
a cycle with a short operation (also half a period). Which half comes first
decides which register is used:

* *operation, then wire:* the producer's FU result goes out on the link's
  **FU-driven net**. The receiving island writes it into one of its own
  registers at the end of the same cycle.
* *wire, then operation:* a register of the producer drives the link's
  **register-driven net**. The receiving island feeds it straight into its FU.

**Multi-cycle transfer (j cycles).** The producer writes the value into a
register of **bank j**, and that register drives the register-driven net. The
consumer reads the net in the last cycle of the path. The register must not
change during those cycles. Physically the path is then timed as a j-cycle path
rather than a single-cycle one.

Two rules keep the hardware honest:

1. **Hold rule, checked in hardware.** Each register has a small counter,
   loaded with j-1 when a bank-j register is written. A write to a register
   whose counter is still non-zero sets the sticky `hold_err` output. The write
   still happens. An out-of-range bank or index also sets `hold_err`, and that
   write is dropped. Bank 1 has no hold restriction. The controller programs
   must respect the rule; the flag catches a program that does not.
2. **No chained FU-to-FU path.** An FU-driven net can only end in a register,
   never in another FU's operand. So no combinational path crosses more than
   one island boundary, and the netlist has no loop through the links. The
   register-driven net and the FU-driven net are kept apart for this reason.

A register may stay live past its bank's hold time if a later reader needs it.
The bank fixes the minimum hold, not the maximum.

## The array and its global interconnect (`rdr_array`)

`rdr_array` instantiates `NISL` islands. Each island gets its own unit mix
(bit *i* of `HAS_ALU`, `HAS_MUL`, `HAS_DIV`) and its own program (`PROG[i]`).
Every island has `NPORT` links. The global interconnect is a table of
point-to-point wires:

* The input side of link *p* of island *i* is driven by link
  `LINK_PORT[i][p]` of island `LINK_ISL[i][p]`.
* Both nets of the link (register-driven and FU-driven) follow that table.
* An island number of `NISL` or more leaves the link open; it then reads 0.

A wire may join neighbours. It may also be a long wire that passes over other
islands, between two islands that are not adjacent.

How many cycles a wire takes does not appear in the netlist. The programs
honour it by reading a j-cycle wire only from a bank-j register that has been
held for j cycles. In physical design the wire becomes a multi-cycle path
constraint.

`start` goes to every island. `busy` and `done` come from island 0, and an
assertion checks that all islands agree. `hold_err` and `bad_op` are ORed over
all islands. The defaults of `rdr_array` are the DCT example.

## The controllers (`rdr_island_fsm`)

Each island has its own controller. Every controller has the same state graph:
`S_IDLE`, then `S_RUN` with a step counter from 0 to `NSTEPS-1`, then back to
`S_IDLE`. The controllers differ only in their output table, the `PROG`
parameter (one `ctrl_t` per step). All islands see the same `start`, so they
run in lock step without any wires between controllers. `rdr_array` has an
assertion that checks this.

Timing:

* `start` is sampled in `S_IDLE` and ignored while busy.
* Step *s* is active in the (*s*+1)-th cycle after the edge that took `start`.
* `done` pulses in the cycle after the last step. By then the last step's
  results are in registers.
* A `start` in the `done` cycle begins the next run at once (back to back).
* Outside `S_RUN` the control word is `CTRL_NOP`: no operation, no write, all
  links driven with 0.

## The example: a DCT graph on 2x2 islands (`rdr_dct_top`, `rdr_dct_pkg`)

The graph has six add/sub nodes (1, 2, 5, 6, 9, 10) and six multiplications
(3, 4, 7, 8, 11, 12):

```
 1 -> 3 -> 5 -> 7 -> 9          2 -> 4 -> 6 -> 8 -> 9
           5 -> 11 -> 10                  6 -> 12 -> 10
```

The graph fixes the edges. The external operand of each node, and which of
the add/sub nodes subtract, are choices of this design:

```
n1 = x0 + x1   n3 = n1*c0   n5 = n3 + x4   n7 = n5*c2   n11 = n5*c4   y0 = n9  = n7 + n8
n2 = x2 - x3   n4 = n2*c1   n6 = n4 - x5   n8 = n6*c3   n12 = n6*c5   y1 = n10 = n11 - n12
```

Delays assumed by the mapping: add/sub 1 ns, multiply 2 ns, horizontal wire
1 ns, vertical wire 2 ns. The clock is 2 ns. The floorplan and binding:

```
   TL  MUL2: nodes 3, 7, 11   ---1 ns---   TR  ALU1: nodes 1, 5, 10
              |                                      |
            2 ns                                   2 ns
              |                                      |
   BL  ALU2: nodes 2, 6, 9    ---1 ns---   BR  MUL1: nodes 4, 8, 12
```

Schedule, 7 control steps (14 ns):

| step | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|
| ALU1 (TR) | n1 | | n5 | | | | n10 |
| ALU2 (BL) | n2 | | n6 | | | | n9 |
| MUL1 (BR) | | n4 | | | n12 | n8 | |
| MUL2 (TL) | | n3 | | | n7 | n11 | |

How each edge is carried:

| edge | path | kind | register |
|---|---|---|---|
| 1->3, 2->4 | add + 1 ns wire | chained, FU-driven net | bank 1 of the multiplier island |
| 3->5, 4->6, 11->10, 8->9 | 1 ns wire + add | chained, register-driven net | bank 1 of the multiplier island |
| 5->7, 5->11 | 1 ns wire + 2 ns multiply | 2-cycle | TR bank 2, held steps 4-6 |
| 6->12, 6->8 | 1 ns wire + 2 ns multiply | 2-cycle | BL bank 2, held steps 4-6 |
| 7->9 | 2 ns wire + add | 2-cycle | TL bank 2, held steps 6-7 |
| 12->10 | 2 ns wire + add | 2-cycle | BR bank 2, held steps 6-7 |

Step 4 is empty: every node that could run next waits for a 2-cycle transfer.
Nodes 8 and 11 wait one more step because their multipliers are busy with 12
and 7.

### Interface of `rdr_dct_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | capture `x`, `c` into input registers and run; ignored while `busy` |
| `x[6]` | in | W | data operands x0..x5 |
| `c[6]` | in | W | coefficients c0..c5, signed Q(W-FRAC).FRAC (Q2.14 by default) |
| `busy` | out | 1 | high for the 7 steps |
| `done` | out | 1 | one-cycle pulse 7 cycles after the start edge |
| `y0`, `y1` | out | W | n9 and n10; valid from `done` until the next run overwrites them |
| `hold_err`, `bad_op` | out | 1 | sticky error flags (hold-time violation; operation on a missing unit); both stay 0 with the built-in programs |

Arithmetic is W-bit two's complement with wrap-around (W = 16 by default). A
multiply computes `(a*b) >>> FRAC` and keeps the low W bits. A divide truncates
toward zero, and division by 0 gives 0.

## Files

| file | content |
|---|---|
| `rtl/rdr_pkg.sv` | widths, `fu_op_e`, `ctrl_t` and the helpers `s_reg`, `s_wire`, `s_ext`, `w_fu`, `w_wfu`, `x_reg` for writing programs |
| `rtl/rdr_dct_pkg.sv` | the DCT example: four island programs, unit mix, link tables, sizes |
| `rtl/rdr_alu.sv`, `rdr_mul.sv`, `rdr_div.sv` | functional units |
| `rtl/rdr_lcc.sv` | local computational cluster |
| `rtl/rdr_regfile.sv` | banked register file with hold checker |
| `rtl/rdr_island_fsm.sv` | island controller |
| `rtl/rdr_island.sv` | island |
| `rtl/rdr_array.sv` | array of islands and the link-table interconnect |
| `rtl/rdr_dct_top.sv` | 2x2 DCT example, top level: `rdr_array` plus input capture and result taps |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks itself against its own reference model and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/rdr_pkg.sv rtl/rdr_dct_pkg.sv tb/tb_rdr_dct_top.sv --top-module tb_rdr_dct_top
./obj_dir/Vtb_rdr_dct_top
```

The other testbenches are built the same way: `tb_rdr_alu`, `tb_rdr_mul`,
`tb_rdr_div`, `tb_rdr_lcc`, `tb_rdr_regfile`, `tb_rdr_island_fsm`,
`tb_rdr_island` and `tb_rdr_array`. `tb_rdr_array` runs a different
configuration: six islands in two rows of three. In it, a 2-cycle long wire
joins two islands that are not adjacent, and a short wire joins two
neighbours. A second, one-island array in the same testbench runs an illegal
program, which must raise `hold_err` and `bad_op`.

`tb_rdr_array_12x12` builds the array at the size of a 70 nm, 5 GHz die: 12x12
islands, with 7 register banks because a wire needs up to 7 cycles from corner
to corner. One corner island sends a value over a 7-cycle corner-to-corner wire
from a bank-7 register. The opposite corner multiplies it in the last cycle of
the path, and a neighbour adds the product after a short chained wire. The
test checks the values, the 9-cycle latency and that all other islands stay
idle. It takes about half a minute to compile.

`tb_rdr_dct_top` runs the top at its default parameters. It covers two
directed cases and 40 random ones. It checks:

* `y0` and `y1` against an independent model of the graph;
* the 7-cycle latency, and that `busy` lasts exactly 7 cycles;
* that a `start` with new inputs during a run is ignored;
* back-to-back runs;
* that each unit adds, multiplies or idles in exactly the control steps of
  the schedule above;
* that the error flags stay low.

It also counts how often each kind of transfer was used and fails if one never
was: the chained FU-driven write, the chained wire operand, the multi-cycle
hold, and a local register operand.

## Changing it

* **A new schedule or graph.** Write one `ctrl_t [NSTEPS-1:0]` table per
  island with the helpers in `rdr_pkg` (see `rdr_dct_pkg` for the pattern).
  Choose the unit-mix bits, `NBANKS` (the longest path in cycles), `NREGS` and
  the link tables, and instantiate `rdr_array` with them (see `tb_rdr_array`).
  Keep every multi-cycle source in bank j for a j-cycle path, and do not
  rewrite it within j cycles. `hold_err` catches a program that does.
* **Bigger arrays.** `NISL` and the link tables set the size and the wiring.
  The `ctrl_t` field widths allow 7 banks (enough for a 7-cycle
  corner-to-corner die), 8 registers per bank and 4 links per island.
* **Width and format.** Change `DATA_W`/`FRAC_W` in `rdr_pkg`, or override
  `W`/`FRAC`.

## Departures and own choices

These follow the architecture:

* the island structure (cluster, banked register file, own FSM);
* the identical controller state graphs with island-specific outputs;
* the banks by path length, and the hold requirement;
* single-cycle work inside an island;
* the example's graph, binding, floorplan, delays and 7-step schedule.

These are this design's own choices:

* the data width and the fixed-point format;
* the external operands of the example's nodes, and which nodes subtract;
* the `start`/`busy`/`done` handshake and the input capture registers;
* asynchronous reset;
* the control-word format;
* one operation and one register write per island per step;
* splitting each link into a register-driven and an FU-driven net;
* the hardware hold checker and the `bad_op` flag;
* the divider, which the architecture only names: combinational, integer,
  truncating;
* every unit is single-cycle. The multiplier takes a full cycle, as in the
  example; there is no pipelined multiplier.

What is not here:

* No application for a large array (for instance 12x12 islands for a 70 nm,
  5 GHz die). `rdr_array` builds such an array, and `tb_rdr_array_12x12`
  exercises one. But what its islands hold exists only once an application is
  mapped onto it.
* No synthesized datapaths for other DSP benchmarks: their graphs and
  schedules are not available.
* The scheduling, binding and placement that produce island programs are
  software, not hardware. The example's programs were written by hand from its
  schedule.
* Multi-cycle path constraints for physical design are not generated. The
  `hold_err` checker enforces the functional side of those paths.
