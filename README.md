# Cyclic reservation interval scheduler for an input queued ATM switch

An input queued switch is cheap, but with FIFO input queues it is limited by
head-of-line blocking: under uniform traffic a large switch carries only about
58.6 % of its capacity. This RTL implements a switch that fixes this with
**advance reservation**. Each input keeps a random-access buffer. In every time
slot each input books an output port for a slot a few slots in the future, then
parks the booked cell in a small send buffer until that slot comes.

The scheduler is the *cyclic reservation interval* (CRI) scheme from "A Simple
and Fast Scheduler for Input Queued ATM Switches" (Song, Jacob, Kim, Kwon, Chung,
Yoon). The RTL was written from that description. The parts the publication
leaves open were filled in here. They are listed under
[Where this design makes its own choices](#where-this-design-makes-its-own-choices).

Three properties make the scheme work:

* **Full coordination without a central arbiter.** The outputs already reserved
  for a future slot are kept in one N-bit *reservation table* (RT). That table
  is passed from input to input, one input per slot. Each input sees every
  booking made before it, so two inputs can never book the same output for the
  same slot.
* **Parallel search.** An input compares the destinations of its oldest `d`
  cells (the *search depth*) with the free outputs in the table, all at once.
  It takes the oldest cell that fits, so the time a search takes does not
  depend on `d`.
* **Fairness by rotation.** The order in which inputs see a table changes
  every slot, so no input is always first. No barrel shifter is needed. For
  even N this is only partly true; see [Fairness](#fairness).

The default size is 16 ports, `d = 16` and 20-cell input buffers. Under
saturated uniform traffic this reaches about 95-96 % throughput. The cost is a
fixed extra delay of (N-1)/2 slots on average, spent in the send buffer.

## The reservation interval

One clock cycle is one time slot, which is one cell time. Input `i` in slot `t`
books for slot `t + CRI_i(t)`, where

    CRI_i(0) = i
    CRI_i(t) = (CRI_i(t-1) + TAU) mod N        i.e.  (i + TAU*t) mod N

In any slot the N inputs hold N different intervals `0..N-1`:

* The input with `CRI = N-1` is the **first reservation port (FRP)**. It books
  for a slot nobody has touched yet, so it gets an empty table.
* The input with `CRI = 0` is the **last reservation port (LRP)**. It books for
  the current slot. After it has booked, that slot's table is final and is
  dropped.

In between, the table that input `j` worked on in slot `t` stands for the same
future slot as input `i`'s table in slot `t+1`, when

    j = (i + 1 + TAU) mod N

So each table advances along a fixed ring `i -> i-(1+TAU) -> ...`. The ring
covers all N tables only if `GCD(TAU+1, N) = 1`. The same condition ensures
that an input never books the same slot twice. This matters because the slot
in the send buffer where the booked cell is stored must be free. `TAU` must
also not be a multiple of N. `cr_module` refuses an illegal `TAU` at
elaboration.

### One slot, in order

For every input `i` at once:

1. The input reads `CRI_i` from its `cri_counter`.
2. If `CRI_i = N-1`, the input sees an all-zero table.
3. The IB controller finds the oldest of the first `d` cells whose output bit
   is 0. It sets that bit (`grant`).
4. On the clock edge, `RT_i` takes the updated table of `RT_(i+1+TAU) mod N`.
   The LRP's table is not carried forward: the table that would receive it
   belongs to next slot's FRP and is zeroed on read.
5. The chosen cell leaves the random-access buffer. The cells behind it move
   up one place.
6. The chosen cell is written into the send buffer at position `CRI_i`. It
   reaches the head `CRI_i` slots later.

## Keeping each flow in order

A *flow* is the stream of cells from one input to one output. The oldest
matching cell is always taken first, so the cells of a flow are booked in
arrival order. The intervals change from slot to slot, though, so a younger
cell can be booked for an **earlier** slot than an older cell of the same flow
that is still in the send buffer.

`send_buffer` repairs this at write time. It looks at the positions from the
write position onward that hold cells with the new cell's destination. It
deals those cells back into the same positions in age order, and the new cell,
the youngest, takes the last one. With one such cell, this is a plain swap.
Only cells of the same destination change places, so the output booked for
each slot does not change. The `exch` output pulses when this happens. Under
full load at the default size it happens for about 9 % of bookings.

## Blocks

```
               +------------------ atm_switch ------------------------+
 in_* [i] ---> | ib_module[i]                                          |
               |   ra_buffer --q--> ib_controller --sel--> send_buffer -+--> space_switch --> out_*
               |        ^               ^   | grant          ^ cri   |
               |        |            rt_busy|                 |       |
               |   cr_module: cri_counter[i], RT ring  <------+       |
               +-------------------------------------------------------+
```

| File | Block | What it holds |
|---|---|---|
| `rtl/cri_pkg.sv` | package | default sizes, `gcd`, `tau_ok` |
| `rtl/cri_counter.sv` | CRI of one input | `log2 N`-bit modulo-N counter, reset to the input index |
| `rtl/cr_module.sv` | contention resolution | N counters, N tables of N bits, FRP clear, ring shift |
| `rtl/ra_buffer.sv` | random-access buffer | `DEPTH` cells in arrival order, remove-any with compaction, append, overflow loss |
| `rtl/ib_controller.sv` | IB controller | `min(d, DEPTH)` comparators and a priority encoder (combinational) |
| `rtl/send_buffer.sv` | send buffer | N-cell shift register, positional write, flow-order exchange |
| `rtl/ib_module.sv` | input buffer module | the three blocks above |
| `rtl/space_switch.sv` | fabric | N x N crossbar, routed by destination, collision flag |
| `rtl/atm_switch.sv` | top | N `ib_module`, one `cr_module`, one `space_switch` |

## Timing

* One clock cycle is one cell time. A whole cell (`CELL_W` bits) moves as one
  word.
* A cell that arrives in slot `t` is written into the random-access buffer at
  the end of the slot. It can be searched from slot `t+1`.
* A cell booked in slot `s` with interval `c` is at the switch outputs in slot
  `s + 1 + c`. The extra slot comes from the send buffer's register stage. It
  is the same for every input, so no two inputs collide.
* The search, table update and crossbar are combinational within one slot. At
  `N = 16`, the critical path runs from the table registers through the
  16-cell compare and priority encoder to the ring register.

The time from arrival to departure is therefore the random-access buffer wait,
plus the interval, plus 2 slots.

## Parameters (`atm_switch`)

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 16 | ports |
| `D` | 16 | search depth `d` |
| `DEPTH` | 20 | random-access buffer size in cells. 20 cells is the point beyond which larger buffers gave no lower loss in the published evaluation. |
| `TAU` | 2 | interval step. Legal when `GCD(TAU+1, N) = 1` and `TAU mod N != 0`. |
| `CELL_W` | 424 | cell width in bits (53-byte ATM cell) |

`D > DEPTH` is allowed: then every buffered cell is searched.

## Ports (`atm_switch`)

All signals are plain packed arrays, indexed by port.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (one per cell time); synchronous active-low reset |
| `in_valid`, `in_dest`, `in_data` | in | N, N x log2 N, N x CELL_W | arriving cell and its output port |
| `out_valid`, `out_src`, `out_data` | out | N, N x log2 N, N x CELL_W | cell leaving each output and its input |
| `sched`, `sched_cri`, `sched_idx`, `sched_dest` | out | per input | booking made this slot: interval, buffer position, output |
| `drop` | out | N | arrival lost, buffer full |
| `exch` | out | N | flow-order exchange in the send buffer |
| `occupancy` | out | N x log2(DEPTH+1) | random-access buffer fill |
| `frp`, `lrp` | out | log2 N | first and last reservation port this slot |

The destination port comes in beside the cell. Translating it from the cell
header is not part of this design.

## Measured behaviour

These results come from the testbenches, under uniform Bernoulli traffic. The
reference values are the published figures for this scheduler.

| Test | Measured | Reference |
|---|---|---|
| saturated throughput N=4, d=1 / d=4 | 0.670 / 0.868 | 0.672 / 0.864 |
| saturated throughput N=8, d=8 | 0.914 | 0.915 |
| saturated throughput N=16, d=1 / d=4 / d=16 | 0.608 / 0.836 / 0.953 | 0.617 / 0.841 / 0.961 |
| loss, N=16, 20-cell buffers, load 0.95, d=4 / 8 / 16 | 0.119 / 0.039 / 0.0081 | about 0.14 / 0.062 / 0.0085 (read off a plot) |
| loss, load 0.90, d=4 / 8 | 0.069 / 0.0042 | about 0.088 / 0.005 (read off a plot) |
| mean delay, d=16, load 0.2 / 0.8 (2 register slots removed) | 7.9 / 11.6 | about 8 / 11.5 (read off a plot) |

### Fairness

Under saturated traffic, the odd-numbered inputs get more than the even ones:

| N, d | odd inputs' share / even inputs' share |
|---|---|
| 16, 16 | 1.05 |
| 16, 4 | 1.06 |
| 16, 1 | 1.09 |
| 8, 8 | 1.11 |
| 4, 4 | 1.24 |
| 4, 1 | 1.42 |

Inputs of the same parity get equal shares. The imbalance shrinks as N and
`d` grow.

Loss at small `d` is somewhat lower than the reference curves. One likely
cause is that this buffer accepts an arrival into a place freed in the same
slot.

## Where this design makes its own choices

* **`TAU = 2`.** The publication gives only the legality rule. For even N the
  rule forces `TAU` to be even. Then `CRI_i` keeps the parity of `i`, and the
  FRP role (the empty table) only ever visits the odd-numbered inputs,
  `N / GCD(TAU, N)` of them. Every table is seen first by an odd input, then an
  even one, and so on. This follows from the published rule itself, whatever
  legal `TAU` is chosen. It is not the "inherent fairness" the publication
  claims. Within each parity class the rotation does share the throughput
  evenly (within 3 %). See [Fairness](#fairness).
* **Exchange with several cells.** The publication describes swapping with
  "a cell" of the same flow. Here any number of queued same-flow cells are
  reordered by age, which reduces to the swap when there is one.
* **Register stages.** Arrivals are searched from the next slot, and cells
  leave one slot after their booked slot. See [Timing](#timing).
* **Overflow.** An arrival to a full buffer is lost, unless a cell leaves that
  buffer in the same slot.
* **IB controller and fabric insides.** The publication does not describe
  either. The simplest structures that do the job are used: a priority encoder
  and a crossbar.
* **Reset.** Synchronous and active-low. Tables start empty, buffers start
  empty, and `CRI_i` starts at `i`. Only control state is reset, not cell
  storage.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. Example with plain
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cri_pkg.sv rtl/atm_switch.sv \
    tb/tb_atm_switch.sv --top-module tb_atm_switch -Mdir obj -o sim
./obj/sim
```

The package file goes first. `-Irtl` lets Verilator find the other modules by
name.

| Testbench | What it checks |
|---|---|
| `tb_cri_counter` | interval sequence against `(i + TAU*t) mod N` |
| `tb_ra_buffer` | queue model: positions, removal and compaction, overflow, accept-when-freed |
| `tb_ib_controller` | oldest-fit choice for `d` below and above the buffer size |
| `tb_send_buffer` | HOL output and exchange flag against an age-sorting model |
| `tb_cr_module` | each input sees exactly the bookings made so far for its target slot (absolute-slot model); FRP/LRP |
| `tb_space_switch` | routing of random partial permutations; collision flag |
| `tb_ib_module` | choice, grant, loss, and departure exactly in the booked slot, with flows in order |
| `tb_atm_switch` | whole switch at default size, 3000 slots at load 0.95 then drain: every accepted cell is delivered once, to the right output, in flow order, in its booked slot. It also checks the mean interval near (N-1)/2, and that bypass of the HOL cell, blocked inputs, loss, exchanges and FRP rotation all occur. |
| `tb_throughput` | saturated throughput for six (N, d) points; equal shares within each parity class of inputs |
| `tb_load_sweep` | cell loss at 20-cell buffers and mean delay at two loads, N = 16 |

The assertions in `send_buffer` (booked place free), `cr_module` (grant only on
a free output, at most one grant) and `atm_switch` (no output collision) fire
in simulation when `--assert` is given.

Building the default-size `tb_atm_switch` takes about a minute; running it
takes under a second.
