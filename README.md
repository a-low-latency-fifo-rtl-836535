# Token-ring FIFOs for mixed-clock systems

A FIFO between two clock domains usually pays for safety with latency: either
every data word goes through a synchronizer, or the item has to walk through a
chain of stages before the receiver can see it. The FIFOs here avoid both.
The storage is a ring of identical cells. Items are written once, into the cell
at the tail, and are read from that same cell. They never move. Two tokens
circulate around the ring: a **put token** marks the tail and a **get token**
marks the head. Only two one-bit status signals cross between the clock
domains, *full* and *empty*, and each is synchronized to the one side that uses
it. The data bus is never synchronized. The status logic keeps the receiver
away from a cell whose write has not completed, provided its margin suits the
ratio of the two clocks (see "Full and empty").

The RTL has three members of this family, plus a relay station:

| module | clocks | what it is |
|---|---|---|
| `single_clock_fifo` | one | The basic ring. An item written in cycle *k* can be read in cycle *k+1*. |
| `mixed_clock_fifo` | put, get | The same ring with synchronized full/empty, "early" full/empty definitions and a deadlock detector that injects dummy items. |
| `relay_station_fifo` | put, get | The mixed-clock ring with no requests: it passes a packet on every cycle unless stopped. It joins two relay-station chains that run on different clocks. |
| `relay_station` | one | A pipeline stage for long wires, with a main and an auxiliary register and a registered stop signal. |
| `lowlat_fifo_top` | all | The three FIFOs side by side. The relay-station FIFO has one relay station before it and one after it. |

All sizes default to 8 cells of 8 bits.

## The cell and the two tokens

`fifo_cell` holds one item (`DATA_W` bits plus a validity bit) in a register.
It also has two token flip-flops, one for each token. Cell *i* passes both
tokens to cell *i+1*, modulo `NCELLS`. A cell "has" the put token while its
input `ptok_in` is high. That input is the put-token flip-flop of the previous
cell. The same holds for the get token.

* **Put** (`clk_put`): the put controller raises the global `en_put`. The
  cell that holds the put token then stores `data_put` and `req_put` at the next
  `clk_put` edge. Every token flip-flop copies its input on that edge, so the
  token moves one place. The cell shows itself as full (`f_i = 1`) during the
  put cycle, before the data edge.
* **Get** (`clk_get`): the get controller raises `en_get`. The cell that holds
  the get token then drives its item and validity bit onto the read bus during
  the cycle. It shows itself as empty at once, and the get token moves at the
  next `clk_get` edge.

The put and get enables are global. Each is a small gate on the FIFO's status
and the interface request, and every cell sees it (`put_controller`,
`get_controller`). The read bus is an OR of all cells. A cell that is not being
read drives zeros, so `data_get` is 0 in a cycle with no read. At reset both
tokens are at cell 0 and all cells are empty.

The cell's full/empty state changes from two clock domains. A put sets it and a
get clears it. In this RTL each domain owns one flag flip-flop. A put sets
`pflag` to `~gflag`, and a get sets `gflag` to `pflag`. The cell holds an item
when the two flags differ. Setting twice, or clearing twice, changes nothing,
as with a set/reset latch. `f_i = put_now | (stored & ~get_now)` adds the
in-cycle early indication. Each side reads the other side's flag only when the
ring hands it the cell, long after that flag last changed. The detectors sample
`f_i`/`e_i` only on their own clock edges.

## Full and empty

The full and empty detectors look at all cells at once. Their logic is a pure
function of the per-cell flags, registered on the owning clock:

* `full_detector` (put clock): full when the ring has no run of `RUN`
  consecutive empty cells.
* `empty_detector` (get clock): empty when the ring has no run of `RUN`
  consecutive full cells.

Full cells always form one contiguous run from head to tail. "No run of *R*
full cells" therefore means "fewer than *R* items".

In the **single-clock FIFO**, `RUN = 1` and there is one flip-flop. Full means
no empty cell and empty means no item, both valid from the edge after the
operation that caused them. The sender holds its item while `full` is high.
The receiver's request is ignored while `empty` is high.

In the **mixed-clock FIFO**, the status is computed from cells written by one
clock and read by the other. So each detector output passes through a second
flip-flop (`FULL_SYNC = EMPTY_SYNC = 2`) before it is used. That costs a cycle.
The sender could deposit one more item after the FIFO became full, and the
receiver could read one more after it became empty. To absorb that cycle, the
definitions move by one place:

* **full** means fewer than two empty cells;
* **empty** means fewer than two full cells.

The sender and receiver see the same protocol as before, but an 8-place FIFO
sometimes behaves as a 7-place one. Each further synchronizer flip-flop needs
the definition to move by one more place. `RUN = SYNC + MARGIN` encodes this.

A second limit concerns very different clock rates. A cell shows itself as full
during the put cycle, but its data register is written only at the end of that
cycle. Suppose the receiver runs more than about three times faster than the
sender. It could then read two items and reach the cell that is still being
written, returning its old contents. `EMPTY_MARGIN = 1` makes "empty" mean
fewer than three items, which keeps such a receiver one more cell away. The
deadlock detector follows the same definition.

The mirror case has a mirror fix. A cell shows itself as empty at the start of a
read cycle, but a slow receiver captures the data only at the end of that
cycle. A much faster sender could write the cell in between. `FULL_MARGIN = 1`
makes "full" mean fewer than three empty cells. Both margins default to 0.

At a 4.4:1 clock ratio the testbench confirms both failures with margin 0: a
stale read when the receiver is faster, and an overwritten item when the sender
is faster. With the margin set on the faster side, both configurations pass.
Choose the margin from the worst-case ratio of the two clocks. Each cell has
two SVA assertions that catch a wrong choice in simulation: a put into a cell
that still holds an item, and a get from a cell whose write has not completed.

## Deadlock and dummy items

This is the subtle part of the mixed-clock FIFO. With "empty" meaning fewer than
two items, one valid item can sit in the FIFO while the receiver is stalled.
If the sender has nothing more to send, that item would never come out.

`deadlock_detector` (put clock) watches for exactly this case. It fires when the
FIFO is "empty" and at least one *full* cell holds a valid item. It must check
that the cell is full, because validity bits are not cleared when an item is
read. A stale bit in an empty cell must not count. The result passes through two
`clk_put` flip-flops and becomes `empty_2`. The put controller then enables a
put even without `req_put`:

```
en_put = ~full & (req_put | empty_2)
```

A put without `req_put` stores the item with its validity bit at 0. This is a
**dummy item**. Two items are now stored, so the empty detector releases the
receiver a few `clk_get` cycles later. The receiver reads the real item with
`valid_get = 1`. When it reaches the dummy it reads it with `valid_get = 0`,
and must discard it. A dummy cannot set off another injection, because dummies
are not valid.

Timing to be aware of: `empty_2` is two flip-flops behind the FIFO state. So it
is usually still high in the cycle after the first dummy went in, and an idle
sender then gets a second dummy. Both are harmless and are read as invalid
items. The testbenches count them and check only that real items are never
lost, duplicated or reordered. An item written into an otherwise empty
mixed-clock FIFO by an idle sender therefore reaches the receiver only after
about two `clk_put` cycles (deadlock detection), plus the dummy insertion, plus
two `clk_get` cycles (empty synchronization). This restart delay is the main
cost of the scheme. When the sender keeps sending, no dummy is ever needed.

`tb_mixed_clock_fifo` prints the latency it measures, from the `clk_put` edge
that writes an item to the `clk_get` edge that reads it. It uses a 10 ns
sender and a 13.1 ns receiver. Under light load (30 % of sender cycles carry
an item, and the receiver always requests) the latency was 16.7 to 52.6 ns,
about 32.9 ns on average. A lone item that had to be pushed out by a dummy
took 44.7 to 57.9 ns.

## The relay-station variant

A relay station is a pipeline register for a long wire. A link that takes
several cycles is cut into one-cycle segments. A packet is a data item plus a
valid bit. Flow control goes backwards with stop signals, and those are
registered too. The transfer rule used everywhere here: a packet on a link
moves at a clock edge if the receiving side's stop output was low during that
cycle.

`relay_station` normally copies its input into the main register (MR), which
drives its output. When `stop_in` is high, MR keeps its packet. The packet that
the left neighbour sent in the same cycle is parked in the auxiliary register
(AR), and `stop_out` rises at that edge. When `stop_in` falls, MR is sent
first. At the same edge AR moves into MR to be sent next, and `stop_out` falls.
Nothing is lost or duplicated, and with no stops the latency is one cycle per
station.

`relay_station_fifo` takes the place of one relay station where the clock
changes. It has no requests:

* put side: `en_put = ~full`. Every packet offered is enqueued, valid or void
  (`req_put` is only the valid bit), unless the FIFO is full. `stop_out` is
  `full`.
* get side: `en_get = ~empty & ~stop_in`. A packet leaves on every cycle unless
  the FIFO is empty or the next station stops it. `valid_get` is the stored
  valid bit. When nothing is read the output is a void packet.

The put side fills the ring on every cycle, with void packets if nothing else.
So an "empty" FIFO is refilled at once, and no deadlock detector is needed.
It uses the same cells as the mixed-clock FIFO, so it has the same clock-ratio
limit, and it takes the same `FULL_MARGIN`/`EMPTY_MARGIN` parameters. At a
4.4:1 ratio, margin 0 trips the cell assertions on the faster side, and
margin 1 on that side passes.

## Interfaces and timing

All designs use an asynchronous, active-low `rst_n`. Release it while the
clocks run, or synchronize its release to each clock in the system around the
FIFO.

`single_clock_fifo` / `mixed_clock_fifo`:

| port | dir | clock | meaning |
|---|---|---|---|
| `req_put`, `data_put[DATA_W]` | in | put | Drive right after a clock edge. The item is taken at the next edge if `full` was low. Hold it while `full` is high. |
| `full` | out | put | Registered. |
| `req_get` | in | get | Drive right after a clock edge. |
| `data_get[DATA_W]`, `valid_get` | out | get | Combinational during the cycle of an enabled read. Capture them on the next edge. |
| `empty` | out | get | Registered. While it is high a request is not served. |

In the mixed-clock FIFO, a read with `valid_get = 0` while `empty` is low is a
dummy item. The sender must drive `req_put` right after its edge, as the table
says. The put enable must not change late in the cycle, because the other
clock samples the cell flags at arbitrary times.

`relay_station_fifo`: `req_put`/`data_put` form packet-in, `stop_out` is its
stop, `valid_get`/`data_get` form packet-out and `stop_in` is the stop from the
right. `lowlat_fifo_top` exposes every FIFO's ports with the prefixes `sc_`,
`mc_` and `rs_`. For the relay-station link these are `rs_in_*` (the first
station's input and `stop_out`) and `rs_out_*` (the last station's output and
`stop_in`).

Parameters (all with defaults): `NCELLS` (8), `DATA_W` (8). The mixed-clock
FIFO adds `FULL_SYNC`/`EMPTY_SYNC` (2) and `FULL_MARGIN`/`EMPTY_MARGIN` (0).
The relay-station FIFO adds the same four. The top adds `N_RS_PUT`
and `N_RS_GET` (1), the lengths of the relay-station chains.

## How this RTL relates to the original circuit

The original design is a transistor-level circuit in 0.6 µm CMOS. It reaches
500 to 580 MHz in circuit simulation, a result that RTL cannot reproduce. This
RTL keeps the behaviour the original describes: the cells, the tokens, the
gate equations of the controllers, the full/empty/deadlock conditions and the
numbers of synchronizer flip-flops. It implements them as ordinary
synthesizable logic:

* **Cell state.** The original uses an SR latch, set asynchronously by a put
  and reset by a get. Here it is the pair of flag flip-flops described above.
  The set/reset behaviour, the value at every clock edge and the early in-cycle
  indication are the same.
  In a zero-delay model a latch set from `ptok_in & en_put` would also be set
  by the instant after a clock edge, when the token has moved but `en_put` has
  not yet changed. That would record an item that was never written. The flag
  pair is immune to this.
* **Detectors.** The original uses precharged dynamic gates. Here they are
  static AND/OR logic with the same function, evaluated for any `NCELLS`.
* **Read bus.** The original uses shared tristate buses. Here it is an OR bus
  with zero from idle cells.
* **Reset.** The original does not specify reset. The choices made here: both
  tokens at cell 0, cells empty, `full = 0`, `empty = 1`, `empty_2 = 0`, relay
  stations holding void packets.
* **Dummy items.** The original states that one dummy item is injected. Its
  two-flip-flop deadlock synchronizer, kept here, lets a second one through
  while the sender is idle (see above).
* **Relay station.** It is described only by its behaviour and its registers.
  Copying AR into MR on un-stall, rather than muxing AR to the output, is this
  design's choice. Every packet, void or valid, is stored.
* **Fast-sender margin.** The original works out only the fast-receiver case
  of the clock-ratio limit in detail. For the sender side it says only that the
  faster interface must be stopped earlier. `FULL_MARGIN` is that rule applied
  to the full detector. Offering both margins in the relay-station FIFO is
  also this design's choice. The original discusses the limit only for the
  mixed-clock FIFO.
* **Parameterization.** The controllers of the three variants share modules,
  selected by `lowlat_fifo_pkg::fifo_variant_e`. The extra-latch and
  fast-receiver options of the mixed-clock FIFO are parameters rather than
  separate circuits.

Metastability itself cannot be shown in a two-state simulator. The
synchronizer flip-flops are present and placed where the design needs them,
but their effectiveness depends on the target technology and clock rates.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

* `tb_put_controller`, `tb_get_controller`: exhaustive truth tables of all
  three variants.
* `tb_full_detector`, `tb_empty_detector`, `tb_deadlock_detector`: random and
  hand-picked cell patterns, including runs across the wrap-around of the ring,
  against a run-length reference with the flip-flop delay.
* `tb_fifo_cell`: random put/get stimulus on two clocks against a cycle model.
  It checks the early full/empty indication, the token flip-flops, the read bus
  and the stale validity bit.
* `tb_relay_station`: a three-station chain with random stops and void packets.
  It checks exact packet order and a latency of one cycle per station.
* `tb_single_clock_fifo`: scoreboard, exact `full`/`empty` flags, one-cycle
  latency, one item per cycle at full load, full and empty stalls.
* `tb_mixed_clock_fifo`: two unrelated clocks in both speed orders. It checks
  the scoreboard, full rate on the slower side with no dummy item injected,
  lone items delivered through dummy injection, and a drain at the end. It
  also prints the measured latency.
* `tb_mixed_clock_fifo_options` (with the helper `mixed_fifo_traffic`): four
  mixed-clock FIFOs with their own clocks and scoreboards. They cover the
  default FIFO, `EMPTY_MARGIN = 1` with a 4.4 times faster receiver, three
  synchronizer flip-flops per side, and `FULL_MARGIN = 1` with a 4.4 times
  faster sender.
* `tb_relay_station_fifo`: void packets, random `stop_in`, back-pressure,
  full rate on the slower side, and ordered delivery of every valid packet.
* `tb_relay_station_fifo_options` (with the helper `relay_fifo_traffic`):
  three relay-station FIFOs with their own clocks and scoreboards. They cover
  the default FIFO, `EMPTY_MARGIN = 1` with a 4.4 times faster receiver, and
  `FULL_MARGIN = 1` with a 4.4 times faster sender.
* `tb_lowlat_fifo_top`: all three designs at the default sizes at once. It
  counts every mechanism (full and empty stalls, dummy injection and dummy
  read, relay-station FIFO full, relay-station stalls on both sides, void
  packets) and fails if any never happened.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/lowlat_fifo_pkg.sv tb/tb_mixed_clock_fifo.sv --top-module tb_mixed_clock_fifo
./obj_dir/Vtb_mixed_clock_fifo
```

The testbenches drive the sender and receiver with non-blocking assignments at
their clock edges, which is the "right after the edge" of the protocol. They
use clock periods whose edges never coincide.
