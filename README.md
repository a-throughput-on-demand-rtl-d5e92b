# Throughput-on-demand address-event transmitter

A neuromorphic chip holds a 2-D array of spiking neurons. It reports each
spike off chip as an *address event*: the (row, column) address of the neuron
that fired, sent over a shared four-phase handshake port. The usual 2-D
transmitter arbitrates first for a row and then for one neuron in that row,
so every event pays for a trip over long row and column wires. That cost
grows with the array.

This transmitter reads a **whole row in parallel**. The row arbiter picks a
row. Every neuron in that row that has a spike drives its own column line at
once, and a latch at the edge of the array captures all of them together with
the row's address. The latch then sends the stored spikes one by one through
a column arbiter and a column encoder. While it does so, the next row is
already being chosen and its data waits on the column lines. Row selection is
slow, but it overlaps event transmission and its cost is shared by every
spike the row yields. The busier the array, the more spikes each row read
yields: throughput rises with demand.

The RTL here is a **synchronous rendering of a clockless design**. The
original circuit is quasi-delay-insensitive asynchronous logic, written as
production rules. A production rule is a gate with a pull-up guard and a
pull-down guard that holds its output when neither is true. Here each
state-holding rule is a flip-flop updated on `clk` (`aer_pkg::prs_next`).
Plain gates (ORs, wired-NORs, wires) stay combinational. Every handshake
keeps its four-phase order, and a one-clock gate delay is one legal delay
assignment for such a circuit. Cycle counts do not map to the original's
nanosecond timing.

## Block structure

```
 spike_i[y][x] ──► aer_array ──────────────────────────────┐ cox (one line per column,
 spike_ack_o ◄──   ├ aer_pixel  ×ROWS×COLS                  │      per row)
                   └ aer_if_ctrl ×ROWS  (row interface)     ▼
                        ro ▲ │ ri                      aer_column_bus (OR over rows)
                           │ ▼                              │ col lines
                  aer_arbiter #(ROWS)  (row arbiter)        ▼
 sel ──► aer_row_encoder ── row address lines ──►  aer_latch ─── lo (bus acknowledge) ──► all rows
                                                   ├ aer_latch_cell ×COLS
                                                   └ aer_latch_ctrl
                                                        gxo ▼ ▲ gxi
                                             aer_if_ctrl ×COLS (column interface)
                                                  ro ▼ ▲ ri          │ ao = gxi
                                          aer_arbiter #(COLS)        ▼
                                                              aer_col_encoder ──► ev_req_o, ev_col_o
                                                     latched row address  ──────► ev_row_o
                                                                      ev_ack_i ──► ai (all columns)
```

| Module | Role |
|---|---|
| `aer_transmitter` | Top level; wires everything as above |
| `aer_array` | ROWS × COLS pixels plus one row interface per row; row request = OR of the row's bits |
| `aer_pixel` | Captures a neuron's spike. When its row is selected, drives the column line and clears the spike |
| `aer_if_ctrl` | Interface circuit between a requester and an arbiter/encoder. Used for every row and every latch column |
| `aer_arbiter` | N-input arbiter: `aer_arbiter_tree` plus the root's completion |
| `aer_arbiter_tree` | Recursive balanced tree of N−1 `aer_arb2` cells, split N/2 and N−N/2 |
| `aer_arb2` | Two-input arbiter cell with a mutex (`aer_mutex`) |
| `aer_row_encoder` | Drives the selected row's binary address onto extra bus lines |
| `aer_column_bus` | One OR per column across all rows |
| `aer_latch` | COLS latch cells, latch controller and the row-address bits |
| `aer_latch_cell` | One stored spike; it is also the request to its column interface |
| `aer_latch_ctrl` | Strobe `b`, full `g`, line sense `l`, bus acknowledge `lo` |
| `aer_col_encoder` | Encodes the chosen column, drives the output request, returns the receiver acknowledge |
| `aer_pkg` | Default sizes (96 × 104) and the production-rule update function |

## The hard part: the three overlapping handshakes

Three handshakes run at once and constrain each other.

### Row side: pixel and row interface

Production rules of a pixel (`aer_pixel`) and of its row's interface circuit
(`aer_if_ctrl`, where `ci` is the latch's bus acknowledge `lo`):

```
pixel:  lix & ~s -> bx+      ~lix -> bx-
        s & bx   -> cox+,lox+    ~s -> cox-,lox-
row:    p = OR(bx)
        p        -> ro+      ~p & ci -> ro-
        ri & ~ci -> s+       ~ri     -> s-
```

* `~s` in the guard of `bx+` freezes the row at selection. Only spikes already
  stored take part in the readout. A spike that arrives later waits for the
  row's next turn, so the latch never has to wait for neurons that are silent.
* A row the arbiter has granted is selected only once `ci` is low. `ci` is
  broadcast to every row rather than steered, so each row watches the bus and
  waits until the previous row's data has been taken and the lines are clear.
  This is what keeps two rows off the column lines at once, even though the
  arbiter may already have moved on.
* A row drops its arbiter request only when its bits are clear *and* `ci` is
  high. That lets the arbiter start on the next row while this row's column
  transfer is finishing.

### Latch: strobe, full and sense

`aer_latch_ctrl` and `aer_latch_cell`:

```
cell:     b & lix -> bx+            ~b & gxi -> bx-          gxo = bx
full:     OR(bx) | OR(gxi) -> g+    ~OR(gxi) & ~OR(bx) -> g-
sense:    OR(lix) & b -> l+         ~OR(lix) -> l-
strobe:   ~g & ~l -> b+             g & l -> b-       (C-element)
bus ack:  l & ~b -> lo+             ~l | b -> lo-
```

* The latch is transparent while `b` is high. It closes when it holds data
  (`g`) and the lines carry data (`l`), and then acknowledges the bus (`lo`).
* `lo` falls as soon as the lines are clear, **before** the latch is empty.
  This lets the next row be selected and put its data on the lines early. The
  `b` in the guard of `l+` keeps that early data from being sensed while the
  latch is still closed. Without it, `l` could rise while the controller
  waits for `g` to fall, and the controller would deadlock.
* A bit is cleared only when acknowledged *and* the latch is closed. A bit
  whose column is served before `b` falls therefore stays set until `b` falls.
  The bit's request to its column interface goes out at once, giving the
  column arbiter a head start.
* `g` falls only once every column acknowledge has dropped. A new row's
  requests then reach a column arbiter that is ready for them.
* The row address is held in extra latch bits. It follows the row-address
  lines while `b` is high and is frozen while `b` is low, which is the whole
  time the row's events are being sent.

### Column side: interface, arbiter, encoder

Every latch column has its own `aer_if_ctrl`. Its request `p` is the stored
bit, and its completion input `ci` is the encoder acknowledge `ai`, which is
the receiver's `ev_ack_i` passed back to all columns. Its output `s` is both
the acknowledge to the latch cell and the request to the encoder (`ao`). A
column the arbiter has chosen waits until the receiver has dropped its
acknowledge from the previous event. At most one `ao` is therefore high, and
the output port is a clean four-phase bundled-data channel: `ev_row_o` and
`ev_col_o` are valid for as long as `ev_req_o` is high.

### Arbiter cell: leftover acknowledge

`aer_arb2` handles each side as follows:

```
l1i -> mutex request;  (l1i | l2i) & ~ri -> ro+;  ~l1i & ~l2i -> ro-
l1o = ri & grant1 & ro
```

The cell raises its request to the parent only once the parent's previous
acknowledge has dropped. It lowers it only when *both* sides are idle.
Suppose the sister side requests while one side is being served. The parent's
acknowledge is still high, so when the mutex hands over, the sister is served
without a new round trip toward the root. Arbitration therefore spans only
the smallest subtree that holds another request. The `ro` term in the
acknowledge stops a stale acknowledge from the parent from reaching a new
request. The root's parent completes at once (a flip-flop copies the root
request to its acknowledge).

The mutex passes the grant straight to a waiting side when the holder
releases. If both sides request in the same clock from idle, side 1 wins.
The original element settles this case through metastability, which has no
clocked counterpart.

One consequence of the sister rule, as designed: a subtree that always has a
pending request keeps the parent's grant, so under saturating load the other
half of the tree can starve.

## Interface and timing of the top level

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; active-low asynchronous reset (all handshakes idle, latch transparent) |
| `spike_i` | in | ROWS×COLS (`[ROWS-1:0][COLS-1:0]`) | Neuron `[y][x]` has a spike: hold high until `spike_ack_o[y][x]` rises |
| `spike_ack_o` | out | ROWS×COLS | The spike has been read; the neuron lowers `spike_i`, and may fire again once `spike_ack_o` falls |
| `ev_req_o` | out | 1 | Event request |
| `ev_row_o` | out | clog2(ROWS) | Row of the event, zero-based |
| `ev_col_o` | out | clog2(COLS) | Column of the event, zero-based |
| `ev_ack_i` | in | 1 | Receiver acknowledge (four-phase) |

Parameters: `ROWS` = 96 and `COLS` = 104 by default, the size of the
reference chip.

Measured in clocks on an 8 × 8 array with random activity and a receiver
that answers in 0 to 3 clocks:

* about 7.5 clocks between two events from the same row;
* about 14.5 clocks when the next event needs a new row;
* 17 clocks between events from a single neuron firing as fast as it can,
  because each spike needs a fresh read of its row.

On an idle tree of depth d, an arbiter grants d+1 clocks after the request.
The reference chip shows the same effect in nanoseconds, with same-row cycles
five to ten times shorter than new-row cycles. This RTL only keeps the
ordering, not the ratio.

## Departures and choices

* **Clocked rendering.** Described above. The design has no metastability,
  no isochronic-fork or bundled-data delay assumptions, and no analog
  behaviour. The row encoder and the column encoder are combinational, so the
  row address always arrives with the row's data.
* **Latch sense and strobe gates.** `l` is an aC-element gated by `b`, and `b`
  is a true C-element of `g` and `l`, as the circuit was specified. A simpler
  NOR gate in either place causes lost rows (data read while the latch is
  closed) or repeated events (`b` falling on `g` alone). Those are defects,
  and they are not reproduced.
* **Row address in the latch.** The row encoder drives extra bus lines, and
  the latch stores them next to the data. This merges the row-encoder
  handshake into the column-bus handshake and needs no extra C-element. How
  those bits are stored is this design's choice: a transparent latch while
  `b` is high.
* **Encoders.** The encoders are built as wired-OR encoders (OR of the
  indices of the active lines). This relies on at most one line being active,
  which the handshakes guarantee and assertions check.
* **Orientation.** The 104 side is the column side. The reference chip's
  event addresses include column 101, which only fits 104 columns.
* **Not modelled.** The analog silicon neuron and the pull-up current sources
  at the array edge are not modelled. The neuron's handshake is the
  `spike_i`/`spike_ack_o` pair. The off-chip receiver is not modelled either.
* **Reset.** The circuit has no reset of its own. Here `rst_n` clears every
  node to its idle value, with `b` high.

## Assertions

Concurrent assertions check the rules the design relies on:

* at most one row selected and one column acknowledged (`aer_transmitter`);
* the event address held while `ev_req_o` is high (`aer_transmitter`);
* at most one arbiter grant (`aer_arbiter`, `aer_arb2`, `aer_mutex`);
* latch bits cleared only while the latch is closed, and the latch closed
  only with data held and sensed (`aer_latch`).

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it does |
|---|---|
| `tb_aer_transmitter` | 8 × 8 array with random neurons, whole-row bursts and a random-delay receiver. Scoreboards every spike against the events received, then drains. It counts how often each mechanism occurs and fails if any never does: multi-spike row reads, the next row waiting on the lines, a granted row waiting for the bus, a column grant without a round trip to the root, a column waiting on the receiver, and a spike held out by a selected row. It sorts event gaps into new-row, same-row and repeated-address clusters. Same-row gaps must be the shortest, and a repeated address must take longer than a burst event |
| `tb_aer_transmitter_full` | Default 96 × 104 size. Fires a full row, the corners, a diagonal and 200 random neurons, and checks each event exactly once. The full row must come out as one burst of 104 same-row events |
| `tb_aer_array` | 4 × 4 array against arbiter and latch models: parallel reads, data only from the selected row, every spike read once |
| `tb_aer_latch` | 300 random rows through an 8-column latch with a column-side model; checks every bit with its row address, and overlap of the next row with sending |
| `tb_aer_latch_ctrl`, `tb_aer_latch_cell`, `tb_aer_pixel`, `tb_aer_if_ctrl` | Directed sequences, clock by clock, against the production rules |
| `tb_aer_arb2` | Random requesters and parent: exclusion, the `ro`/`ri` rules, no starvation, leftover-acknowledge reuse |
| `tb_aer_arbiter` | Latency of d+1 clocks on an 8-input tree; random load on an uneven 13-input tree |
| `tb_aer_row_encoder`, `tb_aer_col_encoder`, `tb_aer_column_bus` | Exhaustive or random at default size |

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/aer_pkg.sv tb/tb_aer_transmitter.sv \
          --top-module tb_aer_transmitter -o sim
./obj_dir/sim
```

Other modules are found through `-Irtl`, one module per file. The full-size
testbench takes several minutes to compile and a fraction of a second to run.

To change the array size, set `ROWS` and `COLS` on `aer_transmitter`. The
address widths follow. The arbiter trees adapt to any size, including ones
that are not powers of two.
