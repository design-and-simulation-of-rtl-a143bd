# Tandem banyan ATM switch, 8 x 8, byte-wide

A banyan network switches cells by itself: each 2x2 element looks at one
bit of the destination address and steers the cell up or down, so after
log2(N) columns the cell is on its output port. The price is internal
blocking. Two cells that need the same internal link cannot both pass,
even when they go to different outputs.

The *tandem banyan* switch works around this without a sorting network.
Several banyan networks are placed one after another. A cell that loses a
contention is not stopped. It is steered the wrong way and marked, and it
finishes its trip through the current banyan network. Behind every network
a filter picks out the cells that arrived unmarked. Those are on their
correct output and go into that port's output buffer. All other cells get
another try in the next network. Each output port collects cells from every
stage, so its buffer restores their entrance order using a time stamp
written at the entrance.

This repository holds synthesizable SystemVerilog for an 8-port version
with K = 4 banyan stages and an 8-bit internal data path. A 155 Mbit/s
port becomes a byte stream of about 19.4 MHz.

```
 in[i] ─► cell_processor ─► banyan8 #0 ─► input_controller #0 ─► banyan8 #1 ─► ... ─► input_controller #K-1 ─► lost
                                                  │  to_buf                         │                              │
                                                  ▼                                 ▼                              ▼
                                          reorder_buffer[j]  ◄──────────── one write port per stage ──────────────┘
                                                  │
                                                  ▼
                                               out[j]
 manager: synchronised reset, 54-cycle slot timing, time stamp
```

## Cells and slots

Inside the switch everything is slot-synchronous. A slot lasts 54 clock
cycles: one cycle for an 8-bit local header and 53 cycles for the ATM cell.
Every input starts its cell in the cycle in which `slot_start` is high. As a
result, all cells that meet in one banyan network present their headers in
the same cycle. A switching element decides on that header byte and keeps
its setting for the rest of the cell.

The local header (`atm_pkg::local_hdr_t`):

| bits | field | source |
|------|-------|--------|
| 7:5 | `dest` | routing table, indexed by the cell's VPI |
| 4 | `prio` | NOT CLP: cells with CLP = 0 win contention |
| 3:0 | `ts` | slot number at entry, from the manager |

A fabric link (`atm_pkg::link_t`) is a byte plus three side-band bits:

- `valid`: high for every byte of a cell.
- `sop`: high on the header byte.
- `mark`: high for the whole cell once the cell has been deflected in the
  current banyan network.

The mark travels beside the data, so the header itself stays 8 bits.

## Resolving contention: `se2x2`, `banyan8`, `input_controller`

`se2x2` steers on one destination bit. When both inputs want the same
output, the winner is picked by three rules, in this order:

1. an unmarked cell beats a marked one;
2. a high-priority cell beats a low-priority one;
3. between equals, a round-robin bit decides, and it flips after every tie.

The loser leaves on the other output with `mark` set.

An unmarked cell can only lose to another unmarked cell. So a cell whose
path shares no link with any other cell's path always gets through, and in
every slot at least one cell per network reaches its output.

`banyan8` wires three columns of four elements as an omega network: a
perfect shuffle in front of each column, with column c steering on
destination bit 2-c. Every cyclic shift of the inputs, including the
identity, passes without blocking.

`input_controller` sits behind each network:

- A cell on output j that is unmarked and addressed to j goes to
  reorder buffer j.
- Any other cell goes, with its mark cleared, to input j of the next
  network.
- Behind the last network, such cells are dropped and counted in
  `cnt_fabric_loss`.

Recirculating them into the switch would be an alternative; it is not
built here.

## Putting the order back: `reorder_buffer`

This is the least obvious part. Output j receives cells from all K stages.
They are shifted by 4 cycles per stage and may overlap in time. A cell
delivered by stage 3 has the same time stamp as one delivered by stage 0 in
the same slot. Under overload, cells from several slots wait together.

The buffer has one write port per stage into a common memory of DEPTH cell
slots of 53 bytes. The local header is not stored.

- **Write side.** When a header arrives, the lowest free slot is claimed.
  The header's `ts` and `prio` go into that slot's descriptor. The next 53
  bytes are written into the slot. If no slot is free, the cell is dropped
  and counted in `cnt_buffer_drop`.
- **Read side.** Among the occupied slots, the buffer picks the one with
  the largest age. The age is `now_ts - ts`, taken modulo 16. Ties are
  broken by high priority first, then by a cell that is already completely
  written, then by the lowest slot number. The chosen cell is read once it
  is completely written (store and forward). The next cell is chosen during
  the last byte of the current one, so a backlog drains back to back at one
  cell every 53 cycles. That is faster than the arrival rate of one cell per
  54 cycles, so the buffer keeps up with its own port's line rate.

Writes and reads use different slots and run at the same time.

The age comparison stays correct only while no cell waits 16 slots or more.
With 8 cells of storage and a drain rate of at least one cell per slot, the
wait is at most about 8 slots. If you raise `BUF_DEPTH` past 15, also widen
`TS_W`.

Within one input-to-output flow, cells keep their order: one input sends at
most one cell per slot, so time stamps in a flow are strictly increasing.
Between different inputs, a high-priority cell can overtake a low-priority
cell that has the same time stamp.

## Timing

All cycle numbers count from the slot cycle in which the cell's first byte
enters (cycle 0):

| event | cycle |
|-------|-------|
| local header leaves `cell_processor` (waits for the CLP bit in byte 3) | 4 |
| header leaves banyan stage k (3 registered columns) | 7 + 4k |
| header enters reorder buffer from stage k (filter register) | 8 + 4k |
| last ATM byte written into the buffer | 61 + 4k |
| first byte on `out_data`, if the buffer was idle | 64 + 4k |

Per port, the switch accepts one cell per 54-cycle slot. A 155.52 Mbit/s
ATM line carries 366,792 cells/s, so the clock must run at 54 x 366,792 =
19.81 MHz or faster. A clock of exactly 8 x 19.44 MHz gives 98 % of the
line's cell rate.

After `rst_n` rises, the switch stays in reset for two more clock edges
(reset synchroniser in `manager`). Routing-table writes made during those
edges are lost.

## Parameters

| where | name | default | meaning |
|-------|------|---------|---------|
| `tandem_banyan_switch` | `K` | 4 | number of banyan stages |
| `tandem_banyan_switch` | `BUF_DEPTH` | 8 | cells per output buffer (53 bytes each) |
| `atm_pkg` | `N_PORTS` | 8 | ports; tied to the 3-bit `dest` field |
| `atm_pkg` | `DATA_W` | 8 | internal byte width |
| `atm_pkg` | `TS_W` | 4 | time-stamp width |
| `reorder_buffer` | `K`, `DEPTH` | 4, 8 | set by the top |
| `manager` | `SLOT_LEN`, `STAMP_W` | 54, 4 | slot length and time-stamp width |

`K` is the knob that trades logic for cell loss. The number of ports is
fixed by the header format. A larger switch needs a wider `dest` field, and
with it a wider local header or a narrower time stamp, plus a generalised
`banyan8`.

At the defaults, the reorder buffers need 8 x 8 x 53 bytes = 27 kbit of
memory.

## Interface of the top, `tandem_banyan_switch`

- `in_valid[i]`, `in_sop[i]`, `in_data[i]`: 53 consecutive ATM bytes (UNI
  header) with `in_sop` on byte 0, in the cycle `slot_start` is high. At
  most one cell per input per slot.
- `tbl_we`, `tbl_in`, `tbl_addr`, `tbl_en`, `tbl_port`: write the routing
  entry `VPI = tbl_addr` of input `tbl_in`. Cells whose VPI has no enabled
  entry are discarded and counted in `cnt_no_route`. All tables are cleared
  by reset.
- `out_valid[j]`, `out_sop[j]`, `out_data[j]`: 53-byte ATM cells, unchanged
  (there is no VPI/VCI translation).
- `slot_start`, `slot_ts`: slot timing for the cell sources.
- `cnt_no_route`, `cnt_deflect`, `cnt_fabric_loss`, `cnt_buffer_drop`:
  32-bit event counters.

There is no multicast or broadcast.

## What is specified, and what is this design's own

**Taken from the specification being implemented:**

- the tandem banyan principle: cascaded banyan networks, blocked cells
  forwarded to the next stage, switched cells filtered into per-port output
  queues;
- the unit set: entrance cell processing, 2x2 element, 8x8 banyan network,
  per-stage input controller, per-port reorder buffer sorting by time
  stamp with simultaneous read and write, and a manager for common
  control;
- the 8-bit internal width;
- the 8-bit local header with destination, time stamp and priority derived
  from the ATM header;
- the 8 x 8 size and K = 4 stages.

**Chosen here**, because the specification leaves them open:

- slot-synchronous operation and the 54-cycle slot;
- the header bit layout and the 4-bit time stamp;
- the VPI routing table and the CLP-to-priority rule;
- deflect-and-mark, with side-band marks;
- the contention order;
- the omega topology;
- one register per column and per filter;
- the slot-based store-and-forward buffer, its selection rule and its
  depth of 8;
- dropping cells that are still blocked after the last stage, and cells
  that arrive at a full buffer;
- the statistics counters.

**Not included:**

- recirculation buffers at the last stage (an option for reducing the
  number of stages);
- the serial line interface and physical layer;
- clock generation (the clock is an input);
- HEC checking and header translation.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|-----------|---------------------|
| `manager_tb` | reset synchroniser, 54-cycle slot, time stamp wrap |
| `cell_processor_tb` | header fields from table/CLP/slot, 5-cycle latency, data intact, unknown-VPI discard |
| `se2x2_tb` | routing on each request pattern, priority, mark and round-robin contention rules |
| `banyan8_tb` | 3-cycle latency, conservation, unmarked cells at their destination, conflict-free cells never blocked (against an independent path calculation), shift permutations unblocked |
| `input_controller_tb` | filtering and mark clearing on random traffic |
| `reorder_buffer_tb` | time-stamp order across ports, priority on equal stamps, latency, overflow drops, back-to-back drain; random traffic checked against the ordering rule (no waiting, fully written cell with a greater age or priority is ever passed over) |
| `tandem_banyan_switch_tb` | end to end at the default size: 64-cycle latency and full rate on permutations; random and hot-spot traffic with a scoreboard (contents, destination, once only, per-flow order, conservation against the counters); requires deflection, later-stage delivery, fabric loss, buffer overflow, unroutable cells and buffer overtaking each to happen |
| `cell_loss_tb` | four switches with K = 1..4 on identical uniform traffic at 100 % and 40 % load |

`cell_loss_tb` measured the following fabric loss over 1000 slots:

| load | K = 1 | K = 2 | K = 3 | K = 4 |
|------|-------|-------|-------|-------|
| 100 % | 48.4 % | 15.7 % | 3.4 % | 0.41 % |
| 40 % | 25.0 % | 3.5 % | 0.22 % | 0 |

A single banyan (K = 1) loses about 48 % at full load. That agrees with the
usual independent-link estimate for a 3-column banyan (1 - 0.517). The
testbench checks that figure, and checks that the loss falls strictly with
every added stage. Reaching a loss rate near 1e-6 takes more stages than
the default 4, even at 8 ports. Raise `K` for that; the simulation time
grows with it.

Not verified: timing closure on any device, and loss rates below about
1e-4, which would need far longer runs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/atm_pkg.sv \
    tb/tandem_banyan_switch_tb.sv --top-module tandem_banyan_switch_tb
./obj_dir/Vtandem_banyan_switch_tb
```

Replace `tandem_banyan_switch_tb` with any other testbench name. Each
testbench finishes in well under a second once built. With `-Wall`,
Verilator also reports unused header bits and `rst_n` being used both as an
asynchronous reset and in assertions' `disable iff`. Both are harmless.

## Files

- `rtl/atm_pkg.sv`: shared constants, header and link types.
- `rtl/manager.sv`: reset synchroniser, slot timing, time stamp.
- `rtl/cell_processor.sv`: entrance unit with the VPI routing table.
- `rtl/se2x2.sv`: 2x2 switching element.
- `rtl/banyan8.sv`: 8x8 omega network.
- `rtl/input_controller.sv`: per-stage packet filter.
- `rtl/reorder_buffer.sv`: per-port time-stamp-sorting output buffer.
- `rtl/tandem_banyan_switch.sv`: top level.
- `tb/*_tb.sv`: testbenches as listed above.
