# TDM-MIN: a time-division multiplexed multistage network

A blocking multistage interconnection network (MIN) can set up only some
source-to-destination paths at a time. Two paths conflict when they need the
same 2x2 switch in different states. This design does not fight those
conflicts. It splits the required connections into conflict-free subsets
called **mappings**. The network then cycles through the mappings round robin,
one per **time slot**.

Each switch keeps its own state for every slot in a small circular shift
register. So the network reconfigures itself every slot without any control
traffic. A processor reaches a destination just by sending in the right slot.
No address travels with the data, and nothing is buffered or decoded inside
the network.

The idea comes from C. Qiao and R. Melhem, "Reconfiguration with Time
Division Multiplexed MIN's for Multiprocessor Communications". This RTL
implements the network, the switch control cell, a global slot timer, the
processor-side ports and two reconfiguration controllers:

- a **centralized** controller that builds or extends the mapping sequence;
- a **distributed** controller based on reservation and cancellation packets.

Defaults: an 8 x 8 network with 8-bit shift registers (up to 8 mappings), 8
data bits per word and 4 clocks per slot.

## Terms

| Term | Meaning |
|------|---------|
| mapping | A set of paths that can all exist at the same time: no switch is needed in two states. |
| configuration sequence | The ordered mappings `M_0 .. M_{mcl-1}` the network cycles through. |
| MCL | Multiplexing cycle length: the number of mappings in use, `1 <= mcl <= K`. A path in one mapping gets `1/mcl` of a link's bandwidth. A path placed in several mappings gets more. |
| slot | One mapping's turn. It lasts `SLOT_CYCLES` clocks. During all of them the switches hold that mapping. |
| K | The length of each switch register, and so the largest MCL. |

## The network (`tdm_min`, `tdm_switch2x2`, `tdm_pkg`)

The network is a generalized cube with `N = 2^n` ports and `n` stages of
`N/2` switches. Stages are numbered 1..n from the inputs. Stage `st` pairs the
two lines whose addresses differ only in bit `b = n - st`. Each 2x2 switch is
either straight (`0`) or cross (`1`).

A path `s -> d` has exactly one route. In front of stage `st` it occupies
this line:

    line(st) = { d[n-1 : b+1], s[b : 0] }

Each stage replaces one more source bit by the matching destination bit.

- The switch a path uses at stage `st` is numbered by that line address with
  bit `b` deleted.
- The state the path needs is `s[b] ^ d[b]`.

These rules are functions in `tdm_pkg` (`line_before`, `line_after`,
`switch_index`, `switch_state`, `paths_conflict`), which both controllers
use.

`tdm_min` is purely combinational from `in_link` to `out_link`. Links are
`{valid, data}` words, `W = DW + 1` bits wide. The switch states change only
at slot boundaries, or in the same clock when a control-enable override is
applied.

Switch `[g][w]` is switch `w` of stage `g+1`. `sw_state` exposes all states.
The numbering reproduces the standard worked example on an 8 x 8 network:

- The 12 paths `(0,1) (1,0) (1,3) (2,1) (2,3) (3,2) (4,5) (5,4) (5,6) (6,7) (7,5) (7,6)`
  fit in two mappings.
- `M_0 = {(0,1),(1,0),(2,3),(3,2),(4,5),(5,4),(6,7),(7,6)}` sets every switch
  to `0 0 1` per stage.
- `M_1 = {(1,3),(2,1),(5,6),(7,5)}` sets the switches to

      x 1 1
      0 1 0
      0 x 0
      0 1 1

  Here a row is a switch, a column is a stage, and `x` means unused.

`tb_tdm_min` checks exactly these arrays.

## The switch control cell (`tdm_switch_ctrl`)

One cell sits beside every switch:

    to_switch = control_enable ? control_set : sreg[0]

- `sreg` is a K-bit register. Bit `p` holds the state for the slot `p` slots
  from now, so bit 0 always drives the switch in the current slot.
- At the end of every slot (`step`, the slot's last clock) the register
  shifts one place. The value that drove the switch is written back at
  position `mcl-1`.
- With `control_enable` low, the register just rotates its `mcl` states.
- With `control_enable` high, `control_set` drives the switch at once. It is
  also what gets written back, so it replaces that slot's stored state. A
  controller rewrites one slot of one switch this way, without touching the
  others.
- `shift_nload = 0` loads all K bits in parallel from `load_bits`, where bit
  `p` is the state for slot `p`.
- Writing back at `mcl-1` rather than `K-1` lets a K-bit register act as any
  sequence of length 1..K. This is this design's own mechanism.

Reset clears the register, which sets all switches straight.

## Slots (`tdm_slot_timer`)

One global counter serves every switch and every port.

- `cur_slot` runs `0 .. mcl-1` round robin.
- Each slot lasts `SLOT_CYCLES` clocks.
- `slot_first` and `slot_last` mark the slot's first and last clock.
  `slot_last` is the shift strobe of all switch registers.
- `restart` loads a new `mcl` and starts over at slot 0. The centralized
  controller uses it together with a parallel reload.

Reset puts the counter at slot 0 with `mcl = K`.

## Ports (`tdm_src_port`, `tdm_dst_port`)

Each port holds its row of the configuration sequence: for every slot,
whether a path exists and where it goes or where it comes from.

**Source port.** It sends a pending word during any clock of a slot whose
path leads to the word's destination, and holds the word otherwise. That is
up to `SLOT_CYCLES` words per slot.

- `msg_valid`/`msg_ready` is a plain valid/ready handshake.
- `has_path` tells the processor whether the word's destination is reachable
  in some slot at all.
- The source port is combinational.

**Destination port.** It names the sender of each word from the current slot
alone.

- It registers `{rx_valid, rx_src, rx_data}` one clock after arrival.
- A word that arrives in a slot with no path to this output is flagged on
  `rx_stray` and dropped. This cannot happen while switches and tables agree;
  it exists to catch inconsistent programming.

## Centralized reconfiguration (`tdm_central_ctrl`)

The controller keeps the sequence as a table: for every mapping and source,
whether a path exists and to which destination. Everything else is derived
from it combinationally:

- the switch-setting array of each mapping;
- the K-bit load value of every switch register;
- the slot tables of all ports.

Requests use a valid/ready handshake. They get a one-clock response carrying
a status (`OK`, `BLOCKED`, `NOT_FOUND`), the mapping used and the MCL.

**ESTABLISH s->d** places the path in the **first compatible mapping**. A
mapping is compatible when:

- source `s` is not already used in it;
- every switch on the path is either unused by the mapping or already in the
  needed state.

Two different paths from one source, or to one destination, always conflict
somewhere in this network. So the source test only matters for a repeated
identical path, which is how **non-uniform bandwidth** is requested: a second
copy lands in a further mapping and doubles that path's share.

Feeding a whole request list through ESTABLISH builds the same mappings as a
greedy composition: the first mapping takes every path compatible with it,
the next takes what is left, and so on. On the example above it gives exactly
the two mappings shown.

Each request selects one of two modes with `req_var_mcl`:

- **Variable MCL (`1`)**, for static or periodic reconfiguration.
  - The search may open any of the K mappings. Only the table changes.
  - `net_ready` drops, and the source ports stop sending, until an **APPLY**.
  - APPLY reloads every switch register in parallel from the table. It
    restarts the timer with `mcl` = highest used mapping + 1.
- **Fixed MCL (`0`)**, for incremental reconfiguration.
  - Only the `mcl` mappings in use are searched. If none fits, the request is
    `BLOCKED`.
  - Otherwise the controller waits for that slot. In the slot's last clock it
    drives `control_enable`/`control_set` on the path's `n` switches and
    updates the table on the same edge.
  - The path is usable from that slot's next turn. Latency is at most one
    multiplexing cycle plus two clocks.

**RELEASE s->d** removes the path from the lowest mapping that holds it.
Switches that a mapping no longer uses are don't-cares, so nothing is
reprogrammed.

Not implemented:

- preemption of existing paths to admit a blocked request;
- migration of paths between mappings;
- sequences longer than K mappings. These would need the register contents
  reloaded in parts.

## Distributed reconfiguration (`tdm_resv_net`)

This controller uses a fixed MCL of K.

Every port of the network keeps two things:

- **AVAL**, a K-bit mask of slots not yet reserved on that port;
- a **lock**.

The ports are the N input ports and the N lines behind each of the `n`
stages. Port `[h][a]` is line `a` at level `h`, where `h = 0` is the input.

A **reservation packet** for `s -> d` works like this:

1. **Forward.** Level by level, the packet locks the port on its path and
   ANDs its slot list with that port's AVAL.
   - If the port is locked by another packet, this packet waits there and
     keeps its own locks. `lock_wait` shows this.
   - When two packets ask for a free port in the same clock, the lower source
     number wins.
   - Ports are always taken in increasing level order, so waiting packets
     cannot deadlock.
2. **Failure.** If the list becomes empty, the packet walks back, unlocks
   everything it holds (the input port included) and reports `BLOCKED`.
3. **Success.** At the output port the lowest slot left is chosen. Walking
   back, the packet removes that slot from each port's AVAL and unlocks the
   port.
4. **Programming.** The packet then waits for its slot. In that slot's last
   clock it drives `control_enable`/`control_set` of its `n` switches, fills
   the port tables, and reports `OK` with the slot number.

A **cancellation packet** walks forward. At each port it locks for one clock,
adds the slot back to AVAL and unlocks. At the end it clears the tables. A
cancellation for a path not held in that slot gets `NOT_FOUND`.

Other behaviour:

- Each source has its own packet engine, so all sources' packets are in
  flight together.
- Packets move one level per clock.
- New packets enter through one valid/ready port, one per clock. Reports
  leave one per clock, lowest source first.
- The control network is modelled as separate wiring and uses no data-link
  bandwidth.
- AVAL of every port is visible on the `aval` output (`d_aval` at the top).

## Top level (`tdm_top`)

`tdm_top` wires up:

- the timer;
- the network, with one control cell per switch;
- both controllers;
- N source ports and N destination ports.

`ctrl_mode` (`CTRL_CENTRAL` / `CTRL_DISTRIBUTED`) chooses which controller
drives the switch overrides and whose slot tables the ports use. Choose it
once after reset:

- the distributed controller assumes `mcl = K`;
- the two controllers do not share their tables.

The processors are outside the design. Their interfaces are the `msg_*`
(send) and `rx_*` (receive) port arrays.

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `N` | 8 | ports, a power of two |
| `K` | 8 | register length, maximum MCL (8 = N lets a complete pattern fit) |
| `DW` | 8 | data bits per word |
| `SLOT_CYCLES` | 4 | clocks per slot |

Synthesized with yosys, the default top is about 7,300 cells and 1,470
flip-flops. Most of that is the two controllers: the central table with its
compatibility logic, and the per-port AVAL masks of the distributed network.

## Where this departs from, or adds to, the scheme as published

- Mappings and slots are numbered from 0, not from 1.
- The following are this design's own choices:
  - the slot length;
  - the word format;
  - all handshakes;
  - reset values;
  - write-back at `mcl-1`;
  - the parallel-load port of the switch register.
- First fit is used both for static composition and for incremental
  requests. The published scheme also describes other static heuristics
  (selection from a fixed family of mappings, merging), weight-based
  optimization, and splitting of sequences longer than K. None of these are
  built.
- On a failed reservation, the input port is unlocked as well. The
  published step list mentions only the switch output ports.
- The reserved slot is always the lowest free one.
- An optical realization of the switch is out of scope. `tdm_switch2x2` is
  its electronic equivalent.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_tdm_switch2x2` | straight and cross on random words |
| `tb_tdm_switch_ctrl` | rotation for several MCLs, parallel load, override stored for later cycles |
| `tb_tdm_slot_timer` | slot sequence, `slot_first`/`slot_last`, restart with a new MCL |
| `tb_tdm_min` | the example's switch arrays and paths, the eight flip-k mappings of a complete connection, override behaviour |
| `tb_tdm_central_ctrl` | composition of the example into two mappings, switch arrays and load bits, duplicate path, fixed-MCL programming at the right clock, blocking, release |
| `tb_tdm_src_port`, `tb_tdm_dst_port` | send/hold decision and sender naming against a reference model |
| `tb_tdm_resv_net` | sequential and concurrent reservations (with lock waits), blocking, cancellation, AVAL and lock invariants, switch states recorded for each slot |
| `tb_tdm_top` | end to end at the default size (see below) |
| `tb_tdm_embed` | ring (2 mappings), 3-cube (3) and complete connection with self paths (8) composed, applied and run with traffic |

`tb_tdm_top` runs the whole design at its default parameters. It counts, and
requires at least once, each of the following:

- composition;
- parallel reload;
- incremental programming through control-set;
- a blocked request;
- release;
- a word held until its slot;
- a duplicated path;
- distributed reservation;
- a lock wait;
- a blocked reservation;
- cancellation;
- delivery.

It also checks the bandwidth of a single path. Words leave only in the path's
slot, back to back within it, with a gap of `(mcl-1)*SLOT_CYCLES+1` clocks
between slots.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      --top-module tb_tdm_top rtl/tdm_pkg.sv tb/tb_tdm_top.sv
    ./obj_dir/Vtb_tdm_top

Every testbench runs in well under a second.

Not verified: sizes other than N = 8 (the RTL is written for any power of
two, and all routing comes from the shared functions), and behaviour when
control modes are switched without a reset.
