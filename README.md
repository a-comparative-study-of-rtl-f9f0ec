# SPAA: a simple pipelined arbiter for a high-frequency network router

A router in a multiprocessor network has to decide every cycle which
waiting packets go out through which output ports. Arbiters that find many
input/output matches, such as parallel iterative matching or the wave-front
arbiter, need the input side and the output side to talk to each other
during the decision. At about 12 logic levels per cycle that takes several
cycles, and the decision cannot easily be pipelined.

SPAA (Simple Pipelined Arbitration Algorithm) takes the opposite approach:

1. **Nominate.** Every input-side arbiter picks one packet and sends it to
   one output. It does not consult the other input arbiters.
2. **Grant.** Every output arbiter picks one of the packets sent to it. It
   does not consult the other output arbiters.
3. **Reset.** Packets that lost become eligible again.

Two input arbiters may send packets to the same output, so some matches are
lost. When the outputs are busy much of the time this costs little, because
only the few free outputs need a match. In exchange, the whole arbitration
takes three short pipeline stages and a new one can start every cycle.

This repository holds synthesizable SystemVerilog for one router built
around SPAA, modelled on the on-chip router of the Alpha 21364:

- 8 input ports and 7 output ports;
- two read ports per input buffer, each with its own arbiter;
- 316 packet slots per input port;
- 19 virtual channels and 39-bit flits.

It also implements the **Rotary Rule**, an optional mode in which the
output arbiters prefer packets already in the network over newly injected
ones, and the two-color **anti-starvation** mechanism that the Rotary Rule
relies on.

## Ports and numbering

| input port | number | read ports (LA numbers) |
|---|---|---|
| North, South, East, West (torus) | 0–3 | 0/1, 2/3, 4/5, 6/7 |
| cache | 4 | 8/9 |
| memory controller 0, 1 | 5, 6 | 10/11, 12/13 |
| I/O | 7 | 14/15 |

Output ports: 0–3 North, South, East, West; 4 and 5 the memory controllers
(which also serve the internal cache); 6 I/O.

Each input port has one input arbiter per read port, so there are 16 input
arbiters. They are called LAs ("local arbiters"); LA `l` serves read port
`l % 2` of input port `l / 2`. Each output port has one output arbiter, a
GA ("global arbiter").

### Connection matrix

A read port is not wired to every output. The arbiters and the crossbar
share one 16×7 connection matrix with 54 connected points, defined by
`router_pkg::conn_ok`:

| read port | reaches |
|---|---|
| torus input *d*, read port 0 | the three torus outputs other than *d*, memory controller 0 |
| torus input *d*, read port 1 | the three torus outputs other than *d*, memory controller 1, I/O |
| local input, read port 0 | North, East (cache also: memory controller 0) |
| local input, read port 1 | South, West (cache also: memory controller 1) |

The count of 54 comes from the 21364. **The pattern itself is this
design's choice**, because the original pattern is not available. To change
it, edit `conn_ok`; the arbiters, crossbar and testbenches all follow it.

## The arbitration pipeline

Every cycle each LA may start a new arbitration:

```
cycle t     LA   pick a packet, mark it "nominated" in the entry table,
                 register the nomination (slot, output, length)
cycle t+1   RE   nomination travels to the output port (register)
cycle t+2   GA   output arbiter grants at most one nomination
end of t+2       every nomination gets its answer:
                   granted -> entry marked granted, dispatch starts
                   lost    -> "nominated" cleared (SPAA reset step)
```

### Nominations in flight

Because a new arbitration starts every cycle, one LA can have up to three
nominations in flight, one per stage. Each of them is a different packet:
the nominated bit keeps a packet from being picked twice.

Two grants could in principle reach the same read port. The GA stage
prevents this. It ignores any nomination whose read port is already
delivering a packet. At most one nomination per LA is in the GA stage at a
time, so two grants never reach one read port in the same cycle. A
nomination that is refused this way is reset like any other that lost.

### Input port arbiter (`input_port_arbiter`)

A packet in the entry table is **eligible** when all of these hold:

- it is waiting: valid, not nominated, not granted;
- one of its candidate outputs is connected to this read port and is not
  busy;
- this read port is not delivering a packet;
- while anti-starvation is draining, the packet is old-colored;
- the partner read port did not pick it in the same cycle.

The last rule is the pair synchronization. Read port 0 picks first, and
read port 1 skips read port 0's pick.

Among the eligible packets, the LA takes the **least-recently selected
virtual channel**, and within that channel the **oldest packet**. It sends
that packet to exactly one output: the first candidate if it is usable,
otherwise the second. Two structures support this:

- the channel order is a 19×19 least-recently-selected matrix;
- age is the port's arrival counter minus the packet's arrival stamp,
  modulo 1024.

Every LA scans its whole entry table each cycle. With 316 entries this is
the largest logic in the design.

### Output port arbiter and the Rotary Rule (`output_port_arbiter`)

- **SPAA-base.** A free output grants the nomination from the LA it has
  granted least recently. This uses a 16×16 matrix.
- **SPAA-rotary** (`rotary_en = 1`, set while in reset). Nominations from
  the eight torus-input LAs (0–7) are considered first. Local nominations
  are considered only when no torus nomination is present. The
  least-recently-selected order applies within each group.

After a grant, the output stays busy until the last flit of the packet has
been read out.

### Anti-starvation (`anti_starvation`)

The Rotary Rule can starve local traffic. The anti-starvation block works
like this:

- Arriving packets take the current color.
- The block counts waiting packets of each color.
- When more than `STARVE_THRESH` old-colored packets are waiting, the
  router enters **drain** mode. In drain mode the LAs nominate only
  old-colored packets.
- Drain ends when no old packet is left.
- Outside drain, once no old packet is left and `EPOCH` cycles have passed,
  the color flips.

The original only describes the mechanism in outline. When colors flip,
and both numbers (64 and 1024), are this design's guesses.

## Data path

- **Header decode and routing** (`header_decode`, `min_rect_route`). The
  header flit's 32 data bits carry these fields, a layout that is this
  design's own:

  | bits | field |
  |---|---|
  | 3:0 | destination x |
  | 7:4 | destination y |
  | 12:8 | virtual channel |
  | 17:13 | length in flits |
  | 19:18 | local target (0 MC0, 1 MC1, 2 I/O) |

  Virtual channel *v* < 18 is class *v*/3 and sub-channel *v* mod 3
  (adaptive, VC0, VC1); *v* = 18 is the special class. Every router
  computes a packet's candidate outputs from its destination:
  - a packet on an adaptive channel gets the productive X and Y directions
    of the minimal rectangle in the torus (up to two candidates);
  - a packet on VC0, VC1 or the special channel gets the single
    dimension-order direction, X first;
  - a packet at its destination gets its local target.

  Ring sizes and this router's coordinates are inputs (`dim_x`, `dim_y`,
  `my_x`, `my_y`), up to 16×16.
- **Input buffer** (`input_buffer`). 316 slots of 19 flits, with one write
  port and two read ports that have one cycle of latency. The slot number
  equals the entry-table index.
- **Dispatch** (`dispatch_ctrl`, one per read port). After a grant it reads
  the packet one flit per cycle. It waits for flits that have not arrived
  yet (virtual cut-through): a packet is arbitrated as soon as its header
  is in, and the rest of the packet can still be arriving. A torus output
  takes a flit only in two of every three cycles, matching a 0.8 GHz link
  against the 1.2 GHz router clock. The last read frees the slot and the
  output.
- **Crossbar** (`crossbar`). 16 read ports to 7 outputs over the 54
  connection points, with one register stage.
- **ECC** (`ecc_correct`). Each flit has 32 data bits and 7 check bits,
  protected by an extended Hamming code. At the output, single-bit errors
  are corrected and double-bit errors are flagged. The code is this
  design's choice.

**Timing.** In an idle router, a header sampled at clock edge *E* appears
on `out_*` after edge *E*+6:

| edge | stage |
|---|---|
| *E*+1 | LA |
| *E*+2 | RE |
| *E*+3 | GA and grant |
| *E*+4 | buffer read |
| *E*+5 | crossbar |
| *E*+6 | ECC and output register |

### Top-level interface (`spaa_router`)

| signal | meaning |
|---|---|
| `in_valid`, `in_sop`, `in_flit[8]` | one flit per input port per cycle; `in_sop` marks the header flit |
| `in_ready` | a header flit would find a free slot (body flits are always accepted) |
| `out_valid`, `out_sop`, `out_eop`, `out_flit[7]` | flits leaving each output port |
| `out_ecc_single`, `out_ecc_double` | an error was corrected / detected on that flit |
| `rotary_en` | Rotary Rule mode; change it only while in reset |
| `ev_*` | one-cycle event pulses for observation: nomination, grant, reset (lost arbitration), Rotary Rule priority, cut-through wait, link-rate wait, drain |

Parameters are `PKTS_PER_PORT` (316), `STARVE_THRESH` (64) and `EPOCH`
(1024). The fixed sizes are in `router_pkg`.

## How far it follows the original, and where it departs

Taken from the 21364 router:

- the port counts, two read ports per buffer, 316 packets per port, 19
  virtual channels, 39-bit flits and packet lengths of 1–19 flits;
- the LA/RE/GA pipeline and SPAA's three steps;
- oldest packet from the least-recently selected VC, and least-recently
  selected LA at the output;
- the Rotary Rule;
- the two-color anti-starvation idea;
- the 2:3 link-to-core rate;
- virtual cut-through;
- minimal-rectangle adaptive routing, with dimension order in the
  deadlock-free channels.

This design's own choices and simplifications:

- The connection-matrix pattern (only its size of 54 is original).
- The header layout. Routes are computed in every router rather than looked
  up in a router table at the source.
- Fixed 19-flit buffer slots. Per-VC buffer limits are not modelled.
- `in_ready` flow control.
- Link-rate pacing at dispatch instead of timed nominations.
- Up to three nominations in flight per LA, with busy read ports refused at
  the output arbiter.
- The anti-starvation flip rule and both constants.
- The ECC code.

Not built:

- The choice of the outgoing virtual channel. In the 21364 a blocked
  adaptive packet moves to the deadlock-free channels VC0/VC1. Here the
  virtual channel field of the header passes through unchanged, and there
  are no per-channel credits towards the next router.
- The speculative buffer read at nomination time. Reading starts after the
  grant.
- The pads, the link synchronizers and the extra pin-to-pin delay cycles.
- The processor, cache and memory controllers around the router.
- The network of routers. Each router is standalone.
- The comparison arbiters (MCM, PIM, PIM1, WFA).

The sizes of the evaluated torus networks (4×4, 8×8, 12×12) fit the 4-bit
coordinates. A twice-as-long arbitration pipeline would need more stages
than the three built here.

## Simulating

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/router_pkg.sv \
          tb/tb_spaa_router.sv --top-module tb_spaa_router -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run the others.

- `tb_spaa_router` runs the router with 16 slots per port for about 40 000
  cycles, once with the Rotary Rule off and once on. Random traffic goes
  through a scoreboard. It checks the 6-cycle idle latency, and it checks
  that each of these mechanisms happens at least once:
  - lost arbitrations;
  - Rotary Rule priority;
  - drain;
  - cut-through waits;
  - link-rate waits;
  - ECC corrections;
  - use of the second adaptive candidate;
  - both read ports of one buffer delivering at once;
  - input back-pressure.
- `tb_spaa_matching` keeps a single router loaded with one-flit packets,
  half for local outputs, and measures matches (grants) per cycle with the
  Rotary Rule off and on. It sees about 2.1 to 2.2 matches per cycle, and
  never more than 7. Torus inputs and outputs run at the 2:3 link rate,
  which limits the rate.
- `tb_spaa_router_full` runs the router at its default size: a burst of 32
  packets through all eight inputs.
- The block testbenches compare each block with an independent model:
  - `min_rect_route`: checked exhaustively;
  - the LA and GA: against least-recently-selected models;
  - the entry table, buffer, dispatch, crossbar, ECC and anti-starvation
    blocks: each against its own model.

Randomness comes from `$urandom`, so each run is reproducible. The
testbenches drive every input and need no X/Z states.
