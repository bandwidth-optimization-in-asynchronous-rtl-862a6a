# Bandwidth-optimised asynchronous NoC for an MPEG4 decoder SoC

On a link driven by a 2-phase handshake, every flit costs two trips over
the wire: the request travels to the receiver, and the acknowledge travels
back before the sender may send again. The bandwidth of such a link
therefore falls as the wire gets longer. A clocked link behaves differently:
its bandwidth is set by the clock and does not depend on wire length.

This design turns that property into a tuning knob. Routers that exchange the
most traffic are placed close together, so their links are short and fast.
Long links that are still congested get **pipeline latches**. A latch splits
the wire into shorter segments, so each handshake loop is shorter and the link
cycles faster. The result is a network in which every link runs at its own
rate, and the busy links get the most bandwidth.

The RTL contains:

- the router (switch and merge modules and their controllers);
- the link pipeline latch;
- the complete 10-router network for a 12-core MPEG4 decoder, with 20
  latches placed on its 8 most congested links.

## The network

Ten three-port routers form a tree. Each core hangs off a router port:

| Router | port 0 | port 1 | port 2 |
|---|---|---|---|
| R0 | sdram | upsamp | R6 |
| R1 | sram2 | risc | R6 |
| R2 | sram1 | rast | R7 |
| R3 | vu | mcpu | R7 |
| R4 | dsp | idct | R8 |
| R5 | babcalc | au | R8 |
| R6 | R0 | R1 | R9 |
| R7 | R9 | R3 | R2 |
| R8 | R9 | R5 | R4 |
| R9 | R6 | R8 | R7 |

Which neighbour sits on which port number is this design's own choice. The
adjacency itself follows the published topology. There are 21 bidirectional
connections, so 42 unidirectional links. Each link is one `pl_link` instance
with its own latch count:

| Link | Latches per direction |
|---|---|
| R1 - sram2 (L1_04 in, L1_05 out) | 3 |
| R1 - risc (L1_06 in, L1_07 out) | 3 |
| R0 - R6 (L2_00, L2_01) | 2 |
| R6 - R1 (L2_02, L2_03) | 2 |
| all other links | 0 |

The counts are the parameters `PL_OUT[r][p]` (the link leaving router `r` by
port `p`) and `PL_CORE[c]` (the link leaving core `c`) of `mpeg4_async_noc`.
Their defaults are in `mpeg4_topo_pkg`. To get the non-pipelined network, set
all counts to 0. The original physical design spaced the latches evenly along
the wire: the 854 um sram2 links were cut into 213 um pieces and the 2113 um
risc links into 528 um pieces. Wire length does not appear in the RTL (see
*What the clock means*).

## Packets and source routing

A packet is one flit, `noc_pkg::flit_t`. It holds 8 route bits and 32 data
bits, sent in parallel on separate wires. Neither width is given by the
design description; both are parameters in `noc_pkg`. With 8 route bits a
flit can cross up to 8 routers. The longest path in this network crosses 5.

At every router the flit's route MSB picks the output:

- a flit entering on port `i` with MSB = 0 leaves on port `(i+1) % 3`;
- with MSB = 1 it leaves on port `(i+2) % 3`.

A flit never goes back out the port it came in on. The switch then rotates the
route left by one bit, so the next router again looks only at the MSB. The
sender builds the route: `mpeg4_topo_pkg::route_bits(src, dst)` walks the tree
and gives the bits, and `hops(src, dst)` gives the number of routers crossed.
When a flit arrives, its route has been rotated `hops` times. Which bit value
picks which port is this design's own choice.

## Inside the router

```
 link in (2-phase)                                   link out (2-phase)
 lr/la/ld ─► async_switch ──rr1/ra1 (4-phase)──► async_merge ─► rr/ra/rd
             │ phase_conv_2to4                   │ merge_arbiter (ar)
             │ linear_ctrl + data latch           │ mux + merge_ctrl + data latch
             └─rr2/ra2 (4-phase)──► merge of the other port
```

`async_router` has one switch on each input port and one merge on each output
port. Each merge takes `rr1` from one neighbouring switch and `rr2` from the
other. Each switch and each merge holds one flit, so a router can hold up to
six flits.

Links between routers use the 2-phase protocol. It needs half as many wire
transitions as 4-phase, and so half the time of flight per flit. Inside the
router the handshakes are 4-phase (return-to-zero), which makes arbitration
simple.

**Switch** (`async_switch`). The switch has three parts:

- `phase_conv_2to4` sees a new link event (`lr != la`) and runs one 4-phase
  cycle with `linear_ctrl`. It toggles `la` only once the flit is latched.
- `linear_ctrl` is a one-flit stage. It loads the data latch when the stage is
  empty, then raises its right request once the right channel has returned to
  zero. The right acknowledge frees the stage.
- The request is routed to `rr1` or `rr2` by the route MSB of the latched
  flit. The acknowledge of the chosen output is routed back.

**Merge** (`async_merge`). The merge has two parts:

- `merge_arbiter` grants one of the two 4-phase requests and holds the grant
  for one full 4-phase cycle. It drives the data mux select.
- `merge_ctrl` loads the output latch and toggles `rr`, but only when the link
  has acknowledged the previous flit (`rr == ra`). It acknowledges the
  arbiter at once, so the arbiter can serve the other input while the link is
  busy.

The original arbiter is a mutual-exclusion element that grants the first
request to arrive. In this clocked model two requests can appear in the same
cycle. Such a tie goes to the input that was not served last.

`contended` is high while both inputs of a merge are requesting. The network
brings this out per output port.

**Pipeline latch** (`pipeline_latch`). This is a 2-phase one-flit buffer. When
a flit is waiting (`lr != la`) and its own output has been acknowledged
(`rr == ra`), it latches the flit and toggles both `la` and `rr` on the same
edge. It is simpler than a router port, so its own loop is short. That is why
a latched segment can run as fast as a zero-length router-to-router link.

## What the clock means

The original design is clockless: every controller reacts to its inputs
through gate delays. This RTL keeps the same controllers, handshakes and
storage, but every handshake signal is a flip-flop on `clk`. Each controller
step therefore takes one clock cycle. The model is synthesizable and
simulates with a two-state simulator. It is a cycle-level stand-in for the
asynchronous circuit, not a clockless netlist. Rates and latencies are in
cycles:

| Path (idle, neighbours answer at once) | Cycles |
|---|---|
| link event at switch input → `rr1/rr2` | 3 |
| merge request → link transition | 2 |
| through a whole router | 5 |
| through one pipeline latch | 1 |
| merge → zero-length link → switch, per flit | 4 |

The clock does not stand for a global clock of the chip. It is the time grain
of the model. Wire flight time is not part of the network RTL.
`tb/wire_delay.sv` models it as a delay in clock cycles. With it,
`tb_link_bandwidth` reproduces the key relation of the design:

```
cycles per flit = (zero-length cycle, 4) + 2 x (flight time of the longest segment)
```

With a wire of 12 cycles each way, the test measures these rates:

| Latches | Cycles per flit |
|---|---|
| none | 28 |
| 1 | 16 |
| 3 | 10 |
| zero-length link | 4 |

This is the same trend the original design shows in silicon. There, an
854 um link went from 1.63 to 2.10 Gflit/s with three latches, and a
2113 um link went from 1.15 to 1.91 Gflit/s. The cycle counts here do not
map to those absolute rates.

## Using the network

`mpeg4_async_noc` has one sending and one receiving 2-phase channel per core.
Cores are indexed by `mpeg4_topo_pkg::core_e` (SDRAM = 0 … AU = 11).

- **Send:** put a flit with `route_bits(src, dst)` on `core_tx_data[c]` and
  toggle `core_tx_req[c]`. Hold the data until `core_tx_ack[c]` equals the
  request again.
- **Receive:** when `core_rx_req[c] != core_rx_ack[c]`, take
  `core_rx_data[c]` and toggle `core_rx_ack[c]`.

The network only moves flits; the cores are not part of it. Reset
(`rst_n`, asynchronous, active low) clears every handshake signal and latch
to 0.

## Simulating

The testbenches are self-checking. Each ends with
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5 from
the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/noc_pkg.sv rtl/mpeg4_topo_pkg.sv tb/tb_mpeg4_async_noc.sv \
  --top-module tb_mpeg4_async_noc -o sim && ./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_phase_conv_2to4`, `tb_linear_ctrl`, `tb_merge_arbiter`, `tb_merge_ctrl` | each controller's handshake rules, against random response delays; cycle counts |
| `tb_async_switch`, `tb_async_merge`, `tb_async_router` | steering, route rotation, data, per-flow order, contention, idle latency (3 / 2 / 5 cycles) |
| `tb_pipeline_latch`, `tb_pl_link` | order, no loss, 1 cycle per latch, 2 cycles per flit through chained latches |
| `tb_link_bandwidth` | bandwidth against wire flight time, with 0, 1 and 3 latches |
| `tb_mpeg4_async_noc` | the whole network at its default parameters |
| `tb_mpeg4_load` | pipelined and plain networks side by side at 1x, 3x, 5x and 7x MPEG4 load |

`tb_mpeg4_async_noc` sends 3000 flits over the 13 MPEG4 flows, weighted by
the flows' bandwidths in MB/s:

| Flow | MB/s |
|---|---|
| sdram-upsamp | 304 |
| sram2-upsamp | 224 |
| sdram-rast | 200 |
| sram2-risc | 167 |
| sram2-idct | 84 |
| sdram-vu | 64 |
| sram2-babcalc | 58 |
| sram1-rast | 40 |
| sdram-mcpu | 20 |
| mcpu-sram1 | 14 |
| sdram-babcalc | 11 |
| sdram-dsp | 3 |
| sdram-au | 1 |

The direction of each flit is random. The test checks:

- delivery, order per flow, and the route rotation;
- the idle latency of sdram→upsamp (5 cycles), risc→sram2 (5 + 3 + 3
  cycles) and au→idct;
- that merge contention, sender back-pressure, traffic over the latched
  links and both steering directions all occurred.

The build takes about two minutes; the run takes seconds.

`tb_mpeg4_load` offers each flow a flit per cycle with probability
load x MB/s / 20000, to both versions of the network at once. It measures
the average latency in cycles from creation to delivery:

| Load | Pipelined | No latches |
|---|---|---|
| 1x | 20.7 | 17.2 |
| 3x | 19.6 | 16.5 |
| 5x | 21.0 | 17.8 |
| 7x | 23.0 | 20.3 |

Without wire delay, the latches only add forward delay and buffering.
The light-load penalty matches the original design, where the pipelined
network was also slower at 1x and 2x. The gain at high load comes from the
shorter handshake loops on long wires, which only `tb_link_bandwidth`
models. The build takes about five minutes.

## Where this departs from the original

- **Clocked controllers.** The controllers are clocked state machines rather
  than clockless circuits (see *What the clock means*). The original linear
  controller is a burst-mode design specified elsewhere. The arbiter is a
  mutual-exclusion element. Here both are the simplest clocked logic that
  does the same job.
- **Own choices.** These are not given by the design description:
  - payload width 32 and route width 8;
  - route bit polarity;
  - port numbering;
  - tie-break;
  - reset values.
- **Absolute performance.** Absolute rates and energies cannot come from this
  RTL: the router's maximum of 2.12 Gflit/s, the 120 ps forward latency of a
  latch, the per-link bandwidths, and the latency and energy at 1x–7x load all
  belong to the 65 nm layout. Only cycle-level behaviour and the
  bandwidth-versus-segment-length relation are reproduced.
- **Comparison router.** The clocked comparison router of the study is not
  part of this design.
