# Four-port X-Y Network-on-Chip router

A small mesh router for a 2-D Network-on-Chip. It has four link ports
(East, West, North, South) and a Local output. Each router knows its own
mesh coordinates. Each packet carries its destination coordinates. The
router compares the two, X first and then Y, and forwards the packet one hop
towards its destination. There is no central controller: every router makes
its own routing decision.

The design is small and made for FPGAs. Each input has a field-extraction
register and a short FIFO with a full/empty status state machine. One
controller routes the packets at the FIFO heads, arbitrates between inputs,
and drives registered outputs. With 2-bit coordinates, routers built from
this RTL can form any mesh up to 4 x 4.

## Packet format

Every port carries one 13-bit word per clock cycle.

| bits  | field    | meaning                                                    |
|-------|----------|------------------------------------------------------------|
| 12    | req      | 1: the word is a packet; 0: the link is idle, word ignored |
| 11:10 | X        | destination X coordinate                                   |
| 9:2   | payload  | 8 bits of data, carried unchanged                          |
| 1:0   | Y        | destination Y coordinate                                   |

The request, X and Y positions follow the original router. The payload is
placed in the remaining 8 bits. Idle outputs drive all zeros, so `req` is 0
on them. The constants and the `flit_t` struct are in `rtl/noc_pkg.sv`.

## Direction convention and routing

The X axis runs North-South and the Y axis runs West-East. X grows towards
South and Y grows towards East. Routing is dimension-ordered, X first
(`rtl/xy_routing.sv`):

| condition                          | output port |
|------------------------------------|-------------|
| dest X > own X                     | South       |
| dest X < own X                     | North       |
| X equal, dest Y < own Y            | West        |
| X equal, dest Y > own Y            | East        |
| X and Y equal                      | Local       |

This mapping comes from the reference simulations of the original router.
Examples:

- A router at (0,1) sends packets for X = 1, 2 or 3 South.
- The same router sends a packet for (0,0) West.
- A router at (2,1) sends a packet for X = 1 North.

Because X is resolved fully before Y, routing in a mesh cannot deadlock.
The mesh testbench relies on this.

The original router has only the four link outputs and does not say what
happens to a packet addressed to the router itself. Here such a packet
leaves on `data_out_l`. Routers have no local injection port. In a mesh,
packets enter through the free boundary inputs.

## Datapath and timing

```
data_in_p ─► concatenation ─► mod_fifo ─► controller ─► data_out_o
            (register:       (4 entries,  (X-Y routing per FIFO head,
             req, X, Y,       indicator    round robin per output,
             packet)          FSM)         output D flip-flops)
```

Each stage takes one clock. Take a packet that is on `data_in` in cycle t
and meets no contention:

- at edge t+1 it is registered in the concatenation stage;
- at edge t+2 it is written into the FIFO, and it is the FIFO head from then on;
- at edge t+3 it is loaded into the output register. It is on `data_out`
  during cycle t+3, and only in that cycle.

Each input can accept one packet per cycle for as long as its output is free.
Each output can send one packet per cycle. Packets from one input to one
output keep their order.

### Controller (`rtl/controller.sv`)

Each of the four FIFO heads goes through its own `xy_routing` instance.
Each output port then has:

- `port_sel`: a round-robin choice among the inputs whose head wants this
  output. It drives the output's multiplexer. After a grant, the pointer
  moves to the input just after the winner.
- `demux_ctrl[o]`: high when the output has a winner and its neighbour is
  not busy. It works as the load/clear of the output flip-flops. A selected
  register loads the winning packet. Every other output register is cleared
  to zero. So an output holds a packet for exactly one cycle.
- The winning FIFO is popped in the same cycle.

A head wants exactly one output, so no FIFO is ever popped twice in one
cycle. The Local output always accepts.

### FIFO and indicator (`rtl/mod_fifo.sv`, `rtl/fifo_indicator.sv`)

`mod_fifo` is a circular buffer with read and write pointers. Its head is
read combinationally. The storage has no reset, so it can map to
distributed RAM. Status comes from `fifo_indicator`, a three-state machine
(EMPTY, PARTIAL, FULL) with an occupancy counter. The state always agrees
with the count. The flags are registered and change one clock after the
write or read that causes the change.

A write while the FIFO is full is ignored, unless a read happens in the same
cycle. A read while the FIFO is empty is ignored. Assertions in the
indicator flag a caller that breaks either rule.

## Flow control: `busy_in` and `busy_out`

This is the part most worth understanding before connecting routers.

A router's outputs are registers, and its inputs pass through a register
before reaching the FIFO. So a packet spends two cycles in flight between
the sender's decision and the receiver's FIFO write. A busy signal that only
reported "FIFO full" would arrive too late.

`busy_out_p` therefore counts everything that may still land in FIFO p:

```
busy_out_p = count_p                       // packets already buffered
           + req of the concatenation reg  // one packet about to be written
           + data_in_p[12]                 // one packet on the wires now
           >= FIFO_DEPTH
```

The protocol for a sender in cycle t:

- If `busy_out` is low in cycle t, the sender may put a new packet on the
  link at edge t+1.
- If `busy_out` is high, the sender must wait.

A router applies the same rule to each output through `busy_in_o`. When
`busy_in_o` is high in cycle t, the router loads no packet into output o at
edge t+1, and that packet stays in its FIFO.

To build a mesh, connect `busy_out` of each receiving port to `busy_in` of
the output that feeds it. Under this rule no packet is ever dropped. The
assertion `no_drop` in `noc_router` checks it. The cost is some headroom:

- `busy_out` rises as soon as the buffered and in-flight packets could
  fill the FIFO, even if the FIFO itself is half empty.
- An uncongested input holds at most one packet in the FIFO, one in the
  register and one on the wires. That sums to 3, so with the default depth
  of 4 it still runs at one packet per cycle.
- A depth of 3 or less throttles even an uncongested input.

The original router says only that its FIFOs buffer packets while the next
router cannot take them. The signals, the formula and the timing above are this
design's own.

## Top level (`rtl/noc_router.sv`)

| port                 | dir | width | meaning                                        |
|----------------------|-----|-------|------------------------------------------------|
| `clk`                | in  | 1     | clock, rising edge                             |
| `rst_n`              | in  | 1     | asynchronous reset, active low                 |
| `cx`, `cy`           | in  | 2     | this router's coordinates                      |
| `data_in_e/w/n/s`    | in  | 13    | input ports                                    |
| `data_out_e/w/n/s`   | out | 13    | output ports, registered, zero when idle       |
| `data_out_l`         | out | 13    | packets addressed to this router               |
| `busy_in_e/w/n/s`    | in  | 1     | neighbour on that output can take no packet    |
| `busy_out_e/w/n/s`   | out | 1     | sender on that input must not start one        |

Parameter: `FIFO_DEPTH` (default 4), the number of entries per input FIFO.
The packet format and port count are fixed in `noc_pkg`.

Reset clears every register except the FIFO storage. All outputs are zero
after reset.

## Where this design departs from, or adds to, the original

- **Local output.** Added. The original has four outputs and no rule for
  packets that have arrived.
- **Busy handshake.** `busy_in`/`busy_out` and their timing are added. The
  original names no flow-control signal.
- **Arbitration.** Round robin per output is a choice made here. The
  original names a multiplexer select but no arbitration rule.
- **FIFO depth.** 4 is a choice made here; the original does not give it.
- **FIFO status.** The original's pointer-and-flags description only counts
  up. Here the count goes up on a write and down on a read, and `empty = 1`
  means no data.
- **Concatenation registers.** The extraction stage is registered, as the
  original's field-extraction rules describe. The original's synthesis
  table lists no registers for this block. The packet is registered
  alongside its fields.
- **`ce` and global `req`.** The original's waveforms show these pins but
  never explain them (`ce` stays 0, `req` stays 1). They are not built. The
  per-packet request bit does the work of `req`.
- **Routing.** X-Y routing with the direction convention above. The
  original also mentions adaptive routing in passing, but all of its
  detailed description is of X-Y routing. Nothing adaptive is built.
- **Resources.** The original reports 122 slice registers and 141 LUTs on
  a Spartan-6 at up to 373 MHz. Generic synthesis of this RTL gives
  187 flip-flop bits plus 272 bits of FIFO storage (4 FIFOs x 4 entries x
  17 bits). The difference comes mostly from the Local output register, the
  registered packet copies and the round-robin pointers. No FPGA timing
  has been measured.

## Files

| file                       | contents                                                  |
|----------------------------|-----------------------------------------------------------|
| `rtl/noc_pkg.sv`           | packet format constants, `port_e`, `flit_t`, field helpers |
| `rtl/concatenation.sv`     | input register and field extraction                       |
| `rtl/xy_routing.sv`        | combinational output port choice                          |
| `rtl/fifo_indicator.sv`    | occupancy counter and EMPTY/PARTIAL/FULL FSM              |
| `rtl/mod_fifo.sv`          | input FIFO built on the indicator                         |
| `rtl/controller.sv`        | routing, arbitration, output registers                    |
| `rtl/noc_router.sv`        | top level                                                 |
| `tb/tb_<module>.sv`        | self-checking testbench of each module                    |
| `tb/tb_noc_mesh.sv`        | 4 x 4 mesh of routers, end to end                         |

## Simulating

Every testbench checks itself. It prints
`TB_RESULT checks=<n> failures=<m>` and stops on its own: there is a
watchdog, and failing assertions also stop the run. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/noc_pkg.sv rtl/*.sv tb/tb_noc_router.sv --top-module tb_noc_router
./obj_dir/Vtb_noc_router
```

Swap in another testbench file and top name to run any other test.
`noc_pkg.sv` must come first.

What the testbenches cover:

- **Module tests.** `concatenation` is checked bit-exact against random
  words and through an asynchronous reset. `xy_routing` is checked for all
  256 coordinate combinations. The FIFO and its indicator are checked
  against a queue model, including writes while full. The controller is
  checked against a cycle model of its arbitration, pops and outputs.
- **`tb_noc_router`** uses the default parameters. First it replays the
  reference traffic cases and checks port, content and the 3-cycle latency
  of every word. Then it runs 6000 cycles of random traffic on all inputs,
  with random and bursty `busy_in`, and checks:
  - delivery, port and per-pair order of every packet;
  - that no output is loaded while it is busy;
  - that no packet is lost.

  It also counts, and requires at least once: each output port, ignored
  idle words, contention, stalls on `busy_in`, back-pressure on `busy_out`
  and a full FIFO.
- **`tb_noc_mesh`** connects 16 routers. It injects random traffic from all
  16 boundary inputs to all 16 destinations, and checks that every packet
  is ejected once, at the right router, in order.

Every testbench passes, and each one fails on a deliberately broken copy of
its module.
