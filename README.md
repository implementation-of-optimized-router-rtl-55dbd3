# Pipelined five-port virtual-channel router for a mesh network-on-chip

A network-on-chip replaces a shared bus with a grid of small routers. Each
processing element (PE) sits next to one router, and packets travel hop by
hop to their destination. This design is such a router and a 3x3 mesh built
from it. Its main idea is to cut the router's work into pipeline stages
separated by registers. The clock period then covers only one stage, not the
whole path from input buffer to output wire. A packet streams through at one
flit per cycle, at the cost of a few cycles of latency per hop.

Each router has:

- five ports: local (to the PE), north, east, south and west;
- four virtual channels (VCs) on every input port, each a four-flit buffer;
- XY routing;
- one fixed-priority arbiter per output;
- a 5x5 crossbar made of five 5:1 multiplexers.

## Flits, packets and links

A flit is 16 bits:

| bits  | head flit             | body / tail flit |
|-------|-----------------------|------------------|
| 15:14 | type                  | type             |
| 13:11 | destination column X  | payload          |
| 10:8  | destination row Y     | payload          |
| 7:0   | payload               | payload          |

Type codes: `00` body, `01` head, `10` tail, `11` one-flit packet (head and
tail at once). A packet is a head, any number of body flits and a tail, or a
single `11` flit. The router looks only at the type and, in a head, the
destination. The 16-bit width follows the router's datapath. The field
layout is this design's own.

A link is the struct `link_t`: `{valid, vc[1:0], flit[15:0]}`, 19 bits.
Next to each link, four credit wires run the other way, one per VC.

A packet keeps the VC number it was injected on all the way to its
destination. There is no VC reallocation at each hop.

## The pipeline

For a flit that meets no contention, each router takes these stages. Each
stage ends on a clock edge:

| stage | what happens | register written |
|-------|--------------|------------------|
| BW, buffer write | the flit on the input link goes into the buffer of its VC | VC buffer |
| RC, route computation (head flits only) | the VC's FSM (`vc_ctrl`) reads the head's destination, computes the XY output port and stores it | route register, FSM state |
| SA, switch arbitration | each input offers one flit; each output's arbiter grants one input; the granted flit is read out of its buffer | switch register: flit + VC per input, select + valid per output |
| ST, switch traversal | the crossbar passes each output's selected flit | output link register |

Because the output is registered and drives the link directly, the next
router's BW stage samples it on the following edge. Here "cycle t" means the
cycle in which a flit is on a link. Then:

- a head flit on a router's input link in cycle t is on its output link in
  cycle t+4;
- body and tail flits skip RC and take 3 cycles;
- back to back, a packet leaves at one flit per cycle;
- across a mesh, a lone packet's head reaches the destination PE
  4 x (routers on the path) cycles after the source PE put it on its link.
  Routers on the path = Manhattan distance + 1.

## Who may send: credits and VC ownership

Two rules decide whether an input may offer a flit. Both are checked before
arbitration, so every grant sends a flit.

1. **Credits.** Each output keeps a counter per downstream VC. It starts at
   4, the buffer depth. It counts down when a flit is granted on that VC, and
   up when the downstream input pulses that VC's credit wire. Each input
   pulses the wire one cycle after a flit leaves its buffer. A flit may be
   sent only while its counter is non-zero, so a VC buffer can never
   overflow. The credit round trip is 4 cycles, which matches the 4 buffer
   slots. A single VC can therefore stream at the full link rate.
2. **VC ownership (wormhole).** When the head of a multi-flit packet is
   granted an output VC, that output VC is marked as held by the input. It
   is freed when the tail passes. A head (or a one-flit packet) may only
   take a free output VC. Body and tail flits go to the VC their head took.
   Flits of two packets therefore never mix in one VC buffer. Packets on
   different VCs do share a link flit by flit.

Within an input, the lowest-numbered VC that may send is offered. Each
output then grants the lowest-numbered requesting input: local, north,
east, south, west, in that order. Both choices are fixed priority. Under
sustained load, a low-priority port can wait indefinitely; that is inherent
to fixed-priority arbitration.

XY routing never turns from Y back to X, so the mesh cannot deadlock. That
holds as long as every sink eventually frees its buffers (returns credits).

## Mesh

`noc_mesh` places router (x, y) at column x and row y:

- north goes to row y+1;
- east goes to column x+1;
- node number k = y*COLS + x (COLS = ROWS = 3 by default).

Links and credit wires between neighbours are connected both ways. Ports
that face outside the mesh have their inputs tied inactive; XY routing never
sends a packet to them. Each router's local port is a top-level port
(`pe_in`, `pe_up_credit`, `pe_out`, `pe_dn_credit`).

The PE or network interface attached there must follow the same rules as a
router:

- send a flit on VC v only while it holds a credit for v (start with 4);
- count a credit back for every pulse on `pe_up_credit[v]`;
- pulse `pe_dn_credit[v]` once for every received flit it has finished with.

This design has no PE and no network interface.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | widths, port numbers, flit and link types |
| `rtl/vc_fifo.sv` | one VC buffer (fall-through FIFO) |
| `rtl/xy_route.sv` | XY route computation |
| `rtl/vc_ctrl.sv` | per-VC routing FSM (IDLE/ACTIVE) and route register |
| `rtl/input_port.sv` | four VCs, VC choice, credit return |
| `rtl/fp_arbiter.sv` | fixed-priority arbiter |
| `rtl/output_port.sv` | per-output arbiter, credit counters, VC ownership |
| `rtl/xbar_mux.sv`, `rtl/crossbar.sv` | 5:1 mux and the 5x5 crossbar |
| `rtl/router.sv` | the router and its pipeline registers |
| `rtl/noc_mesh.sv` | top: the COLS x ROWS mesh |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

All RTL is synthesizable SystemVerilog-2017. Resets are synchronous and
active high. The assertions in the RTL check these protocol rules:

- no write to a full buffer;
- no read from an empty buffer;
- a packet starts with a head;
- a grant only goes to a request;
- at most one grant per input per cycle.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each has a watchdog. For example, for the whole mesh:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/noc_pkg.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh -o sim
    ./obj_dir/sim

What each testbench covers:

- `tb_noc_mesh` runs the mesh at its default 3x3 size, in two phases:
  - Phase 1 sends one lone packet between every pair of nodes and checks
    the head latency, 4 x routers on the path.
  - Phase 2 runs random traffic of 1-6-flit packets on random VCs. The sinks
    alternate between fast and slow draining.
  - Every flit is compared with what its source sent, in order, for each
    source, destination and VC.
  - It counts these events, and fails if any never happened:
    - traffic leaving in every direction;
    - switch contention;
    - credit stalls;
    - ownership waits;
    - flits of different VCs interleaved on a link;
    - one-flit and multi-flit packets.
  - It takes a few seconds.
- `tb_router` checks one router: the 4-cycle head latency through every
  input/output pair, then random load with the same per-flit checking.
- The remaining testbenches test one module each against a reference model
  written independently of the RTL.

The testbenches read a few internal signals by hierarchical name to count
events. If you rename generate blocks or instances in `router` or
`noc_mesh`, update those names too.

## Changing the design

- **Mesh size:** set `COLS` and `ROWS` on `noc_mesh`. Coordinates are
  `COORD_W` = 3 bits, so the mesh can be at most 8x8.
- **Buffer depth:** `VC_DEPTH` in `noc_pkg`. With fewer than 4 slots a
  single VC can no longer stream at full rate, because the credit round
  trip is 4 cycles.
- **Number of VCs:** `NVC` in `noc_pkg`. The VC field width follows it.
- **Priority order:** the port numbers in `port_e` are also the priority
  order. Changing them changes the arbitration.
- `NPORTS` is fixed at 5: the crossbar is written as five 5:1 multiplexers.

## What is this design's own, and how far to trust it

The following come from the router's published description:

- five ports and XY routing in a mesh;
- four VCs of four flits per input;
- a fixed-priority arbiter granting crossbar access;
- a crossbar of five 5:1 multiplexers with 3-bit selects and 16-bit buses;
- a routing FSM that processes the header and requests an output;
- pipeline registers added to shorten the critical path.

These are this design's own choices, because the description does not give
them:

- the flit layout;
- credit flow control;
- wormhole VC ownership;
- a packet keeping its VC end to end;
- lowest-VC-first choice within an input;
- which port has the highest priority;
- where exactly the pipeline registers go, and so the 4-cycle hop latency;
- the reset behaviour.

The router was originally written in VHDL for a Virtex-5 FPGA. For it, the
description reports:

- 411 MHz;
- 393 slice registers;
- 929 LUTs, 40 of them used as RAM;
- about 267 mW.

This RTL has not been taken through an FPGA flow, so those figures are not
reproduced here. Its own register count differs: about 565 flip-flop bits
per router outside the buffer arrays, plus 1,280 bits of buffer storage
(5 ports x 4 VCs x 4 flits x 16 bits).

Verification is by simulation only, with the testbenches above. There is no
formal proof and no gate-level or timing run.
