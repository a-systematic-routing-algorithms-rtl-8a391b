# FDT mesh router: routing on the final destination address

In a destination-tag (DT) network-on-chip, the packet header lists the output
port to take at every hop: three bits per hop for a five-port router, so the
header grows with the distance travelled (about 12.5 bits on average in a 4x4
mesh, 21.75 bits in an 8x8). Every router consumes its three bits and shifts
the rest into place.

The Final-Destination-Tag (FDT) router turns this around. The header carries
only the destination's coordinates, FDA = {x, y}, and each router compares
them with its own address. Every output port has its own switch allocator,
and that allocator holds a small function f_ij for each input i. The function
answers one question: may a packet that arrived on input i with this
destination leave through output j? The routing algorithm lives entirely in
these comparisons. X-Y, West-First and North-Last differ only in the
functions, not in the datapath. No shifter is needed, and the header is
2 + ceil(log2 X) + ceil(log2 Y) bits whatever the distance.

This repository holds a synthesizable SystemVerilog model of that router and
of a 2-D mesh built from it.

## Phits and packets

Links are 18 bits wide and carry one phit per cycle.

| bits          | head phit (PT = 2'b10)         | payload phit (PT = 2'b11) |
|---------------|--------------------------------|---------------------------|
| [17:16]       | PT = 2'b10                     | PT = 2'b11                |
| [15 -: XW]    | x of destination               | data                      |
| next YW bits  | y of destination               | data                      |
| rest          | free (not looked at)           | data                      |

`PT = 2'b00` is the idle phit, and the whole link is zero when idle. `2'b01`
is unused and also means "no phit". A packet is one head followed,
back to back, by one or more payload phits. There is no tail code: a packet
ends at the first phit on its link that is not a payload. That phit can be
idle or the next packet's head.

For a 4x4 mesh XW = YW = 2. A packet for node (3,2) therefore has FDA =
`1110` and a 6-bit header, against 12 bits for the three hops it would need
under DT. Header sizes that result (PT + FDA):

| mesh | 3x3 | 4x4 | 5x5 | 6x6 | 7x7 | 8x8 | 8x10 |
|------|-----|-----|-----|-----|-----|-----|------|
| bits |  6  |  6  |  8  |  8  |  8  |  8  |  9   |

## Coordinates and ports

Node (x, y): x grows towards **East**, and y grows towards **South**. So a
packet with yFDA < ylocal must go North. Router ports are numbered
0 = PE (the local processing element), 1 = East, 2 = North, 3 = West,
4 = South. Input i is the phit arriving from that side. Output j is the phit
leaving towards it.

## The router (`fdt_router`)

```
 in[i] --> [18-bit reg] --+--> 5-1 MUX j --> [18-bit reg] --> out[j]     (j = 0..4)
                          |        ^
                          +--PT,FDA--> switch allocator j (decoder, arbiter, hold)
```

The datapath is registers and multiplexers only. All five input registers feed
all five MUXs. Each allocator sees the PT and FDA bits of all five input
registers and drives a one-hot (or all-zero) select for its MUX. With no
select the MUX outputs the idle phit. There are no buffers.

Timing: a phit that enters at cycle t leaves at t+2, so each router costs
2 cycles. A packet of P payloads whose head crosses H links occupies the
destination PE port from cycle 2(H+1) after injection, through cycle
2(H+1)+P.

In the usual wormhole latency model, T = (L/BW + R)·H. For this router the
per-hop routing delay is R = 2 cycles and the link bandwidth BW is one phit
per cycle. A shorter header only pays off when it saves whole phits. With an
18-bit phit, a 6- to 9-bit FDT header always fits in the head phit, together
with up to 12 free bits.

## The switch allocator (`fdt_switch_allocator`)

This is the part that carries the routing algorithm. It has three pieces.

**Decoder** (`fdt_decoder`). For every input i:

* `payload[i] = (PT == 2'b11)`
* `request[i] = (PT == 2'b10) && f_ij(FDA, xlocal, ylocal)`

**Arbiter** (`fdt_arbiter`). While enabled, it grants the lowest-numbered
requesting input, so the PE has the highest priority and South the lowest.
Nothing is granted while the output is held.

**Hold logic** (`fdt_hold_logic`). Wormhole-style, it keeps the output
connected for the rest of the packet:

```
select[i] = grant[i] | hold[i]        (drives the MUX)
last[i]  <= select[i]                 (one flip-flop per input)
hold[i]   = last[i] & payload[i]
en        = ~|hold                    (arbiter enable)
```

An input that had the output last cycle keeps it as long as it presents
payload phits. The first non-payload phit releases the output, and the
arbiter can grant a new head in that same cycle. This includes a head that
follows directly on the same input.

### Routing functions f_ij

The functions are in `fdt_pkg::route_match` and are selected by the
`ROUTING` parameter (`RA_XY`, `RA_WF`, `RA_NL`). "x>" means xFDA > xlocal,
and so on. For all three algorithms, output 0 (PE) is taken when x= and y=.

| output | X-Y (all inputs) | West-First | North-Last |
|--------|------------------|------------|------------|
| East 1 | x> | from North: x> and y>= ; from South: x> and y<= ; others: x> and y= | from North: x> ; others: x> and y<= |
| North 2 | x= and y< | from South: x= and y< ; others: x>= and y< | x= and y< |
| West 3 | x< | x< | from North: x< ; others: x< and y<= |
| South 4 | x= and y> | from North: x= and y> ; others: x>= and y> | from North: x= and y> ; others: y> |

Each algorithm is deterministic for a given input. Every head matches exactly
one output, the route is minimal, and the turn rules hold: W-F takes no West
hop after a non-West hop, and N-L takes no other hop after a North hop. All
of this is checked exhaustively over an 8x8 mesh.

**North-Last South function.** In the form the method is usually given, South
for inputs 0, 1, 3 and 4 also requires xFDA <= xlocal. With that condition a
PE whose destination lies to the south-east would match no output at all.
This design uses yFDA > ylocal alone for those inputs, which is the smallest
change that makes N-L deliver every packet.

## Contention and dropped packets

The router has no buffers and no flow control: nothing tells an upstream
router to wait. Two consequences follow.

* When two heads want the same free output in the same cycle, the
  lower-numbered input wins. The losing head and its payloads are dropped.
  They are not forwarded anywhere, because the hold logic only keeps an
  input that was selected.
* A head that arrives while another packet holds its output is dropped too.

A packet is therefore delivered whole or not at all. Every delivered packet
has the fixed latency 2(H+1) for its head. Under uniform random traffic at
0.02 packets per node per cycle, with 1-4 payloads, about 6 % of packets are
lost in a 3x3 mesh, 18-24 % in an 8x8 mesh and 21 % in the 8x10 mesh.
The default 4x4 mesh loses this share of packets:

| packets/node/cycle | 0.01 | 0.03 | 0.05 | 0.08 |
|--------------------|------|------|------|------|
| X-Y                | 5 %  | 13 % | 16 % | 24 % |
| North-Last         | 6 %  | 14 % | 21 % | 30 % |

A
system that cannot tolerate loss needs buffering and back-pressure added
around this router. That is outside this design.

## The mesh (`fdt_noc`)

`fdt_noc #(COLS, ROWS, W, ROUTING)` instantiates one router per node. Node
n = y*COLS + x. Its PE link is `pe_in[n]` / `pe_out[n]`. Neighbour links are
wired East<->West and North<->South. Edge nodes get 4-port routers and
corner nodes 3-port routers. These come from the same `fdt_router`, whose
`PORTS` bit mask leaves out the input register, allocator, MUX and output
register of each missing port. No routing function ever picks a missing
port, since every destination lies inside the mesh.

Defaults: a 4x4 mesh, 18-bit phits and X-Y routing. The address widths
follow from COLS and ROWS (clog2 of each).

## Files

| file | contents |
|------|----------|
| `rtl/fdt_pkg.sv` | PT codes, port numbers, routing selector, `route_match` (f_ij) |
| `rtl/phit_reg.sv` | 18-bit phit register, async active-low reset to idle |
| `rtl/phit_mux.sv` | 5-1 phit MUX with one-hot select |
| `rtl/fdt_decoder.sv`, `rtl/fdt_arbiter.sv`, `rtl/fdt_hold_logic.sv` | allocator parts |
| `rtl/fdt_switch_allocator.sv` | one allocator (decoder + arbiter + hold) |
| `rtl/fdt_router.sv` | router: five ports, or fewer through the `PORTS` mask |
| `rtl/fdt_noc.sv` | mesh top |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/noc_traffic.sv` | traffic generator and checker used by the workload testbenches |

The allocator and router contain assertions: every select is one-hot or
zero, and no input is switched to two outputs at once.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fdt_pkg.sv tb/tb_fdt_noc.sv \
          --top-module tb_fdt_noc -o sim && ./obj_dir/sim
```

* `tb_fdt_noc` is the default 4x4 X-Y mesh, unmodified. It runs all-to-all
  traffic one packet at a time and checks exact latency and contents. It
  also covers back-to-back packets, parallel traffic, a PE-versus-West
  arbitration loss and a head blocked by a held output. It counts each
  mechanism (heads per direction, held payloads, contention, blocking) and
  fails if any never occurred.
* `tb_fdt_noc_sizes` covers 3x3, 5x5, 6x6 and 7x7 with X-Y.
  `tb_fdt_noc_algos` covers 4x4 and 8x8 with W-F and N-L, plus 8x8 X-Y.
  `tb_fdt_noc_80tile` covers 8x10 with X-Y. `tb_fdt_noc_sweep` runs the
  4x4 mesh with X-Y and North-Last at four injection rates. Each one runs all-to-all traffic
  (no loss allowed, exact latency). It then sends 10,000 random packets,
  checking every packet that arrives and reporting how many were dropped.
* The unit testbenches (`tb_fdt_pkg`, `tb_fdt_decoder`, `tb_fdt_arbiter`,
  `tb_fdt_hold_logic`, `tb_fdt_switch_allocator`, `tb_phit_mux`,
  `tb_phit_reg`, `tb_fdt_router`) check each block against an independent
  reference.

## Choices made in this design

These points are not fixed by the FDT method itself. Change them freely.

* PT codes 00/01 mean idle. A packet ends at its first non-payload phit.
* PT sits in bits [17:16] and the FDA directly below it, x above y.
* Fixed-priority arbitration, with the PE highest.
* Asynchronous active-low reset of all registers to the idle phit.
* The router's address is an input port, tied off by the mesh.
* No flow control, so losers are dropped (see above).
* North-Last South function without the x condition (see above).
* Only X-Y, West-First and North-Last are provided. The method applies to
  other turn-model algorithms once their f_ij are written down.
