# RKT-NoC: a fault-tolerant, error-correcting mesh router in SystemVerilog

This is a network-on-chip built from a reliable router, the RKT switch. The
switch is described in "Design and Implementation of Smart Reliable Router
Switch for Dynamic NOC". It is meant to keep packets moving when parts of the
network go wrong. Two kinds of trouble are handled:

* **Corrupted data.** Every flit that crosses a switch-to-switch link carries
  a Hamming code. A single flipped bit is corrected and a double flip is
  detected. Both are logged.
* **Broken routers.** A router can be marked faulty. Its neighbours then stop
  sending to it. A packet whose XY path leads into the faulty router is
  *looped back*: it re-enters its own switch through the side it was about to
  leave by. It is marked as a bypass packet, and from then on it is routed
  around the fault.

A third mechanism watches the routing itself. Each switch checks that an
arriving packet came by a legal XY hop, or by a legal detour. If neither holds,
it logs a routing error.

The default configuration is the one the design is evaluated in: a 4 x 4 mesh,
64-bit flits, packets of four flits, and input buffers that hold two packets.

## Structure

```
rkt_noc                      4 x 4 mesh, fault vector, per-router IP ports,
 └─ rkt_switch  (x16)        border links, journals, delivery acknowledges
     ├─ rkt_ctrl             fault status, neighbour availability (registered)
     ├─ per side N/E/S/W:
     │   ├─ loopback_module  link interface: output register, link/loopback
     │   │                   switch, input multiplexer, occupancy
     │   ├─ input_port       ECC check, input buffer, routing, route check
     │   │   ├─ hamming_dec
     │   │   ├─ input_buffer
     │   │   ├─ routing_logic
     │   │   └─ route_err_detect
     │   ├─ output_fsm       round-robin grant and packet transfer
     │   └─ hamming_enc
     ├─ local IP port: input_port (no ECC) + output_fsm + output register
     └─ error_journal        counters and log of SEC / DED / routing errors
```

Router `r` sits at `x = r % 4`, `y = r / 4`. x grows to the east and y grows
to the north, and coordinates start at 0. The original article numbers its
routers 1 to 16 and its coordinates from 1. So its test case, "(1,1) to (3,3)
with routers 2 and 6 faulty", is (0,0) to (2,2) with `fault[1]` and `fault[5]`
here.

## Packets and links

A packet is `N_FLIT = 4` flits of `W` bits. Flit 0 is the header. Its low 9
bits are a `hdr_t` (from `rkt_pkg`):

| bits | field    |
|------|----------|
| 0    | bypass (set when the packet has been looped back) |
| 2:1  | src_x    |
| 4:3  | src_y    |
| 6:5  | dst_x    |
| 8:7  | dst_y    |

The header's upper bits and the other three flits are payload. Flits on a
link are SEC-DED codewords of `CW = W + P + 1` bits, which is 72 for W = 64.
Codeword bit `i` (i ≥ 1) is Hamming position `i`. Power-of-two positions hold
the check bits and the other positions hold the data bits in order. Bit 0 is
the overall parity.

Each side of a switch has these link signals, with mirror-image inputs:

| signal | meaning |
|--------|---------|
| `data_request_out` | a flit is on `data_out` this cycle |
| `data_out[CW]` | the codeword |
| `occ_out` | this side cannot take a new packet (buffer too full, or a loopback is under way) |
| `unavailable_out` | this router is faulty (the same on all sides) |

Each switch also receives `diag_unavailable_in` from its four diagonal
neighbours.

Flow control works per packet. A sender starts a packet only while the
receiver's `occ` is low, and then sends all four flits back to back. A
receiver's `occ` counts flits that are still on the wire or in its ECC
register, so a packet that has been started always fits.

The local IP port carries plain `W`-bit flits with the same valid/occ
handshake (`ip_in_valid`, `ip_in_occ`, `ip_out_valid`, `ip_out_occ`).

## Timing of one hop

The switch is store-and-forward. A packet is routed only when all of its flits
are in the input buffer. From the first flit arriving to the first flit leaving
an idle switch takes:

```
N_FLIT (store) + 1 (ECC register) + 3 (route register, grant, output register) = 8 cycles
```

This matches the design's minimum router latency,
`N_flit + Latency_ECC + 3`, with an ECC latency of one cycle. Links add no
further delay, so a packet crossing `h` switches sees its first flit at the
destination IP `8·h` cycles after injection. For (0,0) to (2,2) that is 5
switches and 40 cycles, and the testbench checks this. An output side sends one
packet every five cycles at most: one grant cycle plus four flits.

## Fault handling: loopback and bypass routing

This is the least conventional part of the design.

1. **Fault marking.** `fault[r]` is registered by the router's `rkt_ctrl`. A
   faulty router drives `unavailable_out`, holds `occ_out` high on every side,
   and grants nothing.
2. **XY first.** An ordinary packet is routed XY (X first, then Y) and ignores
   availability.
3. **Loopback.** The output FSM may find that the XY side leads to an
   unavailable neighbour. It then raises `loop_req` instead of sending. The
   side's `loopback_module` raises `occ_out` at once, which stops the
   neighbour from starting a packet into that side. It then waits until:
   * `occ_out` has been up for two cycles,
   * no flit is arriving and no packet is half received,
   * the side's input buffer has room for a whole packet.

   Then it grants. The four flits go through the output register as usual, but
   the link switch turns them into the side's own input path instead of onto
   the link. The input port sets the bypass bit in the header as the packet
   re-enters.
4. **Bypass routing.** For a packet with the bypass bit set, `routing_logic`
   takes the first usable side in this order:
   1. productive Y,
   2. productive X,
   3. N, E, S, W, skipping sides that lead away from the destination,
   4. the sides that lead away, in the same order.

   A side is not usable if it is the arrival side (no U-turns), if it is off
   the mesh, or if its neighbour is unavailable. The bit stays set up to the
   destination, so the receiver can see that the packet took a detour.

The published design says only that the packet is looped back "through
another port" to find a new path. It does not give a detour rule. The greedy
order above is this implementation's choice. Trying the sideways steps before
the backward ones matters: a packet blocked on the top row by a faulty router
would otherwise turn back east and circle. The order gets around a single
faulty router at any of the 16 positions, and it handles the article's
two-fault case. It does **not** guarantee
freedom from livelock. A packet can circle forever when two faults and the mesh
border form a pocket. For example, with routers 1 and 5 faulty, a packet from
(3,1) to (0,0) loops through routers 2, 3, 7 and 6. A wall-following or
turn-model detour would be needed for a guarantee.

The loopback is only taken for an *unavailable* neighbour. The article's text
can also be read as looping back when the neighbour is merely busy. Here a
busy neighbour just makes the packet wait, because looping back on congestion
would fill the switch's own buffers.

## Error detection

* **ECC** (`hamming_enc` / `hamming_dec`). Encoding happens at every side
  output and decoding at every side input, so each link is checked. A corrected
  single error raises an SEC event. A double error raises a DED event, and the
  packet is still forwarded unchanged.
* **Routing error detection** (`route_err_detect`). A packet is legal if one of
  these holds:
  * It arrived from W or E while still on its source row and without having
    passed its destination column.
  * It arrived from S or N while in its destination column and without having
    passed its destination row.
  * It came from the local IP, and this router is its source.

  Otherwise the packet is still accepted if its bypass bit is set and one of
  the eight surrounding routers (four sides, four diagonals) is unavailable.
  Anything else is a routing error. The check only looks one router around, so
  a detour that moves away from the fault gets flagged by later routers.
  Errors are only logged. The packet continues.
* **Journal** (`error_journal`, one per switch). It has saturating counters for
  SEC, DED and routing errors, each counting every event. It also keeps a log
  of the last 8 events (kind, input side), with one entry per cycle. The
  testbench reads it through `jr_idx` (0 = newest).

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `W` | 64 | `rkt_noc`, `rkt_switch`, ... | flit width; ≥ 9 for the header |
| `PKTS` | 2 | `rkt_noc`, `rkt_switch`, `input_buffer` | packets per input buffer |
| `MESH_X`, `MESH_Y` | 4 | `rkt_noc`, `rkt_switch`, `routing_logic` | mesh size; at most 4 with the 2-bit coordinates in `rkt_pkg` |
| `N_FLIT` | 4 | `rkt_pkg` | flits per packet (a power of two) |
| `COORD_W` | 2 | `rkt_pkg` | coordinate width; raise it for larger meshes |

The article synthesises data widths from 4 to 256 bits. Widths below 9 bits
cannot hold this header layout.

## Simulating

Every testbench in `tb/` is self-checking. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rkt_pkg.sv tb/tb_util_pkg.sv rtl/*.sv tb/tb_rkt_noc.sv \
    --top-module tb_rkt_noc -o sim
./obj_dir/sim
```

Replace `tb_rkt_noc` with any other testbench name to run that one instead.

| testbench | what it covers |
|-----------|----------------|
| `tb_rkt_noc` | Full 4 x 4 mesh at default parameters. Runs the article's case without and with faults, checks the 40-cycle latency, injects SEC, DED and routing errors on a border link, stalls a destination, and runs 180 random packets (no fault, then router 5 faulty). Every mechanism must occur at least once. |
| `tb_rkt_noc_sizes` | The three evaluated mesh sizes (2 x 2, 3 x 3, 4 x 4) side by side, each with a corner-to-corner latency check (8 cycles per switch) and 60 to 120 random packets. It uses the helper `noc_traffic`. |
| `tb_rkt_noc_faults` | One 4 x 4 mesh with one faulty router (router 0 by default, any other with `+fault=<r>`) and 120 random packets that avoid it. Every packet must arrive. All 16 positions pass. |
| `tb_rkt_switch` | One switch at (1,1). Checks the 8-cycle latency, local to local delivery, ECC correction, occupancy waits, buffer-full `occ_out`, loopback and bypass exit, and fault. |
| `tb_loopback_module`, `tb_output_fsm`, `tb_input_buffer`, `tb_routing_logic`, `tb_route_err_detect`, `tb_hamming`, `tb_hamming_dec`, `tb_error_journal`, `tb_rkt_ctrl` | unit tests |

`tb_util_pkg` holds an independent reference Hamming encoder for the tests.

## Departures and open points

* **Output buffer.** The original block diagram shows a multi-queue output
  buffer on every side. Here it is a single flit register, because whole
  packets already wait in the input buffers.
* **Link identifier.** The loopback diagram has an `Id_in` signal whose use is
  not explained. It is not implemented.
* **Local port.** Every switch has one, as in the generic router picture. The
  free sides on the mesh border are also brought out (`ext_*`), because the
  article says IPs may attach to any side.
* **Not given in the source.** The header layout, the SEC-DED extension
  (overall parity bit), the link handshake, the journal's contents, the
  control logic's behaviour and the reset (asynchronous, active low) are this
  implementation's own.
* **Not reproduced.** The article's FPGA figures (slices, frequency, power)
  and its throughput tables are not reproduced by simulation. Only the latency
  formula is checked.
* **Livelock.** Freedom from livelock is not guaranteed (see above).
