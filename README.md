# APCR: a NoC router whose links carry several small flits per cycle

On-chip networks have plenty of wire, so a link can be made much wider than
the buffers behind it can afford to be. This router does that on purpose. The
flit (the unit of buffering and flow control) is 128 bits and the link (the
phit) is 512 bits, so each output link is cut into four flit-wide
**sub-channels**. A switch allocator, the **Adaptive Physical Channel
Regulator** (APCR), decides each cycle which flits fill those four
sub-channels. They can be several flits of one packet, flits of different
virtual channels (VCs), or flits from different input ports. A packet
therefore crosses a link in fewer cycles, while buffers, credits and VC state
stay at flit granularity.

The design is a complete 8x8 mesh of such routers with XY routing. Each router
has 5 ports and 4 VCs of 4 flits per input port. Routers are two-stage, plus
one cycle on the link. Three regulation schemes are built. A parameter
chooses one per mesh.

## The three regulation schemes

Every VC asks for a number of flits, not a single one. The request `want` is
the number of flits of the packet at the VC's head that were read this cycle
(at most 4). It is further limited by the credits of the downstream VC. The
allocator returns `grant_n`, the number of flits each VC may send. It also
returns, for every output sub-channel, which input port and VC drive it.

* **Monopolizing** (`apcr_sa_mono`). This is the allocator of a generic
  router. Stage 1 picks one VC per input port (a 4:1 round-robin arbiter).
  Stage 2 picks one input per output (a 5:1 round-robin arbiter). The winner
  takes the whole link: up to 4 flits of its packet go out together. Other VCs
  wait, even if sub-channels stay empty.
* **Fair-sharing** (`apcr_sa_fair`). Sub-channel *k* of every output is bound
  to VC *k mod 4* of every input port. Each VC sends at most one flit per
  cycle on its own sub-channel. VCs of one input port never compete, so there
  is only one stage: a 5:1 round-robin arbiter per output sub-channel, choosing
  among the input ports. If the link had more sub-channels than VCs, a VC
  would own several of them.
* **Channel-stealing** (`apcr_sa_steal`, the default). This runs
  fair-sharing first. Then every sub-channel left idle is handed out by a
  round-robin pass over all 20 VCs (5 ports x 4 VCs) that request this output
  and still have flits beyond what they were granted. A VC can steal from
  VCs of its own input port or from other inputs. One output has one
  round-robin pointer, which moves past each thief. One input port can place
  at most 4 flits per cycle, because its channel to the crossbar is one phit
  wide. The stealing pass counts this budget.

`tb_apcr_sa_*` check the example cases for each scheme:

* a single VC sending a run of flits;
* four VCs of one port sharing a link;
* two VCs with flits while two are idle, so the other two steal.

They also compare against an independent reference model under random
requests.

## Reading several flits from one VC: the buffer

A VC must be able to emit up to four flits per cycle, but has one read port
(`apcr_vc_buffer`). The buffer is a circular parallel FIFO with a head
pointer, a tail pointer and a packet pointer. Its read port is a whole phit
wide: every cycle the four flits starting at the head are read out. The
allocator then decides how many go. The head moves by that number. The other
flits are simply dropped and read again next cycle. This avoids extra read
ports, at the cost of redundant reads.

Flits of two packets may not leave together. The packet pointer marks the
tail of the packet at the head. `run` is the number of flits from the head up
to that tail, capped by 4 and by the occupancy. The write side is also a phit
wide: up to four flits arriving in one cycle for the same VC are written in
order.

Here the packet pointer is found by a combinational search for the first tail
flit after the head. An occupancy counter separates full from empty. Both are
this design's own choices.

## Input port, packing and the crossbar

`apcr_input_port` has three parts:

* **Demux.** It writes incoming flits into the VCs named in their sideband,
  in sub-channel order.
* **Requests.** It raises a VC-allocation request for a head flit without a
  downstream VC. It raises a switch request once the VC holds one, or wins one
  this cycle.
* **Output MUX.** It packs the granted flits into a 4-slot channel: lowest VC
  first, oldest flit first. Each flit gets its downstream VC number, and a
  head flit gets the route for the next router.

The packed channel is registered. The router turns each granted output
sub-channel into a (input port, slot) pair. The slot is the number of flits
granted to lower VCs of that input, plus the rank of this flit. These pairs
are registered alongside. In the next cycle `apcr_crossbar` copies slot to
sub-channel. The crossbar thus switches single flit slots, not whole links.

## Credits, VC allocation and routing

* **Credits** (`apcr_output_port`). Up to four flits can leave for one
  downstream VC per cycle, and up to four can be freed there. So the credit
  wires carry a count per VC (`credit_t`), not a single pulse. The output port
  keeps a counter per downstream VC, starting at the VC depth. It keeps a busy
  bit per downstream VC, set on allocation and cleared when the tail leaves.
  It also holds the output link register.
* **VC allocation** (`apcr_vc_alloc`). This works as in a generic router. One
  20:1 round-robin arbiter per output picks one head flit per cycle and gives
  it the lowest free downstream VC.
* **Routing** (`apcr_route`). Routing is XY with lookahead. The head flit
  carries the output port it must take at the router it is entering. The
  sending router computes that port from the destination and writes it into
  the head. At injection, the local input port computes the route itself.
  Orientation: +x is east, +y is south.

## Pipeline and latency

| cycle | stage |
|---|---|
| 1 | VC allocation, switch allocation, buffer read, packing (all combinational); result in the switch register |
| 2 | crossbar into the output link register |
| 3 | link; the downstream input port writes the flits at the end of the cycle |

So a hop costs 3 cycles: 2 in the router and 1 on the link. In the
testbenches a packet injected at time *t* into a router *h* hops away from its
destination leaves the destination's local port at *t* + 3(*h*+1) + 1. The
extra cycle is the injection link. The testbenches check this minimum on
every path.

The intended router does speculative switch allocation in parallel with VC
allocation. Here both happen in the same cycle, with the switch allocator
seeing the VC allocator's result. Latency matches a speculation that never
fails. The combinational path (VA, then SA, then slot mapping) is long. This
is the main timing point to revisit for a fast implementation.

## Flit and link format

`apcr_pkg` defines the types. A flit is 128 data bits plus sideband: a 2-bit
type (body, head, tail, head-tail) and a 3-bit lookahead route. A sub-channel
adds a valid bit and a 2-bit VC number. A link is four sub-channels. A head
flit carries its destination in data bits [3:0] (x) and [7:4] (y). The
testbenches also put source, packet id, flit index, length and injection time
in the payload. The sideband and payload layout are this design's own.

## Parameters

| name | default | where |
|---|---|---|
| `NUM_PORTS`, `NUM_VC`, `VC_DEPTH` | 5, 4, 4 | package |
| `FLIT_W`, `PHIT_W` (`NUM_SUB` = 4) | 128, 512 | package |
| `SCHEME` | channel-stealing | `apcr_router`, `apcr_mesh` |
| `DEPTH` | 4 | `apcr_router`, `apcr_mesh` (VC depth) |
| `COLS`, `ROWS` | 8, 8 | `apcr_mesh` |

The sub-channel count comes from the package constants. Changing the
phit/flit ratio means editing `FLIT_W`/`PHIT_W`.

## Where this design departs from or adds to the intended router

* VA and SA run in one cycle, not speculatively (see above).
* Flit sideband, destination encoding and credit counts per VC: own choices.
* Channel-stealing limits each input to 4 granted flits per cycle. This is
  needed because the channel to the crossbar is one phit.
* Fair-sharing uses one arbiter over input ports per sub-channel.
* Mesh edge ports are tied off.
* The baseline router (flit = phit) is not built. Nor are the processors,
  caches and network interfaces that generate real traffic. The local ports
  of the mesh are where those would attach.
* Yosys synthesis of the full mesh is slow. Logic size has not been
  optimised.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/apcr_pkg.sv rtl/*.sv \
  tb/apcr_tb_source.sv tb/apcr_tb_sink.sv tb/apcr_router_env.sv \
  tb/tb_apcr_router.sv --top-module tb_apcr_router
./obj_dir/Vtb_apcr_router
```

* `tb_apcr_router` places one router in the middle of its neighbours, which
  are traffic sources and checking sinks. It runs all three schemes. It checks
  payload, order and minimum latency, and that each scheme's mechanism
  happened: multi-flit grants, sharing, stealing.
* `tb_apcr_mesh` runs three 4x4 meshes, one per scheme, with random traffic
  of 1- and 5-flit packets.
* `tb_apcr_mesh_full` runs the 8x8 mesh at the default parameters. Building
  the mesh testbenches takes several minutes.
