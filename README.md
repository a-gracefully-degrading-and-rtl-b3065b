# RoCo: a row-column decoupled router for 2D mesh networks-on-chip

A conventional mesh router has one 5x5 crossbar and one set of allocators
shared by all five ports (North, East, South, West and the local processing
element, PE). A single hard fault anywhere in that shared logic takes the whole
node off-line. Most of its contention also comes from every input competing for
the same large crossbar.

This router splits the node along the two mesh dimensions. A **Row-Module**
drives the East and West output links. A **Column-Module** drives North and
South. Each module has its own routing logic, VC allocator, switch allocator
and a small 2x2 crossbar, and the two share nothing. The split has three
consequences:

- Each allocator and crossbar is small, and the switch allocator can find the
  best input-output matching in a single step (the *mirroring* scheme below).
- Flits are sorted into the right module when they arrive, using a route
  computed one hop earlier. Flits for the local PE leave straight from the
  input, without crossing any crossbar.
- A fault in one module only isolates that module; the router keeps
  forwarding traffic in the other dimension. Several smaller faults (a switch
  allocator, the routing unit, single VC buffers) are worked around without
  isolating anything.

The RTL here is synthesizable SystemVerilog. The top, `roco_mesh`, is an 8x8
mesh of routers by default, with 128-bit flits and twelve 5-flit VC buffers per
router. It supports three routing algorithms: XY, XY-YX and minimal adaptive.

## 1. Router organisation

```
            from E,W,N,S links                                to links
 lnk_in --> input_demux x4 --+--> Row-Module    (6 VCs) --> 2x2 xbar --> East, West
                             |
                             +--> Column-Module (6 VCs) --> 2x2 xbar --> North, South
                             |
                             +--> ej_valid/ej_flit (early ejection, one lane per link)
 PE ----> injection_unit ----+   (into the Row or Column injection VC)
```

Each module has two input ports of the crossbar, called **path sets**. Each
path set holds three VCs. VC numbers are global within a router:
`vc = module*6 + path_set*3 + slot`. VCs 0-5 are in the Row-Module and 6-11 in
the Column-Module. VCID 12 on a link means "eject at the next router".

Every VC is fed by exactly one source: one of the four input links or the
local PE. That is what makes the sorting at the input (called *guided flit
queuing*) possible. The VC class says what the flit will do next:

| class | meaning |
|---|---|
| d_x / d_y | keeps going in X / Y |
| t_xy / t_yx | turns from X into Y / from Y into X |
| Inj_xy / Inj_yx | newly injected by the PE |

The assignment depends on the routing algorithm (`roco_pkg::vc_owner`):

| VC | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| adaptive | E d_x | N t_yx | PE | W d_x | E d_x | S t_yx | N d_y | E t_xy | PE | S d_y | W t_xy | W t_xy |
| XY-YX | E d_x | N t_yx | PE | W d_x | E d_x | S t_yx | N d_y | E t_xy | PE | S d_y | S d_y | W t_xy |
| XY | E d_x | E d_x | PE | W d_x | W d_x | PE | N d_y | E t_xy | PE | S d_y | S d_y | W t_xy |

"E" means the VC is filled from the East input link, which carries flits
travelling West. With XY routing nothing turns from Y into X, so the t_yx
buffers become extra X buffers and a second Row injection VC.

## 2. Look-ahead routing and the flit format

Each module routes a head flit one hop ahead (`lookahead_rc`). The output
direction at this router is fixed by the module and the destination:
`dst_x > x` means East, otherwise West, and likewise North/South. The unit
computes what the packet may do at the *next* router: eject, continue in X, or
continue in Y. That route is never written into the flit. It is expressed by
the choice of downstream VC: a VC in the next router's Column-Module means
"go Y there". The routing algorithm only changes which of eject/X/Y are
allowed:

- XY: X while `dst_x` differs, then Y.
- XY-YX: the source sets the `yx` bit per packet (Y first when set).
- Minimal adaptive: every productive dimension is allowed, and the VC
  allocator picks whichever allowed VC is free.

Flit layout (`roco_pkg::flit_t`, 128 bits, MSB first):

| field | bits | use |
|---|---|---|
| ftype | 2 | body, tail, head, head+tail |
| dst_x, dst_y | 3 + 3 | destination |
| yx | 1 | XY-YX order of this packet |
| la2_vld, la2 | 1 + 3 | route two hops ahead (only around a failed RC, section 7) |
| payload | 115 | free |

Every flit carries the header fields, so the ejection check needs no per-VC
state. The link beside the flit carries `valid` and a 4-bit `vcid`
(`link_t`).

## 3. VC allocation

`vc_allocator` is a separable two-stage allocator, one per module.

- **Stage 1:** each of the 6 input VCs has a 4:1 round-robin arbiter. It picks
  one candidate among the 3 downstream VCs that the output link owns, plus an
  ejection slot.
- **Stage 2:** each of the 8 output slots (2 outputs x 4) has a 6:1 arbiter
  that picks one input VC.

A request is only raised for a downstream VC that is:

- free (no packet holds it);
- of the right class for the look-ahead route;
- in a module the neighbour reports as working;
- able to take at least one flit.

The ejection channel is treated as a fourth downstream VC. It is allocated per
packet, so flits of two packets never interleave on one ejection lane.
It never runs out of credit.

## 4. Mirrored switch allocation

`mirror_sa` matches the two path sets to the two outputs of the module's 2x2
crossbar.

1. Each path set has one 3:1 arbiter per output direction.
2. Only path set 1 has a global 2:1 arbiter. It picks path set 1's direction.
3. Path set 2 always takes the opposite direction.

The global arbiter also sees which directions path set 2 is requesting. It
prefers a direction for which path set 2 can use the other output. So both
outputs are busy whenever the requests allow it, with one arbitration step
and no iteration. Assertions check that an output is never left idle when a
request could use it, and that the two grants never point the same way.

The switch allocation is **speculative** for head flits. A head requests the
switch in the same cycle it requests a VC. If the VC allocation fails, the
switch slot is wasted for that cycle (`spec_miss` in `roco_module`). There is
no priority for non-speculative requests.

## 5. Pipeline, timing and flow control

`roco_module` has two stages:

1. Look-ahead routing, VC allocation and switch allocation, all
   combinational from the VC front flits.
2. Crossbar traversal into the output register, which drives the link.

A flit written into a VC at clock edge *t* is on the next link after edge
*t+1*, so one hop costs **2 cycles**. A flit on a link is written into its VC
at the end of that cycle.

Flow control is credit based. Each output keeps, per downstream VC, a busy bit
(reserved from head to tail) and a count of flits sent but not yet credited;
it sends while the count is below `DEPTH`. Popping a flit raises that VC's bit
in the router's registered 12-bit `credit_out` for one cycle. All four
neighbours receive the same vector, and each one reads only the bits of the
VCs its link feeds.

## 6. Early ejection and injection

`input_demux` steers each arriving flit by its `vcid`. With VCID 12 the flit
appears on `ej_valid[d]`/`ej_flit[d]` in the same cycle it arrives on link
`d`. It never enters a buffer or a crossbar. With four ejection lanes,
ejection cannot block. The sink must accept a flit every cycle on each lane;
packets arrive whole and in order per lane.

`injection_unit` takes PE flits with a valid/ready handshake. A head is placed
in the first injection VC with room, in a working module and in a dimension
the route allows (Row preferred). The rest of the packet follows into the
same VC. The PE must not send to its own node.

## 7. Fault handling

Faults are static inputs per router: `module_fault[1:0]`, `sa_fault[1:0]`,
`rc_fault` and `buf_fault[11:0]`. Detection is not part of this design. Each
router sends its fault state to its neighbours on `status_out`.

- **Module isolation** (`module_fault`; stands for a failed VC allocator,
  crossbar or mux). The module grants nothing. Neighbours stop reserving its
  VCs and route through the other module of that router. With adaptive
  routing, packets that could go either way are unaffected. A destination
  that can only be reached through the failed module is cut off.
- **Switch allocator recycling** (`sa_fault`). The switch allocation is made
  on arbiters borrowed from the VC allocator: stage-1 arbiters 0-3 as the four
  local arbiters, and stage-2 arbiter 0 as the global one, selected through
  2-to-1 muxes. The SA borrows in any cycle the VC allocator has no request,
  and on every other cycle regardless, so neither side starves.
- **Double routing** (`rc_fault`). A router with a failed routing unit cannot
  compute look-ahead routes. Its upstream neighbours see `rc_fail` and compute
  the route two hops ahead, writing it into the head flit's `la2` field. The
  faulty router uses that field in place of its own routing unit. The faulty
  router's own PE must not inject, because its packets have no such field.
- **Virtual queuing** (`buf_fault[i]`). VC *i* stores nothing. The upstream
  router gives it a single credit and keeps the flit on its output link until
  the credit comes back. The faulty router reads that flit straight off the
  link (the bypass path) when it wins the switch. The link is held meanwhile,
  so other VCs of the same link wait.

## 8. The mesh top

`roco_mesh #(MESH_X=8, MESH_Y=8, ROUTING=RT_ADAPTIVE, DEPTH=5)`

- Node `n = y*MESH_X + x`; x grows East, y grows North.
- Ports are unpacked arrays indexed by node:
  - `inj_valid/inj_flit/inj_ready`;
  - `ej_valid/ej_flit[n][0..3]`, one ejection lane per input link, in E, W, N,
    S order;
  - the four fault inputs.
- Links off the edge are tied idle, and report both modules of the missing
  neighbour as down.
- Coordinates are 3 bits, so meshes up to 8x8 are supported without changing
  `roco_pkg::COORD_W`.

## 9. Departures from the published architecture and known limits

- The extra routing step for a failed routing unit is done one router
  *upstream*, because the downstream VC must be chosen before the flit leaves.
  The published scheme does current-node routing at the routers downstream of
  the fault.
- The VC allocator has an extra slot per output for the ejection channel:
  8 second-stage arbiters per module instead of 6.
- Under virtual queuing, the published scheme keeps the flit in the upstream
  router's VC buffer. Here the flit sits in the upstream output register,
  which is simpler but shares the link with other VCs. The next item shows
  what this costs.
- **Virtual queuing holds the shared link.** If two failed buffers are fed by
  the same link, a held head flit can wait for a VC whose owner's tail is
  queued behind it upstream. That deadlocks; it was observed in simulation
  with two failed buffers on the West link of one router. One failed buffer
  per link drains normally.
- **Adaptive routing has no escape-channel discipline.** The VC allocator may
  take any free VC of the right class. No deadlock was seen in the tests, but
  freedom from deadlock is not guaranteed by construction.
- Packets already in a module when it fails are not discarded or recovered.
  Faults are assumed present from reset.
- Not implemented: fault detection, the traffic generators and traces used to
  evaluate the architecture, and power or energy models.

## 10. Files

| file | content |
|---|---|
| `rtl/roco_pkg.sv` | widths, flit/link/status types, VC ownership tables, routing functions |
| `rtl/rr_arbiter.sv` | round-robin arbiter used everywhere |
| `rtl/vc_buffer.sv` | 5-flit FIFO of one VC |
| `rtl/input_demux.sv` | per-link steering into VCs and early ejection |
| `rtl/lookahead_rc.sv` | look-ahead route and second look-ahead route |
| `rtl/vc_allocator.sv` | two-stage VC allocator with arbiter lending |
| `rtl/mirror_sa.sv` | mirrored switch allocator, runs on borrowed arbiters under fault |
| `rtl/crossbar_2x2.sv` | the module crossbar |
| `rtl/roco_module.sv` | one Row- or Column-Module: VCs, allocators, credits, link registers, fault handling |
| `rtl/injection_unit.sv` | PE injection |
| `rtl/roco_router.sv` | one router |
| `rtl/roco_mesh.sv` | the mesh (top) |
| `tb/tb_*.sv` | one self-checking testbench per block |
| `tb/tb_traffic.sv` | random uniform traffic source and scoreboard for mesh tests |

## 11. Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and finishes; a
watchdog ends a stuck run. Example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/roco_pkg.sv tb/tb_roco_mesh.sv --top-module tb_roco_mesh -o sim
./obj_dir/sim
```

- **Unit tests** cover each block against a reference model or directed
  cases: arbiter fairness, FIFO against a queue model, VC ownership,
  look-ahead routes for all positions, allocator matching and lending, and
  mirroring.
- **`tb_roco_module`** runs directed scenarios:
  - the 2-cycle latency;
  - the VC class chosen;
  - both outputs used together;
  - stopping without credits;
  - virtual queuing;
  - module isolation;
  - the route taken from the head flit;
  - the second look-ahead route.
- **`tb_roco_router`** checks routing to all directions, early ejection in the
  arrival cycle, the hop latency and credit return.
- **`tb_roco_mesh`** runs three 4x4 meshes under random uniform traffic,
  checking delivery, order and destination of every flit:
  - XY at 30% injection;
  - XY-YX at 12%;
  - adaptive at 12% with one fault of each kind.

  It also counts each router mechanism and fails if any never acted:
  ejection, dual crossbar grants, lost speculation, credit stalls, link holds
  and bypass reads, borrowed switch grants, double-routed heads, and traffic
  through a half-failed router. Building takes about 5 minutes.
- **`tb_roco_mesh_full`** runs the top at its defaults: an 8x8 adaptive mesh
  with four faulty routers and 10 packets per node (630 packets).

Average packet latency in the 4x4 tests, from head injection to tail
ejection, is about 12.9 cycles for XY at 30% load, 8.6 cycles for XY-YX at
12%, and 11.5 cycles for the faulty adaptive mesh at 12%.
