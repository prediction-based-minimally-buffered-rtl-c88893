# MinBD: a minimally-buffered deflection router for a 2D-mesh network-on-chip

A bufferless deflection router never stores a flit: every flit that enters
leaves on some output in the next few cycles, and when two flits want the same
output one of them is sent somewhere else (deflected). That saves the area and
power of input buffers, but at high load deflections multiply, flits wander and
the network wastes energy on useless hops.

MinBD keeps the deflection router and adds one small FIFO, the **side buffer**,
beside the pipeline. After routing, if any flit is about to leave on a
non-productive port, the router may pull one such flit per cycle out of the
pipeline and park it in the side buffer instead. Buffered flits are later put
back into the pipeline ahead of new local traffic, and get another chance at a
productive port. Most flits never touch the buffer; only the ones that would
have been deflected do.

The side buffer also reports how full it is. These **status signals** go to
the neighbouring routers so that a flow-control mechanism outside the router
can predict congestion and hold back new injections (`inj_hold`).

This repository holds synthesizable SystemVerilog for the router and for a
64-node (8x8) mesh of routers, with a self-checking testbench for every part.

## Flits

Each flit is routed on its own; there are no packets or virtual channels.
`minbd_pkg::flit_t` is:

| field          | bits | meaning                                           |
|----------------|------|---------------------------------------------------|
| `valid`        | 1    | slot holds a flit                                 |
| `dst_x, dst_y` | 3+3  | destination router                                |
| `src_x, src_y` | 3+3  | source router (carried, not used for routing)     |
| `age`          | 8    | routers traversed so far, saturating at 255       |
| `data`         | 32   | payload                                           |

Ports are numbered North = 0, East = 1, South = 2, West = 3. x grows towards
East and y towards South.

**Priority.** Everywhere a choice between flits is made (ejection, and each
2x2 arbiter of the routing network), the flit with the higher age wins, and a
tie goes to the lower slot or input index. The age is incremented each time a
flit is put on an output link. Giving the oldest flit the right of way is what
keeps flits in the network from being deflected forever.

**Productive direction.** The direction a flit wants is dimension-order: first
along x, then along y.

## The router pipeline

`minbd_router` has no input buffers. A flit that arrives goes straight into a
four-slot pipeline of two stages:

```
 in_flit[N,E,S,W]
      |
  +---v-----------------------------------------------------------+
  | stage 1  ejector -> redirection -> re-injector -> injector    |--> ej_flit (reg)
  |                        |             ^             ^          |
  |                        v             |             |          |
  |                   +---------- side buffer ----+   inj_flit    |
  +-------------------|---------------------------|---------------+
                      |          pipeline reg     |
  +-------------------|---------------------------|---------------+
  | stage 2  route + permutation network -> buffer-eject ---------+
  +---------------------------------------------------------------+
      |
  out_flit[N,E,S,W] (reg = the link)
```

Stage 1, combinational on the inputs:

1. **Ejector** (`minbd_ejector`). Of the flits addressed to this router, the
   highest-priority one is removed and delivered to the local node. Only one
   flit is ejected per cycle.
2. **Redirection** (`minbd_redirect`). Described below.
3. **Re-injector** (`minbd_injector`, first instance). If the side buffer holds
   a flit and a slot is free, its head flit goes into the lowest free slot.
4. **Injector** (`minbd_injector`, second instance). New local traffic goes into
   the lowest free slot that is still left, unless `inj_hold` is set. Because
   this injector comes after the re-injector, buffered flits are served before
   new ones. With all four slots taken, nothing is injected and the node keeps
   its flit (`inj_ready` stays low).

Stage 2, combinational on the pipeline register:

5. **Permutation network** (`minbd_permute_net`). Gives every flit a distinct
   output port and flags the ones that did not get their productive port.
6. **Buffer-eject** (`minbd_buffer_eject`). If a flit is flagged as deflected
   and the side buffer can take a write, the deflected flit on the
   lowest-numbered port is removed and written into the side buffer. This is
   the first point in the pipeline where the router knows which flits are
   deflected.

**Timing.**

| path                                         | cycles        |
|----------------------------------------------|---------------|
| input link to output link, not buffered      | 2             |
| input link to `ej_flit`                      | 1             |
| `inj_ready` (acceptance) to output link      | 2             |
| injection to ejection over h hops, idle mesh | 2h + 1        |
| buffered at cycle t, re-injected at best     | t + 1         |

`inj_ready` is combinational. It depends on `inj_flit.valid`, `inj_hold` and
the registered inputs. A node offers a flit on `inj_flit`, holds it until
`inj_ready` is high on a clock edge, and then drops it or offers the next one.

## The permutation network

Four flits and four ports go through two stages of 2x2 arbiter blocks
(`minbd_arbiter_block`):

```
 slot 0 --+           +--> C: N (0) ,  E (1)
 slot 1 --+ A --upper-+
          |  \lower   |
 slot 2 --+ B --upper-+
 slot 3 --+  \lower------> D: S (2) ,  W (3)
```

* Stage 1: block A takes slots 0 and 1, block B takes slots 2 and 3. Each sends
  one flit to block C (the {N, E} half) and one to block D (the {S, W} half).
* Stage 2: block C drives ports N and E, block D drives ports S and W.

In each block the higher-priority flit goes the way it wants, and the other
flit takes the remaining output. So the oldest flit in the router always
leaves on its productive port. A younger flit that loses once can still end up
on a productive port if the other half had room. Pairing N with E and S with W
means that a flit losing a stage-2 arbitration is sent at right angles to its
wish, never straight back.

A flit is flagged **deflected** when it leaves on a port other than its
productive one. A flit addressed to this router that the ejector did not take
has no productive port, so it is always flagged.

The network always routes every flit. At most four flits are ever in the
pipeline, because the ejector frees a slot before any injector fills one.

## The side buffer and its three doors

`minbd_side_buffer` is a FIFO, `SB_DEPTH` flits deep, with one write and one
read per cycle. Flits enter it in two ways and leave it in one:

* **Buffer-eject** (stage 2) writes a deflected flit into it, unless the
  buffer is full. If the buffer is full, the flit is simply deflected; the
  event strobe `buf_refused` marks that case.
* **Redirection** (stage 1) writes a flit into it while the head is read out in
  the same cycle. This swap is allowed even when the buffer is full.
* **Re-injection** (stage 1) reads the head into a free slot.

Only one write happens per cycle. In a cycle where redirection writes, the
buffer-eject of stage 2 is skipped and its deflected flit leaves deflected.

**Why redirection exists.** A buffered flit can only come back through a free
slot. Under heavy load all four slots may stay occupied for a long time, and
the buffered flits would starve. `minbd_redirect` counts consecutive cycles in
which the buffer is not empty and no slot is free. In the next such cycle
after `REDIRECT_THRESH` of them, it takes the flit out of one slot into the
side buffer, and the head of the buffer goes into that slot. Slots are chosen
round-robin. So under full load the buffer's head gets out at least once every
`REDIRECT_THRESH + 1` cycles.

**Flits addressed to this router are never buffered.** Suppose two flits for
this router arrive together. The ejector takes one, and the other is deflected.
If that flit were buffered, it would come back through the re-injector. But the
re-injector sits after the ejector, so the flit would be deflected and buffered
again, forever. Such a flit is therefore left on a link instead. It returns a
few cycles later and is ejected then.

**Status signal.** The buffer's fill level is reported as `sb_status`:
`SB_EMPTY`, `SB_LOW` (below half), `SB_HIGH` (half or more) or `SB_FULL`. It is
a function of the registered occupancy.

## The mesh

`minbd_mesh` instantiates `MESH_X x MESH_Y` identical routers and links each
output to the matching input of its neighbour. On a side with no neighbour,
a router's output is looped back into its own input on that side. A flit
deflected off the edge of the mesh therefore returns one cycle later. This
keeps all routers the same and never drops a flit.

Per node, the mesh brings out:

* `inj_flit`, `inj_ready`: the local injection port.
* `ej_flit`: the local ejection port.
* `inj_hold`: the injection throttle.
* `sb_status`: the router's own side-buffer level.
* `nb_status[p]`: the side-buffer level of the neighbour on side `p`, or
  `SB_EMPTY` where the mesh ends. These are the status signals each router
  sends to its neighbours.
* `ev`: the router's event strobes (`router_ev_t`). They count deflections,
  buffer writes, refusals, re-injections, redirections, ejections, injections,
  blocked injections and held injections. Use them for performance counters.

The flow-control mechanism that turns `nb_status` into `inj_hold` is **not**
part of this RTL; one instance per node is expected outside the mesh. The
testbench uses a simple stand-in, `tb/minbd_predict_model.sv`. It holds a
node's injection while two or more of its neighbours report `SB_HIGH` or
`SB_FULL`, or while the node's own buffer is full. It shows how the ports are meant
to be used. It is not a proposal for that mechanism.

## Parameters

| parameter         | default | where              | notes                                   |
|-------------------|---------|--------------------|-----------------------------------------|
| `MESH_X`, `MESH_Y`| 8, 8    | `minbd_mesh`       | at most 8 each (3-bit coordinates)      |
| `SB_DEPTH`        | 4       | mesh, router, FIFO | side-buffer depth in flits              |
| `REDIRECT_THRESH` | 2       | mesh, router       | starved cycles before a redirection     |
| `COORD_W`         | 3       | `minbd_pkg`        | widen for meshes larger than 8x8        |
| `AGE_W`, `DATA_W` | 8, 32   | `minbd_pkg`        | age and payload widths                  |

## What follows the router's description and what is this design's choice

These points follow the published description of MinBD:

* There are no input buffers.
* Ejection and injection happen in the first stage, ejection first.
* One flit is ejected per cycle, chosen by the same priority as routing.
* A second injector for the side buffer sits ahead of the local injector.
* A redirection block sits ahead of that injector.
* At most one deflected flit per cycle is buffered. That happens after the
  permutation network, and only while the buffer is not full.
* The side buffer sends status signals to the neighbours.
* An external mechanism uses those signals to limit injection.

These points are this design's own choices, and each could be changed:

* The flit format and widths, and the oldest-first priority by hop count.
* X-then-Y productive directions.
* The split into two stages.
* The wiring of the permutation network.
* Which deflected flit is buffered: the lowest port.
* Which free slot an injector fills: the lowest.
* The redirection rule, its round-robin slot choice and its threshold of 2.
* The side buffer depth of 4.
* The four-level status encoding.
* The looped-back mesh edges.
* The default 8x8 mesh size.
* The rule that flits addressed to the router itself are never buffered.

Known limits:

* A node should not send flits to itself. Injection comes after ejection, so
  such a flit leaves the router once and is ejected when it comes back.
* With the age saturating at 255, the oldest-first guarantee weakens for a
  flit older than that. In the tests no flit came close.
* Ties between flits of equal age are broken by position, not by a global
  order.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`. Each one
compares against values it computes itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench                | what it checks                                                                 |
|--------------------------|--------------------------------------------------------------------------------|
| `tb_minbd_ejector`       | ejects the oldest local flit, lowest slot on a tie; other slots untouched     |
| `tb_minbd_injector`      | lowest free slot, nothing when all four are full                               |
| `tb_minbd_buffer_eject`  | buffers the deflected flit on the lowest port only when enabled               |
| `tb_minbd_permute_net`   | no flit lost or duplicated; deflection flags correct; the oldest flit is productive; a lone flit is never deflected; a hand-worked contention case |
| `tb_minbd_side_buffer`   | FIFO order against a queue model, full/empty, status level, push on full with and without a pop |
| `tb_minbd_redirect`      | redirection decision and slot, cycle by cycle against a model; period THRESH+1 under full load |
| `tb_minbd_router`        | 2-cycle pass-through with age+1; 1-cycle ejection; 2-cycle injection; contention → buffer → re-injection two cycles later; `inj_hold`; saturation with buffer refusal, redirection and blocked injection, with every flit accounted for |
| `tb_minbd_mesh`          | 8x8 mesh at its defaults: zero-load latency 2h+1 for 40 single flits; 3000 cycles of heavy uniform-random traffic with the stand-in controller; every flit ejected once, at its destination; neighbour-status wiring checked every cycle; every mechanism above seen at least once |

In one run of the mesh test, about 51,000 flits were delivered in about 3,600
cycles. The counts were 98k deflections, 148k side-buffer writes, 5k refusals
by a full buffer, 298 redirections, 15k blocked injections and 91k held
injections.

The testbenches use random stimulus from `$urandom`, so other seeds give
other numbers. The tests are functional only: no power, area or timing
results are claimed here.

## Simulating

Verilator 5 is enough. For example, the mesh test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_minbd_mesh \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/minbd_pkg.sv tb/tb_minbd_mesh.sv
./obj_dir/Vtb_minbd_mesh
```

Replace `tb_minbd_mesh` with any other testbench name to run it. The 8x8 mesh
test builds and runs in about a minute.

## Files

* `rtl/minbd_pkg.sv`: flit type, port and status enums, priority and routing
  functions, event-strobe struct.
* `rtl/minbd_mesh.sv`: top level, the mesh.
* `rtl/minbd_router.sv`: one router.
* `rtl/minbd_ejector.sv`, `minbd_redirect.sv`, `minbd_injector.sv`: stage 1.
* `rtl/minbd_permute_net.sv`, `minbd_arbiter_block.sv`,
  `minbd_buffer_eject.sv`: stage 2.
* `rtl/minbd_side_buffer.sv`: the side buffer and its status signal.
* `tb/`: one testbench per module, plus `minbd_predict_model.sv`, the
  simulation-only stand-in for the injection controller.
