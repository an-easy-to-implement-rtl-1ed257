# Full-credit flow control (FFC-CR) torus network

Bubble flow control keeps a torus ring deadlock-free by making sure that at
least one empty buffer the size of the longest packet (a *bubble*) always
exists in the ring. Packets of different lengths tend to split that bubble
over several routers, and then no packet can move. Earlier fixes waste buffer
space (every packet is counted as a longest one) or need global coordination.

Full-credit flow control (FFC) treats the deadlock as a lack of credit and
fixes it inside the credit counters alone. The router just upstream of the
bubble holds back the credits its own buffer frees while it drains into the
bubble. It does not return those credits until its buffer is completely empty.
At that point a whole bubble's worth of space sits in its buffer, and it hands
the bubble backwards in one step. No other router, arbiter or buffer policy
changes.

FFC-CR (credit reservation) adds the escape channel of Duato-style fully
adaptive routing without extra VCs. Each VC buffer is split into two parts:
- an adaptive part, taken from a shared DAMQ buffer;
- a reserved escape part, one bubble deep, run with FFC and dimension-order
  routing.

The two parts of each VC then make a single request to the switch arbiter.

This repository holds synthesizable SystemVerilog for the router and for a
K × K torus built from it (default 4 × 4, one node per router). It also holds
self-checking testbenches.

## Network and router structure

```
torus_noc                    K x K routers, ring wiring, initial bubbles
 └─ router (x,y)             5 ports: X+, X-, Y+, Y-, local
     ├─ damq_buffer  x5      shared adaptive buffer per input (48 flits, 4 queues)
     ├─ escape_buffer x20    one per input and VC (12 flits = one bubble)
     ├─ request_gen  x5      per-VC blockage timer + adaptive/escape merge
     │   └─ route_compute x8 DOR escape port + minimal adaptive port
     ├─ switch_allocator     separable round-robin, packet-level locks
     │   └─ rr_arbiter
     ├─ crossbar (inline)    one mux per output
     └─ credit_mgmt  x4      Cc / Ca / Cb per network output
```

Port `p` of a router is the direction of travel. A flit arriving on input
X+ came from the neighbour at x−1. Input `p` and output `p` of the same
router are therefore consecutive hops of one unidirectional ring. That pairing
matters for FFC: the credit manager of output `p` holds back the credits of
input `p`.

Each input port has:

* one **escape buffer** per VC (`escape_buffer`, `ESC_DEPTH` = 12 flits, one
  longest packet). Packets here follow dimension-order routing (X first, then
  Y, the shorter way round the ring) and bubble flow control.
* one **adaptive buffer** (`damq_buffer`, `ADP_DEPTH` = 48 flits) shared by all
  four VCs. It is a linked-list multi-queue, so any VC can use any free slot.
  Upstream routers see a single shared credit counter for it.

## Full-credit flow control (credit_mgmt)

Each network output keeps, per VC:

| counter | meaning |
|---|---|
| `cc_esc[v]` (Cc) | free slots in the downstream escape buffer |
| `cb[v]` (Cb) | the downstream escape buffer is the ring's bubble |
| `ca[v]` (Ca) | credits of the local escape buffer held back during a swap |

It also keeps `cc_adp`, the free slots of the downstream shared adaptive
buffer.

While `cb[v] = 0`, the local input of the same ring returns one credit per
freed escape flit, as in plain credit-based flow control. Once the downstream
router asserts the bubble bit for VC `v`, `cb[v]` becomes 1 and this router is
the *swap buffer*:

1. Every escape flit of VC `v` that leaves the local input buffer adds one to
   `ca[v]`. Nothing goes upstream. The upstream router runs out of credit,
   so it cannot refill this buffer while it drains into the bubble.
2. When the local escape buffer is empty, with no flit stored and no packet
   half received (`idle`), the full credit has been reached. In that cycle
   the module asserts `up_cred.bubble[v]` and returns `ca[v]` in
   `up_cred.esc[v]`.
3. `ca[v]` and one count of `cb[v]` clear, and normal credit return resumes.

The bubble has moved one router backwards, whole. With an empty ring it moves
one router per cycle, so it circulates continuously.

**Ring entry rule.** A packet may continue inside its ring if the downstream
escape buffer has room for the whole packet (virtual cut-through). A packet
*entering* an escape ring from outside needs both room and a downstream buffer
that is not the bubble (`ds_bubble_busy[v] = 0`). Coming from outside means
one of these:
- from an adaptive buffer;
- from another direction (a dimension turn);
- from injection.

This rule is what keeps one full bubble in every ring.

**Why the bubble bit is combinational.** Suppose the upstream router could
still admit an out-of-ring packet in the cycle after the swap finished. That
packet would land in the brand-new bubble and break it. To prevent this, the
bubble bit is computed only from the sender's registered state (`cb != 0`
and `idle`). The upstream router reads it in the same cycle:
`ds_bubble_busy = cb | ds_cred.bubble`. This creates no combinational loop,
because nothing that feeds `idle` depends on the link in that cycle. A flit
that arrives in the swap cycle is always an in-ring head flit, which is
allowed to use the bubble. The returned credit counts reach the upstream
counters at the same clock edge.

Each ring starts with one bubble per VC. Router `x = K−1` starts with
`cb = 1` on its X+ output, router `x = 0` on X−, and likewise in Y
(`BUBBLE_INIT`).

## Credit reservation and request merging (request_gen)

For every VC of an input port, request_gen looks at two queue heads: the
adaptive queue and the escape buffer. It produces **one** request, taking the
first of these candidates that has downstream room:

1. **Blocked adaptive packet.** Its timer has reached `TH_BLOCK`. It asks for
   its DOR port and the downstream *escape* buffer, using the reserved escape
   credits (an out-of-ring entry).
2. **Escape packet.**
   - If the best adaptive port has more than `TH_BACK` (= 12, one longest
     packet) free adaptive credits, the packet switches back to the adaptive
     network on that port.
   - Otherwise it stays on its DOR port in the escape network.
3. **Unblocked adaptive packet.** It asks for its adaptive port: the minimal
   direction with the most free adaptive credit.

The switch allocator therefore sees four requests per port instead of eight.
The blockage timer counts the cycles during which the adaptive head finds too
little adaptive credit for the whole packet. It clears as soon as credit is
available again, which restores adaptive routing, and when the packet is
granted.

## Switch allocation and timing

`switch_allocator` works in two stages:
1. Every idle input picks one requesting VC whose output is free (round
   robin).
2. Every free output picks one of the inputs that chose it (round robin).

A grant locks the input and the output until the packet's tail has gone.
Packets therefore cross every link whole and contiguous. The head flit leaves
in its grant cycle. Later flits follow one per cycle as they arrive
(cut-through).

A hop takes one cycle, because allocation, buffer read and crossbar are
combinational from registered state. The flit is written into the downstream
buffer at the next edge. Zero-load latency from the node's injection register
to the ejection port is **hops + 2 cycles**. In the escape-only configuration,
an injected packet may also wait a few cycles while the circulating bubble
passes its entry point.

## Interfaces (ffc_pkg)

* `flit_t`: head, tail, destination (dx, dy), packet length, 32-bit data.
  Every flit carries the header fields.
* `link_t`: valid, `esc` (target buffer: escape or adaptive), `vc`, flit.
* `cred_t`: `adp` (one adaptive credit), `esc[v]` (escape credits for VC `v`:
  one in normal operation, Ca at a swap), `bubble[v]` (the bubble moves to
  the receiver's downstream buffer).
* `ev_t`: per-router event strobes for statistics: swap, hold, escape,
  esc_back, ring_fwd, ring_enter.

`torus_noc` brings out, per node:
- `inj_link` / `inj_cred`: the node writes into the local input buffers under
  credit control;
- `ej_link`: always accepted;
- `ev`.

Reset is asynchronous and active low. After reset all credits are full and
every buffer is empty.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `K` | 4 | torus_noc, router | torus radix (`COORD_W` = 3 allows up to 8) |
| `NUM_VC` | 4 | ffc_pkg | message-class VCs per port |
| `MAX_PKT`, `ESC_DEPTH` | 12 | ffc_pkg | longest packet = bubble = escape buffer depth |
| `ADP_DEPTH` | 48 | ffc_pkg | shared adaptive buffer per input port |
| `TH_BLOCK` | 16 | torus_noc, router | cycles without adaptive credit before escaping |
| `TH_BACK` | 12 | torus_noc, router | adaptive credits needed to leave the escape network |
| `ESCAPE_ONLY` | 0 | torus_noc, router | 1 = single-VC FFC (DOR, escape buffers only) |

## Design choices not fixed by the method

These values and behaviours are this design's own choices:
- `ADP_DEPTH` and the linked-list DAMQ organisation;
- `TH_BLOCK`;
- the adaptive selection rule (most free credit among minimal directions);
- DOR's X-before-Y order and its tie rule (distance K/2 goes plus);
- packet-level locking of switch ports;
- the single-cycle router;
- the same-cycle bubble handshake;
- where the initial bubbles sit;
- the 32-bit payload.

The ring-entry rule is read from the worked example of the method: an entry
needs free credit for the packet and a downstream buffer that is not the
bubble.

`ESCAPE_ONLY = 1` approximates the single-VC FFC router. Packets still enter
through the local adaptive queue. Because they count as blocked from the
start, they move straight into the escape network.

Not included:
- the concentrated torus (8 nodes and 16 network links per router);
- SRAM macros (buffers are register arrays);
- the comparison schemes (LBFC, CBS).

The 8 × 8 torus (64 nodes) is the parameter setting `K = 8`. The same
traffic bench (`noc_bench` with `K = 8`, 40 packets per node per pattern)
has delivered every packet in it, with every mechanism occurring. Its
Verilator build takes about 20 minutes, so no testbench in `tb/` runs it by
default.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_escape_buffer` | random traffic against a reference queue; idle flag with half-received packets |
| `tb_damq_buffer` | one queue taking the whole buffer; random mixed traffic against four reference queues |
| `tb_route_compute` | every source/destination pair of 4 × 4 and 8 × 8 tori; DOR port, minimal set, adaptive choice |
| `tb_credit_mgmt` | the 12-flit bubble swap (2+3+4+3 flits held in Ca, then bubble + 12 credits in one cycle); Cc counting; immediate swap |
| `tb_request_gen` | priorities, timer firing exactly after `TH_BLOCK` cycles, bubble refusal for out-of-ring entry, in-ring use of the bubble, switch-back threshold |
| `tb_switch_allocator` | whole, ordered, non-interleaved packets; head leaves in its grant cycle; no starvation; 5 flits/cycle peak |
| `tb_router` | legal output ports, packet integrity, every bubble handed back exactly once, credit conservation after drain, with stalling neighbours |
| `tb_torus_noc` | default 4 × 4 FFC-CR network: zero-load latency, then saturated uniform, hotspot and exponential traffic that must drain fully; scoreboard on every flit; each FFC-CR mechanism must occur |
| `tb_noc_workloads` | the same traffic on the 4 × 4 single-VC FFC network (deadlock freedom from FFC alone), via `noc_bench` |

The RTL contains assertions that catch handshake errors: buffer
overflow/underflow, sending without credit, Ca beyond the buffer size, and
two inputs on one output.

To simulate with Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ffc_pkg.sv tb/tb_torus_noc.sv --top-module tb_torus_noc -Mdir obj
./obj/Vtb_torus_noc
```

Replace `tb_torus_noc` with any testbench name above. The 4 × 4 network builds
in a few minutes and runs in under a second. Unit testbenches build in
seconds.
