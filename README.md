# A five-port virtual-channel wormhole router

This is a router for a network-on-chip. Each router has five ports: north, south, west, east, and a local port for the processing element attached to it. A packet is cut into flits (flow-control digits) and travels through the router in wormhole fashion: the header reserves a path and the body and tail flits follow it.

The main idea is the *virtual channel* (VC). Each physical input channel is split into `V` logical channels, and each has its own `K`-flit buffer. A packet blocked at the head of one VC therefore does not block packets queued in the other VCs of the same link. The cost is two extra allocation problems, solved every cycle by separable round-robin arbiters:

- **VC allocation (VA)**, once per packet: which output VC a header may take.
- **Switch allocation (SA)**, once per flit: which buffered flit crosses the crossbar this cycle.

The design follows a published VHDL router of this kind. That router has three parts: the static VC buffers, the router control logic (routing computation, VA and SA), and a P x P crossbar. Its sizes are P = 5 ports and 8-bit data. The source leaves open the VC count, the buffer depth, the link protocol and the pipeline timing. This RTL fills those in; the section "Where this design departs from or extends the reference" lists each choice.

## Block structure

```
             +------------------------ vc_router -------------------------+
 in_* ------>| input_port x5 --front flits--> router_control               |
 credit_out <|   (V x vc_fifo)               (route_compute x P*V,        |
             |        |  ^ pop / sel_vc       vc_allocator, switch_alloc.,|
             |        |  +-------------------  VC state, credit counters) |
             |        v one flit per port              | xbar_en/sel      |
             |      crossbar (P x P, registered) <-----+                  |--> out_*
             +------------------------------------------------------------+<-- credit_in
```

| File | Role |
|---|---|
| `rtl/router_pkg.sv` | flit type enum, port numbering, default sizes |
| `rtl/rr_arbiter.sv` | N:1 round-robin arbiter; the pointer moves only when the grant is used |
| `rtl/vc_fifo.sv` | K-flit buffer of one VC (circular, first-word fall-through, empty/full/count) |
| `rtl/input_port.sv` | input demux by VC id, V FIFOs, output mux under SA control, credit return |
| `rtl/route_compute.sv` | header's `data[2:0]` to output port |
| `rtl/vc_allocator.sv` | VA1 (P*V arbiters of V:1) and VA2 (P*V arbiters of P*V:1) |
| `rtl/switch_allocator.sv` | SA1 (P arbiters of V:1) and SA2 (P arbiters of P:1) |
| `rtl/crossbar.sv` | P x P switch with an output register |
| `rtl/router_control.sv` | per-VC state machines and credit counters; instantiates RC, VA, SA |
| `rtl/vc_router.sv` | top level |

## Link interface and flit format

Each of the `P` input links of `vc_router` carries, per cycle:

| signal | width | meaning |
|---|---|---|
| `in_valid[p]` | 1 | a flit is present |
| `in_type[p]` | 2 | `FLIT_HEAD`, `FLIT_BODY`, `FLIT_TAIL`, or `FLIT_HEAD_TAIL` (a one-flit packet) |
| `in_vc[p]` | log2 V | the VC the flit belongs to; it steers the input demultiplexer |
| `in_data[p]` | 8 | payload |
| `credit_out[p][v]` | 1 per VC | one pulse for every flit that leaves VC `v`'s buffer |

The output links carry the same fields (`out_valid`, `out_type`, `out_vc`, `out_data`). `out_vc` is the VC that the router allocated on the next hop, not the VC the flit arrived on. `credit_in[p][v]` is a pulse from the downstream buffer each time it frees a slot of that VC.

**Routing.** Only the header is routed. Its three low data bits `data[2:0]` select the output directly: code 0 goes to port 0 (the first output), and so on up to code 4 for port 4. Codes 5, 6 and 7 name no port and are delivered to the local port, 4. The port order is north, south, west, east, local (`PORT_*` in the package). There is no address arithmetic: the code names the output port of *this* router.

**Rules the sender must obey.**
- A packet on a VC starts with a header and ends with a tail.
- The flits of different packets never interleave within one VC. Flits of different VCs may interleave freely on the link.
- A sender may send on a VC only while it holds a credit for it. It starts with `K` credits per VC and regains one per `credit_out` pulse.

Assertions report any breach (a flit into a full buffer, a body flit with no header ahead of it, surplus credits).

## How a packet moves through the router

Each input VC is either *idle* or *active*.

1. **Buffer write** (edge n). The flit is written into the FIFO named by its VC id.
2. **Routing and VC allocation** (edge n+1). An idle VC whose front flit is a header computes its output port. It requests every *free* output VC of that port.
   - In **VA1**, the input VC's own V:1 arbiter narrows this to one output VC.
   - In **VA2**, each output VC's P*V:1 arbiter picks one of the input VCs that chose it.
   - The winner becomes active and records its output port and output VC. That output VC is marked busy.
   - If all V output VCs of the port are busy, the header waits in its buffer. It does not block the other VCs of its link.
3. **Switch allocation and traversal** (edge n+2 and later). An active VC may request the switch. It needs a buffered flit and a non-zero credit count for its output VC.
   - In **SA1**, each input port's V:1 arbiter picks one requesting VC, because the port has a single crossbar input.
   - In **SA2**, each output port's P:1 arbiter picks one input port among those whose SA1 winner wants it.
   - The winners are popped from their FIFOs and cross the crossbar. They are registered on the output link, carrying their new VC id.
   - The credit counter of the output VC drops by one. A `credit_out` pulse goes upstream in the next cycle.
4. **Release.** When a tail flit crosses, the input VC goes idle and the output VC is freed.

Latency with no contention: a header driven on an input in cycle t is on the output link in cycle t+3. Each further flit of the packet follows one cycle after the one before. One input port and one output port each move at most one flit per cycle.

**Arbiter fairness.** All arbiters are round robin. A pointer moves past the winner only when the grant is actually used:
- a VA1 pointer when its input VC is finally granted;
- an SA1 pointer when its winner also wins SA2;
- VA2 and SA2 pointers whenever they grant.

So a requester that loses in the second stage keeps its first-stage priority.

**Credits.** Each output VC has a counter that starts at `K`. The downstream buffer is assumed to be as deep as this router's. The counter counts down per flit sent and up per `credit_in` pulse. A VC with no credit makes no SA request, so the router never overruns the next buffer.

## Parameters

| parameter | default | origin |
|---|---|---|
| `P` | 5 | reference design (five ports) |
| `DATA_W` | 8 | reference design (8-bit `data1..data5`, `dout1..dout5`) |
| `V` (VCs per port) | 4 | chosen here; the reference names it but gives no value |
| `K` (flits per VC buffer) | 4 | chosen here; the reference names it but gives no value |

The routing code is always `data[2:0]`, so `DATA_W` must be at least 3 and `P` at most 8. At the defaults, a coarse synthesis gives about 590 flip-flop bits plus 800 bits of buffer storage (5 ports x 4 VCs x 4 flits x 10 bits). The VC allocator dominates the logic: its second stage has P*V = 20 arbiters of 20 inputs each.

## Where this design departs from or extends the reference

- **More pins.** The reference exposes only `clk`, `rst`, five 8-bit inputs and five 8-bit outputs (82 pins). Here each link also carries valid, flit type, VC id and per-VC credits: 172 pins at the defaults. Without these signals a wormhole VC router cannot tell packets, VCs or free buffer space apart.
- **Flit type field.** The reference does not say how headers and tails are marked. Here a separate 2-bit type travels next to the 8 data bits.
- **Route codes 5..7** go to the local port. The reference is silent on them.
- **"First three bits" taken as `data[2:0]`.** The reference's example waveform shows output 1 receiving words ending in `000`, output 2 words ending in `001`, and so on up to output 5 with `100`.
- **Sizes and timing.** V = 4, K = 4, the single-cycle VA and SA stages, the registered crossbar output and the synchronous active-high reset are this design's choices.
- **Performance figures not reproduced.** The reference reports an average latency of 39 cycles and a throughput of about 20 %, but not the traffic that produced them. They cannot be compared. `tb/vc_router_perf_tb.sv` measures this design under uniform random traffic with 4-flit packets instead. Offered load, accepted load and mean latency from one run:

| offered (%) | accepted (%) | mean latency (cycles) |
|---|---|---|
| 10 | 10.2 | 6.7 |
| 20 | 20.9 | 7.7 |
| 40 | 40.4 | 11.7 |
| 60 | 57.5 | 19.6 |
| 80 | 70.5 | 290 (saturated) |

- **Area, clock rate and power** of an FPGA implementation are not characterised here.
- **Out of scope.** The network interface, the processing elements and a mesh of routers belong to the wider network, not the router, and are not included.

## Verification

Every RTL module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs.

- `rr_arbiter_tb`, `vc_fifo_tb`, `crossbar_tb`, `input_port_tb`, `route_compute_tb`: random or exhaustive stimulus against reference models.
- `vc_allocator_tb`, `switch_allocator_tb`: an independent model of both arbitration stages, with their own pointers, predicts every grant. Safety rules are checked as well: one output VC per packet, one crossbar connection per input.
- `router_control_tb`: directed scenarios covering:
  - the 1-cycle VA and then one flit per cycle;
  - a credit stall after `K` flits;
  - a fifth packet waiting until one of four busy output VCs is released;
  - two inputs alternating on one output.
- `vc_router_tb`: end to end at the default parameters.
  - It checks the 3-cycle pipeline latency and the rotating routing pattern of the reference waveform.
  - It then sends about 1500 random packets with a hot spot, with sinks that sometimes hold back credits.
  - A scoreboard checks every flit: right port, in order, no interleaving within an output VC, never beyond the credits.
  - It counts VA grants, VA2 conflicts, VA stalls (no free VC), SA1 and SA2 conflicts, credit stalls, full input buffers, single- and multi-flit packets and codes 5..7. It fails if any of them never happened.
- `vc_router_perf_tb`: the load sweep shown above. It checks delivery, flit order, the minimum latency, and that accepted load tracks offered load below saturation.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/router_pkg.sv tb/vc_router_tb.sv --top-module vc_router_tb -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second of simulation time.
