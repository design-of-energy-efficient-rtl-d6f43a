# Channel-buffered bypass router NoC

On-chip networks spend much of their power and area on the input buffers of
the routers. This design moves part of that storage onto the links between
routers and lets most flits skip the router buffer altogether:

* **Links that can store flits.** Each link is a chain of repeater stages.
  Some of them are three-state repeaters with a small control block. When the
  receiver is congested, the control blocks tri-state their stages one after
  another, from the receiver back towards the sender, and every tri-stated
  stage holds one flit in place. A link with `C` such stages stores up to `C`
  flits, so the wire itself acts as an elastic buffer.
* **Lookahead bypass.** One cycle before a flit reaches a router, a short
  lookahead (destination, VC, head/tail) arrives. For a head flit, the router
  uses that cycle to compute the route and reserve an output virtual channel
  (VC). When the flit then arrives, it goes straight through the crossbar
  without being written into the buffer. Only flits that lose this race are
  buffered and go through the usual RC, VA and SA pipeline.
* **Unified, dynamically shared input buffer.** All VCs of a port share one
  pool of `z = v*r` slots. A free-slot tracker (BSA) hands out slots, and a
  per-VC table (UVST) keeps each VC's ordered list of slot numbers.

The default configuration, also called 434D-B, has:

* 4 VCs per port and 3 slots per VC, so 12 shared slots per port;
* 4 channel-buffer stages per link;
* 128-bit flits and 4-flit packets;
* an 8x8 mesh of 5-port routers.

## Block map

| file | role |
|---|---|
| `noc_pkg.sv` | Sizes, port numbers, flit and lookahead structs, VC state table entry |
| `congestion_ctrl.sv` | Control block for one link stage: double-sampled congestion flop |
| `repeater_stage.sv` | One three-state repeater stage: either passes a flit or holds it |
| `channel_link.sv` | `C` stages plus their control blocks; this is the storing link |
| `bsa.sv` | Buffer slot availability: picks the first free slot, counts free slots |
| `uvst.sv` | Unified VC state table: per-VC slot lists, state, OP/OVC, bypass flag |
| `route_compute.sv` | XY routing on a 6-bit `{y,x}` address |
| `vc_allocator.sv` | Output VC allocation for one output port; lookahead requests go first |
| `switch_allocator.sv` | Switch allocation for one output port; bypass requests go first |
| `crossbar.sv` | 10x5 crossbar: a bypass input and a buffer input for each port |
| `output_port.sv` | Output VC busy flags, credit counters, output register, lookahead out |
| `input_port.sv` | DEMUX, unified buffer, BSA, UVST, lookahead queue, congestion OR |
| `router.sv` | 5 input ports, 5 VC and 5 switch allocators, crossbar, 5 output ports |
| `noc_mesh.sv` | Top: an `MX` x `MY` mesh, with a `channel_link` on every neighbour link |

The processing element at each local port and the delay buffer that makes the
offset clock lie outside the RTL:

* the PE's local interface is brought out as ports of `noc_mesh`;
* the offset clock enters as `clk_dly`.

## The storing link and its timing

Each stage `k` (0 at the sender, `C-1` at the receiver) has a control block
(`congestion_ctrl`). The block samples its congestion input on `clk` into a
main flop and on `clk_dly` into a shadow flop. The XOR of the two is an error
flag. A MUX passes the shadow sample while the flag is set, and otherwise the
main sample. The MUX output does two things:

* it tri-states stage `k`;
* it is the congestion input of block `k-1`.

So congestion that the receiver raises in cycle `t` does the following:

* stage `C-1` freezes at the edge ending `t`;
* stage `C-2` freezes one cycle later, and so on back towards the sender;
* the freeze wave moves back one stage per cycle.

In cycle `t+1`, the link delivers nothing to the receiver.

A stage is modelled at flit level:

* a transparent stage passes its input through combinationally, so crossing
  the whole link takes one cycle;
* a frozen stage keeps one flit in a register.

When congestion clears, the stages release their flits in the same order, one
stage per cycle.

The sender sees `stop_o = ctrl[0] & (held_o[0] | in_valid)`: stage 0 is
frozen and is holding or capturing a flit. A stopped sender keeps its flit in
its output register. With this rule the link fills to exactly `C` flits and
no flit is ever overwritten. `repeater_stage` has assertions that check both
points.

Credits bound what can be in flight. Each VC gets `(z + c) / v = 4` credits,
so the 12 router slots plus the 4 wire slots can always absorb everything a
sender was allowed to send.

In simulation `clk_dly` may be tied to `clk`. The error path then never
fires, and the control block acts as a plain one-cycle delay.
`tb_congestion_ctrl` drives a real offset clock and checks the MUX recovery.

## Bypass versus buffered path

Flits are tracked cycle by cycle. The lookahead of a flit arrives in cycle
`t-1`, and the flit arrives in cycle `t` or later if the link held it.

**Head lookahead (cycle `t-1`).**

1. The router computes the route (XY) and bids in the VC allocator of that
   output. Lookahead bids win over buffered heads.
2. On a grant, the VC's UVST row becomes *bypass* with its OP and OVC, and
   the output VC is marked busy.

**Arrival (cycle `t`).** A flit of a bypass VC takes the bypass path if:

* no older flit of its VC is buffered;
* its output VC has a credit;
* the switch allocator grants the bypass input. Bypass inputs win over buffer
  inputs.

A bypassed flit then goes through the crossbar into the output register:

* its VCID is rewritten to the OVC;
* a credit returns upstream at once.

Every other flit is written into a slot chosen by the BSA. A buffered head
then spends one cycle each in RC, VA and SA+ST, so it leaves three cycles
after it is written.

**Per hop.** A bypassed flit spends 1 cycle per router. A buffered head
spends 4 cycles. The end-to-end test checks that an unloaded packet takes
`hops + 1` cycles.

**Body and tail flits of a bypassing packet** can still be blocked by the
output. This happens when the output VC is out of credits or the output link
is stopped. In that case the input port raises congestion for that flit, so
it waits on the channel buffers instead of entering the router buffer
(`ev_cong_la`).

## Congestion sources at an input port

`cong_o` is the OR of three conditions:

1. **BSA**: at most one slot is free.
2. **Reserve**: at most `RSV + 1` slots are free, and the next flit on the
   link belongs to a packet that has no output VC yet. This keeps a reserve
   slot for packets that do own an output VC, so they can always drain.
   Without it, a full shared buffer can hold only heads that wait for output
   VCs whose owners are stuck behind them on the wire, which is a deadlock.
3. **Lookahead**: the next flit bypasses but its output cannot take it.

A small lookahead queue (`LQ = C + 2` entries) records announced flits in
link order. It is how the port knows which VC the "next flit" belongs to.

## Where this RTL departs from the original description, or fills gaps

* **Pipeline depth.** The original describes RC, VA, SA, ST and LT as
  separate one-cycle stages. Here:
  * link traversal overlaps the next router's arrival cycle;
  * SA and ST share a cycle.
  The cycle counts above follow from that.
* **Bypass fallback.** The bypass switch request is made when the flit
  arrives, not in the lookahead cycle, because a flit held on the link has no
  known arrival cycle. A bypass VC whose flit loses the switch falls back to
  the buffer.
* **Deadlock handling.** The original keeps one spare buffer slot and a
  dynamic spare VC per output for deadlock recovery. Here the spare slot is
  the reserve rule above. No spare VC is built, because XY routing does not
  need one.
* **Output VC release.** An output VC is released only when it is idle *and*
  all its credits are back. One downstream UVST row therefore never holds two
  packets.
* **Lookahead contents.** The lookahead carries VCID and head/tail flags
  besides the 6-bit destination.
* **Not modelled:**
  * clock gating of idle control blocks;
  * the transistor-level three-state repeater;
  * link length and the repeaters without storage;
  * power figures.
* **Arbitration.** It is round-robin in every allocator. The routing is XY,
  and the reset is asynchronous and active low.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Example:

    verilator --binary --timing -Wno-fatal rtl/noc_pkg.sv \
        $(ls rtl/*.sv | grep -v noc_pkg) tb/tb_noc_mesh_small.sv \
        --top-module tb_noc_mesh_small -o sim
    ./obj_dir/sim

The package must come first on the command line.

* `tb_noc_mesh_small` runs a 3x3 mesh with the default router. It has four
  phases:
  1. a single packet across the mesh, with exact latency and bypass count;
  2. uniform random traffic;
  3. a hotspot with a slow ejection port, so the links store flits and
     congestion is raised;
  4. a drain.

  It checks that every flit arrives once, in order, at the right node, and it
  counts each mechanism: bypass, buffer write, BSA congestion, lookahead
  congestion and flits held on the wire.
* Each block has its own `tb_<block>` testbench.

The 3x3 mesh is the largest size simulated. The 8x8 mesh at default
parameters passes lint, but its simulator build takes more than ten minutes
of C++ compile. To simulate it, set `MX` and `MY` to 8 in the mesh
testbench.

## Changing the configuration

* `noc_pkg.sv` holds the VC count, slots per VC, channel-buffer count, flit
  width and mesh size. Credits per VC come from `(BUF_SLOTS + LINK_BUFS) /
  NUM_VC`; choose sizes where this divides evenly.
* `noc_mesh` takes `MX`, `MY` and `C` as parameters.
* The input port reserve (`RSV`) and lookahead queue depth (`LQ`) are
  parameters of `input_port`.
