# Mesh network-on-chip with synthesized security triggers

A router in a many-core chip can be made to misbehave in small ways: a
Trojan or a functional bug can copy flits, drop them, send them the wrong
way, or let one requester starve. Any of these hurts every core that shares
the network. This design puts the checks into the silicon. Each rule a
healthy router keeps is written down as a small property, for example "a
flit buffer's write pointer moves by exactly one on a write" or "an arbiter
never grants twice in one cycle". Each property is then built as a small
combinational or counter circuit, a *trigger*, placed next to the logic it
watches. When a trigger fires, the router packs a few of the signals that
show the violation into a *trace packet*. The packet goes to one trace
buffer for the whole chip, which can be read out later for debug.

The network is a 4x4 mesh of five-port virtual-channel routers with X-Y
routing and round-robin arbitration. Each router has twelve trigger kinds,
T1 to T12, one for each of its four kinds of parts:

| part | module | triggers |
|---|---|---|
| input flit buffer, one per port | `flit_buffer` | T1-T6 (`fb_trigger`) |
| route unit, one per input VC | `route_mesh` | T7-T9 (`route_trigger`) |
| round-robin arbiters, VC stage and output stage | `arbiter` | T10-T11 (`arb_trigger`) |
| crossbar output multiplexer | `main_comp` | T12 (`mux_trigger`) |

## The triggers

Every trigger is a plain synthesizable circuit. There are no SystemVerilog
assertions in `rtl/`. A trigger output is high in the cycle its check fails.

| | watches | fires when |
|---|---|---|
| T1 | buffer pointers | a write without a read (or a read without a write) did not move that pointer by exactly one; checked the cycle after |
| T2 | buffer pointers | a write to a full VC moved the write pointer, or a read from an empty VC moved the read pointer |
| T3 | buffer addresses | a read address lies outside the smallest..largest address written to that VC so far |
| T4 | buffer enables | a VC is written on two cycles running, or read on two cycles running |
| T5 | buffer contents | the parity stored with a flit does not match the flit read out (corruption), or a non-empty VC has not been read for `LIVE_BOUND` cycles (starvation, dropping) |
| T6 | buffer bookkeeping | writes minus reads, counted per VC, differs from the VC's depth |
| T7 | route unit | more than one output port selected |
| T8 | route unit | a valid flit has no output port, a destination outside the mesh, or a port that leads off the mesh edge |
| T9 | route unit | the port moves away from the destination: EAST is allowed only towards larger x, WEST towards smaller x, SOUTH towards larger y, NORTH towards smaller y; LOCAL is always accepted. So T9 catches wrong turns but not a correct-direction Y move made too early |
| T10 | arbiter | more than one grant |
| T11 | arbiter | a request has waited `ARB_BOUND` cycles without a grant |
| T12 | crossbar output | the select is one-hot and the output differs from the selected input |

T5 and T11 check "eventually" properties, so they are built as counters with
a bound. The bound is the only reason these two fire later than the others.
All other triggers fire within one cycle of the fault, or two for T1 and T2.

Each check runs once per instance of its part. A router has 5 buffers with 6
triggers each, 10 route units with 3, 10 arbiters with 2 and 5 multiplexers
with 1, which makes 85 trigger circuits. Instances of one kind are ORed
into that kind's bit of the router's 12-bit `trig_flags`.

## Trace path

```
trigger kind k fires ─► capture register k (pending) ─► round robin over
pending kinds ─► packet {R/IP, router id, trace id, signals} ─► central
trace buffer (round robin over routers) ─► read port
```

* **Trace words.** Each trigger kind hands over a 64-bit word of the
  signals that explain it. Examples: pointers and depth for T1/T2;
  source, destination and parity of the flit read for T5; current and
  destination coordinates and the chosen port for T7-T9; requests and
  grants for T10/T11; the select and the low bits of the chosen input and
  the output for T12. When several instances of a kind fire together, the
  lowest-numbered one is traced. Its number (the input port, port*V+VC,
  or arbiter number) goes into the low four bits of the word.
* **`trace_packer`, one per router.** It keeps one pending capture per
  trigger kind. Triggers that fire together are therefore all reported, one
  packet per kind, in round-robin order. A packet is `TRACE_W` bits:
  * 1 bit R/IP, which is 0 for a router;
  * the router id, `clog2(NX*NY)` bits (4 for 4x4);
  * the 4-bit trace id, which equals the trigger number 1..12;
  * as many low bits of the trace word as still fit (39 at the default
    48).

  A packet appears two cycles after its trigger. It is held until the
  buffer takes it. If a kind fires again while its last capture is still
  pending, the new capture is lost and `trace_lost` pulses for that router.
* **`trace_buffer`, one per chip.** It takes one packet per cycle from the
  routers by round robin and stores `TBUF_DEPTH` packets in arrival order.
  When it is full it keeps the oldest packets. It still acknowledges the
  routers, so they do not stall, and it counts the refused packets in
  `trace_dropped`. `trace_rd_en`, `trace_rd_data` and `trace_count` form a
  plain read port. This port stands in for the off-chip debug interface.

## Router microarchitecture

Flits are single-flit packets:

* 3-bit source x/y and destination x/y;
* a 32-bit payload.

A link carries valid, a VC number and a flit. One credit line per VC runs
back the other way.

* **Input.** Each input port writes the arriving flit into its
  `flit_buffer`: V=2 VCs of B=4 flits in one shared memory, plus a parity
  bit per entry for T5. A write to a full VC is refused. The buffer brings
  out its pointers, depths and addresses so the triggers can watch them.
* **Routing.** A `route_mesh` unit at each input VC computes the X-Y
  output port of the flit at the head of that VC. It moves east or west
  until x matches, then north or south, then to the local port. Ports are
  numbered LOCAL=0, EAST=1, NORTH=2, WEST=3, SOUTH=4. x grows to the east
  and y to the south, so router 0 is the north-west corner and router id
  = y*NX + x.
* **Allocation in one cycle**, combining VC and switch allocation with no
  speculation:
  * An output port is usable when one of its downstream VCs has a credit.
    The flit goes to the lowest such VC, skipping the VC written on the
    previous cycle.
  * An input VC requests when it holds a flit, its output is usable, and
    it was not read on the previous cycle.
  * A round-robin `arbiter` per input port picks one of its VCs. A
    round-robin `arbiter` per output port then picks among the input ports.
* **Crossbar.** One `main_comp` multiplexer (AND-OR, one-hot select) per
  output port. The output grant is its select.
* **Timing.** The outgoing link is combinational from the buffers, and the
  next router registers it. A hop therefore costs one cycle, and a flit
  reaches an idle neighbour's output one cycle after it entered.

**Why a VC is never used on two cycles running.** Neither a write nor a
read of one VC may happen on consecutive cycles. This rule makes the T4
check ("no back-to-back write or read") an invariant of the healthy
router, so T4 fires only on a real fault such as packet duplication. It
costs at most half a VC's bandwidth. A router has two VCs per port, so a
busy port still moves a flit every cycle by alternating between them. A
processing element attached to a LOCAL port must keep the same rule.

## Top level

`noc_top` builds the NX x NY grid and ties off the ports on the mesh edge.
It brings out each router's LOCAL port:

* `loc_in`: valid, VC, flit;
* `loc_credit_out`: the credits for that input;
* `loc_out`: delivered flits;
* `loc_credit_in`: credits returned by the element.

It also brings out `trig_flags` and `trace_lost` per router, and the trace
buffer's read port. After reset a sender holds B credits per VC. It may
write a VC only while it holds a credit, and never on two cycles running.
A receiver returns one credit pulse per flit it takes.

## Where this design departs from the published scheme

* **Only the network is built.** The processors, their network interfaces,
  the programs they run, and the off-chip debug interface are not part of
  the RTL. Traffic enters and leaves at the LOCAL ports, and the trace
  buffer has a simple read port instead of the debug interface.
* **Single-flit packets, one-cycle router.** The reference router has
  multi-flit packets and a deeper pipeline. This design keeps the same
  buffer organisation, routing, arbitration and one-hot crossbar, because
  these are what the triggers watch.
* **Number of trigger circuits.** The published 4x4 system counts 1008
  triggers, which is 63 per router. Here every buffer, route unit, arbiter
  and multiplexer instance has its own checker, giving 85 per router.
* **T2** is checked on both pointers: the write pointer on a full VC and
  the read pointer on an empty VC.
* **T3** is built as a running smallest..largest window of written
  addresses. This is a hardware-friendly reading of "every read address
  was written before".
* **T5 and T11 bounds.** The published bounds are not given. This design
  uses `LIVE_BOUND` = 512 cycles for T5 and `ARB_BOUND` = 32 for T11.
  Reported detection times for starvation-type faults were a few hundred
  cycles, and with these bounds T5 needs about 512.
* **T9** checks the direction of the chosen port, not full X-Y order, and always accepts LOCAL. A flit that goes north or south before its x matches is not flagged if the direction is right.
* **T6** compares two 16-bit running counters (writes, reads) against the
  depth every cycle.
* **Trace selection.** The signals in each trace word are chosen per
  trigger as listed above. They are this design's choice. They follow the
  signals each property mentions, not a signal-selection algorithm.
* **Trace buffer depth** (64 packets) and its keep-the-oldest policy are
  this design's choice.
* **Other sizes.** The network was also published at 2x2 (32-bit trace),
  3x3 (48), 6x6 and 8x8 (64). Those sizes are reached by overriding `NX`,
  `NY` and `TRACE_W`. The 3-bit coordinates limit the mesh to 8x8. The
  default build is 4x4 with 48-bit traces.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `noc_top` | `NX`, `NY` | 4, 4 | mesh size |
| | `V`, `B` | 2, 4 | VCs per port, flits per VC |
| | `TRACE_W` | 48 | trace packet width |
| | `TBUF_DEPTH` | 64 | central trace buffer entries |
| | `LIVE_BOUND` | 512 | T5 bound in cycles |
| | `ARB_BOUND` | 32 | T11 bound in cycles |
| `noc_pkg` | `PAYLOAD_W` | 32 | flit payload |
| | `COORD_W` | 3 | coordinate width (mesh up to 8x8) |
| | `SIG_W` | 64 | trace word per trigger kind |

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. They use only `$urandom` for random
traffic. A watchdog ends a run that hangs and counts it as a failure.
`tb/tb_check.svh` holds the `CHECK` macro they share.

With Verilator 5 (`--binary` and `--timing`), from the directory holding
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_top.sv --top-module tb_noc_top -j 8
./obj_dir/Vtb_noc_top
```

Replace `tb_noc_top` with any other testbench name:

| testbench | what it checks |
|---|---|
| `tb_flit_buffer` | buffer against a queue model; full and empty VCs |
| `tb_fb_trigger` | T1-T6, each silent on legal traffic and firing on a forged violation |
| `tb_route_mesh`, `tb_route_trigger` | every current/destination pair; T7-T9 on forged ports |
| `tb_arbiter`, `tb_arb_trigger` | one grant, fairness within N cycles; T10, T11 |
| `tb_main_comp`, `tb_mux_trigger` | multiplexer; T12 |
| `tb_trace_packer`, `tb_trace_buffer` | packet format, ordering, hold, loss and drop counting |
| `tb_router` | one router with random traffic on all five ports against a scoreboard, one-cycle hop, no trigger on healthy traffic |
| `tb_noc_top` | the full 4x4 network at default parameters, in three phases (below) |

`tb_noc_top` runs three phases:

1. **One destination.** Every other core sends three packets to core 10.
   All 45 are checked on arrival.
2. **Random traffic.** Uniform random traffic between all cores, with
   stalled receivers. No trigger may fire.
3. **Fault injection.** Twelve faults are injected into router 5, one at a
   time, by forcing internal signals: lost writes, a pointer moving when
   full, a read address outside the written range, a VC read on two cycles
   running, a starved VC, two output ports, a destination off the mesh, a
   wrong turn, a double grant, a held-off grant, and a zeroed crossbar
   output. For each fault the testbench checks two things: the expected
   trigger fires in the right router, and its trace packet (router id and
   trace id) can be read back from the trace buffer.
   The first build of the full network takes a couple of minutes.
