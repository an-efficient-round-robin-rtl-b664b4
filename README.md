# Weighted round-robin arbiter

When several masters share one resource (a bus, or the output port of a
packet switch), an arbiter decides who uses it next. A plain fixed-priority
arbiter lets a high-priority master starve the others; a plain round-robin
arbiter is fair but gives every master the same slice of time. This design
is a round-robin arbiter in which every master also has a **weight**: the
number of clock cycles it keeps the grant once its turn comes. Masters are
still served in strict circular order, so nobody starves, but a master with
weight 20 gets twice the bus time of one with weight 10. A global
**maximum weight** stops one master from hogging the resource: while anyone
else is waiting, no slot runs longer than that maximum, but a master that is
alone may use its whole weight.

The arbiter is built from three small parts:

| Part | Module | What it does |
|---|---|---|
| Next grant precalculator | `ngprc` | turns the last grant into a mask of the masters that come next in round-robin order |
| Grant state machine | `grant_fsm` | picks the next master under that mask and times its slot |
| Weight decoder | `weight_decoder` | looks up the weight (and the index) of the granted master |

`rr_arbiter` wires these three together. `packet_switch`, the top level,
places the arbiter in one output port of a packet switch. It adds a
multiplexer (`packet_mux`) that forwards the granted input's packet, plus
a request/full handshake towards the downstream stage.

## Picking the next master: the mask arithmetic

The key trick is how round-robin order comes from three cheap operations on
the last one-hot grant `g`: rotate it left by one, invert it, add one.

```
g            = 0010   (master 1 had the grant)
rotate left  = 0100
invert       = 1011
+1           = 1100   -> mask: masters 2 and 3 come first
```

Adding one to the inverted rotated grant clears every bit below the rotated
bit and keeps it and everything above it. The mask is therefore "every master
numbered higher than the last one". Two edge cases follow from the arithmetic:

* If the last grant was the highest master, the rotation puts its bit in
  position 0 and the mask is all ones, so the search starts again at master 0.
* Before anything has been granted (`g = 0`) the mask is all zeros.

The state machine then takes the lowest-numbered master in `req & mask`. If
that set is empty, because nobody after the last master is requesting, it
takes the lowest-numbered requester overall. That is the wrap-round. With all
four masters requesting after master 1, the order is 2, 3, 0, 1, 2, and so on.
A master that is not requesting is simply skipped.

The mask is computed from `grant_q`, the last *decided* grant. That register
keeps its value after the slot ends, so between slots the mask still knows
whose turn it was.

## The slot: grant state machine timing

`grant_fsm` has four states:

```
            rst=1 (from any state)
   Reset ───────────────┐
     │ rst=0            │
     ▼                  │
 Grant Process ──(a master picked)──► Get Weight ──► Count ──(counter >= limit)──┐
     ▲   (stays while nobody requests)                                            │
     └────────────────────────────────────────────────────────────────────────────┘
```

* **Grant Process** (one cycle, or longer while no one requests): the pick
  is registered into `grant_q` at the clock edge.
* **Get Weight** (one cycle): the weight decoder output for `grant_q` is
  latched.
* **Count** (`limit` cycles): `gnt = grant_q` is driven out. The counter
  starts at 1 and the state is left at the end of the cycle in which
  `counter >= limit`.

`limit` is the latched weight. It becomes `max_weight` in any Count cycle in
which (a) another master is requesting and (b) the weight exceeds
`max_weight`. A weight (or a cap) of 0 behaves like 1. Because the check is
made every cycle, a competitor that shows up in the middle of a long slot cuts
it short at `max_weight`.

Each slot therefore costs `limit + 2` cycles: `limit` cycles with the grant
out, then two arbitration cycles in which `gnt` is zero. Here is an example
with masters 0 and 1 both requesting, weights 2 and 1:

| cycle | state | counter | `grant_q` | `gnt` |
|---|---|---|---|---|
| 0 | Grant Process | – | 0000 | 0000 |
| 1 | Get Weight | – | 0001 | 0000 |
| 2 | Count | 1 | 0001 | 0001 |
| 3 | Count | 2 | 0001 | 0001 |
| 4 | Grant Process | – | 0001 | 0000 |
| 5 | Get Weight | – | 0010 | 0000 |
| 6 | Count | 1 | 0010 | 0010 |
| 7 | Grant Process | – | 0010 | 0000 |

A request first seen in Grant Process at cycle *t* is served from cycle
*t+2*. For two saturated masters with weights 20 and 10, one round takes
20+2+10+2 = 34 cycles, of which 30 carry a grant. The split is 2:1.

Other behaviour to know:

* A slot runs to its end even if its master drops the request.
* `hold` freezes the machine. Grant Process makes no new decision, and in
  Count the counter stops while the grant stays with its master. Held cycles
  are not charged to the slot.
* Reset is synchronous and active high. It clears `grant_q`, so after reset
  the search starts at master 0.
* Assertions check that `grant_q` is never more than one-hot and that a new
  grant only goes to a master that is requesting.

## Weight bus and weight decoder

The weights of all masters travel on one concatenated bus of
`CHANNELS * WEIGHT_W` bits, master 0 in the least significant slice:

```
weights = { w[CHANNELS-1], ..., w[1], w[0] }
```

`weight_decoder` scans the one-hot select from bit 0 upwards and keeps the
position of the set bit as a binary `index` (0010 gives 1, 0100 gives 2).
It then outputs `dataInBus[index*WEIGHT_W +: WEIGHT_W]`. If more than one bit
is set, the highest one wins. An all-zero select gives index 0. The index is
also the select of the packet multiplexer.

## The packet switch output port (top level)

```
ReqInt[3:0] ──►┌────────────────┐──► ReqDnStr
GntInt[3:0] ◄──│  rr_arbiter    │◄── FullDnStr
               └──────┬─────────┘
                      │ sel (gnt_idx)
Packet[0..3] ──► packet_mux ──► PacketOut
```

An input port raises `ReqInt[i]` while it has a packet waiting on
`Packet[i]`. When granted (`GntInt[i]`), its packet appears on
`PacketOut`. `ReqDnStr` is high when a port is granted and still requesting,
meaning `PacketOut` holds a valid packet. `FullDnStr` from downstream means
"cannot accept now". It drives the arbiter's `hold`, so a full downstream
stage stalls the arbitration instead of using up the port's time slice. A
packet moves in every cycle with `ReqDnStr` high and `FullDnStr` low. The
input port should then present its next packet. `Weights` and `MaxWeight`
are plain configuration inputs.

## Parameters

| Parameter | Default | Where it comes from |
|---|---|---|
| `CHANNELS` | 4 | the reference design: four requesters / four input ports |
| `WEIGHT_W` | 8 | chosen here. The reference design leaves the weight width open. 8 bits allow weights up to 255. |
| `PKT_W` | 32 | chosen here. No packet format is specified. |

`CHANNELS` and `WEIGHT_W` can both be changed before synthesis, as intended.
Every module takes them as typed parameters.

## What follows the reference design and what does not

Taken from the reference design:

* the three-part structure;
* the rotate/invert/increment mask;
* the four-state grant machine with its `counter >= weight` exit;
* the concatenated weight bus and the one-hot-to-index scan;
* the global maximum weight that applies only when others are waiting;
* the four-port switch block diagram, with its signal names.

Choices made here, where the reference is silent or ambiguous:

* **Grant latency.** The reference describes a two-step scheme that grants
  "in the next clock". Because of its Get Weight state, this implementation
  shows the grant one clock later: two clocks after the deciding cycle.
  There are two idle cycles between slots.
* **Slot length.** The grant is driven only in Count, for exactly `limit`
  cycles.
* **The maximum-weight comparison** is repeated every Count cycle.
* **Slots run to their end**, even if the master withdraws its request.
* **The `hold` input**, and the meaning given to `ReqDnStr` and `FullDnStr`.
* **Widths** of weights and packets, and the synchronous reset.

Not included:

* the other arbiters the reference surveys for comparison (fixed priority,
  lottery, matrix);
* the extensions it only proposes for later (paired address and data
  arbiters, load-adaptive weights);
* any register interface for setting the weights.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.
`tb/rr_ref_model.sv` is an independent, cycle-level behavioural model of the
arbitration rules (circular search after the last master, one fetch cycle,
a slot of `max(weight,1)` cycles, the cap when others wait, hold). The
arbiter-level testbenches compare the grant against it in every cycle.

| Testbench | What it covers |
|---|---|
| `weight_decoder_tb` | every one-hot select with 200 random weight buses; the zero select |
| `ngprc_tb` | every grant, 4 and 8 masters; the worked example 0010 → 1100 |
| `grant_fsm_tb` | the state machine with the mask and weight supplied by the testbench. Directed: latency of 2 clocks, slot length, round-robin order 3,0,1,2,3,0 with per-slot lengths, cap versus full weight, hold. Then 4000 random cycles with resets. |
| `rr_arbiter_tb` | the same at the arbiter level, plus `gnt_idx` |
| `rr_arbiter_param_tb` | 8 masters with 4-bit weights, 3 masters with 8-bit weights and 5 masters with 3-bit weights. Each runs random traffic against the reference model (helper `rr_arbiter_cfg_check`). |
| `packet_mux_tb` | every select with random packets |
| `packet_switch_tb` | the whole port at default parameters; details below |

`packet_switch_tb` covers:

* a saturated pair with weights 20 and 10, whose share must be 2:1 within
  20 transfers (the measured split is 200 to 100);
* 6000 cycles of random traffic with random `FullDnStr`, checking that every
  packet is delivered once, in order, from the granted port.

It requires each mechanism to have occurred at least once: wrap-round,
skipping an idle port, a capped slot, an uncapped long slot, a
downstream-full stall, and a packet transfer.

The grant timing was chosen here (see above). The testbenches pin it down, so
a change to the timing must be mirrored in `rr_ref_model`.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rr_pkg.sv rtl/weight_decoder.sv rtl/ngprc.sv rtl/grant_fsm.sv \
    rtl/rr_arbiter.sv rtl/packet_mux.sv rtl/packet_switch.sv \
    tb/rr_ref_model.sv tb/packet_switch_tb.sv --top-module packet_switch_tb
./obj_dir/Vpacket_switch_tb
```

For another testbench, swap the last file and the top module name. Lint with
`verilator --lint-only -Wall -Irtl rtl/rr_pkg.sv rtl/<module>.sv`.

## Files

* `rtl/rr_pkg.sv`: the state enumeration
* `rtl/weight_decoder.sv`, `rtl/ngprc.sv`, `rtl/grant_fsm.sv`: the three
  arbiter parts
* `rtl/rr_arbiter.sv`: the arbiter
* `rtl/packet_mux.sv`, `rtl/packet_switch.sv`: the switch output port (top)
* `tb/*_tb.sv`: testbenches
* `tb/rr_ref_model.sv`: the reference model
* `tb/rr_arbiter_cfg_check.sv`: one randomly driven arbiter configuration, used by `rr_arbiter_param_tb`
