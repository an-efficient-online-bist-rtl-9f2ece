# Online scan-BIST for NoC-based SoCs

This RTL tests the logic cores of a network-on-chip SoC while they keep running.
An on-chip test source, the **Embedded Test Core (ETC)**, sends test vectors as
ordinary network packets. It multicasts each packet, so one copy of a vector tests
several cores at once. Inside every core, the state flip-flops are replaced by
**scan cells with a shadow bit**. A vector is shifted into the shadow bits while
the core does its normal work. Applying the vector and capturing the response
then costs the core **exactly one stalled clock cycle**. Each core compacts its
own responses into a signature, so no response data crosses the network. The ETC
also limits test power: it picks which cores are tested together against a power
budget, and it sends vectors at a fixed rate.

The architecture follows the paper *An Efficient Online BIST Architecture for
NoCs*. The paper states the goals and what each part does: the one-cycle stall, the
shadow loading, the per-core response analyzer, multicast, static flow control
and central average-power control. The circuits that do these things are this
design's own, and so are the packet format and the parameter values. Section
"Departures and own choices" lists them.

## Structure

```
bist_noc_top
├── etc                        Embedded Test Core (one per system)
│   ├── etc_power_ctrl         picks the next multicast group under the budget
│   └── etc_pattern_gen        32-bit LFSR, one flit of pattern per step
└── core_test_wrapper  x N_CORES
    ├── bist_scan_cell x CHAIN_LEN   the core's state flip-flops
    └── ora_misr                     the core's signature register
bist_pkg                       flit type, packet types, header helpers
```

Two parts sit outside the RTL and connect through ports of `bist_noc_top`:

* **The network.** `etc_flit_out` goes into the NoC, and core *i*'s received
  stream comes back on `core_flit_in[i]`. The network must deliver each packet
  to at least the cores in its destination mask, with its flits unchanged, in
  order and back-to-back. A core that gets a packet not addressed to it skips
  the packet. So a plain broadcast also works, at the cost of extra traffic.
  Each core can see the stream at a different latency.
* **The cores' combinational logic.** Core *i* reads its state on
  `core_cell_q[i]` (CHAIN_LEN bits) and returns the next state on
  `core_func_d[i]`. `core_func_en[i]` is the core's own enable for those
  flip-flops. A core that keeps other state outside the wrapper must freeze it
  while `core_stall[i]` is high.

## The scan cell and the one-cycle stall

The key to testing online is `bist_scan_cell`. Each cell holds two flip-flops:

* `func_q`: the core's real state bit;
* `shadow_q`: a test bit, chained to its neighbours.

The core logic reads `cell_q`, which is `func_q` except in the apply cycle.
Cycle by cycle for one vector:

| cycle | `shift_en` | `apply` | core logic sees | `func_q` | `shadow_q` |
|---|---|---|---|---|---|
| load (DEPTH cycles, core running) | 1 | 0 | functional state | updates normally | shifts in vector, shifts out old response |
| stall (1 cycle) | 0 | 1 | test vector | **holds** | captures `func_d`, the response |
| after | 0 | 0 | functional state, unchanged | updates normally | holds response |

The functional state freezes during the stall cycle, so the core continues
afterwards exactly as if that cycle had not happened. The only cost to the core
is one lost cycle per vector. The end-to-end testbench checks this: every cycle,
each core's state must equal that of a copy of the core that is never tested.

Shadow priority is clear > shift > capture. Both flip-flops reset to 0
asynchronously.

## Chains, packets and flits

A flit (`bist_pkg::flit_t`, 19 bits) has `valid`, `head`, `tail` and 16 data
bits (`FLIT_W`). The CHAIN_LEN cells of a core form **FLIT_W parallel chains**
of `DEPTH = CHAIN_LEN / FLIT_W` cells each. A flit then shifts one bit into
every chain, and a whole vector enters in DEPTH flits, one per cycle.

* Cell `i = p*FLIT_W + c` is position `p` of chain `c`. Flit bit `c` enters
  position 0 of chain `c`.
* Payload flit `k` (0 first) ends at position `DEPTH-1-k`. So the first flit
  holds the most significant FLIT_W bits of the vector.
* The bits leaving position DEPTH-1 of all chains, 16 per shift, go into the
  MISR in the same cycle.

Header flit data: `[15:14]` is the packet type and `[N_CORES-1:0]` the
destination mask (at most 14 cores). There are three packet types:

| type | flits | effect in an addressed core |
|---|---|---|
| `PKT_START` | header only | clear shadow chains, signature and vector count; drop `sig_valid` |
| `PKT_TEST`  | header + DEPTH pattern flits | shift in the vector; stall the cycle after the tail |
| `PKT_FLUSH` | header + DEPTH zero flits | shift out the last response; raise `sig_valid` |

Each response leaves the chains while the next vector shifts in. The FLUSH packet
only pushes out the last response. After START, the first vector pushes zeros
into the MISR. This keeps the signature deterministic.

## Signature

`ora_misr` is a 16-bit Galois MISR with polynomial x^16 + x^12 + x^5 + 1:

    sig' = {sig[14:0], 0} ^ (sig[15] ? 16'h1021 : 0) ^ din

In a core tested with vectors V1..Vn (after START), the MISR sees, in order:
the chain contents before each shift (zeros first, then f(V1), ..., f(Vn)), top
slice first. Here f is the core's next-state function. The good-machine
signature therefore comes from simulating the core's logic on the same LFSR
vectors; `tb_bist_noc_top` contains such a reference model. The signatures stay
in the cores (`core_signature`, `core_sig_valid`) for the system to read. The
RTL does not compare them with expected values.

## ETC: grouping, power and static flow control

After `start`, the ETC tests the cores in `cfg_cores` one group at a time. For
each group it sends `START`, then `cfg_num_vectors` × `TEST`, then `FLUSH`, all
multicast to the whole group.

**Grouping against the power budget.** Each core has a weight
`cfg_core_power[i]`, the test power one applied vector costs it.
`etc_power_ctrl` scans the pending cores in index order and adds each one whose
weight still fits into `cfg_budget`. The lowest pending core is always taken, so
no core can be starved. If that core alone exceeds the budget, `over_budget`
is set. Example: weights 10/20/30/40 with budget 50 give groups {0,1}, {2}, {3}.

**Static flow control.** Headers leave exactly
`gap_eff = max(cfg_gap, DEPTH + 2)` cycles apart. This holds inside a group and
across groups. The ETC uses no feedback. DEPTH + 2 is one header, DEPTH payload
flits and the receiver's stall cycle, in which no flit may arrive. A group
therefore receives one vector per `gap_eff` cycles. Its average test power is
its summed weight divided by `gap_eff`, so `cfg_budget` and `cfg_gap` together
set the power limit.

**Timing.** The first header leaves two cycles after `start`. A session of G
groups with n vectors takes about `G × (n + 2) × gap_eff` cycles. With the
defaults (DEPTH = 4) the fastest rate is one vector every 6 cycles per group,
and each tested core loses 1 cycle in 6. LFSR patterns (x^32 + x^22 + x^2 + x +
1, seeded by `cfg_seed`, a zero seed replaced by 1) run on across groups, so
later groups get different vectors. Keep the configuration stable while `busy`
is high. `done` stays high from the end of a session until the next `start`.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `FLIT_W` | 16 | `bist_pkg` | flit data bits = number of parallel chains |
| `N_CORES` | 4 | top, etc, wrapper | cores under test (≤ FLIT_W − 2) |
| `CHAIN_LEN` | 64 | top, etc, wrapper | state bits per core, multiple of FLIT_W, same for all cores |
| `SIG_W` | 16 | top, wrapper | signature width (≥ FLIT_W; POLY must match) |
| `PW_W`, `BUD_W` | 8, 10 | top, etc | widths of power weights and budget |

None of these values come from the paper; they are chosen for this design.

## Departures and own choices

* The network switches are not included. The top expects an external NoC as
  described above. `tb/noc_model.sv` is only a behavioural stand-in with
  per-core latency and a multicast or broadcast mode.
* There is a single clock domain. The paper motivates its method with GALS
  systems, but any clock-domain crossing would sit in the network.
* There is one ETC. The paper allows several test sources, but this design
  builds one.
* All cores share one chain length, because a multicast vector must fit every
  core in the group.
* Pattern source (LFSR), response analyzer (MISR), packet format, chain
  organisation, grouping rule and gap rule are all this design's own choices.
* Core primary inputs are not wrapped: only the state bits given to the
  wrapper are tested. For offline testing, hold `core_func_en` low. The same
  packets then test an idle core.
* The wrappers check with assertions that no flit arrives in a stall cycle,
  that payload length is DEPTH, and that no header arrives mid-packet.

## Simulation

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. Each
has a watchdog.

| testbench | covers |
|---|---|
| `tb_bist_scan_cell` | cell against a reference model, random and directed |
| `tb_ora_misr` | MISR against a bit-level polynomial model |
| `tb_etc_pattern_gen` | LFSR steps, seeding, no short cycle in 100 000 steps |
| `tb_etc_power_ctrl` | grouping against a reference, every core eventually chosen |
| `tb_core_test_wrapper` | one core: stall timing, state preserved, signature, skipped packets |
| `tb_etc` | full packet stream: groups, order, payloads, exact spacing |
| `tb_bist_noc_top` | whole system at default size with network model: signatures, online state, one stall per vector; counts each mechanism (stall, multicast, budget split, over-budget core, skipped packet, flush, gap clamp) |

Example, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/bist_pkg.sv tb/tb_bist_noc_top.sv --top-module tb_bist_noc_top
./obj_dir/Vtb_bist_noc_top
```

Replace `tb_bist_noc_top` with any other testbench name. `bist_pkg.sv` must
come first, because every module imports it.
