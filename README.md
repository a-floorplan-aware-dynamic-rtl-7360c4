# Floorplan-aware di/dt controller

Clock gating saves power, but every time a module is gated on or off its
supply current jumps. When several modules that draw current from the same
power pins switch in the same cycle, the current step at those pins adds up
and the supply rings (L·di/dt noise). The usual answer is enough on-die
decoupling capacitance for the worst case. This design controls the cause
instead: it bounds how much current may be switched on or off per cycle in
each power-pin domain, using a small amount of logic per module.

The controller has three parts:

1. **Decay counters** (one per module) decide *whether* a module should be on.
   A module is only asked to turn off after 16 cycles without an access, which
   filters out short idle gaps that would otherwise cause on/off/on ringing.
2. **Gating queues** (one per power-pin domain) decide *when* a requested
   transition may happen. They grant requests in a fixed order so that the
   signed sum of the current weights switched in one cycle stays within a
   threshold δ.
3. **An ALU pre-decoder** looks at the opcodes of the fetch group and marks
   the ALUs they will need as accessed. An ALU is then not gated off just
   before an instruction reaches it, and a gated-off ALU starts turning on
   early.

Large modules such as the L2 cache get one queue entry per bank, each with a
small weight. The queue then turns them on and off a few banks at a time
(progressive gating).

The configuration built here is a 23-module out-of-order core: 8 integer
ALUs, 4 FP ALUs, branch predictor, BTB, I-/D-TLB, L1 I-/D-cache, L2, LSQ,
RUU, and integer and FP register files. Its floorplan is cut into four
quadrants, and each quadrant is one power-pin domain with one queue.

## The gating queue

Each entry of a queue (`rtl/didt_queue.sv`) is wired to one module for good.
An entry holds:

| field  | bits | meaning |
|--------|------|---------|
| state  | 2 | `ON`, `OFF`, `OFF_ON` (activation pending), `ON_OFF` (deactivation pending) |
| weight | 2 | current level of the module, 0..3 |
| id     | 3 | position in the queue (at most 8 entries) |

Together with the 4-bit decay counter that is 11 bits of state per module.

**Requests.** When a module's `want_on` differs from its state, the entry
becomes pending at the next clock edge: `ON` goes to `ON_OFF`, and `OFF` goes
to `OFF_ON`. If `want_on` changes back before the request is granted, the
request is withdrawn.

**The sliding window.** Every cycle the queue looks at the entries from the
head pointer onward, in circular order:

* A pending activation counts `+weight` and a pending deactivation counts
  `-weight`.
* The window takes consecutive pending entries while the running sum stays
  within `[-δ, +δ]`.
* It stops at the first entry that is not pending, at the first entry that
  would break the bound, or after `WIN_MAX` entries.
* Every entry in the window is granted and reaches `ON` or `OFF` at the next
  edge.
* The head then moves to the entry just after the window. If the window is
  empty, the head moves one entry.

So the current step of a domain in any cycle, summed over the entries that
switch, is at most δ weight units in either direction. A pending request
waits at most one rotation of the head (N cycles), because every single
weight fits under δ.

Example, with δ = 3 and a queue I-cache(3), Bpred(2), ALU-1(1), ALU-2(1),
ALU-3(1):

| situation (head at Bpred) | window | γ | head afterwards |
|---|---|---|---|
| Bpred and ALU-1 want on, ALU-2 stays off | Bpred, ALU-1 | +3 | ALU-2 |
| same, but ALU-1 has weight 2 | Bpred | +2 | ALU-1 |
| Bpred wants on, ALU-1 wants off | Bpred, ALU-1 | +1 | ALU-2 |
| as above, and ALU-2 wants on | Bpred, ALU-1, ALU-2 | +2 | ALU-3 |

The order of the entries does not change the guarantee, only the delay. Heavy
modules placed next to each other block one another more often. The queues
here are sorted by descending weight.

**Outputs.** `clk_en` is high in `ON` and in `ON_OFF`: a module keeps its
clock until its turn-off is granted. `avail` is the same signal and goes to
the pipeline's issue/stall logic. The pipeline must treat an unavailable
module like any other structural hazard.

## Decay counter

`rtl/decay_counter.sv` reloads to 15 on every access and counts down to 0
otherwise. `want_on = access | (count != 0)`, so the off request appears in
the 16th consecutive idle cycle. An access to a gated-off module raises
`want_on` at once. The request the pipeline makes while it is stalled on that
module counts as an access.

## ALU pre-decoder

`rtl/alu_predecoder.sv` reads bits [31:26] (the Alpha major opcode) of each
valid instruction in the 8-wide fetch group. Opcodes 0x10–0x13
(integer operate) count towards the integer ALUs, and 0x14–0x17 (floating
point) towards the FP ALUs. With n such instructions, ALUs 1..n of that kind
get a preemptive request, up to the number of units. The request is ORed into
the ALU's access, which reloads its decay counter: the ALU stays on or turns
on, and decays again about 16 cycles later if no instruction uses it. The
`preempt_en` input of the top switches this on or off.

## Floorplan configuration

`rtl/didt_pkg.sv` holds the queue tables (`Q_CFG`, `Q_SIZE`). Each module was
placed in the quadrant that holds its centre on the 2D floorplan:

| queue | quadrant | entries (weight) |
|---|---|---|
| 0 | upper left  | bpred(2) itlb(1) alu1 alu2 alu4 alu5 alu8 (1 each) |
| 1 | upper right | il1(3) lsq(3) btb(2) falu4(2) frf(1) alu6(1) |
| 2 | lower left  | ruu(3) irf(2) falu2(2) falu3(2) dtlb(1) alu3(1) |
| 3 | lower right | dl1(3) falu1(2) L2 bank 0..3 (1 each) alu7(1) |

The I-cache, branch predictor and integer ALU weights (3, 2, 1) come with the
design's reference example. All the other weights, the 4 L2 banks and the
queue order are estimates, chosen by module size. For another floorplan or
power-pin layout, edit `Q_CFG`/`Q_SIZE`: a queue may have up to 8 entries,
and every weight must be at most `DELTA`. The L2 counts as available only
when all four banks are clocked. Its clock enable (`mod_clk_en[M_DL2]`) is
high while any bank is clocked, and `l2_bank_clk_en` gives each bank's own
enable.

## Top level: `didt_controller`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (all modules `ON` after reset) |
| `mod_req` | in | 23 | per-module demand this cycle, indexed by `didt_pkg::module_e` |
| `preempt_en` | in | 1 | enable preemptive ALU gating |
| `fetch_instr`, `fetch_valid` | in | 8×32, 8 | current fetch group |
| `mod_clk_en` | out | 23 | clock-gate enable per module |
| `mod_avail` | out | 23 | module usable this cycle (to the stall logic) |
| `l2_bank_clk_en` | out | 4 | clock-gate enable per L2 bank |
| `q_step` | out | 4×8 signed | current step granted in each domain this cycle (weight units) |
| `q_head`, `q_pending`, `q_grant` | out | per queue | head pointer, pending entries, granted entries |

Parameters: `DELTA` = 3, `DECAY_BITS` = 4, `FETCH_W` = 8.

**Timing.** A request seen in cycle t becomes pending at the edge that ends
cycle t. If it is granted in cycle t+1, the enable changes at the edge that
ends cycle t+1. The fastest wake-up is therefore two edges. `q_step` in cycle
t equals the weighted change of the clock enables seen in cycle t+1.

Not included: the clock-gating cells, the pipeline's issue logic that acts on
`mod_avail`, and the gated modules themselves. The top only provides the
signals they connect to.

## Departures and open points

* The window also keeps the running sum above −δ, so turn-off bursts are
  bounded as well as turn-on bursts. A bound on the positive side alone would
  let any number of modules turn off together.
* No window limit was specified; `WIN_MAX` defaults to the queue length.
* Pending requests can be withdrawn. A module with a pending turn-off stays
  clocked and usable.
* Only the 2D floorplan is configured. A four-layer 3D floorplan (RUU split
  over four layers) was also considered. Mapping it onto four footprint
  quadrants puts about 12 modules in one quadrant, more than a queue's 8
  entries, so it needs a different partition into domains. That partition is
  not part of this RTL.
* The opcode classes of the pre-decoder assume the Alpha ISA.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/didt_pkg.sv rtl/decay_counter.sv \
  rtl/alu_predecoder.sv rtl/didt_queue.sv rtl/didt_controller.sv \
  tb/tb_didt_controller.sv --top-module tb_didt_controller
./obj_dir/Vtb_didt_controller
```

| testbench | what it checks |
|---|---|
| `tb_decay_counter` | off request in exactly the 16th idle cycle; count and `want_on` against a model under random access patterns |
| `tb_alu_predecoder` | preemptive requests against an independent opcode count, including saturation |
| `tb_didt_queue` | the four cases of the example above; then every grant, step, state, head and enable against a reference model under random requests; the wait bound of N cycles |
| `tb_didt_controller` | full design at default parameters, 12 000 cycles |
| `tb_didt_preempt_workload` | two controllers, preemption off and on, on the same program through a stalling pipeline model |

The full-design test drives four kinds of phases: high ILP, memory-bound
bursts with long idle periods, a power virus that toggles the whole machine
every 20–40 cycles, and ALU-free phases where only fetched ALU instructions
wake the ALUs. Every cycle it checks four things:

* Each domain's current step, computed from the enables, matches the granted
  step and stays within ±δ.
* Every turn-off was preceded by 16 idle cycles, and every turn-on by an
  access.
* The availability outputs are consistent with the enables.
* A continuously requested module becomes available within a bound.

It counts gate-on and gate-off events, transitions held back by the
threshold, stalls, preemptive ALU turn-ons, partial L2 ramps and withdrawn
requests, and fails if any of them never happens. It also compares the
average per-cycle current change with that of ideal clock gating (a module
is on exactly when requested). In a typical run this is 0.47 against 2.94
weight units per cycle.

`tb_didt_preempt_workload` measures what preemptive ALU gating buys. In its
pipeline model, an 8-instruction group issues 4 cycles after fetch, and the
whole pipeline stalls until every module the group needs is available. Its
program alternates ALU-heavy stretches with load/branch-only stretches that
are long enough for the ALUs to be gated off. With preemption the pre-decoder
wakes the ALUs while the group is still in the front end. In a typical run
the stall cycles drop from about 1230 to about 490, which is 0.71 against
0.86 of ungated performance. This program is a deliberate stress case, and
the in-order model stalls harder than an out-of-order core would. The
figures show how the mechanism behaves; they do not predict the overhead on
real programs.
