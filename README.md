# Trellis state metric datapaths for voltage-overscaled decoding

Viterbi and Max-Log-MAP decoders spend most of their energy and all of their
critical path in one small loop: the add-compare-select (ACS) recursion that
updates the trellis state metrics every step. Lowering the supply below the
voltage at which that loop just meets the clock period ("voltage
overscaling", VOS) saves energy roughly as `1 - Kv^2` (with `Kv` the
supply as a fraction of that critical voltage), but then paths miss the
clock edge and metric bits come out wrong.

The main idea this design follows: wrong bits do not all cost the same. An
error in the LSB of a state metric barely changes decoding; an error in an
MSB or in a Viterbi decision bit ruins it. So the clock of each ACS output
flip-flop is delayed by a scheduled amount (intentional clock skew), handing
the important high-order bits more time and leaving the low-order bits
exposed. Under overscaling the timing errors then land mostly in bits the
decoder can tolerate.

This repository holds:

* synthesizable RTL of the ACS unit, built from 1-bit full adders, half
  adders and carry-only adders in the ripple-carry arrangement of the
  original gate-level design, and of state metric units for the two test
  decoders: a 128-state Viterbi decoder and the forward and backward
  recursions of an 8-state Max-Log-MAP (Turbo) decoder;
* a behavioural timing model of the same ACS unit, with unit gate delays,
  a supply-dependent delay factor and per-flip-flop clock delays, to study
  the effect of overscaling and of the skew schedule in simulation;
* self-checking testbenches, including full decoding runs.

The clock skew itself is a property of the clock tree, not logic, so the
synthesizable RTL cannot carry it; the schedule is provided as constants in
`trellis_pkg` for physical implementation and is used by the timing model.

## The ACS unit (`acs_unit`)

One ACS unit computes, once per clock,

```
pa = sm0 + bm0            (mod 2^SM_W)
pb = sm1 + bm1            (mod 2^SM_W)
dif = sign bit of (pa - pb)  computed mod 2^SM_W
sm_q <= (dif ^ SELECT_MAX) ? pa : pb
dec_q <= dif              (Viterbi only)
```

Its structure, bit by bit (shown for the Viterbi sizes, 8-bit metric,
3-bit branch metric):

```
bit:        0    1    2    3    4    5    6    7
row 1:     FA   FA   FA   HA   HA   HA   HA   HA     pa = sm0 + bm0
row 2:     FA   FA   FA   HA   HA   HA   HA   HA     pb = sm1 + bm1
row 3: 1-> CA   CA   CA   CA   CA   CA   CA   FA     pa + ~pb + 1, sum of MSB = dif
mux:       pa/pb selected by dif (and SELECT_MAX)
D-FF:       8 metric flip-flops + 1 decision flip-flop
```

* The branch metric is unsigned and only `BM_W` bits wide, so full adders
  are needed only in the low `BM_W` positions; the others are half adders
  propagating the carry. The carry out of the MSB is dropped.
* The comparator never forms the difference. A chain of carry-only adders
  (`ca_cell`) with one operand inverted and a carry-in of 1 produces the
  carries of `pa + ~pb + 1`; only the MSB position is a full adder, and its
  sum bit is the sign of the modular difference.
* Because the comparison is the sign of a modular difference, state
  metrics may wrap around freely. Decoding stays exact as long as the
  spread between any two state metrics in the trellis is below
  `2^(SM_W-1)`. For the 128-state Viterbi unit with 3-bit branch metrics
  the spread is at most 7 steps x 7 = 49 < 128. For Max-Log-MAP the spread
  must be held down by normalizing the branch metrics before they enter
  (the state metric recursion itself has no normalization stage, which is
  what keeps its critical path short).
* `SELECT_MAX = 0` keeps the smaller candidate (Viterbi, distance metrics),
  `SELECT_MAX = 1` the larger (Max-Log-MAP, log-likelihood metrics). A tie
  keeps `pb` when minimizing and `pa` when maximizing.
* `dec_q = 1` means `pa < pb`; with minimum selection the path through
  `sm0` survived. The decision flip-flop exists only with
  `HAS_DECISION = 1`; otherwise `dec_q` is a constant 0.
* `init` is a synchronous load of `init_sm` (and clears the decision bit).

Latency is one clock; a new trellis step can start every clock.

| configuration | `SM_W` | `BM_W` | `HAS_DECISION` | `SELECT_MAX` |
|---|---|---|---|---|
| Viterbi (default) | 8 | 3 | 1 | 0 |
| Max-Log-MAP | 9 | 8 | 0 | 1 |

## The clock skew schedule

Each ACS output flip-flop gets its own clock delay, in units of one
half-adder delay (`trellis_pkg::VIT_SKEW`, `MLM_SKEW`):

| bit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| Viterbi | 0.0000 | 1.0253 | 1.6983 | 2.2456 | 2.7651 | 3.2791 | 3.7917 | 4.3043 | 3.2604 (decision) |
| Max-Log-MAP | 0.0000 | 1.0252 | 1.7926 | 2.3548 | 2.8812 | 3.3964 | 3.9104 | 4.4232 | 4.6796 (metric MSB) |

They come from a linear program that maximizes a timing safety margin,
where each flip-flop's share of the margin is weighted by an "importance
factor" of its bit. The importance factor is found by simulation: flip the
bit at random with probability `p` and search for the `p` that degrades
the decoder to a fixed target bit error rate; the importance is `1 - p`.
The factors used (`VIT_IMPORTANCE`, `MLM_IMPORTANCE` in the package) are
close to 0 for bit 0, about 0.6 to 0.7 for bit 1, and above 0.9 for every
higher bit and for the decision bit.

Two consequences worth knowing before using these numbers:

* Skew cannot lower the critical voltage. The loop from a flip-flop back to
  itself does not change with skew, and the LSB loop (flip-flop, LSB adder,
  the whole comparator carry chain, the mux select) is the longest. What
  skew changes is which bits fail first once the supply is lowered.
* With the delay model below, the critical path is 14 units. The Viterbi
  schedule delays bit 1 by 1.0253, and the path from bit 1 through the
  comparator to bit 0 is 13 units, so the schedule needs a clock period of
  at least 14.0253. The timing testbenches use 14.05.

## The timing model (`acs_vos_model`)

`acs_vos_model` is the ACS netlist above written as timed processes (not
synthesizable). It uses these gate delays:

| cell | delay |
|---|---|
| half adder, input to sum and to carry | 1 |
| full adder, input to carry / to sum | 1 / 2 |
| carry-only adder, 2:1 mux | 1 |
| D-FF clock to Q | 2, setup and hold 0 |

All delays are multiplied by `DELAY_SCALE`. Flip-flop `i` is clocked `SKEW[i]`
after `clk`. One delay unit is 1 ns. Delays are transport delays, so
glitches reach the flip-flops. The comparator input inverters have zero
delay.

The delay factor for a supply `Vdd = Kv * Vcrit` is taken as
`(Vdd / (Vdd - Vt)^a) / (Vcrit / (Vcrit - Vt)^a)` with `Vt = 0.62 V` and
`a = 1.2`. The critical voltage `Vcrit` itself is not known. The testbenches
assume 1.8 V, which gives a factor of 1.161 at `Kv = 0.85`. Pass another
factor through `DELAY_SCALE` if your process differs.

The model has the same ports as `acs_unit`. It expects `sm0`/`sm1` to come
from other instances of the model, so that their bit `i` changes
`SKEW[i] + 2*DELAY_SCALE` after the clock. It expects `bm0`/`bm1` from
zero-skew flip-flops, changing `2*DELAY_SCALE` after the clock.
`trellis_smu` and `trellis_vos_top` can swap every ACS unit for this model
through a parameter, so a whole decoder can be simulated at an overscaled
supply.

Measured with this model at `Kv = 0.85` (27.75 % less ACS energy):

* ACS level, Viterbi (`tb_acs_vos_model`: 4-state trellis, random 3-bit
  branch metrics, 3000 cycles). Some output bit was wrong in 12.2 % of the
  ACS-cycles with the skew schedule and in 10.5 % with zero skew. With the
  schedule, every error was in bits 0 to 2. With zero skew, errors reached
  every bit, including a wrong decision bit in about 5 % of the ACS-cycles.
  The original study reports 28 % and 9 % for the 128-state decoder. The
  direction agrees: the schedule produces more errors, but only in bits
  that do not matter.
* ACS level, Max-Log-MAP (same testbench: 8-state trellis, 9-bit metrics,
  Max-Log-MAP schedule, `Kv = 0.90`, 19 % less energy, critical path 15
  units, clock period 15.05). The error rates were 1.6 % with the schedule,
  all in bits 0 and 1, and 1.5 % with zero skew, spread over all nine bits.
* Decoder level (`tb_vos_viterbi_ber`: 16-state code, 20000 bits, Eb/N0 =
  4 dB, 2-bit soft symbols). The bit error rates were 0.9e-3 for the
  error-free decoder, 2.1e-3 with the skew schedule and 4.4e-3 with zero
  skew. The 16-state trellis stands in for the 128-state one, whose
  timing-model build is too large for a quick simulation. The schedule
  helps clearly, but less than the original study reports: there, the
  128-state decoder with the schedule was close to error-free decoding at
  `Kv = 0.85`.

## State metric units (`trellis_smu`) and the top (`trellis_vos_top`)

`trellis_smu` holds one ACS unit per state, all updating every clock. The
wiring is the shift-register trellis with the newest bit in the LSB:

* forward: state `j` is reached from `j>>1` and `(j>>1) + N/2`. `bm0[j]`
  and `bm1[j]` belong to those two transitions.
* backward (`BACKWARD = 1`, the Max-Log-MAP beta recursion): state `i`
  reads its successors `2i mod N` and `2i+1 mod N`.

This wiring is the same for every feedforward or recursive code with that
number of states. The generator polynomials only decide which branch metric
goes with which transition, and that is left to the branch metric logic
that drives `bm0`/`bm1`. `dec_q[j] = 1` means the survivor came from `j>>1`.

`trellis_vos_top` places the two decoders' datapaths side by side. They
share only the clock:

| instance | states | metric / branch metric bits | selects | direction | decisions |
|---|---|---|---|---|---|
| `u_vit` | 128 | 8 / 3 | minimum | forward | yes |
| `u_alpha` | 8 | 9 / 8 | maximum | forward | no |
| `u_beta` | 8 | 9 / 8 | maximum | backward | no |

Every port is an unpacked array indexed by state: `*_init`, `*_init_sm`,
`*_bm0`, `*_bm1` in, and `*_sm` and `vit_dec` out. The parameters
`VOS_MODEL`, `VOS_DELAY_SCALE` and `VOS_SKEW` exist only for timing
simulation. Leave them at their defaults for synthesis. At the defaults,
synthesis gives about 1300 flip-flops (1152 in the Viterbi unit).

## What is not here

These parts of a complete decoder are outside this RTL. The top brings out
their signals as ports.

* Branch metric units, including the branch metric normalization that
  Max-Log-MAP needs. Their inputs, quantization and codes are not specified
  here, only the output widths.
* The Viterbi survivor memory and traceback.
* The Max-Log-MAP soft-output (LLR) computation, the Turbo interleaver and
  the iteration control.
* The clock tree that realizes the skew schedule.

The testbenches implement the missing decoder parts in behavioural code, so
the state metric units can be checked as parts of real decoders.

## Design choices not fixed by the original description

* The trellis wiring and state numbering, and one branch metric port per
  transition.
* Minimum selection for Viterbi and maximum for Max-Log-MAP, and the tie
  rule.
* Unsigned branch metrics and a carry-in of 0 for the LSB adders.
* A synchronous `init` load instead of a reset.
* A forward and a backward unit for Max-Log-MAP.
* In the timing model: transport delays, zero-delay inverters, 1 ns units
  and the assumed 1.8 V critical supply.

## Files

| file | content |
|---|---|
| `rtl/trellis_pkg.sv` | sizes, gate delays, clock skew schedules, importance factors |
| `rtl/fa_cell.sv`, `ha_cell.sv`, `ca_cell.sv` | 1-bit full, half and carry-only adders |
| `rtl/acs_unit.sv` | ACS unit |
| `rtl/trellis_smu.sv` | state metric unit |
| `rtl/trellis_vos_top.sv` | top: Viterbi and Max-Log-MAP datapaths |
| `rtl/acs_vos_model.sv` | behavioural timing model of the ACS unit |
| `tb/tb_*_cell.sv` | exhaustive tests of the cells |
| `tb/tb_acs_unit.sv` | both ACS configurations against an unbounded-integer model, including wrap-around and ties |
| `tb/tb_trellis_smu.sv` | 128-state Viterbi unit and both 8-state Max-Log-MAP units, 2000 steps, against a reference recursion |
| `tb/tb_trellis_vos_top.sv` | end-to-end test of the top (see below) |
| `tb/tb_acs_vos_model.sv` | timing errors of both ACS configurations at the critical and overscaled supply, with and without skew |
| `tb/tb_vos_viterbi_ber.sv` | decoding under overscaling (reduced trellis) |

`tb_trellis_vos_top` runs the top at its default sizes as two working
decoders:

* Viterbi: a rate-1/2, 128-state code (generators 247 and 371 octal) with
  sparse noise, decoded by traceback in the testbench. Every decoded bit
  must be correct.
* Max-Log-MAP: one constituent decoder of an 8-state Turbo code (feedback
  1+D^2+D^3, feedforward 1+D+D^3). The alpha and beta units run over a
  block, and the testbench forms max-log likelihood ratios from their
  metrics. Every bit's sign must be correct.

Every metric is also compared each cycle with a reference recursion that
uses unbounded integers. The test fails unless each of these happened at
least once: metric wrap-around in all three units, both decision values,
noisy symbols, and re-initialization. It also checks that each block takes
one trellis step per clock.

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops with
a watchdog if it hangs.

## Simulating

With Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/trellis_pkg.sv \
    tb/tb_trellis_vos_top.sv --top-module tb_trellis_vos_top -Mdir obj_top
./obj_top/Vtb_trellis_vos_top
```

Any other testbench works the same way; replace the file and module name.
The package must be on the command line first; `-y rtl` finds the modules.
`--timing` is required, because the timing model and the testbenches use
delays. `tb_vos_viterbi_ber` takes about 1.5 minutes to compile and about
1 minute to run. `tb_acs_vos_model` takes about a minute; the others finish in seconds.

To simulate a different overscaling point, change `KV` (and, if you know
it, `VCRIT`) in `tb_acs_vos_model` or `tb_vos_viterbi_ber`. To use the
Max-Log-MAP schedule in the timing model, set
`SM_W = 9, BM_W = 8, HAS_DECISION = 0, SELECT_MAX = 1, SKEW = MLM_SKEW`.
