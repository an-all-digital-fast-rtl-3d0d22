# Fast-lock, self-calibrated five-phase all-digital DLL

A delay-locked loop that produces five clock phases spaced exactly one fifth
of a reference period apart, without any analog loop filter. The reference
clock runs through a delay line of five identical stages. Stage outputs P1..P5
are the phases. Two digital loops set the line:

1. **Lock-in.** A coarse word `C[4:0]`, shared by all five stages, makes
   the whole line one reference period long. An *unbalanced binary search*
   (UBS) finds it in a fixed 14 reference cycles, or 12 at high frequency.
   The search cannot lock onto a harmonic (a line two or three periods long).
2. **Rapid self-calibration (RSC).** After lock, every stage has its own fine
   word `B_i[3:0]`. These words absorb stage-to-stage mismatch so that the
   five phase steps become equal. All five stages are corrected in the same
   reference cycle. A lock detect unit then switches the calibration logic off
   and freezes the words.

The control logic (search, counters, lock detection) is synthesizable
SystemVerilog. The delay line, the phase detectors and the interpolators are
analog cells in silicon, so they are written here as timing models with
picosecond delays. With those models the design can be simulated end to end
with Verilator's timing mode.

```
            +------------------------- DCDL: 5 x (coarse LADE + fine LADE) ---+
 ref_clk -->| stage1 -> P1 -> stage2 -> P2 -> ... -> stage5 -> P5             |
            +---^C,B1-------------^C,B2--------------------^C,B5---------------+
                |                                           |
   PD(ref,P5) --+--> lock-in unit (step ctrl + binary ctrl) --> C[4:0], LOCKED
                |
   calibration unit: DRPD(ref,P1,P2) .. DRPD(P3,P4,P5), PD(ref,P5)
                     5 up/down counters -> B1..B5,  LDU -> FINISH
```

## Delay line and its numbers

Each stage is a *linear-approximated delay element* (LADE) for the coarse
word, followed by a second LADE for the fine word. A LADE adds a fixed current
step per code, so its delay grows linearly with the code. (A plain
current-starved cell grows with the square root of the code.) The models use
these numbers:

| quantity | value | origin |
|---|---|---|
| coarse stage delay | 150 ps + 13 ps x C | chosen to give the line below |
| fine stage delay | 4 ps x B_i | chosen; one fine code is well below the 7 ps detector resolution |
| line at C = 0, all B = 8 | 910 ps | thesis: minimum line delay about 0.9 ns |
| coarse line step | 65 ps | thesis: average step 65 ps |
| line at C = 31, all B = 8 | 2925 ps | follows from the above |
| fine range per stage around mid-scale | -32 .. +28 ps | follows from 4 bits x 4 ps |

`mismatch_ps[i]` is a simulation-only input that adds a fixed error to stage
`i`, standing in for process mismatch. Because the coarse word is shared, only
the fine words can correct it.

The usable reference range is therefore 910 ps to about 2925 ps (1.1 GHz down
to about 342 MHz). The thesis quotes 333 MHz to 1 GHz for one chip and
300 MHz to 1.08 GHz for another. The low end of those ranges (3.0 and 3.33 ns)
is outside this line. At 3.0 ns, lock-in ends with C saturated at 31 and
calibration cannot close the last 75 ps. To cover it, raise `T_STAGE_MIN_PS`
or `T_C_STEP_PS` in `dcdl`.

## Lock-in: the unbalanced binary search

This is the part that needs the most care. A plain binary search over C tries
the mid code first. If the period is short, the mid-range line may be two or
more periods long. The phase detector cannot tell that apart from a line that
is just right, so the search locks onto a harmonic. The UBS avoids this with
one extra step at the start, and by moving the start of the search when
needed.

**Steps.** A one-hot token in `step_controller` walks through
`step0, S0, S1, ..., S5, LOCKED`. It advances on `trig`, which is the rising
edge of a divide-by-two of the *inverted* reference. So each step lasts two
reference periods, and the control word changes half a period away from the
phase detector's sampling edge. The line therefore always settles before it is
measured.

**Step 0 (the judge).** C is all zeros, so the line is at its minimum
`T_min`. A flip-flop clocked by the line output samples the reference. If the
reference is still high when the output edge arrives, then
`T_min < T_REF/2`, i.e. `T_REF > 2 T_min`, and `PS = 1`. The search then
starts normally at S0, trying the MSB. If `PS = 0`, the period is short. The
controller skips `SKIP` steps, leaving their bits 0, so the first bit tried
covers only the low part of the range. In both cases every code tried keeps
the line between half a period and 1.5 periods, where the bang-bang detector
reads correctly.

**Bits.** `binary_controller` holds one `single_bit_gen` per bit. Entering
step S_k sets bit `C[4-k]` to 1. When S_k ends, the bit takes the detector's
`LEAD`: 1 if the output edge still arrives before the reference edge (line too
short, keep the weight), 0 otherwise. When the token reaches S5 the word is
final, and one step later `LOCKED` rises and stays high.

**Cycle count.** There are two cycles per step. Without a skip the count is
`2 x (5 + 2) = 14` reference cycles from reset, and with a skip it is 12. The
testbenches check these counts exactly. The same controller with `C_BITS = 9,
SKIP = 2` (the thesis' stand-alone 9-bit version for a 2..10 ns line) locks in
22 or 18 cycles. That configuration is tested separately.

`range_sel` brings out `C[4:3]`. The interpolators use it to stretch their
intrinsic delay at long periods (see below).

## Calibration: relative phase detection

Let `theta_i` be the delay from P(i-1) to P(i), with P0 the reference. After
lock-in the thetas add up to one period, but each one is off by its stage's
mismatch. The RSC rule is:

* stages 1..4: move `theta_i` toward `(theta_i + theta_(i+1)) / 2`. This
  means: put P_i midway between its two neighbours;
* stage 5: keep P5 on the reference edge with a normal phase detector. This
  keeps the sum equal to one period.

If stage i is lengthened, P_i and all later phases move by the same amount.
So `theta_i` grows, `theta_(i+1)` shrinks, and no other theta changes. This is
why all five counters can step in the same reference cycle without upsetting
one another. Repeated, the averaging spreads the error evenly until every
theta equals `T_REF/5`.

**The relative phase detector (`drpd`).** It has no ruler. It compares P_i
with the midpoint of its neighbours, using interpolators:

* a *hetero* interpolator driven by P(i-1) and P(i+1) produces `i13`. Its
  edge sits at the mean of the two input edges plus an intrinsic delay
  `T_homo`;
* two *homo* interpolators driven by P_i alone produce copies of P_i delayed
  by the same `T_homo`. One is shifted 3 ps later (`i22_late`), the other 3 ps
  earlier (`i22_early`).

On each rising edge of `i13`, two flip-flops sample the copies: `u` samples
`i22_late` and `n` samples `i22_early`. Because
`P_i - mean = -(theta_(i+1) - theta_i)/2`:

| pe = theta_(i+1) - theta_i | u | n | output |
|---|---|---|---|
| > +6 ps (P_i early) | 1 | 1 | `up`: lengthen stage i |
| within +/-6 ps | 0 | 1 | `lock` = u xor n |
| < -6 ps (P_i late) | 0 | 0 | `dn`: shorten stage i |

In silicon this dead zone comes from flip-flop metastability and is about
7 ps wide. Here two offset copies build it explicitly, so it is repeatable.
With offsets rounded down to whole picoseconds (`QE_PS/2 = 3`), the window
is +/-6 ps of pe. Interpolator edges are placed to the half picosecond, so
exact ties resolve the same way every time.

**Interpolator range.** A plain interpolator keeps the 50 % ratio only while
half the input spacing is less than its intrinsic delay. The hetero inputs are
two stages apart, i.e. 2/5 of a period. So `T_homo` must exceed `T_REF/5`,
plus the 3 ps offset. `T_homo = 300 + 250 x range_sel` ps covers the whole
line: from 300 ps for C < 8 up to 1050 ps for C >= 24.

**Counter timing.** Each counter must update after its detector has decided
and the line has settled. The update must also be complete before the stage's
next edge. The thesis does this by clocking the counters from far-apart
phases of the line itself. Here counter i is clocked by the phase three
stages later, `P_((i+2) mod 5 + 1)`. Stage 5 uses a conventional detector:
`up = LEAD & ~lock`, `dn = ~LEAD & ~lock`. Counters saturate at 0 and 15 and
reset to mid-scale, 8.

**Lock detect unit (`lock_detect_unit`).** `FINISH` enables the calibration
unit. It rises with `LOCKED` and falls once all five `LOCK_i` have been high
on two consecutive reference edges. This is a two-flop filter, and
`FINISH = LOCKED xor done`. When FINISH is low, the interpolators stop
toggling, the detectors hold and the counters freeze. In silicon this is
where the power saving comes from.

## Phase detector model

`phase_detector` samples P5 on the rising edge of the reference, giving
`lead` (1 = P5 edge already arrived, i.e. the line is too short). `lock` is
high when the nearest P5 rising edge lies within `QE_PS` = 7 ps of the
reference edge. It is updated 8 ps after each reference edge. This aperture is
a model of the metastability dead zone of the real TSPC-based detector. It
measures edge times, so it is not synthesizable.

## Parameters (`dll_pkg`)

| name | default | meaning |
|---|---|---|
| `N_STAGES` | 5 | delay stages / output phases |
| `C_BITS` | 5 | coarse word width (lock-in) |
| `B_BITS` | 4 | fine word width per stage (calibration) |
| `SKIP` | 1 | steps skipped by the judge at short periods |
| `QE_PS` | 7 | detector resolution, ps |
| `B_INIT` | 8 | fine word after reset |

Module parameters hold the timing-model constants: `dcdl` (`T_STAGE_MIN_PS`,
`T_C_STEP_PS`, `T_B_STEP_PS`) and `interpolator` (`TH_BASE_PS`,
`TH_STEP_PS`).

## Top-level interface (`adscm_dll`)

| port | dir | width | meaning |
|---|---|---|---|
| `ref_clk` | in | 1 | reference clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `mismatch_ps` | in | 5 x 16 signed | per-stage delay error of the line model (0 for a nominal line) |
| `p` | out | 5 | phases P1..P5 (`p[0]` = P1) |
| `c_word` | out | 5 | coarse word |
| `b_word` | out | 5 x 4 | fine words |
| `locked` | out | 1 | lock-in finished |
| `finish` | out | 1 | calibration running |
| `ps` | out | 1 | judge result (1: T_REF > 2 T_min) |
| `pd_lead`, `pd_lock` | out | 1 | main phase detector |
| `cal_lock` | out | 5 | per-stage LOCK_i |

After reset: C = 0, all B = 8, LOCKED = 0. LOCKED rises 12 or 14 reference
periods later. FINISH rises with it and falls when calibration is done. From
then on C and all B words stay fixed until the next reset.

## How well it works

The end-to-end test runs the top at its default parameters. It uses four
reference periods, each with a different mismatch pattern of up to +/-20 ps
per stage:

| T_REF | lock cycles | calibration cycles | worst theta error |
|---|---|---|---|
| 2900 ps | 14 | 13 | 7 ps |
| 1000 ps | 12 | 18 | 5 ps |
| 2000 ps | 14 | 7 | 5 ps |
| 1250 ps | 12 | 11 | 9 ps |

For comparison, the thesis reports a worst phase error of 4.5 ps after
calibration at 500 MHz. The bound that the test enforces is 16 ps. That is the
+/-6 ps detector window accumulated along the chain, plus one fine step.

The test also checks:

* the judge result;
* a C within one code of an independently computed binary search;
* that P5 stays on the reference edge;
* that the words do not change after FINISH.

It counts each mechanism at least once: judge-skip and no-skip lock,
calibration up and down moves, and FINISH falling.

Every block has its own self-checking testbench in `tb/`, and every test ends
with a `TB_RESULT checks=.. failures=..` line. They cover the delay-line
arithmetic, the detector aperture, the DRPD up/lock/down regions swept across
pe, counter saturation, the two-edge lock filter, and lock-in for both the
5-bit and the 9-bit controller.

## Where this differs from the thesis, and known limits

* **Mismatch range.** The fine range is -32..+28 ps per stage. The thesis'
  algorithm study used 20 % random mismatch on 200 ps stages (+/-40 ps). Such
  cases saturate a fine word here and do not fully calibrate.
* **No re-activation.** The thesis says calibration restarts when an error
  reappears. Here, once FINISH falls the detectors are off, so nothing can
  see a new error. Only a reset restarts calibration.
* **Detector windows are explicit.** The main detector's lock is an aperture
  measured on edge times. The DRPD window comes from two homo interpolators
  offset by +/-3 ps. In silicon both are a metastability effect.
* **Chosen details.** These details are this design's own choice:
  * the counter trigger phases;
  * the mid-scale reset of B;
  * `range_sel = C[4:3]` and the 300/250 ps interpolator delays;
  * the LADE delay constants other than the 0.9 ns minimum and the 65 ps
    step;
  * the reset phase of the step divider.
* **First sample.** The DRPD flip-flops reset to "down". So each stage may
  take one down step on the first sample after FINISH rises, which the loop
  then corrects.
* **Not modelled.** Output buffers, pads and power are not modelled.

## Simulating

Verilator 5 with timing support is needed. The package must come first. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl \
    rtl/dll_pkg.sv $(ls rtl/*.sv | grep -v dll_pkg) \
    tb/tb_adscm_dll.sv --top-module tb_adscm_dll
./obj_dir/Vtb_adscm_dll
```

For a block test, swap in that block's testbench and top module name, e.g.
`tb/tb_drpd.sv` and `tb_drpd`. Each run prints the numbers it measured and
one `TB_RESULT` line. The whole test suite runs in seconds.

## Files

`rtl/`:

* `dll_pkg` — shared constants and types.
* `adscm_dll` — the top.
* `dcdl`, `lade` — delay line and delay element models.
* `phase_detector` — bang-bang detector model.
* `lockin_unit` = `step_controller` + `binary_controller` (+ `single_bit_gen`).
* `calibration_unit` = `drpd` (+ `interpolator`) x4, `updn_counter` x5,
  `lock_detect_unit`.

`tb/`: one `tb_<block>.sv` per block, plus `tb_adscm_dll` for the whole loop.
