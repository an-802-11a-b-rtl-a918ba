# Fractional-N digital PLL with a self-calibrating 2-D Vernier TDC

A fractional-N PLL that runs without a sigma-delta modulator toggles its
divider between N and N+1. The divided clock then sweeps across the reference
edge in a sawtooth. A digi-phase canceller can subtract that sawtooth, since
the fractional accumulator already knows its exact shape. What it cannot
remove is the time-to-digital converter's (TDC's) own nonlinearity. Any bend
in the TDC transfer curve leaves a periodic residue, and that residue turns
into a fractional spur close to the carrier, where the loop filter does not
attenuate it.

This design uses the same sawtooth to calibrate the TDC. While the loop is
locked on a known fractional channel, the TDC input sweeps evenly over one
DCO period. The expected code for every sample is therefore known. The
difference between measured and expected code drives two LMS loops. These
trim the two delay chains of a 2-D Vernier TDC until its steps are uniform.
After that, a gain-tracking loop fits the canceller's scale factor to the
calibrated TDC. The loop then relocks on the channel that is really wanted.

The repository holds:
- the synthesizable digital part of the PLL, clocked at the reference rate;
- a synthesizable glitch-free multimodulus divider (MMD);
- behavioural models of the two analog parts, the TDC front end and the LC
  DCO, so the whole loop can be simulated in closed loop with plain Verilator.

Target numbers: 80 MHz reference, a 1.96–2.65 GHz carrier after a
divide-by-2 from a ~5 GHz DCO, 5 ps TDC resolution and an 8-bit fractional
accumulator (1/256 channel step).

## Loop structure

```
 REF ──►┌───────────┐ thermometer ┌─────────────┐ code ┌─────────────┐ err ┌─────────────┐ FIN
 DIV ──►│tdc_analog │────────────►│ tdc_encoder │─────►│ digiphase_  │────►│ loop_filter │────┐
        │(behav.)   │             └─────────────┘      │ canceller   │     └─────────────┘    │
        └───▲───────┘              single/multi-line   └─▲─────▲─────┘                        │
            │ slow/fast 6-b codes  flags │               │acc  │gain                          ▼
        ┌───┴───────┐  ┌──────────────┐  │        ┌──────┴─────┐              ┌──────────────────┐
        │delay_sdm×2│◄─│ tdc_lin_cal  │◄─┘ err    │ frac_accum │──ratio──┐    │ dco_tune_ctrl    │
        └───────────┘  └──────────────┘           └────────────┘         │    │ PVT/ACQ/TRK SAR, │
                                                                         ▼    │ FIN from the loop│
 DIV ◄──────────────────────────── mmd (8..127) ◄── carrier ◄── dco (÷2) ◄────┴──────────────────┘
                                                                     │
                                                   freq_counter ◄────┘ (carrier cycle count, Gray)
```

`cal_sequencer` runs the start-up procedure. `dpll_core` holds all
reference-domain logic. `dpll_top` adds the two models, the divider and the
carrier-domain counter.

## The three-step TDC

The TDC must see the whole phase range during acquisition, about ±6.25 ns
at 80 MHz. In lock it needs 5 ps resolution over only a little more than one
DCO period (±208 ps). It has three stages that work on the same REF/DIV pair:

1. **Bang-bang stage**: gives only the sign. The falling REF edge is the
   trigger. A DIV edge during REF high means DIV lags. A DIV edge after the
   fall is early for the next rising edge. The measured interval `dt` is
   folded to a magnitude plus this polarity.
2. **Coarse stage**: the 16-tap slow chain (65 ps per tap) taken on its own,
   covering ±1.04 ns.
3. **Fine stage**: a 2-D Vernier array of 4 arbiter lines × 13 arbiters.
   Line k (k = 0..3) compares slow tap i+k with fast tap i (i = 1..13).
   Arbiter (i, k) fires when `|dt| ≥ (i+k)·ds − i·df`. For ds = 65 ps and
   df = 60 ps the 52 thresholds are exactly the multiples of 5 ps from 5 to
   260 ps. Line 1 covers 5–65 ps, line 2 70–130 ps, and so on. The rule that
   makes the lines join is `n·(ds − df) = ds` with n = 13.

`tdc_encoder` counts the ones of the 52 arbiter outputs. A popcount is used
instead of a first-zero search, so a mistuned array still gives a monotone
code. If all 52 fired, the coarse count × 13 LSB is used. If the coarse chain
is full too, the code saturates at ±221 LSB. Every code is a signed number
of 5 ps LSBs. The encoder also raises `single_line` when only arbiter line 1
fired, and `multi_line` when a fine result used lines 2–4.

The two chains have 6-bit capacitive trims with 0.5 ps steps. In the model a
chain's stage delay is `DS0_PS + 0.5·code` for the slow chain and
`DF0_PS + 0.5·code` for the fast chain. Codes 53 and 47 give the ideal 65 and
60 ps. Each trim word is a fixed-point value dithered to 6 bits by a
first-order ΣΔ modulator (`delay_sdm`), so the average delay can sit between
two code steps.

## Linearity calibration (`tdc_lin_cal`)

During calibration the loop is locked on a fractional channel with the
canceller on. The canceller output `err` is then the TDC's deviation from an
ideal straight line. Two kinds of delay error show up differently:

- **Only the difference `ds − df` matters** while the input stays inside
  arbiter line 1. Each fine step there is `ds − df`. These samples
  (`single_line`) drive the **differential** loop.
- **The average delay shifts the line joints** once lines 2–4 are used: a
  step from line k to k+1 jumps by `ds − 12(ds − df)`. These samples
  (`multi_line`) drive the **common** loop.

The array measures |dt|, so the error is multiplied by the polarity before it
is integrated (sign-data LMS):

```
diff   += ( sgn·err << 4) >>> mu_d_sh      when single_line
common += ( sgn·err << 4) >>> mu_c_sh      when multi_line
slow_w  = common + diff,  fast_w = common − diff   (Q6.12, clamped to 0..63)
```

The sign conventions were checked against the model. With the other pairing
(single line → common loop) the loops diverge. From a start of common 32,
differential 10 (59.5 / 47.5 ps stages), the loops settle near common 50,
differential 2.7 within about 16 k reference cycles (200 µs).

## Digi-phase cancellation and TDC gain (`digiphase_canceller`)

The accumulator value `acc` says how far, in 1/256 carrier periods, the
divided edge leads. The canceller centres it (`r = acc − 128`), so the TDC
sees a sawtooth of ±½ T_DCO around zero. The canceller then adds
`r · gain / 256` to the TDC code. `gain` is the TDC gain in LSBs per carrier
period (T_DCO / 5 ps ≈ 86, unsigned Q8.8). `r` is delayed by three reference
cycles (`RES_DELAY`) to line up with the TDC result it belongs to.

If `gain` is wrong, `err` keeps a sawtooth correlated with `r`. The tracking
loop removes it with `gain −= (err·sign(r)) >> mu_g_sh`. Tracking runs only
after the linearity calibration, because the TDC gain changes while the
delays are being trimmed.

## Loop filter (`loop_filter`)

The loop filter is proportional plus integral. Its proportional path passes
through two first-order IIR sections:

```
p  = alpha·e          (alpha Q4.4, 0..15.9)
y1 += (p  − y1) >> iir1_sh ;  y2 += (y1 − y2) >> iir2_sh     (shift 0 = bypass)
i  += e >> beta_sh
out = round(y2 + i)   → FIN bank code offset
```

The integrator and the output saturate at the range the FIN bank can still
take (−FIN_START .. 127 − FIN_START). This keeps the integrator from winding
up while the bank is at an end stop. With the model's DCO the bandwidth is
about `(alpha/16) · 116 kHz`. The testbenches use alpha = 32 (about
230 kHz), β = 2⁻⁶, and both IIR shifts at 1.

## DCO and bank tuning (`dco`, `dco_tune_ctrl`, `freq_counter`)

| bank | coding | range (carrier) | steps |
|------|--------|-----------------|-------|
| PVT  | 6-bit binary | 686 MHz | 64 |
| ACQ  | 5-bit thermometer (31 cells) | 180 MHz | 32 |
| TRK  | 6-bit thermometer (63 cells) | 36 MHz | 64 |
| FIN  | 7-bit thermometer (127 cells) | 1.08 MHz | 128 |

The carrier starts at 1.96 GHz. The model uses uniform steps, so the carrier
spans 1.96–2.65 GHz and the core runs at twice that.

The banks are set in order PVT, ACQ, TRK by successive approximation, 17
decisions in all. Each decision:
1. sets the trial bit and waits `SETTLE` cycles;
2. counts carrier cycles over `WIN` = 1024 reference cycles;
3. compares the count with `WIN·(N + frac/256)`;
4. keeps the bit if the DCO is not too fast.

The carrier-domain counter crosses into the reference domain Gray-coded,
through a two-flop synchroniser. During the search FIN sits at `FIN_START`
= 32. The residual error after TRK (0 to 1 TRK step, about 67 FIN steps)
therefore lands inside FIN's range. FIN then belongs to the loop filter.
Tuning takes 17 × 1040 reference cycles (221 µs) per channel.

## Multimodulus divider (`mmd`, `mmd_prescaler`, `mmd_async_counter`)

The ratio word `P<6:0>` gives `8·P<6:3> + P<2:0>`, so ratios 8–127. The
divider has two parts:
- **High-speed part**: three 2/3 cells, modelled as one synchronous counter.
  It divides by 8, or by `8 + P<2:0>` when the counter asks for the
  stretched period.
- **Extension part**: an asynchronous counter clocked by the cells' output.
  It counts `P<6:3>` output periods. It asks for the stretch on the first
  period of each cycle, and restarts from zero whenever it wraps or is
  disabled (P<6:3> ≤ 1).

The limit is loaded only at the wrap. A ratio change therefore never yields
a shortened or skipped period. This is the glitch that conventional MMDs
show when the ratio toggles every reference cycle. The output edge comes
from the falling edge of the cells' output in the first period, which gives
one clean edge per cycle for every ratio, including 8–15.

The ratio word must be stable from 5 carrier cycles before an output edge;
the core changes it on the falling reference edge.

## Start-up sequence (`cal_sequencer`)

| state | length (ref cycles) | what runs |
|-------|---------------------|-----------|
| TUNE | bank SAR | banks searched for the calibration channel |
| LOCK | `T_LOCK` = 4096 | phase loop, canceller on, gain = preset |
| LINCAL | `T_LINCAL` = 16384 | delay LMS loops (skipped if `skip_lincal`) |
| GAINTRK | `T_GAIN` = 4096 | gain tracking |
| RELOCK | bank SAR again | operating channel; gain held |
| TRACK | — | locked at the operating channel, gain tracking on |

`locked` rises in TRACK. The LMS loops and gain tracking are never on
together; an assertion guards this.

## Number formats

| signal | format |
|--------|--------|
| TDC code | signed 10 bit, 5 ps LSB, saturates at ±221 |
| `err` | signed 20 bit, 8 fraction bits (LSB = 5/256 ps) |
| `gain`, `gain_preset` | unsigned Q8.8, LSBs per carrier period |
| delay words | signed Q6.12, 6-bit integer to the chains after ΣΔ |
| loop filter output | signed 9 bit, FIN codes |

## Where this design departs from, or adds to, the published one

- The TDC front end and the DCO are behavioural models. Their delay and
  frequency laws come from the published numbers. The offsets `DS0_PS` =
  38.5 ps and `DF0_PS` = 36.5 ps are chosen so that the trim codes the
  calibration is reported to reach give exactly 65/60 ps.
- The trim range is 64 × 0.5 ps = 32 ps per chain. This follows the stated
  6-bit width and 0.5 ps step, not the 50 ps range quoted alongside them.
- Single-line results drive the differential loop and multi-line results the
  common loop, as the explanation of the calibration reasons it. A drawing of
  the same loops labels the flags the other way round; that pairing does not
  converge here.
- The published design does not describe these parts, so this design
  supplies them:
  - the sign-data LMS forms;
  - the canceller arithmetic and its three-cycle alignment;
  - the coefficient forms of the loop filter and its anti-windup limits;
  - successive approximation for the ACQ and TRK banks, and the counter used
    for it;
  - fixed step lengths in the sequencer instead of convergence detection;
  - where the ratio is retimed, and the exact MMD cell-level timing.
- The DCO model follows the published bank plan (1.96–2.65 GHz carrier,
  8.4 kHz per FIN step). It does not cover the wider 1.9–2.8 GHz range that
  the design is also said to tune over.
- The loop gains are plain inputs. The published loop starts with a wide
  bandwidth and narrows it after lock. Here that gear shift is left to
  whatever drives the gain inputs; no automatic switching is built.
- The serial configuration port is not built. Its settings are top-level
  inputs. The 80 MHz crystal oscillator and the output buffers are outside
  the RTL.
- Phase noise is not modelled. The DCO model has no noise and no
  nonlinearity. Spur levels from simulation show the effect of calibration,
  not the absolute levels of silicon.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
          rtl/dpll_pkg.sv tb/tb_dpll_top.sv --top-module tb_dpll_top
./obj_dir/Vtb_dpll_top
```

Replace `tb_dpll_top` by any other testbench name. The behavioural models use
`timeunit 1ps / timeprecision 1fs`. The whole-loop tests need `--timing`.

| testbench | what it shows |
|-----------|---------------|
| `tb_frac_accum`, `tb_mmd_prescaler`, `tb_mmd_async_counter`, `tb_mmd` | ratio sequences and exact divided-period lengths for all ratios 8–127, with the ratio changing every output period |
| `tb_tdc_analog`, `tb_tdc_encoder` | arbiter thresholds against `(i+k)·ds − i·df`, range selection and line flags |
| `tb_delay_sdm`, `tb_tdc_lin_cal` | ΣΔ averages; the LMS loops converge from 32/10 to 50/3 on a TDC model inside the testbench |
| `tb_digiphase_canceller` | cancellation of a generated sawtooth; gain tracking from a preset 25 % low |
| `tb_loop_filter` | cycle-exact comparison with reference arithmetic; anti-windup at asymmetric limits |
| `tb_dco`, `tb_dco_tune_ctrl` | bank frequency law; 17 SAR decisions, final codes and cycle count |
| `tb_cal_sequencer` | state order, lengths, enables, skip of step 2 |
| `tb_tdc_linearity` | static transfer curve of the fine TDC for ideal, reset, common-only and differential-only trim errors; end-point INL/DNL (reset trims: INL 4.4 LSB, DNL 0.9 LSB; ideal trims: 0) |
| `tb_dpll_top` | whole loop at default sizes (~3 s): tuning, lock on the uncalibrated TDC, calibration to common ≈ 50 / diff ≈ 2.7, gain ≈ 86, relock at 2323.75 MHz within 20 ppm; counts every mechanism |
| `tb_dpll_channels` | four loops relock at 2.080 GHz (integer), 2.040, 2.412 and 2.640 GHz; each within 20 ppm with the TDC input inside the fine range |
| `tb_dpll_spur` | eight loops in parallel: 1/64 and 3/64 channels, with and without calibration, at ~230 kHz and ~1 MHz bandwidth; DFT of residue and carrier at the closest spur |

Typical `tb_dpll_spur` result (noiseless model; the calibrated levels move
by a few dB between runs):

| loop bandwidth | channel | without calibration | with calibration |
|----------------|---------|--------------------|------------------|
| ~230 kHz | 29 + 4/256 (spur at 1.25 MHz) | −42.5 dBc, residue A1 1.10 LSB | −63 to −68 dBc, A1 0.07–0.11 LSB |
| ~230 kHz | 29 + 12/256 (spur at 3.75 MHz) | −53.5 dBc, A1 1.10 LSB | −67 to −77 dBc, A1 0.08–0.22 LSB |
| ~1 MHz | 29 + 4/256 | −28.8 dBc, A1 1.34 LSB | −52.2 dBc, A1 0.09 LSB |
| ~1 MHz | 29 + 12/256 | −41.8 dBc, A1 1.04 LSB | −66.7 dBc, A1 0.06 LSB |

With a 1 MHz loop the 1.25 MHz spur gets almost no loop filtering. The DCO
model's gain and the starting mistune of its TDC delays are assumptions, so
only the size of the improvement (about 15–25 dB) carries over, not the
absolute levels.

## Files

`rtl/dpll_pkg.sv` holds the shared widths, constants and state enums. There
is one module per file in `rtl/` and one testbench per file in `tb/`. Each
file begins with a description of its interface and timing.
