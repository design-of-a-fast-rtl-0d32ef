# Fast lock-in all-digital PLL

This is an all-digital phase-locked loop (ADPLL) that multiplies a reference
clock by an integer factor N. It is designed for a 5 MHz reference and a
130 MHz to 1.47 GHz digitally controlled oscillator (DCO).

A plain bang-bang ADPLL finds its DCO code by searching, which takes tens of
reference cycles. This design computes the code instead. It measures the
DCO at two known codes, medium and maximum, and interpolates the code for
N × f_ref. It then starts tracking from that estimate. Lock is declared
4.5 reference cycles after reset, and the estimate is already within about
1 % of the target. A binary search driven by a bang-bang phase detector,
smoothed by a trimmed-mean loop filter, then removes the remaining error.

The frequency estimate needs no time-to-digital converter. Instead, a
calibration step corrects the medium measurement point for the counter's
integer quantisation.

The synthesizable part is written in SystemVerilog. The two analog parts
have behavioural models: the ring oscillator and the phase detector's
reset-pulse timing. Everything runs with plain Verilator in `--timing` mode.

## Block diagram

```
            ref_clk ──┬──────────────┬───────────────────────────┐
                      │              │                           │
                  ┌───▼───┐ up/dn ┌──▼──────────────┐  track  ┌──▼────────────┐
       fb_clk ───►│  pfd  ├──────►│ adpll_controller├────────►│digital_loop_  │
          ▲       └───────┘       │  (state machine)│◄────────┤filter (DLF)   │
          │                       └─┬───┬───────┬───┘ baseline└───────────────┘
   ┌──────┴──────┐        ff_op     │   │dco_en │dco_code
   │freq_divider │◄─┐  ┌────────────▼┐  │   ┌───▼────────┐  coarse[62:0] ┌──────┐
   │   (÷ N)     │  │  │freq_finder  │  │   │dco_encoder ├──────────────►│ dco  │──┬─► dco_clk
   └─────────────┘  │  │(W, L_mid,   │  │   └────────────┘  fine[30:0]   └──▲───┘  │
                    │  │ init_code)  │  └──────────────────────────────────┘      │
                    │  └──────▲──────┘                                            │
                    │   r_count│  ┌───────────────┐                                │
                    │          └──┤cyclic_counter │◄───────────────────────────────┤
                    │             └───────────────┘                                │
                    └──────────────────────────────────────────────────────────────┤
                                  ┌───────────────┐                                │
                     div_clk ◄────┤output_divider │◄───────────────────────────────┘
                                  │ ÷2/4/8/16     │
                                  └───────────────┘
```

| Module | Kind | Role |
|---|---|---|
| `adpll_top` | RTL | test-chip top: pins, factor table, output blocking |
| `adpll_controller` | RTL | estimation sequence, lock, binary search, test modes |
| `freq_finder` | RTL | reciprocal arithmetic and the code estimate |
| `cyclic_counter` | RTL | measures T_ref / T_dco as an integer |
| `digital_loop_filter` | RTL | trimmed mean of the last eight tracking codes |
| `dco_encoder` | RTL | 11-bit code to 63 + 31 thermometer bits |
| `dco` | behavioural | ring oscillator, 680.3 ps + (2047 − code) × 3.43 ps |
| `pfd` | behavioural | bang-bang phase/frequency detector |
| `freq_divider` | RTL | feedback divider ÷ N, N = 2..511 |
| `output_divider` | RTL | ripple ÷2/÷4/÷8/÷16 for observing the DCO off-chip |
| `adpll_pkg` | package | widths, state and mode enums, Test_N table |

## The DCO and its code

The DCO takes an 11-bit code.
- Bits [10:5] choose how many of the 63 coarse NAND stages are removed from the ring.
- Bits [4:0] choose how many of the 31 fine interpolating buffers are switched on.

`dco_encoder` converts the two fields to thermometer codes:
- `coarse[i] = (i >= code[10:5])`
- `fine[j] = (j < code[4:0])`

A higher code gives a higher frequency. Code 2047 is the maximum frequency.

The model uses a straight line, so the period is exactly linear in the code:

    T_dco(code) = 680.3 ps + (2047 − code) · 3.43 ps

That gives 1.47 GHz at code 2047 and 129.8 MHz at code 0, with 3.43 ps per
step. The real oscillator is monotonic but only close to linear. The
estimator below only relies on linearity between its measurement points.

`en` starts and stops the ring. The first rising edge comes at once when
`en` rises, so the controller can restart the DCO in phase with the
reference.

## Frequency estimation

### What is measured

`cyclic_counter` counts DCO edges, both rising and falling, while the
reference is high. It captures the count on the reference's falling edge.
Half a reference period divided by half a DCO period gives

    R = T_ref / T_dco       (an integer, truncated)

so R equals N exactly when the DCO runs at the target frequency.

### Working with reciprocals

R is inversely related to the code, but its reciprocal W = 2^S / R is
proportional to the DCO period. Since the period is linear in the code, W
is a straight line in the code. S = 18, so W has 19 bits.
- W_T = 2^S / N is where the line must end up.
- W_mid = 2^S / R_mid is measured at code 1023.
- W_min = 2^S / R_max is measured at code 2047.

Interpolating between the two measured points:

    x         = 2^10 · (W_T − W_min) / (W_mid − W_min)   codes below 2047
    init_code = 2047 − x                                 (clamped to 0..2047)

The factor is 2^10 because code 1023 is 1024 codes below code 2047.

### Calibration (L_mid)

R_mid and R_max are truncated integers, so the line through the two
measured points is tilted. The error is worst at the medium point, where R
is smallest and one count matters most.

The calibrated medium point is

    L_mid = W_min + (R_max − R_mid) · 2^S / (R_max · R_mid)

In exact arithmetic this equals W_mid. In integer arithmetic it differs:
- W_min is already truncated.
- The difference term is formed with a single truncating division of a larger dividend.

Together these move the medium point by about one LSB towards the line
through the true periods. `change_function = 1` uses L_mid in place of
W_mid; `change_function = 0` uses the uncorrected W_mid.

With a 19-bit W the correction is small. The tracked result is identical
either way. It matters more if S is lowered.

### Schedule

`freq_finder` has one divider. `adpll_controller` uses it once per
reference cycle. Results are taken on the rising reference edge, after the
count was captured on the falling edge.

| State | Result registered at (reference cycles after reset) | DCO | Division |
|---|---|---|---|
| `ST_N` | 0.5 | off | W_T = 2^S / N |
| `ST_RMID` | 1.5 | on, code 1023 | W_mid = 2^S / R_mid |
| `ST_RMAX` | 2.5 | on, code 2047 | W_min = 2^S / R_max |
| `ST_CAL` | 3.5 | off | L_mid |
| `ST_CALC` | 4.5 | off | init_code |
| `ST_MAINT` | from 4.5 | restarted at init_code | — |

The half cycle comes from releasing reset on a falling reference edge.
`lock` rises on the rising edge at 4.5 cycles. At that same edge:
- the DCO restarts;
- the feedback divider is released;
- the PFD is enabled.

The first feedback edge is therefore aligned with a reference edge. Phase
error starts near zero and frequency error is whatever the estimate left.

Measured first-code errors at 5 MHz:

| N | Target | Error |
|---|---|---|
| 26 | 130 MHz | −0.12 % |
| 30 | 150 MHz | −0.75 % |
| 32 | 160 MHz | −0.72 % |
| 44 | 220 MHz | −0.61 % |
| 52 | 260 MHz | −0.53 % |
| 64 | 320 MHz | −0.47 % |
| 131 | 655 MHz | −0.05 % |
| 200 | 1 GHz | +0.42 % |
| 290 | 1.45 GHz | +1.4 % |

The larger error at N = 290 is because, a few codes from the top of the
range, a single count of R_max moves the estimate by about 1 %.

## Tracking

After lock the PFD compares the feedback clock (DCO ÷ N) with the
reference. The PFD is the classic pair of flip-flops:
- The first edge sets its flop: `up_raw` for the reference, `dn_raw` for the feedback.
- When both are set they are reset together after a pulse of `T_RST_PS`.

Two decision flops turn this into a bang-bang result:
- `up` is `up_raw` sampled at the feedback edge, meaning the feedback is late.
- `dn` is `dn_raw` sampled at the reference edge, meaning the feedback is early.
- Edges closer than the 17 ps dead zone give neither.

The controller samples the decision on the falling reference edge. On each
rising edge it updates a binary-search code:
- code ± step, where the step starts at 16 codes;
- the step halves each time the direction reverses, down to 1.

The code may carry from the fine field into the coarse field.

Every search code is handed to `digital_loop_filter`. It keeps the last
eight codes, and after every second new code outputs

    baseline = round((sum − min − max) / 6)

This is the mean of the middle six, the same as sorting and dropping both
ends.

For the first eight cycles after lock the DCO follows the search code
directly, starting from the estimate. Once a baseline exists, the DCO is
driven with

    dco_code = baseline ± KP        (KP = 32, sign from the latest PFD decision)

The baseline carries the frequency. The short proportional kick corrects
phase in the right direction each cycle. Without the kick, the search code
alone, filtered with a delay of four codes, oscillated about ±120 codes
around the target. With it, the baseline settles within one code of the
ideal (fractional) code. The average output frequency matches N · f_ref to
better than 0.1 % (0.00 % for most N), and the code dithers by ±KP around
the baseline.

## Test-chip pins

| Pin | Width | Meaning |
|---|---|---|
| `ref_clk` | 1 | reference clock |
| `rst_n` | 1 | reset, active low |
| `change_function` | 1 | 0 = uncorrected W_mid, 1 = calibrated L_mid |
| `test_n` | 4 | factor N: 2, 4, 8, 16, 32, 64, 128, 256, 7, 13, 19, 23, 47, 73, 131, 257 for codes 0..15 |
| `m` | 2 | output divider: ÷2, ÷4, ÷8, ÷16 |
| `test_mode` | 3 | [1:0]: 0 DCO fixed at minimum, 1 tracking, 2 fixed at the first estimated code, 3 fixed at maximum. [2]: 0 blocks `dco_clk_o`, 1 blocks `div_clk_o` |
| `dco_clk_o`, `div_clk_o` | 1 each | DCO clock and divided DCO clock; the one not being measured is held low |
| `lock_o` | 1 | lock |
| `fb_clk_o`, `pfd_up_o`, `pfd_dn_o` | 1 each | feedback clock and raw PFD pulses, for debug |

The estimation always runs. The test mode only selects what the DCO does
afterwards.

## Following the description versus design choices

These follow the design description:
- the block set and the 11-bit code split;
- the 63 + 31 thermometer codes;
- the estimation sequence, with its 4.5-cycle lock;
- the W / L_mid / init_code equations;
- the eight-entry trimmed-mean loop filter, updated every two codes;
- the bang-bang PFD with a 17 ps dead zone;
- the 2/4/8/16 ripple output divider;
- the test-pin tables;
- the DCO range and resolution, 129.8 MHz–1.47 GHz and 3.43 ps.

These are this design's own choices:
- **Fixed-point scale.** W = 2^18 / R. Hand calculations with 2^11 also
  appear in the description. The larger scale keeps the estimate accurate
  at small R.
- **Code direction.** The estimation equations count codes from the
  slow end, but the DCO's maximum code is its fastest. Here x is counted
  down from 2047, which is why the interpolation factor is 2^10 = 2047 − 1023.
- **Double-edge counter.** The counter counts both DCO edges over half a
  reference period, so that R = N at the target.
- **Estimate-to-code handover.** The hand-over from estimation to tracking
  restarts the DCO on the reference edge. That is how phase alignment is
  achieved.
- **Binary search.** The binary-search start step (16) and minimum step
  (1) are this design's choice.
- **Proportional kick.** The description does not mention it. KP = 32 is a
  parameter of `adpll_controller`.
- **Decision sampling.** The PFD decision flops are sampled on the falling
  reference edge.
- **Filter rounding and reset.** The loop filter uses rounding, and it is
  cleared whenever the loop is not tracking.
- **DCO model shape.** The DCO model is a straight line with 50 % duty
  cycle. The real ring has 47–51 % duty and small DNL.
- **PFD reset pulse.** The PFD reset pulse is 150 ps.
- **Counter width.** The counter width is 12 bits, which covers R up to
  4095.
- **Pin meanings.** `change_function` = 0 means "no calibration". Test
  modes 0–3 block `dco_clk_o` and 4–7 block `div_clk_o`.

Known limits:
- The feedback divider needs N ≥ 2. The factor range is otherwise 1..511.
- With a 5 MHz reference, only N = 26..293 put N · f_ref inside the DCO
  range.
  - Eight of the Test_N factors are too low: 2, 4, 7, 8, 13, 16, 19 and 23.
    For these the DCO sits at its minimum frequency.
  - N = 1 is not supported.
- Supply voltage, PVT corners, power, jitter and supply noise are not
  modelled.
- The I/O pads are not modelled.

## Clocking, timing and lint notes

- The state machine, frequency finder and loop filter run on `ref_clk`.
  The PFD samplers run on its falling edge.
- `cyclic_counter`, `freq_divider` and `output_divider` run on the DCO
  clock.
- `loop_en` comes from the reference domain. It is used as the
  asynchronous clear of the feedback divider and of the PFD. It rises on
  the same reference edge that restarts the DCO. The DCO was stopped
  through the two calibration cycles, so no DCO edge can meet the divider
  while it is held. In silicon, the release must reach the divider before
  the restarted ring's first edge, and that first edge is the one that
  raises the feedback clock.
- The cyclic counter and the feedback divider are clocked by the DCO,
  which is stopped during reset. Their asynchronous reset therefore acts
  on its falling edge only. A simulation must drive `rst_n` from 1 to 0,
  not start it at 0, or these flops keep their power-up values.
- The output divider is a ripple counter by design. Its later stages are
  clocked by flip-flop outputs.
- The behavioural models use `#` delays and `real` parameters. They
  simulate but do not synthesize.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. Each has a
watchdog.

```
verilator --binary --timing -Irtl rtl/adpll_pkg.sv tb/tb_adpll_top.sv \
          -y rtl +libext+.sv --top-module tb_adpll_top -o sim
./obj_dir/sim
```

Replace `tb_adpll_top` with any testbench in `tb/`:

| Testbench | What it covers |
|---|---|
| `tb_adpll_top` | Runs the full design with default parameters at N = 32, 47, 64 and 131. Checks lock at exactly 4.5 cycles, a first-code error under 2 %, and a tracked frequency within 0.3 %. Runs every test mode, both estimation functions and every output division. Also counts that each mechanism occurred: estimation, step halving, baseline, up/down decisions and output blocking. |
| `tb_adpll_workloads` | Forces the internal factor to N = 52, 30, 44, 26, 200 and 290, which the pins cannot select. Checks the first code to 1 % (2 % at 290) and tracking to 0.3 %. |
| Block testbenches | Compare each block with an independent model. `tb_dco_encoder` is exhaustive over all codes. `tb_freq_finder` uses integer reference arithmetic over the Test_N factors, a sweep of N, and random N with counts one off the ideal. `tb_digital_loop_filter` uses a sorting model. `tb_pfd` sweeps phase offsets either side of the dead zone. `tb_adpll_controller` checks the sequence, lock timing and search steps. |

Each full-design run takes well under a second of simulator time.

To change the design:
- The arithmetic scale is `W_SHIFT` on `adpll_top` / `freq_finder`.
- The counter width is `CNT_W`.
- The loop gains are `BS_STEP_INIT` and `KP` on `adpll_controller`.
- The DCO line is `T_MIN_PS` / `T_STEP_PS` on `dco`.
