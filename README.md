# Wide-range digital DLL with per-pin phase shifters

A parallel interface such as DDR has a separate timing problem on each pin. Routing, loading and
read/write paths differ, so one shifted sampling clock cannot centre every pin in its data eye.
Each pin needs its own delay, a fixed fraction of the clock period (typically 90 degrees) plus a
small per-pin correction. That fraction has to hold across process, voltage and temperature.

This design solves it with a master-slave arrangement:

* A **master DLL** locks a digitally controlled phase shifter (**DCPS-360**) to exactly one period
  of the reference clock, at any frequency from 200 MHz to 1.6 GHz. Its lock code is a
  measurement of "one period" in delay steps.
* The **phase shift controller** divides that code by four and adds a per-pin trim.
* Each pin has a small **DCPS-90**, built from the same delay units, driven by that code. Its
  delay is therefore a quarter period (plus trim) at every frequency and corner. No per-pin
  loop is needed.

```
                 +-------------------------- master_dll ---------------------------+
 clk_ref ---+--->| dcps (K=12, "DCPS-360") --------------------------+--> clk_dly   |
            |    |        ^ code360                                 |              |
            |    |        |                                 clk_dly |              |
            +--->| dcps0 (replica) -- clk_int --> phase_detector <--+              |
            |    |                               (SAPD | SPPD -> consecutive       |
            |    |                                decision)  | up/dn  ^ lock, hold |
            +--->| clk_div (/8) -- clk_ctrl --> dll_ctrl <----+--------+           |
                 +-----------------------------------|-----------------------------+
                                                     | code360
                        trim[i] --> phase_shift_ctrl (code360/4 + trim[i]) --> code90[i]
                                                     |
             d_int[i] --> dcps (K=10, "DCPS-90") --> d_ext[i]      (one per pin, N_CH = 2)
```

## The phase shifter (DCPS)

Everything depends on one delay element with a code-to-delay characteristic that is linear,
monotonic and the same in every instance. A K-bit DCPS code splits in two parts:

| bits          | drives                                          | step                     |
|---------------|-------------------------------------------------|--------------------------|
| `code[K-1:5]` | binary-to-thermometer decoder, then a line of 2^(K-5) coarse delay units (CDUs) | one CDU = two NAND delays (`T_CDU`, 67 ps typical) |
| `code[4:0]`   | fine decoder, then the interpolator (FDU) between two adjacent CDU taps | `T_CDU/32` (about 2.1 ps) |

The coarse line's output is tap `IN_a`. One more CDU gives `IN_b`, a full CDU later. A third CDU
is a dummy load, so `IN_b` sees the same load as `IN_a`. The FDU places its output edge at one of
32 positions between `IN_a` and `IN_b`.

**The partitioned interpolator.** A plain complementary-driving interpolator connects two banks
of tri-state drivers to one node: the `F_a` bank is driven by `IN_a` and the `F_b` bank by
`IN_b`. Moving drivers from one bank to the other moves the output edge. Over a full CDU of phase
difference this is poorly linear. The FDU here halves the problem. An extra buffer makes `IN_a+`,
half a CDU after `IN_a`, and two multiplexers choose which pair the two 16-driver banks see:

| `f_sel` (`code[4]`) | bank a | bank b  | range covered     |
|---------------------|--------|---------|-------------------|
| 0                   | IN_a   | IN_a+   | first half-CDU    |
| 1                   | IN_a+  | IN_b    | second half-CDU   |

Within a half, `n = code[3:0]` bank-b drivers are on and the other `16 - n` bank-a drivers are
on. Code 0 gives `f_a = 1111_1111_1111_1111` and `f_b = 0`. Code 15 gives `f_a = 0000_0000_0000_0001`
and `f_b = 1111_1111_1111_1110`. The full DCPS delay is

    delay(code) = (2 + code / 32) * T_CDU

The constant `2 * T_CDU` is the intrinsic part: the first, always-active stage of the line plus
the interpolator's output buffer. The **DCPS-0** replica (`dcps0`) is the DCPS at code 0 with its
decoders removed: two CDUs, a dummy CDU and an FDU with a fixed setting. The DLL compares against
the reference clock delayed by this replica (`clk_int`). So the loop locks only the code-controlled
part, `code * T_CDU / 32`, to one period. That is exactly the part a slave reproduces when given a
fraction of the code.

## How the loop locks without locking to a harmonic

A delay line can also "lock" at two or three periods. The controller (`dll_ctrl`, see
`ctrl_state_e` in `dll_pkg`) avoids that by always starting at the minimum delay and walking up
through exactly one period:

1. **Reset:** `code = 0`, `step = S_INIT = 32` (one CDU). `ST_INIT` increases the code once.
2. **`ST_SRCH_UP`:** the delay is 0-180 degrees. `clk_dly` is still low at the `clk_int` edge, so
   the detector says UP. Increase by `step`.
3. **`ST_SRCH_DN`:** the delay is 180-360 degrees and the detector says DN. Keep increasing.
4. The first UP after DN means the delay has just passed one period. This is the first direction
   change: halve the step and enter **`ST_CONVERGE`**.
5. **`ST_CONVERGE`:** each decision moves the code by `step` *against* the detector (UP lowers
   the code, DN raises it). The lock point is where the detector turns from DN to UP as the code
   rises, so its polarity is inverted there. Each change of direction halves the step.
6. A direction change with `step == 1` enters **`ST_LOCKED`** and raises `lock`. The loop keeps
   tracking with ±1 steps.

The code saturates at 0 and 2^K-1. For a period longer than the line, the loop stays at
full scale in `ST_SRCH_UP`.

## Phase detector: fine before lock, deaf to small jitter after

`phase_detector` has two front ends and a vote counter:

* **SAPD** (`sapd`): a sense amplifier that resolves on the rising edge of `clk_int`. It has no
  useful dead zone, so it gives fine decisions during acquisition. Two registers loaded by a short
  pulse hold its result for a full cycle.
* **SPPD** (`sppd`): two registers sample `clk_dly` just before and just after the `clk_int` edge
  (Q0 and Q1). `up1 = ~(Q0 | Q1)` and `dn1 = Q0 & Q1`. When the `clk_dly` edge falls inside the
  roughly 60 ps window, both outputs are 0 and no correction is asked for.
* `lock` selects SAPD (0) or SPPD (1) as the windowed signals `upw`/`dnw`.
* **Consecutive decision** (`consec_decision`): on every controller clock, +1 for `upw` and -1 for
  `dnw` go into an accumulator. When it reaches +NUM a one-cycle UP is issued; at -NUM, a DN. The
  accumulator then restarts. NUM is `num0` before lock and `num1` after. Zero-mean jitter that
  flips the detector back and forth cancels in the accumulator and never moves the code.

**Stale samples.** The controller changes the code on a controller clock edge. The sample taken
at that same edge was made with the old code. `dll_ctrl` raises `upd` in such a cycle, and the
accumulator drops that sample (`hold`) and clears. Without this, one decision would be counted
twice.

## Clocks and timing

* `clk_ctrl = clk_ref / 8` (`clk_div`) clocks `dll_ctrl`, `consec_decision` and `phase_shift_ctrl`.
  At 1.6 GHz that is 200 MHz.
* A decision needs NUM samples plus one dropped sample. Each sample is one controller cycle, and
  the detectors have settled long before the next one (8 reference periods).
* Simulated lock times from reset with `num0 = 1`: 42 controller cycles at 1.6 GHz, 50 at
  800 MHz, 164 at 200 MHz. Search time grows with the period (about `T / T_CDU` coarse steps, two
  decisions each); convergence takes 5 halvings.
* `phase_shift_ctrl` registers `code90` one controller cycle after `code360` changes. A delay
  line applies a new code to edges that enter after the change.

## What is logic and what is a model

Synthesizable RTL: `therm_decoder`, `fdu_decoder`, `consec_decision`, `dll_ctrl`, `clk_div`,
`phase_shift_ctrl` and the window multiplexer in `phase_detector`.

Behavioural models of the analog parts, for simulation only: `cdu`, `cdu_line`, `fdu`, `sapd` and
`sppd`. Anything that instantiates them is a model too: `dcps`, `dcps0`, `phase_detector`,
`master_dll` and `dll_deskew_top`. The delay models use transport delays: an edge keeps the delay
it had when it entered. Their time values are real parameters in ps. Every delay is built by
`dll_pkg::vdelay()` from fixed binary-weighted waits with 1 fs resolution, because Verilator does
not accept run-time `#(expr)` delays. All files use `timescale 1ps/1fs`.

The models are ideal. The CDU step is exactly `T_CDU` and the 32 interpolated steps are exactly
equal. There is no supply noise, mismatch or metastability. Real silicon has a coarser and less even fine
step: about 3 ps in the typical corner, where these models give 2.1 ps. That adds phase error on
top of what these models show.

## Parameters

| parameter            | default | meaning |
|----------------------|---------|---------|
| `K_MASTER` / `K`     | 12      | DCPS-360 code width (128 CDUs) |
| `K_SLAVE`            | 10      | DCPS-90 code width (32 CDUs) |
| `N_CH`               | 2       | number of pin phase shifters |
| `T_CDU`              | 67.0 ps | CDU step; use 42.2 / 113.5 ps for the fast / slow corner |
| `S_INIT`             | 32      | initial step, one CDU in fine codes |
| `DIV`                | 8       | controller clock divider |
| `NUM_W`              | 4       | width of NUM0 / NUM1 (values 1..15, 0 acts as 1) |
| `TRIM_W`             | 6       | signed per-pin trim, in fine steps |
| `sppd.T_WIN`         | 60 ps   | SPPD dead window |
| `sapd.T_PUL`         | 20 ps   | SAPD output register delay |

Range check at the defaults: one period at 200 MHz needs 2388 fine codes at 67 ps per CDU, and
3791 at 42.2 ps. Both fit in 4096. A quarter of the code is at most 1023, which fits the 10-bit
DCPS-90, and covers the 1.25 ns quarter period at 200 MHz.

## Design choices not fixed by the architecture

* The per-pin trim (signed, saturating) stands for the result of data-eye training done by the
  link controller. The architecture only says that the controller sets the pin codes from the
  master code and a phase-shift command.
* Pins are one-directional (`d_int -> d_ext`). Bidirectional pin steering and the pad buffers are
  not modelled.
* The models' intrinsic delay is `2 * T_CDU` (134 ps typical). A real shifter adds buffers,
  multiplexers and wiring, about five CDU steps in all. The loop does not depend on this as
  long as the DCPS-0 replica matches the shifter. The pins' absolute delay does include it.
* The SPPD window is modelled centred on the `clk_int` edge. In silicon its position depends on
  buffer delays and register setup/hold times.
* Detector polarity: UP means `clk_dly` was sampled low at the `clk_int` edge, DN that it was
  high. The search moves the code with these signals, convergence and lock move it against them.
* `consec_decision` uses a signed accumulator (votes in opposite directions cancel), not a run
  length that restarts on every change of direction. It is cleared after each decision and
  during code changes.
* The `hold`/`upd` handshake, the `ST_INIT` state, code saturation and the divider's counter are
  additions needed to make the loop work cycle-accurately.
* The bit order of the thermometer and interpolator enable words (stage 0 and the lowest driver
  stay on first).

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=N failures=M` line. With
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dll_deskew_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/dll_pkg.sv tb/tb_dll_deskew_top.sv -o sim
./obj_dir/sim
```

| testbench                 | what it shows |
|---------------------------|---------------|
| `tb_dll_deskew_top`       | Whole design at default parameters. Locks at 800 MHz with ±10 ps jitter, checks both pin delays against a quarter period plus trim, follows a 4 % period change while locked, then relocks at 1.6 GHz. Counts each mechanism (UP/DN search, halving, lock, locked corrections, SAPD/SPPD decisions, window-ignored samples, cancelled votes, dropped samples, trims) and fails if one never happened. Runs in a few seconds. |
| `tb_phase_variation`      | Pin-0 phase variation against reference jitter for NUM = 1, 2, 4, 8, at 200 MHz (50/150/300 ps) and 1.6 GHz (10/50/100 ps). |
| `tb_phase_error`          | 90-degree pin phase error from 200 MHz to 1.6 GHz in 200 MHz steps, with three copies of the design at the fast, typical and slow CDU step (42.2 / 67.0 / 113.5 ps). Checks lock, the lock code and the mean pin phase at each point. |
| `tb_master_dll`           | DLL alone at 1.6 GHz, 800 MHz and 200 MHz: lock code, static phase error, /8 clock. |
| `tb_dll_ctrl`             | Controller against an ideal loop model: state sequence, halving, one-period lock, saturation. |
| `tb_phase_detector`       | SAPD/SPPD selection, dead window, NUM counting, back-and-forth jitter rejection. |
| `tb_dcps`, `tb_dcps90`    | Every code of the 12-bit and 10-bit DCPS: delay, step size and monotonicity. |
| others                    | One per leaf module (`tb_cdu`, `tb_cdu_line`, `tb_fdu`, `tb_dcps0`, `tb_sapd`, `tb_sppd`, `tb_consec_decision`, `tb_clk_div`, `tb_phase_shift_ctrl`, `tb_therm_decoder`, `tb_fdu_decoder`). |

Simulated results, at the typical corner unless stated otherwise:

* Lock codes: 298-299 at 1.6 GHz (ideal 298.5) and 2388-2389 at 200 MHz (ideal 2388.1).
* Pin delay error after lock: 0.15 degrees at 800 MHz and under 0.8 degrees at 1.6 GHz. This is
  the quarter-code truncation plus the lock resolution.
* Mean 90-degree phase error over 200 MHz-1.6 GHz and the three corners: between -1.13 and
  +0.01 degrees. It is mostly negative because the quarter code is truncated, not rounded.
* With 100 ps of jitter at 1.6 GHz, the phase variation is 4.4 degrees with NUM = 1 and
  0.76 degrees with NUM >= 2.
* At 200 MHz the variation stays below 0.5 degrees for any NUM, because the SPPD window already
  absorbs jitter of that size.

These numbers come from the ideal models above, so they show the digital loop behaviour, not
silicon accuracy. For comparison, the published 90 nm implementation of this architecture
reports a worst 90-degree phase error of 2.4 degrees and a phase variation that saturates near
3.1 degrees at 1.6 GHz, mostly from interpolator non-linearity that these models do not have.
