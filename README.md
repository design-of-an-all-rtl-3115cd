# All-digital phase-locked loop in the style of the 74xx297

This RTL locks a square-wave output `v2` to a reference bit stream `v1`, in
both frequency and phase, using only counters and gates. It has no analog
filter and no voltage-controlled oscillator. The structure is the one of the
74xx297 digital PLL part:

```
           +--------------------------- adpll_297 ----------------------------+
 v1 -sync->| phase detector --DN/UP--> K counter --CARRY/BORROW--> ID counter |--IDout--+
           | (EXOR or JK)              (loop filter)               (DCO)       |         |
           +------^------------------------------------------------------------+         |
                  |                                                                      |
                  +------------------------ v2' <-- divide-by-N counter <----------------+
```

The whole loop runs on one clock `clk`, which acts as both the K clock and
the ID clock. With `clk = 2*N*fo` the output free-runs at `fo`. The
reference setting is `clk` = 10 MHz, N = 16 and K = 8, which gives:

| quantity | formula | value |
|---|---|---|
| centre frequency | fo = clk / (2N) | 312.5 kHz |
| hold range | Δf_max = fo·M / (2·K·N) = fo / K (M = 2N) | ±39.0625 kHz (273.4 … 351.6 kHz) |
| frequency resolution | Δf = 2·fo / (K·N) | 4.883 kHz |

## How the loop corrects itself

**Phase detector.** The EXOR detector (`exor_pd`) outputs `v1 XOR v2'`. Its
duty cycle rises from 0 % with the inputs in phase to 100 % in antiphase. The
loop settles where `v2'` leads `v1` by about a quarter period, which gives
50 % duty at `fo`. The duty moves towards 0 % or 100 % as the input frequency
approaches either edge of the hold range. The edge-controlled detector
(`jk_pd`) is also provided. A rising edge of `v1` sets it and a rising edge
of `v2'` clears it. `adpll_top` selects it with `pd_sel = 1` and then feeds
its Q-bar to DN/UP. With Q instead, the loop chatters at the detector's wrap
point, and the top-level test catches that.

**K counter (loop filter).** `k_counter` holds two binary counters. The
up counter runs on every clock while DN/UP is low. The down counter runs on
every clock while DN/UP is high. CARRY and BORROW are the bits of those
counters with a period of K counts. So each output has one falling edge per K
clocks spent in its direction. The rate of corrections is therefore
`(1 - 2·duty) · clk / K`. This integrate-and-dump averaging is all the loop
filtering there is. A larger K gives a narrower hold range and smaller
corrections.

**ID counter (oscillator).** This is the part that is hardest to picture.
The toggle flip-flop in `id_counter` changes state on every clock, and
`id_out` is high during each clock in which the flip-flop is 0. Left alone,
`id_out` therefore pulses every second clock (`clk/2 = N·fo`). A CARRY falling
edge (an *increment*) holds the flip-flop at 0 for one extra clock. The next
slot is then a pulse too, so a pulse is **added**. A BORROW falling edge (a
*decrement*) holds it at 1, so a pulse is **removed**. Either way, the pulse
train shifts by one clock, which is half an `id_out` period. This
half-period step is the source of the factor 2 in `Δf_max = fo·M/(2KN)`:

```
clk      _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
toggle    0   1   0   1   0   0   1   0      <- increment held it at 0
id_out   ‾‾‾|___|‾‾‾|___|‾‾‾‾‾‾‾|___|‾‾‾     <- pulse added (two clocks high)
```

A request waits at most one clock, until the flip-flop is in the state in
which it can act. An increment and a decrement that are outstanding together
cancel. `inc` and `dec` are one-clock strobes that mark each applied
correction.

**Divide-by-N counter.** `n_divider` counts the clocks in which `id_out` is
high and outputs the bit with a period of N counts as `v2'`, a 50 % square
wave. It counts high clocks, not rising edges, because an added pulse merges
with its neighbour into one two-clock pulse. The effect is the same as the
part's output, where the pulses stay separate.

**One correction in output terms.** A shift of one clock is 1/(2N) of a `v2`
period, which is 11.25° for N = 16. This is the phase-jitter step of the
loop. At `fo` the loop sits still. Off centre it dithers by about two steps.

## Control codes

Both moduli are powers of two, selected by small codes (`adpll_pkg`):

| input | meaning | range |
|---|---|---|
| `k_ctrl[3:0]` | K = 2^(k_ctrl+2); 0 stops the K counter (free-running oscillator) | 8 … 131072 |
| `n_ctrl[2:0]` | N = 2^(n_ctrl+2) | 4 … 512 |

So `k_ctrl = 1` gives K = 8, and `n_ctrl = 2` gives N = 16. The K encoding is
the 74xx297's. Using the same rule for N is a choice of this design.

## Files

| file | block |
|---|---|
| `rtl/adpll_pkg.sv` | widths and modulus decoding |
| `rtl/exor_pd.sv` | EXOR phase detector |
| `rtl/jk_pd.sv` | edge-controlled (JK) phase detector |
| `rtl/k_counter.sv` | K counter, the loop filter |
| `rtl/id_counter.sv` | increment/decrement counter, the DCO |
| `rtl/adpll_297.sv` | the 74xx297 equivalent: both detectors, the K counter and the ID counter |
| `rtl/n_divider.sv` | divide-by-N feedback counter |
| `rtl/adpll_top.sv` | the complete loop: input synchronizer, core, divider and DN/UP selection |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

### Top-level interface (`adpll_top`)

| port | dir | meaning |
|---|---|---|
| `clk` | in | K clock = ID clock = 2N·fo |
| `rst` | in | synchronous, active high |
| `k_ctrl`, `n_ctrl` | in | modulus codes (see above). They may change at any time, and the loop re-acquires. |
| `pd_sel` | in | 0: EXOR detector drives DN/UP; 1: JK detector |
| `v1` | in | reference, asynchronous. It passes through a two-flop synchronizer. |
| `v2` | out | locked output v2' |
| `id_out`, `xor_out`, `jk_q`, `dn_up`, `carry`, `borrow`, `toggle_ff`, `inc`, `dec` | out | internal signals for observation |

Every output except `xor_out` comes straight from a flip-flop. `xor_out`,
and through it `dn_up`, is combinational from two flip-flops. The logic is
small: about 55 flip-flop bits, most of them in the two 17-bit K counters.
Those counters are sized for the largest K.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module adpll_top_tb \
          rtl/adpll_pkg.sv tb/adpll_top_tb.sv
./obj_dir/Vadpll_top_tb
```

Use the same command for any other `<module>_tb`. `adpll_top_tb` runs the
full design at its real setting, with a 10 MHz clock, N = 16 and K = 8, in a
few seconds. A 32-bit phase accumulator generates `v1`. The testbench checks
the following:

- Lock at fo, fo ± 20 kHz and fo ± 35 kHz. Lock means equal `v1` and `v2`
  edge counts (±1) over 2 ms after 2 ms of settling.
- No lock at fo ± 50 kHz.
- A 0.5 kHz sweep from reset finds the lock edge within 37 … 41.1 kHz of fo
  on both sides.
- A slow ramp away from lock finds the hold-range edge within the same
  bounds.
- EXOR duty of 35 … 65 % at fo.
- Jitter of at most two clocks at fo.
- Lock-in under 1 ms.
- K = 16 halves the range.
- N = 8 doubles fo. Its hold range lies within 60 … 82.2 kHz.
- The JK detector locks steadily.
- `k_ctrl = 0` leaves the oscillator free-running at exactly fo.

It also counts pulse additions, removals, modulus changes, detector switches
and resets, and fails if any of them never happened. Typical results:

| measurement | this RTL | formula |
|---|---|---|
| lock edge from reset | +37.5 / −37.5 kHz (0.5 kHz steps) | ±39.06 kHz |
| hold range (slow ramp from lock) | +37.70 / −37.65 kHz | ±39.06 kHz |
| hold range with N = 8 (fo = 625 kHz) | +71.9 / −63.6 kHz | ±78.13 kHz |
| EXOR duty at fo / fo+20 kHz / fo−20 kHz | 50 % / 24 % / 75 % | 50 % at centre |
| phase jitter at fo / fo+20 kHz | 0 / 2 clocks (0° / 22.5°) | steps of 11.25° |
| settling after reset at fo | 77 clocks (7.7 µs) | — |

The lower-level testbenches check each block against an independent model:

- exhaustive tests and duty cycles for the detectors;
- exact CARRY/BORROW edge counts for several K;
- the pulse add/remove pattern, its latency and its bookkeeping for the ID
  counter;
- the divider period for every N;
- the open-loop correction rates of the core, f_clk/K.

## Where this design makes its own choices

The part's description fixes the block diagram and the loop formulas, but
not the following. Each was decided here:

- **One clock.** The K clock and the ID clock are the same signal. Every
  configuration this loop targets uses M = 2N, where the two are equal. A
  design that needs M ≠ 2N would need a second clock domain, or a clock
  enable on the K counter.
- **Synchronous pulse slots.** The real part gates its IDout pulses with the
  ID clock. Here `id_out` is a registered level, and the divider treats it as
  a count enable. This is the reason adjacent pulses merge.
- **Which edges act.** The ID counter reacts to the falling edges of
  CARRY/BORROW, which is when a counter wraps. The JK detector reacts to
  rising edges of its inputs. Simultaneous opposite corrections cancel.
- **Reset.** Every register resets synchronously to zero on `rst`.
- **Input synchronizer.** There are two flip-flops on `v1`. They add two
  clocks of delay, which the loop absorbs into its phase offset.
- **N encoding.** The power-of-two code described above.

## Known differences from the reference measurements

- **Lock edge.** In simulation, lock is lost about 37.7 kHz from fo, against
  the calculated 39.06 kHz. At the very edge the EXOR duty must reach 0 % or
  100 %. Every correction moves `v2` by a whole clock, which leaves slivers of
  EXOR output even at the extreme phase. The full correction rate
  `clk/K` is therefore never quite reached. The shortfall grows as N shrinks,
  because each correction is then a larger part of the output period. With
  N = 8, one clock is 22.5° of the output period. The measured hold range
  there is +72 / −64 kHz, against the calculated 78 kHz, and it is
  asymmetric. A removed pulse lengthens the high or low phase of `v2'`, while
  an added pulse shortens it.
- **Settling time.** The loop settles within tens of clocks of reset. Hardware
  measurements of the original loop quote a lock-in period of hundreds of
  microseconds, and how that figure was measured is not known. The testbench
  only bounds the lock-in time at 1 ms.
- **The high-frequency setting.** The 100 MHz setting (M = 16, N = 8, K = 8)
  gives a hold range of fo/K = 781 kHz at fo = 6.25 MHz. Published figures of
  1.56 MHz and 390.6 kHz for that setting would need K = 4. This encoding
  cannot set K = 4, because its smallest K is 8.
- **Timing.** Whether the logic closes timing at 100 MHz depends on the target
  device, and has not been checked.
