# cell16: a QPSK/CDMA modem that slows its receiver once it is locked

A coherent QPSK receiver spends most of its work mixing every incoming
sample with a local carrier and integrating the products over a symbol.
That work is needed while the receiver is still hunting for the carrier
phase. Once it is locked and the symbols come in at full amplitude, it can
skip samples and still decide correctly. This design uses that to save
dynamic power. After lock, a small controller lowers the rate at which the
demodulator processes samples by 2 and then by 4, as long as the periods
keep reaching full value. It restores the rate when they stop doing so.

The RTL holds the whole signal chain of a small modem chip:

* a transmitter: QPSK from two switches, or four CDMA users spread with
  six-chip sequences;
* the receiver: two mixers, integrate-and-dump accumulators and a
  phase-search loop;
* the rate-lowering controller;
* a CDMA despreader;
* the LED/switch interface of an FPGA evaluation board.

All the arithmetic uses a small sign-magnitude ALU.

```
 digitalin[1:0] ──┐                         tx_phase
 user_i/q[3:0] ─ cdma_spreader ─┐              │
                                ├─ level mux ─ qpsk_modulator ── sout ──┐
 symbol_timer (sample, chip) ───┘       (cdma_mode)                     │ rx_ext_en / rx_in
                                                                        ▼
          ┌────────── pll_phase (pi/64 steps) ◀── pll_phase_search ◀─ qpsk_demodulator ─▶ idemod/qdemod
          │                                          │   (lock)          ▲  │ period_end, i/q_final
          └──────────────────────────────────────────┼───────────────────┘  ├─▶ freq_lowering_ctrl ─▶ proc_en, breakm
                                                     │                      ├─▶ cdma_despreader ─▶ corr_i/q, rx_bit_i/q
                                                     └──────────────────────┴─▶ led_display ─▶ digitalout[7:0]
```

## Number format

Every value on the data path is a 16-bit sign-magnitude word (`sm_t` in
`cell16_pkg`):

| bit | 15   | 14 … 7        | 6   | 5  | 4   | 3    | 2     | 1       | 0        |
|-----|------|---------------|-----|----|-----|------|-------|---------|----------|
|     | sign | integer bits  | 1   | .5 | .25 | .125 | .0625 | .03125  | .015625  |

So `+1.0` is `16'h0040` and `-1.0` is `16'h8040`. Adders and subtractors
work on magnitudes and decide the sign from the comparison flag
Z = |B| > |A| (`sm_addsub`):

* When A and the effective B have the same sign, the magnitudes add and A's
  sign is kept. The effective B is B with its sign flipped for a subtraction.
* Otherwise the smaller magnitude is taken from the larger. The result takes
  the sign of the operand with the larger magnitude.

A zero result is always `+0`. A magnitude overflow saturates and is flagged.
The multiplier (`sm_mult`) XORs the signs. It multiplies the magnitudes and
rounds back to six fraction bits.

`dsp_alu` puts these together with the bitwise commands, selected by a
four-bit code. The compare group also uses a four-bit function field:

| code        | operation                                  | flag           |
|-------------|--------------------------------------------|----------------|
| `0001`      | C = A − B                                  | Z = \|B\|>\|A\| |
| `1001`      | C = A + B                                  | Z = \|B\|>\|A\| |
| `0010`      | C = A AND B                                | C == 0         |
| `0011`      | C = A OR B                                 | C == 0         |
| `0101`      | C = A                                      | C == 0         |
| `0110`      | C = A × B                                  | overflow       |
| `1101 0000` | compare A == B (signed, −0 == +0)          | result         |
| `1101 0010` | compare A > B (signed)                     | result         |

The demodulator's mixers and integrators are instances of this ALU, fixed to
the multiply and add commands.

## Timing: samples, periods, chips

`symbol_timer` counts one carrier sample per clock. A symbol period is
`LONGSAMPLE` = 32 samples. In CDMA mode one period is one chip, and
`SEQ_LEN` = 6 chips make a sequence. The carrier table (`sincos_rom`) has 128
entries of π/64. With one carrier cycle per period, sample *n* sits at
carrier phase 4·*n* + offset.

The transmitter registers its output together with that sample's index,
chip number and data bits. The receiver therefore sees everything it needs
about a sample in the same cycle, one clock after the timer. In the cycle in
which the receiver processes the last sample of a period, its
end-of-period values `i_final`/`q_final` are available combinationally, with
`period_end` high. The phase search, the rate controller, the despreader and
the LED capture all act on the clock edge that ends the period. The next
period's first sample already uses the new phase and rate.

## Transmitter

`qpsk_modulator` computes `Sout = I·cos(θ + φ) + Q·sin(θ + φ)`, where φ is
`tx_phase` in π/64 steps. I and Q are levels:

* QPSK mode: ±1 from the switches, with `digitalin[1]` = I and
  `digitalin[0]` = Q.
* CDMA mode: the sums from `cdma_spreader`,
  `Σ_k d_k · c_k[chip]` over four users, where d and c are ±1. The levels lie
  between −4 and +4.

The levels and their bits are taken at the first sample of a period and held
for the whole period.

## Receiver and phase search

`qpsk_demodulator` mixes the input with cos and sin of its own carrier phase,
`4·n + pll_phase`. It sums the products over the period, restarting at
sample 0, and scales the sum by `AMPL / LONGSAMPLE` = 2/32:

```
Idemod = 2/32 · Σ s(n)·cos(θn + φr)   →  I·cos δ + Q·sin δ
Qdemod = 2/32 · Σ s(n)·sin(θn + φr)   →  Q·cos δ − I·sin δ       (δ = φt − φr)
```

A clean symbol therefore ends its period at ±1.0 on both channels when
δ = 0. The running sum is kept unscaled with six fraction bits, and the shift
is applied when it is read. The rounding error of the 32 products thus stays
below about 2/64 at the output.

`pll_phase_search` is the loop called the PLL here. It is a phase search,
not an analog PLL. At the end of every unlocked period it compares both
outputs with the symbol the receiver knows was sent, the training sequence:

* an expected +1 needs an output ≥ 61/64, which is 0.95 rounded up;
* an expected −1 needs an output ≤ −61/64.

If both channels pass, the loop locks and the phase freezes. Otherwise the
phase advances by π/64 and wraps at 2π. Testing against the known symbols
matters: at δ = ±π/2 or π both outputs reach full amplitude, but with the
wrong signs, and a magnitude-only test would lock there. A search takes at
most 128 periods. `relock` restarts it from phase 0, and `train` low holds
it. The top holds it in CDMA mode, where the chip values are not known.

## Lowering the processing rate

This mechanism is the reason for the design.

* **breakm**: the rate divider, 1, 2 or 4. The demodulator processes only
  samples with `n mod breakm == 0` (`proc_en`). It weights each processed
  product by breakm, so the integral keeps its scale. With one carrier cycle
  per period, 8 samples at π/4 spacing integrate cos² to exactly half, the
  same as 32 samples. So the output still reaches ±1.0 at breakm = 4.
* **The decision** runs in windows of `CYCLETOT` = 8 periods, and only while
  the loop is locked and `lower_en` is set. `phasecount` counts the periods
  of the window in which both |Idemod| and |Qdemod| reached 61/64. At the end
  of the window:
  * `phasecount > CORANG` (6) doubles breakm;
  * `phasecount ≤ CORANG1` (4) halves it;
  * in between, breakm is kept.

  breakm stays within 1…4. It returns to 1 whenever the loop is unlocked.
* **What it saves**: with breakm = 4 the mixers and accumulators toggle on a
  quarter of the samples. The power saving is obtained by lowering the
  processing clock, for example from 50 MHz to 20 MHz. This RTL keeps one
  clock and turns the reduction into an enable. A clock-gating cell on
  `proc_en` would turn that into a saving at the register level.

`rate_up` and `rate_down` pulse when breakm changes. A weak or noisy channel
drives breakm back down. The end-to-end test shows this by feeding a 7/8
amplitude copy of the signal through `rx_in`.

## CDMA

Four users each send one I bit and one Q bit per sequence, multiplied chip
by chip by their six-chip code. The default codes, with chip 0 as the
rightmost bit, are:

| user | code     |
|------|----------|
| 0    | `111000` |
| 1    | `001011` |
| 2    | `100110` |
| 3    | `011010` |

A code correlates with itself to 6. Any two codes correlate to ±2. With six
chips no three ±1 codes can be mutually orthogonal, so with all four users
active the other three can cancel a user's correlation completely. The bit
decision (`rx_bit_i/q`, the sign) is then arbitrary.

`cdma_despreader` multiplies each chip's `i_final`/`q_final` by the selected
user's chip (`rx_user`). It sums over the sequence and delivers `corr_i/q`
with `corr_valid` after the sixth chip. `CODES` is a parameter of both the
spreader and the despreader, and the two must match.

## Board interface

`led_display` drives the eight LEDs (`digitalout`):

* `sw_iq` (switch 3) selects Idemod (1) or Qdemod (0).
* `button` (button 1) selects bits 7…0 (0) or bits 15…8 (1). In the high
  byte, LED 7 is the sign.
* While `btn_hold` (button 2) is pressed, the LEDs show the value captured at
  the last period end. Released, they follow the running integral.

## Top-level ports (`cell16`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `reset` | in | clock (one sample per cycle); synchronous active-high reset |
| `digitalin[1:0]` | in | switch bits: [1] = I, [0] = Q of the QPSK symbol |
| `button`, `sw_iq`, `btn_hold` | in | LED byte select, I/Q select, hold |
| `digitalout[7:0]` | out | LEDs |
| `cdma_mode` | in | 0 = QPSK from the switches, 1 = four-user CDMA |
| `lower_en` | in | allow rate lowering after lock |
| `relock` | in | restart the phase search |
| `user_i[3:0]`, `user_q[3:0]`, `rx_user[1:0]` | in | CDMA user bits; user to despread |
| `tx_phase[6:0]` | in | transmit carrier phase offset, π/64 steps |
| `sout[15:0]` | out | transmitted sample |
| `rx_ext_en`, `rx_in[15:0]` | in | take the receiver input from `rx_in` instead of `sout` (same timing as `sout`) |
| `idemod`, `qdemod` | out | running integrals |
| `period_end`, `i_final`, `q_final` | out | end-of-period strobe and values |
| `lock`, `pll_phase[6:0]` | out | phase search state |
| `breakm[2:0]`, `rate_up`, `rate_down` | out | rate divider and its change strobes |
| `sat` | out | a product or sum saturated in this cycle |
| `corr_i`, `corr_q`, `rx_bit_i`, `rx_bit_q`, `corr_valid` | out | CDMA correlation and decision |

All words are in the sign-magnitude format above.

## Choices made in this RTL

The published description of the design gives the algorithms, the number
format, the ALU commands and the board wiring. It leaves a number of sizes
and details open. These are this design's choices:

* 32 samples per period, one carrier cycle per period, integrator gain 2;
* the lock threshold 0.95, rounded up to 61/64;
* the rate-lowering window of 8 periods with thresholds 6 and 4. What the
  window counts, namely periods reaching full value, is also a reading of
  the description;
* compensating skipped samples by weighting each processed one by breakm;
* the CDMA chip codes, and a user-select input on the despreader;
* sign-magnitude saturation, +0 for zero results, and round-to-nearest in
  the multiplier;
* reading `1101 0000` as "compare equal", not "move";
* the external receive input, the mode and enable pins, `relock`, the
  held/live LED view, and one synchronous reset;
* the clock-enable form of rate lowering, instead of a second, slower clock.

Some parts are not built:

* **The processor's sequencer.** This covers the program counter, jumps, and
  the memory moves `A = mem(B)` and `mem(B) = A`. The instruction table does
  not give an instruction format, and it reuses some codes. The program the
  processor runs is not available. Here the modem runs as dedicated hardware
  built from the ALU, not as software on it. The RAM/ROM and the divider that
  went with the processor are left out for the same reason. The one division
  the receiver needs, by the period length, is a shift.
* The noise generators and the Butterworth/Chebyshev band-pass filters.
  Their orders and coefficients are not known. Noisy samples can be fed
  through `rx_in`.
* The board itself: the 74HC373 LED latch, the oscillator, the PROM, the
  ports and the displays.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). It
computes its expected values on its own, from integer or real arithmetic.
Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The
end-to-end bench `tb_cell16` runs the top at its default parameters and
covers:

* a phase search from 0 to a transmit offset of 40 steps, which locks at 40;
* decoding of every locked period;
* breakm climbing to 4, with correct decoding at 4;
* a 7/8-amplitude channel bringing breakm back to 1;
* a relock at an offset of 100 steps;
* twelve CDMA sequences with random users and receiver selection;
* the LED views.

It counts each of these events and fails if one never happens. It runs in
under a second.

`tb_noise_workload` locks the loop on a clean channel. It then sends 300
periods at each of four levels of uniform white noise, added through `rx_in`:
25%, 100%, 200% and 400% of the message amplitude. It checks these results:

* there are no bit errors at 25% and 100%;
* errors never fall as the noise grows;
* the rate controller spends less time at breakm = 4 as the noise grows.

A typical run gives:

| noise | bit errors (of 600) | periods at breakm 1 / 2 / 4 |
|-------|---------------------|-----------------------------|
| 25%   | 0                   | 88 / 152 / 60               |
| 100%  | 0                   | 288 / 8 / 4                 |
| 200%  | 0                   | 300 / 0 / 0                 |
| 400%  | 24                  | 300 / 0 / 0                 |

Integrating over fewer samples at a lowered rate makes the outputs noisier.
On a noisy channel the controller therefore keeps the full rate, and the
power saving is limited to clean channels.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cell16 \
    -y rtl -y tb +libext+.sv rtl/cell16_pkg.sv tb/tb_cell16.sv -o sim
./obj_dir/sim
```

Replace `tb_cell16` with any other `tb_<module>` to run a single block.
`verilator --lint-only -Wall rtl/cell16_pkg.sv rtl/*.sv --top-module cell16`
lints the design. The remaining lint warnings are unused flag outputs of the
shared ALU and adders, and unused decode outputs of the timer.

## Changing it

* `LONGSAMPLE` must be a power of two between 4 and 128 and a multiple of 4,
  because breakm can reach 4. `CARRIER_CYCLES · 128 / LONGSAMPLE` must be a
  whole number.
* The scale of the outputs follows from `AMPL / LONGSAMPLE`. If you change
  `LONGSAMPLE`, keep `AMPL` at 2 so that a clean symbol still reaches ±1.0.
* The accumulator's 15-bit magnitude holds `LONGSAMPLE · |s|max · 64`. At 32
  samples that allows inputs up to about 16.0. Longer periods or stronger
  inputs saturate (`sat`).
* `CODES` has to be changed in both `cdma_spreader` and `cdma_despreader`.
  For more users or longer sequences, set `N_USERS`/`SEQ_LEN` on the top.
