# Digital AM modulator from two direct digital synthesizers

This design makes an amplitude-modulated sine wave entirely in logic, for an
FPGA with a 50 MHz clock and an 8-bit DAC. One direct digital synthesizer
(DDS) makes the carrier and a second one makes the modulating tone. A small
arithmetic block then combines them sample by sample:

    S_AM(i) = S_CAR(i) * [ Y + (m/100) * S_MOD(i) ]

- `m` is the modulation factor in percent, 0..100.
- `Y = 1` gives classic AM with a carrier.
- `Y = 0` suppresses the carrier, leaving double-sideband AM.

All of these can be changed while the design runs: the carrier frequency, the
modulating frequency, `m` and `Y`. The main setting is a 1 MHz carrier with a
10 kHz modulating tone.

## Block structure

```
code_f_x ─► dds_mod ──y (offset binary, to a DAC)
                 └─ sig_mod ─┐
                             ▼
code_f_y ─► dds_car ─► am_modulator ──am_s, car_s──► scaler ──► x (to DAC)
                sig_car      ▲   ▲                     ▲
             m_mod ──────────┘   └──── type_mod ───────┘
```

| module              | role                                                               |
|---------------------|--------------------------------------------------------------------|
| `am_dds`            | top level; wires the four blocks below                             |
| `dds_mod`           | modulating-tone DDS: phase accumulator, sine ROM, `-128`           |
| `dds_car`           | carrier DDS, same structure                                        |
| `phase_accumulator` | 24-bit phase register, `phase += code` every clock                 |
| `sine_rom`          | 8192 × 8 sine table, registered read                               |
| `am_modulator`      | forms `(MOD·m/100)·CAR/127` and the switchable carrier term        |
| `scaler`            | adds the two terms, halves the sum when a carrier is present, `+128` |
| `am_pkg`            | shared widths, constants and signed sample types                   |

There is one clock domain. The only reset is `reset_dds`. It clears both phase
accumulators asynchronously, so both waves restart together at phase 0.

## Frequency programming

Each DDS adds its frequency code to a 24-bit phase accumulator on every clock.
The top 13 bits of the phase (`phase[23:11]`) address the sine table, so the
output frequency is

    f = code · F_CLK / 2^24        (step 50 MHz / 2^24 = 2.98 Hz)

| wanted frequency | code        | actual frequency |
|------------------|-------------|------------------|
| 10 kHz (tone)    | 3355        | 9 998.6 Hz       |
| 1 MHz (carrier)  | 335544      | 999 999 Hz       |
| 10 MHz           | 3355443     | 10.0 MHz         |
| lowest, ~3 Hz    | 1           | 2.98 Hz          |

Codes up to `2^23` (25 MHz, the Nyquist limit) make sense. Codes above it alias.

## Number formats through the datapath

The arithmetic is the hardest part to follow. Every stage is fixed-point
integer math, and the constants were chosen to keep each word within its
width.

1. **Sine table.** Entry `k` holds `128 + round(127·sin(2πk/8192))`. These are
   unsigned values from 1 to 255 in offset binary, with 128 as zero. The table
   is computed by a loop in an `initial` block, so no data file is needed.
2. **Offset removal.** Each DDS subtracts 128, which gives a signed sample
   in −127..127 (`sig_mod`, `sig_car`). The modulating DDS also brings out the
   raw table value as `y`, so the tone can be shown on a second DAC.
3. **Modulation depth.** `p1 = MOD × m` is a signed 16-bit product.
   `q1 = p1 / 100` is MOD scaled by m percent, still in −127..127.
4. **Product term.** `p2 = q1 × CAR` is a signed 24-bit product of up to
   ±16 129. `am_s = p2 / 127` brings it back to the carrier's scale, so
   `|am_s| ≤ |CAR|`.
5. **Carrier term.** `car_s` is CAR, delayed and sign-extended to 24 bits,
   when `type_mod = 1`. It is 0 when `type_mod = 0`.
6. **Scaler.**
   - With a carrier, `am_s + car_s = CAR·(1 + m·MOD)` reaches twice the
     carrier amplitude, so the sum is halved. The output is
     `x = 128 + (am_s + car_s)/2`, and its carrier line is 63.5 LSB.
   - Without a carrier, the product term already fits, so
     `x = 128 + am_s` and the signal uses the full ±127 range.
   - `x` is the low 8 bits of the 24-bit result.

All divisions truncate toward zero. The table's peak is 127 rather than 127.5,
so it never holds the code for −128. This bounds the result in both modes to
1..255: the output never wraps, even at m = 100 %.

`m_mod` enters a signed multiplier, so it must stay at or below 127. The
intended range is 0..100. Values above 100 overmodulate: the envelope folds
through zero.

## Timing

Changing the frequency takes effect on the next clock edge. There is no
phase jump, because the accumulators keep their phase. The pipeline is:

| path                              | clocks from input to `x` |
|-----------------------------------|--------------------------|
| phase → table sample (`y`)        | 1 (ROM register)         |
| carrier sample → `x`              | 2                        |
| modulating sample, `m_mod` → `x`  | 3                        |
| `type_mod` → `x`                  | 0 (selects the carrier term and the halving combinationally) |

A carrier sample reaches the product term and the carrier term on the same
clock edge. This keeps the carrier line and the sidebands in phase. After
`reset_dds` is released, the `x` sample taken after clock edge `j` is built
from two inputs:

- the carrier table entry for phase `(j−3)·code_f_y`;
- the tone table entry for phase `(j−4)·code_f_x`.

`x` is combinational from the modulator's registers. There is no output
register, so add one if the DAC needs a registered input.

## What follows the original design and what is new here

These parts follow the original design:

- the block split;
- 24-bit accumulators addressing the ROM by `phase[23:11]`;
- the 8192 × 8 ROM;
- subtracting 128 after the ROM;
- the multiply / divide-by-100 / multiply / divide-by-127 chain;
- the carrier term made by multiplying by 1 twice, followed by a
  carrier/zero multiplexer;
- the scaler: adder, divide by 2 only when a carrier is present, `+128`,
  low 8 bits out;
- the 50 MHz single clock and the frequency codes.

These are this design's own choices:

- **Multiplier pipeline depths.** The original design uses clocked
  multipliers but does not give their latency. Here the MOD × m multiplier and
  the two "× 1" stages have one register each. The q1 × CAR multiplier has
  two, so that the carrier and product terms line up. With one register
  instead of two, the carrier term would lead the sidebands by one sample:
  7.2° at 1 MHz.
- **Sine table values.** The original only requires values within 0..255.
  The table here is symmetric, 1..255.
- **Rounding.** All divisions truncate toward zero.
- **Reset.** The asynchronous clear is active high. It clears only the phase
  accumulators. The ROM and modulator registers have no reset and hold valid
  data three clocks after their inputs do.

## Outside the RTL

The 50 MHz oscillator, the DAC that turns `x` (and `y`) into a voltage, and
the reconstruction low-pass filter are analog parts on the board. They are
not modelled. `x` and `y` are plain 8-bit offset-binary ports. FPGA pin
assignments are also left to the user.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_phase_accumulator` | modulo-2^24 running sum under random codes, including 0 and all-ones; asynchronous clear between edges; wrap-around |
| `tb_sine_rom`          | all 8192 entries against the formula; one-clock read latency; zero levels and peaks |
| `tb_dds_mod`           | every sample against the phase model; `sig_mod = y − 128`; measured period 5000.75 clocks for code 3355 (10 kHz) and 5.0 for code 3355443 (10 MHz) |
| `tb_dds_car`           | every sample for codes 335544 (1 MHz, period 50.0) and 671089 (2 MHz) |
| `tb_am_modulator`      | random and extreme inputs every clock against the integer model, with the pipeline alignment above |
| `tb_scaler`            | every carrier value × a sweep of product terms in both modes, plus random 24-bit words |
| `tb_am_dds`            | the whole design at full size (see below) |

`tb_am_dds` runs the top level at its default sizes with a 1 MHz carrier and
a 10 kHz tone. It steps through AM with carrier at m = 0, 30, 60, 100 %, then
the carrier suppressed at m = 100, 30, 0 %, then with carrier again at
m = 50 %. Each setting runs for 15 000 clocks. It checks the design in three
ways:

- **Exact output.** Every sample is compared with an independent model.
- **Envelope.** The per-carrier-period peak of `|x−128|` gives the modulation
  factor `m = (Umax−Umin)/(Umax+Umin)·100`. The measured values are 0.0,
  30.2, 60.3, 100.0 and 49.6 %.
- **Spectrum.** A Hann-windowed correlation at `f_CAR` and `f_CAR ± F_MOD`
  measures the sidebands. With a carrier they are m/2 of the carrier line
  (0.146, 0.297, 0.500). Without a carrier the carrier line is 0.01 LSB,
  against 63.2 LSB sidebands.

It also counts each mechanism and fails if any never happened: both carrier
types, switching between them, m = 0 and m = 100, wrap-around of both
accumulators, and the reset. The whole run takes well under a second of
simulation time.

Running one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl rtl/am_pkg.sv \
          tb/tb_am_dds.sv --top-module tb_am_dds -Mdir obj_tb_am_dds
./obj_tb_am_dds/Vtb_am_dds
```

Lint a module with `verilator --lint-only -Wall -y rtl -Irtl rtl/am_pkg.sv rtl/am_dds.sv`.
Lint reports two kinds of "unused" warnings, and both are expected:

- The low 11 phase bits are unused, because the table is addressed by the
  top 13 bits only.
- The upper bits of the scaler's 24-bit word are unused, because only the
  low byte drives the DAC.

## Changing the design

- **Phase or table size.** `PHASE_W` and `ROM_AW` are parameters of
  `am_dds`, `dds_mod`, `dds_car`, `phase_accumulator` and `sine_rom`. A wider
  phase accumulator gives finer frequency steps. A larger table gives lower
  phase-truncation spurs.
- **Constants.** The divisors (100, 127, 2), the offset 128 and the internal
  word widths are in `am_pkg`. If the sample width changes, revisit the
  divide-by-127 and the output range argument above.
