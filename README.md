# SR-PUF: a shift-register ring-oscillator PUF

This is SystemVerilog (IEEE 1800-2017) for a physical unclonable function
built from FPGA shift-register LUTs. It also includes the measurement system
and an on-chip enrollment engine. It is based on the SR-PUF described in
"An Analysis of FPGA LUT Bias and Entropy for Physical Unclonable Functions".

## Idea

A 32-bit shift-register LUT (SRLC32E style) has 32 configuration bits, and
each bit has its own path to the LUT output. A ring oscillator is formed like
this:

- The LUT output goes through a NAND gate (the enable) and a pulse generator.
- The pulse clocks the shift register.
- The register holds an alternating 0101 pattern, and its last bit is fed
  back to its input, so every pulse toggles every bit.

The selected bit therefore changes once per trip around the ring. The delay
of the chosen path inside the LUT sets the frequency. That delay is the
entropy source.

## Structure

| Module | Role |
|---|---|
| `srpuf_pkg` | sizes: 8 macros, 16 shift registers, 32 bits, 16-bit count, 23-bit timer; address type `{x, y, z}` |
| `srl32` | shift-register LUT with the Data and Clk 2:1 MUXs (steered by Ctrl) |
| `mux4`, `mux16` | 16:1 select of the shift-register outputs, built as two levels of 4:1 |
| `lut_path_delay` | behavioural delay of the selected path (timing model) |
| `pulse_gen` | XOR of the NAND output and its copy through 5 buffers (timing model) |
| `srp_macro` | one hard macro: 16 `srl32` → `mux16` → NAND(RO_enable) → pulse generator; 512 rings |
| `ro_counter` | 16-bit counter clocked by the selected ring |
| `ro_timer` | go_reg, 23-bit timer, flag = timer < runtime, AND gate = enable window |
| `measure_unit` | pulse MUX, counter, timer, RO_enable decoder |
| `cmb_init` | state machine that scans the pattern into all shift registers |
| `srpuf_ctrl` | measurement sequencer |
| `gpio_regs` | two 32-bit GPIO words to the processor |
| `zscore_calib` | z-score calibration of a group of N values in integer arithmetic |
| `bit_enroll` | pair difference, ±2 thresholds, helper and strong bits |
| `puf_enroll` | enrollment engine: measure, calibrate, pair, threshold |
| `srpuf_top` | the whole PUF: 8 macros (4096 rings) plus the blocks above |

## Measurement sequence

A measurement of ring `{x, y, z}` (macro, shift register, bit) runs in this
order:

1. The measure unit is cleared. This clears the counter and the timer.
2. The address and runtime are latched.
3. The pattern is scanned into every shift register, with Ctrl high and 32
   CMB_clk pulses. Its phase puts a 1 on bit z, so that raising RO_enable
   produces a falling edge at the NAND output and the ring starts. A stopped
   ring leaves its pattern in an unknown phase, so the pattern is reloaded
   before every measurement.
4. Go is raised:
   - go_reg is set.
   - While the timer is below runtime, RO_enable of macro x is high and the
     counter counts pulses.
5. After a few extra cycles, which let the last edge arrive, done is raised
   and the count is valid.

With the default runtime of 512 at 100 MHz the window is 5.12 µs and the
count is about 1862. A whole measurement takes about 600 clock cycles.

## GPIO map

The processor writes `gpio_o`. There are three kinds of word:

| `gpio_o[31:30]` | Word | Fields |
|---|---|---|
| `0x` | control | `[0]` soft reset, `[1]` go (rising edge), `[4:2]` macro, `[8:5]` shift register, `[13:9]` bit, `[14]` enroll (rising edge) |
| `10` | runtime | `[22:0]` runtime (reset value 512) |
| `11` | read select | `[6:0]` result word: `[6]` = 0 for helper bits, 1 for strong bits; `[5:0]` = word number |

The processor reads `gpio_i`:

- Before any read-select word, or after a control word:
  `{n_strong[11:0], enroll_done, enroll_busy, busy, done, count[15:0]}`.
- After a read-select word: the selected 32 result bits.

## Enrollment

A rising edge on the enroll bit starts `puf_enroll`, which drives the
sequencer itself. While it runs, go requests are ignored. It has three
passes:

1. Measure each of the 4096 rings N_SAMPLES times (16 by default) and keep
   the sum.
2. For each of the 512 groups of rings at the same `(y, z)` in the 8 macros,
   compute the z-score with the sample standard deviation (divide by N−1).
   Then scale it: ROC = z·σref + μref, with σref = 46.3 and μref = 0. This
   removes the chip, design and path-length components and keeps the
   within-die part. Summing instead of averaging does not change the z-score.
3. Pair the rings and threshold each difference:
   - By default the pairs are adjacent bits `z, z+1` of the same shift
     register, giving 2048 pairs.
   - `VERTICAL=1` pairs the same ring in macros `x, x+1` instead.
   - A pair is strong if its difference is above +2 or below −2. For a strong
     pair the helper bit is 1, and the strong bit is 1 if the difference is
     positive. Weak pairs (including exactly ±2) give 0 in both.

Results are read as 64 helper words and 64 strong-bit words.

`zscore_calib` works in fixed point:

- Let d = N·v − Σv and S = Σd².
- The square root of S is computed bit-serially, with 12 fraction bits.
- A restoring divider forms |d|·σref·√(N−1) / √S.
- The ROC has 4 fraction bits and is rounded to nearest.
- With N=32 and σref=20.9 the same block computes the per-shift-register
  variant of the calibration.

## Timing models

The ring's behaviour is set by delays, so two modules are behavioural:

- `lut_path_delay` gives each of the 4096 paths a delay. It is 600 ps plus
  the sum of these parts:
  - a chip offset, within ±450 ps, so one ring's count ranges from about 1550 to
    2350 across devices;
  - an offset per shift register of each macro, within ±30 ps;
  - a bias that depends only on the bit address (0–15 slower than 16–30, and
    31 the slowest);
  - a random within-die part, within ±9 ps.

  The random parts come from a hash of `(CHIP_SEED, x, y, z)`, so each seed
  is one reproducible device. Noise is not modelled.
- `pulse_gen` carries the common ring delay, 2150 ps inside a macro (2750 ps when
  used alone), and a pulse of 5 × 120 ps.

Synthesis ignores these delays. The logic then synthesizes, but the rings do
not oscillate in a zero-delay netlist.

## Choices not fixed by the reference

- There is one pulse generator per macro. This matches the per-macro resource
  count.
- The pattern is reloaded before every measurement, and its phase is chosen
  from the bit address. The reference configures the pattern once.
- The measure unit's reset is asynchronous for the counter, which runs on the
  ring clock, and synchronous for the timer. Lint tools flag this mix.
- The GPIO bit layout, the fixed-point formats, the drain cycles at the end
  of a measurement, and treating a difference of exactly ±2 as weak are this
  design's own choices.
- The reference does calibration and bit generation in software. Here they
  are in hardware, and the single-measurement path is still available to
  software.

Not built:

- the processor;
- the alternative 3-CLB placement, which is a placement variant;
- the inter-chip Hamming distance and NIST statistics, which are offline
  analysis of bitstrings.

## Simulation

Each testbench in `tb/` checks itself and ends with a line of the form
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_srl32 \
    rtl/srpuf_pkg.sv tb/tb_srl32.sv
./obj_dir/Vtb_srl32
```

The testbenches:

- `tb_srpuf_top` runs the full-size top with default parameters. It measures
  rings through the GPIO and compares the counts with an independent
  reference model (`tb/ro_model_pkg.sv`).
- `tb_srpuf_enroll` covers single measurements, runtime changes, counter
  wrap, soft reset and a full enrollment through the GPIO. It uses 2 samples
  per ring to keep the run near one minute.
- `tb_puf_enroll` runs the engine with the default 16 samples against a
  model sequencer.
