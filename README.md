# QAM-16 modulator on a quadrature direct digital synthesizer

This design produces a 16-QAM signal entirely in digital logic. It is meant
for an FPGA clocked at 50 MHz that drives an 8-bit DAC. A quadrature direct
digital frequency synthesizer (QDDFS) makes a sine and a cosine carrier. Each
4-bit data symbol picks an in-phase level I and a quadrature level Q from
{-3, -1, +1, +3}. The output sample is

    out = (Q * sin(2*pi*f*t) + I * cos(2*pi*f*t)) / 5 + 128

which is an 8-bit offset-binary value ready for the DAC. The carrier
frequency is set by a 32-bit frequency code. With the default code,
85899346, it is 1 MHz. The 16 symbols give three amplitudes and twelve
distinct phases.

```
 bit_in ─► serial_to_parallel ─► symbol[3:0]
 bit_valid          │
                    ▼
               qam_constant ──► I (from symbol[1:0]), Q (from symbol[3:2])
                                   │              │
      CODE_F ─► qddfs ─ cos_out ─► signed_mult ──►│ I*cos
                      ─ sin_out ─► signed_mult ──►│ Q*sin
                                                  ▼
                                   qam_sum: (Q*sin + I*cos)/5 + 128
                                                  │
                                      qam_sum[15:0], qamk = qam_sum[7:0] ─► DAC
```

`sin_out` is also a port. In the original board set-up it drove a second
DAC, so the carrier could be viewed next to the modulated signal.

## The quadrature synthesizer (`qddfs`, `phase_acc`, `wave_rom`)

**Phase accumulator.** On every clock, a 32-bit unsigned register adds the
frequency code L and wraps modulo 2^32. The output frequency is

    f = L * F_CLK / 2^32,   L = f * 2^32 / F_CLK

At 50 MHz, one code step is 0.0116 Hz. A 1 MHz carrier needs L = 85899346,
which gives 999 999.99 Hz and 50 clocks per period. Useful codes reach
2^31 (25 MHz, the Nyquist limit). Above about F_CLK/4 the samples need the
analog reconstruction filter to look like a sine. `rst_n` clears the
accumulator asynchronously. It is active low.

**Tables.** The top 13 accumulator bits, phase[31:19], address two
8192 × 8 tables in parallel. Entry i of the sine table is

    INT[127 * sin(360° * i / 8192)] + 128

Here INT truncates toward zero. The cosine table is the same with cos. The
offset of 128 lets the tables hold unsigned values (1 … 255). A registered
subtractor then removes it again, so `sin_out` and `cos_out` are
two's-complement samples in −127 … +127.

**How the table contents are made.** No data file is used. `wave_rom`
computes its contents in an `initial` block, with integer arithmetic only,
so synthesis tools can evaluate it as a memory initialiser:

1. The step angle d = 2π/8192 is formed in Q62 fixed point from a 128-bit
   constant round(π·2^125).
2. sin(d) and cos(d) are summed as Taylor series in Q62, on 128-bit
   variables.
3. The first quadrant comes from the Chebyshev recurrence
   s[k+1] = 2·cos(d)·s[k] − s[k−1]. s[0] = 0 and s[2048] = 1 are set
   exactly.
4. Each value is scaled by 127, truncated toward zero, offset by 128 and
   written to four symmetric places. For the cosine table the places are
   shifted by a quarter turn.

The recurrence error stays near 1e-11 of full scale. The nearest any entry
of 127·sin comes to an integer boundary is about 2e-5, so no truncated entry
can change. The table testbench compares all 16384 entries against the
real-valued formula.

**Latency.** Three registers sit in the path: the accumulator, the ROM
address register (synchronous-address block RAM) and the offset subtractor.
`sin_out` and `cos_out` at a given edge therefore belong to the accumulator
value of two clocks earlier. Only the accumulator is reset. With `rst_n`
held low for two clocks or more, the outputs settle at phase 0
(sin = 0, cos = 127).

## Constellation (`qam_constant`)

Two 4-to-1 multiplexers select the levels as 8-bit two's-complement
constants:

| bits | I from symbol[1:0] | Q from symbol[3:2] |
|------|--------------------|--------------------|
| 00   | +3                 | +3                 |
| 01   | +1                 | −3                 |
| 10   | −3                 | +1                 |
| 11   | −1                 | −1                 |

The full map, with symbol → (I, Q) and the phase atan2(Q, I) of the
resulting carrier:

| symbol | I, Q   | phase  | symbol | I, Q   | phase  |
|--------|--------|--------|--------|--------|--------|
| 0000   | +3, +3 | 45°    | 1000   | +3, +1 | 18.4°  |
| 0001   | +1, +3 | 71.6°  | 1001   | +1, +1 | 45°    |
| 0010   | −3, +3 | 135°   | 1010   | −3, +1 | 161.6° |
| 0011   | −1, +3 | 108.4° | 1011   | −1, +1 | 135°   |
| 0100   | +3, −3 | 315°   | 1100   | +3, −1 | 341.6° |
| 0101   | +1, −3 | 288.4° | 1101   | +1, −1 | 315°   |
| 0110   | −3, −3 | 225°   | 1110   | −3, −1 | 198.4° |
| 0111   | −1, −3 | 251.6° | 1111   | −1, −1 | 225°   |

The output is A·sin(ωt + θ), with A = √(I² + Q²) ∈ {√2, √10, √18} and
θ = atan2(Q, I).

## Scaling to the DAC (`signed_mult`, `qam_sum`)

Two combinational signed 8 × 8 multipliers form Q·sin and I·cos as 16-bit
values. `qam_sum` adds them, divides by 5 (signed, truncating toward zero)
and adds 128. The largest possible sum is 3·127·√2 ≈ 539. After scaling the
output stays within 20 … 236, inside the DAC's 0 … 255. An assertion in the
top checks this on every clock. Peak output amplitudes, in LSBs around 128,
are about 108, 80 and 36 for the three rings.

A single divisor of 5 keeps the three rings in their true 3:√5:1 amplitude
ratio. The divisor is a parameter (`SCALE_DIV`). It must stay at 5 or more to
keep the output within 8 bits (539/d ≤ 127 needs d ≥ 4.25).

## Symbol input (`serial_to_parallel`)

The data arrive serially on `bit_in`. Each clock with `bit_valid` high
samples one bit, and the first bit of a group becomes symbol bit 3. On the
edge that samples the fourth bit, the group is copied to `symbol`, and
`symbol_strobe` pulses for one clock. The symbol then holds until the next
group is complete. The multiplier and sum path is combinational, so `qamk`
switches to the new constellation point on that same edge. The phase stays
continuous, because the carrier keeps running. With the carrier at 1 MHz
and data at 4 kbit/s, each symbol lasts 1000 carrier periods, i.e. a 1 kHz
symbol rate.

## Parameters and ports

| module | parameter | default | meaning |
|---|---|---|---|
| `qam16_modulator` | `CODE_F` | 85899346 | frequency code (1 MHz at 50 MHz) |
| `qam16_modulator` | `SCALE_DIV` | 5 | divisor in the sum block |
| `qddfs` | `ACC_W`, `ADDR_W`, `SAMPLE_W` | 32, 13, 8 | accumulator, table address and sample widths |
| `wave_rom` | `ADDR_W`, `DATA_W`, `WAVE` | 13, 8, `WAVE_SIN` | table size and which function it holds |
| `serial_to_parallel` | `BITS` | 4 | bits per symbol |
| `qam_sum` | `W`, `SCALE_DIV`, `OFFSET` | 16, 5, 128 | arithmetic width, divisor, DAC offset |

The top-level ports are `clk`, `rst_n`, `bit_in`, `bit_valid`, `symbol`,
`symbol_strobe`, `sin_out`, `cos_out`, `qam_sum` (16-bit sum-block result)
and `qamk` (its low 8 bits, for the DAC). Shared types and constants are in
`qam16_pkg`.

The design stores 2 × 65536 bits of ROM. It also has about 60 flip-flops
outside the memories, one constant divider and two 8 × 8 multipliers.

## Interpretation and choices

These points follow from the original design's description:

- The carrier pairing is I·cos + Q·sin, from the defining equation and the
  as-built schematic. One conceptual drawing of the original labels the
  products the other way round (Q·cos, I·sin). Swapping them would mirror
  the constellation about the 45° line.
- INT in the table formula is read as truncation toward zero.
- The as-built original takes the two bit pairs from switches. This design
  follows the block diagram instead and puts a serial-to-parallel converter
  in front.

These are this design's own choices:

- The serial bit order (first bit = MSB).
- The `bit_valid` strobe and the reset of the converter.
- Truncation toward zero in the divide-by-5.
- Computing the tables in logic instead of loading a memory file.

These parts are not included:

- The original synthesizer also divides the sine table output by 2 onto a
  spare output. Nothing uses that output, so it is left out.
- The per-symbol scale factors (5, 4, 2 for the three rings) are listed in
  the original's symbol table but are not used by its hardware. The hardware
  divides every symbol by 5, and so does this design.
- The DACs, the reconstruction low-pass filters and the 50 MHz oscillator
  are analog or board parts. Their digital sides are `sin_out` and `qamk`,
  and the `clk` input.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_phase_acc` | wrap-around accumulation against a model, asynchronous clear |
| `tb_wave_rom` | all 8192 sine and cosine entries against the real-valued formula, hand-worked points, one-clock latency |
| `tb_qddfs` | every sample against the formula with two-clock latency, 1 MHz (100 periods in 5000 clocks), 90° lead of the cosine, random codes, 10 MHz and 25 MHz, reset |
| `tb_qam_constant` | all 16 symbols against the constellation table |
| `tb_signed_mult` | all 65536 operand pairs |
| `tb_qam_sum` | all level × sample combinations (sampled) and random inputs, rounding toward zero |
| `tb_serial_to_parallel` | 300 random symbols with random gaps in `bit_valid`, strobe timing, hold, reset |
| `tb_qam16_modulator` | the whole modulator at default parameters (see below) |

`tb_qam16_modulator` runs the top with no parameter overrides. It sends all
16 symbols, then four random ones, then resets in mid-stream and sends
one more, at a 1 kHz
symbol rate: 1.15 million clocks, about one second of simulation. On every
clock it compares `qamk` with an independent model. For each symbol it
correlates the output with ideal carriers and checks the results against the
constellation table:

- the phase, within 1.5° (the measured error is at most 0.2°);
- the amplitude, within 3 % of 127·A/5 (the measured error is about −1.3 %,
  from the truncated tables);
- 1000 carrier periods per symbol.

It fails if any of these never occurred: a symbol update, each of the 16
symbols, each amplitude ring, an accumulator wrap, a reset.

To run a testbench with plain Verilator (5.x), from the project root:

```
verilator --binary --timing --assert -Irtl rtl/qam16_pkg.sv tb/tb_qam16_modulator.sv \
          --top-module tb_qam16_modulator -Mdir obj_top
./obj_top/Vtb_qam16_modulator
```

Replace the testbench name to run another one. `-Irtl` lets Verilator find
each module in `rtl/<module>.sv`. For lint only:
`verilator --lint-only -Wall -Irtl rtl/qam16_pkg.sv rtl/qam16_modulator.sv`.
