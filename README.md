# 16-APSK carrier-phase and symbol-timing synchronizer

This RTL takes real IF samples of a 16-APSK telemetry signal. The signal is
sampled at 93 1/3 MHz, with the IF at a quarter of the sample rate. The RTL
turns these samples into the soft bits (LLRs) of the LDPC codewords the
signal carries.

Between the two ends sit two interlocked phase-locked loops:

- **Timing loop.** It finds the symbol instants with a polynomial
  interpolator. No sample clock is adjusted.
- **Carrier loop.** It removes the carrier phase by rotating every sample.

A 256-bit sync marker at the head of each frame has two uses:

- It resolves the 30° ambiguity that the 12-fold symmetry of the 4+12-APSK
  constellation leaves in the carrier loop.
- It marks frame boundaries, so the marker's own soft bits can be removed
  before decoding.

The design follows the FPGA receiver in the thesis *An FPGA Implementation
of Carrier Phase and Symbol Timing Synchronization for 16-APSK*. It
implements the whole receiver between the ADC and the host link. Where the
thesis leaves a detail open, this code makes its own choice. Those choices
are listed in the last sections.

## Signal path

```
              125 MHz                         |            400 MHz
ADC ─► if_to_bb ─► matched_filter ─► ccw_cordic ─┼─► farrow_interp ─► apsk_decision ─► zc_ted ─► filter_and_counter
        (fs/4 mix)  (257 taps, ÷16)   (rotate by  │        ▲   (mu)        │                          │ strobe, mu
                                      −θ̂)        │        └───────────────┼──────────────────────────┘
                       ▲ θ̂ (Q3.12)               │                         ▼
                       └─────────────────────────┼──────────── filter_and_dds ◄─ ml_ped
                                                  │               ▲ m·30°
decisions ──────────────────────────────────────►│ asm_detector ──┘
interpolants at symbol time ────────────────────►│ llr_calc ─► output_controller ─► LLR write port
```

`apsk_sync_top` wires these together.

### Front end (slow clock)

**`if_to_bb`.** Because the IF is fs/4, mixing to baseband needs no
multiplier. Input sample k goes out as:

| k mod 4 | output (I, Q) |
|---|---|
| 0 | (s, 0) |
| 1 | (0, −s) |
| 2 | (−s, 0) |
| 3 | (0, s) |

**`matched_filter`.** A 257-tap square-root raised-cosine (SRRC) filter on
each rail. It keeps every 16th output, which leaves two samples per symbol
(N = 32 samples per symbol).

**`ccw_cordic`.** An 11-iteration CORDIC turns each filtered sample by −θ̂.

### Fast domain

The fast domain runs both loops on the stream of two-samples-per-symbol
values. Each incoming sample produces one interpolant.

## The timing loop

The loop controls the interpolator through two values:

- **strobe**: this interpolant is a symbol instant;
- **mu**: the fractional delay, in unsigned Q0.16.

**`farrow_interp`** is a four-point piecewise-parabolic interpolator in
Farrow form, with α = 1/2. With the four newest samples d0 (newest) to d3:

```
v2 = ½(d0 − d1 − d2 + d3)
v1 = ½(−d0 + d1 + d2 − d3) + d1 − d2
v0 = d2
y  = (v2·mu + v1)·mu + v0
```

v2, v1 and v0 depend only on stored samples, so they are registered as soon
as a sample arrives. Only the two multiplications by mu wait for the loop.
The interpolant leaves three fast cycles after its sample.

**`apsk_decision`** runs on strobed interpolants only. It makes the
maximum-likelihood decision over the four first-quadrant points, using |I|
and |Q| and the metric ⟨|r|, a⟩ − |a|²/2. The signs of I and Q supply the
two low label bits.

**`zc_ted`** is the zero-crossing timing error detector:
e = Re{x_mid · conj(â(k−1) − â(k))}. Here x_mid is the interpolant halfway
between two symbols. When x_mid arrives, the detector fills a 16-entry table
with the error for every possible next decision. When that decision arrives
one sample later, the error is a table lookup. A mid-symbol interpolant also
produces an error of zero, so the counter advances on every sample.

**`filter_and_counter`** contains two parts:

- **`ppi_loop_filter`**, a proportional-plus-integral filter. It stores only
  K1+K2 and K2: v = (K1+K2)·e(k) + K2·Σe(i<k).
- **`interp_control`**, a modulo-1 down-counter: η ← (η − ½ − v) mod 1.
  - A borrow (the sign bit) is the strobe.
  - The modulo is done by clearing the two integer bits.
  - mu is taken as 2η, a bit selection instead of the division η/(½+v). It
    saturates just below 1.
  - η − ½ is precomputed, so the update is one subtraction once v arrives.

The whole loop, from a sample entering the fast domain to the next
strobe/mu, is seven fast cycles (17.5 ns). The budget is 128 ns, the time
for 16 samples at 125 MHz.

## The carrier loop and its half-symbol lag

**`ml_ped`** computes e = y′·âI − x′·âQ (Im{r·conj(â)}) from the decided
point and the same strobed interpolant.

The carrier loop cannot close within one sample. Its path is: filter,
accumulator with a ±π wrap, crossing back to the slow clock, 12-stage
CORDIC. So it is deliberately pipelined by half a symbol. **`filter_and_dds`**
holds the phase error until the next sample enters the fast domain (`start`).
Only then does it run the loop filter and the accumulator (`phase_dds`).

**`phase_dds`** accumulates θ̂ in Q3.28 and wraps it into [−π, π] with one
add or subtract of 2π. The top 16 bits (Q3.12) go back to the rotator.

### Sign conventions

These are the easiest thing to get wrong when changing the design:

- The rotator turns samples by **−θ̂**. With the detector above and the
  positive carrier gains, this is negative feedback: θ̂ converges to the
  channel's phase offset. If you feed +θ̂, the loop has positive feedback
  and does not settle at the channel phase.
- The timing gains are negative: K1 = −9.950e−4 and K2 = −1.327e−6. They
  already include the detector gain and the counter's sign (K0 = −1). The
  counter subtracts W = ½ + v directly, with no extra sign flip.
- A marker found rotated by m·30° adds **+m·π/6** to θ̂.

### Loop constants

Both loops: damping 0.7071, BnT = 1e−3. Gains are signed Q0.31 constants.

| loop | K1+K2 | K2 | error in | v out |
|---|---|---|---|---|
| carrier | 5734975 (2.6706e−3) | 7636 (3.556e−6) | Q2.13 | Q3.28 rad |
| timing | −2139596 (−9.963e−4) | −2850 (−1.327e−6) | Q4.11 | Q2.30 |

The integrator is kept at full product width (56 bits). The output is
truncated to 32 bits.

## Resolving the 30° ambiguity

The carrier loop can lock at any of 12 points 30° apart. **`asm_detector`**
handles this as follows:

1. It keeps the last 64 decisions (256 bits) in a shift register.
2. It XORs them with 12 constant copies of the marker. Copy m is the marker
   with every symbol turned by m·30° and decided again. The copies are built
   at elaboration by constant functions in `apsk_pkg`.
3. It counts the ones of each XOR word with an 8-level registered adder tree.
4. It takes the minimum over the copies.

A minimum below 64 reports `found` with the index m, 11 slow cycles after the
marker's last symbol. The index goes to the carrier loop as a +m·30°
correction and to the output buffer as a frame mark.

**The marker bits are a placeholder.** The real marker is defined by a
telemetry standard that the thesis cites without listing. `MARKER` defaults
to a 255-chip m-sequence (x⁸+x⁶+x⁵+x⁴+1, seeded with ones) followed by a 0.
Set the parameter to the real 256-bit marker, first transmitted bit in bit
255. Nothing else depends on its value.

## LLRs and the frame buffer

**`llr_calc`** computes, for each of the four bits:

```
λ = max over points with bit = 1 of (2⟨r,a⟩ − |a|²)  −  max over points with bit = 0 of (2⟨r,a⟩ − |a|²)
```

It takes all 16 points and gives Q4.11 values, where positive means 1. The
noise variance is left out because the scaled-min-sum decoder downstream is
insensitive to a common scale.

LLRs are computed for every symbol, including marker symbols.

**`output_controller`** works as follows:

- It writes each symbol's four LLRs as one 64-bit word into a 2048-word
  circular buffer.
- When a marker is found, the symbols since the previous marker, minus the
  newest 64, are one codeword. The newest 64 are the marker itself.
- It reads out the codeword, one LLR per slow cycle, MSB LLR first, with
  `frame_start` on the first.
- Nothing is sent before the first marker.
- A marker that arrives during a read-out is counted in `overruns` and
  ignored.

A frame is 1280 codeword symbols plus 64 marker symbols. Read-out takes 5120
cycles (41 µs). Writing continues during read-out at one symbol per 343 ns.

## Clock domains

| domain | clock | blocks |
|---|---|---|
| slow | 125 MHz, also the host link's clock | if_to_bb, matched_filter, ccw_cordic, asm_detector, llr_calc, output_controller |
| fast | 400 MHz | interpolator, decision, both detectors, both loop filters, counter, accumulator |

Crossings:

- **Slow → fast** (`cdc_slow_to_fast`): one source flop in the slow domain,
  then two fast flops. The top edge-detects the synchronized level to make
  single-cycle fast pulses (sample arrival, marker found). The reset also
  enters the fast domain this way.
- **Fast → slow** (`cdc_fast_to_slow`): the pulse is stretched over four fast
  cycles (10 ns, longer than one 8 ns slow period), then two slow flops and an
  edge detector follow. Pulses must be at least eight fast cycles apart.
- **Multi-bit values** (rotated sample, decision and its interpolant, θ̂,
  marker index) have no synchronizers of their own. Each is written to a
  register in its source domain before its valid pulse crosses. It stays
  unchanged for far longer than the crossing takes.

## Number formats

All formats are two's complement unless noted.

| quantity | format |
|---|---|
| samples, interpolants, constellation points | Q2.13 (16 bit) |
| CORDIC angle | Q3.12 rad |
| carrier accumulator | Q3.28 rad |
| timing counter and its control word | Q2.30 |
| mu | unsigned Q0.16 |
| phase error | Q2.13 |
| timing error | Q4.11 |
| LLRs | Q4.11 |
| loop gains | Q0.31 |

The constellation is scaled to unit average energy: R2 = 1.13006 and
R1 = R2/2.75. The first-quadrant points are:

| label | point |
|---|---|
| 01 (15°) | (8942, 2396) |
| 00 (45°, outer) | (6546, 6546) |
| 10 (75°) | (2396, 8942) |
| 11 (inner) | (2380, 2380) |

Labels: bit1 is the sign of I and bit0 the sign of Q.

### Matched-filter coefficients

`rtl/mf_coeffs.hex` holds 257 Q1.15 words, round(2¹⁵·h(n)/Z) for
n = −128…128. The terms are:

```
h(n) = p(n)/√N · w(n)
p(n) = [sin(π(1−α)n/N) + 4α(n/N)·cos(π(1+α)n/N)] / [π(n/N)(1 − (4αn/N)²)],   p(0) = 1 − α + 4α/π
w(n) = I0(β√(1 − (n/256)²)) / I0(β)        (Kaiser window of the 513-tap transmit pulse)
N = 32, α = 0.4051, β = 2.8299,  Z = Π_{i=1..11} √(1 + 2^(−2i)) = 1.16444
```

The receiver keeps the 257 centre taps of the 513-tap transmit pulse. The
factor 1/Z cancels the CORDIC gain, so the rotator needs no gain correction.
Recompute the file if you change N, α, the window, the tap count or the
CORDIC iteration count.

## Files

| file | contents |
|---|---|
| `rtl/apsk_pkg.sv` | types, constellation, label rotation, default marker |
| `rtl/apsk_sync_top.sv` | top level, both clock domains and the crossings |
| `rtl/*.sv` | one module each, as named above |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/tb_apsk_sync_top.sv` | the end-to-end test at full default size |

## Simulating

Run from the repository root, because `$readmemh` opens
`rtl/mf_coeffs.hex` by that relative path. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/apsk_pkg.sv tb/tb_apsk_sync_top.sv \
          --top-module tb_apsk_sync_top -Mdir obj_top
./obj_top/Vtb_apsk_sync_top
```

Swap in any `tb_<module>` for a unit test. Every testbench prints
`TB_RESULT checks=<n> failures=<n>`, has a watchdog, and uses only
`$urandom`.

**End-to-end test (`tb_apsk_sync_top`).** It runs the top with all default
parameters and takes about 15 s.

The transmitter model:

- builds five frames, each of one marker and 1280 PN9 payload symbols;
- shapes them with the analytic windowed SRRC pulse;
- puts them on the fs/4 IF.

The channel adds:

- a 100° carrier phase;
- a slow carrier frequency offset;
- an 11.3-sample timing offset;
- a 200 ppm sample-clock offset.

On this signal, the loops lock at a rotated point. The marker detector
corrects it, in two steps in the reference run. Every later codeword comes
out bit-exact.

The test also counts each mechanism and fails if any never occurs:

- strobe intervals other than two samples (the timing loop absorbing the
  clock offset);
- marker corrections with and without rotation;
- accumulator wraps;
- codewords out of the buffer.

At the end, θ̂ must be within 3° of the channel phase.

**Unit tests.** Each compares its module with an independent floating-point
or behavioural reference, and checks the latency stated in the module
header.

## Where this RTL departs from, or goes beyond, the thesis

- **Sync marker.** The default marker is a placeholder (see above).
- **Mixer sign.** The thesis describes the fs/4 sequence as [1, j, −1, −j],
  putting sample 1 on Q. This design uses [1, −j, −1, j], the conjugate,
  which returns the transmitted baseband for an IF of Re{s·e^{+jπn/2}}. The
  other convention mirrors the constellation. Flip the Q signs in `if_to_bb`
  if your transmitter uses it.
- **Number formats.** The thesis states only 16-bit fixed point and 32-bit
  loop constants. Every Q-format above is this design's choice.
- **CORDIC pre-rotation.** Iterations i = 1…11 alone cover only ±57°. A
  first stage rotates exactly by a multiple of 90°, so the full ±π range
  works.
- **Sign of the rotation and the correction** are this design's reading (see
  Sign conventions).
- **Detector internals.**
  - The exact form of the zero-crossing detector's sign is this design's
    reading.
  - The PED is computed at the strobed interpolant.
  - A mid-symbol sample produces a zero timing error.
- **Buffer behaviour.** The output buffer depth, read-out order,
  `frame_start`, the overrun rule and "no output before the first marker"
  are this design's choices.
- **Reset.** It is synchronous and active-high, and clears all registers
  except the data-path synchronizer flops and the buffer memory. η resets
  to ½.
- **Pipelining.** The pipeline depths (CORDIC 12, interpolator 3, marker
  detector 11 cycles) are this design's choices.
- **Resource shape.**
  - The matched filter evaluates all 257 taps of both rails in the cycle
    that produces an output, which takes 514 multipliers. Outputs are needed
    only every 16 inputs, so a polyphase or time-shared form would be far
    smaller. That change would not alter the filter's function.
  - The marker detector holds 12 × 256 XOR gates and 12 eight-level adder
    trees.
  - Both are written for clarity first, and their synthesis takes a while.
- **Outside this RTL.** The PCIe host interface, the ADC and RF front end,
  and the GPU LDPC decoder are not part of it. The ADC stream and the LLR
  write port are top-level ports.
- **Not checked here.** Only noiseless operation is tested. Performance
  against SNR has not been measured.
