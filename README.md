# Multiplierless raised-cosine pulse-shaping filter (distributed arithmetic)

A 25-tap (order 24) raised-cosine FIR filter with roll-off 0.5, written in
synthesizable SystemVerilog. A transmitter uses this kind of filter to shape
symbols into band-limited pulses without inter-symbol interference. The filter
contains no multiplier. Every output is an inner product of 25 samples with 25
constant coefficients. Distributed arithmetic (DA) computes that product one
bit position at a time: small ROMs hold precomputed sums of coefficients, and
a shift-accumulator adds the ROM outputs together. The coefficient symmetry of
the linear-phase filter halves the work before the DA stage.

The architecture follows a published FPGA design of a DA raised-cosine filter:
order 24, roll-off 0.5, a Gaussian window, DA with symmetric folding, and a
16-bit `filter_out`. That publication gives the principle but not the
micro-architecture. The bit-serial schedule, the word formats, the LUT
partitioning, the control and the handshake are choices made for this RTL.
They are marked as such in each file's header and below.

## The filter response

The coefficients come from a raised cosine with two samples per symbol
(L = 2) and roll-off β = 0.5, multiplied by a Gaussian window. With
n = k − 12:

    rc(n)   = (1/L) · sinc(n/L) · cos(π β n / L) / (1 − (2 β n / L)²)
    w(n)    = exp(−0.5 · (α n / 12)²),   α = 0.5
    h[k]    = round(2^15 · rc(n) · w(n)),  k = 0..24,  h[24−k] = h[k]

The centre tap is 0.5, its neighbours are about 0.30, and every second tap
from the centre is exactly zero. That is the Nyquist zero-crossing property
of a raised cosine sampled at two samples per symbol. Only the 13 distinct
values `COEF[0..12]` are stored, in `rtl/rrc_pkg.sv`. `COEF[12]` is the
centre tap.

The filter is often called a *root* raised-cosine (RRC) filter, and the module
name keeps that label. Its coefficients are those of a plain raised cosine,
which is what the original design's impulse response shows.

The window width α is not given anywhere. α = 0.5 is a wide window that
leaves the taps close to the raw raised cosine. At a 48 kHz sample rate it
puts the first stopband null near 18 kHz, with sidelobes near −60 dB. The
measured response of the RTL is:

| tone   | gain      |
|--------|-----------|
| 3 kHz  | 0.00 dB   |
| 12 kHz | −6.02 dB (half the symbol rate, as a raised cosine requires) |
| 20 kHz | −59.4 dB  |
| 22 kHz | −60.7 dB  |

A narrower window (larger α) trades stopband depth near 18 kHz for lower far
sidelobes. To change the response, recompute `COEF` with the formula above.
The LUT contents follow automatically.

## How one output is computed

For the sample taken at time n the filter must produce

    y = Σ_{k=0}^{24} h[k] · x[n−k]

**1. Folding (`sym_preadder`).** Because h[k] = h[24−k], the two samples that
meet the same coefficient are added first:
s_k = x[n−k] + x[n−24+k] for k = 0..11, and s_12 = x[n−12]. This leaves
13 products, y = Σ_k COEF[k] · s_k. Each s_k is a 17-bit two's-complement
number.

**2. Bit decomposition.** Write each s_k through its bits b_{k,j}, with bit
16 carrying negative weight:

    s_k = −b_{k,16} · 2^16 + Σ_{j=0}^{15} b_{k,j} · 2^j

Exchanging the two sums gives

    y = Σ_{j=0}^{15} 2^j · P(j) − 2^16 · P(16),   P(j) = Σ_k b_{k,j} · COEF[k]

P(j) depends only on the 13 bits b_{·,j}, one bit from each folded sum. It can
therefore be looked up instead of multiplied.

**3. Look-up (`da_lut`, `da_lut_bank`).** A single table with 2^13 entries
would be wasteful. The 13 address bits are split into groups of at most
`LUT_IN` = 4. Each group has a 16-word ROM whose word at address a is the sum
of the coefficients whose bit in a is set. The groups are 4+4+4+1, and their
outputs are added to form P(j). The ROM contents are computed at elaboration
from `COEF`.

**4. Serialisation (`da_piso`).** On the sample clock the 13 folded sums are
loaded into shift registers. From then on, each clock presents the next bit of
every sum, LSB first, as the LUT address. The sign bit comes last.

**5. Shift-accumulation (`shift_accumulator`).** Each clock computes
`acc ← (acc >>> 1) ± (P(j) << 16)`. The operation is a subtraction for the
sign bit. On bit 0 the old contents are discarded. After 17 steps the
accumulator holds exactly Σ 2^j·P(j) − 2^16·P(16). Shifting the accumulator,
rather than the addend, avoids a barrel shifter and loses no bits: the
accumulator is 37 bits wide. The finished value is copied to a result
register.

**6. Output.** The result is in units of 2^−30 (Q1.15 × Q1.15).
`filter_out` takes bits 31:16, which is Q2.14 truncated toward −∞. The
absolute coefficient sum is 1.245, so no input can overflow Q2.14, and the
filter needs no saturation logic.

`da_controller` is a counter modulo 17. It marks bit 0 (`first`) and the sign
bit (`last`). The `last` clock is also the sample clock: on that edge the delay
line takes `filter_in`, the serial registers load the new folded sums, and the
accumulator finishes the previous output. Loading, computing and delivering
therefore overlap with no idle cycle.

## Interface and timing

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `reset`     | in  | 1     | synchronous, active high; clears every register, i.e. an all-zero input history |
| `clk_enable`| in  | 1     | clock enable; while low the whole filter holds its state |
| `filter_in` | in  | 16    | input sample, signed Q1.15 |
| `filter_out`| out | 16    | output sample, signed Q2.14 |
| `ce_out`    | out | 1     | one-cycle pulse: `filter_out` has just changed and `filter_in` has just been sampled |

- **Throughput:** one sample per 17 enabled clocks. At the 189.88 MHz that
  the original FPGA implementation reports, this is 11.17 Msample/s.
- **Sampling:** `filter_in` is taken on the enabled clock edge after which
  `ce_out` is high. The first enabled edge after reset is such an edge.
- **Source protocol:** change `filter_in` in the cycle that `ce_out` is high,
  then hold it. The filter takes it at the next `ce_out` edge.
- **Latency:** the output for a sample appears at the next `ce_out` pulse,
  17 enabled clocks after the sample was taken.
- **First pulse:** the first `ce_out` after reset carries the output of the
  all-zero history, which is 0.

```
clk_enable  ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
bit count   16 | 0 | 1 | ... | 16 | 0 | 1 ...
ce_out      ___|‾‾‾|____________|‾‾‾|_______
filter_in   x[n] held ..........| x[n+1] held
filter_out  y[n-1]              | y[n]
```

The filter runs at the output sample rate. For pulse shaping with two
samples per symbol, the source inserts a zero sample after every symbol
(zero-stuffing interpolation). The filter itself performs no rate change.

## Files

| file | contents |
|------|----------|
| `rtl/rrc_pkg.sv` | widths, formats, the 13 coefficients and their formula |
| `rtl/rrc_da_filter.sv` | top level, wires the blocks below |
| `rtl/da_controller.sv` | bit counter, `first`/`last` decoding |
| `rtl/tap_delay_line.sv` | 24 sample registers |
| `rtl/sym_preadder.sv` | 12 fold adders plus the centre tap |
| `rtl/da_piso.sv` | 13 parallel-in serial-out registers of 17 bits |
| `rtl/da_lut.sv` | one DA ROM partition, contents computed at elaboration |
| `rtl/da_lut_bank.sv` | all partitions and their adder |
| `rtl/shift_accumulator.sv` | 37-bit shift-accumulator and result register |

All sizes derive from `rrc_pkg`. `LUT_IN` sets the ROM partition size: 4
suits a 4-input LUT fabric, and 6 suits newer devices. `NTAPS` and `COEF` must
change together. The module parameters default to the package values.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- `tb_tap_delay_line`, `tb_sym_preadder`, `tb_da_piso`, `tb_da_controller`:
  compare against software models under random data, with random
  clock-enable gaps where the block has an enable.
- `tb_da_lut`, `tb_da_lut_bank`: check every address (all 2^13 for the bank)
  against sums of the coefficients.
- `tb_shift_accumulator`: uses random and extreme partial products, and
  compares with 64-bit integer arithmetic.
- `tb_rrc_da_filter`: the end-to-end test at full size. Its stimulus is an
  impulse, full-scale steps, random samples, the worst-case sign pattern
  (largest output), and a reset in mid-run. `clk_enable` drops at random
  throughout. A multiply-based reference FIR predicts every output exactly.
  The test also checks the 17-clock output spacing and the single-cycle
  `ce_out`. It counts stalls, negative folded sums (so that the sign-bit
  subtraction matters), full-scale outputs and resets, and fails if any of
  them never occurs.
- `tb_rrc_response`: first recomputes the coefficient table from the
  real-valued formula. It then checks the impulse response against that
  formula within 1.5 LSB, and measures the gains in the table above with
  sine tones.

To run one test with Verilator 5 from the project root:

```
verilator --binary --timing --assert --top-module tb_rrc_da_filter \
  -y rtl -y tb +libext+.sv rtl/rrc_pkg.sv tb/tb_rrc_da_filter.sv
./obj_dir/Vtb_rrc_da_filter
```

Every test finishes in well under a second.

## Where this RTL departs from the original implementation

- **Filter type.** The original calls its filter "root raised cosine" in some
  places and "raised cosine" in others. The coefficients here are a plain
  raised cosine, as its impulse-response plot shows.
- **Window width.** α = 0.5 is chosen here, as explained above. Different
  coefficients give a different response.
- **Formats and widths.** The 16-bit input, the Q1.15/Q2.14 formats, the
  17-clock schedule and the ROM partitioning are this design's own.
- **Extra port.** `ce_out` is an added port, so the pin count is 36, one more
  than the original's 35.
- **Resources.** The original reports about 190 slices and 187 flip-flops on
  Spartan-3E and Virtex-II Pro. This RTL keeps the 24 × 16-bit delay line in
  ordinary registers, so it uses more flip-flops. A vendor flow can map that
  delay line into shift-register LUTs.
- **Timing.** The original reports 189.88 MHz. This RTL has not been through
  FPGA place-and-route, so that clock rate is not established for it. The
  longest path runs from the serial registers through the ROMs and the
  four-input adder into the 37-bit accumulator. For a faster clock, add a
  register after `da_lut_bank` and delay `first`/`last` by one clock.
