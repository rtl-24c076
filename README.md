# Variable-length memory-based FFT processor for OFDM, with a recoded CORDIC rotator and DCT channel estimators

OFDM standards use many FFT lengths: 64 points for wireless LAN, 256 for
fixed wireless access, 2048 and 8192 for broadcast TV and radio. This design
is one FFT engine that handles all of them. It computes a 64, 256, 512,
1024, 2048, 4096 or 8192-point transform in place, in a single 8192-word
memory, with one radix-2² butterfly unit that takes one butterfly per clock.

Beside it sits a CORDIC vector rotator. It does not take one micro-rotation
per iteration. Instead it looks up the leading bits of the remaining angle
and performs two micro-rotations at once, so a 12-bit rotation needs about
2.7 iterations on average and never more than 4. It skips rotations once
the angle is used up, so the CORDIC gain varies from one angle to the next.
The rotator tracks that variable gain in a small logarithmic error register
and removes it with shift-and-add steps. The output keeps the input's
magnitude, with no multiplier anywhere.

The remaining two units are pilot-aided channel estimators for the OFDM
receiver. Each takes the received values at 32 equally spaced pilot
subcarriers and interpolates the channel response at all 1024 subcarriers
through discrete cosine transforms. One uses a DCT followed by an extended
inverse DCT. The other uses an ordinary inverse DCT followed by an
ordinary DCT.

The four units share a top module (`vl_fft_top`) but have separate ports.
The CORDIC is a stand-alone unit: the FFT's butterfly uses multipliers and
a twiddle ROM. The estimators are not wired to the FFT output either. Picking
out the pilot bins of an FFT output frame and feeding them in is left to
the surrounding system.

## How the FFT works

### One algorithm for every length

The transform is a decimation-in-frequency (DIF) radix-2² FFT. Each stage
reads four words, whose addresses are a quarter of the current span apart,
and writes the four results back to the same addresses. The butterfly
computes

    y0 =  x0 + x1 + x2 + x3
    y1 = (x0 - x1 + x2 - x3) · W^2n
    y2 = (x0 - j·x1 - x2 + j·x3) · W^n
    y3 = (x0 + j·x1 - x2 - j·x3) · W^3n

Here the inputs x0..x3 come from addresses s, t, u and v.

- A length that is a power of four (4096, 1024, 256, 64) runs log₄L
  such stages.
- The other lengths (8192, 2048, 512) run one extra stage first. In that
  stage the same hardware acts as two independent radix-2 butterflies:
  - one on the pair (s, u) with twiddle W^n;
  - one on the pair (t, v) with twiddle W^(n+N/4).
- In radix-2 mode, multiplexers bypass the second adder column and the
  W^2n multiplier.

All lengths use the same 13-bit address space. A transform of length
L = 8192/2^c puts its sample n at address n·2^c. So it uses every 2^c-th
word, and all the address logic is the same as for 8192 points, except for
the step of the butterfly counter.

After the last stage, X[k] sits at the 13-bit bit-reverse of k. The unload
reads it from there in natural order k = 0, 1, 2, … L-1.

### Address generation (`vl_dag`, `sib_mux_array`)

An 11-bit butterfly counter B steps by 2^c: 1, 2, 4, 8, 16, 32 or 128 for
8192 down to 64 points. When it wraps, a stage counter K advances:
- by 1 in a radix-2 stage;
- by 2 in a radix-2² stage.

The stage counter stops at log₂L: 13, 12, 11, 10, 9, 8 or 6.

The four addresses are the counter with a 2-bit "symbol" inserted:

    addr = { B[10 : 11-K], symbol, B[10-K : 0] }    symbol = 00, 01, 10, 11 for s, t, u, v

Each address bit has its own 4-input multiplexer (`sib_mux`), which picks
one of:
- symbol bit 0 or 1;
- counter bit n (bypass);
- counter bit n-2 (the bit shifted past the inserted symbol).

A small decoder sets the 13 selects from K. There are four mux arrays, one
per symbol value, so all four addresses come out in the same clock. The
radix-2 stage uses K = 0, which puts the symbol at the top two address bits.

### Conflict-free banks (`bank_index_gen`, `commutator`, `mem_bank`)

To read four words per clock from single-port-per-direction RAM, the
8192 words are split over four banks of 2048. Each address is split into
radix-4 digits:

    A12 | A11 A10 | A9 A8 | … | A1 A0

The bank is the sum of these digits mod 4:
- `bank_index_gen` builds it from a tree of 2-bit mod-4 adders (`sum_mod4`);
- the word inside the bank is addr[12:2].

The four addresses of a butterfly differ only in the symbol bits. So their
digit sums differ by 0, 1, 2 and 3, and the four words are always in four
different banks.

Which bank each butterfly port goes to depends on where the symbol sits:
- **K odd:** the symbol fills one whole radix-4 digit. Ports s, t, u and v
  go to banks M, M+1, M+2 and M+3, where M is the bank of s.
- **K even:** the symbol straddles two digits, because the top digit A12 is
  a single bit. The order becomes M, M+2, M+1, M+3. This covers:
  - the radix-2 first stage of 8192, 2048 and 512;
  - every stage of 4096, 1024, 256 and 64.

`commutator` is one crossbar for this rule. It is used three times:
- from ports to banks for the word addresses;
- from banks to ports on the read side;
- from ports to banks on the write side.

The testbenches check the rule exhaustively: all 8192 addresses, every
butterfly of every stage and every length, with no bank hit twice.

### Twiddle factors (`vl_cag`, `twiddle_rom`)

The twiddle exponent of a butterfly is n = (B << K) mod N/4 (N = 8192).
Then:
- the second exponent is 2n;
- the third is 3n, or n + N/4 in the radix-2 stage.

So no table of exponents is needed: `vl_cag` is a barrel shifter on the
same counters as the address generator.

`twiddle_rom` stores cos and sin for one octant only: 1025 entries of
12 bits each. Quadrant and octant symmetry give the rest of the circle.
The contents are computed when the simulation or synthesis elaborates, by
an angle-addition recurrence in 64-bit fixed point, then rounded to Q1.11.
Every one of the 8192 factors is within 1 LSB of the exact value. There is
one ROM per multiplier, each with a registered output.

### Pipeline and timing (`vl_fft_core`, `fft_controller`)

The datapath has three parts, separated by two register sets. Each clock
they work on three different butterflies:

| clock | work |
|---|---|
| c0 | address generation, bank index, word addresses to the banks, twiddle indices to the ROMs |
| c1 | synchronous bank read → read commutator → PE input registers (twiddles registered too) |
| c2 | butterfly (`r22_pe`) → output registers |
| c3 | write commutator → bank write ports, at the addresses remembered from c0 |

Each bank has one read port and one write port. A stage's first reads and
the previous butterflies' write-backs therefore overlap.

Between stages the controller stalls for three clocks (DRAIN), so that the
next stage never reads a word whose write is still in flight. After the
last stage it waits the same three clocks (FLUSH).

One transform of length L with S stages therefore takes:
- L clocks to load;
- S·L/4 butterfly clocks;
- 3·S stall clocks;
- L clocks to unload.

For 8192 points that is 7·2048 + 21 = 14 357 compute clocks.

Interface of `vl_fft_core`, which `vl_fft_top` exposes as `fft_*`:
- `start` latches `mode` (0 = 8192 … 5 = 256, 6 = 64, see `fft_pkg::fft_mode_e`).
- L samples are then accepted on `in_valid` while `in_ready` is high.
- After computing, the core outputs L results in natural order:
  - `out_valid` is high for L consecutive clocks;
  - `out_k` gives the index;
  - `done` pulses with the last result.
- There is no back-pressure on the output.
- `issue`, `radix2` and `stall` show what the engine does each clock.

### Arithmetic

- **Samples:** 16-bit two's complement per real and imaginary part (Q1.15).
- **Twiddles:** 12 bits (Q1.11).
- **Scaling:** every adder column in the butterfly halves its result with
  rounding, and so does the radix-2 stage. The output is therefore X[k]/L,
  and nothing can overflow.
- **Complex multiply** (`cmul3`): three real multiplications instead of
  four, with (a+jb)(c+js) computed as
  - k1 = c(a+b), k2 = a(s-c), k3 = b(c+s);
  - re = k1 - k3, im = k1 + k2;
  - followed by rounding and saturation to 16 bits.

The end-to-end test compares against a double-precision DFT.
- The worst error is about 3.5 LSB at 8192 points.
- The tolerance allowed is 4 + 1.5 LSB per stage.

## How the CORDIC rotator works (`cordic_rotator`)

The rotator turns (x, y) by θ, with |θ| ≤ π/4, using only shifts and adds.
It is parameterised by its accuracy W (8, 12 or 16 bits; the top uses 12).

### Rotation phase

Each rotation iteration takes one clock:
1. Find the leading one of the residual angle |z|, at position k
   (2^-k ≤ |z| < 2^-(k-1)), and take the four bits starting there.
2. Look up a pair (m, n) for those bits, so that atan 2^-m + atan 2^-n
   is close to |z|.
   - There are two small tables: one for k ≤ 1 and one for k > 1.
   - The arctangents of 2^-0 and 2^-1 do not follow the 2^-k pattern
     closely, which is why k ≤ 1 has its own table.
   - For the patterns 1110 and 1111 of the k > 1 table, m = k-1.
3. Rotate by 2^-m and then 2^-n with shifts and adds, in the direction of
   sign(z), and subtract the two angles from z.
   - Only about W/3 arctangents are stored: 950, 502, 255 and 128 (units
     of 2^-11) for W = 12.
   - A smaller one is the last stored word shifted right. Below that size
     atan(2^-i) and 2^-i differ by less than one angle LSB.
4. Remove most of the gain of the m rotation with one more shift-and-add
   column: x, y -= (x, y)·2^-(2m+1).
   - The leftover logarithmic gain error is added to a scale-error
     register T. That error is ln cos(atan 2^-m) − ln(1 − 2^-(2m+1)) plus
     ln cos(atan 2^-n).
   - The amounts come from two small ROMs indexed by m and n.

Iterations stop as soon as z is exactly zero. A zero angle therefore
returns the input unchanged, after no iterations at all.

### Scale phase

The scale phase then clears T, again with shifts and adds. Each clock:
- it finds the leading one of |T|, at position j;
- it picks whichever of ln(1 ± 2^-j) and ln(1 ± 2^-(j+1)) is closer to T,
  using the sign of T;
- it multiplies x and y by that (1 ± 2^-j');
- it subtracts the logarithm from T.

It stops when |T| < 2^-(W+1). `valid` then pulses. `iters` and `sc_iters`
report the number of steps each phase took.

### ROM contents

All ROM words are computed during elaboration from power series in 60-bit
fixed point, then rounded:
- atan x = x − x³/3 + …;
- ln(1 ± u) for the logarithms;
- ln cos(atan x) = −½ ln(1 + x²).

Changing W therefore needs no new tables.

### Formats

- x and y: W bits, Q2.(W−2), with 4 guard bits inside.
- θ: W+1 bits, Q1.(W−1) radians.
- T: W+4 fraction bits.

### Measured behaviour

Every representable angle from 0 to π/4 was simulated:

| W | rotation iterations, average / worst | scale steps, average / worst | worst error |
|---|---|---|---|
| 8 | 1.83 / 3 | 1.34 / 3 | < 2 LSB |
| 12 | 2.71 / 4 | 2.55 / 5 | < 2 LSB |
| 16 | 3.63 / 5 | 4.78 / 8 | < 2 LSB |

The rotation counts match the published figures for this recoding
(1.835 / 3, 2.727 / 4, 3.644 / 5). At full scale and W = 16, the rounding
of the arctangent words alone gives up to about 1.3 LSB of error.

## How the channel estimators work

### DCT / extended IDCT (`dct_channel_estimator`)

#### The idea

Each pilot subcarrier carries a known symbol P. Dividing the received value
Y by P gives a noisy channel sample at that subcarrier (the least-squares
estimate). The estimator has to fill in the subcarriers between the pilots.

Interpolating with the DFT (transform, zero-pad, inverse transform) works
badly when the channel's delays fall between sample instants: the DFT
treats the 32 samples as one period and the jump at the wrap-around leaks
into every coefficient. The DCT treats the samples as mirrored instead, so
there is no jump and the energy stays in the low coefficients.

The unit therefore computes, for the M pilot estimates Hp(k'):

    C(m) = w(m) · Σ_{k'=0}^{M-1} Hp(k') · cos((2k'+1)πm / 2M)       (DCT-II)
    H(k) = Σ_{m=0}^{M-1} w(m) · C(m) · cos((2k+D)πm / 2N)          (extended IDCT)

with w(0)² = 1/M, w(m)² = 2/M otherwise and D = N/M = 32. The second sum is
the inverse DCT of C zero-padded to length N, with the sample grid moved so
that H(k'·D) lands back on the pilot values. Pilot k' sits on subcarrier
k'·D.

#### Hardware

- **LS step.** Pilots are assumed to have unit magnitude (QPSK or BPSK), so
  dividing by P is multiplying by its conjugate. One complex multiply per
  pilot as it arrives; the 32 results go into a small register file.
- **One MAC.** A single complex-by-real multiply-accumulate evaluates both
  sums, one product per clock: M·M = 1024 clocks for the DCT, then
  N·M = 32768 clocks for the 1024 outputs. The total is 33793 clocks from
  the last pilot to `done`, with one output every 32 clocks.
- **Weights.** w(m) appears in both sums, so the product w(m)² is applied
  once to C(m). It is 1/M or 2/M, a right shift.
- **Cosines.** Both sums use cos(πp / 2N) for an integer phase p. The phase
  is built from the loop counters modulo 4N and folded into a quarter-wave
  table of N+1 16-bit words, filled by the unit's own initial block.
- **Formats.** Q1.15 complex in and out. C(m) keeps 20 fraction bits in 24
  bits; the accumulator is 44 bits. The output is rounded and saturated.

#### Measured behaviour

On a four-path channel with fractional delays and QPSK pilots, the outputs
stay within 1.3 LSB of a floating-point model of the same equations. The
mean-square error against the true channel, from the first to the last
pilot, is about 2·10⁻⁶ without noise.

### IDCT / DCT (`idct_dct_channel_estimator`)

The second estimator reaches a similar result with transforms of the
standard kind. It treats the pilot record differently: the M estimates are
extended to 2M points with a zero at index M and a phase-rotated mirror
image above it. Interpolating that record with a 2M-point inverse DFT,
zero padding and an N-point DFT turns out to equal:

    G(k')  = a(k') · e^{+jπk'/2M} · Hp(k'),        a(0) = 1/2, else 1
    h(n)   = (2/M) · Σ_{k'<M} G(k') · cos((2n+1)πk' / 2M)      (IDCT)
    S(k)   = Σ_{n<M} h(n) · cos((2n+1)πk / 2N)                (DCT, zero-padded)
    H(k)   = e^{-jπk/2N} · S(k)

The orthonormal weights of both transforms and the gains before and after
them multiply out to the two constants shown, a halving and a shift.

The hardware is the same single MAC as in the first estimator, with the
same timing (33793 clocks, one output every 32 clocks) and the same
formats. It adds two complex rotations. The input one is applied to each
LS estimate as it arrives. The output one is applied to each finished sum.
Both read their cosine and sine from the shared quarter-wave table.

The estimate passes through the pilots. Between them it is close to the
first estimator's: the mean-square error on the same four-path test
channels is 2 to 4·10⁻⁵. Above the last pilot, from subcarrier 993 on, it
falls towards zero because of the inserted zero. Those subcarriers are
normally not used for data.

### Both estimators on a fading channel

`tb_chest_vehicular_a` feeds both estimators the same noisy pilots. The
channel is a Rayleigh-faded six-path channel with the ETSI "Vehicular A"
delay profile, at 0.2 µs sampling. All six path delays fall between
samples, which is the case these estimators are designed for. Measured
over the subcarriers up to the last pilot, normalised to the channel power:

| pilot SNR | DCT / EIDCT | IDCT / DCT |
|---|---|---|
| 10 dB | 1.0·10⁻¹ | 1.1·10⁻¹ |
| 20 dB | 1.2·10⁻² | 1.3·10⁻² |
| 30 dB | 1.2·10⁻³ | 1.6·10⁻³ |
| 40 dB | 1.3·10⁻⁴ | 3.0·10⁻⁴ |

Up to 30 dB both track the pilot noise, about 1/SNR. At 40 dB the
interpolation error of the non-sample-spaced paths starts to show, more
for the IDCT/DCT estimator.

## Where the design departs from, or adds to, its source

This design follows a published architecture. The following points are
interpretations or additions made here:

- **Commutator column.** The source gives two bank orders: one for
  power-of-four lengths and one for the first stage of the others. Here
  the choice is made by the parity of K, for the reason given above. A
  4096-point transform therefore uses the "straddled" order on every
  stage. This is what keeps its four words in four banks.
- **Radix-2 stage twiddle.** In radix-2 mode the third multiplier uses
  W^(n+N/4).
- **Coefficient index.** It is taken modulo N/4 and shares the address
  generator's counters.
- **Own choices where the source is silent:**
  - the load/unload streaming interface;
  - the inter-stage stall;
  - word lengths and per-stage scaling;
  - one read and one write port per bank;
  - the reset behaviour.
- **CORDIC scale correction.** The source stores the leftover scale error
  and removes it after the rotations by shift-and-add decomposition. How
  exactly it decomposes the error is not recoverable. The scale phase
  above is this design's version:
  - it runs after the rotations instead of overlapping with them;
  - its step counts differ from the published ones (3.09 average, 5 worst
    at 12 bits).
- **CORDIC n-rotation gain.** Adding the n rotation's gain to T is this
  design's choice. The source's compensation column handles only m.
- **CORDIC and FFT are not joined.** A CORDIC-based butterfly for the FFT
  is not part of this design.
- **Channel estimator structure.** The source gives both estimators as
  equations only. The single-MAC direct form, the unit-magnitude pilot
  assumption, the word lengths and the interface are this design's.
- **IDCT/DCT estimator constants.** The gain and rotation signs above are
  this design's reading of the source's equations. With the factor
  1/√2 on every input term, or with equal rotation signs at input and
  output, the estimate does not pass through the pilots. The chosen
  combination does, and that decided it.
- **Not built at all:**
  - a recursive twiddle generator, which the source discusses only as an
    alternative to the ROM.

## Files

`rtl/` (the package first, then the modules):

| file | content |
|---|---|
| `fft_pkg.sv` | sizes, complex types, length modes, mux-select enum, helper functions |
| `vl_fft_top.sv` | top: FFT core, CORDIC and both channel estimators side by side |
| `vl_fft_core.sv` | FFT datapath and pipeline |
| `fft_controller.sv` | load / run / drain / flush / unload sequencing |
| `vl_dag.sv`, `sib_mux_array.sv`, `sib_mux.sv` | data address generator |
| `bank_index_gen.sv`, `sum_mod4.sv` | bank = digit sum mod 4 |
| `commutator.sv` | port↔bank crossbar |
| `mem_bank.sv` | 2048×32 bank, synchronous read, one write port |
| `vl_cag.sv`, `twiddle_rom.sv` | coefficient index and ROM |
| `r22_pe.sv`, `cmul3.sv` | radix-2²/2 butterfly, 3-multiplier complex multiply |
| `cordic_rotator.sv` | recoded CORDIC rotator |
| `dct_channel_estimator.sv` | DCT / extended-IDCT pilot interpolator |
| `idct_dct_channel_estimator.sv` | IDCT / DCT pilot interpolator |

`tb/` holds one self-checking testbench per block, `tb_<module>.sv`.
- `tb_vl_fft_top` runs all seven lengths at full size, compares them with
  a direct DFT and checks the clock counts.
- It also counts the radix-2 stages, stalls, both commutator orders and
  all four banks, and exercises the CORDIC and both channel estimators.
- `tb_chest_vehicular_a` runs both channel estimators on noisy fading
  channels (see above).
- Every testbench prints `TB_RESULT checks=… failures=…` at the end.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_vl_fft_top \
        rtl/fft_pkg.sv rtl/sib_mux.sv rtl/sib_mux_array.sv rtl/vl_dag.sv \
        rtl/sum_mod4.sv rtl/bank_index_gen.sv rtl/commutator.sv rtl/mem_bank.sv \
        rtl/vl_cag.sv rtl/twiddle_rom.sv rtl/cmul3.sv rtl/r22_pe.sv \
        rtl/fft_controller.sv rtl/vl_fft_core.sv rtl/cordic_rotator.sv \
        rtl/dct_channel_estimator.sv rtl/idct_dct_channel_estimator.sv \
        rtl/vl_fft_top.sv tb/tb_vl_fft_top.sv
    ./obj_dir/Vtb_vl_fft_top

The full run, all lengths up to 8192 points, takes about a second. For a
block testbench, list the package, the block and the modules it
instantiates, and set `--top-module tb_<block>`.

To change the design:
- The maximum length is fixed at 8192 by the 13-bit address format
  (`fft_pkg`); the address decoder and the bank tree are written for it.
- The data and twiddle widths are the `DW` and `TW` constants in the
  package.
- The inter-stage stall is `DRAIN_CYC` in `fft_controller`. It must cover
  the three-clock read-to-write latency.
