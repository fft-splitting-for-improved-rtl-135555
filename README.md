# Split-FFT circular correlator for GNSS acquisition

A GNSS receiver acquires a satellite by searching for the code delay at which
the received signal and a local copy of the spreading code line up. The parallel
code search does this with one circular correlation per Doppler bin, computed
with FFTs: `y = IFFT( FFT(x) * conj(FFT(h)) )`.

Modern signals (GPS L5, Galileo E5a, E5b, E1) can flip sign at every primary
code period, because of data bits or a secondary code. A one-period
correlation window that straddles a flip loses part of its peak, or all of it.
The standard fix is to correlate **two periods of the received signal** against
**one period of the code, zero padded to the same length**. The first half of
the result then always holds an unattenuated peak, and the second half is
discarded. For these signals two periods are 40 920 to 49 152 samples. With
power-of-two FFTs that means three 65 536-point transforms, mostly spent on
padding.

This RTL uses a length of **N = 49 152 = 3 × 16 384** instead and computes each
N-point transform with **16 384-point FFTs**. Three FFT cores (FFT of the code,
FFT of the signal, IFFT of the product) are each used three times, once per
*pass*. One correlation occupies the FFT inputs for 3 × 16 384 = 49 152 cycles.
That is 75 % of a single 65 536-point pass, and the cores and buffers are a
quarter of the size. Two passes are kept in memory: 2 × 16 384 complex words of
2 × 16 bits.

The result is the exact N-point circular correlation, not an approximation.
Two periods fit for sampling rates of 20.46 to 24.576 MHz on the L5/E5 signals
(1 ms code), and 6.138 to 6.144 MHz on E1 processed as BOC(1,1) (4 ms code).

The number of sections is a parameter, `K`. The default `K = 3` is the
configuration above, nine FFT operations per correlation. `K = 5` with
`N = 40 960 = 5 × 8192` is the second configuration: fifteen 8192-point FFT
operations per correlation, 62.5 % of a 65 536-point pass, and four pass memories
of 8192 words. It is smaller again but only covers 20.46 to 20.48 MHz on L5/E5
and at most 5.12 MHz on E1.

## How an FFT of length N is built from three FFTs of length N/3

Cut the input into three consecutive sections and take sample `n` of each
(`n = 0 .. N/3-1`): `a = x_n`, `b = x_{n+N/3}`, `c = x_{n+2N/3}`. Let
`W = exp(-j2π/3)`. The N-point DFT, sorted by output index modulo 3, is

```
x0_n = a + b + c                    X_{3k}   = FFT_{N/3}( x0_n )
x1_n = a + b·W  + c·W*              X_{3k+1} = FFT_{N/3}( x1_n · exp(-j2π·n/N) )
x2_n = a + b·W* + c·W               X_{3k+2} = FFT_{N/3}( x2_n · exp(-j2π·2n/N) )
```

The first step is a 3-point DFT across the sections (the *combination*). The
second is a rotation by a twiddle factor. The third is an ordinary FFT of
length N/3. The code `h_n` goes through the same steps.

The products `Y_{3k+i} = X_{3k+i} · conj(H_{3k+i})` are separate for each
`i`. The inverse transform is therefore split the same way, in mirror image.
Pass `i` gives

```
y_{i,n} = exp(+j2π·i·n/N) · IFFT_{N/3}( Y_{3k+i} )
```

and the three sections of the correlation are a 3-point inverse DFT across the
passes:

```
y_n        = y0 + y1 + y2
y_{n+N/3}  = y0 + y1·W* + y2·W
y_{n+2N/3} = y0 + y1·W  + y2·W*
```

The rotation after the IFFT has a **positive** exponent. The test
`recomb_unit_tb` fails if it is given the negative one. The output combination
is the input combination with outputs 1 and 2 exchanged.

### Cheap combinations

Write the combination as `x1,x2 = a − s/2 ∓ j·(√3/2)·d`, with `s = b + c` and
`d = b − c`. Only `d_re` and `d_im` are multiplied by the constant √3/2, so
that is 2 real multipliers. The 1/2 is a shift. `comb3_cplx` implements this
for the signal and for the output.

The code is real and takes only the values +1, −1 and 0 (0 in the padding).
For it, `comb3_code` needs no multiplier: `(b − c)` is one of −2…2, so
`(√3/2)(b − c)` is a choice among five constants. The code combinations are
produced in fixed point with 1.0 = 2^HFRAC = 4096.

### Five sections

With five sections `a … e` (`e = x_{n+4N/5}`) the combination is a 5-point DFT.
Sections 1 and 4, and 2 and 3, meet conjugate factors, so pair them:
`sa = b + e`, `da = b − e`, `sb = c + d`, `db = c − d`. With
`C1 = cos 2π/5`, `C2 = cos 4π/5`, `S1 = sin 2π/5`, `S2 = sin 4π/5`:

```
o0     = a + sa + sb
o1, o4 = a + (C1·sa + C2·sb)  ∓ j·(S1·da + S2·db)
o2, o3 = a + (C2·sa + C1·sb)  ∓ j·(S2·da − S1·db)
```

Each of the eight constant products is complex times real, so 16 real
multipliers in all (`comb5_cplx`, constants in Q1.15). The inverse matrix again
only swaps outputs (1↔4, 2↔3). For the ternary code, `sa … db` are integers in
−2…2 and the products reduce to adders (`comb5_code`). Outputs grow by 3 bits
instead of 2 (`GW`).

## Time-multiplexed datapath

```
           section buffers (external)
   h_n, h_{n+N/3}, h_{n+2N/3}      x_n, x_{n+N/3}, x_{n+2N/3}
              |                              |
         comb3_code                     comb3_cplx
              |  select h_{i,n}              |  select x_{i,n}
        twiddle_mult  <-- twiddle_rom -->  twiddle_mult     exp(-j2π·i·n/N), bypass for i=0
              |        (shared, k = i·n)     |
         [FFT* core]                    [FFT core]          16384 points, external
              |                              |
              +--------> cmul: X·conj(H) <---+
                               |
                          [IFFT core]                       16384 points, external
                               |
                          recomb_unit: twiddle_mult with exp(+j2π·i·n/N) (twiddle_rom, CONJ=1)
                               |  pass 0 -> corr_mem 0, pass 1 -> corr_mem 1
                               |  pass 2 -> read both, comb3_cplx (INVERSE=1)
                               v
                   y_n, y_{n+N/3}, y_{n+2N/3}
```

For `K = 5` the combinations are `comb5_code` / `comb5_cplx`, there are five
passes and four memories (passes 0–3), and the last pass reads all four.

`acq_ctrl` sequences the passes. After `start` it reads index `n = 0 .. M−1`
(M = N/K) K times, one index per clock, with no gap between passes. Each
read carries a tag (`acq_pkg::tag_t`): valid, start and end of frame, pass
number and index. The tag travels down the pipeline with the sample. It
selects the combination output, the twiddle angle `k = i·n` and the bypass.
The IFFT side does not receive tags from the FFT cores. It recovers the pass
by counting frames, and the first frame after reset is pass 0.

Pipeline timing, in clock cycles:

| point | cycle |
|---|---|
| `src_rd`, `src_addr` (registered in `acq_ctrl`) | 0 |
| section data returned by the buffers | 1 |
| combination outputs, registered | 2 |
| FFT inputs (after the twiddle multiplier or the bypass) | 4 |
| IFFT input | FFT output + 2 |
| `y_valid` for index n | IFFT last-pass output of index n + 4 |

Per correlation, the FFT inputs carry K·M = N consecutive samples. The outputs
appear as M consecutive `y_valid` cycles, with `done` on the last one. The
next `start` may come as soon as `busy` falls. The memory reads of one
correlation finish before the next correlation's pass 0 reaches them, so
consecutive correlations overlap in the pipeline without conflict.

All K sections of the correlation are output, although an acquisition keeps
only lags below N/2 (the third section for K = 3, the last two for K = 5 lie
beyond). Leaving those outputs unconnected lets synthesis drop their adders.

## Interfaces of `split_fft_correlator`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` / `busy` | in / out | 1 | start a correlation (ignored while busy) / passes being issued |
| `src_rd`, `src_addr` | out | 1, log2(N/K) | read index n of all K sections |
| `src_x_re[K]`, `src_x_im[K]` | in | XW = 12 each | `x_{n+k·N/K}`, k = 0 … K−1, one cycle after `src_rd` |
| `src_h[K]` | in | 2 each (signed) | code samples −1 / 0 / +1, same timing |
| `fft_h_in_*`, `fft_x_in_*` | out | valid, sop, eop, 2 × 16 | streams to the code FFT and signal FFT |
| `fft_h_out_*`, `fft_x_out_*` | in | valid, sop, eop, 2 × 16 | spectra, natural order, both cores in lockstep |
| `ifft_in_*` / `ifft_out_*` | out / in | valid, sop, eop, 2 × 16 | product to the IFFT / its output |
| `y_valid`, `y_idx` | out | 1, log2(N/K) | output strobe and index n |
| `y_re[K]`, `y_im[K]` | out | DW + GW = 18 each (19 for K = 5) | `y_re[k]` is `y_{n+k·N/K}` |
| `done` | out | 1 | with the last output of a correlation |

The FFT streams have no back-pressure: one sample per valid cycle, and frames
delimited by sop and eop. The code FFT and the signal FFT must have the same
latency; an assertion checks that their outputs are aligned. An FFT core with
a different handshake needs a small adapter.

Parameters (`acq_pkg` holds the defaults):

| parameter | default | meaning |
|---|---|---|
| `N` | 49152 | correlation length; N/K is the FFT length and must be a power of two |
| `K` | 3 | number of sections and passes, 3 or 5 (use N = 40960 with 5) |
| `XW` | 12 | signal sample width; at 12 bits the 16-bit FFT input can never overflow |
| `DW` | 16 | FFT interface width |
| `TW` | 16 | twiddle factor width (Q1.15, amplitude 32767) |
| `HFRAC` | 12 | fraction bits of the code combinations |
| `PROD_SHIFT` | 15 | right shift after the spectrum product |
| `GW` | 2 (3 if K = 5) | growth bits of the combinations; leave at its default |

## Numbers and scaling

Every multiplier rounds half up and saturates. The combinations cannot
overflow, because their outputs are GW bits wider than their inputs. The
correlation comes out as

```
y_m = N · 2^(HFRAC − PROD_SHIFT) · Σ_n x_{(n+m) mod N} · h_n
```

divided by whatever scaling the FFT and IFFT cores apply. The 1/K of the split
is not applied, and nothing in the RTL depends on the cores' scaling. Choose
the cores' scaling so that the 16-bit spectra and IFFT outputs do not
saturate. The testbenches use 2^-7 per forward FFT and 2^-9 for the IFFT at
N = 49 152. With those settings a peak of about 22 000 LSB is reproduced
within 3 LSB of the exact correlation. At K = 5, N = 40 960 the same core
scalings give peaks of 15 000 to 19 000 LSB within 4 LSB.

## Modules

| file | what it is |
|---|---|
| `rtl/acq_pkg.sv` | defaults, `pass_t`, `tag_t`, √3/2 constant |
| `rtl/split_fft_correlator.sv` | top: the datapath above, FFT core streams as ports |
| `rtl/acq_ctrl.sv` | pass sequencer and section-buffer read port |
| `rtl/comb3_code.sv` | multiplier-free combination of the ternary code |
| `rtl/comb3_cplx.sv` | combination of complex sections, forward or inverse (`INVERSE`) |
| `rtl/comb5_code.sv` | five-section combination of the ternary code |
| `rtl/comb5_cplx.sv` | five-section combination of complex sections, forward or inverse |
| `rtl/twiddle_rom.sv` | exp(∓j2πk/N) from a quarter-wave table of N/4+1 entries, computed at elaboration |
| `rtl/twiddle_mult.sv` | twiddle multiplier with the pass-0 bypass multiplexer, 2 cycles |
| `rtl/cmul.sv` | pipelined complex multiplier, optional conjugate, 2 cycles |
| `rtl/corr_mem.sv` | simple dual-port RAM for one pass, registered read |
| `rtl/recomb_unit.sv` | IFFT side: frame counting, rotation, K−1 pass memories, output combination |
| `tb/fft_stream_model.sv` | behavioural streaming FFT/IFFT (radix-2, double precision), simulation only |

## What is not in the RTL

- **The FFT cores.** The design assumes a vendor streaming FFT IP core with
  16-bit data and twiddles. The top brings out the streams to and from the
  three cores. `tb/fft_stream_model.sv` stands in for the cores in simulation.
  It computes a double-precision DFT per frame, scales, rounds and saturates,
  and outputs in natural order starting the cycle after the frame's last input.
- **The section buffers.** These hold x and h so that the three sections can be
  read at once. How they are filled (from the front end and a code generator)
  is left open. The read port is brought out.
- **The rest of a parallel code search.** Carrier wipe-off for each Doppler
  bin, coherent and noncoherent integration of the correlation magnitudes, and
  the detection threshold are outside this block.

## Choices made here, and how far to trust them

The block structure, the pass order, the sizes (N = 49 152, 16 384-point cores,
16-bit data, two 16 384-word memories) and the combination arithmetic follow
the published method. The following are this implementation's own choices:

- the code format (2-bit signed −1/0/+1) and the 12-bit signal samples;
- all pipeline depths and registered outputs;
- the tag-based pass tracking and the valid/sop/eop handshake;
- rounding, saturation and the 16-bit √3/2 constant (28378 / 2^15);
- the grouping of the five-section products and their Q1.15 constants
  (10126, −26510, 31164, 19261);
- the quarter-wave twiddle table;
- the fixed-point scale of the code combination.

The conjugation written as "FFT*" on the code branch is folded into the
spectrum multiplier (X · conj(H)), so the code FFT core is an ordinary forward
FFT.

Verified in simulation:

- every block is tested against independent models, bit-exact where the
  arithmetic is integer and within 1–3 LSB where it involves trigonometry;
- the top is tested end to end at N = 192 (five correlations, all lags) and at
  the full N = 49 152 (two correlations, 300 lags each, with the L5 lower- and
  upper-edge lengths);
- the same for K = 5, at N = 320 and at the full N = 40 960.

Not verified:

- timing closure, or mapping onto any FPGA;
- any real FFT core, and real GNSS codes. The tests use random ±1 codes.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/acq_pkg.sv tb/split_fft_correlator_full_tb.sv \
    --top-module split_fft_correlator_full_tb -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run any other test:

| testbench | what it checks |
|---|---|
| `split_fft_correlator_full_tb` | default parameters, N = 49 152. Two periods of a 20 460-sample code with a sign flip (L5 at 20.46 MHz), then 24 576 samples with no padding. Checks the peak lag and its full-period magnitude, 300 lags against the direct correlation, and 49 152 input cycles per correlation. Runs in well under a minute. |
| `split_fft_correlator_tb` | N = 192. Five correlations, two of them started back to back. Includes sign flips, zero padding and a full-scale random signal. Checks all lags, the cycle counts and latencies, and counts the bypass, rotation, memory write, memory read and combination events. |
| `split_fft_correlator_k5_full_tb` | K = 5, N = 40 960: two periods of 20 460 samples with a sign flip, then 20 480 samples with no padding; same checks, 40 960 input cycles per correlation. |
| `split_fft_correlator_k5_tb` | K = 5, N = 320, the five runs of `split_fft_correlator_tb`. |
| `acq_ctrl_tb` (K = 3 and 5), `comb3_code_tb`, `comb3_cplx_tb`, `comb5_code_tb`, `comb5_cplx_tb`, `twiddle_rom_tb`, `cmul_tb`, `twiddle_mult_tb`, `corr_mem_tb`, `recomb_unit_tb`, `recomb_unit_k5_tb` | one module each, against a model written in the testbench |

The testbenches do not depend on initial register values. They also pass
with Verilator's random initialisation (`+verilator+rand+reset+2`).

## Sizes against the target application

- **L5/E5, 20.46 MHz:** two periods are 40 920 samples, within 49 152.
- **L5/E5, 24.576 MHz:** 49 152 samples, exactly N.
- **E1, 6.138 MHz:** two periods are 49 104 samples.
- **E1, 6.144 MHz:** 49 152 samples.
- **Higher rates:** these need more than N samples. For example, 26 MHz gives
  52 000 samples, and 2 848 of them would have to be dropped before the
  buffers, at some loss.
- **Memory:** the two pass memories hold 2 × 16 384 × 32 bits = 1 Mibit.
- **Multipliers:** four complex multipliers (two twiddle multipliers in front
  of the FFTs, one spectrum product, one after the IFFT), plus the two √3/2
  multipliers in each of the two complex combinations.
- **Twiddle tables:** two tables of 12 289 × 16 bits, one shared by the two
  forward twiddle multipliers and one on the IFFT side.
- **K = 5, N = 40 960:** 20.46 MHz (40 920 samples) and 20.48 MHz (40 960)
  fit on L5/E5, and E1 at 5.12 MHz (40 960); 24.576 MHz does not. Four pass
  memories of 8192 × 32 bits (1 Mibit in all), and 16 real multipliers in each
  complex five-section combination.
