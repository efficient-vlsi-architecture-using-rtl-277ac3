# Combinational 32-point FFT: radix-2 DIT and split-radix datapaths

This design computes the discrete Fourier transform of a block of 32
complex samples,

    X(k) = sum_{n=0}^{N-1} x(n) * W_N^(n*k),   W_N = exp(-j*2*pi/N),

in two ways, both laid out completely in logic with no clock and no memory:

* **radix-2 decimation-in-time (DIT)**: the Cooley-Tukey flow graph, log2(N)
  stages of N/2 butterflies, each with a twiddle multiplier on its lower
  input;
* **split-radix**: each length-M block is split into one half-length DFT
  for the even outputs and two quarter-length DFTs for the odd outputs
  X(4k+1) and X(4k+3). The even half needs no twiddle at all, so the graph
  needs fewer non-trivial multiplications than radix-2.

Both take 16-bit complex samples and produce 16-bit complex results. The word
width is the same at every stage. A new block is transformed as soon as it
is applied to the inputs, and the outputs are valid once the longest
combinational path has settled. Both datapaths take a length parameter `N`.
N = 32 is the default; 4, 8 and 16 are the other sizes the architecture
family covers and the testbenches exercise.

The RTL follows the architectures in the paper *Efficient VLSI Architecture
Using DIT-FFT Radix-2 and Split Radix FFT Algorithm*: the flow graphs, the
butterfly equations, the 16-bit word and the sizes 4 to 32. The fixed-point
twiddle format, the rounding, the overflow behaviour, the port layout and the
column layout of the split-radix graph are this design's own choices. They
are described below.

## Number format

| item | format |
|---|---|
| sample, real and imaginary part | 16-bit two's complement (`fft_pkg::sample_t`) |
| complex sample | `fft_pkg::cplx_t`, a packed struct `{re, im}` of 32 bits |
| twiddle constant | 16-bit signed, 14 fractional bits (Q1.14, +1.0 = 16384) |
| product | full 33-bit precision, then +2^13, arithmetic shift right by 14, keep 16 bits |
| sum / difference | 16 bits, wraps on overflow |

The transforms do no scaling between stages. |X(k)| can grow to N times
the input magnitude, so the caller must keep the inputs small enough. If
|re| + |im| of every input stays below 2^15 / N (1023 for N = 32), no
result can wrap. A constant input of 1 gives X(0) = 32 at N = 32. A
unit impulse gives X(k) = 1 for every k. Both are reproduced bit-exactly.

Twiddle constants are not stored in a table. `fft_pkg::tw_re/tw_im`
compute them at elaboration as round(cos(2πk/N)·2^14) and
round(−sin(2πk/N)·2^14). Each multiplier is therefore a
constant-coefficient multiplier. `twiddle_mul` recognises the trivial
factors 1, −j, −1 and +j and builds them as a swap of parts and/or a
negation. These are exact and use no multiplier.

Over random inputs scaled so that no output can wrap, the measured error against a double-precision
DFT is at most about 0.6 LSB at N = 8, 1.6 LSB at N = 16 and 3 LSB at
N = 32. The two architectures are equally accurate.

## The radix-2 DIT datapath (`radix2_fft`)

The inputs are wired to the first stage in bit-reversed order: for N = 8
the order is x0, x4, x2, x6, x1, x5, x3, x7. Stage s (s = 1 … log2 N) has
butterflies that span 2^(s−1) lines. Each group of 2^s lines pairs line j
with line j + 2^(s−1), and W_(2^s)^j multiplies the lower line:

    y0 = x0 + x1 · W_(2^s)^j        y1 = x0 − x1 · W_(2^s)^j      (dit_bf)

The last stage leaves X(0…N−1) in natural order. At N = 32 there are 5
stages of 16 butterflies, 80 butterflies in all, and 34 of their twiddles
are non-trivial. Each stage is its own array (`g_stage[s].din/.dout`), so
the graph is a plain feed-forward chain.

## The split-radix datapath (`srfft`)

### The split-radix butterfly (`sr_bf`)

For index n of a block of size M, the butterfly takes four lines a quarter
block apart. With x0 = x(n), x1 = x(n+M/4), x2 = x(n+M/2) and
x3 = x(n+3M/4) it forms:

    e0 = x0 + x2                                   → half-size DFT (even outputs)
    e1 = x1 + x3                                   → half-size DFT (even outputs)
    z1 = ((x0 − x2) − j(x1 − x3)) · W_M^n          → quarter-size DFT giving X(4k+1)
    z3 = ((x0 − x2) + j(x1 − x3)) · W_M^(3n)       → quarter-size DFT giving X(4k+3)

Multiplying by ±j costs only wiring and one negation. The two twiddle
multipliers sit inside the unit and become wires for n = 0.

### How the recursion becomes a flat graph

Split-radix is recursive: a 32-point block becomes one 16-point block and
two 8-point blocks, the 16-point block becomes an 8-point block and two
4-point blocks, and so on. Blocks of size 2 end in a plain radix-2 butterfly
(`radix2_bf`), and blocks of size 1 are wires. `srfft` does not use a
recursive module. It lays the recursion out **in place** as log2(N)
columns of N lines:

* column s (s = 0 … log2 N − 2) holds the split-radix butterflies of every
  block whose size is M = N/2^s at that point. Each such block occupies
  consecutive lines. Its butterflies write the even sums back into the
  first half of the block and z1, z3 into the third and fourth quarters,
  where they become new blocks of size M/2 and M/4;
* lines that belong to no block of the column's size pass straight
  through. A quarter-size block made in column s is processed in column
  s + 2, so it waits one column;
* the last column holds the radix-2 butterflies of all size-2 blocks;
* the result leaves the last column in bit-reversed order, and the output
  wiring puts X(k) back in natural order.

Two constant functions work out the role of each line. `sr_leg(N, s, p)`
returns whether line p is leg 0–3 of a split-radix butterfly in column s,
or passes through. `r2_leg(N, p)` does the same for the radix-2 column.
Both run the index sequence of the classic in-place split-radix program
(blocks of size M start at i0 = n, n + 2M, …, then 2·2M − M + n, stepping
by 4·2M, …). The generate loop puts an `sr_bf` at every leg-0 line, with
`IDX = p mod M`.

This gives, per size:

| N | split-radix butterflies | radix-2 butterflies | non-trivial twiddle multipliers |
|---|---|---|---|
| 4 | 1 | 1 | 0 |
| 8 | 3 | 3 | 2 |
| 16 | 9 | 5 | 8 |
| 32 | 23 (8 + 4 + 6 + 5 per column) | 11 | 26 |

At N = 32, radix-2 has 34 non-trivial twiddle multipliers against 26 here.
A coarse yosys synthesis of the two 32-point modules gives the same 320
16-bit adders for each, and 122 against 94 multiply-accumulate cells. Lines
do not sit where a drawing of the recursive graph would put them, but the
butterflies and twiddle factors are the same.

## Modules

| module | what it is | parameters |
|---|---|---|
| `fft_pkg` | `sample_t`, `cplx_t`, widths, twiddle functions, complex add/sub/±j, bit reversal | — |
| `radix2_bf` | a1 + a2, a1 − a2 | — |
| `twiddle_mul` | y = a · W_N^K, trivial factors built without a multiplier | `N`, `K` |
| `dit_bf` | radix-2 DIT butterfly with twiddle on the lower input | `N`, `K` |
| `radix2_fft` | N-point radix-2 DIT FFT, ports `x[N]`, `X[N]` | `N` = 32 |
| `sr_bf` | split-radix butterfly | `N` (block size), `IDX` (n) |
| `srfft` | N-point split-radix FFT, ports `x[N]`, `X[N]` | `N` = 32 |
| `fft_top` | both FFTs side by side | `N` = 32 |

`fft_top` has four ports, all unpacked arrays of `cplx_t`: `r2_x[N]` →
`r2_X[N]` for the radix-2 FFT and `sr_x[N]` → `sr_X[N]` for the
split-radix FFT. The two datapaths share nothing, so they can run on the
same block or on different ones. All arrays are in natural order.

`radix2_fft` publishes `NUM_BF`, and `srfft` publishes `NUM_SR_BF` and
`NUM_R2_BF`. These are localparams holding the butterfly counts of the
elaborated graph.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`.
Each also has a time-out that counts as a failure. The reference values come
from double-precision arithmetic (`tb/tb_ref_pkg.sv`: a direct DFT sum and
the butterfly equations), not from the fixed-point structure.

| testbench | covers |
|---|---|
| `tb_radix2_bf` | random full-range operands, bit-exact with 16-bit wrap |
| `tb_twiddle_mul` | 12 (N, K) pairs including all trivial factors and K ≥ N; trivial ones exact, others within 1.5 LSB |
| `tb_dit_bf` | 6 (N, K) pairs, within 1.5 LSB |
| `tb_sr_bf` | every n of the 32-point step plus 16-, 8- and 4-point cases; even sums exact, twiddled terms within 1.5 LSB |
| `tb_radix2_fft` | N = 4, 8, 16, 32 in parallel (`tb/fft_harness.sv`): impulse, constant, 0-1-2-3 ramp (N = 4, giving 6, −2+2j, −2, −2−2j), a constant 2^15/N whose X(0) = 2^15 must wrap to −2^15, a tone and 200 random blocks, tolerance 1 + N/4 LSB; butterfly count |
| `tb_srfft` | the same vectors for the split-radix FFT; butterfly counts against the table above |
| `tb_fft_top` | the full 32-point top at default parameters: 150 blocks applied to both datapaths with cross-checking between them, 150 runs with different blocks on the two ports, and the exact vectors; fails if any of the three kinds never occurs |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fft_pkg.sv tb/tb_ref_pkg.sv tb/tb_fft_top.sv --top-module tb_fft_top
    ./obj_dir/Vtb_fft_top

Replace `tb_fft_top` with any other testbench name. To lint a module on
its own:

    verilator --lint-only -Wall -Wno-fatal -y rtl -Irtl rtl/fft_pkg.sv rtl/srfft.sv --top-module srfft

With `-Wall`, the only remarks are that the butterfly-count localparams are
unused inside their own module.

Each testbench takes well under a second to simulate.

## Where this design departs from, or adds to, the described architecture

* **Twiddle format and rounding.** The architecture gives only the 16-bit
  word. Q1.14 constants with round-half-up products are a choice here. To
  change them, edit `TW_FRAC` and `twiddle_mul`.
* **Overflow.** The word stays 16 bits with no per-stage scaling, as
  specified. What happens on overflow is not specified; here it wraps.
  Saturation or block scaling would change the results for inputs above
  2^15 / N.
* **Output order.** The split-radix drawings list their outputs in the
  graph's own scrambled order. Both modules here present X(k) in natural
  order, and the reordering is pure wiring.
* **Graph layout.** The split-radix graph is built in place, column by
  column, instead of as the nested drawing. The arithmetic is the same.
* **Trivial twiddles.** The original 4-point radix-2 netlist shows
  constant complex multipliers. Here the factors 1, −j, −1 and +j are a
  swap of parts and/or a negation, so the 4-point radix-2 graph has no
  multiplier at all. The results are the same, and exact.
* **No pipeline registers.** The architecture is combinational, and its
  figure of merit is the delay of one pass. To clock it, register
  `x`/`X` around the module, or cut the `din`/`dout` arrays between
  columns in `radix2_fft` or `srfft`.
* The synthesis memory-usage and delay figures reported for the original
  FPGA implementation are not reproduced here.
