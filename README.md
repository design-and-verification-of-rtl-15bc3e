# Memory-based radix-2 FFT processor with a three-multiplier butterfly

This is an N-point FFT processor (N = 8 by default) that trades speed for
area in a middle position between the two extremes. A fully pipelined FFT
has a butterfly for every butterfly of the flow graph: 12 for N = 8. A
minimal one reuses one butterfly 12 times. Here N/2 butterflies work
side by side on one stage of the transform. Their results go back into a
small RAM and are fed to the same butterflies for the next stage. log2(N)
passes finish the transform, so 8 points take four butterflies used three
times.

Two things make each butterfly cheaper:

* **Three multiplications per complex product instead of four.** The
  twiddle product is rearranged so that one real multiplier is replaced by
  an adder and two subtracters (see below).
* **Butterfly types.** The control unit knows which twiddle factor each
  butterfly applies. Where the factor is 1 or -j, no multiplication happens
  at all: the difference passes through, or has its halves swapped and
  negated.

Together, the type-3 butterflies and the multiplier-free stages give the
radix-2^2 advantage. Every second stage's nontrivial twiddles are −j, so
they cost no multiplier. The flow graph itself stays plain radix-2
decimation in frequency.

Each real multiplier is a signed Vedic multiplier (Urdhva-Tiryakbhyam
decomposition) whose partial products are merged by a Wallace-style
carry-save stage.

## Structure

```
                 +-------------+   phase/step   +------------+
 start,src_rom ->| fft_control |<-------------->| timing_gen |  7-bit counter
 in_valid      ->|  (Mealy FSM)|  count/issue/  +------------+
                 +-------------+  phase_end
                   | addresses, enables, twiddle exponents, types
    in_data --+    v
 input_rom ---+-> data_ram (N x 32 bit) --N read ports--> operand_regs --> N/2 x butterfly
                     ^                                        ^                 |
                     |                   twiddle_rom x N/2 ---+                 |
                     +------------- N write ports (in place) -------------------+
                     |
                     +--> out_data (bit-reversed read = natural order)
```

| module | role |
|---|---|
| `fft_top` | wires the processor together |
| `fft_control` | state machine: load, stages, unload; addresses, enables, butterfly type choice |
| `timing_gen` | 7-bit counter timing each phase, tells the FSM when a phase ends |
| `data_ram` | N complex words in registers: load port, N read and N write ports, registered output port |
| `input_rom` | stored test frames that can replace the input port |
| `twiddle_rom` | W_N^k = cos(2πk/N) − j·sin(2πk/N), Q2.14, computed at elaboration |
| `operand_regs` | holds each butterfly's A, B, twiddle and type for one issue |
| `butterfly` | 3-stage pipelined DIF butterfly, types 1/2/3 |
| `complex_mult` | three-multiplier complex product |
| `vedic_mult`, `vedic_core` | signed wrapper and recursive unsigned Vedic/Wallace core |
| `fft_pkg` | word types (`cplx_t`, `twiddle_t`), `bf_type_t`, `phase_t`, constants |

## One transform, clock by clock

1. **Load** (`S_LOAD`). N samples are written to RAM in natural order. From
   the port, a sample is taken in every clock where `in_valid && in_ready`.
   From the ROM (`src_rom = 1` at `start`), one sample is taken per clock.
2. **Stages** (`S_STAGE`, log2(N) times, 5 clocks each). In clock 0 the
   control unit puts out the RAM addresses of every butterfly's pair, its
   twiddle exponent and its type. `operand_regs` captures the pairs read
   from RAM. Clocks 1–3 are the butterfly pipeline. In clock 4 the
   timing generator's `phase_end` is the RAM write enable, and both results
   of every butterfly are written back to the addresses they came from. The
   next stage starts in the following clock.
3. **Unload** (`S_OUT`, N clocks). A DIF FFT leaves X[k] at the bit-reversed
   address of k. The RAM is therefore read at `bitrev(k)`, and results leave
   in natural order with `out_index = k`. `done` pulses together with the
   last result.

For N = 8 that is 8 load clocks, 15 compute clocks and 8 output clocks. The
edge that takes the last sample and the edge that raises `out_valid` for
X[0] are log2(N)·5 + 1 = 16 clocks apart. A new `start` is accepted in the
clock in which `done` is high. Loading, computing and unloading do not
overlap: there is one RAM.

### The stage schedule

In stage s (0 ≤ s < log2 N), let span = N >> (s+1). Butterfly j
(0 ≤ j < N/2) takes

```
top    = (j / span) * 2 * span + (j mod span)
bottom = top + span
k      = (j mod span) << s          twiddle W_N^k
type   = 2 if k == 0, 3 if k == N/4, else 1
```

and writes A+B to `top` and (A−B)·W_N^k to `bottom`. For N = 8:

| stage | butterfly 0 | butterfly 1 | butterfly 2 | butterfly 3 |
|---|---|---|---|---|
| 0 | (0,4) W^0 type 2 | (1,5) W^1 type 1 | (2,6) W^2 type 3 | (3,7) W^3 type 1 |
| 1 | (0,2) W^0 type 2 | (1,3) W^2 type 3 | (4,6) W^0 type 2 | (5,7) W^2 type 3 |
| 2 | (0,1) W^0 type 2 | (2,3) W^0 type 2 | (4,5) W^0 type 2 | (6,7) W^0 type 2 |

Only 2 of the 12 butterfly operations of an 8-point transform need a
multiplication. Butterfly 0 never does. Every `butterfly` instance still
contains the multiplier, so one module serves every position and every N.
A synthesis tool removes the multiplier from positions whose type input is
a constant.

## The butterfly

```
y0 = A + B
y1 = (A − B) · W
  type 1: W general       → complex_mult
  type 2: W = 1           → y1 = A − B
  type 3: W = −j          → y1 = Im(A−B) − j·Re(A−B)
```

There are three register stages, and a new operand pair can enter every
clock:

1. A+B and A−B, each 17 bits, registered with W and the type.
2. The three products of `complex_mult`, registered inside it.
3. The final subtractions of the product. Then round half up and shift right
   by 14, which removes the Q2.14 twiddle scale. Then the type select and
   the output register.

### Three multiplications

For the twiddle Z1 = x1 + j·y1 and the data Z2 = x2 + j·y2:

```
m1 = x1·(x2 + y2)     m2 = y2·(x1 + y1)     m3 = x2·(x1 − y1)
Re = m1 − m2 = x1·x2 − y1·y2
Im = m1 − m3 = x1·y2 + y1·x2
```

This takes three multipliers, two adders and three subtracters, where the
direct form needs four multipliers, one adder and one subtracter. A worked
check with Q12.4 operands (also in `tb_complex_mult`):

* (3.25 + 3j)·(7.5 + 1.1875j) = 20.8125 + 26.359375j
* as integers, (52 + 48j)·(120 + 19j) = 5328 + 6748j, in units of 2^-8

The pre-adders widen the operands by one bit, so the product is exact.

### The multiplier

`vedic_core` splits each W-bit operand into halves and forms the four
half-width products with recursive instances of itself. The recursion ends
in a 2×2 cell made of AND gates and half adders. An odd width gets one
zero MSB. The high·high and low·low products do not overlap, so they form
one row. The two cross products, shifted by W/2, form two more rows. One
layer of full adders (3:2 compressors) reduces the three rows to two, and a
single adder finishes. `vedic_mult` multiplies the magnitudes and negates
the product when the signs differ. It is exact for every input pair,
including −2^(W−1).

## Number format and range

* Samples: `cplx_t`, 16-bit real and 16-bit imaginary two's complement. The
  datapath does not care where the binary point is. The examples use Q12.4.
* Twiddles: `twiddle_t`, Q2.14 (1.0 = 16384).
* **No scaling between stages.** Results are X[k] = Σ x[n]·e^(−j2πnk/N)
  at full gain, truncated to 16 bits. Keep |re|, |im| of the input below
  about 2^15 / (2N) to avoid wrap-around. The testbenches use
  32767/(2N).
* Rounding adds at most half an LSB per type-1 stage, plus the error of
  the quantised twiddles. The testbenches accept errors of 2 + N/4 LSB, and 3 LSB
  for N = 8.

## Interface of `fft_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | start a transform; sampled while idle (or in the `done` clock) |
| `src_rom` | in | 1 | with `start`: 1 = take the frame from `input_rom`, 0 = from `in_data` |
| `rom_frame` | in | log2(ROM_FRAMES) | ROM frame number, held during the load |
| `in_valid`, `in_data` | in | 1, 32 | sample offer; `in_data` is `cplx_t` {re, im} |
| `in_ready` | out | 1 | high while loading from the port; a sample is taken when both are high |
| `out_valid`, `out_index`, `out_data` | out | 1, log2 N, 32 | result X[out_index], natural order, one per clock |
| `busy` | out | 1 | high from the clock after `start` up to, not including, the `done` clock |
| `done` | out | 1 | one-clock pulse with the last result |

Parameters: `N` (power of two, 4…64, default 8) and `ROM_FRAMES` (default
4). The 7-bit counter of `timing_gen` limits N to 128.

The ROM frames follow

```
re(f, n) = 16·(((n·(2f+3) + 5f) mod 32) − 16)
im(f, n) = 16·(((n·(f+5) + 3f + 1) mod 32) − 16)
```

## Simulating

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fft_top \
          -y rtl -y tb +libext+.sv rtl/fft_pkg.sv tb/tb_fft_top.sv
./obj_dir/Vtb_fft_top
```

| testbench | what it checks |
|---|---|
| `tb_fft_top` | Default N = 8, end to end. 47 frames: impulse, constant, a tone, the 4 ROM frames, 40 random port frames with and without `in_valid` gaps, and back-to-back starts. Each frame is compared with a floating-point DFT. Also checks result order, latency (16), and that type-1/2/3 butterflies, ROM and port sources, input gaps and back-to-back frames all occurred. |
| `tb_fft_sizes` | The same checks at N = 4 and N = 16, through the harness `fft_size_run`. |
| `tb_fft_control` | Control unit with timing generator: handshake, every address/twiddle/type of every stage, the bit-reversed unload, `done`. |
| `tb_timing_gen` | Counter and strobes through every phase. |
| `tb_butterfly` | Streaming random operands of all three types against a reference; checks latency 3 and gaps. |
| `tb_complex_mult` | The worked example, extreme values, random values; checks latency 1. |
| `tb_vedic_mult` | 16- and 18-bit instances: corner values and random values. |
| `tb_data_ram`, `tb_operand_regs`, `tb_twiddle_rom`, `tb_input_rom` | Ports, timing, and table contents. |

Two assertions guard the schedule. `data_ram` checks that a load and a
write-back never fall in the same clock. `fft_top` checks that every
write-back meets valid butterfly results.

## What was chosen here, and limits

The architecture is taken as given: N/2 butterflies reused over log2(N)
stages through RAM, a Mealy control FSM with a separate 7-bit timing
generator, input and twiddle ROMs, operand registers, a 3-stage butterfly
pipeline, three butterfly types, the three-multiplier product and a
Vedic/Wallace multiplier. These details are this design's own choices:

* the states of the FSM, the port handshake and the natural-order unload
  through bit-reversed reads
* the twiddle format (Q2.14) and its rounding
* how the pipeline is split into its three stages
* the way Vedic and Wallace are combined
* sign-magnitude multiplication
* the ROM contents
* RAM built from registers with parallel ports
* no scaling between stages

Type 2 is taken to mean W = 1. That is the only purely real twiddle that
occurs in a radix-2 DIF FFT.

Limits:

* Data words are 16+16 bits. Narrower 8-bit variants are not provided.
* A control word that encodes the enables is not built. The enables come
  straight from the FSM.
* Sizes 32 and 64 elaborate and lint cleanly. They are not covered by a
  simulation here, because compiling them for simulation takes a long
  time. Sizes 4, 8 and 16 are simulated.
* There is no overflow detection or saturation. See *Number format and
  range*.
