# Area-lean FIR and FFT datapaths

Constant multipliers, FFT pipelines and fixed-point FFT processors each waste silicon in a
different way, and each has a fix:

* **Constant multiplication.** A filter multiplies every sample by many fixed coefficients. Doing
  that with shifts and a small shared set of adders is an old idea. Here the cost is counted in
  *adder bits*, not adders, and every adder is only as wide as the carries it can produce.
* **Pipelined FFT.** A radix-2² multi-path delay commutator (MDC) pipeline is widened by a
  parallelism factor *t*. Extra rows replace delay lines, so the throughput grows with *t* while
  the FIFO storage shrinks (N − 2t words).
* **Fixed-wordlength FFT.** The wordlength never grows from stage to stage. Each stage either
  halves its butterfly output or keeps its number format and saturates. Choosing that per stage,
  instead of always halving, gains several dB of signal-to-quantisation-noise ratio (SQNR) at no
  hardware cost.

This repository holds synthesizable SystemVerilog for all three, plus self-checking testbenches.
The three datapaths sit side by side in one top level, `area_opt_top`.

| Part | Module | Default size |
|------|--------|--------------|
| FIR filter with multiplier-less MCM | `fir_mcm` → `mcm_block` → `shift_add_adder` | 8-bit input, taps {19, 21, 31, 121, 125} |
| Expandable radix-2² MDC FFT (R2²EMDC) | `emdc_fft` → `r2_butterfly`, `cmul_twiddle`, `twiddle_rom`, `ipm`, `delay_commutator` | N = 256, t = 16 (32 lanes), 12 bits, scaling 245 |
| Memory-based FFT with static scaling | `mem_fft` → `r2_butterfly`, `cmul_twiddle`, `twiddle_rom` | N = 8192, 11 bits |

## Multiplier-less constant multiplication

MCM stands for multiple constant multiplication. An MCM block computes x·c₁ … x·cₙ for one input
x. Each product is built from shift-add nodes of the form `v = a ± (b << l)`, where a and b are
earlier nodes or x itself. The netlist is a parameter (`NET`, typed by `mcm_pkg`):

```
node i:  {a, b, sh, op}    OP_ADD : v_a + (v_b << sh)
                           OP_SUB : v_a - (v_b << sh)
                           OP_RSUB: (v_b << sh) - v_a
```

`OUT_NODE[k]` picks the node for output k. `OUT_SHIFT[k]` adds a power of two, so even
constants need no node of their own.

**Why bits, not adders.** For `p + (q << l)`, the low l bits of the result are just p's low
bits. No carry comes out of them, so `shift_add_adder` wires them straight through. Only the
upper `max(m, n+l) − l` bits go through a carry chain, where m and n are the operand widths. The
reverse subtraction `(q << l) − p` has to negate p, so it gets a full-width adder. Each node is
exactly `IN_W + ⌈log2 c⌉` bits wide. `mcm_block` reports the total cost of its netlist as the
elaboration constant `ADDER_BITS`.

The default netlist has 6 adders and costs 65 adder bits:

```
3 = 1 + 1<<1      19 = 3 + 1<<4     31 = 19 + 3<<2
21 = 19 + 1<<1    125 = 1 + 31<<2   121 = 125 - 1<<2
```

For comparison, an adder-count-minimal solution from the literature uses 7 adders and 67 bits,
and a bit-minimal one uses 8 adders and 64 bits under a slightly different bit accounting.

It came from a small exhaustive search. For real filters, an optimiser (such as an integer
program minimising adder bits) runs offline and hands its netlist to the `NET` parameter.
`mcm_pkg` limits a netlist to 32 nodes and 32 outputs.

## The transposed FIR filter

`fir_mcm` computes y(n) = Σ c_k·x(n−k) in transposed form. In that form every tap multiplies
the *current* sample, so one MCM block supplies all the products. A chain of adders and
registers then delays and sums them:

```
r[NT-1] <= p[NT-1];   r[k] <= p[k] + r[k+1];   y <= p[0] + r[1]
```

`in_valid` advances the filter. `y` and `out_valid` come one clock after the sample. The default
taps are the five constants above. The accumulator is `IN_W + COEF_W + ⌈log2 NT⌉` bits, which is
19 bits by default.

## R2²EMDC: widening a radix-2² MDC pipeline

`emdc_fft` is an N-point radix-2² decimation-in-frequency FFT with L = 2t lanes. Each enabled
cycle it takes L complex samples and returns L results, so a transform takes M = N/L cycles. With
t = 1 it is the classic two-path radix-2² MDC. With t = N/2 it is fully parallel.

| Resource | Count | Default (N = 256, t = 16) |
|---|---|---|
| complex multipliers | t·(2⌈log4 N⌉ − 2) | 96 |
| complex adders | 2t·log2 N (t butterflies per stage) | 256 |
| FIFO words | N − 2t | 224 |

### Stage types

The stages alternate between two butterfly types:

* **BFI** (odd stages) is a plain butterfly.
* **BFII** (even stages) also multiplies its second input by −j. That is a real/imaginary swap
  with a switched add/subtract, so no multiplier is needed.

After every even stage except the last, each lane has a general twiddle multiplier. With
K = log2 L, the stages fall into two groups:

1. **Spatial stages 1…K.** The two butterfly partners arrive in the same cycle on different rows.
   Before stage s, an *interconnection permutation module* (`ipm`) re-wires the rows. The
   permutation I_n maps input port p to output port
   q = p + (p mod 2)(n/2 − 1), minus (n/2 − 1) when p ≥ n/2. This exchanges bit 0 and the top bit
   of the row index within groups of n rows. The partners then sit on rows 2p and 2p+1. These
   stages need no storage.
2. **Temporal stages K+1…log2 N.** After stage K each lane pair holds independent sub-transforms
   in time order. Each pair has a delay-switch-delay commutator (`delay_commutator`) with delays
   M/2, M/4, …, 1. This is the familiar MDC structure, and it accounts for all of the
   N − 2t FIFO words.

Ordering the spatial stages first is a choice of this design. The original template draws the
FIFO part in front of the permutation part. The resource counts are the same either way, and this
order needs no extra reordering at the input.

### Twiddle factors

At a BFII stage s, let e = b_{s−1} + 2·b_s, where b_j is the butterfly-path bit chosen at stage
j (sum = 0, difference = 1). Let r be the sample's position inside its current sub-block. The
multiplier after stage s then applies W_N^((e·r) << (s−2)). Each lane's multiplier has its own
twiddle table (`twiddle_rom`, computed at elaboration). The table index is derived from the
lane number and the frame counter, so synthesis reduces each table to the few entries that lane
can reach.

### Data order

* **Input.** Lane l carries x[l·M + c] in frame cycle c. So the frame is split into L contiguous
  blocks, one per lane.
* **Output.** In output cycle τ (bits τ₁…τ_μ, MSB first, μ = log2 M) and row ρ, the result is
  X[f] with f = Σ b_j 2^(j−1), where:
  * b_{log2 N} = ρ bit 0
  * b_{K+i} = NOT τ_{i+1}, for i = 0…μ−1
  * b_{K−1} = ρ bit K−1
  * b_j = ρ bit (K−1−j), for j = 1…K−2
  * When μ = 0: b_K = ρ bit 0.

Example for N = 16, t = 2 (rows × output cycles τ = 0…3):

```
row 0:  X6  X2  X4  X0
row 1: X14 X10 X12  X8
row 2:  X7  X3  X5  X1
row 3: X15 X11 X13  X9
```

`out_pos` gives τ, so a consumer can map each row to its bin with a few wires.

### Timing

Every register advances only when `in_valid` is high. A low `in_valid` freezes the whole pipe,
so a stall costs nothing but time. Frames start on the first valid cycle after reset and follow
each other back to back. A result appears `log2 N + ⌊(log2 N − 1)/2⌋ + M − 1` enabled cycles
after its frame started: one register per butterfly and per multiplier, plus the commutator
delays. For the default this is 8 + 3 + 7 = 18 cycles. `out_valid` is high on cycles that carry a
real transform. Feed zeros (or the next frame) to flush the last frame.

## Static per-stage scaling

Both FFTs keep a fixed wordlength W. A butterfly output has one bit more than its inputs, so
every stage must make a choice, set by one bit of `SCALE` (MSB = stage 1):

* **1 – halve.** Drop the LSB (floor truncation). The format gains one integer bit and loses one
  fraction bit.
* **0 – keep the format.** Clamp overflow to the largest or smallest value.

All ones is the classic halve-every-stage scheme. It never overflows, but it throws away a
fraction bit per stage. Most of those integer bits are never used by typical signals. Saturating
instead at a few stages keeps precision, and the rare overflows cost little.

The default `245 = 11110101` for the 256-point pipeline is the configuration a probability
analysis of the value distributions picks for uniform 12-bit input (1 sign bit, 11 fraction bits).
It keeps the format at stages 5 and 7.

Saturation makes the SQNR depend strongly on the input, so single frames vary by several dB.
Measured values:

| Datapath | Configuration | SQNR |
|---|---|---|
| 256-point radix-2 model of `mem_fft`, 12 bits, 400 frames | 255 (all ones) | 36.0 dB |
| same | 245 | 38.1 dB |
| 256-point radix-2 `mem_fft`, one frame in simulation | 245 | 43.0 dB |
| 256-point radix-2² `emdc_fft`, one frame (its twiddles differ) | 245 | 47.1 dB |
| 8192-point model of `mem_fft`, 11 bits, 32 frames | all ones | 18.3 dB |
| same | 1111010101010 (default) | 35.4 dB |
| 8192-point `mem_fft`, one frame in simulation | 1111010101010 | 35.5 dB |

The published figures for the 256-point radix-2 case are 42.75 dB (245) and 35.4 dB (all ones).
A simple greedy search over a bit-exact model of the datapath reproduces 245 as the best choice
for 256 points. The same search gives the 8192-point default, which keeps the format at stages 5,
7, 9, 11 and 13. The published 11-bit result for that size is 33.5 dB against 14.1 dB for
halving every stage. The search runs offline. The hardware only receives its result through
`SCALE`.

Twiddles are TW-bit two's complement with 1.0 = 2^(TW−2), rounded to nearest. Products are
truncated (floor) and saturated back to W bits. This format is this design's choice.

## The 8192-point memory-based FFT

`mem_fft` is a radix-2 DIF processor for the wordlength study. It has one butterfly, one twiddle
multiplier and one N-word memory, and it computes in place. The memory holds 8192 × 22 bits =
180,224 bits. The reference 11-bit design reports 180k bits of storage.

It runs as a three-state sequence:

1. **LOAD.** `in_ready` is high. N samples are accepted in natural order, and `in_valid` may have
   gaps.
2. **RUN.** The processor makes log2 N passes of N/2 butterflies at one per cycle. Two idle
   cycles between passes let the last writes land before the next pass reads them. The RUN phase
   lasts log2(N)·(N/2 + 2) + 1 cycles, which is 53,275 cycles for N = 8192.
3. **UNLOAD.** The N bins come out in natural order, one per cycle, with `out_idx`. The reads are
   bit-reversed.

The memory is written as an array with two reads and two writes per cycle. That maps to a true
dual-port RAM at twice the clock, or to two banks. `SCALE` defaults to the 11-bit, 8192-point
configuration above. For another N or W, pass a `SCALE` of width log2 N.

## Top level

`area_opt_top` has no parameters. It instantiates the three datapaths at their default sizes with
separate ports (`fir_*`, `emdc_*`, `mfft_*`), sharing only `clk` and the asynchronous active-low
reset `rst_n`. Yosys maps it to about 16,000 cells plus the memory-FFT storage.

## Verification

Every testbench checks results bit-exactly against fixed-point models written independently in
the testbench, and prints `TB_RESULT checks=… failures=…`.

| Testbench | What it checks |
|---|---|
| `tb_emdc_fft` | (N, t) = (16,1), (16,2), (16,4), (16,8), (32,4), (64,2), (256,1), (256,16), (1024,4) with various `SCALE` values, against a natural-order radix-2² model (`emdc_check`). Checks every lane of every output, the latency and `out_pos`, with random stalls. |
| `tb_mem_fft` | N = 16 … 256 at 11, 12 and 16 bits against a radix-2 model (`memfft_check`). Checks exact bins, output order, `in_ready` and the cycle count, and reports SQNR against an exact DFT. |
| `tb_fir_mcm` | Random samples with idle cycles, against direct convolution. |
| `tb_mcm_block` | All 256 inputs, for the default netlist and for one using SUB, RSUB and output shifts. Also checks `ADDER_BITS`. |
| `tb_shift_add_adder` | Exhaustive, for several shifts and all three operations. |
| `tb_r2_butterfly`, `tb_cmul_twiddle` | Random operands. Checks −j, halving, both saturation directions and enable hold. |
| `tb_twiddle_rom` | Every entry against `$cos`/`$sin`, for N = 256 and N = 8192. |
| `tb_ipm` | I_2 … I_16 against the bit-exchange rule. |
| `tb_delay_commutator` | With stalls: the pairing of element i with element i + D. |
| `tb_area_opt_top` | Full size, all three datapaths at once. Three 256-point frames and two 8192-point frames, one of each full-scale to force saturation; the FIR filter throughout. The 8192-point SQNR must reach 30 dB. Fails if a stall, a saturation in either FFT, a FIR idle cycle, a load gap or the busy phase of the memory FFT never happened. |

To run one with Verilator (list the packages first):

```
verilator --binary --timing -j 0 --top-module tb_emdc_fft \
  rtl/fft_pkg.sv rtl/mcm_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/emdc_check.sv tb/tb_emdc_fft.sv
./obj_dir/Vtb_emdc_fft
```

`tb_area_opt_top` also needs `tb/memfft_check.sv`, and `tb_mem_fft` needs only that checker.
The full-size top test simulates in a few seconds.

## Departures and limits

* The order of spatial and temporal stages is reversed relative to the original template, as
  described above. The input and output orders are this design's own.
* The default MCM netlist comes from a small search, not from the integer-programming
  optimiser. The benchmark filters (8, 32 and 128 taps with 12- and 16-bit coefficients) are not
  included, because their coefficients are not available. Netlists larger than 32 nodes need a larger `MAX_NODES` in
  `mcm_pkg`.
* The per-stage formats come from a greedy search with simulated noise, not from the
  probability model itself. For 256 points both give 245; for 8192 points the published
  per-stage formats are not reproduced here, so the default may differ from them.
* Radix-4 and radix-8 memory FFTs, block floating point and the foldable Pease architecture are
  used only as points of comparison, and are not built.
* Handshakes, resets, register placement and the twiddle format are this design's choices
  throughout.
