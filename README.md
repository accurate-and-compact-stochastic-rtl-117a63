# Correlated stochastic computing: an edge-detection pipeline that keeps its bit-streams correlated

In stochastic computing (SC) a number in [0, 1] is a bit-stream, and its value is
the fraction of ones in it. Arithmetic then costs a gate or two: an AND multiplies, a
2-to-1 MUX adds with scaling, an XOR subtracts. There is a catch. Some gates only
work when their operands are *correlated*, meaning the ones of the smaller stream
sit where the larger stream has ones too:

| gate on fully correlated streams | computes |
|---|---|
| AND | min(a, b) |
| OR  | max(a, b) |
| XOR | \|a − b\| |

When all inputs come from stochastic number generators (SNGs) that share one random
source, they are fully correlated and these gates are exact. But many gates move the
ones around. A MUX does this, for example, so the next block gets streams that are
only partly correlated and gives wrong answers. Until now the usual fix was to
convert back to binary and regenerate the streams, which costs area and a full
stream of latency.

This RTL implements the method of *"Accurate and compact stochastic computations by
exploiting correlation"*. Two small circuits restore correlation inside the
stochastic domain:

* the **correlator** takes two partly correlated streams and moves the ones of the
  smaller stream under ones of the larger stream, without changing either value;
* the **correlated SNG (CSNG)** makes a new stream with a given value whose ones
  follow those of an existing stream.

They are used to build a complete image pipeline, median filter → Gaussian
smoothing → Robert-Cross edge detection → threshold. Stochastic-to-binary
conversion happens only at the very end.

## The pipeline (`csc_edge_pixel`)

`csc_edge_pixel` computes one binary edge pixel from a 6×6 window of 8-bit input
pixels. The bit-streams are L = 256 bits long.

```
 6x6 window ──► 36 SNGs ──► 16 median ──► 4 Gaussian ──► 2 correlators ──► Robert-Cross ──┬──► threshold ──► binary ──► out_pixel
 (register)     (one RNG,    filters       filters        (1 clock)         edge detector  │    comparator     counter
                 rotation 0) AND/OR        MUX trees                        XOR, XOR, MUX  │        ▲
                                                                                           ├──► CSNG ┘ (thr ones, follows edge SN)
                                                                                           └──► counter ──► edge_value
```

Each stage is placed according to how it treats correlation:

| stage | needs correlated inputs? | output still fully correlated? | what precedes it |
|---|---|---|---|
| median (AND/OR) | yes | yes | SNGs directly |
| Gaussian (MUX tree) | no (the data inputs) | no | median directly |
| Robert-Cross (XOR) | yes | no | **correlators** |
| threshold comparator | yes, with the threshold SN | – | **CSNG** makes the threshold SN |

The stages in the window:

* **16 median filters** cover the 4×4 window of median outputs that the four
  Gaussians need.
* **4 Gaussian filters** produce smoothed pixels (2,2), (2,3), (3,2) and (3,3) of
  the window.
* The **Robert-Cross** detector combines those four into the edge of pixel (2,2).
* **Two correlators**, one per diagonal pair, sit in front of the detector's two
  XOR gates.
* The **threshold** is a comparator that works on correlated streams. A variable
  CSNG generates its threshold stream from the edge stream itself.
* A **binary counter** ORs the comparator stream into one bit.

Two more counters bring out the number of ones in the edge stream (`edge_value`)
and in the comparator stream (`thr_value`).

With `VAR_THR = 0` a constant CSNG with `THR_CONST` ones (default 26, that is 0.1
of full scale) replaces the variable one, and the `thr` port is ignored.

### Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | window handshake; `in_ready` is high on the last bit of each stream |
| `pix[r][c]` | in | 6×6×8 | input window, r and c = 0..5; the output is the pixel at (2,2) |
| `thr` | in | 8 | threshold, as a number of ones out of 256 |
| `out_valid` | out | 1 | one-cycle pulse per accepted window |
| `out_pixel` | out | 1 | 1 when the edge strength is above `thr` |
| `edge_value` | out | 8 | edge strength × 256 |
| `thr_value` | out | 8 | ones in the comparator stream |

A global down counter frames the streams. The RNG, the counter and the framing run
freely from reset. When `in_valid && in_ready` is true at a clock edge, the window
and the threshold are registered, and the next 256 cycles stream them. The
correlators add one clock. `out_valid` pulses **L + 1 = 257 clocks after the
accepting edge**. A new window can be taken every 256 clocks. If no window was
offered, that slot produces no `out_valid`.

## Numbers, the random source and the SNG

* **`sc_rng`** is the only random source. It is an 8-bit LFSR
  (x⁸+x⁶+x⁵+x⁴+1) with the all-zero state inserted (a de Bruijn counter). Its
  period is exactly 256, and every stream of 256 bits sees each value 0..255 once.
* **`sc_sng`** outputs `rnd < x`. A stream therefore holds exactly x ones, with no
  quantisation or sampling error for streams taken straight from SNGs.
* **Circular shift sharing.** SNGs that need an *uncorrelated* stream, such as MUX
  selectors, compare against the shared value rotated left by `ROT` bits. This is
  another random sequence that costs only wiring. Pixel SNGs use `ROT = 0`.
* **`sc_gctr`** holds the number of bits left in the stream, modulo 256. It reads 0
  on the first bit and then 255, 254, … 1. It also gives the `first` and `last`
  markers that restart every stateful block.

## The correlator (`sc_correlator`)

The correlator has two parts. Both act on one bit per clock and look only at the
current bits and a few bits of state.

**1. Finding the smaller stream.** The two inputs were computed from correlated
streams, so they still share most of their ones. Up to the first bit where they
differ they are identical, which means they are correlated so far. At the first
differing bit, the stream holding the 0 is taken as the minimum. The decision is
held to the end of the stream. This is a comparator for correlated streams. It
needs no arithmetic, only an XOR and a latch.

**2. Relocating the ones of the minimum.** An up/down counter CTR stores ones that
have been taken away:

| min bit | max bit | CTR | corrected min bit | CTR after |
|---|---|---|---|---|
| 1 | 0 | not full | 0 (the 1 is removed) | +1 |
| 0 | 1 | > 0 | 1 (a stored 1 is put here) | −1 |
| otherwise | | | unchanged | unchanged |

The maximum stream passes through unchanged. The corrected minimum is
`(min AND max) OR dec`, a subset of the maximum unless the counter was full. It
also keeps its value, as long as the stored ones can be placed again before the stream ends.

**Counter width.** The number of ones that must wait in CTR is at most
(1 − SCC)·(min − a·b/L). Here SCC is the stochastic correlation of the two inputs
and a, b are their counts of ones. The worst case, SCC = 0, gives L/4. This leads
to a width of log₂(1 − SCC) + log₂L − 2 bits, which is **6 bits for L = 256**
(parameter `CTR_W`). Inputs that are known to be highly correlated need fewer: the
example below uses 4.

Two behaviours are this design's own choices:

* If the counter is full, a 1 that should be removed is **kept in place**. That bit
  stays uncorrelated, but the value is not lost.
* Ones still stored at the end of a stream are lost. The counter restarts at 0 on
  `first`.

**Timing.** The two corrected streams `xo`/`yo` are registered, so the correlator
adds one clock of latency. Its debug outputs are:

* `moved_out` pulses when a 1 is removed;
* `moved_in` pulses when a 1 is inserted;
* `y_min` shows which input was taken as the minimum.

**Measured effect.** `tb_max_example` uses the correlator on the textbook case
p = ½·max(a+b, c+d): two MUXes followed by an OR gate, over 2,000 random inputs.

| | mean absolute error |
|---|---|
| without the correlator | 5.6 % |
| with a 4-bit correlator | 1.6 % |

## The correlated SNG (`csng_const`, `csng_var`)

A CSNG generates a stream X with exactly P ones that is fully correlated with a
given stream Y. A local down counter LCTR holds the ones still to be produced. It
is loaded with P on the first bit. For each bit:

* if LCTR = 0, then X = 0;
* else if LCTR equals the number of bits left (`gctr`), X = 1: the rest of the
  stream must be all ones (tail filling);
* otherwise X = Y.

LCTR decrements on every 1 of X. The effect: if Y has more ones than P, X takes the
first P ones of Y. If Y has fewer, X takes all of them and fills the end. In both
cases X and Y are fully correlated.

`gctr` counts modulo 256, so the comparison is only 8 bits wide. On the first bit
it reads 0, which can only match LCTR = 0, and that case outputs 0 anyway.

The two variants differ only in where the count comes from:

* `csng_const` uses the parameter P;
* `csng_var` samples `value_in` on the first bit.

The `forced` output marks tail-filled bits.

## Threshold and output: why the last stage is exact

`sc_threshold` outputs 0 until the first bit where the edge stream X is 1 and the
threshold stream T is 0. From that bit to the end of the stream it outputs 1.

T is produced by the CSNG from X itself:

* If X holds more ones than the threshold, T runs out of ones first, and such a bit
  must occur.
* Otherwise T covers every 1 of X, and the comparator stays at 0.

`sc_bin_counter` then outputs 1 if any bit of the comparator stream was 1. The
result is that **`out_pixel` = (`edge_value` > `thr`) exactly**. The comparator
stream itself is not all-zeros or all-ones, which is why the binary counter is
needed.

## The filters

**`sc_median3x3`: exact.** Each compare-exchange unit is one AND (the minimum) and
one OR (the maximum). They are arranged as the classic 19-exchange
median-of-9 network. With fully correlated inputs the output bit is the majority
of the nine input bits. The output stream holds exactly the median value, and it is
still fully correlated with the inputs.

**`sc_gauss3x3`: approximate.** It computes the kernel [1 2 1; 2 4 2; 1 2 1]/16
with eight MUXes:

```
m1 = mux(w(i-1,j), w(i-1,j-1), 2/3)    m4 = mux(w(i,j+1), w(i,j),     2/6)
m2 = mux(w(i,j-1), w(i-1,j+1), 2/3)    m5 = mux(w(i+1,j), w(i+1,j-1), 2/3)
m3 = mux(m1, m2, 1/2)                  m6 = mux(m4, m5, 6/9)
m7 = mux(m6, w(i+1,j+1), 9/10)         z  = mux(m3, m7, 6/16)
```

The number is the probability of taking the first operand.

* Selector SNs come from the shared source rotated by 3, 6, 4 and 5 bits, one
  rotation per tree level. A selector is therefore uncorrelated with the pixels and
  with the selectors of the MUXes it feeds.
* Among the sets of distinct rotations, this one gave the lowest error on smooth
  windows: about 0.7 % of full scale (2.5 % on windows of unrelated random pixels).
* The MUXes leave the output only partly correlated with the other filters'
  outputs. This is why the correlators follow.

**`sc_robert_cross`** computes ½(|x(i,j) − x(i+1,j+1)| + |x(i+1,j) − x(i,j+1)|)
with two XORs and a MUX. The MUX selector is ½, from the source rotated by 7, a
rotation no other selector uses.

## Accuracy of the whole pipeline

These figures come from the testbenches. They are mean absolute errors against an
integer model of the same algorithm, as a fraction of full scale.

| quantity | result |
|---|---|
| median outputs | exact (every one of the 16 medians, every window) |
| edge strength, synthetic windows | 0.84 % (`tb_csc_edge_pixel`) |
| edge strength, 24×24 noisy image | 0.83 % (`tb_csc_image`) |
| binary output, 24×24 image | 3.3 % of the pixels differ from the model |

Every differing output pixel has a model edge strength within 5 % of the threshold.
The SC edge value is close to the threshold there, and the last stage compares it
exactly.

**What the correlating circuits buy.** `tb_csc_image` also builds the same chain
without them, from the same library blocks, tapped off the pipeline's Gaussian
streams:

* Robert-Cross runs straight on the uncorrelated Gaussian outputs.
* The threshold stream comes from an ordinary SNG on the shared source, not from a
  CSNG.

Errors on the 24×24 image (seed 1; other seeds give the same picture):

| stage | with correlator and CSNG | without |
|---|---|---|
| edge strength | 0.83 % | 0.95 % |
| threshold-stage stream (counted, against the binary model) | 0.104 | 0.734 |
| binary output, pixels wrong | 3.3 % | 86 % |

Without a CSNG the threshold stream is not correlated with the edge stream. The
comparator then almost always finds a bit where the edge is 1 and the threshold is
0, so nearly every pixel is reported as an edge. The correlator's gain on the edge
strength is smaller on this image: most windows are smooth, and there the two
Gaussian outputs that feed each XOR are close in value.

## Where this RTL departs from or adds to the method

* **Scope.** The method is shown on whole images. Here the hardware unit is one
  output pixel per 256-cycle stream, and the 6×6 window is supplied by the user.
  Line buffers or pixel-parallel replication are left to the integrator.
* **Random source.** The method calls for a uniform random source. The de Bruijn
  LFSR, its taps and its seed are this design's choice.
* **Median network.** The exact AND/OR sorting network is not given. The standard
  19-exchange median-of-9 network is used; any correct network gives the same
  result.
* **Gaussian selector values.** The MUX weights printed with the reference
  structure are read so that the tree realises exactly [1 2 1; 2 4 2; 1 2 1]/16.
  For the last three MUXes the printed weights (1/3, 1/10 and 10/16) are the share
  of the second operand, so 2/3, 9/10 and 6/16 are used as selector probabilities.
  The rotation amounts are this design's choice.
* **Correlator details.** These are own choices:
  * the counter keeps a 1 in place when full;
  * the counter restarts with each stream;
  * there are two correlators, one per XOR pair.

  The one-clock latency is as intended.
* **Threshold comparator.** The triggering bit itself is already output as 1.
* **Counters.** The 8-bit stochastic-to-binary counter saturates at 255.
* **Handshake and reset.** `in_valid`/`in_ready`, the registered window and the
  reset of every register are this design's choices.
* **Resource counts.** The reference figures are 4-bit correlator 4–5 FFs and
  7 LUTs, constant CSNG 9 FFs, variable CSNG 25 FFs. This RTL has:
  * correlator: CTR_W + 4 flip-flops (counter, min decision, two output registers);
  * CSNG: 8 flip-flops (the variable CSNG's value is held outside).

  Neither count is tuned to match.

## Files

| file | contents |
|---|---|
| `rtl/sc_pkg.sv` | precision N = 8, L = 256, correlator width 6 |
| `rtl/sc_rng.sv` | shared random source (de Bruijn LFSR) |
| `rtl/sc_sng.sv` | SNG with circular-shift sharing |
| `rtl/sc_gctr.sv` | global stream counter |
| `rtl/sc_counter.sv`, `rtl/sc_bin_counter.sv` | stochastic → binary, and the OR-type output counter |
| `rtl/sc_correlator.sv` | min finder and relocate circuit |
| `rtl/csng_const.sv`, `rtl/csng_var.sv` | constant and variable CSNG |
| `rtl/sc_threshold.sv` | comparator for correlated streams |
| `rtl/sc_median3x3.sv`, `rtl/sc_gauss3x3.sv`, `rtl/sc_robert_cross.sv` | the three filters |
| `rtl/csc_edge_pixel.sv` | the complete pipeline (top) |
| `tb/tb_<module>.sv` | one self-checking testbench per module, with an independent model |
| `tb/tb_max_example.sv` | the max(a+b, c+d) example with and without a correlator |
| `tb/tb_csc_image.sv` | whole synthetic image, with variable and constant CSNG side by side, and the same chain without correlator and CSNG for comparison |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a
watchdog.

## Simulating

The testbenches run with plain Verilator 5 from the repository root. For example,
for the end-to-end test at full size:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_csc_edge_pixel \
    -y rtl -y tb +libext+.sv rtl/sc_pkg.sv tb/tb_csc_edge_pixel.sv
./obj_dir/Vtb_csc_edge_pixel
```

Replace the top module and file to run any other testbench. All of them finish in
seconds. The design is parameterised by `N` (stream length 2^N), but a few
defaults are written as 8-bit literals: the LFSR taps and the Gaussian selector
constants. Change those along with `N`.
