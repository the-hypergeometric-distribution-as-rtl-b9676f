# Stochastic kernel density estimation with correlation-aware LFSR streams

This is synthesizable SystemVerilog for a stochastic-computing (SC) circuit that
estimates, for one pixel of a video, how typical its current value is given
its last 32 values:

    P(X32) = 1/32 * sum_{t=0..31} exp(-4 * |X32 - Xt|)

A low P marks a foreground (moving) pixel, a high P a background pixel.
The sum, the 32 differences and the 32 exponentials are all computed on
*stochastic numbers*: 255-bit streams whose fraction of 1s is the value.

The design rests on one observation about LFSR-generated streams. A
maximum-period 8-bit LFSR visits each of its 255 nonzero states exactly once
per period. So a comparator stream `R < B` taken over one full period holds
exactly B-1 ones, with no randomness in its value at all. The bits are draws
*without replacement*, which is a hypergeometric model, not the independent
Bernoulli bits that SC theory usually assumes. Two consequences shape the
circuit:

* **Correlated inputs make a mux more accurate.** A 2-way mux only adds
  randomness in the cycles where its two data inputs differ. When those inputs
  come from the same LFSR they overlap as much as possible, so they differ in
  the fewest cycles and the output error is lowest. Inputs from an inverted
  stream are anti-correlated: they differ in the most cycles and the error is
  highest.
* **A select word that never repeats samples evenly.** A mux tree whose select
  word steps through every value exactly once samples each input equally
  often. A select word built from independent LFSR streams does not.

## Block diagram

```
              pix_ref (X32)        pix_hist[t] (Xt), t = 0..31
                  |                        |
  LFSR_pix --R--> [R < X32] --x_bit--+     |
      |                              v     v
      +------------R-------------> cam_subtractor[t] --sub_bits[t]--> abs_exp_fsm[t] --exp_bits[t]--+
                                     ^  (Xt SNG sees ~R, then inverter, then mux)                     |
  LFSR_sel --R'--> [R' < 128] --S0---+  (one S0 for all 32 subtractors)                             |
                                                                                                    v
                                          NLFSR (5 bit) --tree_sel--> 32-input mux tree (cbt_adder) --> z
                                                                                                    |
                                                                           ones counter <-----------+
```

## The three layers

### Subtraction: the CAM subtractor (`cam_subtractor`)

A mux with a select stream S of about 0.5 passes X in half the cycles and
NOT Y in the other half. Its output value is 0.5*X + 0.5*(1-Y). Read as a
bipolar number (value = 2p-1), that is exactly X - Y.

Suppose X's and Y's SNGs share one LFSR, as they do here to save area. The
inverter on the Y path then turns Y into a stream that is *anti*-correlated
with X, which is the worst case for the mux. The correlation-adjusted mux (CAM)
subtractor fixes this without extra gates: Y's comparator is fed the
*inverted* LFSR state `~R`. The Y stream is then anti-correlated with X, and
after the inverter it is maximally correlated with X again. Over one period
the two mux data inputs differ in exactly |(X-1) - (255-Y)| cycles. Only those
cycles carry select noise. `tb_cam_subtractor` checks this count exactly.

One SNG for X32 drives all 32 subtractors. One shared LFSR (`u_lfsr_pix`)
serves that SNG and the 32 Xt comparators. A second LFSR with a different
primitive polynomial makes S0, so the select stream is not correlated with the
data.

A side effect of comparing `~R < B`: with R over 1..255, `~R` covers 0..254.
The inverted comparator therefore gives exactly B ones per period, while the
plain one gives B-1. The difference X32 - Xt carries a bias of 1/255, which is
small beside the other error sources and is left as it is.

### Exponentiation: saturating-counter FSM (`abs_exp_fsm`)

Each bipolar difference stream drives a 32-state saturating up/down counter:
up on a 1, down on a 0. The output is 0 in the 2 lowest and the 2 highest
states and 1 elsewhere. Near x = 0 the counter wanders and the output is
mostly 1. For larger |x| the counter is pinned at one end. With
r = (1+x)/(1-x), the output mean approaches r^-2, which is close to exp(-4|x|).

Measured long-run means (from `tb_abs_exp_fsm`):

| x | 0 | 0.1 | 0.25 | 0.4 | 0.6 | 0.8 |
|---|---|---|---|---|---|---|
| FSM output | 0.84 | 0.65 | 0.36 | 0.18 | 0.07 | 0.01 |
| exp(-4\|x\|) | 1.00 | 0.67 | 0.37 | 0.20 | 0.09 | 0.04 |

The counter starts in the middle state at every `start`. Within a 255-bit
stream its start-up transient is part of the error. The state count and the
output band are a choice of this implementation. The circuit calls for an
absolute-value exponentiation element without fixing its internals.

### Averaging: the condensed balanced tree (CBT) adder (`cbt_adder`, `nlfsr`)

A 32-input balanced tree of 31 two-way muxes picks one input per cycle. In a
conventional tree each of the 5 layers has its own LFSR SNG for its select
bit. Those 5 streams can line up so that some inputs are picked more often
than others. Here a single 5-bit NLFSR drives all 5 layers: its state *is*
the select word. The NLFSR is a 5-bit LFSR (x^5+x^3+1) whose feedback is XORed
with a NOR of the 4 bits that stay in the register. This splices the all-zero
state in between `10000` and `00001`, so all 32 select values occur exactly
once every 32 cycles. With constant inputs the tree output therefore holds
exactly popcount(d) ones per 32 cycles. It also replaces five 8-bit LFSRs and
comparators with one 5-bit register.

Layer k (k = 1 next to the data) is steered by NLFSR bit k-1, so the tree
passes `d[tree_sel]`.

## Interface and timing of `hkde` (top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse: reload seeds, centre FSMs, clear count |
| `pix_ref` | in | 8 | current pixel X32 |
| `pix_hist` | in | 32 x 8 | history X0..X31 (packed array, `pix_hist[t]`) |
| `busy` | out | 1 | the 255-cycle stream is running |
| `done` | out | 1 | `ones` is valid; held until the next `start` |
| `ones` | out | 8 | number of 1s in the output stream; P ~ ones/255 |
| `z` | out | 1 | output stream bit |
| `sub_bits`, `exp_bits` | out | 32 | per-frame bits of the subtraction and exponentiation layers |
| `tree_sel` | out | 5 | current CBT select word |

Timing: after the clock edge that samples `start`, `busy` is high for exactly
255 cycles. In each of them every stream advances one bit and `z` is added to
`ones`. `done` rises on the next edge. An operation takes 257 cycles from the
`start` pulse to `done`. A `start` during `busy` restarts the stream. Hold the
pixel inputs stable while `busy`. There are two register-to-register paths.
The first runs from an LFSR through an 8-bit compare and the subtractor mux
into an FSM's next state. The second runs from an FSM state through its
output decode and the 5-level mux tree into the ones counter. `z` is
combinational from the FSM and NLFSR registers.

## Parameters

Package `sc_pkg` holds the shared constants. `hkde` parameters: `W` = 8 (LFSR
width, 2^W-1 = 255-bit streams), `FRAMES` = 32, `M` = 5 (NLFSR width,
FRAMES = 2^M), `LEN` = 255. The stream length, the widths and the 32 frames
are the configuration of the original design. Other sizes need new primitive
polynomials in `sc_pkg`: `PIX_TAPS`, `SEL_TAPS` and `NLFSR_TAPS`, given as
Fibonacci tap masks.

## How far it can be trusted

Every block has a self-checking testbench. Each one compares its block cycle
by cycle against a model written separately in the testbench. Each testbench
has been shown to fail on a deliberately broken copy of its block.

`tb_hkde` runs the top at its default size. It runs 24 complete operations
and one restart on generated pixel data: background, foreground and random
histories. It checks every layer bit of every cycle against the model. It also
checks that `done` comes after exactly 255 cycles, and that ones/255 is within
0.25 of the exact P(X32).

## Measured accuracy

Three workload testbenches compare the design with the conventional circuit it
improves on. That circuit is modelled inside each testbench and is not part of
`rtl/`. Its subtractor feeds the Y comparator the plain LFSR state. Its mux
tree takes its select bits from independent LFSR SNGs.

**CAM subtractor** (`tb_cam_workload`). The testbench runs all 65,025 (X, Y)
pairs, each with a random select seed. Only the select-induced error is
counted, not quantization. RMSE: 0.026 for the CAM subtractor against 0.044
for the original, 42 % lower.

**CBT adder** (`tb_cbt_workload`). The testbench uses 16-, 32- and 64-input
trees and 63- and 255-bit LFSR inputs, with 5000 random runs per case. The
CBT error is lower than the conventional tree's in every case:

| inputs | 63-bit, correlated | 63-bit, uncorrelated | 255-bit, correlated | 255-bit, uncorrelated |
|---|---|---|---|---|
| 16 | 26 % | 18 % | 25 % | 18 % |
| 32 | 26 % | 16 % | 24 % | 18 % |
| 64 | 28 % | 17 % | 27 % | 19 % |

**Whole KDE** (`tb_kde_workload`). The testbench uses 600 generated pixel
histories: noisy static background, a passing object, and new foreground.
Per-layer RMSE against the exact values:

| layer | this design | conventional |
|---|---|---|
| subtraction (bipolar X32 - Xt) | 0.030 | 0.033 |
| exponentiation | 0.095 | 0.074 |
| output P(X32) | 0.082 | 0.063 |

In the full circuit the subtraction layer gains only about 10 %. This design
then *loses* accuracy in the exponentiation layer, and the loss carries
through to the output. The cause is the FSM. When X32 and Xt are close, the
correlated mux inputs are nearly identical, so the difference stream is
almost exactly X32's comparator stream. Consecutive LFSR states are shifts of
one another, so that stream has runs. Those runs push the 32-state counter
into its saturated states more often than the better-mixed stream of the
conventional subtractor does. The original design reports a lower output
error for the improved circuit. That result used an exponentiation element
whose internals are not known here. Treat `abs_exp_fsm` as the weakest part
of this implementation, and the first to replace.

## Choices not fixed by the original design

* LFSR polynomials: x^8+x^6+x^5+x^4+1 for the pixels, x^8+x^6+x^5+x^3+1 for
  S0, x^5+x^3+1 under the NLFSR. Seeds: 0x01, 0x5A, 0x00.
* S0 comes from its own LFSR with level 128, i.e. P(S0) = 127/255.
* The exponentiation element's internals (32 states, band of 2).
* The start/busy/done control and the ones counter. Comparing the result with
  a foreground threshold, and storing the frame history, are left to the user.
* Select polarity: select 1 passes X in the subtractor and the odd input in
  each tree mux.
* The conventional circuit the design improves on is not in `rtl/`. It
  appears only as a model inside the workload testbenches.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/sc_pkg.sv tb/tb_hkde.sv --top-module tb_hkde
./obj_dir/Vtb_hkde
```

Replace `tb_hkde` with `tb_lfsr`, `tb_sng`, `tb_nlfsr`, `tb_cam_subtractor`,
`tb_abs_exp_fsm` or `tb_cbt_adder` for a single block. Use `tb_cam_workload`,
`tb_cbt_workload` or `tb_kde_workload` for the accuracy measurements. Each of
those runs in a few seconds. Each testbench ends
with a line `TB_RESULT checks=N failures=F`. `tb_hkde` also prints the
per-layer RMS errors and how often each mechanism occurred.

## Files

* `rtl/sc_pkg.sv`: shared constants
* `rtl/lfsr.sv`, `rtl/sng.sv`: random source and comparator SNG
* `rtl/nlfsr.sv`: the de Bruijn select generator
* `rtl/cam_subtractor.sv`: subtraction layer element
* `rtl/abs_exp_fsm.sv`: exponentiation layer element
* `rtl/cbt_adder.sv`: averaging layer
* `rtl/hkde.sv`: the complete KDE circuit
* `tb/tb_*.sv`: one testbench per module, plus the three workload testbenches
