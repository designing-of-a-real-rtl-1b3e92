# Gesture-recognition CNN accelerator

This is a small fixed-point convolutional neural network in hardware. It
classifies one window of accelerometer data (128 time steps × 3 axes) as one of
three hand gestures (wing "W", ring "O", slope "L") or as "unknown". A processor
next to it writes the samples and the trained weights into on-chip memories and
pulses `start`. About 4000 clock cycles later the accelerator returns four
class scores, their softmax probabilities and the predicted class.

The RTL follows the architecture of the article *Designing of a Real-Time
Gesture Recognition with Convolutional Neural Networks on a Low-End FPGA*. That
article built its accelerator for a Zynq-7020 with high-level synthesis. This
is an independent register-transfer implementation of it. The article gives
the network, its word lengths, the rounding mode, the loop structure and which
layers are merged. Everything else is this implementation's own choice: the
memory organisation, handshakes, host ports, parameter layout, accumulator
widths and the whole softmax unit. The departures are listed in
[What is inferred](#what-is-inferred-rather-than-given).

## The network

| layer            | input      | output     | parameters | stored format |
|------------------|------------|------------|-----------:|---------------|
| conv1, 8 × (4×3) | 128 × 3    | 128 × 3 × 8| 104        | 13.0          |
| max-pool 3×3     | 128 × 3 × 8| 42 × 8     | –          | 13.0          |
| conv2, 16 × (4×8)| 42 × 8     | 42 × 16    | 528        | 14.0          |
| max-pool 3×1     | 42 × 16    | 14 × 16    | –          | 14.0          |
| flatten          | 14 × 16    | 224        | –          | –             |
| dense1           | 224        | 16         | 3600       | 14.1          |
| dense2           | 16         | 4          | 68         | 10.4          |
| softmax          | 4          | 4          | –          | Q1.15 unsigned|

Input samples are signed 12.0 integers. Parameters are signed Q3.7 (10 bits).
`I.F` means I integer bits, including the sign, and F fraction bits. Both
convolutions use "same" padding: one zero row before and two after in time, and
one zero axis either side for conv1. The pools discard time steps 126 and 127.
The flatten order is channel-major: index = channel × 14 + pooled time. ReLU is
applied after both convolutions (inside the pools) and after dense1.

## Three phases instead of seven layers

A straightforward implementation runs each layer to completion and stores its
output in memory. This one merges each layer that can start on partial data
with the layer before it. An inference therefore runs in three sequential
phases:

```
 input mem ──► conv1_pool ──► pool1 buffer ──► conv2_pool ──► dense1 ──► dense2 ──► softmax
 (384×12)     conv1+pool1      (42×8×13)       conv2+pool2    16 accumulators
             ~3128 cycles                        ~802 cycles (same time)  ~20 cycles  ~67 cycles
```

* **conv1 + pool1.** Each convolution result goes straight to a running
  maximum. Nothing of conv1 is stored. After the nine results of a 3×3 pooling
  window have been compared, the maximum is written and reset to 0. Starting
  from 0 makes the pool also act as the ReLU.
* **pool1 → conv2 is not merged.** pool1 produces one channel at a time
  (kernel-outer loop), but every conv2 output needs all 8 channels. A merge
  would only start conv2 near the end, so the two phases stay separate.
* **conv2 + pool2 + dense1.** pool2 emits one value at a time, in flatten
  order. dense1 does not wait for the whole 224-vector. It keeps 16 partial
  sums and updates all of them with every arriving value (x × 16 weights in
  one cycle). When conv2 finishes, one more step adds the biases. dense1
  therefore costs only 3 cycles after conv2.
* **dense2 and softmax** need all of their inputs and run last.

`gesture_cnn_top` contains a five-state sequencer that starts each unit on the
`done` pulse of the previous one.

## Sliding windows: one memory read per output

This is the core of the conv1 unit (`conv1_pool`). The input is stored
time-major: address = t × 3 + axis. Take the 4×3 neighbourhood of output
position n = t × 3 + a: rows t−1 … t+2, axes a−1 … a+1. In this layout it is
exactly the 12 consecutive addresses n−4 … n+7, and tap (dt, da) sits at offset
3·dt + da.

The unit therefore streams addresses 0 … 384 into a 12-entry shift register,
one per cycle. After address r is shifted in, the register holds the
neighbourhood of n = r − 7. The 12 taps are multiplied by the 12 kernel
registers in parallel. Taps that fall outside 0 ≤ t < 128 or 0 ≤ axis < 3 are
masked to zero; this is the padding. The same mask also hides the entries that
wrap from one row into the next at the x and z edges.

Per kernel, the unit loads the 12 weights and the bias in one parameter-row
read, then streams 385 addresses, giving one conv1 output per cycle. For
8 kernels that is 3128 cycles.

conv2 (`conv2_pool`) uses a window of rows instead. The pool1 buffer stores the
8 channels of a time step side by side as one row. One read delivers a whole
row, and a 4-row register (32 values) holds the neighbourhood of one output
time. Row −1 comes from clearing the register per kernel. Rows 42 and 43 are
shifted in as zeros. There are 32 MACs in parallel and one output per cycle:
16 × (44 + 6) = 802 cycles.

## Fixed-point arithmetic

All products and sums are kept at full width: product bits plus enough guard
bits for the number of terms. They are rounded once, to the layer's stored
format, by `fxp_round`. The rounding is convergent (round half to even).
Integer bits that do not fit are dropped, i.e. the value wraps. The formats
were sized in the original work so that real data does not overflow. No
saturation logic exists, so out-of-range weights or inputs give wrapped results
rather than clipped ones.

| sum           | accumulator  | rounded to |
|---------------|--------------|-----------|
| conv1 (12 taps + bias)  | 26 bits, 7 fraction | 13.0 |
| conv2 (32 taps + bias)  | 29 bits, 7 fraction | 14.0 |
| dense1 (224 + bias)     | 33 bits, 7 fraction | 14.1, then ReLU |
| dense2 (16 + bias)      | 30 bits, 8 fraction | 10.4 |

The dense2 bias (7 fraction bits) is shifted left by one to line up with the
8 fraction bits of its products. Because of the ReLU, the sign bit of every
dense1 output is always 0.

### Changing the word lengths

The formats above are the defaults. Each value group has its own pair of
top-level parameters, width `W_*` and fraction bits `F_*`: `IN`, `PRM`, `C1`
(conv1 and pool1), `C2` (conv2 and pool2), `D1` and `D2`. Every unit lines up
its bias with the products by shifting it left by the input's fraction bits.
The accumulators grow with the formats, and the softmax reads the score's
fraction bits from `F_D2`. The schedule does not change, so latency stays at
4019 cycles.

The formats were chosen by narrowing them step by step from a wide
configuration. The testbench `tb_gesture_wordlengths` builds six of those
intermediate configurations side by side (integer.fraction bits):

| config | params | input | conv1 | conv2 | dense1 | dense2 |
|--------|--------|-------|-------|-------|--------|--------|
| T1     | 3.15   | 17.19 | 17.19 | 17.19 | 17.19  | 17.19  |
| T2     | 3.15   | 12.0  | 13.1  | 17.19 | 17.19  | 17.19  |
| T3     | 3.15   | 12.0  | 13.1  | 14.2  | 17.19  | 17.19  |
| T4     | 3.15   | 12.0  | 13.1  | 14.2  | 14.5   | 17.19  |
| T5     | 3.15   | 12.0  | 13.1  | 14.2  | 14.5   | 10.2   |
| T6     | 3.9    | 12.0  | 13.0  | 14.0  | 14.1   | 10.4   |
| T7 (default) | 3.7 | 12.0 | 13.0 | 14.0 | 14.1 | 10.4   |

Going from T6 to T7 only narrows the parameters, from 12 to 10 bits. That
saves 8600 bits of parameter memory.

## Softmax and classification

The predicted class is the index of the largest score; on a tie the lower
index wins. For the probabilities, `softmax` subtracts the maximum score, so
each term is exp(s − max) = 2^−u with u ≥ 0 and the term lies in (0, 1]:

* u = (max − s) × log2 e, with log2 e = 23637 / 2^14.
* u is split into an integer part n and a fraction z.
* 2^−z comes from a cubic in Horner form (coefficients −2589, 15112, −45290,
  65529 / 2^16; max error 1 × 10^−4), which is then shifted right by n.

All four terms are computed in one cycle. A restoring divider then forms
e_i / Σe, one quotient bit per cycle, as a truncated Q1.15 value
(1.0 = 32768). That is 16 cycles per class. In simulation the probabilities are
within 2 × 10^−3 of exact softmax and sum to 1 within 5 × 10^−3.

## Host interface

| port | width | use |
|------|-------|-----|
| `in_we`, `in_addr`, `in_data` | 1, 9, 12 | write sample `in_addr` = t × 3 + axis (x, y, z) |
| `prm_we`, `prm_addr`, `prm_data` | 1, 13, 10 | write parameter `prm_addr` (map below) |
| `start` / `busy` / `done` | 1 each | start when `busy` is low; `done` pulses once |
| `cls`, `prob[4]`, `score[4]` | 2, 4×16, 4×14 | result, valid from `done` to the next `start` |

Both memories may be written only while `busy` is low; an assertion checks
this. Reading a result needs no handshake. All units use an asynchronous
active-low reset (`rst_n`). Memory contents are not reset, so parameters and
samples must be written before the first `start`. Parameters persist across
inferences.

Parameter address map (`gesture_pkg`, each entry one Q3.7 value):

| addresses   | layer  | layout |
|-------------|--------|--------|
| 0 – 103     | conv1  | kernel k at 13·k: 12 taps in order (kt, axis) = kt·3 + axis, then bias |
| 104 – 631   | conv2  | kernel k at 104 + 33·k: 32 taps in order (kt, channel) = kt·8 + channel, then bias |
| 632 – 4231  | dense1 | 632 + 16·i + j: weight from flatten input i to output j; i = 224 holds the 16 biases |
| 4232 – 4299 | dense2 | 4232 + 4·i + o: weight from dense1 output i to score o; i = 16 holds the 4 biases |

Kernel tap kt = 0 … 3 covers time offsets −1 … +2, and axis/channel offsets
run from −1 in the same way. When converting weights from a Keras model, note
that Keras flattens channel-last (time × 16 + channel). Dense1 weights trained
that way must be permuted to the channel-major order used here.

## Timing

| phase | cycles |
|-------|-------:|
| conv1_pool (8 × (2 + 385 + 4)) | 3128 |
| conv2_pool (16 × (2 + 44 + 4)) | 802 |
| dense1 finish, dense2, softmax, sequencing | 89 |
| **start to done** | **4019** |

At the 10.37 ns clock reported for the original implementation, this is
41.7 µs per window. The original HLS design took 42.5 µs.

## Modules

| file | role |
|------|------|
| `rtl/gesture_pkg.sv` | sizes, formats, parameter map, `gesture_e` class type |
| `rtl/gesture_cnn_top.sv` | memories, parameter address decode, sequencer |
| `rtl/conv1_pool.sv` | conv1 + pool1 (12-tap shift register, 12 MACs) |
| `rtl/conv2_pool.sv` | conv2 + pool2 (4-row window, 32 MACs), flatten index |
| `rtl/dense1.sv` | 16 accumulators fed by the pool2 stream, bias, ReLU |
| `rtl/dense2.sv` | 4 accumulators over 16 cycles |
| `rtl/softmax.sv` | exp by polynomial, bit-serial divider, arg-max |
| `rtl/fxp_round.sv` | convergent-rounding requantiser |
| `rtl/lane_ram.sv` | memory with one-word writes and whole-row registered reads |

Each memory is an array in `lane_ram`, with a registered read and a per-lane
write. The largest is the dense1 parameter memory: 225 rows × 16 lanes × 10
bits = 36 000 bits.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/gesture_ref_pkg.sv`, a bit-accurate integer model of the whole network
(including padding, rounding and wrap), with `$exp` for the softmax reference.
The end-to-end test runs the design at full size with random networks:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/gesture_pkg.sv tb/gesture_ref_pkg.sv rtl/fxp_round.sv rtl/lane_ram.sv \
  rtl/conv1_pool.sv rtl/conv2_pool.sv rtl/dense1.sv rtl/dense2.sv rtl/softmax.sv \
  rtl/gesture_cnn_top.sv tb/tb_gesture_cnn_top.sv --top-module tb_gesture_cnn_top
./obj_dir/Vtb_gesture_cnn_top
```

For the word-length test, use `tb/tb_gesture_wordlengths.sv` and its module
name instead of the end-to-end test. For a single unit, replace the last three
files with the unit and its `tb/tb_<unit>.sv`. What the tests cover:

* `tb_gesture_cnn_top` runs four inferences with all 4300 parameters and
  384 samples written through the host ports. The scores and dense1 outputs
  must match bit for bit, the class exactly, and the probabilities within
  0.002. It checks the latency (3900–4300 cycles) and the conv1 rate. It also
  counts kernel reloads, pool1 writes, ReLU clamps, pool2 values absorbed by
  dense1 while conv2 is still running, softmax divisions, windows that use
  padding, and conv1 sums that hit a rounding tie. Each must occur.
* `tb_gesture_wordlengths` builds the top at configurations T1 to T6 and runs
  two random inferences on each. The dense1 outputs and scores must match a
  model set to the same formats bit for bit, and the latency must be the same
  for all six.
* Each unit testbench compares its unit's complete output with the model:
  all 336 pool1 values, all 224 flattened values with their order and spacing,
  dense outputs with random input gaps, and rounding ties exhaustively.

## What is inferred rather than given

These points were not fixed by the original description. They are the parts to
review before using the design with real trained weights.

* **Kernel orientation.** conv1 kernels are described as "3×4". Here they are
  read as 4 time steps × 3 axes, the only reading consistent with the "same"
  128 × 3 output and a 12-value sliding window.
* **Pool window.** The merged conv1/pool1 loop is described once as comparing
  12 values, while the layer itself is a 3×3 (9-value) pool. This design pools
  3×3, which yields the documented 42 × 8 shape.
* **Activations.** ReLU after the convolutions follows from the pooling
  maximum being reset to 0. ReLU after dense1 is taken from the standard
  TinyML model this network is based on; it was not stated.
* **Padding placement** (one row before, two after) follows the usual
  convention for even kernels ("same" padding in TensorFlow).
* **Overflow behaviour** is wrap-around, the fixed-point default. No
  saturation is implemented.
* **Softmax** is entirely this design's own: algorithm, Q1.15 output,
  truncation and arg-max tie rule.
* **Memory organisation, parameter layout, host ports and handshakes** are
  this design's own. The original used the processor's bus; here there are
  plain write ports.
* **Word lengths** are fixed to the final configuration (parameters 3.7).
  Other configurations from the word-length study (e.g. parameters 3.9,
  intermediates 17.19) need the constants in `gesture_pkg` changed. The
  accumulator widths in the units follow from those constants, but the
  reference model's rounding shifts assume Q3.7 parameters.
* **Cycle counts** come out close to the published ones (3128 vs ≈3109 cycles
  for conv1/pool1, 802 vs ≈730 for conv2/pool2, 4019 vs ≈4100 in total). They
  were not matched cycle by cycle.

The accelerometer front end and the processor software are not part of this
RTL. The testbench plays the processor's role.
