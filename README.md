# Self-training digit CNN with K-means weight sharing

This is a small convolutional neural network that trains itself in hardware,
with no processor involved. Once training has converged, a K-means clustering
engine groups the network's 75 weights into *k* shared values. The clustered
weights then replace the trained ones, so the network ends up running on only
*k* distinct weight values. This is the weight-sharing form of compression: a
weight store that has to hold only *k* values can be much smaller.

The network recognises four 4x4 black-and-white images, one class per image.
It has three 3x3 convolution filters, a ReLU, a 12-input / 4-output fully
connected layer and a softmax. Training is gradient descent on the fully
connected weights and on the filter weights. The RTL is SystemVerilog-2017:
fixed point throughout, one package of shared types, and no vendor
primitives.

```
                 +----------------------------- cnn_trainer -----------------------------+
 img_i[4] ------>| image select -> conv_layer -> relu -> fc_layer -> sortmax -> softmax    |---> y_o, class_o
 infer_img_i --->|      |             |                   |                       |        |
                 |      |             |             backprop_fc  <-- error_calc <-+        |
                 |      |             +------> backprop_conv_p1 <--+ (deltas)             |
                 |      +----------------------> backprop_conv_p2                          |
                 |  weight registers (75 x 12 bit)  <--- w_in_i (write port)               |
                 +-------------------------------------------------------------------------+
                        | w_o (current weights)        ^ w_upd_o (updated weights)
                        v                              |
                 +-- kmeans_cluster --+          +-----+------+
   k_i --------->| E x64 -> F -> S&A  |--------->| weight_mux |---> back to w_in_i
                 | -> 1/n * sum -> OE |  w_clu   +------------+
                 +--------------------+  finish ------^ select
```

## Files

| file | block |
|---|---|
| `rtl/cnn_pkg.sv` | sizes, number formats, exponential tables, initial weights |
| `rtl/conv_layer.sv` | three 3x3 filters over the 4x4 image, producing 12 results |
| `rtl/relu.sv` | rectifier on the 12 results |
| `rtl/fc_layer.sv` | 12 x 4 fully connected layer |
| `rtl/sortmax.sv` | maximum of the four layer outputs and its index |
| `rtl/softmax.sv` | table-based softmax |
| `rtl/error_calc.sv` | output minus target |
| `rtl/backprop_fc.sv` | update of the 48 fully connected weights |
| `rtl/backprop_conv_p1.sv` | gradients at the 12 convolution outputs |
| `rtl/backprop_conv_p2.sv` | update of the 27 filter weights |
| `rtl/cnn_trainer.sv` | weight registers, datapath and training sequencer |
| `rtl/euclid_dist.sv` | distance from a weight to a centroid (block E) |
| `rtl/find_min.sv` | nearest centroid, which becomes the 6-bit tag (block F) |
| `rtl/search_add.sv` | per-cluster sums and counts |
| `rtl/reciprocal_mult.sv` | cluster mean as sum x 1/count |
| `rtl/output_encoder.sv` | replaces each weight by its centroid |
| `rtl/kmeans_cluster.sv` | K-means sequencer |
| `rtl/weight_mux.sv` | 2:1 multiplexer on the CNN's weight write port |
| `rtl/cnn_kmeans_top.sv` | top level: training, then automatic clustering and reload |

## Number formats

Every value is an integer with an implied binary point:

| type | width | fraction bits | used for |
|---|---|---|---|
| `weight_t` | 12 signed | 8 (range about ±8) | filter and fully connected weights |
| `act_t` | 12 signed | 8 | convolution and ReLU outputs |
| `sop_t` | 24 signed | 16 | fully connected sums |
| `prob_t` | 20 unsigned | 19 (one integer bit, 1.0 = `0x80000`) | softmax outputs, targets |
| `err_t` | 21 signed | 19 | errors and output deltas |
| `grad_t` | 32 signed | 27 | gradients at the convolution outputs |

These widths are the port widths of the original design. The position of the
binary point in the 12-bit words is this implementation's choice. Every
narrowing step saturates, and shifts that drop fraction bits round half up.

## The weight vector

The CNN's state is 75 twelve-bit weights, and all weight traffic (the
multiplexer, the clustering and the write port) uses one fixed order:

* `w[f*9 + m*3 + n]`, for 0..26, is filter `f`, row `m`, column `n`.
* `w[27 + i*12 + j]`, for 27..74, is the fully connected weight from input
  `j` to output `i`.
* Fully connected input `j` is filter `j/4` at output position
  `((j%4)/2, j%2)` of its 2x2 map.

A pixel `(r,c)` of an image is bit `r*4+c`.

After reset the weights hold fixed pseudo-random values in [-0.25, 0.25).
They come from a 16-bit LFSR (taps 16, 14, 13, 11, seed `0xACE1`) that is
stepped 16 times per weight: the weight is the low byte minus 128, shifted
right by one.

## Forward pass

* **Convolution.** Pixels are single bits, so each product in the 3x3 window
  either selects the weight or gives zero. Each of the 12 results is the
  saturated sum of the selected weights.
* **ReLU.** Looks only at the sign bit.
* **Fully connected layer.** Four sums of 12 products each, with no bias.
* **Sortmax.** Finds the largest sum `S_max`. Its index is the recognised
  class; on a tie the lowest index wins.
* **Softmax.** Evaluates `Y_i = e^(S_i - S_max) / sum_j e^(S_j - S_max)`:
  * `d = S_max - S_i` is never negative.
  * `e^-d` is the product of two 16-entry tables: `EXP_INT[int(d)]` and
    `EXP_FRAC[first 4 fraction bits of d]`. Each entry is
    `round(e^-x * 2^19)`. When `d >= 16` the value is 0.
  * The largest output always contributes exactly 1.0, so the denominator is
    never zero.
  * The four quotients come from a combinational divider.

## Training

Training processes **one image per clock**. Within that clock, the forward
pass, the error and both weight updates all settle, and the weight registers
load the new values at the clock edge. An epoch is four clocks (images 0..3).

* **Targets.** The output for the image's own class targets 0.99. The other
  three outputs target 0.0033, so the four targets add up to one.
  `E_i = Y_i - T_i`.
* **Fully connected update** (`backprop_fc`):
  * The output delta is `delta_i = E_i * Y_i * (1 - Y_i)`. This is the chain
    rule through the diagonal of the softmax derivative.
  * `W_ij <- W_ij - alpha1 * delta_i * I_j`, where `I_j` is the ReLU output
    and `alpha1 = 2^LR1_LOG2 = 16`.
* **Gradients at the convolution outputs** (`backprop_conv_p1`):
  `g_j = [C_j > 0] * sum_i delta_i * W_ij`. This uses the fully connected
  weights from before the update.
* **Filter update** (`backprop_conv_p2`):
  * The filter gradient is the image convolved with the 2x2 gradient map:
    `dF_f(m,n) = sum_{p,q} g_f(p,q) * A(p+m, q+n)`.
  * `F <- F - alpha2 * dF`, with `alpha2 = 2^LR2_LOG2 = 1/64`.
* **Stop rule.** Training stops at the end of the first epoch in which every
  image's own output was at least `THRESH` = 0.9 before its update. The
  outputs are measured before the update because this is a single-cycle
  datapath. `converged_o` then goes high. After `MAX_EPOCHS` = 255 epochs
  training stops anyway and `converged_o` stays low.

Training takes exactly `4 x epochs` clocks. With the digit bitmaps used in
the testbenches, the four digit sets converge in 16 to 33 epochs.

The learning rates were chosen with a bit-accurate fixed-point model of this
datapath. The testbenches compare the RTL against that model's epoch counts,
final outputs and weight sums.

## K-means weight sharing

`kmeans_cluster` treats the 75 weights as scalars. Euclidean distance
therefore reduces to `|w - c|`: no squares and no square root. Up to
`K_MAX` = 64 clusters are supported, because a cluster tag is 6 bits wide.
`k_i` selects how many clusters are active; 0 is treated as 1, and values
above 64 as 64.

| phase | clocks | what happens |
|---|---|---|
| INIT | 75 | Picks *k* starting centroids from the weights, at evenly spaced indices. An accumulator adds *k* each clock and picks the current weight whenever the total passes 75 (Bresenham style). This picks exactly *k* weights. |
| ASSIGN | 75 | Takes one weight per clock. 64 distance units (E) measure it against every centroid. `find_min` (F) picks the nearest active centroid, lowest index on a tie. The 6-bit tag is stored, and `search_add` adds the weight to that cluster's sum and count. |
| UPDATE | *k* | Takes one cluster per clock. `reciprocal_mult` computes `round(2^20/count)`, multiplies it by the sum and rounds to the weight format. This is the cluster mean, accurate to within one LSB. An empty cluster keeps its old centroid. |

When no centroid changes during UPDATE, clustering is done. Otherwise the
sums are cleared and ASSIGN runs again. `MAX_ITER` = 255 bounds the number
of passes.

When clustering is done, `finish_o` goes high, and `output_encoder` maps
every weight to the centroid of its tag. A run therefore takes
`75 + iterations x (75 + k)` clocks. In the test workloads it needs 4 to 20
iterations.

The input weights must stay stable while the engine runs. They do, because
the CNN is idle during clustering.

## Putting it together (`cnn_kmeans_top`)

1. `start_i` starts training and clears the previous run's `done_o` and
   `compressed_o`.
2. When training ends, and if `compress_en_i` is high, the trainer's one-clock
   `done` pulse starts K-means on the trained weights, using `k_i` clusters.
3. When K-means finishes, its `finish` output switches `weight_mux` from the
   trainer's own updated weights to the clustered weights. On the clock where
   `finish` rises, a one-clock write loads the clustered weights into the
   trainer's registers.
4. `compressed_o` and `done_o` rise. From then on, `y_o` and `class_o` show
   the compressed network's response to `infer_img_i`.

With `compress_en_i` low, `done_o` rises one clock after training ends and
the trained weights are kept.

Timing, counted from the clock that samples `start_i`:

* with compression, `done_o` is seen after
  `4 x epochs + 2 + 75 + iterations x (75 + k)` clocks;
* without compression, after `4 x epochs + 1` clocks.

`weights_o` always shows the CNN's current weights.

## Compression results in simulation

`tb/tb_compression_sweep.sv` runs four digit sets. Each set is trained and
then compressed to *k* = 38, 30, 15 and 8 shared values, which is 50, 60,
80 and 90 % fewer distinct values than 75 weights. For every set and every
rate:

* the compressed network still gives all four images the same class as the
  uncompressed network;
* every weight ends up at the nearest of the shared values.

| set | digits | epochs |
|---|---|---|
| A | 0 1 4 7 | 17 |
| B | 7 1 6 9 | 16 |
| C | 3 5 4 1 | 33 |
| D | 1 8 2 7 | 20 |

This differs from the original evaluation, where recognition began to suffer
above 60 %. The difference is likely because the 4x4 bitmaps used here are
this implementation's own, and because its number formats differ. Treat the
accuracy figures as a property of this RTL with these images.

Digit bitmaps (hex, bit `r*4+c`): 0 `f99f`, 1 `e464`, 2 `f2c7`, 3 `7467`,
4 `4f55`, 5 `7e1f`, 6 `f971`, 7 `248f`, 8 `f96f`, 9 `8f9f`.

## Where this RTL departs from the original design, or fills gaps

* **Number formats.** The binary-point positions of the 12-bit words,
  saturation and rounding are choices made here. So are the learning rates
  (16 for the fully connected layer, 1/64 for the filters), the targets for
  the non-class outputs (0.0033), the 0.9 stop threshold, the epoch limit and
  the initial weights.
* **Softmax table.** The table is split into integer and sixteenths parts,
  and the divider is an ordinary combinational divider.
* **Backpropagation.** The chain rule uses only the diagonal term of the
  softmax derivative, `Y(1-Y)`. The filter backward pass receives the deltas
  rather than the raw softmax outputs.
* **Scope of compression.** All 75 weights are clustered as one population,
  and all of them go through the multiplexer.
* **K-means.** The starting centroids are the evenly spaced initialisation
  described above, not random values. Weights are processed one per clock.
  The reciprocal has 20 fraction bits, so the product is 41 bits instead of
  32: with a 32-bit product the mean could be off by more than one LSB.
* **Schedule.** One image per clock, with no pipelining. The critical path
  runs through the convolution, the fully connected layer, four dividers and
  both backpropagation stages. That is fine for simulation and functional
  synthesis, but slow in clock frequency. A practical FPGA build would
  register the path in several stages.
* **Added ports.** `compress_en_i` (to run without compression for
  comparison) and the `done_o`, `compressed_o`, `epochs_o` and
  `kmeans_iter_o` status outputs.
* **Not modelled.** The vendor-specific resource figures of the original
  (LUT and slice counts versus compression rate). In this RTL the weights are
  registers, so compression changes how many distinct values they hold, not
  the number of registers. Making the saving real needs a *k*-entry codebook
  plus 75 tags in place of the weight registers. That step is not part of
  this RTL.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/cnn_pkg.sv tb/tb_cnn_kmeans_top.sv \
          --top tb_cnn_kmeans_top -Mdir obj_top
./obj_top/Vtb_cnn_kmeans_top
```

Substitute any other `tb/tb_<block>.sv` in the same way.

* `tb_cnn_kmeans_top` is the end-to-end test at the default sizes. It runs
  set A without and then with compression to 15 clusters. It checks that
  training matches the fixed-point model exactly and checks the cycle counts.
  It also counts every mechanism (converged training, run without
  compression, automatic clustering start, multi-pass K-means, multiplexer
  switch and write, restart) and fails if any one never happened.
* `tb_cnn_trainer` checks training of sets A and C bit-exactly against the
  model: epochs, outputs and weight sum. It also checks the reset weights,
  the external write and the epoch limit.
* `tb_kmeans_cluster` checks clustering results by the properties of a
  converged solution:
  * at most *k* values;
  * every weight at its nearest value;
  * every value the mean of its members, within one LSB;
  * the exact cycle count.

  It also runs a directed three-group case.
* `tb_compression_sweep` is the workload run described above.
* The remaining testbenches compare each block against a reference written
  separately inside the testbench, in integer or floating point, over
  random and corner-case inputs.

All testbenches finish in well under a second.

## Changing the design

Sizes live in `cnn_pkg`. The learning rates, the stop threshold and the epoch
limit are parameters of `cnn_trainer`. `N`, `K` and `MAX_ITER` are parameters
of `kmeans_cluster`. The loops in the layer modules are written in terms of
the package sizes. Two parts are written specifically for the present
configuration: the class index (`cls_t`, 2 bits) and the 6-bit tag.
