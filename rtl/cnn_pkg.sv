// cnn_pkg - sizes, number formats, tables and initial values shared by the
// self-training CNN and the K-means weight compressor.
//
// Number formats (all two's complement unless noted):
//   weight_t  12 bit, 8 fraction bits (Q3.8)   filter and fully connected weights
//   act_t     12 bit, 8 fraction bits (Q3.8)   convolution and ReLU outputs
//   sop_t     24 bit, 16 fraction bits         fully connected sums of products
//   prob_t    20 bit unsigned, 19 fraction bits (one integer bit) softmax outputs
//   err_t     21 bit, 19 fraction bits         errors and output deltas
//   grad_t    32 bit, 27 fraction bits         gradients at the convolution outputs
// The 12/24/20/21/32 bit widths follow the design's port sizes; the position of
// the binary point in the 12 bit words is this implementation's choice.
//
// Weight vector order (75 words): filter f, row m, column n at f*9+m*3+n
// (0..26), then fully connected weight from input j to output i at
// 27+i*12+j. Fully connected input j is filter j/4, position (j%4)/2, j%2.
package cnn_pkg;

  localparam int IMG_N    = 4;            // image is IMG_N x IMG_N pixels, 1 bit each
  localparam int FK       = 3;            // filter size
  localparam int CO       = IMG_N - FK + 1; // 2: convolution output size
  localparam int N_FILT   = 3;
  localparam int N_FEAT   = N_FILT * CO * CO; // 12 fully connected inputs
  localparam int N_OUT    = 4;            // 4 classes
  localparam int N_FW     = N_FILT * FK * FK; // 27 filter weights
  localparam int N_FCW    = N_FEAT * N_OUT;   // 48 fully connected weights
  localparam int N_WEIGHTS = N_FW + N_FCW;    // 75

  localparam int W_W    = 12;
  localparam int W_FRAC = 8;
  localparam int S_W    = 24;
  localparam int S_FRAC = 16;
  localparam int Y_W    = 20;
  localparam int Y_FRAC = 19;
  localparam int E_W    = 21;
  localparam int G_W    = 32;
  localparam int G_FRAC = 27;

  // K-means sizes
  localparam int K_MAX  = 64;             // 6-bit cluster tag
  localparam int TAG_W  = 6;
  localparam int K_W    = 7;              // number of clusters, 1..K_MAX
  localparam int SUM_W  = 20;
  localparam int CNT_W  = 7;

  typedef logic signed [W_W-1:0] weight_t;
  typedef logic signed [W_W-1:0] act_t;
  typedef logic signed [S_W-1:0] sop_t;
  typedef logic        [Y_W-1:0] prob_t;
  typedef logic signed [E_W-1:0] err_t;
  typedef logic signed [G_W-1:0] grad_t;
  typedef logic [IMG_N*IMG_N-1:0] image_t;   // pixel (r,c) at bit r*IMG_N+c
  typedef logic [TAG_W-1:0]      tag_t;
  typedef logic [1:0]            cls_t;
  typedef logic [W_W-1:0]        dist_t;     // unsigned distance

  typedef weight_t wvec_t [N_WEIGHTS];

  localparam prob_t ONE_Y  = prob_t'(1 << Y_FRAC);
  localparam prob_t T_HI   = 20'd519045;    // 0.99
  localparam prob_t T_LO   = 20'd1730;      // 0.0033, the three low targets add to 0.01

  // e^-n for n = 0..15 and e^-(k/16) for k = 0..15, in Q1.19:
  // entry = round(exp(-x) * 2^19).
  localparam prob_t EXP_INT [16] = '{
    20'd524288, 20'd192875, 20'd70955, 20'd26103, 20'd9603, 20'd3533, 20'd1300, 20'd478,
    20'd176, 20'd65, 20'd24, 20'd9, 20'd3, 20'd1, 20'd0, 20'd0};
  localparam prob_t EXP_FRAC [16] = '{
    20'd524288, 20'd492523, 20'd462683, 20'd434650, 20'd408316, 20'd383577, 20'd360338, 20'd338506,
    20'd317997, 20'd298730, 20'd280631, 20'd263629, 20'd247656, 20'd232651, 20'd218556, 20'd205314};

  // Saturate a wide signed value to W bits.
  function automatic logic signed [W_W-1:0] sat_w(input logic signed [63:0] v);
    if (v > 64'sd2047)       return 12'sh7ff;
    else if (v < -64'sd2048) return 12'sh800;
    else                     return v[W_W-1:0];
  endfunction

  // Arithmetic right shift by s with round-half-up.
  function automatic logic signed [63:0] rshift_round(input logic signed [63:0] v, input int s);
    if (s <= 0) return v <<< (-s);
    return (v + (64'sd1 <<< (s - 1))) >>> s;
  endfunction

  // Initial weights: a 16-bit Fibonacci LFSR (taps 16,14,13,11, seed 16'hACE1)
  // is stepped 16 times per weight; the low byte minus 128, halved, gives a
  // value in [-0.25, 0.25).
  function automatic wvec_t gen_init_weights();
    wvec_t w;
    logic [15:0] s;
    logic        b;
    s = 16'hACE1;
    for (int i = 0; i < N_WEIGHTS; i++) begin
      for (int t = 0; t < 16; t++) begin
        b = s[0] ^ s[2] ^ s[3] ^ s[5];
        s = {b, s[15:1]};
      end
      w[i] = weight_t'(($signed({24'd0, s[7:0]}) - 32'sd128) >>> 1);
    end
    return w;
  endfunction

endpackage
