// euclid_dist - distance between one weight and one centroid (block E).
//
// Weights are scalars, so the Euclidean distance sqrt((q-v)^2) is
// simply |q - v|. The difference of two 12-bit signed values fits a 12-bit
// unsigned magnitude (at most 4095). Combinational.
module euclid_dist
  import cnn_pkg::*;
(
  input  weight_t a_i,
  input  weight_t b_i,
  output dist_t   d_o
);

  logic signed [W_W:0] diff;

  always_comb begin
    diff = (W_W+1)'(a_i) - (W_W+1)'(b_i);
    d_o  = diff[W_W] ? dist_t'(-diff) : dist_t'(diff);
  end

endmodule
