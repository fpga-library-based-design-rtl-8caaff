// output_encoder - weight sharing: every weight is replaced by the centroid
// of the cluster its tag names, so only K distinct values remain.
// Combinational.
module output_encoder
  import cnn_pkg::*;
#(
  parameter int N = N_WEIGHTS,
  parameter int K = K_MAX
) (
  input  tag_t    tag_i  [N],
  input  weight_t cent_i [K],
  output weight_t w_o    [N]
);

  always_comb
    for (int i = 0; i < N; i++)
      w_o[i] = cent_i[tag_i[i]];

endmodule
