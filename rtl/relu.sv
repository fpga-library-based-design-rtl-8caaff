// relu - rectified linear activation for the 12 convolution results.
//
// Each output looks only at the sign bit of its input: a 1 (negative value)
// gives zero, otherwise the input passes unchanged. Combinational, no state.
module relu
  import cnn_pkg::*;
#(
  parameter int N = N_FEAT
) (
  input  act_t x_i [N],
  output act_t y_o [N]
);

  always_comb
    for (int i = 0; i < N; i++)
      y_o[i] = x_i[i][W_W-1] ? act_t'(0) : x_i[i];

endmodule
