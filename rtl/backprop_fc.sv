// backprop_fc - gradient descent update of the fully connected weights
// ("Backpropagation 1").
//
// The chain rule dE/dW = dE/dY * dY/dS * dS/dW is taken per output: the output delta is
//   delta_i = E_i * Y_i * (1 - Y_i)        (Q.19, softmax derivative dY_i/dS_i)
// and dE/dW_ij = delta_i * I_j, where I_j is the ReLU output feeding the
// weight. The new weight is W_ij - alpha * delta_i * I_j with alpha = 2^LR1_LOG2,
// applied as a rounded shift; the result saturates to 12 bits. The deltas are
// also output for the filter update. Alpha and the rounding are this
// implementation's choices. Combinational.
module backprop_fc
  import cnn_pkg::*;
#(
  parameter int LR1_LOG2 = 4
) (
  input  err_t    e_i     [N_OUT],
  input  prob_t   y_i     [N_OUT],
  input  act_t    x_i     [N_FEAT],
  input  weight_t w_i     [N_FCW],
  output weight_t w_o     [N_FCW],
  output err_t    delta_o [N_OUT]
);

  always_comb begin
    for (int i = 0; i < N_OUT; i++) begin
      logic signed [63:0] t;
      t = (64'(e_i[i]) * $signed({44'd0, y_i[i]})) >>> Y_FRAC;
      t = (t * ($signed({44'd0, ONE_Y}) - $signed({44'd0, y_i[i]}))) >>> Y_FRAC;
      delta_o[i] = err_t'(t);
    end
    for (int i = 0; i < N_OUT; i++)
      for (int j = 0; j < N_FEAT; j++)
        w_o[i * N_FEAT + j] = sat_w(64'(w_i[i * N_FEAT + j])
                              - rshift_round(64'(delta_o[i]) * 64'(x_i[j]), Y_FRAC - LR1_LOG2));
  end

endmodule
