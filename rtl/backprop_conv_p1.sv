// backprop_conv_p1 - backward pass from the output deltas to the twelve
// convolution outputs ("Backpropagation 2, Part 1").
//
// g_j = relu'(C_j) * sum_i delta_i * W_ij, using the fully connected weights
// from before this step's update. relu' is 1 for a positive convolution
// result and 0 otherwise. delta is Q.19 and W is Q3.8, so g has 27 fraction
// bits; it saturates to 32 bits. Combinational.
module backprop_conv_p1
  import cnn_pkg::*;
(
  input  err_t    delta_i [N_OUT],
  input  weight_t w_i     [N_FCW],
  input  act_t    conv_i  [N_FEAT],
  output grad_t   g_o     [N_FEAT]
);

  always_comb begin
    for (int j = 0; j < N_FEAT; j++) begin
      logic signed [63:0] acc;
      acc = '0;
      for (int i = 0; i < N_OUT; i++)
        acc = acc + 64'(delta_i[i]) * 64'(w_i[i * N_FEAT + j]);
      if (conv_i[j] <= 0)                g_o[j] = '0;
      else if (acc > 64'sh7fffffff)      g_o[j] = 32'sh7fffffff;
      else if (acc < -64'sh80000000)     g_o[j] = 32'sh80000000;
      else                               g_o[j] = acc[G_W-1:0];
    end
  end

endmodule
