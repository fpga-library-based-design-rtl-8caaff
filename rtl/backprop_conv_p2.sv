// backprop_conv_p2 - filter weight update ("Backpropagation 2, Part 2").
//
// The gradient of filter f at tap (m,n) is the convolution of the input image
// with that filter's 2x2 gradient map from Part 1:
//   dF(m,n) = sum over (p,q) of g_f(p,q) * A(p+m, q+n)
// With one-bit pixels this is the sum of the gradients whose window covers a
// white pixel at that tap. The new weight is F - alpha * dF with
// alpha = 2^LR2_LOG2 (1/64 by default), applied as a rounded shift from 27 to 8 fraction bits,
// saturated to 12 bits. Alpha is this implementation's choice. Combinational.
module backprop_conv_p2
  import cnn_pkg::*;
#(
  parameter int LR2_LOG2 = -6
) (
  input  image_t  img_i,
  input  grad_t   g_i    [N_FEAT],
  input  weight_t filt_i [N_FW],
  output weight_t filt_o [N_FW]
);

  always_comb begin
    for (int f = 0; f < N_FILT; f++)
      for (int m = 0; m < FK; m++)
        for (int n = 0; n < FK; n++) begin
          logic signed [63:0] acc;
          acc = '0;
          for (int p = 0; p < CO; p++)
            for (int q = 0; q < CO; q++)
              if (img_i[(p + m) * IMG_N + q + n])
                acc = acc + 64'(g_i[f * CO * CO + p * CO + q]);
          filt_o[f * FK * FK + m * FK + n] =
            sat_w(64'(filt_i[f * FK * FK + m * FK + n]) - rshift_round(acc, G_FRAC - W_FRAC - LR2_LOG2));
        end
  end

endmodule
