// conv_layer - convolution of the 4x4 black-and-white input image with three
// 3x3 filters at stride 1, giving three 2x2 feature maps.
//
// Because every pixel is a single bit, each "product" is either the filter
// weight or zero, so each of the 12 outputs is the sum of the filter weights
// that lie over white (1) pixels. The sum is saturated to 12 bits (Q3.8).
// Purely combinational.
//
// Interface: img_i pixel (r,c) at bit r*4+c; filt_i[f*9+m*3+n];
// conv_o[f*4+p*2+q] is the filter f result with its top-left corner at (p,q).
// The saturation and the binary pixel shortcut are this implementation's choices.
module conv_layer
  import cnn_pkg::*;
(
  input  image_t  img_i,
  input  weight_t filt_i [N_FW],
  output act_t    conv_o [N_FEAT]
);

  always_comb begin
    for (int f = 0; f < N_FILT; f++) begin
      for (int p = 0; p < CO; p++) begin
        for (int q = 0; q < CO; q++) begin
          logic signed [15:0] acc;
          acc = '0;
          for (int m = 0; m < FK; m++)
            for (int n = 0; n < FK; n++)
              if (img_i[(p + m) * IMG_N + q + n])
                acc = acc + 16'(filt_i[f * FK * FK + m * FK + n]);
          conv_o[f * CO * CO + p * CO + q] = sat_w(64'(acc));
        end
      end
    end
  end

endmodule
