// tb_backprop_conv_p2 - random images, gradients and filters. Reference in
// floating point: dF(m,n) = sum g_f(p,q) * A(p+m,q+n);
// F' = F - 2^-6 * dF (real units), saturated; within 1 LSB.
module tb_backprop_conv_p2;
  import cnn_pkg::*;
  image_t  img;
  grad_t   g  [N_FEAT];
  weight_t f  [N_FW];
  weight_t fn [N_FW];
  int checks = 0, failures = 0;

  backprop_conv_p2 #(.LR2_LOG2(-6)) dut (.img_i(img), .g_i(g), .filt_i(f), .filt_o(fn));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      img = image_t'($urandom);
      for (int j = 0; j < N_FEAT; j++) g[j] = grad_t'($urandom);
      for (int k = 0; k < N_FW; k++)  f[k] = weight_t'($urandom);
      #1;
      for (int ff = 0; ff < 3; ff++)
        for (int m = 0; m < 3; m++)
          for (int n = 0; n < 3; n++) begin
            real acc, wr;
            acc = 0.0;
            for (int p = 0; p < 2; p++)
              for (int q = 0; q < 2; q++)
                if (img[(p+m)*4+q+n]) acc += real'(g[ff*4+p*2+q]) / 134217728.0;
            wr = real'(f[ff*9+m*3+n]) - acc / 64.0 * 256.0;
            if (wr > 2047.0) wr = 2047.0;
            if (wr < -2048.0) wr = -2048.0;
            checks++;
            if (real'(fn[ff*9+m*3+n]) - wr > 1.01 || wr - real'(fn[ff*9+m*3+n]) > 1.01) begin
              failures++;
              if (failures < 10) $display("mismatch %0d %0d %0d got %0d exp %f", ff, m, n, fn[ff*9+m*3+n], wr);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
