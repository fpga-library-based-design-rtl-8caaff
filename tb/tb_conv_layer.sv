// tb_conv_layer - random images and filters; each output is compared with a
// direct sum-of-products over the 3x3 window, saturated to 12 bits.
module tb_conv_layer;
  import cnn_pkg::*;
  image_t  img;
  weight_t filt [N_FW];
  act_t    conv [N_FEAT];
  int checks = 0, failures = 0;

  conv_layer dut (.img_i(img), .filt_i(filt), .conv_o(conv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      img = image_t'($urandom);
      for (int i = 0; i < N_FW; i++)
        filt[i] = (t < 20) ? weight_t'(12'sh7f0 - i) : weight_t'($urandom);  // first vectors saturate
      #1;
      for (int f = 0; f < 3; f++)
        for (int p = 0; p < 2; p++)
          for (int q = 0; q < 2; q++) begin
            int s, e;
            s = 0;
            for (int m = 0; m < 3; m++)
              for (int n = 0; n < 3; n++)
                s += int'(img[(p+m)*4+q+n]) * int'(filt[f*9+m*3+n]);
            e = (s > 2047) ? 2047 : (s < -2048) ? -2048 : s;
            checks++;
            if (int'(conv[f*4+p*2+q]) != e) begin
              failures++;
              if (failures < 10) $display("mismatch f%0d p%0d q%0d got %0d exp %0d", f, p, q, conv[f*4+p*2+q], e);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
