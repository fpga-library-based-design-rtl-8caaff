// tb_backprop_conv_p1 - random deltas, weights and convolution results.
// Reference: g_j = (C_j > 0) ? sum_i delta_i * W_ij : 0, saturated to 32 bits.
module tb_backprop_conv_p1;
  import cnn_pkg::*;
  err_t    d [N_OUT];
  weight_t w [N_FCW];
  act_t    c [N_FEAT];
  grad_t   g [N_FEAT];
  int checks = 0, failures = 0;

  backprop_conv_p1 dut (.delta_i(d), .w_i(w), .conv_i(c), .g_o(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N_OUT; i++) d[i] = (t < 10) ? err_t'(-1048576) : err_t'($urandom);
      for (int k = 0; k < N_FCW; k++) w[k] = (t < 10) ? weight_t'(12'sh800) : weight_t'($urandom);
      for (int j = 0; j < N_FEAT; j++) c[j] = (j % 3 == 0) ? act_t'(0) : act_t'($urandom);
      #1;
      for (int j = 0; j < N_FEAT; j++) begin
        longint acc, e;
        acc = 0;
        for (int i = 0; i < N_OUT; i++) acc += longint'(d[i]) * longint'(w[i*12+j]);
        if (acc > 64'sh7fffffff) acc = 64'sh7fffffff;
        if (acc < -64'sh80000000) acc = -64'sh80000000;
        e = (c[j] > 0) ? acc : 0;
        checks++;
        if (longint'(g[j]) != e) begin
          failures++;
          if (failures < 10) $display("mismatch j%0d got %0d exp %0d", j, g[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
