// tb_fc_layer - random ReLU outputs and weights; each output is compared with
// the integer sum of the 12 products, saturated to 24 bits.
module tb_fc_layer;
  import cnn_pkg::*;
  act_t    x [N_FEAT];
  weight_t w [N_FCW];
  sop_t    s [N_OUT];
  int checks = 0, failures = 0;

  fc_layer dut (.x_i(x), .w_i(w), .s_o(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < N_FEAT; j++) x[j] = act_t'($urandom_range(0, 2047));
      for (int k = 0; k < N_FCW; k++)  w[k] = weight_t'($urandom);
      if (t < 5) for (int k = 0; k < N_FCW; k++) w[k] = (t % 2) ? 12'sh7ff : 12'sh800;
      #1;
      for (int i = 0; i < N_OUT; i++) begin
        longint acc, e;
        acc = 0;
        for (int j = 0; j < N_FEAT; j++) acc += longint'(x[j]) * longint'(w[i*12+j]);
        e = (acc > 8388607) ? 8388607 : (acc < -8388608) ? -8388608 : acc;
        checks++;
        if (longint'(s[i]) != e) begin
          failures++;
          if (failures < 10) $display("mismatch out %0d got %0d exp %0d", i, s[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
