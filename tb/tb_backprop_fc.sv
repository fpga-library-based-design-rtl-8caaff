// tb_backprop_fc - random errors, softmax values, activations and weights.
// The reference works in floating point: delta = E*Y*(1-Y),
// W' = W - 16 * delta * I (all in real units), saturated. Deltas must agree
// within 2 LSB of Q.19 and weights within 1 LSB of Q3.8.
module tb_backprop_fc;
  import cnn_pkg::*;
  err_t    e  [N_OUT];
  prob_t   y  [N_OUT];
  act_t    x  [N_FEAT];
  weight_t w  [N_FCW];
  weight_t wn [N_FCW];
  err_t    d  [N_OUT];
  int checks = 0, failures = 0;

  backprop_fc #(.LR1_LOG2(4)) dut (.e_i(e), .y_i(y), .x_i(x), .w_i(w), .w_o(wn), .delta_o(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      real dr [N_OUT];
      for (int i = 0; i < N_OUT; i++) begin
        y[i] = prob_t'($urandom_range(0, 524288));
        e[i] = err_t'(int'(y[i]) - int'($urandom_range(0, 524288)));
      end
      for (int j = 0; j < N_FEAT; j++) x[j] = act_t'($urandom_range(0, (t < 100) ? 600 : 2047));
      for (int k = 0; k < N_FCW; k++)  w[k] = weight_t'($urandom);
      #1;
      for (int i = 0; i < N_OUT; i++) begin
        real yr, er, dd;
        yr = real'(y[i]) / 524288.0;
        er = real'(e[i]) / 524288.0;
        dr[i] = er * yr * (1.0 - yr);
        dd = real'(d[i]) / 524288.0 - dr[i];
        checks++;
        if (dd > 2.0/524288 || dd < -2.0/524288) begin
          failures++;
          if (failures < 10) $display("delta mismatch %0d got %0d exp %f", i, d[i], dr[i]*524288);
        end
      end
      for (int i = 0; i < N_OUT; i++)
        for (int j = 0; j < N_FEAT; j++) begin
          real wr;
          wr = real'(w[i*12+j]) - 16.0 * dr[i] * (real'(x[j]) / 256.0) * 256.0;
          if (wr > 2047.0) wr = 2047.0;
          if (wr < -2048.0) wr = -2048.0;
          checks++;
          if (real'(wn[i*12+j]) - wr > 1.01 || wr - real'(wn[i*12+j]) > 1.01) begin
            failures++;
            if (failures < 10) $display("weight mismatch %0d,%0d got %0d exp %f", i, j, wn[i*12+j], wr);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
