// tb_softmax - random fully connected outputs. The reference is computed in
// floating point: d_i = S_max - S_i truncated to 1/16 (the table step),
// exp(-d_i) / sum exp(-d_j); outputs must be within 2^-12 of it, the largest
// output must be at least 0.25 and the outputs must add to about one.
module tb_softmax;
  import cnn_pkg::*;
  sop_t  s [N_OUT];
  sop_t  mx;
  prob_t y [N_OUT];
  int checks = 0, failures = 0;

  softmax dut (.s_i(s), .max_i(mx), .y_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      real e [N_OUT];
      real esum, ysum;
      int range_;
      range_ = (t % 3 == 0) ? (20 << 16) : (4 << 16);
      for (int i = 0; i < N_OUT; i++) s[i] = sop_t'($urandom_range(0, range_)) - sop_t'(range_ / 2);
      mx = s[0];
      for (int i = 1; i < N_OUT; i++) if (s[i] > mx) mx = s[i];
      #1;
      esum = 0.0;
      for (int i = 0; i < N_OUT; i++) begin
        real d;
        d = real'((int'(mx) - int'(s[i])) >>> 12) / 16.0;
        e[i] = (d >= 16.0) ? 0.0 : $exp(-d);
        esum += e[i];
      end
      ysum = 0.0;
      for (int i = 0; i < N_OUT; i++) begin
        real yr, yd;
        yr = e[i] / esum;
        yd = real'(y[i]) / 524288.0;
        ysum += yd;
        checks++;
        if (yd - yr > 1.0/4096 || yr - yd > 1.0/4096) begin
          failures++;
          if (failures < 10) $display("mismatch t%0d i%0d got %f exp %f", t, i, yd, yr);
        end
      end
      checks++;
      if (ysum < 0.995 || ysum > 1.001) failures++;
    end
    // all equal inputs give 0.25 each
    for (int i = 0; i < N_OUT; i++) s[i] = 24'sd12345;
    mx = 24'sd12345;
    #1;
    for (int i = 0; i < N_OUT; i++) begin
      checks++;
      if (y[i] != 20'd131072) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
