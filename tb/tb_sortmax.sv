// tb_sortmax - random and tied inputs; checks the maximum value and that the
// index is the first position holding it.
module tb_sortmax;
  import cnn_pkg::*;
  sop_t       s [N_OUT];
  sop_t       mx;
  logic [1:0] idx;
  int checks = 0, failures = 0;

  sortmax #(.N(N_OUT)) dut (.s_i(s), .max_o(mx), .idx_o(idx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int bi;
      for (int i = 0; i < N_OUT; i++) s[i] = (t % 4 == 0) ? sop_t'($urandom_range(0, 3)) : sop_t'($urandom);
      #1;
      bi = 0;
      for (int i = 1; i < N_OUT; i++) if (s[i] > s[bi]) bi = i;
      checks += 2;
      if (mx != s[bi]) failures++;
      if (int'(idx) != bi) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
