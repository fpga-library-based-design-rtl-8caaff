// tb_find_min - random distances and random active sets; the tag must be the
// first active index holding the smallest distance, and the weight passes.
module tb_find_min;
  import cnn_pkg::*;
  dist_t        d [K_MAX];
  logic [63:0]  v;
  weight_t      wi, wo;
  tag_t         tag;
  int checks = 0, failures = 0;

  find_min #(.K(K_MAX)) dut (.d_i(d), .valid_i(v), .w_i(wi), .w_o(wo), .tag_o(tag));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int best, kact;
      kact = $urandom_range(1, 64);
      v = (kact == 64) ? '1 : ((64'd1 << kact) - 1);
      for (int k = 0; k < K_MAX; k++) d[k] = (t % 2) ? dist_t'($urandom_range(0, 20)) : dist_t'($urandom);
      wi = weight_t'($urandom);
      #1;
      best = 0;
      for (int k = 1; k < kact; k++) if (d[k] < d[best]) best = k;
      checks += 2;
      if (int'(tag) != best) begin
        failures++;
        if (failures < 10) $display("t%0d tag %0d exp %0d", t, tag, best);
      end
      if (wo != wi) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
