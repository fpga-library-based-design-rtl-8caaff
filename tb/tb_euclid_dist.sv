// tb_euclid_dist - exhaustive over a grid of weight pairs plus the extremes;
// the distance must be |a - b|.
module tb_euclid_dist;
  import cnn_pkg::*;
  weight_t a, b;
  dist_t   d;
  int checks = 0, failures = 0;

  euclid_dist dut (.a_i(a), .b_i(b), .d_o(d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -2048; i < 2048; i += 37)
      for (int j = -2048; j < 2048; j += 41) begin
        int e;
        a = weight_t'(i); b = weight_t'(j);
        #1;
        e = (i > j) ? i - j : j - i;
        checks++;
        if (int'(d) != e) failures++;
      end
    a = 12'sh7ff; b = 12'sh800; #1; checks++; if (d != 12'd4095) failures++;
    a = 12'sh800; b = 12'sh7ff; #1; checks++; if (d != 12'd4095) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
