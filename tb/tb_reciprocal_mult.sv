// tb_reciprocal_mult - for every count 1..75 and random sums that such a
// count of 12-bit weights can reach, the mean must be within 1 LSB of the
// exact quotient; a zero count must give a zero product.
module tb_reciprocal_mult;
  import cnn_pkg::*;
  logic signed [SUM_W-1:0] s;
  logic [CNT_W-1:0]        c;
  logic [20:0]             r;
  logic signed [SUM_W+20:0] p;
  weight_t                 m;
  int checks = 0, failures = 0;

  reciprocal_mult #(.RECIP_FRAC(20)) dut (.sum_i(s), .cnt_i(c), .recip_o(r), .prod_o(p), .mean_o(m));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 1; n <= 75; n++)
      for (int t = 0; t < 20; t++) begin
        real ex;
        c = CNT_W'(n);
        s = SUM_W'(int'($urandom_range(0, n * 4095)) - n * 2048);
        #1;
        ex = real'(s) / real'(n);
        checks++;
        if (real'(m) - ex > 1.0 || ex - real'(m) > 1.0) begin
          failures++;
          if (failures < 10) $display("n%0d sum %0d got %0d exp %f r %0d p %0d", n, s, m, ex, r, p);
        end
      end
    c = '0; s = 20'sd1000; #1;
    checks++;
    if (p != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
