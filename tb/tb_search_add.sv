// tb_search_add - random weights with random tags are accumulated and compared
// with sums and counts kept by the testbench; clear is checked as well.
module tb_search_add;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, add = 0;
  weight_t w;
  tag_t    tag;
  logic signed [SUM_W-1:0] sum [K_MAX];
  logic [CNT_W-1:0]        cnt [K_MAX];
  int checks = 0, failures = 0;
  int rs [K_MAX];
  int rc [K_MAX];

  search_add #(.K(K_MAX)) dut (.clk, .rst_n, .clr_i(clr), .add_i(add), .w_i(w), .tag_i(tag),
                               .sum_o(sum), .cnt_o(cnt));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < K_MAX; k++) begin
      checks += 2;
      if (int'(sum[k]) != rs[k]) failures++;
      if (int'(cnt[k]) != rc[k]) failures++;
    end
  endtask

  initial begin
    for (int k = 0; k < K_MAX; k++) begin rs[k] = 0; rc[k] = 0; end
    w = '0; tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      @(negedge clk); clr = 1; add = 1;
      @(negedge clk); clr = 0;
      for (int k = 0; k < K_MAX; k++) begin rs[k] = 0; rc[k] = 0; end
      compare();
      for (int n = 0; n < 75; n++) begin
        add = ($urandom_range(0, 3) != 0);
        w   = weight_t'($urandom);
        tag = tag_t'($urandom_range(0, (pass == 0) ? 3 : 63));
        if (add) begin rs[tag] += int'(w); rc[tag]++; end
        @(negedge clk);
      end
      add = 0;
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
