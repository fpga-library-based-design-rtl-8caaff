// tb_compression_sweep - the evaluation workload: four digit sets, each
// trained and then compressed at 0, 50, 60, 80 and 90 % (k = 75, 38, 30,
// 15 and 8 shared values for the 75 weights; 0 % means no clustering).
// For every run it checks that training converged, that at most k distinct
// weights remain and that every weight went to its nearest shared value,
// and it prints the recognition accuracy of the compressed CNN against the
// uncompressed one (how many of the four images keep their class).
// Digit bitmaps (4x4, row-major, bit r*4+c):
//   0 f99f  1 e464  2 f2c7  3 7467  4 4f55  5 7e1f  6 f971  7 248f  8 f96f  9 8f9f
module tb_compression_sweep;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, cen = 0;
  logic [K_W-1:0] k = 7'd1;
  image_t  imgs [N_OUT];
  image_t  inf = '0;
  prob_t   y [N_OUT];
  cls_t    cls;
  logic    training, clustering, converged, compressed, done;
  logic [7:0] epochs, kiter;
  weight_t weights [N_WEIGHTS];
  weight_t trained [N_WEIGHTS];
  int checks = 0, failures = 0;

  localparam image_t DIGIT [10] = '{16'hf99f, 16'he464, 16'hf2c7, 16'h7467, 16'h4f55,
                                   16'h7e1f, 16'hf971, 16'h248f, 16'hf96f, 16'h8f9f};

  cnn_kmeans_top dut (
    .clk, .rst_n, .start_i(start), .compress_en_i(cen), .k_i(k), .img_i(imgs),
    .infer_img_i(inf), .y_o(y), .class_o(cls), .training_o(training),
    .clustering_o(clustering), .converged_o(converged), .epochs_o(epochs),
    .kmeans_iter_o(kiter), .compressed_o(compressed), .done_o(done), .weights_o(weights));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run();
    rst_n = 0; @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    check(converged, "training did not converge");
  endtask

  initial begin
    int sets [4][4] = '{'{0, 1, 4, 7}, '{7, 1, 6, 9}, '{3, 5, 4, 1}, '{1, 8, 2, 7}};
    int rates [4] = '{50, 60, 80, 90};
    int ks [4] = '{38, 30, 15, 8};
    string names = "ABCD";
    cls_t ref_cls [4];
    repeat (2) @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < 4; i++) imgs[i] = DIGIT[sets[s][i]];
      cen = 0;
      run();
      for (int i = 0; i < N_WEIGHTS; i++) trained[i] = weights[i];
      for (int i = 0; i < 4; i++) begin
        inf = imgs[i]; #1;
        ref_cls[i] = cls;
        check(int'(cls) == i, $sformatf("set %s: image %0d not recognised", names.substr(s, s), i));
      end
      $display("set %s  0%% compression: %0d epochs, 4/4 recognised", names.substr(s, s), epochs);
      for (int r = 0; r < 4; r++) begin
        int nd, correct;
        int vals [$];
        k = K_W'(ks[r]);
        cen = 1;
        run();
        check(compressed, "not compressed");
        vals = {};
        for (int i = 0; i < N_WEIGHTS; i++) begin
          bit seen;
          seen = 0;
          foreach (vals[j]) if (vals[j] == int'(weights[i])) seen = 1;
          if (!seen) vals.push_back(int'(weights[i]));
        end
        nd = vals.size();
        check(nd <= ks[r], "too many distinct weights");
        for (int i = 0; i < N_WEIGHTS; i++) begin
          int dme;
          dme = (trained[i] > weights[i]) ? int'(trained[i]) - int'(weights[i]) : int'(weights[i]) - int'(trained[i]);
          foreach (vals[j]) begin
            int dj;
            dj = (int'(trained[i]) > vals[j]) ? int'(trained[i]) - vals[j] : vals[j] - int'(trained[i]);
            check(dme <= dj, "weight not at nearest shared value");
          end
        end
        correct = 0;
        for (int i = 0; i < 4; i++) begin
          inf = imgs[i]; #1;
          if (cls == ref_cls[i]) correct++;
        end
        $display("set %s %0d%% compression: k=%0d, %0d distinct weights, %0d iterations, accuracy %0d%%",
                 names.substr(s, s), rates[r], ks[r], nd, kiter, correct * 25);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
