// tb_cnn_kmeans_top - end-to-end run of the whole design at its default
// sizes. Digit set A (0 1 4 7, as 4x4 bitmaps) is trained
//   1. without compression: training must converge after 17 epochs (68
//      clocks) to the weights of the separately written fixed-point model
//      (weight sum 3445), and every image must be recognised;
//   2. with compression to k = 15 clusters (80 %): training repeats
//      identically, K-means starts on its own, its finish switches the weight
//      multiplexer and the clustered weights are written into the CNN. The
//      CNN must then hold at most 15 distinct weights, each the nearest of
//      those values to the trained weight, and the whole run must take
//      68 + 2 + 75 + iter * (75 + 15) clocks.
// It counts each mechanism (converged training, automatic clustering start,
// several K-means iterations, multiplexer switch and write, run without
// compression, restart clearing the compressed state) and fails if one
// never happened. Recognition after compression is reported.
module tb_cnn_kmeans_top;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, cen = 0;
  logic [K_W-1:0] k = 7'd15;
  image_t  imgs [N_OUT];
  image_t  inf = '0;
  prob_t   y [N_OUT];
  cls_t    cls;
  logic    training, clustering, converged, compressed, done;
  logic [7:0] epochs, kiter;
  weight_t weights [N_WEIGHTS];
  weight_t trained [N_WEIGHTS];
  int checks = 0, failures = 0;
  int n_converged = 0, n_km_auto = 0, n_km_multi_iter = 0, n_mux_load = 0, n_bypass = 0, n_restart_clear = 0;

  cnn_kmeans_top dut (
    .clk, .rst_n, .start_i(start), .compress_en_i(cen), .k_i(k), .img_i(imgs),
    .infer_img_i(inf), .y_o(y), .class_o(cls), .training_o(training),
    .clustering_o(clustering), .converged_o(converged), .epochs_o(epochs),
    .kmeans_iter_o(kiter), .compressed_o(compressed), .done_o(done), .weights_o(weights));

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  // count clocks from the one that samples start to done
  task automatic run(output int cycles, output bit saw_clustering);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(!done && !compressed, "start must clear done and compressed");
    if (!done && !compressed) n_restart_clear++;
    cycles = 0;
    saw_clustering = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (clustering) saw_clustering = 1;
    end
  endtask

  initial begin
    int cycles, wsum, nd, correct;
    bit saw;
    int vals [$];
    cls_t ref_cls [4];
    imgs = '{16'hf99f, 16'he464, 16'h4f55, 16'h248f};
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. training only
    cen = 0;
    run(cycles, saw);
    check(cycles == 4 * 17 + 1 && epochs == 8'd17 && converged, $sformatf("training: %0d clocks, %0d epochs", cycles, epochs));
    if (converged) n_converged++;
    check(!saw && !compressed, "clustering ran although disabled");
    if (!saw && !compressed) n_bypass++;
    wsum = 0;
    for (int i = 0; i < N_WEIGHTS; i++) begin trained[i] = weights[i]; wsum += int'(weights[i]); end
    check(wsum == 3445, $sformatf("trained weight sum %0d", wsum));
    for (int i = 0; i < 4; i++) begin
      inf = imgs[i]; #1;
      ref_cls[i] = cls;
      check(int'(cls) == i, $sformatf("uncompressed: image %0d seen as %0d", i, cls));
    end

    // 2. training then automatic compression
    cen = 1;
    rst_n = 0; @(negedge clk); rst_n = 1;
    run(cycles, saw);
    check(saw, "clustering did not start after training");
    if (saw) n_km_auto++;
    if (kiter > 1) n_km_multi_iter++;
    check(compressed, "clustered weights not loaded");
    if (compressed) n_mux_load++;
    check(cycles == 68 + 2 + 75 + int'(kiter) * (75 + 15),
          $sformatf("train+cluster took %0d clocks, %0d iterations", cycles, kiter));
    for (int i = 0; i < N_WEIGHTS; i++) begin
      bit seen;
      seen = 0;
      foreach (vals[j]) if (vals[j] == int'(weights[i])) seen = 1;
      if (!seen) vals.push_back(int'(weights[i]));
    end
    nd = vals.size();
    check(nd <= 15, $sformatf("%0d distinct weights after clustering", nd));
    for (int i = 0; i < N_WEIGHTS; i++) begin
      int dme;
      dme = (trained[i] > weights[i]) ? int'(trained[i]) - int'(weights[i]) : int'(weights[i]) - int'(trained[i]);
      foreach (vals[j]) begin
        int dj;
        dj = (int'(trained[i]) > vals[j]) ? int'(trained[i]) - vals[j] : vals[j] - int'(trained[i]);
        check(dme <= dj, $sformatf("weight %0d not mapped to its nearest centroid", i));
      end
    end
    correct = 0;
    for (int i = 0; i < 4; i++) begin
      inf = imgs[i]; #1;
      if (cls == ref_cls[i]) correct++;
      $display("compressed k=15: image %0d class %0d output %0d", i, cls, y[i]);
    end
    $display("set A, k=15 (80%% compression): %0d distinct weights, %0d K-means iterations, accuracy %0d/4",
             nd, kiter, correct);

    // mechanisms
    check(n_converged > 0, "no converged training");
    check(n_bypass > 0, "no run without compression");
    check(n_km_auto > 0, "no automatic clustering");
    check(n_km_multi_iter > 0, "no K-means run with more than one iteration");
    check(n_mux_load > 0, "no clustered-weight load");
    check(n_restart_clear > 1, "no restart");
    $display("mechanisms: converged=%0d bypass=%0d kmeans_auto=%0d kmeans_multi_iter=%0d mux_load=%0d restart=%0d",
             n_converged, n_bypass, n_km_auto, n_km_multi_iter, n_mux_load, n_restart_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
