// tb_cnn_trainer - trains the CNN on two digit sets and compares with a
// bit-accurate fixed-point model of the same training written separately:
// the number of epochs, the trained outputs for each image and the sum of
// all 75 trained weights must match exactly, and training must take four
// clocks per epoch. Also checks the reset weights against an independent
// LFSR, the external weight write, and the epoch limit (a second instance
// with MAX_EPOCHS = 3 must stop unconverged after 12 clocks).
module tb_cnn_trainer;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, wr = 0;
  image_t  imgs [N_OUT];
  image_t  inf;
  weight_t win  [N_WEIGHTS];
  weight_t w    [N_WEIGHTS];
  weight_t wupd [N_WEIGHTS];
  logic busy, done, conv;
  logic [7:0] ep;
  prob_t y [N_OUT];
  cls_t  cls;
  // second instance, epoch limit
  logic start2 = 0;
  weight_t w2 [N_WEIGHTS];
  weight_t wupd2 [N_WEIGHTS];
  logic busy2, done2, conv2;
  logic [7:0] ep2;
  prob_t y2 [N_OUT];
  cls_t  cls2;
  weight_t wsel [N_WEIGHTS];
  int checks = 0, failures = 0;

  always_comb
    for (int i = 0; i < N_WEIGHTS; i++) wsel[i] = wr ? win[i] : wupd[i];

  cnn_trainer dut (
    .clk, .rst_n, .start_i(start), .img_i(imgs), .infer_img_i(inf), .wr_i(wr),
    .w_in_i(wsel), .w_o(w), .w_upd_o(wupd), .busy_o(busy), .done_o(done),
    .converged_o(conv), .epochs_o(ep), .y_o(y), .class_o(cls));

  cnn_trainer #(.MAX_EPOCHS(3)) dut2 (
    .clk, .rst_n, .start_i(start2), .img_i(imgs), .infer_img_i(inf), .wr_i(1'b0),
    .w_in_i(wupd2), .w_o(w2), .w_upd_o(wupd2), .busy_o(busy2), .done_o(done2),
    .converged_o(conv2), .epochs_o(ep2), .y_o(y2), .class_o(cls2));

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  task automatic train(input image_t a, b, c, d, input int exp_ep,
                       input int yd0, yd1, yd2, yd3, input int wsum_exp);
    int cycles, wsum;
    int yd [4];
    yd = '{yd0, yd1, yd2, yd3};
    imgs = '{a, b, c, d};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    check(cycles == 4 * exp_ep, $sformatf("training took %0d clocks, expected %0d", cycles, 4 * exp_ep));
    check(int'(ep) == exp_ep, $sformatf("epochs %0d expected %0d", ep, exp_ep));
    check(conv, "not converged");
    wsum = 0;
    for (int i = 0; i < N_WEIGHTS; i++) wsum += int'(w[i]);
    check(wsum == wsum_exp, $sformatf("weight sum %0d expected %0d", wsum, wsum_exp));
    for (int k = 0; k < 4; k++) begin
      inf = imgs[k];
      #1;
      check(int'(y[k]) == yd[k], $sformatf("image %0d output %0d expected %0d", k, y[k], yd[k]));
      check(int'(cls) == k, $sformatf("image %0d classified as %0d", k, cls));
    end
  endtask

  initial begin
    logic [15:0] s;
    inf = '0;
    imgs = '{default: '0};
    for (int i = 0; i < N_WEIGHTS; i++) win[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset values: LFSR x^16+x^14+x^13+x^11+1, seed ACE1, 16 steps per weight
    s = 16'hACE1;
    for (int i = 0; i < N_WEIGHTS; i++) begin
      for (int t = 0; t < 16; t++) s = {s[0] ^ s[2] ^ s[3] ^ s[5], s[15:1]};
      check(int'(w[i]) == ((int'(s[7:0]) - 128) >>> 1), $sformatf("reset weight %0d = %0d", i, w[i]));
    end
    // epoch limit
    imgs = '{16'hf99f, 16'he464, 16'h4f55, 16'h248f};
    @(negedge clk); start2 = 1;
    @(negedge clk); start2 = 0;
    begin
      int c2;
      c2 = 0;
      while (!done2) begin @(negedge clk); c2++; end
      check(c2 == 12 && !conv2 && ep2 == 8'd3, $sformatf("epoch limit: %0d clocks conv %0d", c2, conv2));
    end
    // set A (digits 0 1 4 7)
    train(16'hf99f, 16'he464, 16'h4f55, 16'h248f, 17, 483482, 485605, 476142, 481566, 3445);
    // external write
    for (int i = 0; i < N_WEIGHTS; i++) win[i] = weight_t'($urandom);
    @(negedge clk); wr = 1;
    @(negedge clk); wr = 0;
    for (int i = 0; i < N_WEIGHTS; i++) check(w[i] == win[i], "external write");
    // back to reset weights, then set C (digits 3 5 4 1)
    rst_n = 0; @(negedge clk); rst_n = 1;
    train(16'h7467, 16'h7e1f, 16'h4f55, 16'he464, 33, 472096, 479775, 483106, 487296, 907);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
