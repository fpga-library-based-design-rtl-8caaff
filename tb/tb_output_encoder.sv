// tb_output_encoder - random tags and centroid tables; each output weight
// must be the centroid its tag names.
module tb_output_encoder;
  import cnn_pkg::*;
  tag_t    tag [N_WEIGHTS];
  weight_t c   [K_MAX];
  weight_t w   [N_WEIGHTS];
  int checks = 0, failures = 0;

  output_encoder #(.N(N_WEIGHTS), .K(K_MAX)) dut (.tag_i(tag), .cent_i(c), .w_o(w));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int k = 0; k < K_MAX; k++) c[k] = weight_t'($urandom);
      for (int i = 0; i < N_WEIGHTS; i++) tag[i] = tag_t'($urandom);
      #1;
      for (int i = 0; i < N_WEIGHTS; i++) begin
        checks++;
        if (w[i] != c[tag[i]]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
