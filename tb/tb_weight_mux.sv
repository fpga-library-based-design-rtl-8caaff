// tb_weight_mux - random vectors on both inputs, both select values.
module tb_weight_mux;
  import cnn_pkg::*;
  logic    sel;
  weight_t a [N_WEIGHTS];
  weight_t b [N_WEIGHTS];
  weight_t y [N_WEIGHTS];
  int checks = 0, failures = 0;

  weight_mux #(.N(N_WEIGHTS)) dut (.sel_i(sel), .a_i(a), .b_i(b), .y_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      sel = t[0];
      for (int i = 0; i < N_WEIGHTS; i++) begin a[i] = weight_t'($urandom); b[i] = weight_t'($urandom); end
      #1;
      for (int i = 0; i < N_WEIGHTS; i++) begin
        checks++;
        if (y[i] != (sel ? b[i] : a[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
