// tb_relu - random signed inputs; negative values must give 0, others pass.
module tb_relu;
  import cnn_pkg::*;
  act_t x [N_FEAT];
  act_t y [N_FEAT];
  int checks = 0, failures = 0;

  relu #(.N(N_FEAT)) dut (.x_i(x), .y_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N_FEAT; i++) x[i] = act_t'($urandom);
      if (t == 0) begin x[0] = 12'sh800; x[1] = 12'sh7ff; x[2] = 0; x[3] = -1; end
      #1;
      for (int i = 0; i < N_FEAT; i++) begin
        checks++;
        if (int'(y[i]) != ((int'(x[i]) < 0) ? 0 : int'(x[i]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
