// tb_error_calc - each error must equal Y - 0.99 for the class output and
// Y - 0.0033 for the others.
module tb_error_calc;
  import cnn_pkg::*;
  prob_t y [N_OUT];
  cls_t  c;
  err_t  e [N_OUT];
  int checks = 0, failures = 0;

  error_calc dut (.y_i(y), .cls_i(c), .e_o(e));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      c = cls_t'($urandom);
      for (int i = 0; i < N_OUT; i++) y[i] = prob_t'($urandom_range(0, 524288));
      #1;
      for (int i = 0; i < N_OUT; i++) begin
        int ex;
        ex = int'(y[i]) - ((i == int'(c)) ? 519045 : 1730);
        checks++;
        if (int'(e[i]) != ex) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
