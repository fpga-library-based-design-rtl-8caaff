// error_calc - error between the softmax outputs and their targets.
//
// The output belonging to the class of the current image targets 0.99
// (T_HI); the other three target 0.0033 (T_LO), so that the targets add to
// one. E_i = Y_i - T_i, sign-extended to 21 bits (Q1.19 plus sign).
// The low target value is this implementation's choice. Combinational.
module error_calc
  import cnn_pkg::*;
(
  input  prob_t y_i [N_OUT],
  input  cls_t  cls_i,
  output err_t  e_o [N_OUT]
);

  always_comb
    for (int i = 0; i < N_OUT; i++)
      e_o[i] = $signed({1'b0, y_i[i]}) - $signed({1'b0, (cls_t'(i) == cls_i) ? T_HI : T_LO});

endmodule
