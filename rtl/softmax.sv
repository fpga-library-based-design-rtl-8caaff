// softmax - softmax activation of the four fully connected outputs
// built from a lookup table and a divider.
//
// For each output, d = S_max - S_i >= 0 (16 fraction bits). e^-d is looked up
// as EXP_INT[integer part of d] * EXP_FRAC[first four fraction bits of d]
// (two 16-entry tables of cnn_pkg); d >= 16 gives 0. The four exponentials are
// added and each is divided by the sum, giving Y_i in Q1.19 (one integer bit,
// 1.0 = 2^19). The output with d = 0 always contributes 1.0, so the sum is
// never zero. The two-table split and the divider are this implementation's
// choices; the design only says the module uses a lookup table.
// Combinational.
module softmax
  import cnn_pkg::*;
(
  input  sop_t  s_i [N_OUT],
  input  sop_t  max_i,
  output prob_t y_o [N_OUT]
);

  logic [Y_W-1:0]   ex  [N_OUT];
  logic [Y_W+1:0]   esum;

  always_comb begin
    esum = '0;
    for (int i = 0; i < N_OUT; i++) begin
      logic signed [S_W:0] d;
      logic [2*Y_W-1:0]    prod;
      d    = (S_W+1)'(max_i) - (S_W+1)'(s_i[i]);
      prod = EXP_INT[d[S_FRAC+3:S_FRAC]] * EXP_FRAC[d[S_FRAC-1:S_FRAC-4]];
      if (d >= (S_W+1)'(16 << S_FRAC) || d < 0) begin
        ex[i] = '0;
      end else begin
        ex[i] = prod[Y_FRAC+Y_W-1:Y_FRAC];
      end
      esum = esum + (Y_W+2)'(ex[i]);
    end
    for (int i = 0; i < N_OUT; i++)
      y_o[i] = Y_W'(({ex[i], {Y_FRAC{1'b0}}}) / (Y_W+Y_FRAC)'(esum));
  end

endmodule
