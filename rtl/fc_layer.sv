// fc_layer - fully connected layer, 12 inputs to 4 outputs.
//
// Output i is the sum over j of x_i[j] * w_i[i*12+j]. Inputs and weights are
// Q3.8, so each product has 16 fraction bits; the sum of 12 products is kept
// in 24 bits (Q7.16) with saturation. No bias is added. Combinational.
module fc_layer
  import cnn_pkg::*;
(
  input  act_t    x_i [N_FEAT],
  input  weight_t w_i [N_FCW],
  output sop_t    s_o [N_OUT]
);

  always_comb begin
    for (int i = 0; i < N_OUT; i++) begin
      logic signed [31:0] acc;
      acc = '0;
      for (int j = 0; j < N_FEAT; j++)
        acc = acc + 32'(x_i[j] * w_i[i * N_FEAT + j]);
      if (acc > 32'sh7fffff)       s_o[i] = 24'sh7fffff;
      else if (acc < -32'sh800000) s_o[i] = 24'sh800000;
      else                         s_o[i] = acc[S_W-1:0];
    end
  end

endmodule
