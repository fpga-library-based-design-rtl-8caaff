// weight_mux - 2-to-1 multiplexer on the CNN's weight write port.
//
// With sel_i low the CNN writes back its own updated weights (training);
// with sel_i high, which is the K-means "finish" signal, it takes the
// clustered weights instead. Combinational.
module weight_mux
  import cnn_pkg::*;
#(
  parameter int N = N_WEIGHTS
) (
  input  logic    sel_i,
  input  weight_t a_i [N],
  input  weight_t b_i [N],
  output weight_t y_o [N]
);

  always_comb
    for (int i = 0; i < N; i++)
      y_o[i] = sel_i ? b_i[i] : a_i[i];

endmodule
