// sortmax - search for the largest of the fully connected outputs.
//
// The softmax needs S_max to form S_i - S_max; the index of the maximum is
// also the recognised class. A linear scan over the inputs; on a tie the
// lowest index wins (this implementation's choice). Combinational.
module sortmax
  import cnn_pkg::*;
#(
  parameter int N = N_OUT
) (
  input  sop_t             s_i [N],
  output sop_t             max_o,
  output logic [$clog2(N)-1:0] idx_o
);

  always_comb begin
    max_o = s_i[0];
    idx_o = '0;
    for (int i = 1; i < N; i++)
      if (s_i[i] > max_o) begin
        max_o = s_i[i];
        idx_o = ($clog2(N))'(i);
      end
  end

endmodule
