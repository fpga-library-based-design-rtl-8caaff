// find_min - nearest-centroid search (block F).
//
// Scans the K_MAX distances, skipping centroids whose valid bit is low, and
// outputs the index of the smallest as the 6-bit cluster tag, together with
// the weight it belongs to. Ties go to the lowest index. At least one valid
// bit must be set (tag 0 otherwise). Combinational.
module find_min
  import cnn_pkg::*;
#(
  parameter int K = K_MAX
) (
  input  dist_t           d_i [K],
  input  logic [K-1:0]    valid_i,
  input  weight_t         w_i,
  output weight_t         w_o,
  output tag_t            tag_o
);

  always_comb begin
    logic  found;
    dist_t best;
    found = 1'b0;
    best  = '1;
    tag_o = '0;
    for (int k = 0; k < K; k++)
      if (valid_i[k] && (!found || d_i[k] < best)) begin
        found = 1'b1;
        best  = d_i[k];
        tag_o = tag_t'(k);
      end
    w_o = w_i;
  end

endmodule
