// search_add - per-cluster sums and member counts.
//
// On every clock with add_i high the weight w_i is added to the 20-bit sum of
// the cluster named by tag_i, and that cluster's count goes up by one. clr_i
// zeroes every sum and count (it wins over add_i). All K_MAX sums and counts
// are visible on the outputs for the averaging step. Counts are 7 bits, enough
// for 75 weights.
module search_add
  import cnn_pkg::*;
#(
  parameter int K = K_MAX
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr_i,
  input  logic                     add_i,
  input  weight_t                  w_i,
  input  tag_t                     tag_i,
  output logic signed [SUM_W-1:0]  sum_o [K],
  output logic [CNT_W-1:0]         cnt_o [K]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) begin
        sum_o[k] <= '0;
        cnt_o[k] <= '0;
      end
    end else if (clr_i) begin
      for (int k = 0; k < K; k++) begin
        sum_o[k] <= '0;
        cnt_o[k] <= '0;
      end
    end else if (add_i) begin
      sum_o[tag_i] <= sum_o[tag_i] + SUM_W'(w_i);
      cnt_o[tag_i] <= cnt_o[tag_i] + 1'b1;
    end
  end

endmodule
