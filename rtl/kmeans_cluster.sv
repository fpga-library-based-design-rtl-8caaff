// kmeans_cluster - K-means clustering of the CNN weights for weight sharing.
//
// After start_i the block groups the N input weights into k_i clusters
// (1..K_MAX, clamped) and drives the clustered weights on w_o:
//   INIT    N clocks. K initial centroids are taken from the weights at evenly
//           spaced indices (a Bresenham-style accumulator adds k each clock
//           and picks the weight whenever the sum passes N).
//   ASSIGN  N clocks, one weight per clock: K_MAX euclid_dist units measure
//           the weight against every centroid, find_min picks the nearest
//           active one, the tag is stored and search_add accumulates the
//           weight into that cluster's sum and count.
//   UPDATE  k clocks, one cluster per clock: reciprocal_mult turns sum and
//           count into the cluster mean, which becomes the new centroid (an
//           empty cluster keeps its old one). If no centroid changed the
//           clustering has converged, otherwise the sums are cleared and
//           ASSIGN runs again. MAX_ITER bounds the number of iterations.
//   DONE    finish_o is high and output_encoder maps every weight to its
//           cluster's centroid on w_o. It stays so until clr_i or start_i.
// The weights on w_i must stay stable from start_i until finish_o.
// One iteration takes N + k clocks. The centroid initialisation and the
// one-weight-per-clock schedule are this implementation's choices.
module kmeans_cluster
  import cnn_pkg::*;
#(
  parameter int N        = N_WEIGHTS,
  parameter int K        = K_MAX,
  parameter int MAX_ITER = 255
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_i,
  input  logic            clr_i,
  input  logic [K_W-1:0]  k_i,
  input  weight_t         w_i [N],
  output weight_t         w_o [N],
  output logic            finish_o,
  output logic            busy_o,
  output logic [7:0]      iter_o
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_ASSIGN, S_UPDATE, S_DONE} state_t;
  state_t state;

  localparam int IW = $clog2(N + 1);

  weight_t         cent [K];
  tag_t            tags [N];
  logic [K_W-1:0]  kk;
  logic [IW-1:0]   i_cnt;
  logic [K_W-1:0]  k_cnt;
  logic [K_W:0]    acc;
  logic            changed;
  logic [7:0]      iter;

  // assignment datapath
  weight_t         w_cur;
  dist_t           dists [K];
  logic [K-1:0]    valid;
  weight_t         w_tagged;
  tag_t            tag;
  logic            sa_clr, sa_add;
  logic signed [SUM_W-1:0] sums [K];
  logic [CNT_W-1:0]        cnts [K];
  logic [20:0]             recip;
  logic signed [SUM_W+20:0] prod;
  weight_t                 mean;
  logic                    upd_diff;

  assign w_cur = w_i[i_cnt];

  for (genvar g = 0; g < K; g++) begin : g_dist
    euclid_dist u_e (.a_i(w_cur), .b_i(cent[g]), .d_o(dists[g]));
    assign valid[g] = (g < int'(kk));
  end

  find_min #(.K(K)) u_f (
    .d_i(dists), .valid_i(valid), .w_i(w_cur), .w_o(w_tagged), .tag_o(tag));

  assign sa_add = (state == S_ASSIGN);

  search_add #(.K(K)) u_sa (
    .clk, .rst_n, .clr_i(sa_clr), .add_i(sa_add), .w_i(w_tagged), .tag_i(tag),
    .sum_o(sums), .cnt_o(cnts));

  reciprocal_mult #(.RECIP_FRAC(20)) u_rm (
    .sum_i(sums[k_cnt]), .cnt_i(cnts[k_cnt]), .recip_o(recip), .prod_o(prod), .mean_o(mean));

  output_encoder #(.N(N), .K(K)) u_oe (.tag_i(tags), .cent_i(cent), .w_o(w_o));

  assign upd_diff = (cnts[k_cnt] != '0) && (mean != cent[k_cnt]);
  // sums are cleared when a new ASSIGN pass is about to start
  assign sa_clr = (state == S_IDLE) || (state == S_INIT) ||
                  (state == S_UPDATE && k_cnt == kk - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      for (int k = 0; k < K; k++) cent[k] <= '0;
      for (int n = 0; n < N; n++) tags[n] <= '0;
      kk       <= K_W'(1);
      i_cnt    <= '0;
      k_cnt    <= '0;
      acc      <= '0;
      changed  <= 1'b0;
      iter     <= '0;
      finish_o <= 1'b0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (clr_i) begin
            state    <= S_IDLE;
            finish_o <= 1'b0;
          end
          if (start_i) begin
            state    <= S_INIT;
            finish_o <= 1'b0;
            kk       <= (k_i == '0) ? K_W'(1) : (int'(k_i) > K) ? K_W'(K) : k_i;
            i_cnt    <= '0;
            k_cnt    <= '0;
            acc      <= '0;
            iter     <= '0;
          end
        end
        S_INIT: begin
          if (32'(acc) + 32'(kk) >= N) begin
            acc         <= (K_W+1)'(32'(acc) + 32'(kk) - N);
            cent[k_cnt] <= w_cur;
            k_cnt       <= k_cnt + 1'b1;
          end else begin
            acc <= acc + (K_W+1)'(kk);
          end
          if (32'(i_cnt) == N - 1) begin
            state <= S_ASSIGN;
            i_cnt <= '0;
          end else begin
            i_cnt <= i_cnt + 1'b1;
          end
        end
        S_ASSIGN: begin
          tags[i_cnt] <= tag;
          if (32'(i_cnt) == N - 1) begin
            state   <= S_UPDATE;
            i_cnt   <= '0;
            k_cnt   <= '0;
            changed <= 1'b0;
          end else begin
            i_cnt <= i_cnt + 1'b1;
          end
        end
        S_UPDATE: begin
          if (cnts[k_cnt] != '0) cent[k_cnt] <= mean;
          if (k_cnt == kk - 1'b1) begin
            iter <= iter + 1'b1;
            if (!(changed || upd_diff) || (32'(iter) + 1 >= MAX_ITER)) begin
              state    <= S_DONE;
              finish_o <= 1'b1;
            end else begin
              state <= S_ASSIGN;
            end
            k_cnt <= '0;
          end else begin
            changed <= changed | upd_diff;
            k_cnt   <= k_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state == S_INIT) || (state == S_ASSIGN) || (state == S_UPDATE);
  assign iter_o = iter;

endmodule
