// cnn_kmeans_top - self-training CNN with automatic K-means weight compression.
//
// start_i starts training of cnn_trainer on the four images img_i (image k is
// class k). When training ends (train_done), and compress_en_i is high,
// kmeans_cluster is started on the trained weights with k_i clusters. When
// clustering converges its finish signal switches weight_mux from the CNN's
// own updated weights to the clustered weights, and a one-clock write loads
// them into the CNN: from then on the CNN runs with only k distinct weight
// values. With compress_en_i low the trained weights are kept as they are.
// done_o rises when the whole sequence is over (training, or training plus
// clustering) and stays high until the next start_i.
//
// At any time outside training the CNN classifies infer_img_i: y_o are the
// four softmax outputs (Q1.19) and class_o the recognised class.
// compress_en_i and the done_o flag are this implementation's additions.
module cnn_kmeans_top
  import cnn_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_i,
  input  logic            compress_en_i,
  input  logic [K_W-1:0]  k_i,
  input  image_t          img_i [N_OUT],
  input  image_t          infer_img_i,
  output prob_t           y_o [N_OUT],
  output cls_t            class_o,
  output logic            training_o,
  output logic            clustering_o,
  output logic            converged_o,
  output logic [7:0]      epochs_o,
  output logic [7:0]      kmeans_iter_o,
  output logic            compressed_o,
  output logic            done_o,
  output weight_t         weights_o [N_WEIGHTS]
);

  weight_t w_cur  [N_WEIGHTS];
  weight_t w_upd  [N_WEIGHTS];
  weight_t w_clu  [N_WEIGHTS];
  weight_t w_mux  [N_WEIGHTS];
  logic    train_done, km_finish, km_finish_q, km_start, load_ext;

  cnn_trainer u_cnn (
    .clk, .rst_n, .start_i, .img_i, .infer_img_i,
    .wr_i(load_ext), .w_in_i(w_mux), .w_o(w_cur), .w_upd_o(w_upd),
    .busy_o(training_o), .done_o(train_done), .converged_o, .epochs_o,
    .y_o, .class_o);

  assign km_start = train_done && compress_en_i;

  kmeans_cluster u_km (
    .clk, .rst_n, .start_i(km_start), .clr_i(start_i), .k_i,
    .w_i(w_cur), .w_o(w_clu), .finish_o(km_finish), .busy_o(clustering_o),
    .iter_o(kmeans_iter_o));

  weight_mux #(.N(N_WEIGHTS)) u_mux (
    .sel_i(km_finish), .a_i(w_upd), .b_i(w_clu), .y_o(w_mux));

  // write the clustered weights once, on the rising edge of finish
  assign load_ext = km_finish && !km_finish_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      km_finish_q  <= 1'b0;
      compressed_o <= 1'b0;
      done_o       <= 1'b0;
    end else begin
      km_finish_q <= km_finish;
      if (start_i) begin
        compressed_o <= 1'b0;
        done_o       <= 1'b0;
      end else if (load_ext) begin
        compressed_o <= 1'b1;
        done_o       <= 1'b1;
      end else if (train_done && !compress_en_i) begin
        done_o <= 1'b1;
      end
    end
  end

  assign weights_o = w_cur;

endmodule
