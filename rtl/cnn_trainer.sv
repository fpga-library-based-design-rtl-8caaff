// cnn_trainer - control and datapath of the self-training CNN.
//
// Holds the 75 weights (27 filter, 48 fully connected) in registers and
// trains them on four 4x4 images, image k being class k. Each clock of the
// TRAIN state presents one image to the forward path
//   conv_layer -> relu -> fc_layer -> sortmax -> softmax
// and, in the same cycle, to error_calc, backprop_fc (fully connected update)
// and backprop_conv_p1/p2 (filter update). The updated weights leave on
// w_upd_o and come back through the external 2:1 weight multiplexer on
// w_in_i; they are written at the clock edge. An epoch is four clocks.
// Training stops after an epoch in which every image's own output was at
// least THRESH before its update ("targets met"), or after MAX_EPOCHS epochs
// (then converged_o stays low). done_o then pulses for one clock.
//
// Outside TRAIN the forward path classifies infer_img_i: y_o holds the four
// softmax outputs and class_o the index of the largest. wr_i writes w_in_i
// into the weight registers when not training; this is how clustered
// weights are loaded.
//
// Reset loads the fixed pseudo-random initial weights of cnn_pkg. The
// one-image-per-clock schedule, the stop rule and the initial values are this
// implementation's choices.
module cnn_trainer
  import cnn_pkg::*;
#(
  parameter int    MAX_EPOCHS = 255,
  parameter prob_t THRESH     = 20'd471859,   // 0.9
  parameter int    LR1_LOG2   = 4,
  parameter int    LR2_LOG2   = -6
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start_i,
  input  image_t  img_i       [N_OUT],
  input  image_t  infer_img_i,
  input  logic    wr_i,
  input  weight_t w_in_i      [N_WEIGHTS],
  output weight_t w_o         [N_WEIGHTS],
  output weight_t w_upd_o     [N_WEIGHTS],
  output logic    busy_o,
  output logic    done_o,
  output logic    converged_o,
  output logic [7:0] epochs_o,
  output prob_t   y_o         [N_OUT],
  output cls_t    class_o
);

  localparam wvec_t INIT_W = gen_init_weights();

  typedef enum logic [1:0] {S_IDLE, S_TRAIN} state_t;
  state_t state;

  weight_t w     [N_WEIGHTS];
  cls_t    idx;
  logic    all_met;
  logic [7:0] epochs;

  // datapath signals
  image_t  img;
  weight_t filt [N_FW];
  weight_t fcw  [N_FCW];
  act_t    conv [N_FEAT];
  act_t    act  [N_FEAT];
  sop_t    sop  [N_OUT];
  sop_t    smax;
  cls_t    amax;
  prob_t   y    [N_OUT];
  err_t    err  [N_OUT];
  err_t    delta[N_OUT];
  grad_t   grad [N_FEAT];
  weight_t fcw_new  [N_FCW];
  weight_t filt_new [N_FW];

  always_comb begin
    for (int i = 0; i < N_FW; i++)  filt[i] = w[i];
    for (int i = 0; i < N_FCW; i++) fcw[i]  = w[N_FW + i];
    for (int i = 0; i < N_FW; i++)  w_upd_o[i] = filt_new[i];
    for (int i = 0; i < N_FCW; i++) w_upd_o[N_FW + i] = fcw_new[i];
    img = (state == S_TRAIN) ? img_i[idx] : infer_img_i;
  end

  conv_layer u_conv (.img_i(img), .filt_i(filt), .conv_o(conv));
  relu #(.N(N_FEAT)) u_relu (.x_i(conv), .y_o(act));
  fc_layer u_fc (.x_i(act), .w_i(fcw), .s_o(sop));
  sortmax #(.N(N_OUT)) u_sortmax (.s_i(sop), .max_o(smax), .idx_o(amax));
  softmax u_softmax (.s_i(sop), .max_i(smax), .y_o(y));
  error_calc u_err (.y_i(y), .cls_i(idx), .e_o(err));
  backprop_fc #(.LR1_LOG2(LR1_LOG2)) u_bp1 (
    .e_i(err), .y_i(y), .x_i(act), .w_i(fcw), .w_o(fcw_new), .delta_o(delta));
  backprop_conv_p1 u_bp2a (.delta_i(delta), .w_i(fcw), .conv_i(conv), .g_o(grad));
  backprop_conv_p2 #(.LR2_LOG2(LR2_LOG2)) u_bp2b (
    .img_i(img), .g_i(grad), .filt_i(filt), .filt_o(filt_new));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      w           <= INIT_W;
      idx         <= '0;
      all_met     <= 1'b1;
      epochs      <= '0;
      done_o      <= 1'b0;
      converged_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start_i) begin
            state       <= S_TRAIN;
            idx         <= '0;
            all_met     <= 1'b1;
            epochs      <= '0;
            converged_o <= 1'b0;
          end else if (wr_i) begin
            w <= w_in_i;
          end
        end
        S_TRAIN: begin
          w   <= w_in_i;
          idx <= idx + 1'b1;
          if (idx == cls_t'(N_OUT - 1)) begin
            epochs  <= epochs + 1'b1;
            all_met <= 1'b1;
            if (all_met && (y[idx] >= THRESH)) begin
              state       <= S_IDLE;
              done_o      <= 1'b1;
              converged_o <= 1'b1;
            end else if (32'(epochs) + 1 >= MAX_EPOCHS) begin
              state  <= S_IDLE;
              done_o <= 1'b1;
            end
          end else if (y[idx] < THRESH) begin
            all_met <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign w_o      = w;
  assign busy_o   = (state == S_TRAIN);
  assign epochs_o = epochs;
  assign y_o      = y;
  assign class_o  = amax;

endmodule
