// hdc_fpga_top: the hyperdimensional-computing accelerator with its three
// device configurations side by side, each with its own ports:
//   inf_*  inference: 25 encoder compute units feeding a classification
//          kernel that streams out the predicted class of each input;
//   trn_*  single-pass training: 8 encoder compute units feeding a fitting
//          kernel that bundles each hypervector into its label's class;
//   nhd_*  NeuralHD training: one encoder, encoded hypervectors kept in
//          global memory, iterative retraining and dimension regeneration.
// All three encode a feature vector F into a D-dimensional hypervector
// with h_i = cos(B_i . F + b_i) * sin(B_i . F); numbers are Q16.16 fixed
// point. On the device these are separate configurations that never run at
// once; here they share only the clock and reset. The host side (loading
// the basis and classes, normalising classes, choosing the dimensions to
// drop) and the off-chip memory of the NeuralHD design are outside this
// module and reached through its ports.
// Defaults are the MNIST model: D = 2000, 784 features, 10 classes.
module hdc_fpga_top
  import hdc_pkg::*;
#(
  parameter int D               = D_DEF,
  parameter int N_FEAT          = N_FEAT_DEF,
  parameter int N_CLASSES       = N_CLASSES_DEF,
  parameter int INF_N_CU        = 25,
  parameter int TRN_N_CU        = 8,
  parameter int NHD_MAX_SAMPLES = 60000,
  parameter int NHD_N_DROP      = 200
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---- hdc_infer_top ----
  input  logic             inf_feat_valid,
  output logic             inf_feat_ready,
  input  data_t            inf_feat_data,
  input  logic             inf_bwr_valid,
  input  basis_wr_t        inf_bwr,
  input  logic             inf_bias_wr_valid,
  input  logic [DIM_W-1:0] inf_bias_wr_dim,
  input  turn_t            inf_bias_wr_val,
  input  logic             inf_cwr_valid,
  input  logic [CLS_W-1:0] inf_cwr_class,
  input  logic [DIM_W-1:0] inf_cwr_dim,
  input  data_t            inf_cwr_val,
  output logic             inf_pred_valid,
  input  logic             inf_pred_ready,
  output logic [CLS_W-1:0] inf_pred_class,
  output logic             inf_busy,
  // ---- hdc_train_top ----
  input  logic             trn_feat_valid,
  output logic             trn_feat_ready,
  input  data_t            trn_feat_data,
  input  logic             trn_lbl_valid,
  output logic             trn_lbl_ready,
  input  logic [CLS_W-1:0] trn_lbl_data,
  input  logic             trn_bwr_valid,
  input  basis_wr_t        trn_bwr,
  input  logic             trn_bias_wr_valid,
  input  logic [DIM_W-1:0] trn_bias_wr_dim,
  input  turn_t            trn_bias_wr_val,
  input  logic             trn_cmd_clear,
  input  logic             trn_cmd_read,
  output logic             trn_cls_valid,
  input  logic             trn_cls_ready,
  output logic [CLS_W-1:0] trn_cls_class,
  output logic [DIM_W-1:0] trn_cls_dim,
  output data_t            trn_cls_val,
  output logic [31:0]      trn_n_bundled,
  output logic             trn_busy,
  // ---- hdc_nhd_top ----
  input  logic             nhd_feat_valid,
  output logic             nhd_feat_ready,
  input  data_t            nhd_feat_data,
  input  logic             nhd_lbl_valid,
  output logic             nhd_lbl_ready,
  input  logic [CLS_W-1:0] nhd_lbl_data,
  input  logic             nhd_bwr_valid,
  input  basis_wr_t        nhd_bwr,
  input  logic             nhd_bias_wr_valid,
  input  logic [DIM_W-1:0] nhd_bias_wr_dim,
  input  turn_t            nhd_bias_wr_val,
  input  logic             nhd_cmd_encode,
  input  logic             nhd_cmd_fit,
  input  logic [31:0]      nhd_n_samples,
  input  logic [15:0]      nhd_n_iters,
  input  logic             nhd_cmd_clear,
  input  logic             nhd_cmd_read,
  input  logic             nhd_drop_valid,
  output logic             nhd_drop_ready,
  input  logic [DIM_W-1:0] nhd_drop_dim,
  output logic             nhd_gm_wr_valid,
  input  logic             nhd_gm_wr_ready,
  output logic [31:0]      nhd_gm_wr_addr,
  output data_t            nhd_gm_wr_data,
  output logic             nhd_gm_rd_valid,
  input  logic             nhd_gm_rd_ready,
  output logic [31:0]      nhd_gm_rd_addr,
  input  logic             nhd_gm_rsp_valid,
  input  data_t            nhd_gm_rsp_data,
  output logic             nhd_cls_valid,
  input  logic             nhd_cls_ready,
  output logic [CLS_W-1:0] nhd_cls_class,
  output logic [DIM_W-1:0] nhd_cls_dim,
  output data_t            nhd_cls_val,
  output logic             nhd_enc_busy,
  output logic             nhd_fit_busy,
  output logic             nhd_regen_busy,
  output logic             nhd_regen_done,
  output logic [31:0]      nhd_n_encoded,
  output logic [15:0]      nhd_iters_done,
  output logic [31:0]      nhd_n_correct,
  output logic [31:0]      nhd_n_updates,
  output logic             nhd_converged
);

  hdc_infer_top #(.D(D), .N_FEAT(N_FEAT), .N_CLASSES(N_CLASSES), .N_CU(INF_N_CU)) u_infer (
    .clk,
    .rst_n,
    .feat_valid(inf_feat_valid),
    .feat_ready(inf_feat_ready),
    .feat_data(inf_feat_data),
    .bwr_valid(inf_bwr_valid),
    .bwr(inf_bwr),
    .bias_wr_valid(inf_bias_wr_valid),
    .bias_wr_dim(inf_bias_wr_dim),
    .bias_wr_val(inf_bias_wr_val),
    .cwr_valid(inf_cwr_valid),
    .cwr_class(inf_cwr_class),
    .cwr_dim(inf_cwr_dim),
    .cwr_val(inf_cwr_val),
    .pred_valid(inf_pred_valid),
    .pred_ready(inf_pred_ready),
    .pred_class(inf_pred_class),
    .busy(inf_busy));

  hdc_train_top #(.D(D), .N_FEAT(N_FEAT), .N_CLASSES(N_CLASSES), .N_CU(TRN_N_CU)) u_train (
    .clk,
    .rst_n,
    .feat_valid(trn_feat_valid),
    .feat_ready(trn_feat_ready),
    .feat_data(trn_feat_data),
    .lbl_valid(trn_lbl_valid),
    .lbl_ready(trn_lbl_ready),
    .lbl_data(trn_lbl_data),
    .bwr_valid(trn_bwr_valid),
    .bwr(trn_bwr),
    .bias_wr_valid(trn_bias_wr_valid),
    .bias_wr_dim(trn_bias_wr_dim),
    .bias_wr_val(trn_bias_wr_val),
    .cmd_clear(trn_cmd_clear),
    .cmd_read(trn_cmd_read),
    .cls_valid(trn_cls_valid),
    .cls_ready(trn_cls_ready),
    .cls_class(trn_cls_class),
    .cls_dim(trn_cls_dim),
    .cls_val(trn_cls_val),
    .n_bundled(trn_n_bundled),
    .busy(trn_busy));

  hdc_nhd_top #(.D(D), .N_FEAT(N_FEAT), .N_CLASSES(N_CLASSES), .MAX_SAMPLES(NHD_MAX_SAMPLES), .N_DROP(NHD_N_DROP)) u_nhd (
    .clk,
    .rst_n,
    .feat_valid(nhd_feat_valid),
    .feat_ready(nhd_feat_ready),
    .feat_data(nhd_feat_data),
    .lbl_valid(nhd_lbl_valid),
    .lbl_ready(nhd_lbl_ready),
    .lbl_data(nhd_lbl_data),
    .bwr_valid(nhd_bwr_valid),
    .bwr(nhd_bwr),
    .bias_wr_valid(nhd_bias_wr_valid),
    .bias_wr_dim(nhd_bias_wr_dim),
    .bias_wr_val(nhd_bias_wr_val),
    .cmd_encode(nhd_cmd_encode),
    .cmd_fit(nhd_cmd_fit),
    .n_samples(nhd_n_samples),
    .n_iters(nhd_n_iters),
    .cmd_clear(nhd_cmd_clear),
    .cmd_read(nhd_cmd_read),
    .drop_valid(nhd_drop_valid),
    .drop_ready(nhd_drop_ready),
    .drop_dim(nhd_drop_dim),
    .gm_wr_valid(nhd_gm_wr_valid),
    .gm_wr_ready(nhd_gm_wr_ready),
    .gm_wr_addr(nhd_gm_wr_addr),
    .gm_wr_data(nhd_gm_wr_data),
    .gm_rd_valid(nhd_gm_rd_valid),
    .gm_rd_ready(nhd_gm_rd_ready),
    .gm_rd_addr(nhd_gm_rd_addr),
    .gm_rsp_valid(nhd_gm_rsp_valid),
    .gm_rsp_data(nhd_gm_rsp_data),
    .cls_valid(nhd_cls_valid),
    .cls_ready(nhd_cls_ready),
    .cls_class(nhd_cls_class),
    .cls_dim(nhd_cls_dim),
    .cls_val(nhd_cls_val),
    .enc_busy(nhd_enc_busy),
    .fit_busy(nhd_fit_busy),
    .regen_busy(nhd_regen_busy),
    .regen_done(nhd_regen_done),
    .n_encoded(nhd_n_encoded),
    .iters_done(nhd_iters_done),
    .n_correct(nhd_n_correct),
    .n_updates(nhd_n_updates),
    .converged(nhd_converged));
endmodule
