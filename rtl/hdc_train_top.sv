// hdc_train_top: the single-pass training design. Training feature vectors
// streamed in from the host are broadcast by the scatter block to N_CU
// encoder compute units (8 by default: fewer than for inference, because
// the class memory is read-write here and takes much more on-chip memory).
// Each CU encodes its SLICE = D / N_CU dimensions and feeds its own pipe;
// the fitting kernel gathers the parts of each hypervector, takes the
// input's label from the label stream and bundles the hypervector into
// that class. After the last input the host issues `cmd_read` and receives
// the class hypervectors, which it then normalises for inference.
// Timing: with the defaults an input costs about 784 + 250*784 = 196,784
// cycles, dominated by encoding; the fitting kernel accepts one element per
// cycle and never limits the rate.
// Interface: feature and label streams (valid/ready), basis/bias load
// ports, clear/read commands, class output stream (class, dim, value).
// The structure follows the reference architecture; number format, port
// protocol and pipe depth are this design's.
module hdc_train_top
  import hdc_pkg::*;
#(
  parameter int D          = D_DEF,
  parameter int N_FEAT     = N_FEAT_DEF,
  parameter int N_CLASSES  = N_CLASSES_DEF,
  parameter int N_CU       = 8,
  parameter int PIPE_DEPTH = 16,
  parameter int ITER       = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             feat_valid,
  output logic             feat_ready,
  input  data_t            feat_data,
  input  logic             lbl_valid,
  output logic             lbl_ready,
  input  logic [CLS_W-1:0] lbl_data,
  input  logic             bwr_valid,
  input  basis_wr_t        bwr,
  input  logic             bias_wr_valid,
  input  logic [DIM_W-1:0] bias_wr_dim,
  input  turn_t            bias_wr_val,
  input  logic             cmd_clear,
  input  logic             cmd_read,
  output logic             cls_valid,
  input  logic             cls_ready,
  output logic [CLS_W-1:0] cls_class,
  output logic [DIM_W-1:0] cls_dim,
  output data_t            cls_val,
  output logic [31:0]      n_bundled,
  output logic             busy
);
  localparam int SLICE = D / N_CU;

  logic [N_CU-1:0] sc_valid, sc_ready, cu_busy;
  data_t           sc_data;
  logic [N_CU-1:0] cu_valid, cu_ready, g_valid, g_ready;
  hv_elem_t        cu_elem [N_CU];
  hv_elem_t        g_elem  [N_CU];
  logic            h_valid, h_ready, h_last, fit_busy;
  hv_elem_t        h_elem;

  hdc_scatter #(.N_OUT(N_CU)) u_scatter (
    .clk, .rst_n, .in_valid(feat_valid), .in_ready(feat_ready), .in_data(feat_data),
    .out_valid(sc_valid), .out_ready(sc_ready), .out_data(sc_data));

  for (genvar c = 0; c < N_CU; c++) begin : g_cu
    hdc_enc_cu #(.D_SLICE(SLICE), .BASE_DIM(c * SLICE), .N_FEAT(N_FEAT), .ITER(ITER)) u_cu (
      .clk, .rst_n,
      .feat_valid(sc_valid[c]), .feat_ready(sc_ready[c]), .feat_data(sc_data),
      .bwr_valid, .bwr, .bias_wr_valid, .bias_wr_dim, .bias_wr_val,
      .out_valid(cu_valid[c]), .out_ready(cu_ready[c]), .out_elem(cu_elem[c]),
      .busy(cu_busy[c]));
    hdc_pipe #(.WIDTH($bits(hv_elem_t)), .DEPTH(PIPE_DEPTH)) u_pipe (
      .clk, .rst_n,
      .in_valid(cu_valid[c]), .in_ready(cu_ready[c]), .in_data(cu_elem[c]),
      .out_valid(g_valid[c]), .out_ready(g_ready[c]), .out_data(g_elem[c]));
  end

  hdc_gather #(.N_IN(N_CU), .SLICE(SLICE)) u_gather (
    .clk, .rst_n, .in_valid(g_valid), .in_ready(g_ready), .in_elem(g_elem),
    .out_valid(h_valid), .out_ready(h_ready), .out_elem(h_elem), .out_last(h_last));

  hdc_fit_sp #(.D(D), .N_CLASSES(N_CLASSES)) u_fit (
    .clk, .rst_n, .in_valid(h_valid), .in_ready(h_ready), .in_elem(h_elem), .in_last(h_last),
    .lbl_valid, .lbl_ready, .lbl_data, .cmd_clear, .cmd_read,
    .out_valid(cls_valid), .out_ready(cls_ready), .out_class(cls_class),
    .out_dim(cls_dim), .out_val(cls_val), .busy(fit_busy), .n_bundled);

  assign busy = (|cu_busy) || (|g_valid) || h_valid || fit_busy;

  initial assert (D % N_CU == 0) else $error("hdc_train_top: D must be a multiple of N_CU");
endmodule
