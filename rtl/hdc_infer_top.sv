// hdc_infer_top: the inference design. A feature vector streamed in from
// the host is broadcast by the scatter block to N_CU encoder compute units;
// compute unit c encodes dimensions c*SLICE .. c*SLICE+SLICE-1 of the
// hypervector (SLICE = D / N_CU). Each CU feeds its elements into its own
// pipe, a FIFO. The gather block pieces the parts together, and the
// classification kernel compares the hypervector with every class and
// streams out the predicted class.
// Because every dimension is encoded independently, the N_CU units work in
// parallel: encoding, the bottleneck, takes SLICE*N_FEAT cycles per input
// instead of D*N_FEAT. With the defaults (D = 2000, N_FEAT = 784,
// N_CU = 25) a prediction takes about 784 + 80*784 = 63,504 cycles plus
// a few dozen cycles of pipeline latency (0.28 ms at 225 MHz).
// Interface: feature stream (valid/ready, Q16.16), basis/bias/class load
// ports for the host, prediction stream (valid/ready). The host must load
// basis vectors, biases and unit-length class vectors before streaming.
// The structure (25 compute units, pipes, one classification kernel)
// follows the reference architecture; number format, port protocol and
// pipe depth are this design's.
module hdc_infer_top
  import hdc_pkg::*;
#(
  parameter int D          = D_DEF,
  parameter int N_FEAT     = N_FEAT_DEF,
  parameter int N_CLASSES  = N_CLASSES_DEF,
  parameter int N_CU       = 25,
  parameter int PIPE_DEPTH = 16,
  parameter int ITER       = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             feat_valid,
  output logic             feat_ready,
  input  data_t            feat_data,
  input  logic             bwr_valid,
  input  basis_wr_t        bwr,
  input  logic             bias_wr_valid,
  input  logic [DIM_W-1:0] bias_wr_dim,
  input  turn_t            bias_wr_val,
  input  logic             cwr_valid,
  input  logic [CLS_W-1:0] cwr_class,
  input  logic [DIM_W-1:0] cwr_dim,
  input  data_t            cwr_val,
  output logic             pred_valid,
  input  logic             pred_ready,
  output logic [CLS_W-1:0] pred_class,
  output logic             busy
);
  localparam int SLICE = D / N_CU;

  logic [N_CU-1:0] sc_valid, sc_ready, cu_busy;
  data_t           sc_data;
  logic [N_CU-1:0] cu_valid, cu_ready, g_valid, g_ready;
  hv_elem_t        cu_elem [N_CU];
  hv_elem_t        g_elem  [N_CU];
  logic            h_valid, h_ready, h_last;
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

  hdc_classify #(.D(D), .N_CLASSES(N_CLASSES)) u_classify (
    .clk, .rst_n, .in_valid(h_valid), .in_ready(h_ready), .in_elem(h_elem), .in_last(h_last),
    .cwr_valid, .cwr_class, .cwr_dim, .cwr_val,
    .pred_valid, .pred_ready, .pred_class);

  assign busy = (|cu_busy) || (|g_valid) || h_valid;

  initial assert (D % N_CU == 0) else $error("hdc_infer_top: D must be a multiple of N_CU");
endmodule
