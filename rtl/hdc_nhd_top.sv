// hdc_nhd_top: the NeuralHD training design. One encoder unit handles all
// D dimensions (the design does not have the on-chip memory for several);
// it encodes the training inputs one at a time as a matrix-vector product
// followed by the cosine/sine step, and the encoded hypervectors are
// written to global (off-chip) memory, hypervector s at s*D. Labels go
// into the fitting kernel's label memory. The fitting kernel then retrains
// the classes over the stored hypervectors for up to n_iters iterations.
// The host reads the classes back, chooses the N_DROP dimensions with the
// lowest variance across classes and sends them to the regeneration unit,
// which writes new random basis vectors and biases into the encoder and
// zeroes those class elements; the host then streams the training set
// again (cmd_encode) and the next round begins.
// Host sequence: load basis and biases (or regenerate every dimension),
// cmd_clear, cmd_encode + stream N inputs and labels, cmd_fit, cmd_read,
// drop list, cmd_encode + stream, cmd_fit, ...
// Interface: feature and label streams, basis/bias load ports, commands,
// drop stream, global-memory write channel (valid/ready, address, data)
// and read channel (request valid/ready + address, in-order response),
// class output stream, status.
// Timing: encoding takes N_FEAT + D*N_FEAT cycles per input (1,568,784
// with the defaults); a fitting iteration about 2*D cycles per sample
// plus D per misprediction.
// The dataflow follows the reference design; the command set, the memory
// channel protocol and the number format are this design's.
module hdc_nhd_top
  import hdc_pkg::*;
#(
  parameter int D           = D_DEF,
  parameter int N_FEAT      = N_FEAT_DEF,
  parameter int N_CLASSES   = N_CLASSES_DEF,
  parameter int MAX_SAMPLES = 60000,
  parameter int N_DROP      = 200,
  parameter int PIPE_DEPTH  = 16,
  parameter int ITER        = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  // training inputs
  input  logic             feat_valid,
  output logic             feat_ready,
  input  data_t            feat_data,
  input  logic             lbl_valid,
  output logic             lbl_ready,
  input  logic [CLS_W-1:0] lbl_data,
  // host load of basis and bias
  input  logic             bwr_valid,
  input  basis_wr_t        bwr,
  input  logic             bias_wr_valid,
  input  logic [DIM_W-1:0] bias_wr_dim,
  input  turn_t            bias_wr_val,
  // commands
  input  logic             cmd_encode,
  input  logic             cmd_fit,
  input  logic [31:0]      n_samples,
  input  logic [15:0]      n_iters,
  input  logic             cmd_clear,
  input  logic             cmd_read,
  input  logic             drop_valid,
  output logic             drop_ready,
  input  logic [DIM_W-1:0] drop_dim,
  // global memory
  output logic             gm_wr_valid,
  input  logic             gm_wr_ready,
  output logic [31:0]      gm_wr_addr,
  output data_t            gm_wr_data,
  output logic             gm_rd_valid,
  input  logic             gm_rd_ready,
  output logic [31:0]      gm_rd_addr,
  input  logic             gm_rsp_valid,
  input  data_t            gm_rsp_data,
  // class read-out
  output logic             cls_valid,
  input  logic             cls_ready,
  output logic [CLS_W-1:0] cls_class,
  output logic [DIM_W-1:0] cls_dim,
  output data_t            cls_val,
  // status
  output logic             enc_busy,
  output logic             fit_busy,
  output logic             regen_busy,
  output logic             regen_done,
  output logic [31:0]      n_encoded,
  output logic [15:0]      iters_done,
  output logic [31:0]      n_correct,
  output logic [31:0]      n_updates,
  output logic             converged
);
  localparam int DC_W = $clog2(D + 1);

  // ---------------- regeneration and basis write arbitration ----------------
  logic             rg_bwr_valid, rg_bias_valid, rg_zero_valid;
  basis_wr_t        rg_bwr;
  logic [DIM_W-1:0] rg_bias_dim, rg_zero_dim;
  turn_t            rg_bias_val;

  hdc_regen #(.N_FEAT(N_FEAT), .N_DROP(N_DROP)) u_regen (
    .clk, .rst_n, .drop_valid, .drop_ready, .drop_dim,
    .bwr_valid(rg_bwr_valid), .bwr(rg_bwr),
    .bias_wr_valid(rg_bias_valid), .bias_wr_dim(rg_bias_dim), .bias_wr_val(rg_bias_val),
    .zero_valid(rg_zero_valid), .zero_dim(rg_zero_dim),
    .busy(regen_busy), .done(regen_done));

  logic             e_bwr_valid, e_bias_valid;
  basis_wr_t        e_bwr;
  logic [DIM_W-1:0] e_bias_dim;
  turn_t            e_bias_val;
  // regeneration writes win over host writes
  assign e_bwr_valid  = rg_bwr_valid || bwr_valid;
  assign e_bwr        = rg_bwr_valid ? rg_bwr : bwr;
  assign e_bias_valid = rg_bias_valid || bias_wr_valid;
  assign e_bias_dim   = rg_bias_valid ? rg_bias_dim : bias_wr_dim;
  assign e_bias_val   = rg_bias_valid ? rg_bias_val : bias_wr_val;

  // ---------------- encoder ----------------
  logic     cu_valid, cu_ready, p_valid, p_ready;
  hv_elem_t cu_elem, p_elem;
  logic     cu_busy;

  hdc_enc_cu #(.D_SLICE(D), .BASE_DIM(0), .N_FEAT(N_FEAT), .ITER(ITER)) u_enc (
    .clk, .rst_n, .feat_valid, .feat_ready, .feat_data,
    .bwr_valid(e_bwr_valid), .bwr(e_bwr),
    .bias_wr_valid(e_bias_valid), .bias_wr_dim(e_bias_dim), .bias_wr_val(e_bias_val),
    .out_valid(cu_valid), .out_ready(cu_ready), .out_elem(cu_elem), .busy(cu_busy));

  hdc_pipe #(.WIDTH($bits(hv_elem_t)), .DEPTH(PIPE_DEPTH)) u_pipe (
    .clk, .rst_n, .in_valid(cu_valid), .in_ready(cu_ready), .in_data(cu_elem),
    .out_valid(p_valid), .out_ready(p_ready), .out_data(p_elem));

  // ---------------- encoded hypervectors -> global memory ----------------
  logic [DC_W-1:0] elem_cnt;
  logic [31:0]     lbl_idx;

  assign gm_wr_valid = p_valid;
  assign p_ready     = gm_wr_ready;
  assign gm_wr_addr  = n_encoded * 32'(D) + 32'(p_elem.dim);
  assign gm_wr_data  = p_elem.val;
  assign lbl_ready   = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elem_cnt  <= '0;
      n_encoded <= '0;
      lbl_idx   <= '0;
    end else if (cmd_encode) begin
      elem_cnt  <= '0;
      n_encoded <= '0;
      lbl_idx   <= '0;
    end else begin
      if (gm_wr_valid && gm_wr_ready) begin
        if (elem_cnt == DC_W'(D - 1)) begin
          elem_cnt  <= '0;
          n_encoded <= n_encoded + 1;
        end else begin
          elem_cnt <= elem_cnt + 1'b1;
        end
      end
      if (lbl_valid) lbl_idx <= lbl_idx + 1;
    end
  end

  assign enc_busy = cu_busy || p_valid;

  // ---------------- fitting kernel ----------------
  hdc_nhd_fit #(.D(D), .N_CLASSES(N_CLASSES), .MAX_SAMPLES(MAX_SAMPLES)) u_fit (
    .clk, .rst_n,
    .lbl_wr_valid(lbl_valid), .lbl_wr_idx(lbl_idx), .lbl_wr_val(lbl_data),
    .cmd_fit, .n_samples, .n_iters, .cmd_clear, .cmd_read,
    .zero_valid(rg_zero_valid), .zero_dim(rg_zero_dim),
    .gm_rd_valid, .gm_rd_ready, .gm_rd_addr, .gm_rsp_valid, .gm_rsp_data,
    .out_valid(cls_valid), .out_ready(cls_ready), .out_class(cls_class),
    .out_dim(cls_dim), .out_val(cls_val),
    .busy(fit_busy), .iters_done, .n_correct, .n_updates, .converged);
endmodule
