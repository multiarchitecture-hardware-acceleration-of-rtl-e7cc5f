// tb_hdc_fpga_full: the whole accelerator at its default size (D = 2000
// hyperdimensions, 784 features, 10 classes, 25 inference and 8 training
// compute units). One complete operation of each design on one random
// 28x28 input:
//   inference   load all 1,568,000 basis values, 2000 biases and 10 class
//               vectors, classify the input; the prediction is compared
//               with the argmax of real similarities and the latency with
//               784 + 80*784 cycles plus the pipeline (0.28 ms at 225 MHz);
//   training    bundle the input into class 3 and read all classes back
//               (class 3 must equal the real encoding, the rest zero);
//   NeuralHD    encode the input into global memory (checked against the
//               real encoding), retrain for one iteration (the zero
//               classes predict class 0, so class 3 gains alpha*H and
//               class 0 loses it) and read the classes back.
module tb_hdc_fpga_full;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int D = D_DEF, NF = N_FEAT_DEF, NC = N_CLASSES_DEF, SLICE = D / 25, LABEL = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic             inf_feat_valid = '0;
  logic             inf_feat_ready;
  data_t            inf_feat_data = '0;
  logic             inf_bwr_valid = '0;
  basis_wr_t        inf_bwr = '0;
  logic             inf_bias_wr_valid = '0;
  logic [DIM_W-1:0] inf_bias_wr_dim = '0;
  turn_t            inf_bias_wr_val = '0;
  logic             inf_cwr_valid = '0;
  logic [CLS_W-1:0] inf_cwr_class = '0;
  logic [DIM_W-1:0] inf_cwr_dim = '0;
  data_t            inf_cwr_val = '0;
  logic             inf_pred_valid;
  logic             inf_pred_ready = '0;
  logic [CLS_W-1:0] inf_pred_class;
  logic             inf_busy;
  logic             trn_feat_valid = '0;
  logic             trn_feat_ready;
  data_t            trn_feat_data = '0;
  logic             trn_lbl_valid = '0;
  logic             trn_lbl_ready;
  logic [CLS_W-1:0] trn_lbl_data = '0;
  logic             trn_bwr_valid = '0;
  basis_wr_t        trn_bwr = '0;
  logic             trn_bias_wr_valid = '0;
  logic [DIM_W-1:0] trn_bias_wr_dim = '0;
  turn_t            trn_bias_wr_val = '0;
  logic             trn_cmd_clear = '0;
  logic             trn_cmd_read = '0;
  logic             trn_cls_valid;
  logic             trn_cls_ready = '0;
  logic [CLS_W-1:0] trn_cls_class;
  logic [DIM_W-1:0] trn_cls_dim;
  data_t            trn_cls_val;
  logic [31:0]      trn_n_bundled;
  logic             trn_busy;
  logic             nhd_feat_valid = '0;
  logic             nhd_feat_ready;
  data_t            nhd_feat_data = '0;
  logic             nhd_lbl_valid = '0;
  logic             nhd_lbl_ready;
  logic [CLS_W-1:0] nhd_lbl_data = '0;
  logic             nhd_bwr_valid = '0;
  basis_wr_t        nhd_bwr = '0;
  logic             nhd_bias_wr_valid = '0;
  logic [DIM_W-1:0] nhd_bias_wr_dim = '0;
  turn_t            nhd_bias_wr_val = '0;
  logic             nhd_cmd_encode = '0;
  logic             nhd_cmd_fit = '0;
  logic [31:0]      nhd_n_samples = '0;
  logic [15:0]      nhd_n_iters = '0;
  logic             nhd_cmd_clear = '0;
  logic             nhd_cmd_read = '0;
  logic             nhd_drop_valid = '0;
  logic             nhd_drop_ready;
  logic [DIM_W-1:0] nhd_drop_dim = '0;
  logic             nhd_gm_wr_valid;
  logic             nhd_gm_wr_ready;
  logic [31:0]      nhd_gm_wr_addr;
  data_t            nhd_gm_wr_data;
  logic             nhd_gm_rd_valid;
  logic             nhd_gm_rd_ready;
  logic [31:0]      nhd_gm_rd_addr;
  logic             nhd_gm_rsp_valid;
  data_t            nhd_gm_rsp_data;
  logic             nhd_cls_valid;
  logic             nhd_cls_ready = '0;
  logic [CLS_W-1:0] nhd_cls_class;
  logic [DIM_W-1:0] nhd_cls_dim;
  data_t            nhd_cls_val;
  logic             nhd_enc_busy;
  logic             nhd_fit_busy;
  logic             nhd_regen_busy;
  logic             nhd_regen_done;
  logic [31:0]      nhd_n_encoded;
  logic [15:0]      nhd_iters_done;
  logic [31:0]      nhd_n_correct;
  logic [31:0]      nhd_n_updates;
  logic             nhd_converged;

  hdc_fpga_top dut (.*);
  hdc_gmem_model #(.WORDS(D), .LATENCY(8), .STALL(0)) u_mem (
    .clk, .rst_n, .wr_valid(nhd_gm_wr_valid), .wr_ready(nhd_gm_wr_ready), .wr_addr(nhd_gm_wr_addr),
    .wr_data(nhd_gm_wr_data), .rd_valid(nhd_gm_rd_valid), .rd_ready(nhd_gm_rd_ready),
    .rd_addr(nhd_gm_rd_addr), .rsp_valid(nhd_gm_rsp_valid), .rsp_data(nhd_gm_rsp_data));

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  data_t basis [D][NF];
  turn_t bias [D];
  data_t cls [NC][D];
  data_t feat [NF];
  real hr [D];

  function automatic data_t alpha_h(data_t h);
    longint p;
    p = longint'(h) * 2425;
    return data_t'(p >>> 16);
  endfunction

  initial begin
    int expected, t_in, n, bad;
    real sc [NC];
    real second;
    for (int d = 0; d < D; d++) begin
      bias[d] = $urandom;
      for (int k = 0; k < NF; k++) basis[d][k] = rand_unit() >>> 4;   // [-1/16, 1/16)
    end
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) cls[j][d] = rand_unit() >>> 1;
    for (int k = 0; k < NF; k++) feat[k] = rand_pixel();
    for (int d = 0; d < D; d++) begin
      real dot;
      dot = 0.0;
      for (int k = 0; k < NF; k++) dot += q2r(basis[d][k]) * q2r(feat[k]);
      hr[d] = encode_ref(dot, bias[d]);
    end
    for (int j = 0; j < NC; j++) begin
      sc[j] = 0.0;
      for (int d = 0; d < D; d++) sc[j] += hr[d] * q2r(cls[j][d]);
    end
    expected = 0;
    for (int j = 1; j < NC; j++) if (sc[j] > sc[expected]) expected = j;
    second = -1e9;
    for (int j = 0; j < NC; j++) if (j != expected && sc[j] > second) second = sc[j];

    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- load basis and biases into all three designs, classes into inference ----
    inf_bwr_valid = 1; trn_bwr_valid = 1; nhd_bwr_valid = 1;
    for (int d = 0; d < D; d++) for (int k = 0; k < NF; k++) begin
      @(negedge clk);
      inf_bwr.dim = DIM_W'(d); inf_bwr.feat = FEAT_W'(k); inf_bwr.val = basis[d][k];
      trn_bwr = inf_bwr; nhd_bwr = inf_bwr;
    end
    @(negedge clk);
    inf_bwr_valid = 0; trn_bwr_valid = 0; nhd_bwr_valid = 0;
    inf_bias_wr_valid = 1; trn_bias_wr_valid = 1; nhd_bias_wr_valid = 1;
    for (int d = 0; d < D; d++) begin
      inf_bias_wr_dim = DIM_W'(d); trn_bias_wr_dim = DIM_W'(d); nhd_bias_wr_dim = DIM_W'(d);
      inf_bias_wr_val = bias[d]; trn_bias_wr_val = bias[d]; nhd_bias_wr_val = bias[d];
      @(negedge clk);
    end
    inf_bias_wr_valid = 0; trn_bias_wr_valid = 0; nhd_bias_wr_valid = 0;
    inf_cwr_valid = 1;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      inf_cwr_class = CLS_W'(j); inf_cwr_dim = DIM_W'(d); inf_cwr_val = cls[j][d];
      @(negedge clk);
    end
    inf_cwr_valid = 0;
    trn_cmd_clear = 1; nhd_cmd_clear = 1; nhd_cmd_encode = 1;
    @(negedge clk);
    trn_cmd_clear = 0; nhd_cmd_clear = 0; nhd_cmd_encode = 0;
    while (trn_busy || nhd_fit_busy) @(negedge clk);
    // ---- stream the input into all three designs at once ----
    inf_pred_ready = 1;
    trn_lbl_valid = 1; trn_lbl_data = CLS_W'(LABEL);
    nhd_lbl_valid = 1; nhd_lbl_data = CLS_W'(LABEL);
    @(negedge clk);
    nhd_lbl_valid = 0;
    inf_feat_valid = 1; trn_feat_valid = 1; nhd_feat_valid = 1;
    for (int k = 0; k < NF; k++) begin
      inf_feat_data = feat[k]; trn_feat_data = feat[k]; nhd_feat_data = feat[k];
      @(posedge clk);
      if (!(inf_feat_ready && trn_feat_ready && nhd_feat_ready)) begin
        failures++; $display("an input stream stalled while loading");
      end
      @(negedge clk);
    end
    inf_feat_valid = 0; trn_feat_valid = 0; nhd_feat_valid = 0;
    t_in = cycle;
    // ---- inference result ----
    while (!inf_pred_valid) @(negedge clk);
    $display("inference: predicted %0d (expected %0d, margin %f) after %0d cycles", inf_pred_class,
             expected, sc[expected] - second, cycle - t_in);
    checks++;
    if (sc[expected] - second > 0.01 && int'(inf_pred_class) != expected) begin
      failures++; $display("wrong prediction");
    end
    checks++;
    if (cycle - t_in < SLICE * NF || cycle - t_in > SLICE * NF + 60) begin
      failures++; $display("latency outside %0d..%0d", SLICE * NF, SLICE * NF + 60);
    end
    // ---- single-pass training result ----
    while (trn_n_bundled != 1) @(negedge clk);
    trn_lbl_valid = 0;
    trn_cls_ready = 1;
    trn_cmd_read = 1; @(negedge clk); trn_cmd_read = 0;
    n = 0; bad = 0;
    while (trn_busy) begin
      @(posedge clk);
      if (trn_cls_valid) begin
        real e;
        e = (int'(trn_cls_class) == LABEL) ? hr[trn_cls_dim] : 0.0;
        if (absr(q2r(trn_cls_val) - e) > 2e-3) bad++;
        n++;
      end
      @(negedge clk);
    end
    checks++;
    if (n != NC * D || bad != 0) begin
      failures++; $display("training read-out: %0d words, %0d wrong", n, bad);
    end
    // ---- NeuralHD: stored hypervector, one retraining iteration ----
    while (nhd_n_encoded != 1 || nhd_enc_busy) @(negedge clk);
    bad = 0;
    for (int d = 0; d < D; d++) if (absr(q2r(u_mem.mem[d]) - hr[d]) > 2e-3) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("NeuralHD encoding: %0d wrong elements", bad); end
    nhd_cmd_fit = 1; nhd_n_samples = 1; nhd_n_iters = 1;
    @(negedge clk); nhd_cmd_fit = 0;
    while (nhd_fit_busy) @(negedge clk);
    checks++;
    if (nhd_n_updates != 1 || nhd_iters_done != 1) begin
      failures++; $display("NeuralHD fit: updates %0d iterations %0d", nhd_n_updates, nhd_iters_done);
    end
    nhd_cls_ready = 1;
    nhd_cmd_read = 1; @(negedge clk); nhd_cmd_read = 0;
    n = 0; bad = 0;
    while (nhd_fit_busy) begin
      @(posedge clk);
      if (nhd_cls_valid) begin
        data_t e;
        e = (int'(nhd_cls_class) == LABEL) ? alpha_h(u_mem.mem[nhd_cls_dim]) :
            (nhd_cls_class == 0) ? -alpha_h(u_mem.mem[nhd_cls_dim]) : '0;
        if (nhd_cls_val != e) bad++;
        n++;
      end
      @(negedge clk);
    end
    checks++;
    if (n != NC * D || bad != 0) begin
      failures++; $display("NeuralHD read-out: %0d words, %0d wrong", n, bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
