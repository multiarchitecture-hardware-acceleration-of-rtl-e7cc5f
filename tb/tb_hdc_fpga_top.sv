// tb_hdc_fpga_top: end-to-end test of the whole accelerator at reduced
// size (D = 12, N_FEAT = 8, 3 classes; 3 inference and 2 training compute
// units; 2 dimensions dropped per NeuralHD regeneration). The three
// designs are driven one after the other with the same random basis,
// biases and 8 labelled feature vectors; results are compared with
// references computed here (real arithmetic for the encoding, integer
// arithmetic for the retraining rule):
//   inference   predictions against the argmax of real similarities with
//               the classes, while the consumer stalls long enough to fill
//               the pipes and stall the compute units;
//   training    single-pass class sums against real sums, with a late
//               label so the fitting kernel must wait;
//   NeuralHD    stored hypervectors against real encodings; one fit that
//               stops at its iteration limit and one that must converge,
//               both against the reference model; regeneration of two
//               dimensions, whose class elements must then read as zero.
// Each mechanism is counted and a mechanism that never happened counts as
// a failure.
module tb_hdc_fpga_top;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int D = 12, NF = 8, NC = 3, ICU = 3, TCU = 2, MS = 16, NDROP = 2, NV = 8;

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

  hdc_fpga_top #(.D(D), .N_FEAT(NF), .N_CLASSES(NC), .INF_N_CU(ICU), .TRN_N_CU(TCU),
                 .NHD_MAX_SAMPLES(MS), .NHD_N_DROP(NDROP)) dut (.*);
  hdc_gmem_model #(.WORDS(MS * D), .LATENCY(5)) u_mem (
    .clk, .rst_n, .wr_valid(nhd_gm_wr_valid), .wr_ready(nhd_gm_wr_ready), .wr_addr(nhd_gm_wr_addr),
    .wr_data(nhd_gm_wr_data), .rd_valid(nhd_gm_rd_valid), .rd_ready(nhd_gm_rd_ready),
    .rd_addr(nhd_gm_rd_addr), .rsp_valid(nhd_gm_rsp_valid), .rsp_data(nhd_gm_rsp_data));

  int checks = 0, failures = 0;
  data_t basis [D][NF];
  turn_t bias [D];
  data_t cls [NC][D];
  data_t feats [NV][NF];
  int lbl [NV];
  real hr [NV][D];                    // real encodings
  data_t mc [NC][D];                  // NeuralHD reference classes
  int m_iters, m_correct, m_updates;
  bit m_conv;

  // mechanism counters
  int c_pred = 0, c_pred_stall = 0, c_pipe_full = 0, c_cu_stall = 0, c_bundle = 0;
  int c_lbl_wait = 0, c_gm_stall = 0, c_updates = 0, c_limit_exit = 0, c_converged = 0;
  int c_regen = 0, c_readout = 0;
  bit hold = 0;

  always @(negedge clk) inf_pred_ready <= !hold;

  function automatic void compute_refs();
    for (int v = 0; v < NV; v++) for (int d = 0; d < D; d++) begin
      real dot;
      dot = 0.0;
      for (int k = 0; k < NF; k++) dot += q2r(basis[d][k]) * q2r(feats[v][k]);
      hr[v][d] = encode_ref(dot, bias[d]);
    end
  endfunction

  // ---------------- monitors ----------------
  int n_pred = 0;
  always @(posedge clk) if (rst_n) begin
    if (!dut.u_infer.cu_ready[0]) c_pipe_full++;
    // compute phase (not loading features) without a product issued
    if (!dut.u_infer.g_cu[0].u_cu.feat_ready && !dut.u_infer.g_cu[0].u_cu.issue) c_cu_stall++;
    if (inf_pred_valid && !inf_pred_ready) c_pred_stall++;
    if (dut.u_train.h_valid && !dut.u_train.h_ready && !dut.u_train.u_fit.have_lbl) c_lbl_wait++;
    if (nhd_gm_wr_valid && !nhd_gm_wr_ready) c_gm_stall++;
    if (inf_pred_valid && inf_pred_ready) begin
      real sc [NC];
      real second;
      int e;
      for (int j = 0; j < NC; j++) begin
        sc[j] = 0.0;
        for (int d = 0; d < D; d++) sc[j] += hr[n_pred][d] * q2r(cls[j][d]);
      end
      e = 0;
      for (int j = 1; j < NC; j++) if (sc[j] > sc[e]) e = j;
      second = -1e9;
      for (int j = 0; j < NC; j++) if (j != e && sc[j] > second) second = sc[j];
      if (sc[e] - second > 0.01) begin
        checks++;
        if (int'(inf_pred_class) != e) begin
          failures++; $display("inference %0d: predicted %0d expected %0d", n_pred, inf_pred_class, e);
        end
      end
      c_pred++;
      n_pred++;
    end
  end

  // ---------------- host-side tasks ----------------
  task automatic load_basis();
    for (int d = 0; d < D; d++) begin
      for (int k = 0; k < NF; k++) begin
        @(negedge clk);
        inf_bwr_valid = 1; trn_bwr_valid = 1; nhd_bwr_valid = 1;
        inf_bwr.dim = DIM_W'(d); inf_bwr.feat = FEAT_W'(k); inf_bwr.val = basis[d][k];
        trn_bwr = inf_bwr; nhd_bwr = inf_bwr;
      end
      @(negedge clk);
      inf_bwr_valid = 0; trn_bwr_valid = 0; nhd_bwr_valid = 0;
      inf_bias_wr_valid = 1; trn_bias_wr_valid = 1; nhd_bias_wr_valid = 1;
      inf_bias_wr_dim = DIM_W'(d); trn_bias_wr_dim = DIM_W'(d); nhd_bias_wr_dim = DIM_W'(d);
      inf_bias_wr_val = bias[d]; trn_bias_wr_val = bias[d]; nhd_bias_wr_val = bias[d];
      for (int j = 0; j < NC; j++) begin
        @(negedge clk);
        inf_bias_wr_valid = 0; trn_bias_wr_valid = 0; nhd_bias_wr_valid = 0;
        inf_cwr_valid = 1; inf_cwr_class = CLS_W'(j); inf_cwr_dim = DIM_W'(d); inf_cwr_val = cls[j][d];
      end
      @(negedge clk);
      inf_cwr_valid = 0;
    end
  endtask

  task automatic run_inference();
    fork
      begin
        wait (n_pred == 1);
        hold = 1;
        repeat (700) @(posedge clk);
        hold = 0;
      end
      for (int v = 0; v < NV; v++) for (int k = 0; k < NF; k++) begin
        @(negedge clk);
        inf_feat_valid = 1; inf_feat_data = feats[v][k];
        while (!inf_feat_ready) @(negedge clk);
        @(posedge clk);
        @(negedge clk);
        inf_feat_valid = 0;
      end
    join
    while (n_pred < NV) @(negedge clk);
  endtask

  task automatic run_training();
    int n;
    @(negedge clk); trn_cmd_clear = 1; @(negedge clk); trn_cmd_clear = 0;
    while (trn_busy) @(negedge clk);
    fork
      for (int v = 0; v < NV; v++) for (int k = 0; k < NF; k++) begin
        @(negedge clk);
        trn_feat_valid = 1; trn_feat_data = feats[v][k];
        while (!trn_feat_ready) @(negedge clk);
        @(posedge clk);
        @(negedge clk);
        trn_feat_valid = 0;
      end
      for (int v = 0; v < NV; v++) begin
        repeat ((v == 0) ? 100 : 1) @(negedge clk);
        trn_lbl_valid = 1; trn_lbl_data = CLS_W'(lbl[v]);
        while (!trn_lbl_ready) @(negedge clk);
        @(posedge clk);
        @(negedge clk);
        trn_lbl_valid = 0;
      end
    join
    while (trn_n_bundled != 32'(NV)) @(negedge clk);
    c_bundle = int'(trn_n_bundled);
    trn_cls_ready = 1;
    @(negedge clk); trn_cmd_read = 1; @(negedge clk); trn_cmd_read = 0;
    n = 0;
    while (trn_busy) begin
      @(posedge clk);
      if (trn_cls_valid && trn_cls_ready) begin
        real e;
        e = 0.0;
        for (int v = 0; v < NV; v++) if (lbl[v] == int'(trn_cls_class)) e += hr[v][trn_cls_dim];
        checks++;
        if (absr(q2r(trn_cls_val) - e) > 1e-3 * NV) begin
          failures++; $display("trained class %0d dim %0d: %f expected %f", trn_cls_class,
                               trn_cls_dim, q2r(trn_cls_val), e);
        end
        n++;
      end
      @(negedge clk);
    end
    if (n == NC * D) c_readout++;
  endtask

  task automatic nhd_encode();
    @(negedge clk); nhd_cmd_encode = 1; @(negedge clk); nhd_cmd_encode = 0;
    fork
      for (int v = 0; v < NV; v++) for (int k = 0; k < NF; k++) begin
        @(negedge clk);
        nhd_feat_valid = 1; nhd_feat_data = feats[v][k];
        while (!nhd_feat_ready) @(negedge clk);
        @(posedge clk);
        @(negedge clk);
        nhd_feat_valid = 0;
      end
      for (int v = 0; v < NV; v++) begin
        @(negedge clk);
        nhd_lbl_valid = 1; nhd_lbl_data = CLS_W'(lbl[v]);
        @(negedge clk);
        nhd_lbl_valid = 0;
      end
    join
    while (nhd_n_encoded != 32'(NV) || nhd_enc_busy) @(negedge clk);
    for (int v = 0; v < NV; v++) for (int d = 0; d < D; d++) begin
      checks++;
      if (absr(q2r(u_mem.mem[v*D+d]) - hr[v][d]) > 1e-3) begin
        failures++; $display("stored h[%0d][%0d] %f expected %f", v, d, q2r(u_mem.mem[v*D+d]), hr[v][d]);
      end
    end
  endtask

  function automatic data_t alpha_h(data_t h);
    longint p;
    p = longint'(h) * 2425;
    return data_t'(p >>> 16);
  endfunction

  task automatic nhd_fit(int iters);
    @(negedge clk); nhd_cmd_fit = 1; nhd_n_samples = 32'(NV); nhd_n_iters = 16'(iters);
    @(negedge clk); nhd_cmd_fit = 0;
    while (nhd_fit_busy) @(negedge clk);
    m_updates = 0; m_conv = 0;
    for (int it = 0; it < iters; it++) begin
      m_correct = 0;
      for (int s = 0; s < NV; s++) begin
        longint best, sc;
        int p;
        p = 0;
        for (int j = 0; j < NC; j++) begin
          sc = 0;
          for (int i = 0; i < D; i++) sc += longint'(u_mem.mem[s*D+i]) * longint'(mc[j][i]);
          if (j == 0 || sc > best) begin best = sc; p = j; end
        end
        if (p == lbl[s]) m_correct++;
        else begin
          m_updates++;
          for (int i = 0; i < D; i++) begin
            mc[lbl[s]][i] += alpha_h(u_mem.mem[s*D+i]);
            mc[p][i]      -= alpha_h(u_mem.mem[s*D+i]);
          end
        end
      end
      m_iters = it + 1;
      if (m_correct == NV) begin m_conv = 1; break; end
    end
    checks++;
    if (int'(nhd_iters_done) != m_iters || int'(nhd_n_correct) != m_correct ||
        int'(nhd_n_updates) != m_updates || nhd_converged != m_conv) begin
      failures++;
      $display("fit: iters %0d/%0d correct %0d/%0d updates %0d/%0d conv %0d/%0d", nhd_iters_done,
               m_iters, nhd_n_correct, m_correct, nhd_n_updates, m_updates, nhd_converged, m_conv);
    end
    c_updates += int'(nhd_n_updates);
    if (nhd_converged) c_converged++;
    else if (int'(nhd_iters_done) == iters) c_limit_exit++;
  endtask

  task automatic nhd_read();
    int n;
    n = 0;
    nhd_cls_ready = 1;
    @(negedge clk); nhd_cmd_read = 1; @(negedge clk); nhd_cmd_read = 0;
    while (nhd_fit_busy) begin
      @(posedge clk);
      if (nhd_cls_valid && nhd_cls_ready) begin
        checks++;
        if (nhd_cls_val != mc[nhd_cls_class][nhd_cls_dim]) begin
          failures++; $display("NeuralHD class %0d dim %0d: %0d expected %0d", nhd_cls_class,
                               nhd_cls_dim, nhd_cls_val, mc[nhd_cls_class][nhd_cls_dim]);
        end
        n++;
      end
      @(negedge clk);
    end
    if (n == NC * D) c_readout++;
  endtask

  task automatic nhd_regen(int d0, int d1);
    int dd [2];
    dd[0] = d0; dd[1] = d1;
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < NC; j++) mc[j][dd[i]] = 0;
      @(negedge clk);
      nhd_drop_valid = 1; nhd_drop_dim = DIM_W'(dd[i]);
      while (!nhd_drop_ready) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
      nhd_drop_valid = 0;
    end
    while (nhd_regen_busy) @(negedge clk);
    c_regen++;
  endtask

  initial begin
    for (int d = 0; d < D; d++) begin
      bias[d] = $urandom;
      for (int k = 0; k < NF; k++) basis[d][k] = rand_unit();
    end
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) cls[j][d] = rand_unit() >>> 1;
    for (int v = 0; v < NV; v++) begin
      lbl[v] = v % NC;
      for (int k = 0; k < NF; k++) feats[v][k] = rand_pixel() <<< 1;
    end
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) mc[j][d] = 0;
    compute_refs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_basis();
    run_inference();
    run_training();
    @(negedge clk); nhd_cmd_clear = 1; @(negedge clk); nhd_cmd_clear = 0;
    while (nhd_fit_busy) @(negedge clk);
    nhd_encode();
    nhd_fit(1);
    nhd_fit(60);
    nhd_read();
    nhd_regen(2, 9);
    nhd_read();
    $display("mechanisms: predictions %0d, prediction stalls %0d, pipe full %0d, CU stalls %0d,",
             c_pred, c_pred_stall, c_pipe_full, c_cu_stall);
    $display("  bundled %0d, label waits %0d, memory write stalls %0d, class updates %0d,",
             c_bundle, c_lbl_wait, c_gm_stall, c_updates);
    $display("  limit exits %0d, converged %0d, regenerations %0d, class read-outs %0d",
             c_limit_exit, c_converged, c_regen, c_readout);
    begin
      int mech [12];
      mech = '{c_pred, c_pred_stall, c_pipe_full, c_cu_stall, c_bundle, c_lbl_wait, c_gm_stall,
               c_updates, c_limit_exit, c_converged, c_regen, c_readout};
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (mech[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
