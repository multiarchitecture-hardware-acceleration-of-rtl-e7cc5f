// tb_hdc_nhd_top: end-to-end test of the NeuralHD training design at
// reduced size (D = 8, N_FEAT = 6, 3 classes, 2 dimensions dropped per
// regeneration), with the behavioural global-memory model. One round:
//   load basis and biases; clear classes; encode 6 labelled inputs
//   (every stored hypervector element is compared with cos(B.F+b)*sin(B.F)
//   computed here); retrain for up to 4 iterations (classes, iteration,
//   correct and update counts compared with a reference model of the
//   retraining rule run on the stored hypervectors); read the classes;
//   drop dimensions 1 and 5 (new basis values and biases predicted with
//   the same xorshift32 generator, class elements must read back as
//   zero); encode again and check the stored hypervectors against the
//   new basis.
module tb_hdc_nhd_top;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int D = 8, NF = 6, NC = 3, MS = 16, NDROP = 2, NS = 6;
  localparam logic [31:0] SEED = 32'h2545_F491;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic feat_valid = 0, feat_ready, lbl_valid = 0, lbl_ready;
  data_t feat_data = '0;
  logic [CLS_W-1:0] lbl_data = '0, cls_class;
  logic bwr_valid = 0, bias_wr_valid = 0;
  basis_wr_t bwr = '0;
  logic [DIM_W-1:0] bias_wr_dim = '0, drop_dim = '0, cls_dim;
  turn_t bias_wr_val = '0;
  logic cmd_encode = 0, cmd_fit = 0, cmd_clear = 0, cmd_read = 0, drop_valid = 0, drop_ready;
  logic [31:0] n_samples = '0;
  logic [15:0] n_iters = '0, iters_done;
  logic gm_wr_valid, gm_wr_ready, gm_rd_valid, gm_rd_ready, gm_rsp_valid;
  logic [31:0] gm_wr_addr, gm_rd_addr;
  data_t gm_wr_data, gm_rsp_data, cls_val;
  logic cls_valid, cls_ready = 1;
  logic enc_busy, fit_busy, regen_busy, regen_done, converged;
  logic [31:0] n_encoded, n_correct, n_updates;

  hdc_nhd_top #(.D(D), .N_FEAT(NF), .N_CLASSES(NC), .MAX_SAMPLES(MS), .N_DROP(NDROP)) dut (.*);
  hdc_gmem_model #(.WORDS(MS * D), .LATENCY(3)) u_mem (
    .clk, .rst_n, .wr_valid(gm_wr_valid), .wr_ready(gm_wr_ready), .wr_addr(gm_wr_addr),
    .wr_data(gm_wr_data), .rd_valid(gm_rd_valid), .rd_ready(gm_rd_ready),
    .rd_addr(gm_rd_addr), .rsp_valid(gm_rsp_valid), .rsp_data(gm_rsp_data));

  int checks = 0, failures = 0;
  data_t basis [D][NF];
  turn_t bias [D];
  data_t feats [NS][NF];
  int lbl [NS];
  data_t mc [NC][D];
  int m_iters, m_correct, m_updates;
  bit m_conv;

  function automatic data_t alpha_h(data_t h);
    longint p;
    p = longint'(h) * 2425;
    return data_t'(p >>> 16);
  endfunction

  // reference retraining on the hypervectors as stored in global memory
  task automatic model_fit(int iters);
    m_updates = 0;
    m_conv = 0;
    for (int it = 0; it < iters; it++) begin
      m_correct = 0;
      for (int s = 0; s < NS; s++) begin
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
      if (m_correct == NS) begin m_conv = 1; break; end
    end
  endtask

  task automatic encode_all();
    @(negedge clk); cmd_encode = 1; @(negedge clk); cmd_encode = 0;
    fork
      for (int v = 0; v < NS; v++) begin
        for (int k = 0; k < NF; k++) begin
          @(negedge clk);
          feat_valid = 1; feat_data = feats[v][k];
          while (!feat_ready) @(negedge clk);
          @(posedge clk);
        end
        @(negedge clk);
        feat_valid = 0;
      end
      for (int v = 0; v < NS; v++) begin
        @(negedge clk);
        lbl_valid = 1; lbl_data = CLS_W'(lbl[v]);
        @(negedge clk);
        lbl_valid = 0;
      end
    join
    while (n_encoded != 32'(NS) || enc_busy) @(negedge clk);
    for (int v = 0; v < NS; v++) for (int d = 0; d < D; d++) begin
      real dot, e;
      dot = 0.0;
      for (int k = 0; k < NF; k++) dot += q2r(basis[d][k]) * q2r(feats[v][k]);
      e = encode_ref(dot, bias[d]);
      checks++;
      if (absr(q2r(u_mem.mem[v*D+d]) - e) > 1e-3) begin
        failures++; $display("stored h[%0d][%0d] = %f expected %f", v, d, q2r(u_mem.mem[v*D+d]), e);
      end
    end
  endtask

  task automatic read_classes();
    int n;
    n = 0;
    @(negedge clk); cmd_read = 1; @(negedge clk); cmd_read = 0;
    while (fit_busy) begin
      @(posedge clk);
      if (cls_valid && cls_ready) begin
        checks++;
        if (cls_val != mc[cls_class][cls_dim] || int'(cls_class) * D + int'(cls_dim) != n) begin
          failures++; $display("class %0d dim %0d: %0d expected %0d", cls_class, cls_dim,
                               cls_val, mc[cls_class][cls_dim]);
        end
        n++;
      end
      @(negedge clk);
    end
    checks++;
    if (n != NC * D) begin failures++; $display("read %0d class words", n); end
  endtask

  initial begin
    logic [31:0] rng;
    int drops [NDROP] = '{1, 5};
    for (int d = 0; d < D; d++) begin
      bias[d] = $urandom;
      for (int k = 0; k < NF; k++) basis[d][k] = rand_unit();
    end
    for (int v = 0; v < NS; v++) begin
      lbl[v] = v % NC;
      for (int k = 0; k < NF; k++) feats[v][k] = rand_pixel() <<< 1;
    end
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) mc[j][d] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < D; d++) begin
      for (int k = 0; k < NF; k++) begin
        @(negedge clk);
        bwr_valid = 1; bwr.dim = DIM_W'(d); bwr.feat = FEAT_W'(k); bwr.val = basis[d][k];
      end
      @(negedge clk);
      bwr_valid = 0;
      bias_wr_valid = 1; bias_wr_dim = DIM_W'(d); bias_wr_val = bias[d];
      @(negedge clk);
      bias_wr_valid = 0;
    end
    cmd_clear = 1; @(negedge clk); cmd_clear = 0;
    while (fit_busy) @(negedge clk);
    encode_all();
    // retraining
    cmd_fit = 1; n_samples = 32'(NS); n_iters = 16'd4;
    @(negedge clk); cmd_fit = 0;
    while (fit_busy) @(negedge clk);
    model_fit(4);
    checks++;
    if (int'(iters_done) != m_iters || int'(n_correct) != m_correct ||
        int'(n_updates) != m_updates || converged != m_conv || m_updates == 0) begin
      failures++;
      $display("fit status: iters %0d/%0d correct %0d/%0d updates %0d/%0d conv %0d/%0d",
               iters_done, m_iters, n_correct, m_correct, n_updates, m_updates, converged, m_conv);
    end
    read_classes();
    // regeneration of two dimensions
    rng = SEED;
    for (int i = 0; i < NDROP; i++) begin
      for (int k = 0; k < NF; k++) begin
        basis[drops[i]][k] = data_t'($signed(rng[16:0]));
        rng = xorshift32(rng);
      end
      bias[drops[i]] = rng;
      rng = xorshift32(rng);
      for (int j = 0; j < NC; j++) mc[j][drops[i]] = 0;
      @(negedge clk);
      drop_valid = 1; drop_dim = DIM_W'(drops[i]);
      while (!drop_ready) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
      drop_valid = 0;
    end
    while (regen_busy) @(negedge clk);
    read_classes();
    encode_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
