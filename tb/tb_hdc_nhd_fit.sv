// tb_hdc_nhd_fit: self-checking test of the NeuralHD retraining kernel
// (D = 8, 3 classes) against a reference model of the retraining rule
// written here: for each sample, predict argmax_j H.C_j; on a miss add
// alpha*H to the true class and subtract it from the predicted one.
// Global memory is the behavioural model with random stalls and a 4-cycle
// latency. Run 1: 10 noisy samples, 3 iterations (must stop at the
// iteration limit). Run 2: separable samples, up to 20 iterations (must
// stop early on convergence). After each run the iteration count, correct
// count, update count and every class element (read back through the
// output stream) are compared with the model; the zero-dimension command
// is tested between the runs.
module tb_hdc_nhd_fit;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int D = 8, NC = 3, MS = 16, NS = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lbl_wr_valid = 0;
  logic [31:0] lbl_wr_idx = '0;
  logic [CLS_W-1:0] lbl_wr_val = '0;
  logic cmd_fit = 0, cmd_clear = 0, cmd_read = 0, zero_valid = 0;
  logic [31:0] n_samples = '0;
  logic [15:0] n_iters = '0;
  logic [DIM_W-1:0] zero_dim = '0;
  logic gm_rd_valid, gm_rd_ready, gm_rsp_valid;
  logic [31:0] gm_rd_addr;
  data_t gm_rsp_data;
  logic out_valid, out_ready = 1;
  logic [CLS_W-1:0] out_class;
  logic [DIM_W-1:0] out_dim;
  data_t out_val;
  logic busy, converged;
  logic [15:0] iters_done;
  logic [31:0] n_correct, n_updates;

  hdc_nhd_fit #(.D(D), .N_CLASSES(NC), .MAX_SAMPLES(MS)) dut (.*);

  logic gm_wr_valid = 0, gm_wr_ready;
  logic [31:0] gm_wr_addr = '0;
  data_t gm_wr_data = '0;
  hdc_gmem_model #(.WORDS(MS * D), .LATENCY(4)) u_mem (
    .clk, .rst_n, .wr_valid(gm_wr_valid), .wr_ready(gm_wr_ready), .wr_addr(gm_wr_addr),
    .wr_data(gm_wr_data), .rd_valid(gm_rd_valid), .rd_ready(gm_rd_ready),
    .rd_addr(gm_rd_addr), .rsp_valid(gm_rsp_valid), .rsp_data(gm_rsp_data));

  int checks = 0, failures = 0;
  data_t hv [NS][D];
  int lbl [NS];
  data_t mc [NC][D];        // model classes
  int m_iters, m_correct, m_updates;
  bit m_conv;

  function automatic data_t alpha_h(data_t h);
    longint p;
    p = longint'(h) * 2425;          // alpha = 0.037 -> 2425 / 65536
    return data_t'(p >>> 16);
  endfunction

  task automatic model_fit(int ns, int iters);
    m_updates = 0;
    m_conv = 0;
    for (int it = 0; it < iters; it++) begin
      m_correct = 0;
      for (int s = 0; s < ns; s++) begin
        longint best, sc;
        int p;
        p = 0;
        for (int j = 0; j < NC; j++) begin
          sc = 0;
          for (int i = 0; i < D; i++) sc += longint'(hv[s][i]) * longint'(mc[j][i]);
          if (j == 0 || sc > best) begin best = sc; p = j; end
        end
        if (p == lbl[s]) m_correct++;
        else begin
          m_updates++;
          for (int i = 0; i < D; i++) begin
            mc[lbl[s]][i] += alpha_h(hv[s][i]);
            mc[p][i]      -= alpha_h(hv[s][i]);
          end
        end
      end
      m_iters = it + 1;
      if (m_correct == ns) begin m_conv = 1; break; end
    end
  endtask

  task automatic load_set();
    // hypervectors into global memory through the model's write channel
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < D; i++) begin
        @(negedge clk);
        gm_wr_valid = 1; gm_wr_addr = 32'(s * D + i); gm_wr_data = hv[s][i];
        while (!gm_wr_ready) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk);
      gm_wr_valid = 0;
      lbl_wr_valid = 1; lbl_wr_idx = 32'(s); lbl_wr_val = CLS_W'(lbl[s]);
      @(negedge clk);
      lbl_wr_valid = 0;
    end
  endtask

  task automatic run_and_check(int iters, bit expect_early);
    @(negedge clk);
    cmd_fit = 1; n_samples = 32'(NS); n_iters = 16'(iters);
    @(negedge clk);
    cmd_fit = 0;
    while (busy) @(negedge clk);
    model_fit(NS, iters);
    checks++;
    if (int'(iters_done) != m_iters || int'(n_correct) != m_correct ||
        int'(n_updates) != m_updates || converged != m_conv) begin
      failures++;
      $display("status: iters %0d/%0d correct %0d/%0d updates %0d/%0d converged %0d/%0d",
               iters_done, m_iters, n_correct, m_correct, n_updates, m_updates, converged, m_conv);
    end
    checks++;
    if (expect_early ? !(m_conv && m_iters < iters) : (m_iters != iters)) begin
      failures++; $display("the run did not exercise the intended exit");
    end
    read_and_compare();
  endtask

  task automatic read_and_compare();
    int n;
    n = 0;
    @(negedge clk);
    cmd_read = 1;
    @(negedge clk);
    cmd_read = 0;
    while (busy || n < NC * D) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_val != mc[out_class][out_dim] || int'(out_class) * D + int'(out_dim) != n) begin
          failures++;
          $display("class %0d dim %0d: %0d expected %0d", out_class, out_dim, out_val,
                   mc[out_class][out_dim]);
        end
        n++;
      end
      if (n > NC * D) break;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // run 1: noisy data, limited by the iteration count
    for (int s = 0; s < NS; s++) begin
      lbl[s] = $urandom % NC;
      for (int i = 0; i < D; i++) hv[s][i] = rand_unit();
    end
    for (int j = 0; j < NC; j++) for (int i = 0; i < D; i++) mc[j][i] = 0;
    @(negedge clk); cmd_clear = 1; @(negedge clk); cmd_clear = 0;
    while (busy) @(negedge clk);
    load_set();
    run_and_check(3, 0);
    // zero one dimension in every class
    @(negedge clk); zero_valid = 1; zero_dim = 3; @(negedge clk); zero_valid = 0;
    for (int j = 0; j < NC; j++) mc[j][3] = 0;
    read_and_compare();
    // run 2: separable data (class c has a large element at dimension c)
    for (int s = 0; s < NS; s++) begin
      lbl[s] = s % NC;
      for (int i = 0; i < D; i++) hv[s][i] = rand_unit() >>> 3;
      hv[s][lbl[s]] = 32'sh0000_C000;
    end
    for (int j = 0; j < NC; j++) for (int i = 0; i < D; i++) mc[j][i] = 0;
    @(negedge clk); cmd_clear = 1; @(negedge clk); cmd_clear = 0;
    while (busy) @(negedge clk);
    load_set();
    run_and_check(20, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
