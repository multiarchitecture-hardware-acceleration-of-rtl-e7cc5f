// tb_hdc_infer_top: end-to-end test of the inference design at reduced
// size (D = 12, N_FEAT = 10, 4 classes, 3 compute units, 2-deep pipes).
// Loads random basis vectors, biases and class vectors, streams 8 random
// feature vectors and checks each prediction against the argmax of
// similarities computed here in real arithmetic from cos(B.F+b)*sin(B.F)
// (only where the best class leads by more than 0.01, far above the
// fixed-point error). The prediction consumer holds off for a long time
// once, so the pipes fill and the compute units must stall; the latency of
// the first prediction is checked against SLICE*N_FEAT plus the pipeline.
module tb_hdc_infer_top;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int D = 12, NF = 10, NC = 4, NCU = 3, SLICE = D / NCU, NV = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic feat_valid = 0, feat_ready;
  data_t feat_data = '0;
  logic bwr_valid = 0, bias_wr_valid = 0, cwr_valid = 0;
  basis_wr_t bwr = '0;
  logic [DIM_W-1:0] bias_wr_dim = '0, cwr_dim = '0;
  turn_t bias_wr_val = '0;
  logic [CLS_W-1:0] cwr_class = '0, pred_class;
  data_t cwr_val = '0;
  logic pred_valid, pred_ready = 1, busy;

  hdc_infer_top #(.D(D), .N_FEAT(NF), .N_CLASSES(NC), .N_CU(NCU), .PIPE_DEPTH(2)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  data_t basis [D][NF];
  turn_t bias [D];
  data_t cls [NC][D];
  data_t feats [NV][NF];
  int expected [NV];
  bit clear_win [NV];
  int n_pred = 0, n_checked = 0, pipe_full = 0, cu_stall = 0, load_done = 0;
  bit hold = 0;

  always @(negedge clk) pred_ready <= !hold;
  // after the second prediction the consumer stops for 400 cycles
  initial begin
    wait (n_pred == 2);
    hold = 1;
    repeat (400) @(posedge clk);
    hold = 0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCU; c++) begin
      if (!dut.cu_ready[c]) pipe_full++;
    end
    if (!dut.g_cu[0].u_cu.feat_ready && !dut.g_cu[0].u_cu.issue) cu_stall++;
    if (pred_valid && pred_ready) begin
      if (n_pred == 0) begin
        checks++;
        if (cycle - load_done < SLICE * NF || cycle - load_done > SLICE * NF + 45) begin
          failures++; $display("first prediction after %0d cycles", cycle - load_done);
        end
      end
      if (clear_win[n_pred]) begin
        checks++; n_checked++;
        if (int'(pred_class) != expected[n_pred]) begin
          failures++; $display("input %0d: predicted %0d expected %0d", n_pred, pred_class,
                               expected[n_pred]);
        end
      end
      n_pred++;
    end
  end

  initial begin
    for (int d = 0; d < D; d++) begin
      bias[d] = $urandom;
      for (int k = 0; k < NF; k++) basis[d][k] = rand_unit();
    end
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) cls[j][d] = rand_unit() >>> 1;
    for (int v = 0; v < NV; v++) begin
      real sc [NC];
      real h, best, second;
      for (int k = 0; k < NF; k++) feats[v][k] = rand_pixel() <<< 1;
      for (int j = 0; j < NC; j++) sc[j] = 0.0;
      for (int d = 0; d < D; d++) begin
        real dot;
        dot = 0.0;
        for (int k = 0; k < NF; k++) dot += q2r(basis[d][k]) * q2r(feats[v][k]);
        h = encode_ref(dot, bias[d]);
        for (int j = 0; j < NC; j++) sc[j] += h * q2r(cls[j][d]);
      end
      expected[v] = 0;
      for (int j = 1; j < NC; j++) if (sc[j] > sc[expected[v]]) expected[v] = j;
      second = -1e9;
      for (int j = 0; j < NC; j++) if (j != expected[v] && sc[j] > second) second = sc[j];
      clear_win[v] = (sc[expected[v]] - second > 0.01);
    end
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
      for (int j = 0; j < NC; j++) begin
        @(negedge clk);
        bias_wr_valid = 0;
        cwr_valid = 1; cwr_class = CLS_W'(j); cwr_dim = DIM_W'(d); cwr_val = cls[j][d];
      end
      @(negedge clk);
      cwr_valid = 0;
    end
    for (int v = 0; v < NV; v++) begin
      for (int k = 0; k < NF; k++) begin
        @(negedge clk);
        feat_valid = 1; feat_data = feats[v][k];
        while (!feat_ready) @(negedge clk);
        @(posedge clk);
        if (v == 0 && k == NF - 1) load_done = cycle;
      end
      @(negedge clk);
      feat_valid = 0;
    end
    while (n_pred < NV) @(negedge clk);
    checks++;
    if (pipe_full == 0 || cu_stall == 0) begin
      failures++; $display("no back-pressure seen: pipe full %0d, CU stall %0d", pipe_full, cu_stall);
    end
    checks++;
    if (n_checked < NV / 2) begin failures++; $display("only %0d clear predictions", n_checked); end
    $display("pipe-full cycles %0d, CU stall cycles %0d, predictions checked %0d", pipe_full,
             cu_stall, n_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
