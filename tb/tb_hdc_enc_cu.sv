// tb_hdc_enc_cu: self-checking test of one encoding compute unit
// (D_SLICE = 5 dimensions starting at global dimension 8, N_FEAT = 16).
// Loads random basis values in [-1, 1) and random biases, including
// writes to dimensions outside the slice that must be ignored, then
// encodes four random feature vectors. Each output element is compared
// with cos(B.F + b) * sin(B.F) computed in real arithmetic (tolerance
// 1e-3). With the consumer always ready, the elements of the first vector
// must come out exactly N_FEAT cycles apart (one product per cycle) and
// the first one within the expected latency; later vectors run with a
// randomly stalling consumer.
module tb_hdc_enc_cu;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int DS = 5, BASE = 8, NF = 16, NVEC = 4, ITER = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic feat_valid = 0, feat_ready;
  data_t feat_data = '0;
  logic bwr_valid = 0, bias_wr_valid = 0;
  basis_wr_t bwr = '0;
  logic [DIM_W-1:0] bias_wr_dim = '0;
  turn_t bias_wr_val = '0;
  logic out_valid, out_ready = 1, busy;
  hv_elem_t out_elem;

  hdc_enc_cu #(.D_SLICE(DS), .BASE_DIM(BASE), .N_FEAT(NF), .ITER(ITER)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  data_t basis [DS][NF];
  turn_t bias [DS];
  data_t feats [NVEC][NF];
  int n_out = 0, last_out_cycle = -1, load_done_cycle = 0, stalls = 0;
  bit random_ready = 0;

  always @(negedge clk) out_ready <= (random_ready && n_out >= DS) ? ($urandom % 3 == 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      int v, d;
      real dot, e;
      v = n_out / DS;
      d = n_out % DS;
      dot = 0.0;
      for (int k = 0; k < NF; k++) dot += q2r(basis[d][k]) * q2r(feats[v][k]);
      e = encode_ref(dot, bias[d]);
      checks++;
      if (out_elem.dim != DIM_W'(BASE + d) || absr(q2r(out_elem.val) - e) > 1e-3) begin
        failures++;
        $display("vec %0d dim %0d: got dim %0d val %f, expected %f", v, d, out_elem.dim,
                 q2r(out_elem.val), e);
      end
      if (v == 0) begin
        checks++;
        if (d == 0) begin
          // load ends, then N_FEAT products, then the trig pipeline
          if (cycle - load_done_cycle > NF + ITER + 8 || cycle - load_done_cycle < NF) begin
            failures++; $display("first result after %0d cycles", cycle - load_done_cycle);
          end
        end else if (cycle - last_out_cycle != NF) begin
          failures++; $display("results %0d cycles apart at %0t", cycle - last_out_cycle, $time);
        end
      end
      last_out_cycle = cycle;
      n_out++;
      if (n_out == NVEC * DS) begin
        checks++;
        if (stalls == 0) begin failures++; $display("consumer never stalled"); end
        repeat (3) @(posedge clk);
        checks++;
        if (busy) begin failures++; $display("busy after the last result"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    for (int d = 0; d < DS; d++) begin
      bias[d] = $urandom;
      for (int k = 0; k < NF; k++) basis[d][k] = rand_unit();
    end
    for (int v = 0; v < NVEC; v++)
      for (int k = 0; k < NF; k++) feats[v][k] = rand_pixel() <<< 1;   // [0, 2)
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load: global dims 0..19; only 8..12 belong to this unit
    for (int g = 0; g < 20; g++) begin
      for (int k = 0; k < NF; k++) begin
        bwr_valid <= 1;
        bwr.dim <= DIM_W'(g); bwr.feat <= FEAT_W'(k);
        bwr.val <= (g >= BASE && g < BASE + DS) ? basis[g-BASE][k] : 32'sh7fff_0000;
        @(posedge clk);
      end
      bwr_valid <= 0;
      bias_wr_valid <= 1; bias_wr_dim <= DIM_W'(g);
      bias_wr_val <= (g >= BASE && g < BASE + DS) ? bias[g-BASE] : 32'h1234_5678;
      @(posedge clk);
      bias_wr_valid <= 0;
    end
    for (int v = 0; v < NVEC; v++) begin
      if (v == 1) random_ready = 1;
      for (int k = 0; k < NF; k++) begin
        @(negedge clk);
        feat_valid = 1; feat_data = feats[v][k];
        while (!feat_ready) @(negedge clk);
        @(posedge clk);
      end
      if (v == 0) load_done_cycle = cycle;
      @(negedge clk);
      feat_valid = 0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: %0d results", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
