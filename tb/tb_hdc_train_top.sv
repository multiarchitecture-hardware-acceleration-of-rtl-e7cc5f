// tb_hdc_train_top: end-to-end test of the single-pass training design at
// reduced size (D = 8, N_FEAT = 6, 3 classes, 2 compute units). Loads
// random basis vectors and biases, clears the classes, streams 9 labelled
// random feature vectors, reads the classes back and compares every
// element with the sum, over the inputs of that class, of
// cos(B.F+b)*sin(B.F) computed here in real arithmetic (tolerance 1e-3
// per bundled input). Checks the bundled count and that the fitting
// kernel had to wait for a label at least once.
module tb_hdc_train_top;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int D = 8, NF = 6, NC = 3, NCU = 2, NV = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic feat_valid = 0, feat_ready, lbl_valid = 0, lbl_ready;
  data_t feat_data = '0;
  logic [CLS_W-1:0] lbl_data = '0, cls_class;
  logic bwr_valid = 0, bias_wr_valid = 0, cmd_clear = 0, cmd_read = 0;
  basis_wr_t bwr = '0;
  logic [DIM_W-1:0] bias_wr_dim = '0, cls_dim;
  turn_t bias_wr_val = '0;
  logic cls_valid, cls_ready = 1, busy;
  data_t cls_val;
  logic [31:0] n_bundled;

  hdc_train_top #(.D(D), .N_FEAT(NF), .N_CLASSES(NC), .N_CU(NCU)) dut (.*);

  int checks = 0, failures = 0;
  data_t basis [D][NF];
  turn_t bias [D];
  data_t feats [NV][NF];
  int lbl [NV];
  real expect_cls [NC][D];
  int count [NC];
  int n_out = 0, lbl_wait = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.h_valid && !dut.h_ready && !dut.u_fit.have_lbl) lbl_wait++;
    if (cls_valid && cls_ready) begin
      int c, d;
      c = int'(cls_class); d = int'(cls_dim);
      checks++;
      if (c * D + d != n_out || absr(q2r(cls_val) - expect_cls[c][d]) > 1e-3 * (count[c] + 1)) begin
        failures++; $display("class %0d dim %0d: %f expected %f", c, d, q2r(cls_val),
                             expect_cls[c][d]);
      end
      n_out++;
    end
  end

  initial begin
    for (int d = 0; d < D; d++) begin
      bias[d] = $urandom;
      for (int k = 0; k < NF; k++) basis[d][k] = rand_unit();
    end
    for (int c = 0; c < NC; c++) begin
      count[c] = 0;
      for (int d = 0; d < D; d++) expect_cls[c][d] = 0.0;
    end
    for (int v = 0; v < NV; v++) begin
      lbl[v] = $urandom % NC;
      count[lbl[v]]++;
      for (int k = 0; k < NF; k++) feats[v][k] = rand_pixel() <<< 1;
      for (int d = 0; d < D; d++) begin
        real dot;
        dot = 0.0;
        for (int k = 0; k < NF; k++) dot += q2r(basis[d][k]) * q2r(feats[v][k]);
        expect_cls[lbl[v]][d] += encode_ref(dot, bias[d]);
      end
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
      @(negedge clk);
      bias_wr_valid = 0;
    end
    cmd_clear = 1; @(negedge clk); cmd_clear = 0;
    while (busy) @(negedge clk);
    fork
      for (int v = 0; v < NV; v++) begin
        for (int k = 0; k < NF; k++) begin
          @(negedge clk);
          feat_valid = 1; feat_data = feats[v][k];
          while (!feat_ready) @(negedge clk);
          @(posedge clk);
        end
        @(negedge clk);
        feat_valid = 0;
      end
      for (int v = 0; v < NV; v++) begin
        // labels arrive late for the first input
        repeat ((v == 0) ? 80 : 1) @(negedge clk);
        lbl_valid = 1; lbl_data = CLS_W'(lbl[v]);
        while (!lbl_ready) @(negedge clk);
        @(posedge clk);
        @(negedge clk);
        lbl_valid = 0;
      end
    join
    while (n_bundled != 32'(NV)) @(negedge clk);
    checks++;
    if (lbl_wait == 0) begin failures++; $display("never waited for a label"); end
    cmd_read = 1; @(negedge clk); cmd_read = 0;
    while (busy) @(negedge clk);
    checks++;
    if (n_out != NC * D) begin failures++; $display("read %0d words", n_out); end
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
