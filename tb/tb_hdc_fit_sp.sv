// tb_hdc_fit_sp: self-checking test of the single-pass fitting kernel
// (D = 8, 3 classes). Fills the class memory with garbage through a first
// training round, clears it, bundles 12 labelled random hypervectors whose
// elements arrive in random order with gaps, then reads all classes back
// with a stalling consumer. Every class element must equal the sum of the
// hypervectors with that label; the bundled count and the read-out order
// (class by class, dimension by dimension) are checked too.
module tb_hdc_fit_sp;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int D = 8, NC = 3, NV = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_last = 0;
  hv_elem_t in_elem = '0;
  logic lbl_valid = 0, lbl_ready;
  logic [CLS_W-1:0] lbl_data = '0;
  logic cmd_clear = 0, cmd_read = 0;
  logic out_valid, out_ready = 0, busy;
  logic [CLS_W-1:0] out_class;
  logic [DIM_W-1:0] out_dim;
  data_t out_val;
  logic [31:0] n_bundled;

  hdc_fit_sp #(.D(D), .N_CLASSES(NC)) dut (.*);

  int checks = 0, failures = 0;
  data_t hv [NV][D];
  int lbl [NV];
  data_t expect_cls [NC][D];
  int n_out = 0;

  task automatic train(int nv);
    for (int v = 0; v < nv; v++) begin
      int order [D];
      @(negedge clk);
      lbl_valid = 1; lbl_data = CLS_W'(lbl[v]);
      while (!lbl_ready) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
      lbl_valid = 0;
      for (int i = 0; i < D; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < D; i++) begin
        if ($urandom % 3 == 0) @(negedge clk);
        in_valid = 1; in_elem.dim = DIM_W'(order[i]); in_elem.val = hv[v][order[i]];
        in_last = (i == D - 1);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        @(negedge clk);
        in_valid = 0; in_last = 0;
      end
    end
  endtask

  always @(negedge clk) out_ready <= ($urandom % 2 == 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int c, d;
    c = n_out / D; d = n_out % D;
    checks++;
    if (int'(out_class) != c || int'(out_dim) != d || out_val != expect_cls[c][d]) begin
      failures++;
      $display("read %0d: class %0d dim %0d val %0d, expected class %0d dim %0d val %0d",
               n_out, out_class, out_dim, out_val, c, d, expect_cls[c][d]);
    end
    n_out++;
  end

  initial begin
    for (int v = 0; v < NV; v++) begin
      lbl[v] = $urandom % NC;
      for (int i = 0; i < D; i++) hv[v][i] = rand_unit();
    end
    for (int c = 0; c < NC; c++) for (int i = 0; i < D; i++) expect_cls[c][i] = 0;
    for (int v = 0; v < NV; v++) for (int i = 0; i < D; i++)
      expect_cls[lbl[v]][i] += hv[v][i];
    repeat (2) @(posedge clk);
    rst_n = 1;
    train(3);                         // garbage that the clear must remove
    @(negedge clk); cmd_clear = 1; @(negedge clk); cmd_clear = 0;
    while (busy) @(negedge clk);
    train(NV);
    repeat (3) @(negedge clk);
    checks++;
    if (n_bundled != 32'(NV)) begin failures++; $display("bundled %0d", n_bundled); end
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
