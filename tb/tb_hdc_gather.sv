// tb_hdc_gather: self-checking test of the partial-hypervector gather.
// Three producers each send their four dimensions of 20 hypervectors at
// random moments, running ahead of each other into later hypervectors;
// the consumer is randomly not ready. Every group of 12 output elements
// must hold each dimension exactly once, all from the same hypervector,
// with `out_last` on the twelfth only.
module tb_hdc_gather;
  import hdc_pkg::*;
  localparam int N = 3, SLICE = 4, D = N * SLICE, NV = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] in_valid = '0, in_ready;
  hv_elem_t in_elem [N];
  logic out_valid, out_ready = 0, out_last;
  hv_elem_t out_elem;
  hdc_gather #(.N_IN(N), .SLICE(SLICE)) dut (.*);

  int checks = 0, failures = 0;
  int pos [N];          // elements sent by each producer
  int n_out = 0, ahead = 0;
  bit seen [D];

  // producers
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && in_ready[i]) pos[i]++;
    end
  end
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      in_valid[i]     <= (pos[i] < NV * SLICE) && ($urandom % 3 != 0);
      in_elem[i].dim  <= DIM_W'(i * SLICE + pos[i] % SLICE);
      in_elem[i].val  <= data_t'((pos[i] / SLICE) * 1000 + i * SLICE + pos[i] % SLICE);
    end
    out_ready <= ($urandom % 4 != 0);
    // a producer that is a whole hypervector ahead of another
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      if (pos[i] / SLICE > pos[j] / SLICE) ahead++;
  end

  // consumer
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int v, d;
    v = n_out / D;
    d = int'(out_elem.dim);
    checks++;
    if (d >= D || seen[d] || out_elem.val != data_t'(v * 1000 + d)) begin
      failures++; $display("hv %0d: bad element dim %0d val %0d", v, d, out_elem.val);
    end
    if (d < D) seen[d] = 1;
    checks++;
    if (out_last != (n_out % D == D - 1)) begin
      failures++; $display("last flag wrong at element %0d", n_out);
    end
    if (n_out % D == D - 1) for (int k = 0; k < D; k++) seen[k] = 0;
    n_out++;
    if (n_out == NV * D) begin
      checks++;
      if (ahead == 0) begin failures++; $display("producers never ran ahead"); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) pos[i] = 0;
    for (int k = 0; k < D; k++) seen[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: %0d elements", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
