// tb_hdc_classify: self-checking test of the classification kernel
// (D = 16, 4 classes). Loads random class vectors, then sends 30
// hypervectors whose elements arrive in a random order with random gaps,
// and takes predictions with a randomly stalling consumer. Each prediction
// is compared with the argmax of exact integer dot products computed here;
// the prediction latency after the last element is checked as well.
module tb_hdc_classify;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int D = 16, NC = 4, NV = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_last = 0;
  hv_elem_t in_elem = '0;
  logic cwr_valid = 0;
  logic [CLS_W-1:0] cwr_class = '0;
  logic [DIM_W-1:0] cwr_dim = '0;
  data_t cwr_val = '0;
  logic pred_valid, pred_ready = 0;
  logic [CLS_W-1:0] pred_class;

  hdc_classify #(.D(D), .N_CLASSES(NC)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  data_t cls [NC][D];
  data_t hv [NV][D];
  int expected [NV];
  int n_pred = 0, stalls = 0, last_cycle [NV];
  bit first_pred_prompt = 0;

  always @(negedge clk) pred_ready <= (n_pred == 0) ? 1'b1 : ($urandom % 3 == 0);

  always @(posedge clk) if (rst_n) begin
    if (pred_valid && !pred_ready) stalls++;
    if (pred_valid && pred_ready) begin
      checks++;
      if (int'(pred_class) != expected[n_pred]) begin
        failures++; $display("hv %0d: predicted %0d expected %0d", n_pred, pred_class, expected[n_pred]);
      end
      if (n_pred == 0) begin
        checks++;
        if (cycle - last_cycle[0] != 3) begin
          failures++; $display("prediction %0d cycles after the last element", cycle - last_cycle[0]);
        end
      end
      n_pred++;
      if (n_pred == NV) begin
        checks++;
        if (stalls == 0) begin failures++; $display("no output stall"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    for (int j = 0; j < NC; j++) for (int i = 0; i < D; i++) cls[j][i] = rand_unit();
    for (int v = 0; v < NV; v++) begin
      longint best, s;
      for (int i = 0; i < D; i++) hv[v][i] = rand_unit();
      expected[v] = 0;
      for (int j = 0; j < NC; j++) begin
        s = 0;
        for (int i = 0; i < D; i++) s += longint'(hv[v][i]) * longint'(cls[j][i]);
        if (j == 0 || s > best) begin best = s; expected[v] = j; end
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < NC; j++) for (int i = 0; i < D; i++) begin
      @(negedge clk);
      cwr_valid = 1; cwr_class = CLS_W'(j); cwr_dim = DIM_W'(i); cwr_val = cls[j][i];
    end
    @(negedge clk);
    cwr_valid = 0;
    for (int v = 0; v < NV; v++) begin
      int order [D];
      for (int i = 0; i < D; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < D; i++) begin
        while ($urandom % 3 == 0) @(negedge clk);
        in_valid = 1; in_elem.dim = DIM_W'(order[i]); in_elem.val = hv[v][order[i]];
        in_last = (i == D - 1);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        last_cycle[v] = cycle;
        @(negedge clk);
        in_valid = 0; in_last = 0;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
