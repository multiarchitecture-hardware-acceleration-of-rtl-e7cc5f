// tb_hdc_pipe: self-checking test of the inter-kernel FIFO. Random pushes
// and pops against a queue model: checks data and order, that in_ready
// drops exactly when DEPTH words are stored, and that out_valid matches
// the model's occupancy.
module tb_hdc_pipe;
  localparam int W = 20, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  hdc_pipe #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] model [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      // first phase fills the FIFO, second drains it, then random
      in_valid  = (c < 200) ? 1'($urandom % 4 != 0) : (c < 400) ? ($urandom % 4 == 0) : 1'($urandom % 2);
      out_ready = (c < 200) ? ($urandom % 4 == 0) : (c < 400) ? 1'b1 : 1'($urandom % 2);
      in_data   = W'($urandom);
      #1;
      checks++;
      if (in_ready != (model.size() < DEPTH)) begin
        failures++; $display("in_ready %0d with %0d stored", in_ready, model.size());
      end
      checks++;
      if (out_valid != (model.size() > 0)) begin
        failures++; $display("out_valid %0d with %0d stored", out_valid, model.size());
      end
      if (model.size() == DEPTH) n_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != model[0]) begin
          failures++; $display("data %h expected %h", out_data, model[0]);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready && model.size() > 0) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      #1;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
