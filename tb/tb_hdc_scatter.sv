// tb_hdc_scatter: self-checking test of the broadcast block. Sends 200
// words while four receivers accept at random moments; every receiver
// must get every word exactly once and in order, and with all receivers
// always ready one word must move per cycle.
module tb_hdc_scatter;
  import hdc_pkg::*;
  localparam int N = 4, NW = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready;
  data_t in_data = '0, out_data;
  logic [N-1:0] out_valid, out_ready = '0;
  hdc_scatter #(.N_OUT(N)) dut (.*);

  int checks = 0, failures = 0;
  data_t words [NW];
  int got [N];
  bit random_ready = 1;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (out_valid[i] && out_ready[i]) begin
      checks++;
      if (out_data != words[got[i]]) begin
        failures++; $display("out %0d word %0d: %h expected %h", i, got[i], out_data, words[got[i]]);
      end
      got[i]++;
    end
  end
  always @(negedge clk) out_ready <= random_ready ? N'($urandom) : '1;

  initial begin
    int sent, t0;
    for (int i = 0; i < NW; i++) words[i] = data_t'($urandom);
    for (int i = 0; i < N; i++) got[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    sent = 0;
    while (sent < NW) begin
      if (sent == NW / 2) begin
        random_ready = 0;
        t0 = sent;
      end
      in_valid <= 1; in_data <= words[sent];
      @(posedge clk);
      if (in_ready) sent++;
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != NW) begin failures++; $display("out %0d got %0d words", i, got[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Throughput: with every receiver ready, the scatter never holds off.
  always @(posedge clk) if (rst_n && !random_ready && in_valid && $past(!random_ready)) begin
    checks++;
    if (!in_ready) begin failures++; $display("stall with all receivers ready"); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
