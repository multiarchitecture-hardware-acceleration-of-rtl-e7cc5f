// tb_hdc_cordic: self-checking test of the pipelined sine/cosine unit.
// Drives one angle per cycle (corners of every quadrant plus random
// angles), checks each result against $cos/$sin within 4e-4, checks that
// tags come out in order and that the latency is ITER+2 register stages (ITER+3 counted from the cycle the angle is driven).
module tb_hdc_cordic;
  import hdc_pkg::*;
  localparam int ITER = 24;
  localparam int NV   = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  turn_t in_angle = '0;
  logic [15:0] in_tag = '0;
  logic out_valid;
  data_t out_cos, out_sin;
  logic [15:0] out_tag;

  hdc_cordic #(.ITER(ITER), .TAG_W(16)) dut (.*);

  int checks = 0, failures = 0;
  turn_t angles [NV];
  int sent_cycle [NV];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real to_real(data_t v);
    return real'(v) / 65536.0;
  endfunction

  initial begin
    for (int i = 0; i < NV; i++) begin
      if (i < 16) angles[i] = turn_t'(i) << 28;        // multiples of 1/16 turn
      else if (i < 24) angles[i] = (turn_t'(i-16) << 30) - 32'd1;
      else angles[i] = $urandom;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      in_valid <= 1; in_angle <= angles[i]; in_tag <= 16'(i);
      sent_cycle[i] = cycle;
      @(posedge clk);
    end
    in_valid <= 0;
  end

  int got = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    real th, ec, es;
    th = 2.0 * 3.14159265358979 * real'(angles[got]) / 4294967296.0;
    ec = $cos(th); es = $sin(th);
    checks++;
    if (out_tag != 16'(got)) begin failures++; $display("tag %0d != %0d", out_tag, got); end
    checks++;
    if ((to_real(out_cos) - ec > 4e-4) || (ec - to_real(out_cos) > 4e-4) ||
        (to_real(out_sin) - es > 4e-4) || (es - to_real(out_sin) > 4e-4)) begin
      failures++;
      $display("angle %h: cos %f (exp %f) sin %f (exp %f)", angles[got],
               to_real(out_cos), ec, to_real(out_sin), es);
    end
    checks++;
    if (cycle - sent_cycle[got] != ITER + 3) begin
      failures++; $display("latency %0d", cycle - sent_cycle[got]);
    end
    got++;
    if (got == NV) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (NV + 200) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d results", got, NV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
