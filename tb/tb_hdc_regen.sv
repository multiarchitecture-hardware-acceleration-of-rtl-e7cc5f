// tb_hdc_regen: self-checking test of the dimension regeneration unit
// (N_FEAT = 8, N_DROP = 3). Sends the dimensions 5, 2 and 7 with gaps and
// captures every basis, bias and class-zero write. The values must equal
// those of an xorshift32 generator run here from the same seed (basis
// values: low 17 bits as a signed Q16.16 number), the writes must name the
// right dimension and feature, each dimension must take N_FEAT+1 cycles,
// and `done` must pulse once, after the third dimension.
module tb_hdc_regen;
  import hdc_pkg::*;
  import hdc_tb_pkg::*;
  localparam int NF = 8, ND = 3;
  localparam logic [31:0] SEED = 32'h2545_F491;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic drop_valid = 0, drop_ready;
  logic [DIM_W-1:0] drop_dim = '0;
  logic bwr_valid, bias_wr_valid, zero_valid, busy, done;
  basis_wr_t bwr;
  logic [DIM_W-1:0] bias_wr_dim, zero_dim;
  turn_t bias_wr_val;

  hdc_regen #(.N_FEAT(NF), .N_DROP(ND), .SEED(SEED)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int dims [ND] = '{5, 2, 7};
  logic [31:0] rng = SEED;
  int n_basis = 0, n_bias = 0, n_zero = 0, n_done = 0, start_cycle = 0;

  always @(posedge clk) if (rst_n) begin
    if (bwr_valid) begin
      checks++;
      if (int'(bwr.dim) != dims[n_basis / NF] || int'(bwr.feat) != n_basis % NF ||
          bwr.val != data_t'($signed(rng[16:0]))) begin
        failures++; $display("basis write %0d: dim %0d feat %0d val %h", n_basis, bwr.dim,
                             bwr.feat, bwr.val);
      end
      rng = xorshift32(rng);
      n_basis++;
    end
    if (bias_wr_valid) begin
      checks++;
      if (int'(bias_wr_dim) != dims[n_bias] || bias_wr_val != rng) begin
        failures++; $display("bias write %0d wrong", n_bias);
      end
      checks++;
      if (n_bias == 0 && cycle - start_cycle != NF + 2) begin
        failures++; $display("first dimension took %0d cycles", cycle - start_cycle);
      end
      rng = xorshift32(rng);
      n_bias++;
    end
    if (zero_valid) begin
      checks++;
      if (int'(zero_dim) != dims[n_zero]) begin failures++; $display("zero write wrong"); end
      n_zero++;
    end
    if (done) begin
      checks++;
      if (n_zero != ND) begin failures++; $display("done after %0d dims", n_zero); end
      n_done++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < ND; i++) begin
      repeat (i) @(negedge clk);
      @(negedge clk);
      drop_valid = 1; drop_dim = DIM_W'(dims[i]);
      while (!drop_ready) @(negedge clk);
      @(posedge clk);
      if (i == 0) start_cycle = cycle;
      @(negedge clk);
      drop_valid = 0;
    end
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (n_basis != ND * NF || n_bias != ND || n_zero != ND || n_done != 1) begin
      failures++; $display("counts: basis %0d bias %0d zero %0d done %0d", n_basis, n_bias,
                           n_zero, n_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
