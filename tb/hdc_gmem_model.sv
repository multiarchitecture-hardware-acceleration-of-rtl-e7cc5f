// hdc_gmem_model: behavioural model of the accelerator board's off-chip
// global memory, for simulation only. A write channel (valid/ready,
// address, data) and a read channel whose requests (valid/ready, address)
// are answered in order after LATENCY cycles. Both channels randomly
// refuse requests when STALL is set, to exercise back-pressure. Words are
// 32 bits; WORDS words are stored. While rst_n is low requests are
// ignored and responses in flight are dropped.
module hdc_gmem_model
  import hdc_pkg::*;
#(
  parameter int WORDS   = 1024,
  parameter int LATENCY = 4,
  parameter bit STALL   = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [31:0] wr_addr,
  input  data_t       wr_data,
  input  logic        rd_valid,
  output logic        rd_ready,
  input  logic [31:0] rd_addr,
  output logic        rsp_valid,
  output data_t       rsp_data
);
  data_t mem [WORDS];
  logic  v_pipe [LATENCY];
  data_t d_pipe [LATENCY];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    for (int i = 0; i < LATENCY; i++) v_pipe[i] = 1'b0;
    wr_ready = 1'b1;
    rd_ready = 1'b1;
  end

  // ready changes just after a rising edge and holds until the next one
  always @(posedge clk) begin
    wr_ready <= STALL ? ($urandom % 4 != 0) : 1'b1;
    rd_ready <= STALL ? ($urandom % 4 != 0) : 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      if (wr_addr < 32'(WORDS)) mem[wr_addr] <= wr_data;
      else $display("hdc_gmem_model: write address %0d out of range", wr_addr);
    end
    v_pipe[0] <= rst_n && rd_valid && rd_ready;
    d_pipe[0] <= (rd_addr < 32'(WORDS)) ? mem[rd_addr] : '0;
    for (int i = 1; i < LATENCY; i++) begin
      v_pipe[i] <= rst_n && v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
  end

  assign rsp_valid = v_pipe[LATENCY-1];
  assign rsp_data  = d_pipe[LATENCY-1];
endmodule
