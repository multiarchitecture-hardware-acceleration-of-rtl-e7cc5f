// hdc_gather: pieces the partial hypervectors produced by N_IN encoder
// compute units together into one hypervector stream, D = N_IN * SLICE
// elements per input vector, marking the last element of each hypervector.
// How it works: every input carries hv_elem_t words tagged with their
// global dimension, so the order of elements does not matter to the
// consumer. A round-robin arbiter picks one input per cycle among those
// that are valid and have not yet delivered their SLICE elements of the
// current hypervector; the per-input counters stop a fast CU from mixing
// elements of the next hypervector into the current one. When all D
// elements have passed, the counters clear and `out_last` was high on the
// final one.
// Interface: N_IN valid/ready inputs, one valid/ready output (elem, last).
// Combinational path from inputs to output; one element per cycle.
// Collecting the parts of all CUs into one hypervector follows the
// reference architecture; arbitration and counters are this design's.
module hdc_gather
  import hdc_pkg::*;
#(
  parameter int N_IN  = 25,
  parameter int SLICE = 80
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] in_valid,
  output logic [N_IN-1:0] in_ready,
  input  hv_elem_t        in_elem [N_IN],
  output logic            out_valid,
  input  logic            out_ready,
  output hv_elem_t        out_elem,
  output logic            out_last
);
  localparam int D    = N_IN * SLICE;
  localparam int SEL_W = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int CNT_W = $clog2(SLICE + 1);
  localparam int TOT_W = $clog2(D + 1);

  logic [CNT_W-1:0] cnt [N_IN];
  logic [TOT_W-1:0] total;
  logic [N_IN-1:0]  eligible;
  logic [SEL_W-1:0] rr, sel;
  logic             found, take;

  always_comb begin
    for (int i = 0; i < N_IN; i++)
      eligible[i] = in_valid[i] && (cnt[i] != CNT_W'(SLICE));
  end

  // Round robin: first eligible input at or after rr.
  always_comb begin
    int idx;
    sel   = '0;
    found = 1'b0;
    for (int o = 0; o < N_IN; o++) begin
      idx = int'(rr) + o;
      if (idx >= N_IN) idx -= N_IN;
      if (!found && eligible[idx]) begin
        found = 1'b1;
        sel   = SEL_W'(idx);
      end
    end
  end

  assign out_valid = found;
  assign out_elem  = in_elem[sel];
  assign out_last  = (total == TOT_W'(D - 1));
  assign take      = found && out_ready;

  always_comb begin
    in_ready = '0;
    if (take) in_ready[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) cnt[i] <= '0;
      total <= '0;
      rr    <= '0;
    end else if (take) begin
      rr <= (sel == SEL_W'(N_IN - 1)) ? '0 : sel + 1'b1;
      if (out_last) begin
        for (int i = 0; i < N_IN; i++) cnt[i] <= '0;
        total <= '0;
      end else begin
        cnt[sel] <= cnt[sel] + 1'b1;
        total    <= total + 1'b1;
      end
    end
  end
endmodule
