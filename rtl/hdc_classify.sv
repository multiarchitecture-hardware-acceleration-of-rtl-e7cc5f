// hdc_classify: classification kernel of the inference design. It takes
// the encoded hypervector H of one input, element by element, computes its
// similarity with every class hypervector C_j and emits the index of the
// most similar class (argmax_j delta(H, C_j)).
// How it works: the class hypervectors are held on chip, one memory per
// class, all addressed by the dimension of the incoming element, so each
// element is multiplied with all N_CLASSES class elements in the same
// cycle and added to N_CLASSES Q32.32 accumulators (one element per
// cycle, any dimension order). The class vectors are expected to be
// normalized to unit length by whoever loads them; then the dot product
// ranks classes exactly as the cosine similarity does, since |H| is common
// to all classes. After the element flagged `in_last`, the argmax of the
// accumulators is registered as the prediction and the accumulators clear.
// Interface: element stream (valid/ready, hv_elem_t, last); class write
// port (class, dim, Q16.16 value); prediction stream (valid/ready, class).
// Timing: prediction valid 3 cycles after the last element; input is held
// off from the last element until the prediction has been taken.
// Dot-product similarity on normalized classes follows the reference
// architecture; the memory organisation and handshakes are this design's.
module hdc_classify
  import hdc_pkg::*;
#(
  parameter int D         = D_DEF,
  parameter int N_CLASSES = N_CLASSES_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  hv_elem_t         in_elem,
  input  logic             in_last,
  // class memory load
  input  logic             cwr_valid,
  input  logic [CLS_W-1:0] cwr_class,
  input  logic [DIM_W-1:0] cwr_dim,
  input  data_t            cwr_val,
  // prediction
  output logic             pred_valid,
  input  logic             pred_ready,
  output logic [CLS_W-1:0] pred_class
);
  localparam int A_W = (D > 1) ? $clog2(D) : 1;
  localparam int C_W = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1;

  data_t cmem [N_CLASSES][D];

  always_ff @(posedge clk) begin
    if (cwr_valid && cwr_class < CLS_W'(N_CLASSES) && cwr_dim < DIM_W'(D))
      cmem[C_W'(cwr_class)][A_W'(cwr_dim)] <= cwr_val;
  end

  // Stage 1: read all classes at the element's dimension.
  logic  s1_valid, s1_last, finishing;
  data_t s1_h;
  data_t s1_c [N_CLASSES];
  logic  take;

  assign in_ready = !finishing && !pred_valid;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    s1_h <= in_elem.val;
    for (int j = 0; j < N_CLASSES; j++) s1_c[j] <= cmem[j][A_W'(in_elem.dim)];
  end

  // Stage 2: multiply-accumulate into all class accumulators.
  acc_t acc [N_CLASSES];
  logic s2_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_last   <= 1'b0;
      s2_last   <= 1'b0;
      finishing <= 1'b0;
      for (int j = 0; j < N_CLASSES; j++) acc[j] <= '0;
    end else begin
      s1_valid <= take;
      s1_last  <= take && in_last;
      s2_last  <= s1_valid && s1_last;
      if (take && in_last) finishing <= 1'b1;
      else if (s2_last)    finishing <= 1'b0;
      if (s2_last) begin
        for (int j = 0; j < N_CLASSES; j++) acc[j] <= '0;
      end else if (s1_valid) begin
        for (int j = 0; j < N_CLASSES; j++)
          acc[j] <= acc[j] + acc_t'(s1_h) * acc_t'(s1_c[j]);
      end
    end
  end

  // Stage 3: argmax into the prediction register.
  logic [CLS_W-1:0] best_idx;
  acc_t             best_val;
  hdc_argmax #(.N(N_CLASSES)) u_argmax (.score(acc), .idx(best_idx), .best(best_val));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_valid <= 1'b0;
      pred_class <= '0;
    end else begin
      if (s2_last) begin
        pred_valid <= 1'b1;
        pred_class <= best_idx;
      end else if (pred_ready) begin
        pred_valid <= 1'b0;
      end
    end
  end

  a_pred_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pred_valid && !pred_ready |=> pred_valid && $stable(pred_class));
endmodule
