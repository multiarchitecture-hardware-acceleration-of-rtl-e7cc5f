// hdc_enc_cu: one encoding compute unit. It owns a contiguous slice of
// D_SLICE hyperdimensions, starting at global dimension BASE_DIM, and turns
// each input feature vector F into those elements of the hypervector H:
//     h_i = cos(B_i . F + b_i) * sin(B_i . F)      (RBF-style encoding)
// How it works: the feature vector is first copied into a local buffer
// (N_FEAT cycles, one feature per cycle). Then a single multiply-accumulate
// unit walks the slice's basis memory one product per cycle, dimension by
// dimension, so B_i . F takes N_FEAT cycles (initiation interval 1). Each
// finished dot product is converted to turns (x / 2*pi, modulo 1) and sent
// with its bias b_i to two pipelined CORDIC units (sine of B.F, cosine of
// B.F + b); their product is written into a small result FIFO. A credit
// count keeps at most OUT_BUF dimensions in flight, so the CU stalls,
// rather than drops data, when the downstream pipe is full.
// Interface: feature stream (valid/ready, Q16.16 words, N_FEAT per
// vector); basis and bias write ports addressed by global dimension (the
// CU ignores dimensions outside its slice; writes are meant for idle
// periods); output stream of hv_elem_t (global dimension, Q16.16 value).
// Timing: a vector takes N_FEAT + D_SLICE*N_FEAT cycles plus about
// ITER+5 cycles of pipeline latency; the next vector can be loaded while
// the last results drain.
// The encoding formula, the per-dimension split across compute units and
// the stored basis follow the reference architecture; fixed point, CORDIC,
// bias stored as a turn fraction and the credit scheme are this design's.
module hdc_enc_cu
  import hdc_pkg::*;
#(
  parameter int D_SLICE  = 80,
  parameter int BASE_DIM = 0,
  parameter int N_FEAT   = N_FEAT_DEF,
  parameter int OUT_BUF  = 4,
  parameter int ITER     = 24
) (
  input  logic      clk,
  input  logic      rst_n,
  // feature stream
  input  logic      feat_valid,
  output logic      feat_ready,
  input  data_t     feat_data,
  // basis / bias writes (global dimension index)
  input  logic      bwr_valid,
  input  basis_wr_t bwr,
  input  logic      bias_wr_valid,
  input  logic [DIM_W-1:0] bias_wr_dim,
  input  turn_t     bias_wr_val,
  // encoded elements
  output logic      out_valid,
  input  logic      out_ready,
  output hv_elem_t  out_elem,
  output logic      busy
);
  localparam int MEM_N = D_SLICE * N_FEAT;
  localparam int MA_W  = (MEM_N > 1) ? $clog2(MEM_N) : 1;
  localparam int LD_W  = (D_SLICE > 1) ? $clog2(D_SLICE) : 1;
  localparam int K_W   = (N_FEAT > 1) ? $clog2(N_FEAT) : 1;
  localparam int CR_W  = $clog2(OUT_BUF + 1);

  data_t basis [MEM_N];
  turn_t bias  [D_SLICE];
  data_t fbuf  [N_FEAT];

  // ---------------- basis / bias write ports ----------------
  logic [DIM_W-1:0] bwr_local, bias_local;
  assign bwr_local  = bwr.dim - DIM_W'(BASE_DIM);
  assign bias_local = bias_wr_dim - DIM_W'(BASE_DIM);

  always_ff @(posedge clk) begin
    if (bwr_valid && bwr.dim >= DIM_W'(BASE_DIM) && bwr_local < DIM_W'(D_SLICE)
        && bwr.feat < FEAT_W'(N_FEAT))
      basis[MA_W'(bwr_local) * MA_W'(N_FEAT) + MA_W'(bwr.feat)] <= bwr.val;
    if (bias_wr_valid && bias_wr_dim >= DIM_W'(BASE_DIM)
        && bias_local < DIM_W'(D_SLICE))
      bias[LD_W'(bias_local)] <= bias_wr_val;
  end

  // ---------------- control: load, then run ----------------
  typedef enum logic {S_LOAD, S_RUN} state_t;
  state_t           state;
  logic [K_W-1:0]   k;
  logic [LD_W-1:0]  d;
  logic [MA_W-1:0]  baddr;
  logic [CR_W-1:0]  credits_used;
  logic             issue, start_dim, pop;

  assign feat_ready = (state == S_LOAD);
  // A new dimension starts only if its result has room in the FIFO.
  assign start_dim  = (state == S_RUN) && (k == '0) && (credits_used < CR_W'(OUT_BUF));
  assign issue      = (state == S_RUN) && ((k != '0) || start_dim);
  assign pop        = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (feat_valid && feat_ready) fbuf[k] <= feat_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_LOAD;
      k            <= '0;
      d            <= '0;
      baddr        <= '0;
      credits_used <= '0;
    end else begin
      credits_used <= credits_used + CR_W'(start_dim) - CR_W'(pop);
      if (state == S_LOAD) begin
        if (feat_valid) begin
          if (k == K_W'(N_FEAT-1)) begin
            k     <= '0;
            d     <= '0;
            baddr <= '0;
            state <= S_RUN;
          end else begin
            k <= k + 1'b1;
          end
        end
      end else if (issue) begin
        baddr <= baddr + 1'b1;
        if (k == K_W'(N_FEAT-1)) begin
          k <= '0;
          if (d == LD_W'(D_SLICE-1)) state <= S_LOAD;
          else                       d <= d + 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

  // ---------------- stage 1: memory reads ----------------
  logic            p1_valid, p1_first, p1_last;
  logic [LD_W-1:0] p1_d;
  data_t           p1_b, p1_f;
  turn_t           p1_bias;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p1_valid <= 1'b0;
    else        p1_valid <= issue;
  end
  always_ff @(posedge clk) begin
    p1_b     <= basis[baddr];
    p1_f     <= fbuf[k];
    p1_bias  <= bias[d];
    p1_first <= (k == '0);
    p1_last  <= (k == K_W'(N_FEAT-1));
    p1_d     <= d;
  end

  // ---------------- stage 2: multiply-accumulate ----------------
  acc_t acc, acc_next;
  assign acc_next = (p1_first ? acc_t'(0) : acc) + acc_t'(p1_b) * acc_t'(p1_f);

  logic            tr_valid;
  acc_t            tr_acc;
  turn_t           tr_bias;
  logic [LD_W-1:0] tr_d;

  always_ff @(posedge clk) begin
    if (p1_valid) acc <= acc_next;
    tr_acc  <= acc_next;
    tr_bias <= p1_bias;
    tr_d    <= p1_d;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tr_valid <= 1'b0;
    else        tr_valid <= p1_valid && p1_last;
  end

  // ---------------- stage 3: sine and cosine ----------------
  turn_t            ang_s, ang_c;
  logic [DIM_W-1:0] tr_gdim;
  assign ang_s   = acc_to_turn(tr_acc);
  assign ang_c   = ang_s + tr_bias;
  assign tr_gdim = DIM_W'(tr_d) + DIM_W'(BASE_DIM);

  logic             cs_valid, cc_valid;
  data_t            s_cos, s_sin, c_cos, c_sin;
  logic [DIM_W-1:0] s_tag, c_tag;

  hdc_cordic #(.ITER(ITER), .TAG_W(DIM_W)) u_sin_path (
    .clk, .rst_n, .in_valid(tr_valid), .in_angle(ang_s), .in_tag(tr_gdim),
    .out_valid(cs_valid), .out_cos(s_cos), .out_sin(s_sin), .out_tag(s_tag));
  hdc_cordic #(.ITER(ITER), .TAG_W(DIM_W)) u_cos_path (
    .clk, .rst_n, .in_valid(tr_valid), .in_angle(ang_c), .in_tag(tr_gdim),
    .out_valid(cc_valid), .out_cos(c_cos), .out_sin(c_sin), .out_tag(c_tag));

  // ---------------- stage 4: product into the result FIFO ----------------
  hv_elem_t res;
  logic     res_ready;
  assign res.dim = s_tag;
  assign res.val = qmul(c_cos, s_sin);

  hdc_pipe #(.WIDTH($bits(hv_elem_t)), .DEPTH(OUT_BUF)) u_res (
    .clk, .rst_n,
    .in_valid(cs_valid), .in_ready(res_ready), .in_data(res),
    .out_valid, .out_ready, .out_data(out_elem));

  assign busy = (state == S_RUN) || (credits_used != '0);

  // The credit count guarantees the FIFO always has room.
  a_res_room: assert property (@(posedge clk) disable iff (!rst_n)
    cs_valid |-> res_ready);
  a_paths_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    cs_valid |-> (cc_valid && c_tag == s_tag));
endmodule
