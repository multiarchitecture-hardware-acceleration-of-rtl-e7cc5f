// hdc_nhd_fit: retraining (fitting) kernel of the NeuralHD training design.
// The encoded training hypervectors live in global (off-chip) memory,
// H_s at word addresses s*D .. s*D+D-1; their labels are kept on chip.
// For every iteration and every sample s with label l the kernel
//   1. fetches H_s (D reads, in order) into a local buffer while adding
//      h_i * C_j[i] into one Q32.32 accumulator per class j,
//   2. predicts l' = argmax_j (H_s . C_j),
//   3. if l' != l, walks the buffer once more and applies
//      C_l += alpha*H_s and C_l' -= alpha*H_s  (alpha = 0.037).
// An iteration ends after n_samples samples; the kernel stops after
// n_iters iterations, or earlier when an iteration predicted every sample
// correctly (convergence). Besides fitting it can clear the classes, zero
// one dimension in every class (for the regeneration of a dropped
// dimension) and stream all class elements out to the host.
// Memory: one on-chip array per class (all read at the same dimension
// during the fetch, two of them read and written during the update),
// a D-word hypervector buffer and a MAX_SAMPLES-entry label memory.
// Timing: fetch takes D cycles at one word per cycle plus the memory
// latency; an update takes D+1 cycles; read-out moves one word every two
// cycles.
// Interface: global-memory read request (valid/ready, address) and
// in-order response (valid, data; always accepted); label write port;
// commands: fit (with n_samples, n_iters), clear, read, zero_dim; class
// output stream; status counters.
// The update rule, alpha, the repeated iterations and the convergence exit
// follow the reference design; plain dot-product similarity (classes
// are not renormalised during the iterations), fixed point and the
// command interface are this design's choices.
module hdc_nhd_fit
  import hdc_pkg::*;
#(
  parameter int D           = D_DEF,
  parameter int N_CLASSES   = N_CLASSES_DEF,
  parameter int MAX_SAMPLES = 60000
) (
  input  logic             clk,
  input  logic             rst_n,
  // labels, written while the training set is encoded
  input  logic             lbl_wr_valid,
  input  logic [31:0]      lbl_wr_idx,
  input  logic [CLS_W-1:0] lbl_wr_val,
  // commands
  input  logic             cmd_fit,
  input  logic [31:0]      n_samples,
  input  logic [15:0]      n_iters,
  input  logic             cmd_clear,
  input  logic             cmd_read,
  input  logic             zero_valid,
  input  logic [DIM_W-1:0] zero_dim,
  // global memory read channel
  output logic             gm_rd_valid,
  input  logic             gm_rd_ready,
  output logic [31:0]      gm_rd_addr,
  input  logic             gm_rsp_valid,
  input  data_t            gm_rsp_data,
  // class read-out
  output logic             out_valid,
  input  logic             out_ready,
  output logic [CLS_W-1:0] out_class,
  output logic [DIM_W-1:0] out_dim,
  output data_t            out_val,
  // status
  output logic             busy,
  output logic [15:0]      iters_done,
  output logic [31:0]      n_correct,
  output logic [31:0]      n_updates,
  output logic             converged
);
  localparam int A_W  = (D > 1) ? $clog2(D) : 1;
  localparam int C_W  = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1;
  localparam int S_W  = (MAX_SAMPLES > 1) ? $clog2(MAX_SAMPLES) : 1;

  data_t            cmem   [N_CLASSES][D];
  data_t            hv_buf [D];
  logic [CLS_W-1:0] lbl_mem [MAX_SAMPLES];

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECIDE, S_UPDATE, S_NEXT, S_CLEAR, S_READ}
    state_t;
  state_t state;

  logic [31:0]      sample;
  logic [15:0]      iter;
  logic [31:0]      iter_correct;
  logic [A_W:0]     req_cnt, rsp_cnt, upd_cnt;
  logic [CLS_W-1:0] cur_lbl, pred_lbl;

  always_ff @(posedge clk) begin
    if (lbl_wr_valid && lbl_wr_idx < 32'(MAX_SAMPLES)) lbl_mem[S_W'(lbl_wr_idx)] <= lbl_wr_val;
  end

  // ---------------- fetch: requests ----------------
  assign gm_rd_valid = (state == S_FETCH) && (req_cnt != (A_W+1)'(D));
  assign gm_rd_addr  = sample * 32'(D) + 32'(req_cnt);

  // ---------------- fetch: responses -> buffer and MAC ----------------
  logic            m_valid;
  data_t           m_h;
  data_t           m_c [N_CLASSES];
  acc_t            acc [N_CLASSES];
  logic [CLS_W-1:0] best_idx;
  acc_t            best_val;

  always_ff @(posedge clk) begin
    m_h   <= gm_rsp_data;
    for (int j = 0; j < N_CLASSES; j++) m_c[j] <= cmem[j][A_W'(rsp_cnt)];
    if (gm_rsp_valid && state == S_FETCH) hv_buf[A_W'(rsp_cnt)] <= gm_rsp_data;
  end

  hdc_argmax #(.N(N_CLASSES)) u_argmax (.score(acc), .idx(best_idx), .best(best_val));

  // ---------------- update: read-modify-write pipeline ----------------
  logic           u_valid;
  logic [A_W-1:0] u_idx;
  data_t          u_h, u_cl, u_cp, u_ah;
  assign u_ah = qmul(ALPHA_Q16, u_h);

  always_ff @(posedge clk) begin
    u_idx <= A_W'(upd_cnt);
    u_h   <= hv_buf[A_W'(upd_cnt)];
    u_cl  <= cmem[C_W'(cur_lbl)][A_W'(upd_cnt)];
    u_cp  <= cmem[C_W'(pred_lbl)][A_W'(upd_cnt)];
  end

  // ---------------- read-out ----------------
  logic             issue_rd, rd_pend;
  logic [CLS_W-1:0] rd_cls, pend_cls;
  logic [A_W:0]     rd_dim;
  logic [DIM_W-1:0] pend_dim;
  data_t            rd_word;
  assign issue_rd = (state == S_READ) && !rd_pend && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    rd_word <= cmem[C_W'(rd_cls)][A_W'(rd_dim)];
    if (rd_pend) out_val <= rd_word;
  end

  // ---------------- class memory writes ----------------
  logic [A_W:0] clr_idx;
  always_ff @(posedge clk) begin
    if (u_valid) begin
      cmem[C_W'(cur_lbl)][u_idx]  <= u_cl + u_ah;
      cmem[C_W'(pred_lbl)][u_idx] <= u_cp - u_ah;
    end else if (state == S_CLEAR) begin
      for (int j = 0; j < N_CLASSES; j++) cmem[j][A_W'(clr_idx)] <= '0;
    end else if (zero_valid && state == S_IDLE) begin
      for (int j = 0; j < N_CLASSES; j++) cmem[j][A_W'(zero_dim)] <= '0;
    end
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      sample       <= '0;
      iter         <= '0;
      iter_correct <= '0;
      req_cnt      <= '0;
      rsp_cnt      <= '0;
      upd_cnt      <= '0;
      cur_lbl      <= '0;
      pred_lbl     <= '0;
      m_valid      <= 1'b0;
      u_valid      <= 1'b0;
      clr_idx      <= '0;
      rd_pend      <= 1'b0;
      rd_cls       <= '0;
      rd_dim       <= '0;
      pend_cls     <= '0;
      pend_dim     <= '0;
      out_valid    <= 1'b0;
      out_class    <= '0;
      out_dim      <= '0;
      iters_done   <= '0;
      n_correct    <= '0;
      n_updates    <= '0;
      converged    <= 1'b0;
      for (int j = 0; j < N_CLASSES; j++) acc[j] <= '0;
    end else begin
      m_valid <= gm_rsp_valid && (state == S_FETCH);
      u_valid <= (state == S_UPDATE) && (upd_cnt != (A_W+1)'(D));
      if (m_valid)
        for (int j = 0; j < N_CLASSES; j++) acc[j] <= acc[j] + acc_t'(m_h) * acc_t'(m_c[j]);

      // read-out handshake
      if (out_valid && out_ready) out_valid <= 1'b0;
      rd_pend <= issue_rd;
      if (issue_rd) begin
        pend_cls <= rd_cls;
        pend_dim <= DIM_W'(rd_dim);
      end
      if (rd_pend) begin
        out_valid <= 1'b1;
        out_class <= pend_cls;
        out_dim   <= pend_dim;
      end

      unique case (state)
        S_IDLE: begin
          if (cmd_fit) begin
            state        <= S_FETCH;
            sample       <= '0;
            iter         <= '0;
            iter_correct <= '0;
            req_cnt      <= '0;
            rsp_cnt      <= '0;
            cur_lbl      <= lbl_mem[0];
            converged    <= 1'b0;
            iters_done   <= '0;
            n_updates    <= '0;
            for (int j = 0; j < N_CLASSES; j++) acc[j] <= '0;
          end else if (cmd_clear) begin
            state   <= S_CLEAR;
            clr_idx <= '0;
          end else if (cmd_read) begin
            state  <= S_READ;
            rd_cls <= '0;
            rd_dim <= '0;
          end
        end
        S_FETCH: begin
          if (gm_rd_valid && gm_rd_ready) req_cnt <= req_cnt + 1'b1;
          if (gm_rsp_valid) rsp_cnt <= rsp_cnt + 1'b1;
          // the last product is accumulated in the cycle after m_valid
          if (rsp_cnt == (A_W+1)'(D) && !m_valid) state <= S_DECIDE;
        end
        S_DECIDE: begin
          pred_lbl <= best_idx;
          upd_cnt  <= '0;
          if (best_idx == cur_lbl) begin
            iter_correct <= iter_correct + 1;
            state        <= S_NEXT;
          end else begin
            n_updates <= n_updates + 1;
            state     <= S_UPDATE;
          end
        end
        S_UPDATE: begin
          if (upd_cnt != (A_W+1)'(D)) upd_cnt <= upd_cnt + 1'b1;
          else if (!u_valid)          state   <= S_NEXT;
        end
        S_NEXT: begin
          for (int j = 0; j < N_CLASSES; j++) acc[j] <= '0;
          req_cnt <= '0;
          rsp_cnt <= '0;
          if (sample + 1 == n_samples) begin
            // end of one iteration over the training set
            iters_done <= iter + 1'b1;
            n_correct  <= iter_correct;
            if (iter_correct == n_samples || iter + 1'b1 == n_iters) begin
              converged <= (iter_correct == n_samples);
              state     <= S_IDLE;
            end else begin
              iter         <= iter + 1'b1;
              iter_correct <= '0;
              sample       <= '0;
              cur_lbl      <= lbl_mem[0];
              state        <= S_FETCH;
            end
          end else begin
            sample  <= sample + 1;
            cur_lbl <= lbl_mem[S_W'(sample + 1)];
            state   <= S_FETCH;
          end
        end
        S_CLEAR: begin
          clr_idx <= clr_idx + 1'b1;
          if (clr_idx == (A_W+1)'(D - 1)) state <= S_IDLE;
        end
        S_READ: begin
          if (issue_rd) begin
            if (rd_dim == (A_W+1)'(D - 1)) begin
              rd_dim <= '0;
              rd_cls <= rd_cls + 1'b1;
              if (rd_cls == CLS_W'(N_CLASSES - 1)) state <= S_IDLE;
            end else begin
              rd_dim <= rd_dim + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) || rd_pend || out_valid;

  a_rsp_in_fetch: assert property (@(posedge clk) disable iff (!rst_n)
    gm_rsp_valid |-> state == S_FETCH);
endmodule
