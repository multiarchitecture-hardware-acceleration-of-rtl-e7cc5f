// hdc_fit_sp: fitting kernel of the single-pass training design. Each
// encoded hypervector H arrives element by element together with (before
// its first element) the label l of its input; the kernel bundles H into
// the class hypervector of that label, C_l = C_l + H.
// How it works: all class hypervectors sit in one on-chip memory addressed
// {class, dimension}. Each element costs a read in one cycle and the
// write-back of the sum in the next, pipelined so one element is taken per
// cycle. Read-out moves one word every two cycles. A label is taken from
// the label stream when a hypervector starts
// and released after its last element. Two commands serve the host:
// `clear` zeroes the whole class memory (N_CLASSES*D cycles) before
// training, and `read` streams every class element out, class by class,
// after training, so that the host can normalise the classes.
// Interface: element stream (valid/ready, hv_elem_t, last), label stream
// (valid/ready), clear/read pulses, class output stream (valid/ready;
// class, dim, Q16.16 value), busy, count of bundled hypervectors.
// Bundling by element-wise addition and the read-out to the host follow
// the reference architecture; Q16.16 sums (no saturation: 32767 inputs of
// |h| <= 1 fit) and the command interface are this design's.
module hdc_fit_sp
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
  input  logic             lbl_valid,
  output logic             lbl_ready,
  input  logic [CLS_W-1:0] lbl_data,
  input  logic             cmd_clear,
  input  logic             cmd_read,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [CLS_W-1:0] out_class,
  output logic [DIM_W-1:0] out_dim,
  output data_t            out_val,
  output logic             busy,
  output logic [31:0]      n_bundled
);
  localparam int M   = N_CLASSES * D;
  localparam int A_W = $clog2(M);

  data_t cmem [M];

  typedef enum logic [1:0] {S_TRAIN, S_CLEAR, S_READ} state_t;
  state_t           state;
  logic [A_W-1:0]   addr;          // clear / read address
  logic [CLS_W-1:0] rd_cls;
  logic [DIM_W-1:0] rd_dim;
  logic             have_lbl;
  logic [CLS_W-1:0] cur_lbl;
  logic             take;

  // ---------------- training path ----------------
  assign lbl_ready = (state == S_TRAIN) && !have_lbl;
  assign in_ready  = (state == S_TRAIN) && have_lbl && !cmd_clear && !cmd_read;
  assign take      = in_valid && in_ready;

  logic           s1_valid;
  logic [A_W-1:0] s1_addr;
  data_t          s1_old, s1_h;

  always_ff @(posedge clk) begin
    s1_addr <= A_W'(cur_lbl) * A_W'(D) + A_W'(in_elem.dim);
    s1_old  <= cmem[A_W'(cur_lbl) * A_W'(D) + A_W'(in_elem.dim)];
    s1_h    <= in_elem.val;
  end

  // ---------------- read-out path ----------------
  logic  rd_valid;          // out register holds a word
  data_t rd_word;
  always_ff @(posedge clk) rd_word <= cmem[addr];

  always_ff @(posedge clk) begin
    if (s1_valid)
      cmem[s1_addr] <= s1_old + s1_h;
    else if (state == S_CLEAR)
      cmem[addr] <= '0;
  end

  // The output register is loaded one cycle after its address is issued.
  logic             issue_rd, rd_pend;
  logic [CLS_W-1:0] pend_cls;
  logic [DIM_W-1:0] pend_dim;
  assign issue_rd = (state == S_READ) && !rd_pend && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_TRAIN;
      addr      <= '0;
      have_lbl  <= 1'b0;
      cur_lbl   <= '0;
      s1_valid  <= 1'b0;
      rd_pend   <= 1'b0;
      rd_valid  <= 1'b0;
      rd_cls    <= '0;
      rd_dim    <= '0;
      pend_cls  <= '0;
      pend_dim  <= '0;
      out_class <= '0;
      out_dim   <= '0;
      n_bundled <= '0;
    end else begin
      s1_valid <= take;
      if (lbl_valid && lbl_ready) begin
        have_lbl <= 1'b1;
        cur_lbl  <= lbl_data;
      end
      if (take && in_last) begin
        have_lbl  <= 1'b0;
        n_bundled <= n_bundled + 1;
      end
      if (out_valid && out_ready) rd_valid <= 1'b0;
      rd_pend <= issue_rd;
      if (issue_rd) begin
        pend_cls <= rd_cls;
        pend_dim <= rd_dim;
      end
      if (rd_pend) begin
        rd_valid  <= 1'b1;
        out_class <= pend_cls;
        out_dim   <= pend_dim;
      end
      unique case (state)
        S_TRAIN: begin
          addr   <= '0;
          rd_cls <= '0;
          rd_dim <= '0;
          if (cmd_clear) begin
            state     <= S_CLEAR;
            n_bundled <= '0;
          end else if (cmd_read) state <= S_READ;
        end
        S_CLEAR: begin
          // a write-back still in flight takes the memory port first
          if (!s1_valid) begin
            addr <= addr + 1'b1;
            if (addr == A_W'(M - 1)) state <= S_TRAIN;
          end
        end
        S_READ: begin
          if (issue_rd) begin
            addr <= addr + 1'b1;
            if (rd_dim == DIM_W'(D - 1)) begin
              rd_dim <= '0;
              rd_cls <= rd_cls + 1'b1;
            end else begin
              rd_dim <= rd_dim + 1'b1;
            end
            if (addr == A_W'(M - 1)) state <= S_TRAIN;
          end
        end
        default: state <= S_TRAIN;
      endcase
    end
  end

  assign out_valid = rd_valid;
  always_ff @(posedge clk) if (rd_pend) out_val <= rd_word;

  assign busy = (state != S_TRAIN) || rd_pend || rd_valid || s1_valid;

  initial assert (D >= 2) else $error("hdc_fit_sp: D must be at least 2");
endmodule
