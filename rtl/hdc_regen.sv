// hdc_regen: dimension regeneration of the NeuralHD training design.
// After each round of retraining the host picks the N_DROP dimensions
// whose class elements vary least across classes and sends their indices
// here. For every dropped dimension i this unit
//   - writes a fresh random basis vector B_i (N_FEAT values, one per
//     cycle) into the encoder's basis memory,
//   - writes a fresh random bias b_i (uniform over a full turn),
//   - zeroes element i of every class hypervector.
// The random numbers come from a 32-bit xorshift generator (x ^= x<<13,
// x ^= x>>17, x ^= x<<5) seeded with SEED at reset; a basis value is the
// low 17 bits of the state read as a signed Q16.16 number, i.e. uniform
// in [-1, 1). It accepts dimension indices until N_DROP have been
// regenerated, then raises `done` for one cycle and starts counting anew.
// Interface: drop stream (valid/ready, dimension), basis write, bias write
// and class zero outputs (one-cycle strobes), busy, done.
// Timing: N_FEAT + 1 cycles per dropped dimension.
// Dropping and regenerating 200 dimensions on the device follows the
// reference design; the generator and the uniform value distribution are
// this design's choices.
module hdc_regen
  import hdc_pkg::*;
#(
  parameter int N_FEAT = N_FEAT_DEF,
  parameter int N_DROP = 200,
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             drop_valid,
  output logic             drop_ready,
  input  logic [DIM_W-1:0] drop_dim,
  output logic             bwr_valid,
  output basis_wr_t        bwr,
  output logic             bias_wr_valid,
  output logic [DIM_W-1:0] bias_wr_dim,
  output turn_t            bias_wr_val,
  output logic             zero_valid,
  output logic [DIM_W-1:0] zero_dim,
  output logic             busy,
  output logic             done
);
  localparam int DC_W = $clog2(N_DROP + 1);

  function automatic logic [31:0] xorshift(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_BASIS, S_BIAS} state_t;
  state_t            state;
  logic [31:0]       rng;
  logic [DIM_W-1:0]  cur_dim;
  logic [FEAT_W-1:0] k;
  logic [DC_W-1:0]   n_done;

  assign drop_ready = (state == S_IDLE);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      rng           <= SEED;
      cur_dim       <= '0;
      k             <= '0;
      n_done        <= '0;
      bwr_valid     <= 1'b0;
      bwr           <= '0;
      bias_wr_valid <= 1'b0;
      bias_wr_dim   <= '0;
      bias_wr_val   <= '0;
      zero_valid    <= 1'b0;
      zero_dim      <= '0;
      done          <= 1'b0;
    end else begin
      bwr_valid     <= 1'b0;
      bias_wr_valid <= 1'b0;
      zero_valid    <= 1'b0;
      done          <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (drop_valid) begin
            cur_dim <= drop_dim;
            k       <= '0;
            state   <= S_BASIS;
          end
        end
        S_BASIS: begin
          rng       <= xorshift(rng);
          bwr_valid <= 1'b1;
          bwr.dim   <= cur_dim;
          bwr.feat  <= k;
          bwr.val   <= data_t'($signed(rng[16:0]));
          if (k == FEAT_W'(N_FEAT - 1)) state <= S_BIAS;
          else                          k <= k + 1'b1;
        end
        S_BIAS: begin
          rng           <= xorshift(rng);
          bias_wr_valid <= 1'b1;
          bias_wr_dim   <= cur_dim;
          bias_wr_val   <= rng;
          zero_valid    <= 1'b1;
          zero_dim      <= cur_dim;
          state         <= S_IDLE;
          if (n_done == DC_W'(N_DROP - 1)) begin
            n_done <= '0;
            done   <= 1'b1;
          end else begin
            n_done <= n_done + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
