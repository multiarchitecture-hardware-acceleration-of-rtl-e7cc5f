// hdc_cordic: pipelined sine/cosine unit used by the encoder to evaluate
// h = cos(B.F + b) * sin(B.F).
// The angle is an unsigned 32-bit fraction of a full turn, so any angle is
// already reduced modulo 2*pi. The top two bits select the quadrant; the
// remaining quarter-turn is rotated by ITER CORDIC micro-rotations in
// rotation mode, starting from x = K (the CORDIC gain correction), y = 0.
// The quadrant is then folded back in by swapping and negating x and y.
// Outputs are Q16.16 and accurate to a few LSB.
// Timing: one angle per cycle (initiation interval 1), result after
// ITER+2 cycles; a tag of TAG_W bits travels with each angle.
// The reference architecture only names a cosine/sine function; CORDIC is
// this design's choice.
module hdc_cordic
  import hdc_pkg::*;
#(
  parameter int ITER  = 24,
  parameter int TAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  turn_t            in_angle,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output data_t            out_cos,
  output data_t            out_sin,
  output logic [TAG_W-1:0] out_tag
);
  localparam int W = 36;   // x, y: Q5.30 internal; z: turns * 2^32

  // atan(2^-i) / (2*pi) * 2^32, i = 0..23.
  localparam logic [31:0] ATAN [24] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81};
  // prod(1/sqrt(1+2^-2i)) in Q.30.
  localparam logic signed [W-1:0] K_GAIN = W'(652032874);

  logic signed [W-1:0] x [ITER+1];
  logic signed [W-1:0] y [ITER+1];
  logic signed [W-1:0] z [ITER+1];
  logic [1:0]          q [ITER+1];
  logic [TAG_W-1:0]    t [ITER+1];
  logic                v [ITER+1];

  // Stage 0: split quadrant and residual angle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end
  always_ff @(posedge clk) begin
    x[0] <= K_GAIN;
    y[0] <= '0;
    z[0] <= W'({2'b00, in_angle[29:0]});
    q[0] <= in_angle[31:30];
    t[0] <= in_tag;
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[i+1] <= 1'b0;
      else        v[i+1] <= v[i];
    end
    always_ff @(posedge clk) begin
      if (!z[i][W-1]) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - W'(ATAN[i]);
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + W'(ATAN[i]);
      end
      q[i+1] <= q[i];
      t[i+1] <= t[i];
    end
  end

  // Output stage: round Q.30 to Q16.16 and apply the quadrant.
  logic signed [W-1:0] xr, yr;
  assign xr = (x[ITER] + W'(1 << 13)) >>> 14;
  assign yr = (y[ITER] + W'(1 << 13)) >>> 14;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v[ITER];
  end
  always_ff @(posedge clk) begin
    out_tag <= t[ITER];
    unique case (q[ITER])
      2'd0: begin out_cos <= data_t'(xr);  out_sin <= data_t'(yr);  end
      2'd1: begin out_cos <= -data_t'(yr); out_sin <= data_t'(xr);  end
      2'd2: begin out_cos <= -data_t'(xr); out_sin <= -data_t'(yr); end
      default: begin out_cos <= data_t'(yr); out_sin <= -data_t'(xr); end
    endcase
  end

  initial begin
    assert (ITER <= 24) else $error("hdc_cordic: ITER above the atan table size");
  end
endmodule
