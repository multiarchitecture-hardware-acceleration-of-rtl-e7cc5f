// hdc_scatter: sends every word of the input feature stream to all N_OUT
// encoder compute units (each CU needs the whole feature vector, since it
// encodes its own slice of dimensions from all features).
// How it works: an eager fork. One word is held in a register together
// with a mask of the outputs that have not taken it yet; each output sees
// valid while its mask bit is set and clears the bit on its handshake.
// A new word is accepted once every output has its copy, in the same
// cycle as the last copy is taken, so a stream with all outputs ready moves
// one word per cycle. Outputs need not accept in the same cycle.
// Interface: valid/ready input of Q16.16 words; N_OUT valid/ready outputs
// sharing one data bus. Latency: one cycle.
// Broadcasting the inputs to the compute units follows the reference
// architecture; the fork structure is this design's choice.
module hdc_scatter
  import hdc_pkg::*;
#(
  parameter int N_OUT = 25
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  data_t            in_data,
  output logic [N_OUT-1:0] out_valid,
  input  logic [N_OUT-1:0] out_ready,
  output data_t            out_data
);
  logic [N_OUT-1:0] pending, pending_after;

  assign out_valid     = pending;
  assign pending_after = pending & ~out_ready;
  assign in_ready      = (pending_after == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else if (in_valid && in_ready) pending <= '1;
    else                           pending <= pending_after;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) out_data <= in_data;
  end
endmodule
