// hdc_argmax: combinational argmax over N similarity scores (signed
// Q32.32 sums of products). The lowest index wins a tie. A linear scan,
// which is enough for the ten classes of the model.
module hdc_argmax
  import hdc_pkg::*;
#(
  parameter int N = N_CLASSES_DEF
) (
  input  acc_t             score [N],
  output logic [CLS_W-1:0] idx,
  output acc_t             best
);
  always_comb begin
    idx  = '0;
    best = score[0];
    for (int j = 1; j < N; j++) begin
      if (score[j] > best) begin
        best = score[j];
        idx  = CLS_W'(j);
      end
    end
  end
endmodule
