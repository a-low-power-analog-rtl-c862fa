// Output controller: picks the disease class from the fully connected
// layer's scores.
//
// The output layer is a softmax over N class scores; since softmax keeps the
// order of its inputs, the class with the highest probability is the one
// with the largest score, so the hardware only needs an arg-max. Ties go to
// the lower class index (this design's choice). Combinational; the caller
// registers the result when the scores are complete.
module output_ctrl
  import pim_pkg::*;
#(
  parameter int unsigned N  = N_CLASS,
  parameter int unsigned CW = $clog2(N)
) (
  input  acc_t          scores [N],
  output logic [CW-1:0] class_idx,
  output acc_t          class_score
);
  always_comb begin
    class_idx   = '0;
    class_score = scores[0];
    for (int j = 1; j < int'(N); j++) begin
      if (scores[j] > class_score) begin
        class_idx   = CW'(j);
        class_score = scores[j];
      end
    end
  end
endmodule
