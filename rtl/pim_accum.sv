// Accumulator, bias and ReLU stage behind the PIM filter (the
// "convolution + ReLU" and fully-connected arithmetic of the AI controller).
//
// A 4x4 kernel over one input channel is one PIM operation; a layer with
// several input channels (conv2) or a fully connected neuron with more than
// 16 inputs needs several operations, whose four YOUT results are summed
// here lane by lane. Each lane then adds its signed bias (the "+1" parameter
// of every filter) and gives
//   sum[k] = acc[k] + bias[k]                      (signed, FC scores)
//   act[k] = min(max(sum[k], 0), 2**W-1)           (ReLU, feature-map word)
// Interface: `clr` empties the accumulators, `add` adds `yin` (clr wins);
// both act at the rising edge; sum/act follow the registers combinationally.
module pim_accum
  import pim_pkg::*;
#(
  parameter int unsigned LANES = N_ROW,
  parameter int unsigned W     = DATA_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   add,
  input  logic [LANES-1:0][W-1:0] yin,
  input  bias_t                  bias [LANES],
  output acc_t                   sum  [LANES],
  output logic [LANES-1:0][W-1:0] act
);
  localparam acc_t WMAX = acc_t'((1 << W) - 1);

  acc_t acc_q [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(LANES); k++) acc_q[k] <= '0;
    end else begin
      for (int k = 0; k < int'(LANES); k++) begin
        if (clr)      acc_q[k] <= '0;
        else if (add) acc_q[k] <= acc_q[k] + acc_t'({1'b0, yin[k]});
      end
    end
  end

  always_comb begin
    for (int k = 0; k < int'(LANES); k++) begin
      sum[k] = acc_q[k] + acc_t'(bias[k]);
      if (sum[k] < 0)         act[k] = '0;
      else if (sum[k] > WMAX) act[k] = '1;
      else                    act[k] = sum[k][W-1:0];
    end
  end
endmodule
