// 2x2 max-pooling unit for the four feature-map channels.
//
// The four values of one pooling window arrive one per cycle on `din`, one
// lane per channel (all four channel memories are read in parallel). With
// `first` high the lane takes the value, otherwise it keeps the larger of
// the stored and the new value; after the fourth value `max` holds the
// window maximum. Registers update at the rising edge when `en` is high.
module max_pool
  import pim_pkg::*;
#(
  parameter int unsigned LANES = N_CH,
  parameter int unsigned W     = DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic [LANES-1:0][W-1:0] din,
  output logic [LANES-1:0][W-1:0] max
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max <= '0;
    end else if (en) begin
      for (int k = 0; k < int'(LANES); k++)
        if (first || din[k] > max[k]) max[k] <= din[k];
    end
  end
endmodule
