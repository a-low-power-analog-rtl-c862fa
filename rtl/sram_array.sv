// 16x4 10T SRAM weight array of the analog PIM filter (digital storage part).
//
// Each of the four rows holds one 4x4 filter as 16 one-bit weights; cell
// (k,i) multiplies column i's bitline voltage by weight bit W[k][i] inside
// the analog MAV operation. This module is the write path and the stored
// contents: a write enable `wen` copies all 64 bits at once from `wdata`
// (the weight update from the AI controller), and `cells` shows what is
// stored, which the analog core reads through the read wordlines.
// Keeping the weights stored between operations is what lets one weight
// load serve every window of a convolution layer.
//
// Timing: written at the rising clock edge on which `wen` is high, visible on
// `cells` from the next cycle. Reset clears all cells (a choice of this
// design).
module sram_array
  import pim_pkg::*;
#(
  parameter int unsigned ROWS = N_ROW,
  parameter int unsigned COLS = N_COL
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wen,
  input  logic [ROWS-1:0][COLS-1:0] wdata,
  output logic [ROWS-1:0][COLS-1:0] cells
);
  logic [ROWS-1:0][COLS-1:0] mem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   mem_q <= '0;
    else if (wen) mem_q <= wdata;
  end

  assign cells = mem_q;
endmodule
