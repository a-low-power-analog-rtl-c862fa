// SRAM array controller of the analog PIM filter.
//
// After the DACs have charged the bitlines, the main controller raises
// pen_sram. The controller then drives the read wordline of one filter row
// at a time for SHARE_CYC cycles; while a row's read wordline is high its
// MAV cells share charge with the bitlines selected by the stored weights and
// settle at the average of Equation (1). After the last row it raises
// eoc_sram, held until rst_sram (refresh) or pen_sram falls.
//
// Row-by-row operation follows the description of MAV "using one row at a
// time"; the number of settling cycles per row is this design's choice.
// Timing: eoc_sram rises ROWS*SHARE_CYC cycles after pen_sram rises.
module sram_ctrl #(
  parameter int unsigned ROWS      = 4,
  parameter int unsigned SHARE_CYC = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pen_sram,
  input  logic            rst_sram,
  output logic [ROWS-1:0] rwl,
  output logic            eoc_sram
);
  localparam int unsigned TOTAL = ROWS * SHARE_CYC;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned SW = (SHARE_CYC > 1) ? $clog2(SHARE_CYC) : 1;

  logic [CW-1:0] cnt_q;     // cycles of MAV done so far
  logic [RW-1:0] row_q;     // row whose read wordline is on
  logic [SW-1:0] sub_q;     // cycle within the row
  logic          active;

  assign active   = pen_sram && !rst_sram && (cnt_q != CW'(TOTAL));
  assign eoc_sram = pen_sram && !rst_sram && (cnt_q == CW'(TOTAL));

  always_comb begin
    rwl = '0;
    if (active) rwl[row_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      row_q <= '0;
      sub_q <= '0;
    end else if (rst_sram || !pen_sram) begin
      cnt_q <= '0;
      row_q <= '0;
      sub_q <= '0;
    end else if (active) begin
      cnt_q <= cnt_q + 1'b1;
      if (sub_q == SW'(SHARE_CYC - 1)) begin
        sub_q <= '0;
        row_q <= row_q + 1'b1;
      end else begin
        sub_q <= sub_q + 1'b1;
      end
    end
  end
endmodule
