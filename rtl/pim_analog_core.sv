// Behavioural model (not synthesizable circuitry) of the analog part of the
// PIM filter: the sixteen charge-sharing DAC voltage chargers on the global
// bitlines, the 10T SRAM cells' multiply-and-average (MAV) cells, the four
// ADC voltage chargers and the four comparators.
//
// Voltages are kept as integers in units of 1/16 of one charge step
// (one step is about 2.34 mV, 256 steps span 600 mV). Behaviour:
//   * each dac_pulse[i] raises bitline i by one step; rst_dac discharges it;
//   * while rwl[k] is high, row k's MAV node settles to
//       V_mav[k] = (1/16) * sum_i W[k][i] * V_BL[i]            (Equation 1)
//     i.e. series/parallel equal capacitors average the selected bitlines;
//     rst_sram discharges the MAV nodes;
//   * each chg_pulse[k] raises ADC charger k by one step; rst_adc discharges;
//   * cmp[k] = bias[k] and (V_chg[k] >= V_mav[k] + OFFSET_U[k]).
// OFFSET_U models the comparator/capacitor mismatch offset of each row, the
// error that the ADC calibration removes. Its default values are this
// design's choice, a few units so that uncalibrated results read 1 to 3
// codes high. All state changes on the rising clock edge.
module pim_analog_core
  import pim_pkg::*;
#(
  parameter int unsigned ROWS = N_ROW,
  parameter int unsigned COLS = N_COL,
  parameter int unsigned OFF0 = 21,
  parameter int unsigned OFF1 = 40,
  parameter int unsigned OFF2 = 9,
  parameter int unsigned OFF3 = 30
) (
  input  logic                      clk,
  input  logic [COLS-1:0]           dac_pulse,
  input  logic                      rst_dac,
  input  logic [ROWS-1:0][COLS-1:0] w,
  input  logic [ROWS-1:0]           rwl,
  input  logic                      rst_sram,
  input  logic [ROWS-1:0]           chg_pulse,
  input  logic [ROWS-1:0]           bias,
  input  logic                      rst_adc,
  output logic [ROWS-1:0]           cmp
);
  localparam int unsigned STEP_U = 16;

  int unsigned vbl  [COLS];
  int unsigned vmav [ROWS];
  int unsigned vchg [ROWS];

  function automatic int unsigned offset_of(int unsigned k);
    case (k % 4)
      0:       return OFF0;
      1:       return OFF1;
      2:       return OFF2;
      default: return OFF3;
    endcase
  endfunction

  initial begin
    foreach (vbl[i])  vbl[i]  = 0;
    foreach (vmav[k]) vmav[k] = 0;
    foreach (vchg[k]) vchg[k] = 0;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(COLS); i++) begin
      if (rst_dac)           vbl[i] <= 0;
      else if (dac_pulse[i]) vbl[i] <= vbl[i] + STEP_U;
    end
    for (int k = 0; k < int'(ROWS); k++) begin
      int unsigned s;
      s = 0;
      for (int i = 0; i < int'(COLS); i++) if (w[k][i]) s += vbl[i];
      if (rst_sram)    vmav[k] <= 0;
      else if (rwl[k]) vmav[k] <= s / COLS;
      if (rst_adc)           vchg[k] <= 0;
      else if (chg_pulse[k]) vchg[k] <= vchg[k] + STEP_U;
    end
  end

  always_comb begin
    for (int k = 0; k < int'(ROWS); k++)
      cmp[k] = bias[k] && (vchg[k] >= vmav[k] + offset_of(k));
  end
endmodule
