// Analog processor-in-memory (PIM) filter: the 4x4 filter bank that performs
// the convolution multiply-and-average of the CNN.
//
// One operation takes 16 input words DATA[15:0] (one 4x4 window) and returns
// for each of the four stored filters k
//     YOUT[k] = ceil( sum_i W[k][i] * DATA[i] / 16 )                 (MAV)
// computed in the charge domain (DATA clipped to the 8-bit ramp, 255 steps,
// and corrected by the ADC offset calibration). Weights are 1 bit per 10T
// SRAM cell and stay stored between operations.
//
// Structure: a main controller sequences sixteen DAC controllers, the SRAM
// array controller and four ADC controllers; the SRAM array holds the
// weights; the analog DAC/MAV/ADC circuitry is a behavioural model.
//
// AI-controller interface (all synchronous):
//   sr_en   enable of the whole PIM (low: everything off and reset).
//   sr_clr  abort and clear.
//   sr_wen  one-cycle weight update from `w`; sr_den one-cycle data load
//           from `data`; both while the PIM is not converting.
//   sr_soc  one-cycle start; sr_cal marks a calibration operation (inputs
//           must be zero, results are stored as ADC offsets).
//   sr_eoc  one-cycle end of conversion; `yout` is valid from then until
//           the next operation ends.
//   adc_offset  the offsets measured by the last calibration (observation).
// Latency from sr_soc to sr_eoc is about max(DATA)+1 DAC cycles, 16 MAV
// cycles and max(YOUT)+3 ADC cycles, at most about 530 cycles; the refresh
// after it takes 4 more cycles before the next start is accepted.
module analog_pim
  import pim_pkg::*;
#(
  parameter int unsigned SHARE_CYC   = 4,
  parameter int unsigned REFRESH_CYC = 4,
  parameter int unsigned OFF0 = 21,
  parameter int unsigned OFF1 = 40,
  parameter int unsigned OFF2 = 9,
  parameter int unsigned OFF3 = 30
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        sr_en,
  input  logic                        sr_clr,
  input  logic                        sr_wen,
  input  logic                        sr_den,
  input  logic                        sr_soc,
  input  logic                        sr_cal,
  input  logic [N_ROW-1:0][N_COL-1:0] w,
  input  logic [N_COL-1:0][DATA_W-1:0] data,
  output logic [N_ROW-1:0][DATA_W-1:0] yout,
  output logic                        sr_eoc,
  output logic                        sr_busy,
  output logic [N_ROW-1:0][DATA_W-1:0] adc_offset
);
  logic                        wen, den;
  logic                        pen_dac, rst_dac, pen_sram, rst_sram, pen_adc, rst_adc, adc_cal;
  logic [N_COL-1:0]            eoc_dac, dac_pulse;
  logic                        eoc_sram;
  logic [N_ROW-1:0]            eoc_adc, chg_pulse, bias, cmp, rwl;
  logic [N_ROW-1:0][N_COL-1:0] cells;

  pim_main_ctrl #(.N_DAC(N_COL), .N_ADC(N_ROW), .REFRESH_CYC(REFRESH_CYC)) u_main (
    .clk, .rst_n,
    .pen_main(sr_en), .sr_clr, .sr_wen, .sr_den, .sr_soc, .sr_cal,
    .eoc(sr_eoc), .busy(sr_busy),
    .wen, .den, .pen_dac, .rst_dac, .eoc_dac,
    .pen_sram, .rst_sram, .eoc_sram,
    .pen_adc, .rst_adc, .adc_cal, .eoc_adc
  );

  for (genvar i = 0; i < N_COL; i++) begin : g_dac
    dac_ctrl #(.DATA_W(DATA_W), .RES_BITS(RES_BITS)) u_dac (
      .clk, .rst_n, .den, .data(data[i]), .pen_dac, .rst_dac,
      .dac_pulse(dac_pulse[i]), .eoc_dac(eoc_dac[i])
    );
  end

  sram_array #(.ROWS(N_ROW), .COLS(N_COL)) u_sram (
    .clk, .rst_n, .wen, .wdata(w), .cells
  );

  sram_ctrl #(.ROWS(N_ROW), .SHARE_CYC(SHARE_CYC)) u_sram_ctrl (
    .clk, .rst_n, .pen_sram, .rst_sram, .rwl, .eoc_sram
  );

  for (genvar k = 0; k < N_ROW; k++) begin : g_adc
    adc_ctrl #(.DATA_W(DATA_W), .RES_BITS(RES_BITS)) u_adc (
      .clk, .rst_n, .pen_adc, .rst_adc, .cal(adc_cal), .cmp(cmp[k]),
      .bias(bias[k]), .chg_pulse(chg_pulse[k]), .eoc_adc(eoc_adc[k]),
      .yout(yout[k]), .offset(adc_offset[k])
    );
  end

  pim_analog_core #(.ROWS(N_ROW), .COLS(N_COL),
                    .OFF0(OFF0), .OFF1(OFF1), .OFF2(OFF2), .OFF3(OFF3)) u_core (
    .clk, .dac_pulse, .rst_dac, .w(cells), .rwl, .rst_sram,
    .chg_pulse, .bias, .rst_adc, .cmp
  );
endmodule
