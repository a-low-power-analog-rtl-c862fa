// Main controller of the analog PIM filter.
//
// It runs one PIM operation as the sequence DAC -> SRAM -> ADC -> refresh and
// keeps every other part switched off, so each block draws current only
// while it works:
//   1. sr_wen / sr_den from the AI controller are forwarded as WEN (weight
//      update of the SRAM array) and DEN (input data into the DAC
//      controllers) while the PIM is enabled and not converting.
//   2. sr_soc starts an operation: PEN_DAC charges the bitlines until every
//      DAC controller reports EOC_DAC.
//   3. PEN_SRAM runs the MAV operation until EOC_SRAM.
//   4. PEN_ADC runs the four ADCs until all four EOC_ADC are high.
//   5. EOC to the AI controller for one cycle, then RST_DAC, RST_SRAM and
//      RST_ADC together for REFRESH_CYC cycles discharge the analog nodes.
// The order of steps 2 to 4 and the EOC handshakes are as published; the
// one-cycle EOC pulse and the refresh length are this design's choices.
// The refresh resets also stay high while the PIM is idle or disabled.
// sr_clr aborts any operation and returns to idle. sr_cal is forwarded to the
// ADCs as their calibration flag for the operation it starts with.
module pim_main_ctrl #(
  parameter int unsigned N_DAC       = 16,
  parameter int unsigned N_ADC       = 4,
  parameter int unsigned REFRESH_CYC = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // AI controller side
  input  logic             pen_main,
  input  logic             sr_clr,
  input  logic             sr_wen,
  input  logic             sr_den,
  input  logic             sr_soc,
  input  logic             sr_cal,
  output logic             eoc,
  output logic             busy,
  // sub-controllers
  output logic             wen,
  output logic             den,
  output logic             pen_dac,
  output logic             rst_dac,
  input  logic [N_DAC-1:0] eoc_dac,
  output logic             pen_sram,
  output logic             rst_sram,
  input  logic             eoc_sram,
  output logic             pen_adc,
  output logic             rst_adc,
  output logic             adc_cal,
  input  logic [N_ADC-1:0] eoc_adc
);
  typedef enum logic [2:0] {M_IDLE, M_DAC, M_SRAM, M_ADC, M_EOC, M_REFRESH} state_e;
  state_e state_q;

  localparam int unsigned RW = $clog2(REFRESH_CYC + 1);
  logic [RW-1:0] rcnt_q;

  assign busy     = (state_q != M_IDLE);
  assign wen      = pen_main && sr_wen && (state_q == M_IDLE || state_q == M_REFRESH);
  assign den      = pen_main && sr_den && (state_q == M_IDLE || state_q == M_REFRESH);
  assign pen_dac  = (state_q == M_DAC) || (state_q == M_SRAM) || (state_q == M_ADC);
  assign pen_sram = (state_q == M_SRAM) || (state_q == M_ADC);
  assign pen_adc  = (state_q == M_ADC);
  assign eoc      = (state_q == M_EOC);
  assign rst_dac  = (state_q == M_IDLE) || (state_q == M_REFRESH);
  assign rst_sram = rst_dac;
  assign rst_adc  = rst_dac;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= M_IDLE;
      rcnt_q  <= '0;
      adc_cal <= 1'b0;
    end else if (sr_clr || !pen_main) begin
      state_q <= M_IDLE;
      rcnt_q  <= '0;
    end else begin
      unique case (state_q)
        M_IDLE: if (sr_soc) begin
          state_q <= M_DAC;
          adc_cal <= sr_cal;
        end
        M_DAC:  if (&eoc_dac)  state_q <= M_SRAM;
        M_SRAM: if (eoc_sram)  state_q <= M_ADC;
        M_ADC:  if (&eoc_adc)  state_q <= M_EOC;
        M_EOC: begin
          state_q <= M_REFRESH;
          rcnt_q  <= '0;
        end
        M_REFRESH: begin
          rcnt_q <= rcnt_q + 1'b1;
          if (rcnt_q == RW'(REFRESH_CYC - 1)) state_q <= M_IDLE;
        end
        default: state_q <= M_IDLE;
      endcase
    end
  end

  // A start request is only meaningful when the PIM is idle.
  a_soc_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (pen_main && sr_soc) |-> (state_q == M_IDLE));
endmodule
