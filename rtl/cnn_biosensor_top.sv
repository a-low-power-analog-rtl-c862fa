// Analog-digital hybrid CNN for a 32x32 biosensor: chip top.
//
// Three parts, as on the chip:
//   aissc      digital controller: scans the biosensor through the analog
//              front end into the input feature map and talks to the host
//              GUI over a 108-bit-frame serial link;
//   ainc       AI neuromorphic controller: runs the two convolution, two
//              max-pooling and the fully connected layers, keeps the feature
//              maps, and picks the class;
//   analog_pim the 16x4 10T SRAM processor-in-memory filter that performs
//              every multiply-and-average of the network.
// The biosensor and its analog front end (TIA, VGA, 16-bit ADC) are outside
// this RTL: their select lines, conversion handshake and code are ports.
//
// Ports: clk (32 MHz in the published chip), active-low asynchronous reset,
// the 4-wire host link, the sensor interface, and the result (class_out,
// valid while done is high) for direct observation.
module cnn_biosensor_top
  import pim_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // host link (GUI through the measurement FPGA)
  input  logic            ss_n,
  input  logic            sck,
  input  logic            sdi,
  output logic            sdo,
  // biosensor analog front end
  output logic            sns_en,
  output logic [IMG-1:0]  row_sel,
  output logic [IMG-1:0]  col_sel,
  output logic            sns_soc,
  input  logic            sns_eoc,
  input  logic [15:0]     sns_data,
  // result
  output logic            done,
  output logic [3:0]      class_out
);
  logic                         ai_start, ai_mode, ai_busy;
  acc_t                         scores [N_CLASS];
  logic [N_ROW-1:0][DATA_W-1:0] conv_out;
  logic [N_COL-1:0][DATA_W-1:0] pim_x;
  logic [N_ROW-1:0][N_COL-1:0]  pim_w;
  logic                         wm_we, bm_we, ifm_we;
  logic [WM_AW-1:0]             wm_addr;
  logic [N_ROW-1:0][N_COL-1:0]  wm_wdata;
  logic [BM_AW-1:0]             bm_addr;
  bias_t                        bm_wdata;
  logic [FM_AW-1:0]             ifm_addr, fm_raddr;
  word_t                        ifm_wdata, fm_rdata;
  logic [1:0]                   fm_rsel;

  logic                         sr_en, sr_clr, sr_wen, sr_den, sr_soc, sr_cal, sr_eoc, sr_busy;
  logic [N_ROW-1:0][N_COL-1:0]  sr_w;
  logic [N_COL-1:0][DATA_W-1:0] sr_data;
  logic [N_ROW-1:0][DATA_W-1:0] sr_yout, adc_offset;

  aissc u_aissc (
    .clk, .rst_n, .ss_n, .sck, .sdi, .sdo,
    .sns_en, .row_sel, .col_sel, .sns_soc, .sns_eoc, .sns_data,
    .ai_start, .ai_mode, .ai_busy, .ai_done(done), .ai_class(class_out),
    .ai_scores(scores), .ai_conv(conv_out), .pim_x, .pim_w,
    .wm_we, .wm_addr, .wm_wdata, .bm_we, .bm_addr, .bm_wdata,
    .ifm_we, .ifm_addr, .ifm_wdata, .fm_rsel, .fm_raddr, .fm_rdata,
    .pim_offset(adc_offset)
  );

  ainc u_ainc (
    .clk, .rst_n, .start(ai_start), .mode(ai_mode), .busy(ai_busy), .done,
    .class_out, .scores, .conv_out, .pim_x, .pim_w,
    .wm_we, .wm_addr, .wm_wdata, .bm_we, .bm_addr, .bm_wdata,
    .ifm_we, .ifm_addr, .ifm_wdata, .fm_rsel, .fm_raddr, .fm_rdata,
    .sr_en, .sr_clr, .sr_wen, .sr_den, .sr_soc, .sr_cal, .sr_w, .sr_data,
    .sr_yout, .sr_eoc, .sr_busy
  );

  analog_pim u_pim (
    .clk, .rst_n, .sr_en, .sr_clr, .sr_wen, .sr_den, .sr_soc, .sr_cal,
    .w(sr_w), .data(sr_data), .yout(sr_yout), .sr_eoc, .sr_busy, .adc_offset
  );
endmodule
