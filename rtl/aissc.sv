// AI smart sensing controller (AISSC): the digital controller between the
// biosensor front end, the host link and the AI neuromorphic controller.
//
// It holds the AI main controller (aimc, sensor scan into the input
// feature map) and the communication slave (comm_slave, 108-bit frames),
// and decodes the host frames into control actions and memory writes:
//   FID 0 CTRL    FDATA[0] start CNN/PIM run, [1] start sensor scan,
//                 [2] mode (0 CNN, 1 single PIM test), [3] run CNN after scan
//   FID 1 WEIGHT  FDATA[68:64] word address, [63:0] filters F4..F1 (16 bits each)
//   FID 2 BIAS    FDATA[84:80] address, [11:0] signed bias
//   FID 3 IFM     FDATA[99:90] first address, [79:0] eight 10-bit words
//                 (word j in bits 10j+9:10j goes to first address + j)
//   FID 4/5 PIMX  PIM test inputs X00..X07 / X08..X15, eight 10-bit words
//   FID 6 PIMW    PIM test filters F4..F1 in [63:0]
//   FID 7 READ    FDATA[3:0] read register for the next reply frame,
//                 [29:28] channel and [25:16] address of a feature-map word
// Reply FDATA by read register (FID field of the reply = register number):
//   0  {.., scan busy [48], AINC busy [47], done [46], class [43:40],
//       CONV3..CONV0 [39:0]}
//   1  scores of classes 0..5 (16 bits each, class 0 in [15:0])
//   2  scores of classes 6..9
//   3  the feature-map word selected by the last READ frame, [9:0]
//   4  the four ADC calibration offsets of the PIM, row k in [10k+9:10k]
// The slave's own busy flag is left unused: frames are acted on only when
// rx_valid marks a complete frame, so a partial frame needs no handling.
// Memory writes from frames go to the AI controller only while it is idle.
// The frame ids and register map are this design's; the published design
// names the functions (sensor scanning, GUI communication, weight and input
// loading, result readback) but not their encoding.
module aissc
  import pim_pkg::*;
#(
  parameter int unsigned SETTLE_CYC = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host link
  input  logic                         ss_n,
  input  logic                         sck,
  input  logic                         sdi,
  output logic                         sdo,
  // sensor / analog front end
  output logic                         sns_en,
  output logic [IMG-1:0]               row_sel,
  output logic [IMG-1:0]               col_sel,
  output logic                         sns_soc,
  input  logic                         sns_eoc,
  input  logic [15:0]                  sns_data,
  // AI neuromorphic controller
  output logic                         ai_start,
  output logic                         ai_mode,
  input  logic                         ai_busy,
  input  logic                         ai_done,
  input  logic [3:0]                   ai_class,
  input  acc_t                         ai_scores [N_CLASS],
  input  logic [N_ROW-1:0][DATA_W-1:0] ai_conv,
  output logic [N_COL-1:0][DATA_W-1:0] pim_x,
  output logic [N_ROW-1:0][N_COL-1:0]  pim_w,
  output logic                         wm_we,
  output logic [WM_AW-1:0]             wm_addr,
  output logic [N_ROW-1:0][N_COL-1:0]  wm_wdata,
  output logic                         bm_we,
  output logic [BM_AW-1:0]             bm_addr,
  output bias_t                        bm_wdata,
  output logic                         ifm_we,
  output logic [FM_AW-1:0]             ifm_addr,
  output word_t                        ifm_wdata,
  output logic [1:0]                   fm_rsel,
  output logic [FM_AW-1:0]             fm_raddr,
  input  word_t                        fm_rdata,
  // PIM ADC calibration offsets, for read-back
  input  logic [N_ROW-1:0][DATA_W-1:0] pim_offset
);
  // ---------------- sub-controllers ----------------
  logic                 rx_valid, link_busy, scan_busy;
  logic [FID_W-1:0]     rx_fid;
  logic [FDATA_W-1:0]   rx_fdata, tx_fdata;
  logic [3:0]           rreg_q;

  comm_slave u_comm (
    .clk, .rst_n, .ss_n, .sck, .sdi, .sdo,
    .tx_fid(FID_W'(rreg_q)), .tx_fdata,
    .rx_valid, .rx_fid, .rx_fdata, .busy(link_busy)
  );

  logic             scan_start, scan_done;
  logic             scan_we;
  logic [FM_AW-1:0] scan_addr;
  word_t            scan_wdata;

  aimc #(.SETTLE_CYC(SETTLE_CYC)) u_aimc (
    .clk, .rst_n, .en(scan_start), .busy(scan_busy), .done(scan_done),
    .sns_en, .row_sel, .col_sel, .sns_soc, .sns_eoc, .sns_data,
    .ifm_we(scan_we), .ifm_addr(scan_addr), .ifm_wdata(scan_wdata)
  );

  // ---------------- frame decode ----------------
  logic             auto_run_q, run_pend_q, mode_q;
  logic [3:0]       ifm_cnt_q;      // words of an IFM frame still to write
  logic [FM_AW-1:0] ifm_base_q;
  logic [79:0]      ifm_words_q;
  word_t            fm_word_q;
  logic [1:0]       fm_rd_pend_q;   // read issued, data two cycles later

  fid_e fid;
  assign fid = fid_e'(rx_fid);

  assign wm_we    = rx_valid && (fid == FID_WEIGHT);
  assign wm_addr  = WM_AW'(rx_fdata[68:64]);
  assign wm_wdata = rx_fdata[63:0];
  assign bm_we    = rx_valid && (fid == FID_BIAS);
  assign bm_addr  = BM_AW'(rx_fdata[84:80]);
  assign bm_wdata = rx_fdata[BIAS_W-1:0];

  // The scan and host IFM frames share the input feature-map write port.
  always_comb begin
    if (scan_busy) begin
      ifm_we    = scan_we;
      ifm_addr  = scan_addr;
      ifm_wdata = scan_wdata;
    end else begin
      ifm_we    = (ifm_cnt_q != 0);
      ifm_addr  = ifm_base_q;
      ifm_wdata = ifm_words_q[DATA_W-1:0];
    end
  end

  // a CTRL frame's mode bit applies to the run that frame starts
  assign ai_mode    = (rx_valid && fid == FID_CTRL) ? rx_fdata[2] : mode_q;
  assign scan_start = rx_valid && (fid == FID_CTRL) && rx_fdata[1] && !scan_busy && !ai_busy;
  assign ai_start   = (rx_valid && (fid == FID_CTRL) && rx_fdata[0] && !ai_busy && !scan_busy) ||
                      (run_pend_q && !scan_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q       <= 1'b0;
      auto_run_q   <= 1'b0;
      run_pend_q   <= 1'b0;
      rreg_q       <= '0;
      ifm_cnt_q    <= '0;
      ifm_base_q   <= '0;
      ifm_words_q  <= '0;
      pim_x        <= '0;
      pim_w        <= '0;
      fm_rsel      <= '0;
      fm_raddr     <= '0;
      fm_word_q    <= '0;
      fm_rd_pend_q <= '0;
    end else begin
      if (run_pend_q && !scan_busy) run_pend_q <= 1'b0;
      if (scan_done && auto_run_q)  run_pend_q <= 1'b1;
      if (ifm_cnt_q != 0 && !scan_busy) begin
        ifm_cnt_q   <= ifm_cnt_q - 1'b1;
        ifm_base_q  <= ifm_base_q + 1'b1;
        ifm_words_q <= ifm_words_q >> DATA_W;
      end
      fm_rd_pend_q <= {fm_rd_pend_q[0], 1'b0};
      if (fm_rd_pend_q[1]) fm_word_q <= fm_rdata;
      if (rx_valid) begin
        unique case (fid)
          FID_CTRL: begin
            mode_q     <= rx_fdata[2];
            auto_run_q <= rx_fdata[3];
          end
          FID_IFM: begin
            ifm_base_q  <= rx_fdata[99:90];
            ifm_words_q <= rx_fdata[79:0];
            ifm_cnt_q   <= 4'd8;
          end
          FID_PIMX0: for (int j = 0; j < 8; j++) pim_x[j]     <= rx_fdata[10*j +: 10];
          FID_PIMX1: for (int j = 0; j < 8; j++) pim_x[j + 8] <= rx_fdata[10*j +: 10];
          FID_PIMW:  pim_w <= rx_fdata[63:0];
          FID_READ: begin
            rreg_q       <= rx_fdata[3:0];
            fm_rsel      <= rx_fdata[29:28];
            fm_raddr     <= rx_fdata[25:16];
            fm_rd_pend_q <= 2'b01;
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- reply data ----------------
  always_comb begin
    tx_fdata = '0;
    unique case (rreg_q)
      4'd0: tx_fdata[48:0] = {scan_busy, ai_busy, ai_done, 2'b00, ai_class, ai_conv};
      4'd1: for (int j = 0; j < 6; j++) tx_fdata[16*j +: 16] = ai_scores[j];
      4'd2: for (int j = 0; j < 4; j++) tx_fdata[16*j +: 16] = ai_scores[j + 6];
      4'd3: tx_fdata[DATA_W-1:0] = fm_word_q;
      4'd4: tx_fdata[N_ROW*DATA_W-1:0] = pim_offset;
      default: ;
    endcase
  end

  // A host frame does not start a run and a scan in the same cycle.
  a_one_user: assert property (@(posedge clk) disable iff (!rst_n) !(ai_start && scan_start));
endmodule
