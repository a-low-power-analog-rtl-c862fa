// Shared constants and types of the analog processor-in-memory (PIM) CNN.
//
// The PIM filter bank is a 4-row by 16-column array of 1-bit 10T SRAM weight
// cells: sixteen DAC columns carry one 4x4 input window, four ADC rows return
// one multiply-and-average (MAV) result per filter. Data words into the DACs
// and out of the ADCs are 10 bits wide, the analog ramps have 8-bit
// resolution (256 steps of about 2.34 mV up to 600 mV).
//
// The CNN is a 32x32 input, two 4x4 convolutions with four filters, two 2x2
// stride-2 max-pooling layers and a 100-input, 10-class fully connected layer.
// Feature-map words are 10 bits, accumulators and class scores 16-bit signed.
package pim_pkg;

  // PIM array geometry (Figure of the PIM: SRAM(0,0)..SRAM(3,15)).
  localparam int unsigned N_COL    = 16;  // DACs, SRAM columns, inputs per op
  localparam int unsigned N_ROW    = 4;   // filters, ADCs
  localparam int unsigned DATA_W   = 10;  // DATA[9:0], YOUT[9:0]
  localparam int unsigned RES_BITS = 8;   // DAC/ADC ramp resolution

  // CNN geometry.
  localparam int unsigned IMG      = 32;  // biosensor plate is 32x32
  localparam int unsigned KSZ      = 4;   // 4x4 kernels
  localparam int unsigned C1_OUT   = IMG - KSZ + 1;    // 29
  localparam int unsigned P1_OUT   = C1_OUT / 2;       // 14
  localparam int unsigned C2_OUT   = P1_OUT - KSZ + 1; // 11
  localparam int unsigned P2_OUT   = C2_OUT / 2;       // 5
  localparam int unsigned N_CH     = 4;   // feature-map channels
  localparam int unsigned FC_IN    = N_CH * P2_OUT * P2_OUT; // 100
  localparam int unsigned N_CLASS  = 10;  // disease A .. J

  localparam int unsigned FM_DEPTH = IMG * IMG;        // 1024 words
  localparam int unsigned FM_AW    = $clog2(FM_DEPTH); // 10

  // Weight memory: one word holds the four 16-bit filter rows of one PIM op.
  //   word 0          conv1 filters
  //   words 1..4      conv2 filters, one word per input channel
  //   words 5..25     FC: word 5 + 7*group + chunk
  localparam int unsigned FC_CHUNKS = (FC_IN + N_COL - 1) / N_COL;   // 7
  localparam int unsigned FC_GROUPS = (N_CLASS + N_ROW - 1) / N_ROW; // 3
  localparam int unsigned WM_DEPTH  = 1 + N_CH + FC_CHUNKS * FC_GROUPS; // 26
  localparam int unsigned WM_AW     = $clog2(WM_DEPTH);
  localparam int unsigned WA_CONV1  = 0;
  localparam int unsigned WA_CONV2  = 1;
  localparam int unsigned WA_FC     = 1 + N_CH;

  // Bias memory: conv1 0..3, conv2 4..7, FC 8..17.
  localparam int unsigned BM_DEPTH  = 2 * N_CH + N_CLASS; // 18
  localparam int unsigned BM_AW     = $clog2(BM_DEPTH);
  localparam int unsigned BIAS_W    = 12;
  localparam int unsigned BA_CONV1  = 0;
  localparam int unsigned BA_CONV2  = N_CH;
  localparam int unsigned BA_FC     = 2 * N_CH;

  localparam int unsigned ACC_W     = 16;

  typedef logic [DATA_W-1:0]            word_t;
  typedef logic [N_COL-1:0]             wrow_t;     // one filter's 16 weight bits
  typedef logic signed [BIAS_W-1:0]     bias_t;
  typedef logic signed [ACC_W-1:0]      acc_t;

  // Communication frame: 8-bit frame id followed by 100 data bits.
  localparam int unsigned FID_W      = 8;
  localparam int unsigned FDATA_W    = 100;
  localparam int unsigned SIZE_FRAME = FID_W + FDATA_W; // 108

  typedef enum logic [FID_W-1:0] {
    FID_CTRL   = 8'd0,  // control bits
    FID_WEIGHT = 8'd1,  // one weight-memory word
    FID_BIAS   = 8'd2,  // one bias
    FID_IFM    = 8'd3,  // eight input-feature words
    FID_PIMX0  = 8'd4,  // PIM test inputs X00..X07
    FID_PIMX1  = 8'd5,  // PIM test inputs X08..X15
    FID_PIMW   = 8'd6,  // PIM test filters F1..F4
    FID_READ   = 8'd7   // select the read register returned next frame
  } fid_e;

endpackage
