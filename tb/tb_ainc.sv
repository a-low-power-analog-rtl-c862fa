// Testbench of the AI neuromorphic controller, connected to the analog PIM
// filter. It loads random weights and biases and a biosensor-like image
// through the host ports, runs the CNN, and compares every class score and
// the class with the arithmetic model of the network; then it reads back a
// few pooled feature-map words, and runs the single-PIM test mode.
// It also counts the mechanisms: calibration, weight loads and reuse, ReLU
// clipping at both ends, FC padding, and reports the run time at 32 MHz.
module tb_ainc;
  import pim_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, mode = 1'b0;
  logic busy, done;
  logic [3:0] class_out;
  acc_t scores [N_CLASS];
  logic [N_ROW-1:0][DATA_W-1:0] conv_out;
  logic [N_COL-1:0][DATA_W-1:0] pim_x = '0;
  logic [N_ROW-1:0][N_COL-1:0]  pim_w = '0;
  logic wm_we = 1'b0, bm_we = 1'b0, ifm_we = 1'b0;
  logic [WM_AW-1:0] wm_addr = '0;
  logic [N_ROW-1:0][N_COL-1:0] wm_wdata = '0;
  logic [BM_AW-1:0] bm_addr = '0;
  bias_t bm_wdata = '0;
  logic [FM_AW-1:0] ifm_addr = '0, fm_raddr = '0;
  word_t ifm_wdata = '0, fm_rdata;
  logic [1:0] fm_rsel = '0;
  logic sr_en, sr_clr, sr_wen, sr_den, sr_soc, sr_cal, sr_eoc, sr_busy;
  logic [N_ROW-1:0][N_COL-1:0]  sr_w;
  logic [N_COL-1:0][DATA_W-1:0] sr_data;
  logic [N_ROW-1:0][DATA_W-1:0] sr_yout, adc_offset;

  ainc dut (.*);
  analog_pim u_pim (.clk, .rst_n, .sr_en, .sr_clr, .sr_wen, .sr_den, .sr_soc, .sr_cal,
                    .w(sr_w), .data(sr_data), .yout(sr_yout), .sr_eoc, .sr_busy, .adc_offset);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cal = 0, n_wload = 0, n_ops = 0, n_relu0 = 0, n_sat = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (sr_soc && sr_cal) n_cal++;
    if (sr_soc) n_ops++;
    if (sr_wen) n_wload++;
    if (dut.fm_wen == 4'hF && dut.acc_clr)
      for (int k = 0; k < 4; k++) begin
        if (dut.acc_sum[k] < 0) n_relu0++;
        if (dut.acc_sum[k] > 1023) n_sat++;
      end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic require(string what, int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  int img [32][32];
  wword_t wm [26];
  int bm [18];
  int ref_scores [10];
  int rz, rs, ref_class;
  int x [16];
  longint t0, cycles;

  initial begin
    for (int a = 0; a < 26; a++) for (int k = 0; k < 4; k++) wm[a][k] = 16'($urandom);
    for (int k = 0; k < 4; k++) begin
      bm[k]     = int'($urandom_range(0, 60)) - 40;
      bm[4 + k] = int'($urandom_range(0, 300)) - 250;
    end
    bm[3] = 800;                                 // drives conv1 channel 3 into saturation
    wm[0][3] = 16'hFFFF;
    for (int j = 0; j < 10; j++) bm[8 + j] = int'($urandom_range(0, 20)) - 10;
    make_image(6, 12345, img);
    ref_class = cnn_ref(img, wm, bm, ref_scores, rz, rs);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < 26; a++) begin
      wm_we = 1'b1; wm_addr = WM_AW'(a); wm_wdata = wm[a]; @(negedge clk);
    end
    wm_we = 1'b0;
    for (int a = 0; a < 18; a++) begin
      bm_we = 1'b1; bm_addr = BM_AW'(a); bm_wdata = bias_t'(bm[a]); @(negedge clk);
    end
    bm_we = 1'b0;
    for (int a = 0; a < 1024; a++) begin
      ifm_we = 1'b1; ifm_addr = FM_AW'(a); ifm_wdata = word_t'(img[a / 32][a % 32]); @(negedge clk);
    end
    ifm_we = 1'b0;

    // CNN run
    mode = 1'b0; start = 1'b1; @(negedge clk); start = 1'b0;
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; end
    cycles = t0;
    for (int j = 0; j < 10; j++) check($sformatf("score %0d", j), int'(scores[j]), ref_scores[j]);
    check("class", int'(class_out), ref_class);
    $display("class %0d (model %0d), %0d cycles = %0d us at 32 MHz", class_out, ref_class,
             cycles, cycles / 32);
    // the whole run, calibration included, fits the published 15 ms at 32 MHz
    checks++;
    if (cycles > 15 * 32000) begin
      failures++;
      $display("FAIL run took %0d cycles, over 15 ms", cycles);
    end
    // mechanisms
    require("calibration operations", n_cal);
    require("PIM operations", n_ops);
    require("weight loads", n_wload);
    require("weight reuse (ops without load)", n_ops - n_cal - n_wload);
    require("ReLU clipped to zero", n_relu0);
    require("ReLU saturated at 1023", n_sat);
    check("ReLU zero count matches model", n_relu0, rz);
    check("ReLU saturation count matches model", n_sat, rs);
    // 1 cal + 841 conv1 + 484 conv2 + 21 FC operations, 26 weight loads
    check("PIM operations", n_ops, 1 + 841 + 484 + 21);
    check("weight loads", n_wload, 1 + 4 * 121 + 21);

    // PIM test mode (published filter test)
    for (int i = 0; i < 16; i++) begin x[i] = (i % 2 == 0) ? 63 : 0; pim_x[i] = DATA_W'(x[i]); end
    pim_w[0] = 16'h0000; pim_w[1] = 16'h5555; pim_w[2] = 16'hAAAA; pim_w[3] = 16'hFFFF;
    mode = 1'b1; start = 1'b1; @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    for (int k = 0; k < 4; k++) check($sformatf("PIM test %0d", k), conv_out[k], pim_ref(x, pim_w[k], k));
    require("PIM test mode runs", 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
