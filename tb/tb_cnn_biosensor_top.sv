// End-to-end testbench of the biosensor CNN chip at its full size.
//
// A host model drives the 108-bit serial frames (weights, biases, an input
// frame with read-back, control, status reads) and a biosensor/front-end
// model answers the chip's scan with a 32x32 plate of codes: background
// 0..20 and a 6x6 region of 790..810 where the disease reacts. The chip
// scans the plate, runs the CNN on its own (auto-run), and the class and the
// ten scores read back over the link are compared with the arithmetic model
// of the network. Then the single-PIM filter test is run over the link.
// Finally a second plate (another disease region) is loaded word by word
// through input frames, the CNN is started by a host command instead of
// the scan, and its class and scores are checked against the model again.
// Every mechanism is counted and must happen at least once; the time from
// the start command to the result must stay within the published 15 ms at
// 32 MHz.
module tb_cnn_biosensor_top;
  import pim_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ss_n = 1'b1, sck = 1'b0, sdi = 1'b0, sdo;
  logic sns_en, sns_soc, sns_eoc = 1'b0;
  logic [31:0] row_sel, col_sel;
  logic [15:0] sns_data = '0;
  logic done;
  logic [3:0] class_out;

  cnn_biosensor_top dut (.*);

  always #5 clk = ~clk;          // 10 ns here; cycles are reported at 32 MHz

  int checks = 0, failures = 0;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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
    $display("mechanism %-32s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  // ---------------- biosensor + analog front end model ----------------
  int img [32][32];
  int n_conv = 0, n_bad_sel = 0;
  always @(posedge clk) begin
    sns_eoc <= 1'b0;
    if (sns_soc) begin
      int r, c;
      r = -1; c = -1;
      for (int i = 0; i < 32; i++) begin
        if (row_sel[i]) r = i;
        if (col_sel[i]) c = i;
      end
      if (!sns_en || !$onehot(row_sel) || !$onehot(col_sel)) n_bad_sel++;
      repeat (3) @(posedge clk);
      sns_data <= 16'(img[r][c]);
      sns_eoc  <= 1'b1;
      n_conv++;
    end
  end

  // ---------------- host link model ----------------
  int n_frames = 0;
  task automatic frame(input logic [7:0] fid, input logic [99:0] fdata,
                       output logic [107:0] reply);
    logic [107:0] tx;
    tx = {fid, fdata};
    ss_n = 1'b0;
    repeat (8) @(negedge clk);
    for (int b = 107; b >= 0; b--) begin
      sdi = tx[b];
      repeat (4) @(negedge clk);
      reply[b] = sdo;
      sck = 1'b1;
      repeat (4) @(negedge clk);
      sck = 1'b0;
    end
    repeat (6) @(negedge clk);
    ss_n = 1'b1;
    repeat (8) @(negedge clk);
    n_frames++;
  endtask

  task automatic send(input logic [7:0] fid, input logic [99:0] fdata);
    logic [107:0] r;
    frame(fid, fdata, r);
  endtask

  // ---------------- mechanism counters ----------------
  int n_cal = 0, n_ops = 0, n_wload = 0, n_relu0 = 0, n_sat = 0, n_clip = 0, n_pad = 0;
  int n_autorun = 0, n_pool = 0, n_ifm_frames = 0, n_cmd_runs = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.sr_soc) n_ops++;
    if (dut.sr_soc && dut.sr_cal) n_cal++;
    if (dut.sr_wen) n_wload++;
    if (dut.sr_den) for (int i = 0; i < 16; i++) if (dut.sr_data[i] > 10'd255) n_clip++;
    if (dut.u_ainc.fm_wen == 4'hF && dut.u_ainc.acc_clr)
      for (int k = 0; k < 4; k++) begin
        if (dut.u_ainc.acc_sum[k] < 0) n_relu0++;
        if (dut.u_ainc.acc_sum[k] > 1023) n_sat++;
      end
    if (dut.u_ainc.fm_wen == 4'hF && !dut.u_ainc.acc_clr) n_pool++;
    if (dut.u_ainc.state_q == dut.u_ainc.S_GATHER && !dut.u_ainc.g_vld) n_pad++;
    if (dut.u_aissc.run_pend_q && dut.ai_start) n_autorun++;
  end

  wword_t wm [26];
  int bm [18];
  int ref_scores [10];
  int rz, rs, ref_class, z2, s2;
  int x [16];
  logic [107:0] rep;
  longint cyc;
  logic [99:0] fd;

  initial begin
    for (int a = 0; a < 26; a++) for (int k = 0; k < 4; k++) wm[a][k] = 16'($urandom);
    wm[0][3] = 16'hFFFF;
    for (int k = 0; k < 4; k++) begin
      bm[k]     = int'($urandom_range(0, 60)) - 40;
      bm[4 + k] = int'($urandom_range(0, 300)) - 250;
    end
    bm[3] = 800;
    for (int j = 0; j < 10; j++) bm[8 + j] = int'($urandom_range(0, 20)) - 10;
    make_image(1, 777, img);                       // disease B region
    ref_class = cnn_ref(img, wm, bm, ref_scores, rz, rs);

    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);

    // weights and biases
    for (int a = 0; a < 26; a++) begin
      fd = '0; fd[68:64] = 5'(a); fd[63:0] = wm[a];
      send(8'(FID_WEIGHT), fd);
    end
    for (int a = 0; a < 18; a++) begin
      fd = '0; fd[84:80] = 5'(a); fd[11:0] = 12'(bm[a]);
      send(8'(FID_BIAS), fd);
    end

    // input frame of eight words at 100..107, read back word 103
    fd = '0; fd[99:90] = 10'd100;
    for (int j = 0; j < 8; j++) fd[10*j +: 10] = 10'(50 * j + 7);
    send(8'(FID_IFM), fd);
    fd = '0; fd[3:0] = 4'd3; fd[29:28] = 2'd0; fd[25:16] = 10'd103;
    send(8'(FID_READ), fd);
    fd = '0; fd[3:0] = 4'd3;
    frame(8'(FID_READ), fd, rep);
    check("IFM frame word 103 read back", int'(rep[9:0]), 50 * 3 + 7);
    check("reply frame id", int'(rep[107:100]), 3);

    // scan the plate and run the CNN automatically
    fd = '0; fd[1] = 1'b1; fd[3] = 1'b1;
    send(8'(FID_CTRL), fd);
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check("class pin", int'(class_out), ref_class);
    $display("scan + CNN: %0d cycles = %0d us at 32 MHz; class %0d (model %0d)",
             cyc, cyc / 32, class_out, ref_class);
    checks++;
    if (cyc > 15 * 32000) begin
      failures++;
      $display("FAIL scan + CNN took over 15 ms at 32 MHz");
    end

    // read status and scores
    fd = '0; fd[3:0] = 4'd0; send(8'(FID_READ), fd);
    fd = '0; fd[3:0] = 4'd1; frame(8'(FID_READ), fd, rep);
    check("status: done", int'(rep[46]), 1);
    check("status: class", int'(rep[43:40]), ref_class);
    fd = '0; fd[3:0] = 4'd2; frame(8'(FID_READ), fd, rep);
    for (int j = 0; j < 6; j++) check($sformatf("score %0d", j), int'($signed(rep[16*j +: 16])), ref_scores[j]);
    fd = '0; fd[3:0] = 4'd0; frame(8'(FID_READ), fd, rep);
    for (int j = 0; j < 4; j++) check($sformatf("score %0d", j + 6), int'($signed(rep[16*j +: 16])), ref_scores[j + 6]);

    // single PIM filter test over the link
    for (int i = 0; i < 16; i++) x[i] = (i % 2 == 0) ? 63 : 0;
    fd = '0; for (int j = 0; j < 8; j++) fd[10*j +: 10] = 10'(x[j]);     send(8'(FID_PIMX0), fd);
    fd = '0; for (int j = 0; j < 8; j++) fd[10*j +: 10] = 10'(x[j + 8]); send(8'(FID_PIMX1), fd);
    fd = '0; fd[63:0] = {16'hFFFF, 16'hAAAA, 16'h5555, 16'h0000};     send(8'(FID_PIMW), fd);
    fd = '0; fd[0] = 1'b1; fd[2] = 1'b1; send(8'(FID_CTRL), fd);
    while (!done) @(negedge clk);
    fd = '0; fd[3:0] = 4'd0; send(8'(FID_READ), fd);
    frame(8'(FID_READ), fd, rep);
    begin
      logic [15:0] fw [4];
      fw = '{16'h0000, 16'h5555, 16'hAAAA, 16'hFFFF};
      for (int k = 0; k < 4; k++) begin
        int got, ideal;
        got = int'(rep[10*k +: 10]);
        ideal = mav_ideal(x, fw[k]);
        check($sformatf("PIM test filter %0d", k), got, pim_ref(x, fw[k], k));
        checks++;
        if (got - ideal > 2 || ideal - got > 2) begin
          failures++;
          $display("FAIL PIM test filter %0d: %0d, ideal %0d", k, got, ideal);
        end
        $display("PIM test FILTER%0d: %0d (ideal %0d)", k, got, ideal);
      end
    end

    // ADC offsets measured by the calibration operation, read over the link
    fd = '0; fd[3:0] = 4'd4; send(8'(FID_READ), fd);
    fd = '0; fd[3:0] = 4'd0; frame(8'(FID_READ), fd, rep);
    for (int k = 0; k < 4; k++)
      check($sformatf("ADC %0d calibration offset", k), int'(rep[10*k +: 10]), ceil16(OFFS[k]));

    // second image over the link, CNN started by command
    begin
      int img2 [32][32];
      int sc2 [10];
      int cls2, n_run0;
      make_image(6, 4242, img2);                   // disease G region
      cls2 = cnn_ref(img2, wm, bm, sc2, z2, s2);
      for (int a = 0; a < 1024; a += 8) begin
        fd = '0; fd[99:90] = 10'(a);
        for (int j = 0; j < 8; j++) fd[10*j +: 10] = 10'(img2[(a + j) / 32][(a + j) % 32]);
        send(8'(FID_IFM), fd);
        n_ifm_frames++;
      end
      n_run0 = n_ops;
      fd = '0; fd[0] = 1'b1; send(8'(FID_CTRL), fd);
      while (!done) @(negedge clk);
      n_cmd_runs += (n_ops - n_run0 > 1000) ? 1 : 0;
      check("second image: class pin", int'(class_out), cls2);
      fd = '0; fd[3:0] = 4'd1; send(8'(FID_READ), fd);
      fd = '0; fd[3:0] = 4'd2; frame(8'(FID_READ), fd, rep);
      for (int j = 0; j < 6; j++) check($sformatf("second image: score %0d", j), int'($signed(rep[16*j +: 16])), sc2[j]);
      fd = '0; fd[3:0] = 4'd0; frame(8'(FID_READ), fd, rep);
      for (int j = 0; j < 4; j++) check($sformatf("second image: score %0d", j + 6), int'($signed(rep[16*j +: 16])), sc2[j + 6]);
      $display("second image: class %0d (model %0d, first image %0d)", class_out, cls2, ref_class);
    end

    check("sensor selects one-hot and powered", n_bad_sel, 0);
    check("sensor conversions", n_conv, 1024);
    require("serial frames", n_frames);
    require("sensor conversions", n_conv);
    require("automatic run after scan", n_autorun);
    require("input map loaded by frames", n_ifm_frames);
    require("CNN run started by command", n_cmd_runs);
    require("ADC calibration operations", n_cal);
    require("PIM operations", n_ops);
    require("weight loads into SRAM", n_wload);
    require("weight reuse (no reload)", n_ops - n_cal - n_wload);
    require("DAC full-scale clipping", n_clip);
    require("ReLU clipped to zero", n_relu0);
    require("ReLU saturated at 1023", n_sat);
    require("max-pool writes", n_pool);
    require("FC zero padding", n_pad);
    // two CNN runs: the scanned plate and the plate loaded by frames
    check("ReLU zero count vs model", n_relu0, rz + z2);
    check("ReLU saturation count vs model", n_sat, rs + s2);
    check("pool writes", n_pool, 2 * (14 * 14 + 5 * 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
