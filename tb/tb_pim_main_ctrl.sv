// Testbench of the PIM main controller. Small models of the sub-controllers
// raise their EOC a random number of cycles after their enable; the
// testbench checks the order DAC -> SRAM -> ADC -> EOC -> refresh, that each
// block is enabled only in its phase, the one-cycle EOC, the refresh length,
// WEN/DEN forwarding, the calibration flag and abort by sr_clr.
module tb_pim_main_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pen_main = 1'b0, sr_clr = 1'b0, sr_wen = 1'b0, sr_den = 1'b0, sr_soc = 1'b0, sr_cal = 1'b0;
  logic eoc, busy, wen, den, pen_dac, rst_dac, pen_sram, rst_sram, pen_adc, rst_adc, adc_cal;
  logic [15:0] eoc_dac;
  logic eoc_sram;
  logic [3:0] eoc_adc;
  int checks = 0, failures = 0;

  pim_main_ctrl dut (.*);
  always #5 clk = ~clk;

  // sub-controller models: EOC after a programmable number of enabled cycles
  int dac_lat [16], adc_lat [4], sram_lat;
  int dac_cnt = 0, sram_cnt = 0, adc_cnt = 0;
  always @(posedge clk) begin
    dac_cnt  <= (pen_dac  && !rst_dac)  ? dac_cnt + 1  : 0;
    sram_cnt <= (pen_sram && !rst_sram) ? sram_cnt + 1 : 0;
    adc_cnt  <= (pen_adc  && !rst_adc)  ? adc_cnt + 1  : 0;
  end
  always_comb begin
    for (int i = 0; i < 16; i++) eoc_dac[i] = pen_dac && (dac_cnt >= dac_lat[i]);
    eoc_sram = pen_sram && (sram_cnt >= sram_lat);
    for (int k = 0; k < 4; k++) eoc_adc[k] = pen_adc && (adc_cnt >= adc_lat[k]);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // order monitor
  int phase_err = 0, eoc_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (pen_sram && !(&eoc_dac)) phase_err++;
    if (pen_adc && !eoc_sram) phase_err++;
    if (eoc) eoc_cnt++;
  end

  task automatic op(input logic cal, output int cyc, output int refresh);
    int maxd, maxa;
    maxd = 0; maxa = 0;
    for (int i = 0; i < 16; i++) begin dac_lat[i] = int'($urandom_range(0, 40)); if (dac_lat[i] > maxd) maxd = dac_lat[i]; end
    sram_lat = int'($urandom_range(1, 20));
    for (int k = 0; k < 4; k++) begin adc_lat[k] = int'($urandom_range(1, 40)); if (adc_lat[k] > maxa) maxa = adc_lat[k]; end
    @(negedge clk);
    sr_wen = 1'b1; #1; check("wen forwarded", wen, 1); @(negedge clk); sr_wen = 1'b0;
    sr_den = 1'b1; #1; check("den forwarded", den, 1); @(negedge clk); sr_den = 1'b0;
    sr_soc = 1'b1; sr_cal = cal; @(negedge clk); sr_soc = 1'b0; sr_cal = 1'b0;
    check("cal flag", adc_cal, cal);
    cyc = 1;
    while (!eoc && cyc < 1000) begin
      if (busy && !pen_adc && !pen_sram) begin
        sr_wen = 1'b1; #1; check("no wen while converting", wen, 0); sr_wen = 1'b0;
      end
      @(negedge clk); cyc++;
    end
    check("eoc latency", cyc, (maxd + 1) + (sram_lat + 1) + (maxa + 1) + 1);
    @(negedge clk);
    check("eoc one cycle", eoc, 0);
    refresh = 0;
    while (busy) begin
      if (rst_dac && rst_sram && rst_adc && !pen_dac && !pen_adc) refresh++;
      @(negedge clk);
    end
  endtask

  int cyc, rf;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    pen_main = 1'b1;
    check("idle: analog reset", rst_dac & rst_sram & rst_adc, 1);
    op(1'b1, cyc, rf);
    check("refresh cycles", rf, 4);
    for (int n = 0; n < 20; n++) begin
      op(1'b0, cyc, rf);
      check("refresh cycles", rf, 4);
    end
    // abort
    @(negedge clk);
    dac_lat = '{default: 100};
    sr_soc = 1'b1; @(negedge clk); sr_soc = 1'b0;
    repeat (5) @(negedge clk);
    check("converting", pen_dac, 1);
    sr_clr = 1'b1; @(negedge clk); sr_clr = 1'b0;
    check("aborted", busy, 0);
    check("no eoc after abort", eoc, 0);
    check("phase order violations", phase_err, 0);
    check("eoc pulses", eoc_cnt, 21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
