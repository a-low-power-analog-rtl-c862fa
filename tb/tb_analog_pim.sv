// Testbench of the analog PIM filter: calibration, the published filter
// test (inputs 63,0,63,0,... with filters 0x0000, 0x5555, 0xAAAA, 0xFFFF,
// ideal outputs 0,32,0,32), random operations against the arithmetic model,
// full-scale clipping, weight retention, and the worst-case latency.
// It also replays the 32 ideal results of the published offset measurement
// (eight cases of four filters, ideal values 0..32): filter k uses only
// inputs 4k..4k+3, each set to 4*ideal, so its ideal average is exactly the
// listed value. Every result must be within the 0..2 code residual offset
// the published chip shows after calibration.
module tb_analog_pim;
  import pim_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sr_en = 1'b0, sr_clr = 1'b0, sr_wen = 1'b0, sr_den = 1'b0, sr_soc = 1'b0, sr_cal = 1'b0;
  logic [N_ROW-1:0][N_COL-1:0]  w = '0;
  logic [N_COL-1:0][DATA_W-1:0] data = '0;
  logic [N_ROW-1:0][DATA_W-1:0] yout, adc_offset;
  logic sr_eoc, sr_busy;
  int checks = 0, failures = 0;

  analog_pim dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_op(input logic cal, input logic load_w, output int cycles);
    @(negedge clk);
    if (load_w) begin sr_wen = 1'b1; @(negedge clk); sr_wen = 1'b0; end
    sr_den = 1'b1; @(negedge clk); sr_den = 1'b0;
    while (sr_busy) @(negedge clk);
    sr_cal = cal; sr_soc = 1'b1; @(negedge clk); sr_soc = 1'b0; sr_cal = 1'b0;
    cycles = 1;
    while (!sr_eoc) begin @(negedge clk); cycles++; end
  endtask

  int x [16];
  int cyc, maxcyc;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sr_en = 1'b1;
    // calibration: zero inputs
    data = '0;
    run_op(1'b1, 1'b0, cyc);
    for (int k = 0; k < 4; k++) check($sformatf("offset row %0d", k), adc_offset[k], ceil16(OFFS[k]));
    // published filter test
    for (int i = 0; i < 16; i++) begin
      x[i] = (i % 2 == 0) ? 63 : 0;
      data[i] = DATA_W'(x[i]);
    end
    w[0] = 16'h0000; w[1] = 16'h5555; w[2] = 16'hAAAA; w[3] = 16'hFFFF;
    run_op(1'b0, 1'b1, cyc);
    for (int k = 0; k < 4; k++) begin
      int ideal;
      ideal = mav_ideal(x, w[k]);
      check($sformatf("filter test row %0d model", k), yout[k], pim_ref(x, w[k], k));
      checks++;
      if (int'(yout[k]) - ideal > 2 || ideal - int'(yout[k]) > 2) begin
        failures++;
        $display("FAIL filter test row %0d: %0d vs ideal %0d", k, yout[k], ideal);
      end
    end
    check("ideal row1", mav_ideal(x, 16'h5555), 32);
    // published offset measurement: eight cases of four ideal values
    begin
      int cases [8][4];
      cases = '{'{0, 32, 0, 32}, '{15, 7, 28, 15}, '{12, 20, 20, 20}, '{0, 0, 0, 0},
                '{21, 20, 12, 29}, '{10, 9, 7, 11}, '{20, 12, 15, 23}, '{32, 32, 32, 32}};
      for (int k = 0; k < 4; k++) w[k] = 16'hF << (4 * k);
      for (int c = 0; c < 8; c++) begin
        for (int i = 0; i < 16; i++) begin
          x[i] = 4 * cases[c][i / 4];
          data[i] = DATA_W'(x[i]);
        end
        run_op(1'b0, c == 0, cyc);
        for (int k = 0; k < 4; k++) begin
          check($sformatf("offset case %0d filter %0d ideal", c, k), mav_ideal(x, w[k]), cases[c][k]);
          check($sformatf("offset case %0d filter %0d model", c, k), yout[k], pim_ref(x, w[k], k));
          checks++;
          if (int'(yout[k]) - cases[c][k] > 2 || cases[c][k] - int'(yout[k]) > 2) begin
            failures++;
            $display("FAIL offset case %0d filter %0d: %0d vs ideal %0d", c, k, yout[k], cases[c][k]);
          end
        end
      end
    end
    // random operations; weights loaded only every fourth op (retention)
    maxcyc = 0;
    for (int n = 0; n < 40; n++) begin
      logic ldw;
      ldw = (n % 4 == 0);
      if (ldw) for (int k = 0; k < 4; k++) w[k] = 16'($urandom);
      for (int i = 0; i < 16; i++) begin
        x[i] = (n % 5 == 4) ? int'($urandom_range(200, 1023)) : int'($urandom_range(0, 300));
        data[i] = DATA_W'(x[i]);
      end
      run_op(1'b0, ldw, cyc);
      if (cyc > maxcyc) maxcyc = cyc;
      for (int k = 0; k < 4; k++)
        check($sformatf("op %0d row %0d", n, k), yout[k], pim_ref(x, w[k], k));
    end
    // worst case: full-scale inputs and all-ones weights
    for (int i = 0; i < 16; i++) begin x[i] = 1023; data[i] = 10'd1023; end
    for (int k = 0; k < 4; k++) w[k] = '1;
    run_op(1'b0, 1'b1, cyc);
    for (int k = 0; k < 4; k++) check($sformatf("full scale row %0d", k), yout[k], pim_ref(x, w[k], k));
    // 255 DAC pulses + 16 MAV cycles + 255 ADC steps + control: 520..540 cycles
    checks++;
    if (cyc < 520 || cyc > 540) begin
      failures++;
      $display("FAIL worst-case latency %0d cycles", cyc);
    end
    $display("worst-case operation %0d cycles (%0d us at 32 MHz)", cyc, cyc / 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
