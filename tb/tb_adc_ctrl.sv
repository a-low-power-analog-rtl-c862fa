// Testbench of the ADC controller. A small voltage-charger model in the
// testbench raises a ramp on each chg_pulse and answers cmp when the ramp
// reaches a target; the controller's count must be the ramp steps needed,
// a calibration run must store the offset, and later results must have it
// subtracted (floored at 0). Also checks full-scale stop and latency.
module tb_adc_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pen_adc = 1'b0, rst_adc = 1'b1, cal = 1'b0;
  logic cmp, bias, chg_pulse, eoc_adc;
  logic [9:0] yout, offset;
  int checks = 0, failures = 0;
  int ramp = 0, target = 0;

  adc_ctrl dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_adc) ramp <= 0; else if (chg_pulse) ramp <= ramp + 1;
  assign cmp = bias && (ramp >= target);

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

  task automatic convert(input int tgt, input logic c, output int cyc);
    @(negedge clk);
    target = tgt; cal = c;
    rst_adc = 1'b0; pen_adc = 1'b1;
    cyc = 0;
    while (!eoc_adc && cyc < 1000) begin @(negedge clk); cyc++; end
    pen_adc = 1'b0; rst_adc = 1'b1; cal = 1'b0;
  endtask

  int cyc, off, t;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    convert(3, 1'b1, cyc);
    check("calibration offset", offset, 3);
    check("calibration result", yout, 0);
    for (int n = 0; n < 30; n++) begin
      t = (n == 0) ? 300 : (n == 1) ? 1 : int'($urandom_range(0, 260));
      convert(t, 1'b0, cyc);
      begin
        int raw;
        raw = (t > 255) ? 255 : t;
        check($sformatf("result for %0d", t), yout, (raw > 3) ? raw - 3 : 0);
        check($sformatf("latency for %0d", t), cyc, raw + 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
