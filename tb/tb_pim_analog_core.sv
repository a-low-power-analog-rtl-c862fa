// Testbench of the behavioural analog PIM core: drives DAC pulses, read
// wordlines and charger pulses directly and checks that each comparator
// trips after exactly ceil((sum of selected bitline steps + offset)/16)
// charger steps, that refresh discharges, and that rows not selected keep
// their MAV value.
module tb_pim_analog_core;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  logic [15:0] dac_pulse = '0;
  logic rst_dac = 1'b1, rst_sram = 1'b1, rst_adc = 1'b1;
  logic [3:0][15:0] w = '0;
  logic [3:0] rwl = '0, chg_pulse = '0, bias = '0, cmp;
  int checks = 0, failures = 0;

  pim_analog_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int steps [16];
  int cnt [4];

  initial begin
    repeat (2) @(negedge clk);
    for (int n = 0; n < 25; n++) begin
      for (int i = 0; i < 16; i++) steps[i] = int'($urandom_range(0, 255));
      for (int k = 0; k < 4; k++) w[k] = 16'($urandom);
      rst_dac = 1'b0; rst_sram = 1'b0; rst_adc = 1'b0;
      for (int p = 0; p < 256; p++) begin
        for (int i = 0; i < 16; i++) dac_pulse[i] = (p < steps[i]);
        @(negedge clk);
      end
      dac_pulse = '0;
      for (int k = 0; k < 4; k++) begin rwl = 4'(1 << k); @(negedge clk); end
      rwl = '0;
      bias = '1;
      for (int k = 0; k < 4; k++) cnt[k] = -1;
      for (int p = 0; p < 300; p++) begin
        #1;
        for (int k = 0; k < 4; k++) if (cmp[k] && cnt[k] < 0) cnt[k] = p;
        chg_pulse = '1;
        @(negedge clk);
      end
      chg_pulse = '0; bias = '0;
      for (int k = 0; k < 4; k++) begin
        int s;
        s = 0;
        for (int i = 0; i < 16; i++) if (w[k][i]) s += steps[i];
        check($sformatf("op %0d row %0d trip step", n, k), cnt[k], ceil16(s + OFFS[k]));
      end
      rst_dac = 1'b1; rst_sram = 1'b1; rst_adc = 1'b1;
      @(negedge clk);
      bias = '1; #1;
      for (int k = 0; k < 4; k++) check("after refresh: charger 0 < offset", cmp[k], 0);
      bias = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
