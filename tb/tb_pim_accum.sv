// Testbench of the accumulate/bias/ReLU stage: random sequences of PIM
// results and biases against integer arithmetic, including negative sums
// (ReLU gives 0) and sums above 1023 (saturation).
module tb_pim_accum;
  import pim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, add = 1'b0;
  logic [3:0][9:0] yin = '0, act;
  bias_t bias [4];
  acc_t  sum  [4];
  int checks = 0, failures = 0;
  int acc [4];
  int n_zero = 0, n_sat = 0;

  pim_accum dut (.*);
  always #5 clk = ~clk;

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

  initial begin
    for (int k = 0; k < 4; k++) bias[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      int nadd;
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      for (int k = 0; k < 4; k++) begin
        acc[k] = 0;
        bias[k] = bias_t'(int'($urandom_range(0, 1600)) - 800);
      end
      nadd = int'($urandom_range(1, 4));
      for (int a = 0; a < nadd; a++) begin
        for (int k = 0; k < 4; k++) begin
          yin[k] = 10'($urandom_range(0, 255));
          acc[k] += int'(yin[k]);
        end
        add = 1'b1; @(negedge clk); add = 1'b0;
      end
      for (int k = 0; k < 4; k++) begin
        int s, e;
        s = acc[k] + int'(bias[k]);
        e = (s < 0) ? 0 : (s > 1023) ? 1023 : s;
        if (s < 0) n_zero++;
        if (s > 1023) n_sat++;
        check($sformatf("sum %0d/%0d", n, k), int'(sum[k]), s);
        check($sformatf("act %0d/%0d", n, k), int'(act[k]), e);
      end
    end
    checks++;
    if (n_zero == 0 || n_sat == 0) failures++;
    $display("ReLU zero %0d, saturated %0d", n_zero, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
