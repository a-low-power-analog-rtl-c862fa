// Testbench of the max-pooling unit: random 2x2 windows on four lanes.
module tb_max_pool;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic [3:0][9:0] din = '0, max;
  int checks = 0, failures = 0;
  int m [4];

  max_pool dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      for (int v = 0; v < 4; v++) begin
        for (int k = 0; k < 4; k++) begin
          din[k] = 10'($urandom);
          if (v == 0 || int'(din[k]) > m[k]) m[k] = int'(din[k]);
        end
        en = 1'b1; first = (v == 0);
        @(negedge clk);
        // a cycle with en low must not change anything
        en = 1'b0; din = '1; @(negedge clk);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(max[k]) != m[k]) begin
          failures++;
          $display("FAIL window %0d lane %0d: got %0d expected %0d", n, k, max[k], m[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
