// Testbench of the SRAM weight array: random writes, retention while wen is
// low, and reset to zero.
module tb_sram_array;
  logic clk = 1'b0, rst_n = 1'b0, wen = 1'b0;
  logic [3:0][15:0] wdata = '0, cells, expv;
  int checks = 0, failures = 0;

  sram_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    @(negedge clk);
    check("reset", cells, '0);
    rst_n = 1'b1;
    expv = '0;
    for (int n = 0; n < 50; n++) begin
      wdata = {$urandom, $urandom};
      wen = (n % 3 != 2);
      if (wen) expv = wdata;
      @(negedge clk);
      check($sformatf("cycle %0d", n), cells, expv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
