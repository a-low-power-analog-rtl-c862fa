// Testbench of the SRAM array controller: each row's read wordline is on
// alone for SHARE_CYC cycles in row order, then eoc_sram rises after
// ROWS*SHARE_CYC cycles and stays until refresh.
module tb_sram_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, pen_sram = 1'b0, rst_sram = 1'b1;
  logic [3:0] rwl;
  logic eoc_sram;
  int checks = 0, failures = 0;

  sram_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      check("idle rwl", rwl, 0);
      rst_sram = 1'b0; pen_sram = 1'b1;
      for (int c = 0; c < 16; c++) begin
        #1;
        check($sformatf("run %0d cycle %0d rwl", run, c), rwl, 1 << (c / 4));
        check($sformatf("run %0d cycle %0d eoc", run, c), eoc_sram, 0);
        @(negedge clk);
      end
      repeat (3) begin
        check("eoc after 16 cycles", eoc_sram, 1);
        check("rwl off", rwl, 0);
        @(negedge clk);
      end
      rst_sram = 1'b1; pen_sram = 1'b0;
      @(negedge clk);
      check("eoc cleared", eoc_sram, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
