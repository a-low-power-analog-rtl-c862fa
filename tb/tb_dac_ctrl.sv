// Testbench of the DAC controller: for random codes, counts the charge
// pulses and the cycles until eoc_dac, checks clipping at full scale (255)
// and that refresh clears the count.
module tb_dac_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic den = 1'b0, pen_dac = 1'b0, rst_dac = 1'b1;
  logic [9:0] data = '0;
  logic dac_pulse, eoc_dac;
  int checks = 0, failures = 0;

  dac_ctrl dut (.*);
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

  task automatic convert(input int code);
    int pulses, cyc;
    @(negedge clk);
    data = 10'(code); den = 1'b1; @(negedge clk); den = 1'b0;
    rst_dac = 1'b0; pen_dac = 1'b1;
    #1;
    pulses = 0; cyc = 0;
    while (!eoc_dac && cyc < 2000) begin
      if (dac_pulse) pulses++;
      @(negedge clk); #1; cyc++;
    end
    check($sformatf("pulses for %0d", code), pulses, (code > 255) ? 255 : code);
    check($sformatf("cycles for %0d", code), cyc, (code > 255) ? 255 : code);
    repeat (3) begin
      @(negedge clk);
      check("eoc held, no pulse", {31'b0, eoc_dac && !dac_pulse}, 1);
    end
    pen_dac = 1'b0; rst_dac = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    convert(0);
    convert(1);
    convert(63);
    convert(255);
    convert(256);
    convert(1023);
    for (int n = 0; n < 20; n++) convert(int'($urandom_range(0, 1023)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
