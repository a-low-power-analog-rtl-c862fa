// Testbench of the feature-map memory: random writes and reads against a
// shadow array, one-cycle read latency, read and write in the same cycle.
module tb_fm_mem;
  logic clk = 1'b0, ren = 1'b0, wen = 1'b0;
  logic [9:0] raddr = '0, waddr = '0, wdata = '0, rdata;
  int checks = 0, failures = 0;
  int shadow [1024];

  fm_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      wen = 1'b1; waddr = 10'(a); wdata = 10'($urandom); shadow[a] = int'(wdata);
      @(negedge clk);
    end
    wen = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int exp_v;
      raddr = 10'($urandom); ren = 1'b1;
      exp_v = shadow[raddr];
      wen = $urandom_range(0, 1) == 1;
      waddr = 10'($urandom); wdata = 10'($urandom);
      if (wen) shadow[waddr] = int'(wdata);
      @(negedge clk);
      checks++;
      if (int'(rdata) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: got %0d expected %0d", raddr, rdata, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
