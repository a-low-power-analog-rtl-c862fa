// Testbench of the AI main controller (sensor scan): a sensor model returns
// random 16-bit codes a random number of cycles after each conversion
// start; every input-feature write must carry the selected cell's address
// (32*row+col in raster order) and its code clipped to 10 bits. The front
// end must be powered only during the scan and the selects must be one-hot.
module tb_aimc;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic busy, done, sns_en, sns_soc, sns_eoc = 1'b0;
  logic [31:0] row_sel, col_sel;
  logic [15:0] sns_data = '0;
  logic ifm_we;
  logic [9:0] ifm_addr, ifm_wdata;
  int checks = 0, failures = 0;

  aimc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int code [1024];
  int last_cell = -1, n_writes = 0, n_done = 0, bad = 0, n_clip = 0;

  always @(posedge clk) begin
    sns_eoc <= 1'b0;
    if (sns_soc) begin
      int r, c, lat;
      r = -1; c = -1;
      for (int i = 0; i < 32; i++) begin
        if (row_sel[i]) r = i;
        if (col_sel[i]) c = i;
      end
      if (!sns_en || !$onehot(row_sel) || !$onehot(col_sel)) bad++;
      last_cell = 32 * r + c;
      lat = int'($urandom_range(1, 6));
      repeat (lat) @(posedge clk);
      sns_data <= 16'(code[last_cell]);
      sns_eoc  <= 1'b1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (!busy && sns_en) bad++;
    if (done) n_done++;
    if (ifm_we) begin
      int e;
      e = (code[last_cell] > 1023) ? 1023 : code[last_cell];
      if (code[last_cell] > 1023) n_clip++;
      checks += 2;
      if (int'(ifm_addr) != n_writes) begin
        failures++;
        $display("FAIL write %0d at address %0d", n_writes, ifm_addr);
      end
      if (int'(ifm_wdata) != e || int'(ifm_addr) != last_cell) begin
        failures++;
        $display("FAIL write %0d: data %0d expected %0d", n_writes, ifm_wdata, e);
      end
      n_writes++;
    end
  end

  initial begin
    for (int a = 0; a < 1024; a++)
      code[a] = (a % 7 == 0) ? int'($urandom_range(0, 65535)) : int'($urandom_range(0, 900));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1; @(negedge clk); en = 1'b0;
    while (!done) @(negedge clk);
    repeat (5) @(negedge clk);
    checks += 5;
    if (n_writes != 1024) begin failures++; $display("FAIL %0d writes", n_writes); end
    if (n_done != 1) failures++;
    if (bad != 0) begin failures++; $display("FAIL %0d select/power errors", bad); end
    if (busy || sns_en) failures++;
    if (n_clip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
