// Testbench of the AI smart sensing controller. A host model sends frames,
// a sensor model answers the scan, and a small model of the AI controller
// side (feature-map read port with one-cycle latency, status values)
// stands in for the CNN. Checks the decode of every frame type into memory
// writes and registers, the scan with automatic run, the start/mode
// handshake and the three read registers.
module tb_aissc;
  import pim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ss_n = 1'b1, sck = 1'b0, sdi = 1'b0, sdo;
  logic sns_en, sns_soc, sns_eoc = 1'b0;
  logic [31:0] row_sel, col_sel;
  logic [15:0] sns_data = '0;
  logic ai_start, ai_mode, ai_busy = 1'b0, ai_done = 1'b0;
  logic [3:0] ai_class = 4'd7;
  acc_t ai_scores [10];
  logic [3:0][9:0] ai_conv;
  logic [15:0][9:0] pim_x;
  logic [3:0][15:0] pim_w;
  logic wm_we, bm_we, ifm_we;
  logic [4:0] wm_addr, bm_addr;
  logic [3:0][15:0] wm_wdata;
  bias_t bm_wdata;
  logic [9:0] ifm_addr, fm_raddr;
  word_t ifm_wdata, fm_rdata;
  logic [1:0] fm_rsel;
  logic [3:0][9:0] pim_offset = {10'd30, 10'd9, 10'd40, 10'd21};
  int checks = 0, failures = 0;

  aissc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // AI-controller side model
  always @(posedge clk) fm_rdata <= word_t'(int'(fm_raddr) * 3 + int'(fm_rsel));
  int n_start = 0, last_mode = -1;
  always @(posedge clk) if (rst_n && ai_start) begin n_start++; last_mode = int'(ai_mode); end
  // write logs
  int w_cnt = 0, b_cnt = 0, i_cnt = 0;
  logic [63:0] w_last; int w_addr_last, b_addr_last, b_last;
  int ifm [1024];
  always @(posedge clk) if (rst_n) begin
    if (wm_we) begin w_cnt++; w_last = wm_wdata; w_addr_last = int'(wm_addr); end
    if (bm_we) begin b_cnt++; b_last = int'(bm_wdata); b_addr_last = int'(bm_addr); end
    if (ifm_we) begin i_cnt++; ifm[ifm_addr] = int'(ifm_wdata); end
  end
  // sensor model
  always @(posedge clk) begin
    sns_eoc <= 1'b0;
    if (sns_soc) begin
      int r, c;
      for (int i = 0; i < 32; i++) begin
        if (row_sel[i]) r = i;
        if (col_sel[i]) c = i;
      end
      repeat (2) @(posedge clk);
      sns_data <= 16'(5 * r + c);
      sns_eoc  <= 1'b1;
    end
  end

  task automatic frame(input logic [7:0] fid, input logic [99:0] fdata, output logic [107:0] reply);
    logic [107:0] tx;
    tx = {fid, fdata};
    ss_n = 1'b0;
    repeat (8) @(negedge clk);
    for (int b = 107; b >= 0; b--) begin
      sdi = tx[b];
      repeat (4) @(negedge clk);
      reply[b] = sdo;
      sck = 1'b1;
      repeat (4) @(negedge clk);
      sck = 1'b0;
    end
    repeat (6) @(negedge clk);
    ss_n = 1'b1;
    repeat (12) @(negedge clk);
  endtask

  logic [107:0] rep;
  logic [99:0] fd;
  logic [63:0] wv;

  initial begin
    for (int j = 0; j < 10; j++) ai_scores[j] = acc_t'(100 * j - 300);
    for (int k = 0; k < 4; k++) ai_conv[k] = 10'(11 * k + 1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    // weight
    wv = {$urandom, $urandom};
    fd = '0; fd[68:64] = 5'd17; fd[63:0] = wv;
    frame(8'(FID_WEIGHT), fd, rep);
    check("weight writes", w_cnt, 1); check("weight addr", w_addr_last, 17); check("weight data", w_last, wv);
    // bias
    fd = '0; fd[84:80] = 5'd9; fd[11:0] = 12'(-77);
    frame(8'(FID_BIAS), fd, rep);
    check("bias writes", b_cnt, 1); check("bias addr", b_addr_last, 9); check("bias data", b_last, -77);
    // IFM frame
    fd = '0; fd[99:90] = 10'd500;
    for (int j = 0; j < 8; j++) fd[10*j +: 10] = 10'(100 + j);
    frame(8'(FID_IFM), fd, rep);
    check("ifm writes", i_cnt, 8);
    for (int j = 0; j < 8; j++) check($sformatf("ifm %0d", 500 + j), ifm[500 + j], 100 + j);
    // PIM test operands
    fd = '0; for (int j = 0; j < 8; j++) fd[10*j +: 10] = 10'(j + 1);  frame(8'(FID_PIMX0), fd, rep);
    fd = '0; for (int j = 0; j < 8; j++) fd[10*j +: 10] = 10'(j + 51); frame(8'(FID_PIMX1), fd, rep);
    fd = '0; fd[63:0] = wv; frame(8'(FID_PIMW), fd, rep);
    for (int j = 0; j < 8; j++) begin
      check($sformatf("pim_x %0d", j), pim_x[j], j + 1);
      check($sformatf("pim_x %0d", j + 8), pim_x[j + 8], j + 51);
    end
    check("pim_w", pim_w, wv);
    // start in PIM mode
    fd = '0; fd[0] = 1'b1; fd[2] = 1'b1; frame(8'(FID_CTRL), fd, rep);
    check("start pulses", n_start, 1); check("start mode", last_mode, 1);
    // scan with automatic run in CNN mode
    i_cnt = 0;
    fd = '0; fd[1] = 1'b1; fd[3] = 1'b1; frame(8'(FID_CTRL), fd, rep);
    check("scan busy", sns_en, 1);
    while (sns_en) @(negedge clk);
    repeat (3) @(negedge clk);
    check("scan writes", i_cnt, 1024);
    check("scan word 37", ifm[37], 5 * 1 + 5);
    check("scan word 1023", ifm[1023], 5 * 31 + 31);
    check("auto-run start", n_start, 2); check("auto-run mode", last_mode, 0);
    // read registers
    ai_done = 1'b1;
    fd = '0; fd[3:0] = 4'd0; frame(8'(FID_READ), fd, rep);
    fd = '0; fd[3:0] = 4'd1; frame(8'(FID_READ), fd, rep);
    check("status class", rep[43:40], 7);
    check("status done", rep[46], 1);
    for (int k = 0; k < 4; k++) check($sformatf("conv %0d", k), rep[10*k +: 10], 11 * k + 1);
    fd = '0; fd[3:0] = 4'd2; frame(8'(FID_READ), fd, rep);
    for (int j = 0; j < 6; j++) check($sformatf("score %0d", j), $signed(rep[16*j +: 16]), 100 * j - 300);
    fd = '0; fd[3:0] = 4'd3; fd[29:28] = 2'd2; fd[25:16] = 10'd77; frame(8'(FID_READ), fd, rep);
    for (int j = 0; j < 4; j++) check($sformatf("score %0d", j + 6), $signed(rep[16*j +: 16]), 100 * (j + 6) - 300);
    check("reply id", rep[107:100], 2);
    fd = '0; fd[3:0] = 4'd0; frame(8'(FID_READ), fd, rep);
    check("feature-map word", rep[9:0], 77 * 3 + 2);
    fd = '0; fd[3:0] = 4'd4; frame(8'(FID_READ), fd, rep);
    fd = '0; fd[3:0] = 4'd0; frame(8'(FID_READ), fd, rep);
    for (int k = 0; k < 4; k++) check($sformatf("offset %0d", k), rep[10*k +: 10], pim_offset[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
