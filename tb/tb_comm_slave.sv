// Testbench of the serial frame slave: a host model exchanges random
// 108-bit frames; each received frame must appear once on rx_fid/rx_fdata,
// and the host must read back the reply presented when the frame began.
module tb_comm_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ss_n = 1'b1, sck = 1'b0, sdi = 1'b0, sdo;
  logic [7:0] tx_fid = '0;
  logic [99:0] tx_fdata = '0;
  logic rx_valid, busy;
  logic [7:0] rx_fid;
  logic [99:0] rx_fdata;
  int checks = 0, failures = 0;

  comm_slave dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_valid = 0;
  logic [107:0] last_rx;
  always @(posedge clk) if (rst_n && rx_valid) begin n_valid++; last_rx = {rx_fid, rx_fdata}; end

  task automatic frame(input logic [107:0] tx, input int half, output logic [107:0] reply);
    ss_n = 1'b0;
    repeat (8) @(negedge clk);
    for (int b = 107; b >= 0; b--) begin
      sdi = tx[b];
      repeat (half) @(negedge clk);
      reply[b] = sdo;
      sck = 1'b1;
      repeat (half) @(negedge clk);
      sck = 1'b0;
    end
    repeat (6) @(negedge clk);
    ss_n = 1'b1;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    logic [107:0] tx, rep, exp_rep;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 30; n++) begin
      tx = {$urandom, $urandom, $urandom, $urandom};
      tx_fid = 8'($urandom); tx_fdata = {$urandom, $urandom, $urandom, $urandom};
      exp_rep = {tx_fid, tx_fdata};
      frame(tx, 4 + (n % 3), rep);
      tx_fid = '0; tx_fdata = '0;     // a later change must not matter
      checks += 3;
      if (n_valid != n + 1) begin failures++; $display("FAIL frame %0d: %0d valid pulses", n, n_valid); end
      if (last_rx != tx) begin failures++; $display("FAIL frame %0d received %h", n, last_rx); end
      if (rep != exp_rep) begin failures++; $display("FAIL frame %0d reply %h expected %h", n, rep, exp_rep); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
