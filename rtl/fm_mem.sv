// Feature-map memory (one channel), as used by the AI neuromorphic
// controller for the input feature map and the feature maps FM1..FM3.
//
// A simple dual-port RAM: one synchronous read port (ren/raddr, data on
// rdata one cycle later) and one write port (wen/waddr/wdata), so a layer can
// read its input window while it writes results. DEPTH words of W bits; the
// 1024 x 10-bit default holds the whole 32x32 input. Contents are not reset.
module fm_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 10,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ren,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          wen,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wen) mem[waddr] <= wdata;
    if (ren) rdata <= mem[raddr];
  end
endmodule
