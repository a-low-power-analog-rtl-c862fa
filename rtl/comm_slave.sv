// Slave controller of the communication and control interface: the serial
// link to the host GUI (through the measurement FPGA).
//
// Transfers are frames of SIZE_FRAME = 108 bits, most significant bit first:
// an 8-bit frame id (FID) followed by 100 data bits (FDATA). The link is a
// 4-wire serial port in mode 0: the host drives ss_n low for one frame and
// toggles sck; SDI is sampled on sck rising edges and SDO changes on falling
// edges. While a frame comes in, the slave shifts out the 108-bit reply
// {tx_fid, tx_fdata} captured when ss_n fell, so the answer to a read
// request arrives in the frame after it.
//
// sck, sdi and ss_n are sampled by clk through two-flop synchronisers, so
// clk must be at least 8 times faster than sck. rx_valid pulses for one clk
// cycle after the 108th bit with rx_fid/rx_fdata; busy is high during a
// frame. The frame size and FDATA transfer follow the published interface;
// the bit order, frame split, mode and synchronisation are this design's
// choices.
module comm_slave
  import pim_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ss_n,
  input  logic                 sck,
  input  logic                 sdi,
  output logic                 sdo,
  input  logic [FID_W-1:0]     tx_fid,
  input  logic [FDATA_W-1:0]   tx_fdata,
  output logic                 rx_valid,
  output logic [FID_W-1:0]     rx_fid,
  output logic [FDATA_W-1:0]   rx_fdata,
  output logic                 busy
);
  localparam int unsigned CW = $clog2(SIZE_FRAME + 1);

  logic [2:0] sck_s, ss_s;
  logic [1:0] sdi_s;
  logic       sck_rise, sck_fall, frame_start, in_frame;

  logic [SIZE_FRAME-1:0] rx_shift_q, tx_shift_q;
  logic [CW-1:0]         cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s <= '0;
      ss_s  <= '1;
      sdi_s <= '0;
    end else begin
      sck_s <= {sck_s[1:0], sck};
      ss_s  <= {ss_s[1:0], ss_n};
      sdi_s <= {sdi_s[0], sdi};
    end
  end

  assign in_frame    = !ss_s[1];
  assign frame_start = ss_s[2] && !ss_s[1];
  assign sck_rise    = in_frame && !sck_s[2] && sck_s[1];
  assign sck_fall    = in_frame && sck_s[2] && !sck_s[1];
  assign busy        = in_frame;
  assign sdo         = tx_shift_q[SIZE_FRAME-1];
  assign rx_fid      = rx_shift_q[SIZE_FRAME-1 -: FID_W];
  assign rx_fdata    = rx_shift_q[FDATA_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_shift_q <= '0;
      tx_shift_q <= '0;
      cnt_q      <= '0;
      rx_valid   <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      if (frame_start) begin
        cnt_q      <= '0;
        tx_shift_q <= {tx_fid, tx_fdata};
      end else begin
        if (sck_rise && cnt_q != CW'(SIZE_FRAME)) begin
          rx_shift_q <= {rx_shift_q[SIZE_FRAME-2:0], sdi_s[1]};
          cnt_q      <= cnt_q + 1'b1;
          if (cnt_q == CW'(SIZE_FRAME - 1)) rx_valid <= 1'b1;
        end
        if (sck_fall) tx_shift_q <= {tx_shift_q[SIZE_FRAME-2:0], 1'b0};
      end
    end
  end
endmodule
