// AI main controller (AIMC): scans the 32x32 biosensor and builds the input
// feature map.
//
// The sensor plate is addressed by one-hot row and column selects (32 lines
// each). For every cell, in raster order, the controller selects the cell,
// waits SETTLE_CYC cycles for the analog front end (TIA, VGA) to settle,
// pulses sns_soc to start the front-end ADC and waits for sns_eoc. The
// 16-bit code is clipped to the 10-bit feature-map word (codes of this
// sensor stay below about 850) and written to address 32*row+col of the
// input feature map. The front end is powered (sns_en) only during a scan:
// data is taken from the sensor only when an operation needs it.
//
// Interface: `en` (one cycle, while not busy) starts a scan; `busy` is high
// during it; `done` pulses for one cycle after the last write. A scan takes
// 1024 * (SETTLE_CYC + front-end conversion time + 3) cycles.
// The raster order, settle time, handshake and clipping are this design's
// choices; the published design gives the function only.
module aimc
  import pim_pkg::*;
#(
  parameter int unsigned SETTLE_CYC = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  output logic                   busy,
  output logic                   done,
  // sensor / analog front end
  output logic                   sns_en,
  output logic [IMG-1:0]         row_sel,
  output logic [IMG-1:0]         col_sel,
  output logic                   sns_soc,
  input  logic                   sns_eoc,
  input  logic [15:0]            sns_data,
  // input feature map write port
  output logic                   ifm_we,
  output logic [FM_AW-1:0]       ifm_addr,
  output word_t                  ifm_wdata
);
  typedef enum logic [2:0] {A_IDLE, A_SEL, A_SOC, A_WAIT, A_WR, A_DONE} state_e;
  state_e state_q;

  localparam int unsigned SW = $clog2(SETTLE_CYC + 1);
  localparam logic [15:0] WMAX = 16'((1 << DATA_W) - 1);

  logic [FM_AW-1:0] idx_q;            // {row, col}
  logic [SW-1:0]    settle_q;
  word_t            code_q;

  assign busy     = (state_q != A_IDLE);
  assign done     = (state_q == A_DONE);
  assign sns_en   = busy && !done;
  assign sns_soc  = (state_q == A_SOC);
  assign ifm_we   = (state_q == A_WR);
  assign ifm_addr = idx_q;
  assign ifm_wdata = code_q;

  always_comb begin
    row_sel = '0;
    col_sel = '0;
    if (sns_en) begin
      row_sel[idx_q[FM_AW-1:FM_AW/2]] = 1'b1;
      col_sel[idx_q[FM_AW/2-1:0]]     = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= A_IDLE;
      idx_q    <= '0;
      settle_q <= '0;
      code_q   <= '0;
    end else begin
      unique case (state_q)
        A_IDLE: if (en) begin
          idx_q    <= '0;
          settle_q <= '0;
          state_q  <= A_SEL;
        end
        A_SEL: begin
          if (settle_q == SW'(SETTLE_CYC)) begin
            settle_q <= '0;
            state_q  <= A_SOC;
          end else begin
            settle_q <= settle_q + 1'b1;
          end
        end
        A_SOC:  state_q <= A_WAIT;
        A_WAIT: if (sns_eoc) begin
          code_q  <= (sns_data > WMAX) ? word_t'(WMAX) : word_t'(sns_data);
          state_q <= A_WR;
        end
        A_WR: begin
          idx_q   <= idx_q + 1'b1;
          state_q <= (idx_q == FM_AW'(FM_DEPTH - 1)) ? A_DONE : A_SEL;
        end
        A_DONE:  state_q <= A_IDLE;
        default: state_q <= A_IDLE;
      endcase
    end
  end
endmodule
