// AI neuromorphic controller (AINC): runs the CNN on the analog PIM filter.
//
// Network (all sizes from pim_pkg):
//   input 32x32 (channel memory FM0, the input feature map)
//   conv1 4x4, 4 filters, bias, ReLU           -> 29x29x4
//   max-pool 2x2 stride 2                      -> 14x14x4
//   conv2 4x4 over 4 channels, 4 filters, ReLU -> 11x11x4
//   max-pool 2x2 stride 2                      -> 5x5x4
//   fully connected 100 -> 10, arg-max        -> class 0..9 (disease A..J)
//
// How it works. Every multiply-accumulate goes through the PIM: for one
// output pixel the controller reads the 16 words of the 4x4 window from a
// channel memory (one per cycle), loads them into the DACs (sr_den), makes
// sure the right 4x16 weight word sits in the SRAM array (sr_wen) and starts
// the operation (sr_soc). The four YOUT results are the four filters'
// outputs, summed over input channels in pim_accum, biased and rectified.
// A weight word is written into the SRAM array only when it differs from the
// one already stored, so conv1 loads its weights once for all 841 windows
// and each layer reuses the same analog filter. The FC layer is cut into
// 7 chunks of 16 inputs and 3 groups of 4 outputs (21 PIM operations).
// Max pooling reads all four channel memories in parallel.
//
// The four channel memories FM0..FM3 are reused in place: every layer writes
// output pixel (r,c) of channel k to address r*OUT+c of memory k, which is
// never an address a later pixel of the same layer still has to read.
// Flattening order for the FC layer is channel-major: input n = 25*ch + 5*r + c.
// Each run starts with one calibration operation (all inputs zero) that lets
// the ADCs measure their offsets.
//
// Modes: mode=0 runs the CNN, mode=1 runs one PIM operation on pim_x and
// pim_w (filter test) and shows the result on conv_out.
//
// Interface: `start` (one cycle, while not busy) begins a run; `busy` is high
// until `done` rises (held until the next start). class_out, scores and
// conv_out (the last PIM results) hold after done. While not busy, the
// host side may write the weight memory (26 words of 4x16 bits), the bias
// memory (18 signed words), the input map (ifm_*) and read any channel
// memory (fm_rsel/fm_raddr, data on fm_rdata one cycle later).
//
// The layer sizes, the PIM sharing and the parallel four-channel feature
// maps follow the published design; memory layout, the weight and bias
// address maps, chunking of the FC layer, the in-place reuse and the
// calibration-at-start are this design's choices.
// The winning score output of output_ctrl is left open here: the host reads
// all ten scores, so it is not needed a second time.
module ainc
  import pim_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  // control / status
  input  logic                         start,
  input  logic                         mode,
  output logic                         busy,
  output logic                         done,
  output logic [3:0]                   class_out,
  output acc_t                         scores [N_CLASS],
  output logic [N_ROW-1:0][DATA_W-1:0] conv_out,
  // PIM test operands
  input  logic [N_COL-1:0][DATA_W-1:0] pim_x,
  input  logic [N_ROW-1:0][N_COL-1:0]  pim_w,
  // host write / read ports
  input  logic                         wm_we,
  input  logic [WM_AW-1:0]             wm_addr,
  input  logic [N_ROW-1:0][N_COL-1:0]  wm_wdata,
  input  logic                         bm_we,
  input  logic [BM_AW-1:0]             bm_addr,
  input  bias_t                        bm_wdata,
  input  logic                         ifm_we,
  input  logic [FM_AW-1:0]             ifm_addr,
  input  word_t                        ifm_wdata,
  input  logic [1:0]                   fm_rsel,
  input  logic [FM_AW-1:0]             fm_raddr,
  output word_t                        fm_rdata,
  // PIM interface
  output logic                         sr_en,
  output logic                         sr_clr,
  output logic                         sr_wen,
  output logic                         sr_den,
  output logic                         sr_soc,
  output logic                         sr_cal,
  output logic [N_ROW-1:0][N_COL-1:0]  sr_w,
  output logic [N_COL-1:0][DATA_W-1:0] sr_data,
  input  logic [N_ROW-1:0][DATA_W-1:0] sr_yout,
  input  logic                         sr_eoc,
  input  logic                         sr_busy
);
  typedef enum logic [2:0] {L_CAL, L_PIMTEST, L_CONV1, L_POOL1, L_CONV2, L_POOL2, L_FC} layer_e;
  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_GATHER, S_WLOAD, S_DLOAD, S_SOC, S_WAIT,
    S_WRITE, S_POOL_RD, S_POOL_WR, S_FC_WR, S_CLASS, S_DONE
  } state_e;

  state_e state_q;
  layer_e layer_q;
  logic   mode_q;

  logic [4:0] r_q, c_q;         // output pixel
  logic [1:0] ci_q;             // conv2 input channel
  logic [2:0] m_q;              // FC chunk
  logic [1:0] g_q;              // FC output group
  logic [4:0] t_q;              // cycle within gather / pool window
  word_t      xbuf_q [N_COL];
  logic [WM_AW-1:0] wload_addr_q;
  logic             wload_valid_q;
  logic [1:0]       sel_d_q;    // channel of the word arriving this cycle
  logic             vld_d_q;    // it is a real FC input (not padding)

  // ---------------- memories ----------------
  logic [N_ROW-1:0][N_COL-1:0] wmem [WM_DEPTH];
  bias_t                       bmem [BM_DEPTH];

  always_ff @(posedge clk) begin
    if (wm_we && !busy) wmem[wm_addr] <= wm_wdata;
    if (bm_we && !busy) bmem[bm_addr] <= bm_wdata;
  end

  logic             fm_ren;
  logic [FM_AW-1:0] fm_raddr_i;
  word_t            fm_rd [N_CH];
  logic [N_CH-1:0]  fm_wen;
  logic [FM_AW-1:0] fm_waddr;
  word_t            fm_wd [N_CH];

  for (genvar k = 0; k < N_CH; k++) begin : g_fm
    fm_mem #(.DEPTH(FM_DEPTH), .W(DATA_W)) u_fm (
      .clk, .ren(fm_ren), .raddr(fm_raddr_i), .rdata(fm_rd[k]),
      .wen(fm_wen[k]), .waddr(fm_waddr), .wdata(fm_wd[k])
    );
  end

  logic [1:0] ext_sel_q;
  always_ff @(posedge clk) ext_sel_q <= fm_rsel;
  assign fm_rdata = fm_rd[ext_sel_q];

  // ---------------- layer geometry ----------------
  logic [5:0] in_dim, out_dim;
  always_comb begin
    unique case (layer_q)
      L_CONV1: begin in_dim = 6'(IMG);    out_dim = 6'(C1_OUT); end
      L_POOL1: begin in_dim = 6'(C1_OUT); out_dim = 6'(P1_OUT); end
      L_CONV2: begin in_dim = 6'(P1_OUT); out_dim = 6'(C2_OUT); end
      L_POOL2: begin in_dim = 6'(C2_OUT); out_dim = 6'(P2_OUT); end
      default: begin in_dim = 6'(P2_OUT); out_dim = 6'(1);      end
    endcase
  end

  // Address of the word needed at gather step t (conv / FC) or pool step t.
  logic [FM_AW-1:0] g_addr;
  logic [1:0]       g_sel;
  logic             g_vld;
  logic [6:0]       fc_n;
  always_comb begin
    fc_n   = 7'(16 * int'(m_q) + int'(t_q[3:0]));
    g_addr = '0;
    g_sel  = '0;
    g_vld  = 1'b1;
    unique case (layer_q)
      L_CONV1, L_CONV2: begin
        g_addr = FM_AW'((int'(r_q) + int'(t_q[3:2])) * int'(in_dim) + int'(c_q) + int'(t_q[1:0]));
        g_sel  = (layer_q == L_CONV2) ? ci_q : 2'd0;
      end
      L_POOL1, L_POOL2: begin
        g_addr = FM_AW'((2 * int'(r_q) + int'(t_q[1])) * int'(in_dim) + 2 * int'(c_q) + int'(t_q[0]));
      end
      L_FC: begin
        g_vld  = (fc_n < 7'(FC_IN));
        g_sel  = 2'(int'(fc_n) / int'(P2_OUT * P2_OUT));
        g_addr = FM_AW'(int'(fc_n) % int'(P2_OUT * P2_OUT));
      end
      default: ;
    endcase
  end

  // Weight word and bias base of the current PIM operation.
  logic [WM_AW-1:0] w_addr;
  logic [BM_AW-1:0] b_base;
  always_comb begin
    unique case (layer_q)
      L_CONV2: begin w_addr = WM_AW'(WA_CONV2) + WM_AW'(ci_q);
                     b_base = BM_AW'(BA_CONV2); end
      L_FC:    begin w_addr = WM_AW'(int'(WA_FC) + int'(g_q) * int'(FC_CHUNKS) + int'(m_q));
                     b_base = BM_AW'(int'(BA_FC) + int'(g_q) * int'(N_ROW)); end
      default: begin w_addr = WM_AW'(WA_CONV1);
                     b_base = BM_AW'(BA_CONV1); end
    endcase
  end

  // ---------------- arithmetic units ----------------
  logic acc_clr, acc_add;
  bias_t acc_bias [N_ROW];
  acc_t  acc_sum  [N_ROW];
  logic [N_ROW-1:0][DATA_W-1:0] acc_act;

  always_comb begin
    for (int k = 0; k < int'(N_ROW); k++) begin
      logic [BM_AW:0] ba;
      ba = (BM_AW + 1)'(b_base) + (BM_AW + 1)'(k);
      acc_bias[k] = (ba < (BM_AW + 1)'(BM_DEPTH)) ? bmem[ba[BM_AW-1:0]] : '0;
    end
  end

  pim_accum #(.LANES(N_ROW), .W(DATA_W)) u_acc (
    .clk, .rst_n, .clr(acc_clr), .add(acc_add), .yin(sr_yout),
    .bias(acc_bias), .sum(acc_sum), .act(acc_act)
  );

  logic pool_en, pool_first;
  logic [N_CH-1:0][DATA_W-1:0] pool_din, pool_max;
  always_comb for (int k = 0; k < int'(N_CH); k++) pool_din[k] = fm_rd[k];

  max_pool #(.LANES(N_CH), .W(DATA_W)) u_pool (
    .clk, .rst_n, .en(pool_en), .first(pool_first), .din(pool_din), .max(pool_max)
  );

  logic [3:0] best_idx;
  output_ctrl #(.N(N_CLASS), .CW(4)) u_out (
    .scores(scores), .class_idx(best_idx), .class_score()
  );

  // ---------------- datapath control (combinational) ----------------
  logic [FM_AW-1:0] wr_addr;
  assign wr_addr = FM_AW'(int'(r_q) * int'(out_dim) + int'(c_q));
  assign busy    = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done    = (state_q == S_DONE);

  always_comb begin
    fm_ren     = 1'b1;
    fm_raddr_i = busy ? g_addr : fm_raddr;
    fm_wen     = '0;
    fm_waddr   = wr_addr;
    for (int k = 0; k < int'(N_CH); k++) fm_wd[k] = acc_act[k];
    pool_en    = 1'b0;
    pool_first = 1'b0;
    // empty before each pixel / FC group
    acc_clr    = (state_q == S_CLR) || (state_q == S_WRITE) || (state_q == S_FC_WR);
    acc_add    = 1'b0;

    if (!busy) begin
      fm_wen[0] = ifm_we;
      fm_waddr  = ifm_addr;
      fm_wd[0]  = ifm_wdata;
    end
    unique case (state_q)
      S_WRITE:   fm_wen = '1;
      S_POOL_RD: begin
        pool_en    = (t_q != 0);
        pool_first = (t_q == 5'd1);
      end
      S_POOL_WR: begin
        fm_wen = '1;
        for (int k = 0; k < int'(N_CH); k++) fm_wd[k] = pool_max[k];
      end
      S_WAIT:    acc_add = sr_eoc && (layer_q != L_CAL) && (layer_q != L_PIMTEST);
      default: ;
    endcase
  end

  assign sr_en  = busy;
  assign sr_clr = (state_q == S_CLR);
  assign sr_wen = (state_q == S_WLOAD) && (layer_q != L_CAL) &&
                  ((layer_q == L_PIMTEST) || !wload_valid_q || (wload_addr_q != w_addr));
  assign sr_w   = (layer_q == L_PIMTEST) ? pim_w : wmem[w_addr];
  assign sr_den = (state_q == S_DLOAD);
  assign sr_soc = (state_q == S_SOC) && !sr_busy;
  assign sr_cal = (layer_q == L_CAL);
  always_comb for (int i = 0; i < int'(N_COL); i++) sr_data[i] = xbuf_q[i];

  // ---------------- sequencing ----------------
  logic last_col, last_row;
  assign last_col = (c_q == 5'(out_dim - 1));
  assign last_row = (r_q == 5'(out_dim - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      layer_q       <= L_CAL;
      mode_q        <= 1'b0;
      {r_q, c_q}    <= '0;
      ci_q          <= '0;
      m_q           <= '0;
      g_q           <= '0;
      t_q           <= '0;
      sel_d_q       <= '0;
      vld_d_q       <= 1'b0;
      wload_addr_q  <= '0;
      wload_valid_q <= 1'b0;
      class_out     <= '0;
      conv_out      <= '0;
      for (int i = 0; i < int'(N_COL); i++) xbuf_q[i] <= '0;
      for (int j = 0; j < int'(N_CLASS); j++) scores[j] <= '0;
    end else begin
      sel_d_q <= g_sel;
      vld_d_q <= g_vld;
      unique case (state_q)
        S_IDLE, S_DONE: if (start) begin
          mode_q        <= mode;
          layer_q       <= L_CAL;
          wload_valid_q <= 1'b0;
          state_q       <= S_CLR;
        end
        S_CLR: begin                        // PIM cleared, calibration op
          for (int i = 0; i < int'(N_COL); i++) xbuf_q[i] <= '0;
          state_q <= S_WLOAD;
        end
        S_GATHER: begin
          if (t_q != 0) xbuf_q[t_q - 1] <= vld_d_q ? fm_rd[sel_d_q] : '0;
          if (t_q == 5'd16) begin
            t_q     <= '0;
            state_q <= S_WLOAD;
          end else begin
            t_q <= t_q + 1'b1;
          end
        end
        S_WLOAD: begin
          if (sr_wen && layer_q != L_PIMTEST) begin
            wload_addr_q  <= w_addr;
            wload_valid_q <= 1'b1;
          end
          state_q <= S_DLOAD;
        end
        S_DLOAD: state_q <= S_SOC;
        S_SOC:   if (!sr_busy) state_q <= S_WAIT;
        S_WAIT: if (sr_eoc) begin
          conv_out <= sr_yout;
          unique case (layer_q)
            L_CAL: begin
              if (mode_q) begin
                layer_q <= L_PIMTEST;
                for (int i = 0; i < int'(N_COL); i++) xbuf_q[i] <= pim_x[i];
                state_q <= S_WLOAD;
              end else begin
                layer_q    <= L_CONV1;
                {r_q, c_q} <= '0;
                ci_q       <= '0;
                state_q    <= S_GATHER;
              end
            end
            L_PIMTEST: state_q <= S_DONE;
            L_CONV1:   state_q <= S_WRITE;
            L_CONV2: begin
              if (ci_q == 2'(N_CH - 1)) state_q <= S_WRITE;
              else begin
                ci_q    <= ci_q + 1'b1;
                state_q <= S_GATHER;
              end
            end
            L_FC: begin
              if (m_q == 3'(FC_CHUNKS - 1)) state_q <= S_FC_WR;
              else begin
                m_q     <= m_q + 1'b1;
                state_q <= S_GATHER;
              end
            end
            default: state_q <= S_DONE;
          endcase
        end
        S_WRITE: begin                       // one conv output pixel written
          ci_q <= '0;
          if (!last_col) begin
            c_q     <= c_q + 1'b1;
            state_q <= S_GATHER;
          end else if (!last_row) begin
            c_q     <= '0;
            r_q     <= r_q + 1'b1;
            state_q <= S_GATHER;
          end else begin
            {r_q, c_q} <= '0;
            layer_q    <= (layer_q == L_CONV1) ? L_POOL1 : L_POOL2;
            state_q    <= S_POOL_RD;
          end
        end
        S_POOL_RD: begin
          if (t_q == 5'd4) begin
            t_q     <= '0;
            state_q <= S_POOL_WR;
          end else begin
            t_q <= t_q + 1'b1;
          end
        end
        S_POOL_WR: begin
          if (!last_col) begin
            c_q     <= c_q + 1'b1;
            state_q <= S_POOL_RD;
          end else if (!last_row) begin
            c_q     <= '0;
            r_q     <= r_q + 1'b1;
            state_q <= S_POOL_RD;
          end else begin
            {r_q, c_q} <= '0;
            if (layer_q == L_POOL1) begin
              layer_q <= L_CONV2;
              ci_q    <= '0;
            end else begin
              layer_q <= L_FC;
              m_q     <= '0;
              g_q     <= '0;
            end
            state_q <= S_GATHER;
          end
        end
        S_FC_WR: begin                       // scores of one output group
          for (int k = 0; k < int'(N_ROW); k++)
            if (int'(g_q) * int'(N_ROW) + k < int'(N_CLASS))
              scores[int'(g_q) * int'(N_ROW) + k] <= acc_sum[k];
          m_q <= '0;
          if (g_q == 2'(FC_GROUPS - 1)) state_q <= S_CLASS;
          else begin
            g_q     <= g_q + 1'b1;
            state_q <= S_GATHER;
          end
        end
        S_CLASS: begin
          class_out <= best_idx;
          state_q   <= S_DONE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A PIM start is only issued while the PIM is idle.
  a_soc_idle: assert property (@(posedge clk) disable iff (!rst_n) sr_soc |-> !sr_busy);
endmodule
