// flow_ctrl_4x4: the 4x4 intra coding loop for luma macroblocks.
//
// For every macroblock row handed over by video_flow_control it reads each
// 16x16 macroblock from the line RAM (64 words, one per cycle) and codes its
// sixteen 4x4 blocks in the order of the standard (8x8 quadrants in raster
// order, 4x4 blocks in raster order inside each quadrant).  Per block:
//   neighbours -> intra4x4_pred (2 cycles) -> residual_calc (2) ->
//   mode_select_4x4 (6) -> forward_transform (2) -> quant_iquant (4 / 7) ->
//   inverse_integer_transform (3) -> reconstruction (prediction + residual,
//   clipped to 0..255), which becomes the neighbour of the next blocks.
// A block therefore takes about 24 cycles, a macroblock about 450 including
// the 65-cycle load.  Blocks are coded one after another because each one
// needs the reconstructed samples of the previous ones.
//
// Neighbour storage: the reconstructed bottom line of the macroblock row
// above (top_line, MAX_WIDTH samples), the right column of the macroblock to
// the left (left_col), the current macroblock (mb_recon), and the chosen modes
// and non-zero coefficient counts of the blocks above / left / inside.  The
// corner sample of block 0 is saved before the bottom line is overwritten.
// Top-right samples are taken as available only when that block has already
// been coded (inside the macroblock row above, or earlier in this macroblock).
//
// Output: one record per block on out_valid (quantised levels in raster
// order, nA / nB and their availability for CAVLC, the prediction-mode flag /
// remaining mode) and, after block 15, one record with out_mb_end and the
// luma coded_block_pattern.  A block is only started when out_space is high
// (the consumer can take two records).  The mode decision uses qp.
// Timing: row_done pulses when the last macroblock of a row is finished;
// idle is high when no row is waiting or being coded.
//
// Lint note: mode_select_4x4's best_cost output is not needed here (only the
// mode and its residual are), so it is left unused.
module flow_ctrl_4x4
  import h264_pkg::*;
#(
  parameter int MAX_WIDTH = 1920
) (
  input  logic        clk,
  input  logic        rstn,
  input  logic [5:0]  qp,
  input  logic        frame_start,
  input  logic        row_ready,
  input  logic        row_bank,
  input  logic [7:0]  row_index,
  input  logic [7:0]  mbs_per_row,
  output logic        row_done,
  output logic        row_done_bank,
  output logic        rd_en,
  output logic        rd_bank,
  output logic [3:0]  rd_line,
  output logic [$clog2(MAX_WIDTH/4)-1:0] rd_word,
  input  logic [31:0] rd_data,
  input  logic        out_space,
  output logic        out_valid,
  output logic        out_mb_end,
  output qcoef_t      out_quant [16],
  output logic [4:0]  out_nA,
  output logic [4:0]  out_nB,
  output logic [1:0]  out_avail,      // bit 0 left, bit 1 up
  output logic        out_prev_flag,  // prev_intra4x4_pred_mode_flag
  output logic [2:0]  out_rem_mode,   // rem_intra4x4_pred_mode
  output logic [3:0]  out_cbp,
  output logic        idle
);
  localparam int WORDS = MAX_WIDTH / 4;
  localparam int WAW   = $clog2(WORDS);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_BLOCK, S_WAIT, S_MBEND} state_e;
  state_e state;

  // ---------------- row bookkeeping ----------------
  logic [1:0] row_pend;
  logic [7:0] pend_idx [2];
  logic       cur_bank;
  logic [7:0] cur_row;
  logic [7:0] mbx;

  // ---------------- storage ----------------
  pix_t        orig_mb  [16][16];
  pix_t        mb_recon [16][16];
  logic [31:0] top_line [WORDS];
  pix_t        left_col [16];
  pix_t        corner_reg;
  mode_t       top_mode [WORDS];
  logic [4:0]  top_nz   [WORDS];
  mode_t       left_mode_r [4];
  logic [4:0]  left_nz  [4];
  mode_t       mb_mode  [16];       // index by*4+bx
  logic [4:0]  mb_nz    [16];
  logic [3:0]  cbp;

  logic [6:0]  ld_cnt;              // load counter 0..64
  logic        ld_v;
  logic [5:0]  ld_addr_q;
  logic [3:0]  blk;                 // block index in coding order

  // block coordinates (coding order -> x, y)
  logic [1:0] bx, by;
  assign bx = {blk[2], blk[0]};
  assign by = {blk[3], blk[1]};
  logic [3:0] rpos;                 // raster position of the block
  assign rpos = {by, bx};

  wire [WAW-1:0] wbase = WAW'({mbx, 2'b00}) + WAW'(bx);

  // ---------------- availability ----------------
  logic avail_left, avail_up, avail_ur;
  logic last_mb;
  assign last_mb = (mbx == mbs_per_row - 8'd1);
  // index in coding order of the block at (x, y) inside the macroblock
  function automatic logic [3:0] order_of(input logic [1:0] x, input logic [1:0] y);
    return {y[1], x[1], y[0], x[0]};
  endfunction
  always_comb begin
    avail_left = (bx != 2'd0) || (mbx != 8'd0);
    avail_up   = (by != 2'd0) || (cur_row != 8'd0);
    if (by == 2'd0)
      avail_ur = (cur_row != 8'd0) && ((bx != 2'd3) || !last_mb);
    else if (bx == 2'd3)
      avail_ur = 1'b0;
    else
      avail_ur = order_of(bx + 2'd1, by - 2'd1) < blk;
  end

  // ---------------- neighbour samples ----------------
  pix_t nb_top [8];
  pix_t nb_left [4];
  pix_t nb_corner;
  pix_t cur_orig [16];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (by == 2'd0) begin
        nb_top[i]   = top_line[wbase][8*i +: 8];
        nb_top[i+4] = top_line[wbase + WAW'(1)][8*i +: 8];
      end else begin
        nb_top[i]   = mb_recon[{by, 2'b00} - 4'd1][{bx, 2'b00} + 4'(i)];
        nb_top[i+4] = (bx == 2'd3) ? nb_top[3] : mb_recon[{by, 2'b00} - 4'd1][{bx, 2'b00} + 4'(i + 4)];
      end
      if (bx == 2'd0) nb_left[i] = left_col[{by, 2'b00} + 4'(i)];
      else            nb_left[i] = mb_recon[{by, 2'b00} + 4'(i)][{bx, 2'b00} - 4'd1];
    end
    if (bx == 2'd0 && by == 2'd0) nb_corner = corner_reg;
    else if (bx == 2'd0)          nb_corner = left_col[{by, 2'b00} - 4'd1];
    else if (by == 2'd0)          nb_corner = top_line[wbase - WAW'(1)][31:24];
    else                          nb_corner = mb_recon[{by, 2'b00} - 4'd1][{bx, 2'b00} - 4'd1];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        cur_orig[4*r+c] = orig_mb[{by, 2'b00} + 4'(r)][{bx, 2'b00} + 4'(c)];
  end

  // neighbouring block modes and coefficient counts
  mode_t      nb_lmode, nb_umode;
  logic [4:0] nb_lnz, nb_unz;
  always_comb begin
    if (bx == 2'd0) begin nb_lmode = left_mode_r[by]; nb_lnz = left_nz[by]; end
    else begin nb_lmode = mb_mode[{by, bx - 2'd1}]; nb_lnz = mb_nz[{by, bx - 2'd1}]; end
    if (by == 2'd0) begin nb_umode = top_mode[wbase]; nb_unz = top_nz[wbase]; end
    else begin nb_umode = mb_mode[{by - 2'd1, bx}]; nb_unz = mb_nz[{by - 2'd1, bx}]; end
  end

  // ---------------- datapath ----------------
  logic       blk_start;
  logic       pred_valid;
  pix_t       pred [NMODES][16];
  logic [8:0] mode_status;
  logic       res_valid;
  res_t       res [NMODES][16];
  logic       best_valid;
  mode_t      best_mode, mpm;
  logic [COST_W-1:0] best_cost;
  res_t       best_res [16];
  logic       ft_valid;
  coef_t      ft [16];
  logic       q_busy, q_valid, iq_valid;
  qcoef_t     q [16];
  dq_t        iq [16];
  logic       it_valid;
  itr_t       it [16];

  intra4x4_pred u_pred (
    .clk(clk), .rstn(rstn), .in_valid(blk_start), .top(nb_top), .left(nb_left),
    .corner(nb_corner), .avail_up(avail_up), .avail_left(avail_left), .avail_ur(avail_ur),
    .pred_valid(pred_valid), .pred(pred), .mode_status(mode_status));

  residual_calc u_res (
    .clk(clk), .rstn(rstn), .pred_valid(pred_valid), .orig(cur_orig), .pred(pred),
    .res_valid(res_valid), .res(res));

  mode_select_4x4 u_ms (
    .clk(clk), .rstn(rstn), .res_valid(res_valid), .res(res), .mode_status(mode_status),
    .left_mode(nb_lmode), .upper_mode(nb_umode), .left_avail(avail_left),
    .upper_avail(avail_up), .qp(qp), .best_4x4_mode_valid(best_valid),
    .best_4x4_mode(best_mode), .mpm_out(mpm), .best_cost(best_cost), .best_res(best_res));

  forward_transform u_ft (
    .clk(clk), .rstn(rstn), .residual_valid(best_valid), .res4x4(best_res),
    .integer_transform_valid(ft_valid), .integer_transform(ft));

  quant_iquant u_q (
    .clk(clk), .rstn(rstn), .integer_transform_valid(ft_valid), .integer_transform(ft),
    .qp(qp), .busy(q_busy), .quant_valid(q_valid), .quant(q),
    .inverse_quant_valid(iq_valid), .inverse_quant(iq));

  inverse_integer_transform u_it (
    .clk(clk), .rstn(rstn), .inverse_quant_valid(iq_valid), .inverse_quant(iq),
    .inverse_trans_valid(it_valid), .inverse_trans(it));

  // prediction of the chosen mode, kept for the reconstruction
  pix_t       best_pred [16];
  mode_t      best_mode_q;
  logic [4:0] nz_cnt;
  always_comb begin
    nz_cnt = '0;
    for (int i = 0; i < 16; i++) nz_cnt = nz_cnt + 5'(q[i] != '0);
  end

  pix_t recon [16];
  always_comb begin
    logic signed [15:0] s;
    for (int i = 0; i < 16; i++) begin
      s = 16'(signed'({1'b0, best_pred[i]})) + 16'(it[i]);
      recon[i] = (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : s[7:0];
    end
  end

  assign idle = (state == S_IDLE) && (row_pend == 2'b00);
  assign rd_bank = cur_bank;

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state <= S_IDLE; row_pend <= '0; pend_idx[0] <= '0; pend_idx[1] <= '0;
      cur_bank <= 1'b0; cur_row <= '0; mbx <= '0; row_done <= 1'b0; row_done_bank <= 1'b0;
      rd_en <= 1'b0; rd_line <= '0; rd_word <= '0; ld_cnt <= '0; ld_v <= 1'b0; ld_addr_q <= '0;
      blk <= '0; blk_start <= 1'b0; cbp <= '0; corner_reg <= '0; best_mode_q <= '0;
      out_valid <= 1'b0; out_mb_end <= 1'b0; out_nA <= '0; out_nB <= '0; out_avail <= '0;
      out_prev_flag <= 1'b0; out_rem_mode <= '0; out_cbp <= '0;
      for (int i = 0; i < 16; i++) begin
        out_quant[i] <= '0; left_col[i] <= '0; mb_mode[i] <= '0; mb_nz[i] <= '0; best_pred[i] <= '0;
        for (int j = 0; j < 16; j++) begin orig_mb[i][j] <= '0; mb_recon[i][j] <= '0; end
      end
      for (int i = 0; i < 4; i++) begin left_mode_r[i] <= '0; left_nz[i] <= '0; end
      for (int i = 0; i < WORDS; i++) begin top_line[i] <= '0; top_mode[i] <= '0; top_nz[i] <= '0; end
    end else begin
      row_done   <= 1'b0;
      rd_en      <= 1'b0;
      blk_start  <= 1'b0;
      out_valid  <= 1'b0;
      out_mb_end <= 1'b0;
      if (row_ready) begin
        row_pend[row_bank] <= 1'b1;
        pend_idx[row_bank] <= row_index;
      end
      if (frame_start && state == S_IDLE) cur_bank <= 1'b0;

      // load data returning from the line RAM
      ld_v      <= rd_en;
      ld_addr_q <= {rd_line, rd_word[1:0]};
      if (ld_v)
        for (int k = 0; k < 4; k++)
          orig_mb[ld_addr_q[5:2]][{ld_addr_q[1:0], 2'b00} + 4'(k)] <= rd_data[8*k +: 8];

      case (state)
        S_IDLE: if (row_pend[cur_bank]) begin
          cur_row <= pend_idx[cur_bank];
          mbx     <= '0;
          ld_cnt  <= '0;
          state   <= S_LOAD;
        end
        S_LOAD: begin
          if (ld_cnt < 7'd64) begin
            rd_en   <= 1'b1;
            rd_line <= ld_cnt[5:2];
            rd_word <= WAW'({mbx, ld_cnt[1:0]});
            ld_cnt  <= ld_cnt + 7'd1;
          end else if (!rd_en && !ld_v) begin
            blk   <= '0;
            cbp   <= '0;
            state <= S_BLOCK;
          end
        end
        S_BLOCK: if (out_space) begin
          blk_start <= 1'b1;
          state     <= S_WAIT;
        end
        S_WAIT: begin
          if (best_valid) begin
            best_mode_q <= best_mode;
            for (int i = 0; i < 16; i++) best_pred[i] <= pred[best_mode][i];
          end
          if (q_valid) begin
            out_valid     <= 1'b1;
            out_quant     <= q;
            out_nA        <= nb_lnz;
            out_nB        <= nb_unz;
            out_avail     <= {avail_up, avail_left};
            out_prev_flag <= (best_mode_q == mpm);
            out_rem_mode  <= (best_mode_q < mpm) ? best_mode_q[2:0] : 3'(best_mode_q - 4'd1);
            mb_nz[rpos]   <= nz_cnt;
            mb_mode[rpos] <= best_mode_q;
            if (nz_cnt != '0) cbp[{by[1], bx[1]}] <= 1'b1;
          end
          if (it_valid) begin
            for (int r = 0; r < 4; r++)
              for (int c = 0; c < 4; c++)
                mb_recon[{by, 2'b00} + 4'(r)][{bx, 2'b00} + 4'(c)] <= recon[4*r+c];
            if (by == 2'd3) begin
              top_line[wbase] <= {recon[15], recon[14], recon[13], recon[12]};
              top_mode[wbase] <= best_mode_q;
              top_nz[wbase]   <= mb_nz[rpos];
              if (bx == 2'd3) corner_reg <= top_line[wbase][31:24];
            end
            if (blk == 4'd15) state <= S_MBEND;
            else begin
              blk   <= blk + 4'd1;
              state <= S_BLOCK;
            end
          end
        end
        S_MBEND: begin
          out_valid  <= 1'b1;
          out_mb_end <= 1'b1;
          out_cbp    <= cbp;
          for (int r = 0; r < 16; r++) left_col[r] <= mb_recon[r][15];
          for (int r = 0; r < 4; r++) begin
            left_mode_r[r] <= mb_mode[{2'(r), 2'd3}];
            left_nz[r]     <= mb_nz[{2'(r), 2'd3}];
          end
          if (last_mb) begin
            row_done <= 1'b1;
            row_done_bank <= cur_bank;
            row_pend[cur_bank] <= 1'b0;
            cur_bank <= ~cur_bank;
            state    <= S_IDLE;
          end else begin
            mbx    <= mbx + 8'd1;
            ld_cnt <= '0;
            state  <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a new block never enters while the quantiser is still busy
  assert property (@(posedge clk) disable iff (!rstn) blk_start |-> !q_busy);
endmodule
