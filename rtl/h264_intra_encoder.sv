// h264_intra_encoder: top level of the intra-only luma encoder.
//
// Data flow: video_flow_control stores the incoming 8-bit YYCbYYCr stream
// (chroma dropped) in two 16-line RAMs -> flow_ctrl_4x4 codes every 4x4 luma
// block (intra 4x4 prediction, SATD mode decision, integer transform,
// quantisation and reconstruction) -> coefficient FIFO -> stream writer, which
// drives cavlc, a level FIFO and exp_golomb -> bitstream_packer -> 32-bit
// bitstream words.
//
// Stream written per 4x4 block: the prediction-mode syntax (one bit '1' when
// the chosen mode equals the most probable mode, otherwise '0' and the 3-bit
// remaining mode), then the CAVLC residual (coeff_token, trailing-one signs,
// levels, total_zeros, run_before).  After the 16th block of a macroblock the
// luma coded_block_pattern follows as me(v) (intra).  At the end of a frame
// the last word is padded with zeros.  Every block's residual is written,
// whatever the coded_block_pattern says; there are no parameter sets, slice
// headers, NAL units or chroma data - this element layout is this design's
// own choice, not the macroblock layer of the standard.
//
// Interface (as the encoder ports of the document): clk, rstn (active low,
// asynchronous), active_frame, active_line, pixel_valid, pixel_data[7:0] in;
// bitstream_valid, bitstream[31:0] out.  overrun (the input filled a line RAM
// the encoder had not finished with) and frame_done (the frame's last word
// has been written) are status outputs of this design.
// Timing: coding a macroblock takes about 560 clock cycles, including its
// load from the line RAM. The input carries a macroblock in only 384
// components, so the line timing must leave blanking for the encoder to keep
// up. A blanking period of one line width is enough.
// QP is a parameter; its default of 26 is the initial QP of the document's
// picture parameter set.
//
// Lint notes:
// - Status signals that the stream writer does not need are left unconnected
//   inside: cavlc's next-code and total-coefficient outputs, the level FIFO
//   count, exp_golomb's busy flag and the word counter.
// - rstn is an asynchronous reset for the flops. It also appears in the
//   `disable iff` of the handshake assertions, so a linter can report it as
//   used both synchronously and asynchronously. Assertions generate no logic,
//   so no circuit is affected.
module h264_intra_encoder
  import h264_pkg::*;
#(
  parameter int MAX_WIDTH = 1920,
  parameter int QP        = 26
) (
  input  logic        clk,
  input  logic        rstn,
  input  logic        active_frame,
  input  logic        active_line,
  input  logic        pixel_valid,
  input  logic [7:0]  pixel_data,
  output logic        bitstream_valid,
  output logic [31:0] bitstream,
  output logic        overrun,
  output logic        frame_done
);
  localparam int WAW = $clog2(MAX_WIDTH / 4);

  // ---------------- input buffer ----------------
  logic           row_ready, row_bank, row_done, done_bank, frame_start, frame_end;
  logic [7:0]     row_index, mbs_per_row;
  logic           rd_en, rd_bank;
  logic [3:0]     rd_line;
  logic [WAW-1:0] rd_word;
  logic [31:0]    rd_data;

  video_flow_control #(.MAX_WIDTH(MAX_WIDTH)) u_vfc (
    .clk(clk), .rstn(rstn), .active_frame(active_frame), .active_line(active_line),
    .pixel_valid(pixel_valid), .pixel_data(pixel_data), .row_ready(row_ready),
    .row_bank(row_bank), .row_index(row_index), .row_done(row_done),
    .done_bank(done_bank), .mbs_per_row(mbs_per_row), .frame_start(frame_start), .frame_end(frame_end),
    .overrun(overrun), .rd_en(rd_en), .rd_bank(rd_bank), .rd_line(rd_line),
    .rd_word(rd_word), .rd_data(rd_data));

  // ---------------- block coding loop ----------------
  logic        fc_valid, fc_mb_end, fc_prev_flag, fc_idle, fc_space;
  qcoef_t      fc_quant [16];
  logic [4:0]  fc_nA, fc_nB;
  logic [1:0]  fc_avail;
  logic [2:0]  fc_rem;
  logic [3:0]  fc_cbp;

  flow_ctrl_4x4 #(.MAX_WIDTH(MAX_WIDTH)) u_fc (
    .clk(clk), .rstn(rstn), .qp(6'(QP)), .frame_start(frame_start),
    .row_ready(row_ready), .row_bank(row_bank), .row_index(row_index),
    .mbs_per_row(mbs_per_row), .row_done(row_done), .row_done_bank(done_bank), .rd_en(rd_en), .rd_bank(rd_bank),
    .rd_line(rd_line), .rd_word(rd_word), .rd_data(rd_data), .out_space(fc_space),
    .out_valid(fc_valid), .out_mb_end(fc_mb_end), .out_quant(fc_quant),
    .out_nA(fc_nA), .out_nB(fc_nB), .out_avail(fc_avail), .out_prev_flag(fc_prev_flag),
    .out_rem_mode(fc_rem), .out_cbp(fc_cbp), .idle(fc_idle));

  // ---------------- coefficient FIFO ----------------
  typedef struct packed {
    logic         mb_end;
    logic [3:0]   cbp;
    logic         prev_flag;
    logic [2:0]   rem;
    logic [1:0]   avail;
    logic [4:0]   nA;
    logic [4:0]   nB;
    logic [255:0] quant;
  } rec_t;
  localparam int RW = $bits(rec_t);

  rec_t        rec_in, rec;
  logic        cf_pop, cf_full, cf_empty;
  logic [3:0]  cf_count;
  always_comb begin
    rec_in.mb_end    = fc_mb_end;
    rec_in.cbp       = fc_cbp;
    rec_in.prev_flag = fc_prev_flag;
    rec_in.rem       = fc_rem;
    rec_in.avail     = fc_avail;
    rec_in.nA        = fc_nA;
    rec_in.nB        = fc_nB;
    for (int i = 0; i < 16; i++) rec_in.quant[16*i +: 16] = fc_quant[i];
  end
  sync_fifo #(.WIDTH(RW), .DEPTH(8)) u_cfifo (
    .clk(clk), .rstn(rstn), .push(fc_valid), .din(rec_in), .pop(cf_pop), .dout(rec),
    .full(cf_full), .empty(cf_empty), .count(cf_count));
  assign fc_space = (cf_count <= 4'd5);

  // ---------------- CAVLC ----------------
  qcoef_t      cv_q [16];
  qcoef_t      cv_q2 [4];
  logic        cv_start, cv_read, cv_ready, cv_next, cv_scanning;
  logic [4:0]  cv_tcn, cv_tc_len, cv_lrn;
  logic [15:0] cv_tc;
  logic [1:0]  cv_t1_len;
  logic [2:0]  cv_t1;
  logic [3:0]  cv_tz_len;
  logic [8:0]  cv_tz;
  logic [5:0]  cv_run_len;
  logic [27:0] cv_run;
  logic        lf_wr;
  logic [32:0] lf_data;
  always_comb begin
    for (int i = 0; i < 16; i++) cv_q[i] = qcoef_t'(rec.quant[16*i +: 16]);
    for (int i = 0; i < 4; i++) cv_q2[i] = '0;
  end

  cavlc u_cavlc (
    .clk(clk), .rstn(rstn), .q4x4(cv_q), .q2x2(cv_q2), .cavlc_start(cv_start),
    .nL({1'b0, rec.nA}), .nU({1'b0, rec.nB}), .availability(rec.avail),
    .block_type(BT_LUMA4X4), .data_read(cv_read), .total_coeff_number(cv_tcn),
    .data_ready(cv_ready), .process_next_block(cv_next), .block_scanning(cv_scanning),
    .total_coeff_length(cv_tc_len), .total_coeff(cv_tc), .trailing_one_length(cv_t1_len),
    .trailing_one(cv_t1), .total_zeros_length(cv_tz_len), .total_zeros(cv_tz),
    .run_data_length(cv_run_len), .run_data(cv_run), .levelfifo_wrreq(lf_wr),
    .levelfifo_data(lf_data), .level_read_number(cv_lrn));

  logic        lf_pop, lf_full, lf_empty;
  logic [32:0] lf_dout;
  logic [4:0]  lf_count;
  sync_fifo #(.WIDTH(33), .DEPTH(16)) u_lfifo (
    .clk(clk), .rstn(rstn), .push(lf_wr), .din(lf_data), .pop(lf_pop), .dout(lf_dout),
    .full(lf_full), .empty(lf_empty), .count(lf_count));

  // ---------------- Exp-Golomb (coded_block_pattern) ----------------
  logic        eg_start, eg_busy, eg_valid;
  logic [3:0]  eg_len;
  logic [12:0] eg_code;
  exp_golomb u_eg (
    .clk(clk), .rstn(rstn), .exp_golomb_start(eg_start), .exp_golomb_k_param({2'b00, rec.cbp}),
    .exp_golomb_mode(EG_ME), .exp_golomb_mode_p(1'b0), .exp_golomb_te_max1(1'b0),
    .exp_golomb_busy(eg_busy), .exp_golomb_valid(eg_valid), .exp_golomb_length(eg_len),
    .exp_golomb_output(eg_code));

  // ---------------- stream writer ----------------
  typedef enum logic [3:0] {
    W_IDLE, W_EG, W_CAVLC, W_T1, W_LEV, W_TZ, W_RUN, W_DONE, W_FLUSH
  } wstate_e;
  wstate_e     ws;
  logic [4:0]  lev_left;
  logic        em_valid;
  logic [31:0] em_code;
  logic [5:0]  em_len;
  logic        flush_req, pk_flush, pk_pending;
  logic [31:0] words_out;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      ws <= W_IDLE; lev_left <= '0; em_valid <= 1'b0; em_code <= '0; em_len <= '0;
      cv_start <= 1'b0; cv_read <= 1'b0; cf_pop <= 1'b0; lf_pop <= 1'b0; eg_start <= 1'b0;
      flush_req <= 1'b0; pk_flush <= 1'b0; frame_done <= 1'b0;
    end else begin
      em_valid   <= 1'b0;
      cv_start   <= 1'b0;
      cv_read    <= 1'b0;
      cf_pop     <= 1'b0;
      lf_pop     <= 1'b0;
      eg_start   <= 1'b0;
      pk_flush   <= 1'b0;
      frame_done <= 1'b0;
      if (frame_end) flush_req <= 1'b1;
      case (ws)
        W_IDLE: begin
          if (!cf_empty && !cf_pop) begin
            if (rec.mb_end) begin
              eg_start <= 1'b1;
              ws       <= W_EG;
            end else begin
              em_valid <= 1'b1;
              em_code  <= rec.prev_flag ? 32'd1 : {28'd0, 1'b0, rec.rem};
              em_len   <= rec.prev_flag ? 6'd1 : 6'd4;
              cv_start <= 1'b1;
              cf_pop   <= 1'b1;
              ws       <= W_CAVLC;
            end
          end else if (flush_req && cf_empty && !cf_pop && fc_idle && !fc_valid) begin
            ws <= W_FLUSH;
          end
        end
        W_EG: if (eg_valid) begin
          em_valid <= 1'b1;
          em_code  <= {19'd0, eg_code};
          em_len   <= {2'b00, eg_len};
          cf_pop   <= 1'b1;
          ws       <= W_IDLE;
        end
        W_CAVLC: if (cv_ready) begin
          em_valid <= (cv_tc_len != '0);
          em_code  <= {16'd0, cv_tc};
          em_len   <= {1'b0, cv_tc_len};
          lev_left <= cv_lrn;
          ws       <= W_T1;
        end
        W_T1: begin
          em_valid <= (cv_t1_len != '0);
          em_code  <= {29'd0, cv_t1};
          em_len   <= {4'd0, cv_t1_len};
          ws       <= W_LEV;
        end
        W_LEV: begin
          if (lev_left == '0) ws <= W_TZ;
          else if (!lf_empty && !lf_pop) begin
            em_valid <= 1'b1;
            em_code  <= {4'd0, lf_dout[27:0]};
            em_len   <= {1'b0, lf_dout[32:28]};
            lf_pop   <= 1'b1;
            lev_left <= lev_left - 5'd1;
          end
        end
        W_TZ: begin
          em_valid <= (cv_tz_len != '0);
          em_code  <= {23'd0, cv_tz};
          em_len   <= {2'b00, cv_tz_len};
          ws       <= W_RUN;
        end
        W_RUN: begin
          em_valid <= (cv_run_len != '0);
          em_code  <= {4'd0, cv_run};
          em_len   <= cv_run_len;
          cv_read  <= 1'b1;
          ws       <= W_DONE;
        end
        W_DONE: if (!cv_scanning) ws <= W_IDLE;
        W_FLUSH: begin
          // wait for the last code to enter the packer, then pad the word
          if (!em_valid && !pk_flush) begin
            if (pk_pending) pk_flush <= 1'b1;
            else begin
              flush_req  <= frame_end;
              frame_done <= 1'b1;
              ws         <= W_IDLE;
            end
          end
        end
        default: ws <= W_IDLE;
      endcase
    end
  end

  bitstream_packer u_pack (
    .clk(clk), .rstn(rstn), .in_valid(em_valid), .in_code(em_code), .in_len(em_len),
    .flush(pk_flush), .bitstream_valid(bitstream_valid), .bitstream(bitstream),
    .words_out(words_out), .pending(pk_pending));

  // the FIFOs are sized so that they never overflow
  assert property (@(posedge clk) disable iff (!rstn) !(fc_valid && cf_full));
  assert property (@(posedge clk) disable iff (!rstn) !(lf_wr && lf_full));
endmodule
