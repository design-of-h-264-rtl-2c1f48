// cavlc: context-adaptive variable length coder for one block of quantised
// coefficients (luma 4x4, 15-coefficient AC, or 2x2 chroma DC).
//
// Structure: zig-zag scan (1 cycle) -> scanned data control (one cycle per
// coefficient position) -> four units in parallel: total coeff (coeff_token,
// 3 cycles), total zeros (1 cycle), run code control (one cycle per coded run
// plus one) and level code control (one cycle per level plus one) -> bitstream
// control, which raises data_ready when all four are finished and holds the
// codes until the consumer pulses data_read (process_next_block then pulses).
// The level codes are not held here: they are written, one per cycle, to an
// external level FIFO through levelfifo_wrreq / levelfifo_data, and
// level_read_number says how many belong to the block.
//
// Handshake: cavlc_start is accepted when block_scanning is low; the inputs
// must be valid in that cycle.  block_scanning stays high until the block's
// codes have been read, so blocks are coded one after another.
// Output order in the bitstream: coeff_token, trailing-one signs, level
// codes, total_zeros, run codes.
// availability: bit 0 = left block available, bit 1 = upper block available.
//
// Lint note: the scan controller's busy output is not used. Completion is
// taken from its done pulse.
module cavlc
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rstn,
  input  qcoef_t      q4x4 [16],
  input  qcoef_t      q2x2 [4],
  input  logic        cavlc_start,
  input  logic [5:0]  nL,
  input  logic [5:0]  nU,
  input  logic [1:0]  availability,
  input  block_type_e block_type,
  input  logic        data_read,
  output logic [4:0]  total_coeff_number,
  output logic        data_ready,
  output logic        process_next_block,
  output logic        block_scanning,
  output logic [4:0]  total_coeff_length,
  output logic [15:0] total_coeff,
  output logic [1:0]  trailing_one_length,
  output logic [2:0]  trailing_one,
  output logic [3:0]  total_zeros_length,
  output logic [8:0]  total_zeros,
  output logic [5:0]  run_data_length,
  output logic [27:0] run_data,
  output logic        levelfifo_wrreq,
  output logic [32:0] levelfifo_data,
  output logic [4:0]  level_read_number
);

  logic        accept;
  logic [5:0]  nL_q, nU_q;
  logic [1:0]  avail_q;
  logic        cdc_q;
  assign accept = cavlc_start && !block_scanning;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      block_scanning <= 1'b0;
      nL_q <= '0; nU_q <= '0; avail_q <= '0; cdc_q <= 1'b0;
    end else begin
      if (accept) begin
        block_scanning <= 1'b1;
        nL_q <= nL; nU_q <= nU; avail_q <= availability;
        cdc_q <= (block_type == BT_CHROMA_DC);
      end else if (data_ready && data_read) begin
        block_scanning <= 1'b0;
      end
    end
  end

  // zig-zag scan
  logic       scan_end;
  qcoef_t     sc [16];
  logic [4:0] max_coeff;
  cavlc_zigzag u_zz (
    .clk(clk), .rstn(rstn), .start(accept), .block_type(block_type),
    .q4x4(q4x4), .q2x2(q2x2), .scan_end(scan_end), .sc(sc), .max_coeff(max_coeff));

  // scanned data control
  logic       sd_busy, sd_done;
  logic [4:0] tc;
  logic [1:0] t1;
  logic [2:0] t1s;
  logic [3:0] tz;
  qcoef_t     lev [16];
  logic [4:0] lev_cnt;
  logic [3:0] runs [16];
  cavlc_scan_ctrl u_sd (
    .clk(clk), .rstn(rstn), .start(scan_end), .sc(sc), .max_coeff(max_coeff),
    .busy(sd_busy), .done(sd_done), .total_coeff(tc), .trailing_ones(t1),
    .t1_sign(t1s), .total_zeros(tz), .level(lev), .level_count(lev_cnt), .run(runs));

  // parallel code generation
  logic        tcf_done, tzf_done, run_done, lev_done;
  logic [4:0]  tc_len;
  logic [15:0] tc_code;
  logic [3:0]  tz_len;
  logic [8:0]  tz_code;
  logic [5:0]  rn_len;
  logic [27:0] rn_code;

  cavlc_total_coeff u_tc (
    .clk(clk), .rstn(rstn), .start(sd_done), .chroma_dc(cdc_q), .nL(nL_q), .nU(nU_q),
    .availability(avail_q), .total_coeff(tc), .trailing_ones(t1),
    .done(tcf_done), .total_coeff_length(tc_len), .total_coeff_code(tc_code));

  cavlc_total_zeros u_tz (
    .clk(clk), .rstn(rstn), .start(sd_done), .chroma_dc(cdc_q), .max_coeff(max_coeff),
    .total_coeff(tc), .total_zeros(tz), .done(tzf_done),
    .total_zeros_length(tz_len), .total_zeros_data(tz_code));

  cavlc_run_code u_run (
    .clk(clk), .rstn(rstn), .start(sd_done), .total_coeff(tc), .total_zeros(tz),
    .run(runs), .done(run_done), .run_data_length(rn_len), .run_data(rn_code));

  cavlc_level_code u_lev (
    .clk(clk), .rstn(rstn), .start(sd_done), .total_coeff(tc), .trailing_ones(t1),
    .level(lev), .level_count(lev_cnt), .done(lev_done),
    .levelfifo_wrreq(levelfifo_wrreq), .levelfifo_data(levelfifo_data),
    .level_read_number(level_read_number));

  // bitstream control
  logic [3:0] got;
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      got <= '0; data_ready <= 1'b0; process_next_block <= 1'b0;
      total_coeff_number <= '0; total_coeff_length <= '0; total_coeff <= '0;
      trailing_one_length <= '0; trailing_one <= '0; total_zeros_length <= '0;
      total_zeros <= '0; run_data_length <= '0; run_data <= '0;
    end else begin
      process_next_block <= 1'b0;
      if (tcf_done) begin
        got[0] <= 1'b1;
        total_coeff_length <= tc_len;
        total_coeff        <= tc_code;
        total_coeff_number <= tc;
        trailing_one_length <= t1;
        case (t1)
          2'd1:    trailing_one <= {2'b00, t1s[0]};
          2'd2:    trailing_one <= {1'b0, t1s[0], t1s[1]};
          2'd3:    trailing_one <= {t1s[0], t1s[1], t1s[2]};
          default: trailing_one <= 3'b000;
        endcase
      end
      if (tzf_done) begin
        got[1] <= 1'b1;
        total_zeros_length <= tz_len;
        total_zeros        <= tz_code;
      end
      if (run_done) begin
        got[2] <= 1'b1;
        run_data_length <= rn_len;
        run_data        <= rn_code;
      end
      if (lev_done) got[3] <= 1'b1;
      if (got == 4'b1111 && !data_ready) begin
        data_ready <= 1'b1;
        got <= '0;
      end
      if (data_ready && data_read) begin
        data_ready <= 1'b0;
        process_next_block <= 1'b1;
      end
    end
  end

endmodule
