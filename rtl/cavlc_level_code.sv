// cavlc_level_code: level_prefix/level_suffix codes of the non-trailing-one levels.
//
// Waits for the end of the scan (total_coeff and trailing_ones must be known),
// then codes one level per clock in reverse scan order and writes each code
// to the level FIFO port: levelfifo_data[27:0] is the code right-aligned and
// [32:28] its length.  Coding rule: levelCode = 2*level - 2 (level > 0) or
// -2*level - 1 (level < 0), reduced by 2 for the first level when there are
// fewer than three trailing ones; with suffix length s, levelCode < 15 << s
// (or < 14 when s = 0) gives prefix levelCode >> s and an s-bit suffix; s = 0
// with 14 <= levelCode < 30 gives prefix 14 and a 4-bit suffix; otherwise the
// escape prefix 15 with a 12-bit suffix is used.  s starts at 1 when
// total_coeff > 10 and trailing_ones < 3, else at 0; after each level it
// becomes 1 if it was 0, and grows by one (up to 6) when |level| > 3 << (s-1).
// level_read_number counts the codes written for the block.
module cavlc_level_code
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rstn,
  input  logic        start,
  input  logic [4:0]  total_coeff,
  input  logic [1:0]  trailing_ones,
  input  qcoef_t      level [16],
  input  logic [4:0]  level_count,
  output logic        done,
  output logic        levelfifo_wrreq,
  output logic [32:0] levelfifo_data,
  output logic [4:0]  level_read_number
);
  logic       busy;
  logic [4:0] k;
  logic [2:0] sl;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      busy <= 1'b0; k <= '0; sl <= '0; done <= 1'b0;
      levelfifo_wrreq <= 1'b0; levelfifo_data <= '0; level_read_number <= '0;
    end else begin
      done <= 1'b0;
      levelfifo_wrreq <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; k <= '0; level_read_number <= '0;
        sl <= (total_coeff > 5'd10 && trailing_ones < 2'd3) ? 3'd1 : 3'd0;
      end else if (busy) begin
        if (k >= level_count) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          logic signed [16:0] lv;
          logic [16:0] absl, lc;
          logic [4:0]  prefix, slen, len;
          logic [27:0] suffix;
          logic [2:0]  nsl;
          lv   = 17'(level[k[3:0]]);
          absl = 17'(lv < 0 ? -lv : lv);
          lc   = (lv > 0) ? 17'(2*lv - 2) : 17'(-2*lv - 1);
          if (k == 5'd0 && trailing_ones < 2'd3) lc = lc - 17'd2;
          if (sl == 3'd0) begin
            if (lc < 17'd14) begin
              prefix = 5'(lc); slen = 5'd0; suffix = '0;
            end else if (lc < 17'd30) begin
              prefix = 5'd14; slen = 5'd4; suffix = 28'(lc - 17'd14);
            end else begin
              prefix = 5'd15; slen = 5'd12; suffix = 28'(lc - 17'd30);
            end
          end else begin
            if (lc < 17'(17'd15 << sl)) begin
              prefix = 5'(lc >> sl); slen = 5'(sl); suffix = 28'(lc & 17'((17'd1 << sl) - 17'd1));
            end else begin
              prefix = 5'd15; slen = 5'd12; suffix = 28'(lc - 17'(17'd15 << sl));
            end
          end
          len = prefix + 5'd1 + slen;
          levelfifo_data  <= {len, 28'((28'd1 << slen) | suffix)};
          levelfifo_wrreq <= 1'b1;
          level_read_number <= level_read_number + 5'd1;
          nsl = (sl == 3'd0) ? 3'd1 : sl;
          if (absl > (17'd3 << (nsl - 3'd1)) && nsl < 3'd6) nsl = nsl + 3'd1;
          sl <= nsl;
          k  <= k + 5'd1;
        end
      end
    end
  end
endmodule
