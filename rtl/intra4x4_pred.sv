// intra4x4_pred: the nine H.264 intra 4x4 luma prediction modes, computed in parallel.
//
// The neighbouring samples are packed into one edge vector
//   e[0..12] = L K J I M A B C D E F G H
// (left column bottom-up, corner, top row, top-right row).  Stage 1 forms every
// shared partial sum once: the 3-tap sums e[k-1]+2e[k]+e[k+1]+2, the 2-tap sums
// e[k]+e[k+1]+1, the DC sum and the two edge sums G+3H+2 and K+3L+2.  This is
// the sharing of common terms between modes that the design is built on: each
// of the nine modes is only a different selection of the same partial sums.
// Stage 2 selects and shifts these sums into the 16 samples of each mode.
//
// Interface: in_valid with the neighbours and availability flags; two clock
// cycles later pred_valid is high for one cycle with pred[mode][raster index]
// and mode_status (bit m = mode m may be used for this block).  Mode numbering
// and mode_status bit order follow the standard (bit 0 = vertical ... bit 8 =
// horizontal-up).  When the top-right samples are unavailable, E..H are
// replaced by D, as the standard requires.  Unavailable neighbours make their
// modes invalid in mode_status; their (meaningless) predictions are still
// produced.  DC uses 128 when neither side is available.
module intra4x4_pred
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rstn,
  input  logic       in_valid,
  input  pix_t       top   [8],   // A..H (E..H ignored when !avail_ur)
  input  pix_t       left  [4],   // I..L
  input  pix_t       corner,      // M
  input  logic       avail_up,
  input  logic       avail_left,
  input  logic       avail_ur,
  output logic       pred_valid,
  output pix_t       pred [NMODES][16],
  output logic [8:0] mode_status
);

  pix_t e [13];
  always_comb begin
    e[0] = left[3]; e[1] = left[2]; e[2] = left[1]; e[3] = left[0];
    e[4] = corner;
    for (int i = 0; i < 4; i++) e[5+i] = top[i];
    for (int i = 4; i < 8; i++) e[5+i] = avail_ur ? top[i] : top[3];
  end

  // ---------------- stage 1: shared partial sums ----------------
  logic [9:0]  t3 [13];      // index 1..11 used
  logic [8:0]  t2 [12];
  logic [10:0] dcsum;
  logic [9:0]  ddl_end, hu_end;
  logic        s1_valid, s1_up, s1_left;
  pix_t        s1_e [13];

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      s1_valid <= 1'b0;
      s1_up    <= 1'b0;
      s1_left  <= 1'b0;
      dcsum    <= '0;
      ddl_end  <= '0;
      hu_end   <= '0;
      for (int k = 0; k < 13; k++) begin t3[k] <= '0; s1_e[k] <= '0; end
      for (int k = 0; k < 12; k++) t2[k] <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_up   <= avail_up;
        s1_left <= avail_left;
        for (int k = 0; k < 13; k++) s1_e[k] <= e[k];
        t3[0]  <= '0;
        t3[12] <= '0;
        for (int k = 1; k < 12; k++)
          t3[k] <= 10'(e[k-1]) + {1'b0, e[k], 1'b0} + 10'(e[k+1]) + 10'd2;
        for (int k = 0; k < 12; k++)
          t2[k] <= 9'(e[k]) + 9'(e[k+1]) + 9'd1;
        ddl_end <= 10'(e[11]) + 10'(e[12]) + {1'b0, e[12], 1'b0} + 10'd2;
        hu_end  <= 10'(e[1]) + 10'(e[0]) + {1'b0, e[0], 1'b0} + 10'd2;
        case ({avail_up, avail_left})
          2'b11:   dcsum <= 11'(e[5]) + 11'(e[6]) + 11'(e[7]) + 11'(e[8]) +
                            11'(e[0]) + 11'(e[1]) + 11'(e[2]) + 11'(e[3]) + 11'd4;
          2'b10:   dcsum <= 11'(e[5]) + 11'(e[6]) + 11'(e[7]) + 11'(e[8]) + 11'd2;
          2'b01:   dcsum <= 11'(e[0]) + 11'(e[1]) + 11'(e[2]) + 11'(e[3]) + 11'd2;
          default: dcsum <= 11'd128;
        endcase
      end
    end
  end

  // ---------------- stage 2: selection and shift ----------------
  function automatic pix_t s3(input logic [9:0] v); return v[9:2]; endfunction
  function automatic pix_t s2(input logic [8:0] v); return v[8:1]; endfunction

  pix_t p [NMODES][16];
  pix_t dcval;
  always_comb begin
    case ({s1_up, s1_left})
      2'b11:        dcval = dcsum[10:3];
      2'b10, 2'b01: dcval = dcsum[9:2];
      default:      dcval = 8'd128;
    endcase
    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        int zvr, zhd, zhu;
        zvr = 2*x - y;
        zhd = 2*y - x;
        zhu = x + 2*y;
        p[M_VERT][4*y+x] = s1_e[5+x];
        p[M_HOR][4*y+x]  = s1_e[3-y];
        p[M_DC][4*y+x]   = dcval;
        p[M_DDL][4*y+x]  = (x+y == 6) ? s3(ddl_end) : s3(t3[6+x+y]);
        p[M_DDR][4*y+x]  = s3(t3[4+x-y]);
        if (zvr >= 0)
          p[M_VR][4*y+x] = (zvr % 2 == 0) ? s2(t2[4+x-(y>>1)]) : s3(t3[4+x-(y>>1)]);
        else if (zvr == -1)
          p[M_VR][4*y+x] = s3(t3[4]);
        else
          p[M_VR][4*y+x] = s3(t3[5-y]);
        if (zhd >= 0)
          p[M_HD][4*y+x] = (zhd % 2 == 0) ? s2(t2[3-y+(x>>1)]) : s3(t3[4-y+(x>>1)]);
        else if (zhd == -1)
          p[M_HD][4*y+x] = s3(t3[4]);
        else
          p[M_HD][4*y+x] = s3(t3[3+x]);
        p[M_VL][4*y+x] = (y % 2 == 0) ? s2(t2[5+x+(y>>1)]) : s3(t3[6+x+(y>>1)]);
        if (zhu > 5)
          p[M_HU][4*y+x] = s1_e[0];
        else if (zhu == 5)
          p[M_HU][4*y+x] = s3(hu_end);
        else
          p[M_HU][4*y+x] = (zhu % 2 == 0) ? s2(t2[2-y-(x>>1)]) : s3(t3[2-y-(x>>1)]);
      end
    end
  end

  logic [8:0] status_s1;
  always_comb begin
    status_s1 = '0;
    status_s1[M_VERT] = s1_up;
    status_s1[M_HOR]  = s1_left;
    status_s1[M_DC]   = 1'b1;
    status_s1[M_DDL]  = s1_up;
    status_s1[M_DDR]  = s1_up & s1_left;
    status_s1[M_VR]   = s1_up & s1_left;
    status_s1[M_HD]   = s1_up & s1_left;
    status_s1[M_VL]   = s1_up;
    status_s1[M_HU]   = s1_left;
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      pred_valid  <= 1'b0;
      mode_status <= '0;
      for (int m = 0; m < NMODES; m++)
        for (int i = 0; i < 16; i++) pred[m][i] <= '0;
    end else begin
      pred_valid <= s1_valid;
      if (s1_valid) begin
        mode_status <= status_s1;
        pred        <= p;
      end
    end
  end

endmodule
