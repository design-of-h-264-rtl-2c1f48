// h264_pkg: types, constants and table look-ups shared by the intra 4x4 encoder.
//
// Holds the sample/residual/coefficient types, the quantiser multiplication
// factors (MF) and rescaling factors (V) of the H.264 4x4 core transform, the
// Lagrange multiplier table used by the 4x4 mode decision, the 4x4 and 2x2
// zig-zag scans, and the CAVLC code tables (coeff_token, total_zeros,
// run_before) plus the coded_block_pattern mapping used by me(v) Exp-Golomb.
// All functions are pure combinational look-ups; modules that want the
// ROM-with-one-cycle-latency behaviour register the result themselves.
//
// The MF/V tables, the QP-dependent offset and the table contents follow the
// H.264 baseline profile.  The lambda table is lambda(QP) =
// round(sqrt(0.85 * 2^((QP-12)/3))), at least 1 (so lambda(40) = 23).
package h264_pkg;

  typedef logic        [7:0]  pix_t;    // 8-bit sample
  typedef logic signed [8:0]  res_t;    // residual, -255..255
  typedef logic signed [14:0] coef_t;   // forward transform output
  typedef logic signed [15:0] qcoef_t;  // quantised level (within +-2063)
  typedef logic signed [17:0] dq_t;     // rescaled (inverse-quantised) value
  typedef logic signed [14:0] itr_t;    // inverse transform output
  typedef logic        [3:0]  mode_t;   // 4x4 intra prediction mode 0..8

  localparam int NMODES = 9;
  localparam int COST_W = 22;           // cost width; an invalid mode costs all ones
  localparam int QLIMIT = 2063;         // CAVLC level limit (baseline)

  // Prediction modes (numbering of the standard).
  typedef enum logic [3:0] {
    M_VERT = 4'd0, M_HOR = 4'd1, M_DC = 4'd2, M_DDL = 4'd3, M_DDR = 4'd4,
    M_VR = 4'd5, M_HD = 4'd6, M_VL = 4'd7, M_HU = 4'd8
  } pred_mode_e;

  // CAVLC block types (block_type input).
  typedef enum logic [1:0] {
    BT_LUMA4X4 = 2'b00, BT_AC = 2'b01, BT_CHROMA_DC = 2'b10
  } block_type_e;

  // Exp-Golomb mapping types (exp_golomb_mode input).
  typedef enum logic [1:0] {
    EG_UE = 2'b00, EG_SE = 2'b01, EG_ME = 2'b10, EG_TE = 2'b11
  } eg_map_e;

  // Position class of a 4x4 coefficient: 0 for (even,even), 1 for (odd,odd),
  // 2 otherwise.  idx is the raster index row*4+col.
  function automatic logic [1:0] pos_class(input logic [3:0] idx);
    if (!idx[0] && !idx[2]) return 2'd0;
    if (idx[0] && idx[2])   return 2'd1;
    return 2'd2;
  endfunction

  // Forward quantisation multiplication factor MF(QP%6, position).
  function automatic logic [13:0] mf(input logic [2:0] rem, input logic [1:0] pc);
    logic [13:0] t [6][3];
    t = '{'{14'd13107, 14'd5243, 14'd8066}, '{14'd11916, 14'd4660, 14'd7490},
          '{14'd10082, 14'd4194, 14'd6554}, '{14'd9362, 14'd3647, 14'd5825},
          '{14'd8192, 14'd3355, 14'd5243}, '{14'd7282, 14'd2893, 14'd4559}};
    return t[rem][pc];
  endfunction

  // Rescaling factor V(QP%6, position).
  function automatic logic [4:0] vscale(input logic [2:0] rem, input logic [1:0] pc);
    logic [4:0] t [6][3];
    t = '{'{5'd10, 5'd16, 5'd13}, '{5'd11, 5'd18, 5'd14}, '{5'd13, 5'd20, 5'd16},
          '{5'd14, 5'd23, 5'd18}, '{5'd16, 5'd25, 5'd20}, '{5'd18, 5'd29, 5'd23}};
    return t[rem][pc];
  endfunction

  // Lagrange multiplier of the 4x4 mode decision, QP 0..51.
  function automatic logic [6:0] lambda_of(input logic [5:0] qp);
    logic [6:0] t [52];
    t = '{7'd1, 7'd1, 7'd1, 7'd1, 7'd1, 7'd1, 7'd1, 7'd1, 7'd1, 7'd1, 7'd1, 7'd1,
          7'd1, 7'd1, 7'd1, 7'd1, 7'd1, 7'd2, 7'd2, 7'd2, 7'd2, 7'd3, 7'd3, 7'd3,
          7'd4, 7'd4, 7'd5, 7'd5, 7'd6, 7'd7, 7'd7, 7'd8, 7'd9, 7'd10, 7'd12, 7'd13,
          7'd15, 7'd17, 7'd19, 7'd21, 7'd23, 7'd26, 7'd30, 7'd33, 7'd37, 7'd42,
          7'd47, 7'd53, 7'd59, 7'd66, 7'd74, 7'd83};
    return (qp > 6'd51) ? t[51] : t[qp];
  endfunction

  // 4x4 zig-zag scan: scan index -> raster index (row*4+col).
  function automatic logic [3:0] zigzag4(input logic [3:0] i);
    logic [3:0] t [16];
    t = '{4'd0, 4'd1, 4'd4, 4'd8, 4'd5, 4'd2, 4'd3, 4'd6,
          4'd9, 4'd12, 4'd13, 4'd10, 4'd7, 4'd11, 4'd14, 4'd15};
    return t[i];
  endfunction

  // A variable-length code: length in bits and the code right-aligned.
  typedef struct packed {
    logic [4:0]  len;
    logic [15:0] code;
  } vlc16_t;

  // coeff_token.  tab: 0 (0<=nC<2), 1 (2<=nC<4), 2 (4<=nC<8), 3 (8<=nC,
  // 6-bit fixed length), 4 (nC=-1, chroma DC 4:2:0).
  function automatic vlc16_t coeff_token(input logic [2:0] tab, input logic [4:0] tc,
                                         input logic [1:0] t1);
    vlc16_t r;
    r = '0;
    case ({tab, tc, t1})
      {3'd0, 5'd0, 2'd0}: r = '{5'd1, 16'b1};
      {3'd0, 5'd1, 2'd0}: r = '{5'd6, 16'b000101};
      {3'd0, 5'd1, 2'd1}: r = '{5'd2, 16'b01};
      {3'd0, 5'd2, 2'd0}: r = '{5'd8, 16'b00000111};
      {3'd0, 5'd2, 2'd1}: r = '{5'd6, 16'b000100};
      {3'd0, 5'd2, 2'd2}: r = '{5'd3, 16'b001};
      {3'd0, 5'd3, 2'd0}: r = '{5'd9, 16'b000000111};
      {3'd0, 5'd3, 2'd1}: r = '{5'd8, 16'b00000110};
      {3'd0, 5'd3, 2'd2}: r = '{5'd7, 16'b0000101};
      {3'd0, 5'd3, 2'd3}: r = '{5'd5, 16'b00011};
      {3'd0, 5'd4, 2'd0}: r = '{5'd10, 16'b0000000111};
      {3'd0, 5'd4, 2'd1}: r = '{5'd9, 16'b000000110};
      {3'd0, 5'd4, 2'd2}: r = '{5'd8, 16'b00000101};
      {3'd0, 5'd4, 2'd3}: r = '{5'd6, 16'b000011};
      {3'd0, 5'd5, 2'd0}: r = '{5'd11, 16'b00000000111};
      {3'd0, 5'd5, 2'd1}: r = '{5'd10, 16'b0000000110};
      {3'd0, 5'd5, 2'd2}: r = '{5'd9, 16'b000000101};
      {3'd0, 5'd5, 2'd3}: r = '{5'd7, 16'b0000100};
      {3'd0, 5'd6, 2'd0}: r = '{5'd13, 16'b0000000001111};
      {3'd0, 5'd6, 2'd1}: r = '{5'd11, 16'b00000000110};
      {3'd0, 5'd6, 2'd2}: r = '{5'd10, 16'b0000000101};
      {3'd0, 5'd6, 2'd3}: r = '{5'd8, 16'b00000100};
      {3'd0, 5'd7, 2'd0}: r = '{5'd13, 16'b0000000001011};
      {3'd0, 5'd7, 2'd1}: r = '{5'd13, 16'b0000000001110};
      {3'd0, 5'd7, 2'd2}: r = '{5'd11, 16'b00000000101};
      {3'd0, 5'd7, 2'd3}: r = '{5'd9, 16'b000000100};
      {3'd0, 5'd8, 2'd0}: r = '{5'd13, 16'b0000000001000};
      {3'd0, 5'd8, 2'd1}: r = '{5'd13, 16'b0000000001010};
      {3'd0, 5'd8, 2'd2}: r = '{5'd13, 16'b0000000001101};
      {3'd0, 5'd8, 2'd3}: r = '{5'd10, 16'b0000000100};
      {3'd0, 5'd9, 2'd0}: r = '{5'd14, 16'b00000000001111};
      {3'd0, 5'd9, 2'd1}: r = '{5'd14, 16'b00000000001110};
      {3'd0, 5'd9, 2'd2}: r = '{5'd14, 16'b00000000001001};
      {3'd0, 5'd9, 2'd3}: r = '{5'd11, 16'b00000000100};
      {3'd0, 5'd10, 2'd0}: r = '{5'd14, 16'b00000000001011};
      {3'd0, 5'd10, 2'd1}: r = '{5'd14, 16'b00000000001010};
      {3'd0, 5'd10, 2'd2}: r = '{5'd14, 16'b00000000001101};
      {3'd0, 5'd10, 2'd3}: r = '{5'd13, 16'b0000000001100};
      {3'd0, 5'd11, 2'd0}: r = '{5'd15, 16'b000000000001111};
      {3'd0, 5'd11, 2'd1}: r = '{5'd15, 16'b000000000001110};
      {3'd0, 5'd11, 2'd2}: r = '{5'd14, 16'b00000000001001};
      {3'd0, 5'd11, 2'd3}: r = '{5'd14, 16'b00000000001100};
      {3'd0, 5'd12, 2'd0}: r = '{5'd15, 16'b000000000001011};
      {3'd0, 5'd12, 2'd1}: r = '{5'd15, 16'b000000000001010};
      {3'd0, 5'd12, 2'd2}: r = '{5'd15, 16'b000000000001101};
      {3'd0, 5'd12, 2'd3}: r = '{5'd14, 16'b00000000001000};
      {3'd0, 5'd13, 2'd0}: r = '{5'd16, 16'b0000000000001111};
      {3'd0, 5'd13, 2'd1}: r = '{5'd15, 16'b000000000000001};
      {3'd0, 5'd13, 2'd2}: r = '{5'd15, 16'b000000000001001};
      {3'd0, 5'd13, 2'd3}: r = '{5'd15, 16'b000000000001100};
      {3'd0, 5'd14, 2'd0}: r = '{5'd16, 16'b0000000000001011};
      {3'd0, 5'd14, 2'd1}: r = '{5'd16, 16'b0000000000001110};
      {3'd0, 5'd14, 2'd2}: r = '{5'd16, 16'b0000000000001101};
      {3'd0, 5'd14, 2'd3}: r = '{5'd15, 16'b000000000001000};
      {3'd0, 5'd15, 2'd0}: r = '{5'd16, 16'b0000000000000111};
      {3'd0, 5'd15, 2'd1}: r = '{5'd16, 16'b0000000000001010};
      {3'd0, 5'd15, 2'd2}: r = '{5'd16, 16'b0000000000001001};
      {3'd0, 5'd15, 2'd3}: r = '{5'd16, 16'b0000000000001100};
      {3'd0, 5'd16, 2'd0}: r = '{5'd16, 16'b0000000000000100};
      {3'd0, 5'd16, 2'd1}: r = '{5'd16, 16'b0000000000000110};
      {3'd0, 5'd16, 2'd2}: r = '{5'd16, 16'b0000000000000101};
      {3'd0, 5'd16, 2'd3}: r = '{5'd16, 16'b0000000000001000};
      {3'd1, 5'd0, 2'd0}: r = '{5'd2, 16'b11};
      {3'd1, 5'd1, 2'd0}: r = '{5'd6, 16'b001011};
      {3'd1, 5'd1, 2'd1}: r = '{5'd2, 16'b10};
      {3'd1, 5'd2, 2'd0}: r = '{5'd6, 16'b000111};
      {3'd1, 5'd2, 2'd1}: r = '{5'd5, 16'b00111};
      {3'd1, 5'd2, 2'd2}: r = '{5'd3, 16'b011};
      {3'd1, 5'd3, 2'd0}: r = '{5'd7, 16'b0000111};
      {3'd1, 5'd3, 2'd1}: r = '{5'd6, 16'b001010};
      {3'd1, 5'd3, 2'd2}: r = '{5'd6, 16'b001001};
      {3'd1, 5'd3, 2'd3}: r = '{5'd4, 16'b0101};
      {3'd1, 5'd4, 2'd0}: r = '{5'd8, 16'b00000111};
      {3'd1, 5'd4, 2'd1}: r = '{5'd6, 16'b000110};
      {3'd1, 5'd4, 2'd2}: r = '{5'd6, 16'b000101};
      {3'd1, 5'd4, 2'd3}: r = '{5'd4, 16'b0100};
      {3'd1, 5'd5, 2'd0}: r = '{5'd8, 16'b00000100};
      {3'd1, 5'd5, 2'd1}: r = '{5'd7, 16'b0000110};
      {3'd1, 5'd5, 2'd2}: r = '{5'd7, 16'b0000101};
      {3'd1, 5'd5, 2'd3}: r = '{5'd5, 16'b00110};
      {3'd1, 5'd6, 2'd0}: r = '{5'd9, 16'b000000111};
      {3'd1, 5'd6, 2'd1}: r = '{5'd8, 16'b00000110};
      {3'd1, 5'd6, 2'd2}: r = '{5'd8, 16'b00000101};
      {3'd1, 5'd6, 2'd3}: r = '{5'd6, 16'b001000};
      {3'd1, 5'd7, 2'd0}: r = '{5'd11, 16'b00000001111};
      {3'd1, 5'd7, 2'd1}: r = '{5'd9, 16'b000000110};
      {3'd1, 5'd7, 2'd2}: r = '{5'd9, 16'b000000101};
      {3'd1, 5'd7, 2'd3}: r = '{5'd6, 16'b000100};
      {3'd1, 5'd8, 2'd0}: r = '{5'd11, 16'b00000001011};
      {3'd1, 5'd8, 2'd1}: r = '{5'd11, 16'b00000001110};
      {3'd1, 5'd8, 2'd2}: r = '{5'd11, 16'b00000001101};
      {3'd1, 5'd8, 2'd3}: r = '{5'd7, 16'b0000100};
      {3'd1, 5'd9, 2'd0}: r = '{5'd12, 16'b000000001111};
      {3'd1, 5'd9, 2'd1}: r = '{5'd11, 16'b00000001010};
      {3'd1, 5'd9, 2'd2}: r = '{5'd11, 16'b00000001001};
      {3'd1, 5'd9, 2'd3}: r = '{5'd9, 16'b000000100};
      {3'd1, 5'd10, 2'd0}: r = '{5'd12, 16'b000000001011};
      {3'd1, 5'd10, 2'd1}: r = '{5'd12, 16'b000000001110};
      {3'd1, 5'd10, 2'd2}: r = '{5'd12, 16'b000000001101};
      {3'd1, 5'd10, 2'd3}: r = '{5'd11, 16'b00000001100};
      {3'd1, 5'd11, 2'd0}: r = '{5'd12, 16'b000000001000};
      {3'd1, 5'd11, 2'd1}: r = '{5'd12, 16'b000000001010};
      {3'd1, 5'd11, 2'd2}: r = '{5'd12, 16'b000000001001};
      {3'd1, 5'd11, 2'd3}: r = '{5'd11, 16'b00000001000};
      {3'd1, 5'd12, 2'd0}: r = '{5'd13, 16'b0000000001111};
      {3'd1, 5'd12, 2'd1}: r = '{5'd13, 16'b0000000001110};
      {3'd1, 5'd12, 2'd2}: r = '{5'd13, 16'b0000000001101};
      {3'd1, 5'd12, 2'd3}: r = '{5'd12, 16'b000000001100};
      {3'd1, 5'd13, 2'd0}: r = '{5'd13, 16'b0000000001011};
      {3'd1, 5'd13, 2'd1}: r = '{5'd13, 16'b0000000001010};
      {3'd1, 5'd13, 2'd2}: r = '{5'd13, 16'b0000000001001};
      {3'd1, 5'd13, 2'd3}: r = '{5'd13, 16'b0000000001100};
      {3'd1, 5'd14, 2'd0}: r = '{5'd13, 16'b0000000000111};
      {3'd1, 5'd14, 2'd1}: r = '{5'd14, 16'b00000000001011};
      {3'd1, 5'd14, 2'd2}: r = '{5'd13, 16'b0000000000110};
      {3'd1, 5'd14, 2'd3}: r = '{5'd13, 16'b0000000001000};
      {3'd1, 5'd15, 2'd0}: r = '{5'd14, 16'b00000000001001};
      {3'd1, 5'd15, 2'd1}: r = '{5'd14, 16'b00000000001000};
      {3'd1, 5'd15, 2'd2}: r = '{5'd14, 16'b00000000001010};
      {3'd1, 5'd15, 2'd3}: r = '{5'd13, 16'b0000000000001};
      {3'd1, 5'd16, 2'd0}: r = '{5'd14, 16'b00000000000111};
      {3'd1, 5'd16, 2'd1}: r = '{5'd14, 16'b00000000000110};
      {3'd1, 5'd16, 2'd2}: r = '{5'd14, 16'b00000000000101};
      {3'd1, 5'd16, 2'd3}: r = '{5'd14, 16'b00000000000100};
      {3'd2, 5'd0, 2'd0}: r = '{5'd4, 16'b1111};
      {3'd2, 5'd1, 2'd0}: r = '{5'd6, 16'b001111};
      {3'd2, 5'd1, 2'd1}: r = '{5'd4, 16'b1110};
      {3'd2, 5'd2, 2'd0}: r = '{5'd6, 16'b001011};
      {3'd2, 5'd2, 2'd1}: r = '{5'd5, 16'b01111};
      {3'd2, 5'd2, 2'd2}: r = '{5'd4, 16'b1101};
      {3'd2, 5'd3, 2'd0}: r = '{5'd6, 16'b001000};
      {3'd2, 5'd3, 2'd1}: r = '{5'd5, 16'b01100};
      {3'd2, 5'd3, 2'd2}: r = '{5'd5, 16'b01110};
      {3'd2, 5'd3, 2'd3}: r = '{5'd4, 16'b1100};
      {3'd2, 5'd4, 2'd0}: r = '{5'd7, 16'b0001111};
      {3'd2, 5'd4, 2'd1}: r = '{5'd5, 16'b01010};
      {3'd2, 5'd4, 2'd2}: r = '{5'd5, 16'b01011};
      {3'd2, 5'd4, 2'd3}: r = '{5'd4, 16'b1011};
      {3'd2, 5'd5, 2'd0}: r = '{5'd7, 16'b0001011};
      {3'd2, 5'd5, 2'd1}: r = '{5'd5, 16'b01000};
      {3'd2, 5'd5, 2'd2}: r = '{5'd5, 16'b01001};
      {3'd2, 5'd5, 2'd3}: r = '{5'd4, 16'b1010};
      {3'd2, 5'd6, 2'd0}: r = '{5'd7, 16'b0001001};
      {3'd2, 5'd6, 2'd1}: r = '{5'd6, 16'b001110};
      {3'd2, 5'd6, 2'd2}: r = '{5'd6, 16'b001101};
      {3'd2, 5'd6, 2'd3}: r = '{5'd4, 16'b1001};
      {3'd2, 5'd7, 2'd0}: r = '{5'd7, 16'b0001000};
      {3'd2, 5'd7, 2'd1}: r = '{5'd6, 16'b001010};
      {3'd2, 5'd7, 2'd2}: r = '{5'd6, 16'b001001};
      {3'd2, 5'd7, 2'd3}: r = '{5'd4, 16'b1000};
      {3'd2, 5'd8, 2'd0}: r = '{5'd8, 16'b00001111};
      {3'd2, 5'd8, 2'd1}: r = '{5'd7, 16'b0001110};
      {3'd2, 5'd8, 2'd2}: r = '{5'd7, 16'b0001101};
      {3'd2, 5'd8, 2'd3}: r = '{5'd5, 16'b01101};
      {3'd2, 5'd9, 2'd0}: r = '{5'd8, 16'b00001011};
      {3'd2, 5'd9, 2'd1}: r = '{5'd8, 16'b00001110};
      {3'd2, 5'd9, 2'd2}: r = '{5'd7, 16'b0001010};
      {3'd2, 5'd9, 2'd3}: r = '{5'd6, 16'b001100};
      {3'd2, 5'd10, 2'd0}: r = '{5'd9, 16'b000001111};
      {3'd2, 5'd10, 2'd1}: r = '{5'd8, 16'b00001010};
      {3'd2, 5'd10, 2'd2}: r = '{5'd8, 16'b00001101};
      {3'd2, 5'd10, 2'd3}: r = '{5'd7, 16'b0001100};
      {3'd2, 5'd11, 2'd0}: r = '{5'd9, 16'b000001011};
      {3'd2, 5'd11, 2'd1}: r = '{5'd9, 16'b000001110};
      {3'd2, 5'd11, 2'd2}: r = '{5'd8, 16'b00001001};
      {3'd2, 5'd11, 2'd3}: r = '{5'd8, 16'b00001100};
      {3'd2, 5'd12, 2'd0}: r = '{5'd9, 16'b000001000};
      {3'd2, 5'd12, 2'd1}: r = '{5'd9, 16'b000001010};
      {3'd2, 5'd12, 2'd2}: r = '{5'd9, 16'b000001101};
      {3'd2, 5'd12, 2'd3}: r = '{5'd8, 16'b00001000};
      {3'd2, 5'd13, 2'd0}: r = '{5'd10, 16'b0000001101};
      {3'd2, 5'd13, 2'd1}: r = '{5'd9, 16'b000000111};
      {3'd2, 5'd13, 2'd2}: r = '{5'd9, 16'b000001001};
      {3'd2, 5'd13, 2'd3}: r = '{5'd9, 16'b000001100};
      {3'd2, 5'd14, 2'd0}: r = '{5'd10, 16'b0000001001};
      {3'd2, 5'd14, 2'd1}: r = '{5'd10, 16'b0000001100};
      {3'd2, 5'd14, 2'd2}: r = '{5'd10, 16'b0000001011};
      {3'd2, 5'd14, 2'd3}: r = '{5'd10, 16'b0000001010};
      {3'd2, 5'd15, 2'd0}: r = '{5'd10, 16'b0000000101};
      {3'd2, 5'd15, 2'd1}: r = '{5'd10, 16'b0000001000};
      {3'd2, 5'd15, 2'd2}: r = '{5'd10, 16'b0000000111};
      {3'd2, 5'd15, 2'd3}: r = '{5'd10, 16'b0000000110};
      {3'd2, 5'd16, 2'd0}: r = '{5'd10, 16'b0000000001};
      {3'd2, 5'd16, 2'd1}: r = '{5'd10, 16'b0000000100};
      {3'd2, 5'd16, 2'd2}: r = '{5'd10, 16'b0000000011};
      {3'd2, 5'd16, 2'd3}: r = '{5'd10, 16'b0000000010};
      {3'd3, 5'd0, 2'd0}: r = '{5'd6, 16'b000011};
      {3'd3, 5'd1, 2'd0}: r = '{5'd6, 16'b000000};
      {3'd3, 5'd1, 2'd1}: r = '{5'd6, 16'b000001};
      {3'd3, 5'd2, 2'd0}: r = '{5'd6, 16'b000100};
      {3'd3, 5'd2, 2'd1}: r = '{5'd6, 16'b000101};
      {3'd3, 5'd2, 2'd2}: r = '{5'd6, 16'b000110};
      {3'd3, 5'd3, 2'd0}: r = '{5'd6, 16'b001000};
      {3'd3, 5'd3, 2'd1}: r = '{5'd6, 16'b001001};
      {3'd3, 5'd3, 2'd2}: r = '{5'd6, 16'b001010};
      {3'd3, 5'd3, 2'd3}: r = '{5'd6, 16'b001011};
      {3'd3, 5'd4, 2'd0}: r = '{5'd6, 16'b001100};
      {3'd3, 5'd4, 2'd1}: r = '{5'd6, 16'b001101};
      {3'd3, 5'd4, 2'd2}: r = '{5'd6, 16'b001110};
      {3'd3, 5'd4, 2'd3}: r = '{5'd6, 16'b001111};
      {3'd3, 5'd5, 2'd0}: r = '{5'd6, 16'b010000};
      {3'd3, 5'd5, 2'd1}: r = '{5'd6, 16'b010001};
      {3'd3, 5'd5, 2'd2}: r = '{5'd6, 16'b010010};
      {3'd3, 5'd5, 2'd3}: r = '{5'd6, 16'b010011};
      {3'd3, 5'd6, 2'd0}: r = '{5'd6, 16'b010100};
      {3'd3, 5'd6, 2'd1}: r = '{5'd6, 16'b010101};
      {3'd3, 5'd6, 2'd2}: r = '{5'd6, 16'b010110};
      {3'd3, 5'd6, 2'd3}: r = '{5'd6, 16'b010111};
      {3'd3, 5'd7, 2'd0}: r = '{5'd6, 16'b011000};
      {3'd3, 5'd7, 2'd1}: r = '{5'd6, 16'b011001};
      {3'd3, 5'd7, 2'd2}: r = '{5'd6, 16'b011010};
      {3'd3, 5'd7, 2'd3}: r = '{5'd6, 16'b011011};
      {3'd3, 5'd8, 2'd0}: r = '{5'd6, 16'b011100};
      {3'd3, 5'd8, 2'd1}: r = '{5'd6, 16'b011101};
      {3'd3, 5'd8, 2'd2}: r = '{5'd6, 16'b011110};
      {3'd3, 5'd8, 2'd3}: r = '{5'd6, 16'b011111};
      {3'd3, 5'd9, 2'd0}: r = '{5'd6, 16'b100000};
      {3'd3, 5'd9, 2'd1}: r = '{5'd6, 16'b100001};
      {3'd3, 5'd9, 2'd2}: r = '{5'd6, 16'b100010};
      {3'd3, 5'd9, 2'd3}: r = '{5'd6, 16'b100011};
      {3'd3, 5'd10, 2'd0}: r = '{5'd6, 16'b100100};
      {3'd3, 5'd10, 2'd1}: r = '{5'd6, 16'b100101};
      {3'd3, 5'd10, 2'd2}: r = '{5'd6, 16'b100110};
      {3'd3, 5'd10, 2'd3}: r = '{5'd6, 16'b100111};
      {3'd3, 5'd11, 2'd0}: r = '{5'd6, 16'b101000};
      {3'd3, 5'd11, 2'd1}: r = '{5'd6, 16'b101001};
      {3'd3, 5'd11, 2'd2}: r = '{5'd6, 16'b101010};
      {3'd3, 5'd11, 2'd3}: r = '{5'd6, 16'b101011};
      {3'd3, 5'd12, 2'd0}: r = '{5'd6, 16'b101100};
      {3'd3, 5'd12, 2'd1}: r = '{5'd6, 16'b101101};
      {3'd3, 5'd12, 2'd2}: r = '{5'd6, 16'b101110};
      {3'd3, 5'd12, 2'd3}: r = '{5'd6, 16'b101111};
      {3'd3, 5'd13, 2'd0}: r = '{5'd6, 16'b110000};
      {3'd3, 5'd13, 2'd1}: r = '{5'd6, 16'b110001};
      {3'd3, 5'd13, 2'd2}: r = '{5'd6, 16'b110010};
      {3'd3, 5'd13, 2'd3}: r = '{5'd6, 16'b110011};
      {3'd3, 5'd14, 2'd0}: r = '{5'd6, 16'b110100};
      {3'd3, 5'd14, 2'd1}: r = '{5'd6, 16'b110101};
      {3'd3, 5'd14, 2'd2}: r = '{5'd6, 16'b110110};
      {3'd3, 5'd14, 2'd3}: r = '{5'd6, 16'b110111};
      {3'd3, 5'd15, 2'd0}: r = '{5'd6, 16'b111000};
      {3'd3, 5'd15, 2'd1}: r = '{5'd6, 16'b111001};
      {3'd3, 5'd15, 2'd2}: r = '{5'd6, 16'b111010};
      {3'd3, 5'd15, 2'd3}: r = '{5'd6, 16'b111011};
      {3'd3, 5'd16, 2'd0}: r = '{5'd6, 16'b111100};
      {3'd3, 5'd16, 2'd1}: r = '{5'd6, 16'b111101};
      {3'd3, 5'd16, 2'd2}: r = '{5'd6, 16'b111110};
      {3'd3, 5'd16, 2'd3}: r = '{5'd6, 16'b111111};
      {3'd4, 5'd0, 2'd0}: r = '{5'd2, 16'b01};
      {3'd4, 5'd1, 2'd0}: r = '{5'd6, 16'b000111};
      {3'd4, 5'd1, 2'd1}: r = '{5'd1, 16'b1};
      {3'd4, 5'd2, 2'd0}: r = '{5'd6, 16'b000100};
      {3'd4, 5'd2, 2'd1}: r = '{5'd6, 16'b000110};
      {3'd4, 5'd2, 2'd2}: r = '{5'd3, 16'b001};
      {3'd4, 5'd3, 2'd0}: r = '{5'd6, 16'b000011};
      {3'd4, 5'd3, 2'd1}: r = '{5'd7, 16'b0000011};
      {3'd4, 5'd3, 2'd2}: r = '{5'd7, 16'b0000010};
      {3'd4, 5'd3, 2'd3}: r = '{5'd6, 16'b000101};
      {3'd4, 5'd4, 2'd0}: r = '{5'd6, 16'b000010};
      {3'd4, 5'd4, 2'd1}: r = '{5'd8, 16'b00000011};
      {3'd4, 5'd4, 2'd2}: r = '{5'd8, 16'b00000010};
      {3'd4, 5'd4, 2'd3}: r = '{5'd7, 16'b0000000};
      default: r = '0;
    endcase
    return r;
  endfunction

  // Table selector from nC.
  function automatic logic [2:0] nc_table(input logic signed [6:0] nc);
    if (nc < 0)  return 3'd4;
    if (nc < 2)  return 3'd0;
    if (nc < 4)  return 3'd1;
    if (nc < 8)  return 3'd2;
    return 3'd3;
  endfunction

  // total_zeros for 4x4 blocks (tc 1..15) and 2x2 chroma DC (chroma_dc=1, tc 1..3).
  function automatic vlc16_t total_zeros_code(input logic chroma_dc, input logic [4:0] tc,
                                              input logic [3:0] tz);
    vlc16_t r;
    r = '0;
    if (chroma_dc) begin
      case ({tc[1:0], tz[1:0]})
        4'b01_00: r = '{5'd1, 16'b1};   4'b01_01: r = '{5'd2, 16'b01};
        4'b01_10: r = '{5'd3, 16'b001}; 4'b01_11: r = '{5'd3, 16'b000};
        4'b10_00: r = '{5'd1, 16'b1};   4'b10_01: r = '{5'd2, 16'b01};
        4'b10_10: r = '{5'd2, 16'b00};
        4'b11_00: r = '{5'd1, 16'b1};   4'b11_01: r = '{5'd1, 16'b0};
        default:  r = '0;
      endcase
    end else begin
      case (tc)
        5'd1: case (tz)
          4'd0: r = '{5'd1, 16'b1};        4'd1: r = '{5'd3, 16'b011};
          4'd2: r = '{5'd3, 16'b010};      4'd3: r = '{5'd4, 16'b0011};
          4'd4: r = '{5'd4, 16'b0010};     4'd5: r = '{5'd5, 16'b00011};
          4'd6: r = '{5'd5, 16'b00010};    4'd7: r = '{5'd6, 16'b000011};
          4'd8: r = '{5'd6, 16'b000010};   4'd9: r = '{5'd7, 16'b0000011};
          4'd10: r = '{5'd7, 16'b0000010}; 4'd11: r = '{5'd8, 16'b00000011};
          4'd12: r = '{5'd8, 16'b00000010}; 4'd13: r = '{5'd9, 16'b000000011};
          4'd14: r = '{5'd9, 16'b000000010}; default: r = '{5'd9, 16'b000000001};
        endcase
        5'd2: case (tz)
          4'd0: r = '{5'd3, 16'b111};  4'd1: r = '{5'd3, 16'b110};  4'd2: r = '{5'd3, 16'b101};
          4'd3: r = '{5'd3, 16'b100};  4'd4: r = '{5'd3, 16'b011};  4'd5: r = '{5'd4, 16'b0101};
          4'd6: r = '{5'd4, 16'b0100}; 4'd7: r = '{5'd4, 16'b0011}; 4'd8: r = '{5'd4, 16'b0010};
          4'd9: r = '{5'd5, 16'b00011}; 4'd10: r = '{5'd5, 16'b00010}; 4'd11: r = '{5'd6, 16'b000011};
          4'd12: r = '{5'd6, 16'b000010}; 4'd13: r = '{5'd6, 16'b000001}; default: r = '{5'd6, 16'b000000};
        endcase
        5'd3: case (tz)
          4'd0: r = '{5'd4, 16'b0101}; 4'd1: r = '{5'd3, 16'b111};  4'd2: r = '{5'd3, 16'b110};
          4'd3: r = '{5'd3, 16'b101};  4'd4: r = '{5'd4, 16'b0100}; 4'd5: r = '{5'd4, 16'b0011};
          4'd6: r = '{5'd3, 16'b100};  4'd7: r = '{5'd3, 16'b011};  4'd8: r = '{5'd4, 16'b0010};
          4'd9: r = '{5'd5, 16'b00011}; 4'd10: r = '{5'd5, 16'b00010}; 4'd11: r = '{5'd6, 16'b000001};
          4'd12: r = '{5'd5, 16'b00001}; default: r = '{5'd6, 16'b000000};
        endcase
        5'd4: case (tz)
          4'd0: r = '{5'd5, 16'b00011}; 4'd1: r = '{5'd3, 16'b111};  4'd2: r = '{5'd4, 16'b0101};
          4'd3: r = '{5'd4, 16'b0100};  4'd4: r = '{5'd3, 16'b110};  4'd5: r = '{5'd3, 16'b101};
          4'd6: r = '{5'd3, 16'b100};   4'd7: r = '{5'd4, 16'b0011}; 4'd8: r = '{5'd3, 16'b011};
          4'd9: r = '{5'd4, 16'b0010};  4'd10: r = '{5'd5, 16'b00010}; 4'd11: r = '{5'd5, 16'b00001};
          default: r = '{5'd5, 16'b00000};
        endcase
        5'd5: case (tz)
          4'd0: r = '{5'd4, 16'b0101}; 4'd1: r = '{5'd4, 16'b0100}; 4'd2: r = '{5'd4, 16'b0011};
          4'd3: r = '{5'd3, 16'b111};  4'd4: r = '{5'd3, 16'b110};  4'd5: r = '{5'd3, 16'b101};
          4'd6: r = '{5'd3, 16'b100};  4'd7: r = '{5'd3, 16'b011};  4'd8: r = '{5'd4, 16'b0010};
          4'd9: r = '{5'd5, 16'b00001}; 4'd10: r = '{5'd4, 16'b0001}; default: r = '{5'd5, 16'b00000};
        endcase
        5'd6: case (tz)
          4'd0: r = '{5'd6, 16'b000001}; 4'd1: r = '{5'd5, 16'b00001}; 4'd2: r = '{5'd3, 16'b111};
          4'd3: r = '{5'd3, 16'b110};    4'd4: r = '{5'd3, 16'b101};   4'd5: r = '{5'd3, 16'b100};
          4'd6: r = '{5'd3, 16'b011};    4'd7: r = '{5'd3, 16'b010};   4'd8: r = '{5'd4, 16'b0001};
          4'd9: r = '{5'd3, 16'b001};    default: r = '{5'd6, 16'b000000};
        endcase
        5'd7: case (tz)
          4'd0: r = '{5'd6, 16'b000001}; 4'd1: r = '{5'd5, 16'b00001}; 4'd2: r = '{5'd3, 16'b101};
          4'd3: r = '{5'd3, 16'b100};    4'd4: r = '{5'd3, 16'b011};   4'd5: r = '{5'd2, 16'b11};
          4'd6: r = '{5'd3, 16'b010};    4'd7: r = '{5'd4, 16'b0001};  4'd8: r = '{5'd3, 16'b001};
          default: r = '{5'd6, 16'b000000};
        endcase
        5'd8: case (tz)
          4'd0: r = '{5'd6, 16'b000001}; 4'd1: r = '{5'd4, 16'b0001}; 4'd2: r = '{5'd5, 16'b00001};
          4'd3: r = '{5'd3, 16'b011};    4'd4: r = '{5'd2, 16'b11};   4'd5: r = '{5'd2, 16'b10};
          4'd6: r = '{5'd3, 16'b010};    4'd7: r = '{5'd3, 16'b001};  default: r = '{5'd6, 16'b000000};
        endcase
        5'd9: case (tz)
          4'd0: r = '{5'd6, 16'b000001}; 4'd1: r = '{5'd6, 16'b000000}; 4'd2: r = '{5'd4, 16'b0001};
          4'd3: r = '{5'd2, 16'b11};     4'd4: r = '{5'd2, 16'b10};     4'd5: r = '{5'd3, 16'b001};
          4'd6: r = '{5'd2, 16'b01};     default: r = '{5'd5, 16'b00001};
        endcase
        5'd10: case (tz)
          4'd0: r = '{5'd5, 16'b00001}; 4'd1: r = '{5'd5, 16'b00000}; 4'd2: r = '{5'd3, 16'b001};
          4'd3: r = '{5'd2, 16'b11};    4'd4: r = '{5'd2, 16'b10};    4'd5: r = '{5'd2, 16'b01};
          default: r = '{5'd4, 16'b0001};
        endcase
        5'd11: case (tz)
          4'd0: r = '{5'd4, 16'b0000}; 4'd1: r = '{5'd4, 16'b0001}; 4'd2: r = '{5'd3, 16'b001};
          4'd3: r = '{5'd3, 16'b010};  4'd4: r = '{5'd1, 16'b1};    default: r = '{5'd3, 16'b011};
        endcase
        5'd12: case (tz)
          4'd0: r = '{5'd4, 16'b0000}; 4'd1: r = '{5'd4, 16'b0001}; 4'd2: r = '{5'd2, 16'b01};
          4'd3: r = '{5'd1, 16'b1};    default: r = '{5'd3, 16'b001};
        endcase
        5'd13: case (tz)
          4'd0: r = '{5'd3, 16'b000}; 4'd1: r = '{5'd3, 16'b001}; 4'd2: r = '{5'd1, 16'b1};
          default: r = '{5'd2, 16'b01};
        endcase
        5'd14: case (tz)
          4'd0: r = '{5'd2, 16'b00}; 4'd1: r = '{5'd2, 16'b01}; default: r = '{5'd1, 16'b1};
        endcase
        5'd15: r = (tz == 4'd0) ? vlc16_t'{5'd1, 16'b0} : vlc16_t'{5'd1, 16'b1};
        default: r = '0;
      endcase
    end
    return r;
  endfunction

  // run_before for zeros_left zl (1..14) and run (0..14).
  function automatic vlc16_t run_before_code(input logic [3:0] zl, input logic [3:0] run);
    vlc16_t r;
    r = '0;
    case (zl)
      4'd1: r = '{5'd1, {15'd0, ~run[0]}};
      4'd2: case (run)
        4'd0: r = '{5'd1, 16'b1}; 4'd1: r = '{5'd2, 16'b01}; default: r = '{5'd2, 16'b00};
      endcase
      4'd3: r = '{5'd2, {14'd0, 2'd3 - run[1:0]}};
      4'd4: case (run)
        4'd0: r = '{5'd2, 16'b11}; 4'd1: r = '{5'd2, 16'b10}; 4'd2: r = '{5'd2, 16'b01};
        4'd3: r = '{5'd3, 16'b001}; default: r = '{5'd3, 16'b000};
      endcase
      4'd5: case (run)
        4'd0: r = '{5'd2, 16'b11}; 4'd1: r = '{5'd2, 16'b10}; 4'd2: r = '{5'd3, 16'b011};
        4'd3: r = '{5'd3, 16'b010}; 4'd4: r = '{5'd3, 16'b001}; default: r = '{5'd3, 16'b000};
      endcase
      4'd6: case (run)
        4'd0: r = '{5'd2, 16'b11};  4'd1: r = '{5'd3, 16'b000}; 4'd2: r = '{5'd3, 16'b001};
        4'd3: r = '{5'd3, 16'b011}; 4'd4: r = '{5'd3, 16'b010}; 4'd5: r = '{5'd3, 16'b101};
        default: r = '{5'd3, 16'b100};
      endcase
      default:
        if (run < 4'd7) r = '{5'd3, {13'd0, 3'd7 - run[2:0]}};
        else            r = '{5'(run) - 5'd3, 16'd1};
    endcase
    return r;
  endfunction

  // coded_block_pattern -> codeNum for me(v), 4:2:0 (ChromaArrayType 1).
  // The tables below list cbp in codeNum order; the inverse is searched.
  function automatic logic [5:0] cbp_to_codenum(input logic inter, input logic [5:0] cbp);
    logic [5:0] intra_t [48];
    logic [5:0] inter_t [48];
    logic [5:0] r;
    intra_t = '{6'd47, 6'd31, 6'd15, 6'd0, 6'd23, 6'd27, 6'd29, 6'd30, 6'd7, 6'd11, 6'd13, 6'd14,
                6'd39, 6'd43, 6'd45, 6'd46, 6'd16, 6'd3, 6'd5, 6'd10, 6'd12, 6'd19, 6'd21, 6'd26,
                6'd28, 6'd35, 6'd37, 6'd42, 6'd44, 6'd1, 6'd2, 6'd4, 6'd8, 6'd17, 6'd18, 6'd20,
                6'd24, 6'd6, 6'd9, 6'd22, 6'd25, 6'd32, 6'd33, 6'd34, 6'd36, 6'd40, 6'd38, 6'd41};
    inter_t = '{6'd0, 6'd16, 6'd1, 6'd2, 6'd4, 6'd8, 6'd32, 6'd3, 6'd5, 6'd10, 6'd12, 6'd15,
                6'd47, 6'd7, 6'd11, 6'd13, 6'd14, 6'd6, 6'd9, 6'd31, 6'd35, 6'd37, 6'd42, 6'd44,
                6'd33, 6'd34, 6'd36, 6'd40, 6'd39, 6'd43, 6'd45, 6'd46, 6'd17, 6'd18, 6'd20, 6'd24,
                6'd19, 6'd21, 6'd26, 6'd28, 6'd23, 6'd27, 6'd29, 6'd30, 6'd22, 6'd25, 6'd38, 6'd41};
    r = '0;
    for (int i = 0; i < 48; i++)
      if ((inter ? inter_t[i] : intra_t[i]) == cbp) r = 6'(i);
    return r;
  endfunction

endpackage
