// cavlc_zigzag: zig-zag scan stage of the CAVLC coder.
//
// On start it reorders the quantised block into scan order and registers it
// (one cycle), asserting scan_end.  block_type selects the source and length:
// luma 4x4 (all 16 coefficients of q4x4 in the 4x4 zig-zag order), AC blocks
// (scan positions 1..15 of q4x4, 15 coefficients; the DC position is coded
// elsewhere) or chroma DC (the 2x2 block c00 c01 c10 c11, 4 coefficients).
// Unused entries of sc are zero.
module cavlc_zigzag
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rstn,
  input  logic        start,
  input  block_type_e block_type,
  input  qcoef_t      q4x4 [16],
  input  qcoef_t      q2x2 [4],
  output logic        scan_end,
  output qcoef_t      sc [16],
  output logic [4:0]  max_coeff
);
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      scan_end  <= 1'b0;
      max_coeff <= '0;
      for (int i = 0; i < 16; i++) sc[i] <= '0;
    end else begin
      scan_end <= start;
      if (start) begin
        for (int i = 0; i < 16; i++) sc[i] <= '0;
        case (block_type)
          BT_AC: begin
            for (int i = 0; i < 15; i++) sc[i] <= q4x4[zigzag4(4'(i + 1))];
            max_coeff <= 5'd15;
          end
          BT_CHROMA_DC: begin
            for (int i = 0; i < 4; i++) sc[i] <= q2x2[i];
            max_coeff <= 5'd4;
          end
          default: begin
            for (int i = 0; i < 16; i++) sc[i] <= q4x4[zigzag4(4'(i))];
            max_coeff <= 5'd16;
          end
        endcase
      end
    end
  end
endmodule
