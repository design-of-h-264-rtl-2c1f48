// forward_transform: H.264 4x4 forward core transform Y = A X A^T.
//
// A = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1] needs only additions and
// shifts.  Cycle 1 applies the 1-D transform to every column (vertical
// pass), cycle 2 to every row of that result (horizontal pass), so
// integer_transform_valid follows residual_valid by two cycles.  Input is the
// 9-bit residual, output the 15-bit coefficient, both in raster order.
module forward_transform
  import h264_pkg::*;
(
  input  logic  clk,
  input  logic  rstn,
  input  logic  residual_valid,
  input  res_t  res4x4 [16],
  output logic  integer_transform_valid,
  output coef_t integer_transform [16]
);

  typedef logic signed [11:0] mid_t;
  mid_t v [16];
  logic v1;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      v1 <= 1'b0;
      integer_transform_valid <= 1'b0;
      for (int i = 0; i < 16; i++) begin v[i] <= '0; integer_transform[i] <= '0; end
    end else begin
      v1 <= residual_valid;
      integer_transform_valid <= v1;
      if (residual_valid)
        for (int c = 0; c < 4; c++) begin
          mid_t x0, x1, x2, x3, s03, s12, d03, d12;
          x0 = 12'(res4x4[c]);   x1 = 12'(res4x4[4+c]);
          x2 = 12'(res4x4[8+c]); x3 = 12'(res4x4[12+c]);
          s03 = x0 + x3; s12 = x1 + x2; d03 = x0 - x3; d12 = x1 - x2;
          v[c]    <= s03 + s12;
          v[4+c]  <= (d03 <<< 1) + d12;
          v[8+c]  <= s03 - s12;
          v[12+c] <= d03 - (d12 <<< 1);
        end
      if (v1)
        for (int r = 0; r < 4; r++) begin
          coef_t x0, x1, x2, x3, s03, s12, d03, d12;
          x0 = 15'(v[4*r]);   x1 = 15'(v[4*r+1]);
          x2 = 15'(v[4*r+2]); x3 = 15'(v[4*r+3]);
          s03 = x0 + x3; s12 = x1 + x2; d03 = x0 - x3; d12 = x1 - x2;
          integer_transform[4*r]   <= s03 + s12;
          integer_transform[4*r+1] <= (d03 <<< 1) + d12;
          integer_transform[4*r+2] <= s03 - s12;
          integer_transform[4*r+3] <= d03 - (d12 <<< 1);
        end
    end
  end

endmodule
