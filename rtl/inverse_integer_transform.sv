// inverse_integer_transform: H.264 4x4 inverse core transform with rounding.
//
// Three cycles: a 1-D inverse transform pass, a second pass in the other
// direction, and a rounding stage computing (x + 32) >> 6.  The 1-D inverse
// transform is e0 = d0 + d2, e1 = d0 - d2, e2 = (d1 >> 1) - d3,
// e3 = d1 + (d3 >> 1), out = {e0 + e3, e1 + e2, e1 - e2, e0 - e3}.  Because the
// >> 1 terms truncate, the order of the passes changes the result; the first
// pass works on rows and the second on columns, the order a standard decoder
// uses, so that encoder and decoder reconstruct identical samples.
// The rounded value always fits the 15-bit output for coefficients that come
// from quantised 8-bit residuals, so only the low 15 bits are kept.
// Input: 17-bit rescaled coefficients; output: 15-bit residual, raster order.
module inverse_integer_transform
  import h264_pkg::*;
(
  input  logic clk,
  input  logic rstn,
  input  logic inverse_quant_valid,
  input  dq_t  inverse_quant [16],
  output logic inverse_trans_valid,
  output itr_t inverse_trans [16]
);

  typedef logic signed [21:0] acc_t;
  acc_t h [16];
  acc_t w [16];
  logic v1, v2;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      inverse_trans_valid <= 1'b0;
      for (int i = 0; i < 16; i++) begin h[i] <= '0; w[i] <= '0; inverse_trans[i] <= '0; end
    end else begin
      v1 <= inverse_quant_valid;
      v2 <= v1;
      inverse_trans_valid <= v2;
      if (inverse_quant_valid)
        for (int r = 0; r < 4; r++) begin
          acc_t d0, d1, d2, d3, e0, e1, e2, e3;
          d0 = 22'(inverse_quant[4*r]);   d1 = 22'(inverse_quant[4*r+1]);
          d2 = 22'(inverse_quant[4*r+2]); d3 = 22'(inverse_quant[4*r+3]);
          e0 = d0 + d2; e1 = d0 - d2; e2 = (d1 >>> 1) - d3; e3 = d1 + (d3 >>> 1);
          h[4*r]   <= e0 + e3;
          h[4*r+1] <= e1 + e2;
          h[4*r+2] <= e1 - e2;
          h[4*r+3] <= e0 - e3;
        end
      if (v1)
        for (int c = 0; c < 4; c++) begin
          acc_t d0, d1, d2, d3, e0, e1, e2, e3;
          d0 = h[c]; d1 = h[4+c]; d2 = h[8+c]; d3 = h[12+c];
          e0 = d0 + d2; e1 = d0 - d2; e2 = (d1 >>> 1) - d3; e3 = d1 + (d3 >>> 1);
          w[c]    <= e0 + e3;
          w[4+c]  <= e1 + e2;
          w[8+c]  <= e1 - e2;
          w[12+c] <= e0 - e3;
        end
      if (v2)
        for (int i = 0; i < 16; i++) begin
          acc_t t;
          t = (w[i] + 22'sd32) >>> 6;
          inverse_trans[i] <= itr_t'(t);
        end
    end
  end

endmodule
