// hadamard4x4: two-dimensional 4x4 Hadamard transform H * X * H^T of a residual.
//
// H has the rows [1 1 1 1], [1 1 -1 -1], [1 -1 -1 1], [1 -1 1 -1].  The
// first cycle transforms along the horizontal axis (each row), the second along
// the vertical axis (each column), so hadamard_valid follows in_valid by two
// cycles.  No normalisation is applied: result[0] is the sum of the sixteen
// inputs.  Arrays are in raster order (index = row*4 + col).
module hadamard4x4
  import h264_pkg::*;
(
  input  logic clk,
  input  logic rstn,
  input  logic in_valid,
  input  res_t res [16],
  output logic hadamard_valid,
  output logic signed [12:0] result [16]
);

  logic signed [10:0] hrow [16];
  logic v1;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      v1 <= 1'b0;
      hadamard_valid <= 1'b0;
      for (int i = 0; i < 16; i++) begin hrow[i] <= '0; result[i] <= '0; end
    end else begin
      v1 <= in_valid;
      hadamard_valid <= v1;
      if (in_valid)
        for (int r = 0; r < 4; r++) begin
          hrow[4*r+0] <= 11'(res[4*r]) + 11'(res[4*r+1]) + 11'(res[4*r+2]) + 11'(res[4*r+3]);
          hrow[4*r+1] <= 11'(res[4*r]) + 11'(res[4*r+1]) - 11'(res[4*r+2]) - 11'(res[4*r+3]);
          hrow[4*r+2] <= 11'(res[4*r]) - 11'(res[4*r+1]) - 11'(res[4*r+2]) + 11'(res[4*r+3]);
          hrow[4*r+3] <= 11'(res[4*r]) - 11'(res[4*r+1]) + 11'(res[4*r+2]) - 11'(res[4*r+3]);
        end
      if (v1)
        for (int c = 0; c < 4; c++) begin
          result[c]    <= 13'(hrow[c]) + 13'(hrow[4+c]) + 13'(hrow[8+c]) + 13'(hrow[12+c]);
          result[4+c]  <= 13'(hrow[c]) + 13'(hrow[4+c]) - 13'(hrow[8+c]) - 13'(hrow[12+c]);
          result[8+c]  <= 13'(hrow[c]) - 13'(hrow[4+c]) - 13'(hrow[8+c]) + 13'(hrow[12+c]);
          result[12+c] <= 13'(hrow[c]) - 13'(hrow[4+c]) + 13'(hrow[8+c]) - 13'(hrow[12+c]);
        end
    end
  end

endmodule
