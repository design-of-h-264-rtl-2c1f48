// residual_calc: residual blocks of all nine 4x4 prediction modes.
//
// For every mode, sixteen subtractors form original - prediction (9-bit
// signed).  Cycle 1 subtracts, cycle 2 collects the nine residual blocks into
// the output register (the point where the blocks are written onward), so
// res_valid follows pred_valid by two cycles.  The original block must be held
// stable while pred_valid is high.
module residual_calc
  import h264_pkg::*;
(
  input  logic clk,
  input  logic rstn,
  input  logic pred_valid,
  input  pix_t orig [16],
  input  pix_t pred [NMODES][16],
  output logic res_valid,
  output res_t res [NMODES][16]
);

  res_t diff [NMODES][16];
  logic v1;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      v1        <= 1'b0;
      res_valid <= 1'b0;
      for (int m = 0; m < NMODES; m++)
        for (int i = 0; i < 16; i++) begin
          diff[m][i] <= '0;
          res[m][i]  <= '0;
        end
    end else begin
      v1        <= pred_valid;
      res_valid <= v1;
      if (pred_valid)
        for (int m = 0; m < NMODES; m++)
          for (int i = 0; i < 16; i++)
            diff[m][i] <= $signed({1'b0, orig[i]}) - $signed({1'b0, pred[m][i]});
      if (v1) res <= diff;
    end
  end

endmodule
