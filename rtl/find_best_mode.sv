// find_best_mode: final 4x4 mode decision from the three group minima.
//
// Group g holds modes 3g, 3g+1, 3g+2.  The smallest of the three group minima
// (ties to the lower group) names the best mode through that group's one-hot
// mode_info; the residual block of that mode and its cost are output with
// best_4x4_mode_valid one cycle after minimum_valid.
module find_best_mode
  import h264_pkg::*;
(
  input  logic              clk,
  input  logic              rstn,
  input  logic              minimum_valid,
  input  logic [COST_W-1:0] minimum_number [3],
  input  logic [2:0]        mode_info [3],
  input  res_t              res [NMODES][16],
  output logic              best_4x4_mode_valid,
  output mode_t             best_4x4_mode,
  output logic [COST_W-1:0] best_cost,
  output res_t              best_res [16]
);
  mode_t             bm;
  logic [COST_W-1:0] bc;
  logic [1:0]        g;

  always_comb begin
    g  = 2'd0;
    bc = minimum_number[0];
    if (minimum_number[1] < bc) begin g = 2'd1; bc = minimum_number[1]; end
    if (minimum_number[2] < bc) begin g = 2'd2; bc = minimum_number[2]; end
    case (mode_info[g])
      3'b010:  bm = mode_t'(3*g + 1);
      3'b100:  bm = mode_t'(3*g + 2);
      default: bm = mode_t'(3*g);
    endcase
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      best_4x4_mode_valid <= 1'b0;
      best_4x4_mode       <= '0;
      best_cost           <= '0;
      for (int i = 0; i < 16; i++) best_res[i] <= '0;
    end else begin
      best_4x4_mode_valid <= minimum_valid;
      if (minimum_valid) begin
        best_4x4_mode <= bm;
        best_cost     <= bc;
        for (int i = 0; i < 16; i++) best_res[i] <= res[bm][i];
      end
    end
  end
endmodule
