// cost_calc: Lagrangian cost J = D + lambda*R of each of the nine 4x4 modes.
//
// Starts when distortion_valid is high and registers the nine sums, asserting
// cost_valid one cycle later.  Costs are COST_W (22) bits wide so that an
// invalid mode can later be given the all-ones cost.
module cost_calc
  import h264_pkg::*;
(
  input  logic              clk,
  input  logic              rstn,
  input  logic              distortion_valid,
  input  logic [15:0]       distortion [NMODES],
  input  logic [8:0]        rate [NMODES],
  output logic              cost_valid,
  output logic [COST_W-1:0] cost [NMODES]
);
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      cost_valid <= 1'b0;
      for (int m = 0; m < NMODES; m++) cost[m] <= '0;
    end else begin
      cost_valid <= distortion_valid;
      if (distortion_valid)
        for (int m = 0; m < NMODES; m++)
          cost[m] <= COST_W'(distortion[m]) + COST_W'(rate[m]);
    end
  end
endmodule
