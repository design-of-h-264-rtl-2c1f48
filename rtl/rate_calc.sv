// rate_calc: rate term lambda*R of each 4x4 prediction mode.
//
// R is 1 for the most probable mode and 4 for every other mode; lambda comes
// from the QP through the table in h264_pkg (lambda(40) = 23, so the rates are
// 23 and 92).  The nine products are registered: rate_valid follows in_valid
// by one cycle.
module rate_calc
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rstn,
  input  logic       in_valid,
  input  logic [5:0] qp,
  input  mode_t      mpm,
  output logic       rate_valid,
  output logic [8:0] rate [NMODES]
);
  logic [6:0] lambda;
  assign lambda = lambda_of(qp);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      rate_valid <= 1'b0;
      for (int m = 0; m < NMODES; m++) rate[m] <= '0;
    end else begin
      rate_valid <= in_valid;
      if (in_valid)
        for (int m = 0; m < NMODES; m++)
          rate[m] <= (mode_t'(m) == mpm) ? 9'(lambda) : {lambda, 2'b00};
    end
  end
endmodule
