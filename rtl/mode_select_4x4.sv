// mode_select_4x4: rate-distortion based choice of the best 4x4 intra mode.
//
// All nine modes are evaluated in parallel: nine Hadamard transforms (2
// cycles), nine SATD distortion units (1 cycle), the most-probable-mode and
// rate units (running alongside), nine cost adders J = D + lambda*R (1
// cycle), three find-minimum-of-three units over the groups {0,1,2}, {3,4,5},
// {6,7,8} (1 cycle) and the final best-mode unit (1 cycle).  The residual
// blocks presented with res_valid are captured here and the one of the
// winning mode is output with best_4x4_mode_valid, six cycles after
// res_valid.  Modes whose mode_status bit is 0 are never chosen.  One block is
// evaluated at a time: a new res_valid must not arrive before the previous
// result is out (the caller waits, as the reconstruction loop requires).
//
// Lint note: rate_calc's valid output is not used. The rates are ready before
// the distortions and stay stable, so cost_calc is timed by the distortion
// valid alone.
module mode_select_4x4
  import h264_pkg::*;
(
  input  logic              clk,
  input  logic              rstn,
  input  logic              res_valid,
  input  res_t              res [NMODES][16],
  input  logic [8:0]        mode_status,
  input  mode_t             left_mode,
  input  mode_t             upper_mode,
  input  logic              left_avail,
  input  logic              upper_avail,
  input  logic [5:0]        qp,
  output logic              best_4x4_mode_valid,
  output mode_t             best_4x4_mode,
  output mode_t             mpm_out,
  output logic [COST_W-1:0] best_cost,
  output res_t              best_res [16]
);

  res_t       res_q [NMODES][16];
  logic [8:0] status_q;
  mode_t      mpm, mpm_q;

  most_probable_mode u_mpm (
    .left_mode(left_mode), .upper_mode(upper_mode),
    .left_avail(left_avail), .upper_avail(upper_avail), .mpm(mpm));

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      status_q <= '0;
      mpm_q    <= M_DC;
      for (int m = 0; m < NMODES; m++)
        for (int i = 0; i < 16; i++) res_q[m][i] <= '0;
    end else if (res_valid) begin
      res_q    <= res;
      status_q <= mode_status;
      mpm_q    <= mpm;
    end
  end
  assign mpm_out = mpm_q;

  logic               had_v [NMODES];
  logic signed [12:0] had   [NMODES][16];
  logic               dist_v [NMODES];
  logic [15:0]        dist_q  [NMODES];

  for (genvar m = 0; m < NMODES; m++) begin : g_mode
    hadamard4x4 u_had (
      .clk(clk), .rstn(rstn), .in_valid(res_valid), .res(res[m]),
      .hadamard_valid(had_v[m]), .result(had[m]));
    distortion_calc u_dist (
      .clk(clk), .rstn(rstn), .hadamard_valid(had_v[m]), .result(had[m]),
      .distortion_valid(dist_v[m]), .distortion(dist_q[m]));
  end

  logic       rate_v;
  logic [8:0] rate [NMODES];
  rate_calc u_rate (
    .clk(clk), .rstn(rstn), .in_valid(res_valid), .qp(qp), .mpm(mpm),
    .rate_valid(rate_v), .rate(rate));

  logic              cost_v;
  logic [COST_W-1:0] cost [NMODES];
  cost_calc u_cost (
    .clk(clk), .rstn(rstn), .distortion_valid(dist_v[0]), .distortion(dist_q),
    .rate(rate), .cost_valid(cost_v), .cost(cost));

  logic              min_v [3];
  logic [COST_W-1:0] min_n [3];
  logic [2:0]        min_oh [3];
  for (genvar g = 0; g < 3; g++) begin : g_grp
    find_min3 u_min (
      .clk(clk), .rstn(rstn), .cost_valid(cost_v),
      .cost('{cost[3*g], cost[3*g+1], cost[3*g+2]}),
      .probable_modes(status_q[3*g +: 3]),
      .minimum_valid(min_v[g]), .minimum_number(min_n[g]), .mode_info(min_oh[g]));
  end

  find_best_mode u_best (
    .clk(clk), .rstn(rstn), .minimum_valid(min_v[0]), .minimum_number(min_n),
    .mode_info(min_oh), .res(res_q), .best_4x4_mode_valid(best_4x4_mode_valid),
    .best_4x4_mode(best_4x4_mode), .best_cost(best_cost), .best_res(best_res));

endmodule
