// find_min3: smallest of three mode costs, skipping modes that may not be used.
//
// A cost whose probable_modes bit is 0 is replaced by the all-ones value
// (4194303 for 22 bits) and so is never chosen while a valid mode exists.  The
// output gives the minimum and a one-hot mode_info (bit k set = input k won);
// ties go to the lower input index.  Registered: minimum_valid follows
// cost_valid by one cycle.
module find_min3
  import h264_pkg::*;
(
  input  logic              clk,
  input  logic              rstn,
  input  logic              cost_valid,
  input  logic [COST_W-1:0] cost [3],
  input  logic [2:0]        probable_modes,
  output logic              minimum_valid,
  output logic [COST_W-1:0] minimum_number,
  output logic [2:0]        mode_info
);
  logic [COST_W-1:0] c [3];
  logic [COST_W-1:0] m;
  logic [2:0]        oh;

  always_comb begin
    for (int k = 0; k < 3; k++) c[k] = probable_modes[k] ? cost[k] : '1;
    m  = c[0];
    oh = 3'b001;
    if (c[1] < m) begin m = c[1]; oh = 3'b010; end
    if (c[2] < m) begin m = c[2]; oh = 3'b100; end
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      minimum_valid  <= 1'b0;
      minimum_number <= '0;
      mode_info      <= '0;
    end else begin
      minimum_valid <= cost_valid;
      if (cost_valid) begin
        minimum_number <= m;
        mode_info      <= oh;
      end
    end
  end
endmodule
