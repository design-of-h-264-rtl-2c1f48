// most_probable_mode: most probable 4x4 prediction mode of the current block.
//
// When both the left and the upper 4x4 blocks are available the most probable
// mode is the smaller of their modes, otherwise it is DC (2).  Combinational.
module most_probable_mode
  import h264_pkg::*;
(
  input  mode_t left_mode,
  input  mode_t upper_mode,
  input  logic  left_avail,
  input  logic  upper_avail,
  output mode_t mpm
);
  always_comb begin
    if (left_avail && upper_avail)
      mpm = (left_mode < upper_mode) ? left_mode : upper_mode;
    else
      mpm = M_DC;
  end
endmodule
