// tb_h264_intra_encoder_full: the encoder at its default size (lines of up to
// 1920 samples, QP 26) coding two 1920x32 frames (two rows of 120 macroblocks
// each, a full-width HD stripe); the output is compared word by word with the
// reference encoder and every mechanism is counted as in the small test
// (see enc_check.svh).
module tb_h264_intra_encoder_full;
  localparam int FW = 1920, FH = 32, NFR = 2, QPV = 26;
  localparam longint WATCHDOG_TIME = 64'd2000000000;
  logic clk = 0, rstn = 0, active_frame, active_line, pixel_valid, bitstream_valid, overrun, frame_done;
  logic [7:0] pixel_data;
  logic [31:0] bitstream;
  import h264_ref_pkg::*;
  h264_intra_encoder dut (
    .clk, .rstn, .active_frame, .active_line, .pixel_valid, .pixel_data,
    .bitstream_valid, .bitstream, .overrun, .frame_done);
  `include "enc_check.svh"
endmodule
