// tb_h264_intra_encoder: end-to-end test of the encoder on small frames.
// Two 64x48 frames (12 macroblocks each) at QP 20 on an encoder built for
// lines of up to 64 samples; the output words are compared with a reference
// encoder and every coding mechanism must be exercised (see enc_check.svh).
module tb_h264_intra_encoder;
  localparam int FW = 64, FH = 48, NFR = 2, QPV = 20;
  localparam longint WATCHDOG_TIME = 64'd200000000;
  logic clk = 0, rstn = 0, active_frame, active_line, pixel_valid, bitstream_valid, overrun, frame_done;
  logic [7:0] pixel_data;
  logic [31:0] bitstream;
  import h264_ref_pkg::*;
  h264_intra_encoder #(.MAX_WIDTH(64), .QP(QPV)) dut (
    .clk, .rstn, .active_frame, .active_line, .pixel_valid, .pixel_data,
    .bitstream_valid, .bitstream, .overrun, .frame_done);
  `include "enc_check.svh"
endmodule
