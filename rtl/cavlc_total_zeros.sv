// cavlc_total_zeros: total_zeros code of a block, read in one cycle.
//
// Nothing is coded (length 0) when the block has no non-zero coefficient or
// when every position holds one (total_coeff == max_coeff).  Chroma DC blocks
// use the 2x2 table, all others the 4x4 table (h264_pkg::total_zeros_code).
module cavlc_total_zeros
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rstn,
  input  logic       start,
  input  logic       chroma_dc,
  input  logic [4:0] max_coeff,
  input  logic [4:0] total_coeff,
  input  logic [3:0] total_zeros,
  output logic       done,
  output logic [3:0] total_zeros_length,
  output logic [8:0] total_zeros_data
);
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      done <= 1'b0; total_zeros_length <= '0; total_zeros_data <= '0;
    end else begin
      done <= start;
      if (start) begin
        vlc16_t r;
        r = h264_pkg::total_zeros_code(chroma_dc, total_coeff, total_zeros);
        if (total_coeff == 5'd0 || total_coeff == max_coeff) begin
          total_zeros_length <= '0;
          total_zeros_data   <= '0;
        end else begin
          total_zeros_length <= r.len[3:0];
          total_zeros_data   <= r.code[8:0];
        end
      end
    end
  end

endmodule
