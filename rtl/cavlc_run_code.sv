// cavlc_run_code: run_before codes of a block, concatenated.
//
// Starting from the highest-frequency non-zero coefficient, one run_before
// code per clock is appended (run_before table indexed by zeros_left and the
// run), until zeros_left reaches zero or only the last coefficient is left
// (its run is implied).  The joined code is at most 28 bits; run_data holds
// it right-aligned with its length in run_data_length.  done pulses at the
// end; a block with no zeros to code finishes in one cycle.
module cavlc_run_code
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rstn,
  input  logic        start,
  input  logic [4:0]  total_coeff,
  input  logic [3:0]  total_zeros,
  input  logic [3:0]  run [16],
  output logic        done,
  output logic [5:0]  run_data_length,
  output logic [27:0] run_data
);
  logic       busy;
  logic [3:0] k;
  logic [3:0] zl;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      busy <= 1'b0; k <= '0; zl <= '0; done <= 1'b0; run_data_length <= '0; run_data <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; k <= '0; zl <= total_zeros;
        run_data_length <= '0; run_data <= '0;
      end else if (busy) begin
        if (zl == 4'd0 || 5'(k) + 5'd1 >= total_coeff) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          vlc16_t r;
          r = run_before_code(zl, run[k]);
          run_data <= 28'((run_data << r.len) | 28'(r.code));
          run_data_length <= run_data_length + 6'(r.len);
          zl <= zl - run[k];
          k  <= k + 4'd1;
        end
      end
    end
  end
endmodule
