// cavlc_scan_ctrl: "scanned data control" of the CAVLC coder (counter control
// and FIFO control).
//
// Walks the scanned coefficients from the highest-frequency position down to
// position 0, one coefficient per clock (max_coeff cycles).  Counter control
// counts the non-zero coefficients (total_coeff), the trailing ones (up to
// three +-1 values met first, their signs collected in t1_sign, first met in
// bit 0, 1 = negative) and the zeros below the highest non-zero coefficient
// (total_zeros).  FIFO control stores, in reverse scan order, every level
// that is not a trailing one (level[]) and the run of zeros below every
// non-zero coefficient (run[]).  done pulses when the walk is over; the
// results then stay stable until the next start.
module cavlc_scan_ctrl
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rstn,
  input  logic       start,
  input  qcoef_t     sc [16],
  input  logic [4:0] max_coeff,
  output logic       busy,
  output logic       done,
  output logic [4:0] total_coeff,
  output logic [1:0] trailing_ones,
  output logic [2:0] t1_sign,
  output logic [3:0] total_zeros,
  output qcoef_t     level [16],     // non-trailing-one levels, reverse scan
  output logic [4:0] level_count,
  output logic [3:0] run [16]        // run of zeros below non-zero k (reverse scan)
);
  logic [4:0] idx;
  logic       found, t1_done;
  logic [3:0] zcount;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      busy <= 1'b0; done <= 1'b0; idx <= '0; found <= 1'b0; t1_done <= 1'b0; zcount <= '0;
      total_coeff <= '0; trailing_ones <= '0; t1_sign <= '0; total_zeros <= '0; level_count <= '0;
      for (int i = 0; i < 16; i++) begin level[i] <= '0; run[i] <= '0; end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        idx  <= max_coeff - 5'd1;
        found <= 1'b0; t1_done <= 1'b0; zcount <= '0;
        total_coeff <= '0; trailing_ones <= '0; t1_sign <= '0; total_zeros <= '0; level_count <= '0;
        for (int i = 0; i < 16; i++) begin level[i] <= '0; run[i] <= '0; end
      end else if (busy) begin
        qcoef_t c;
        c = sc[idx[3:0]];
        if (c != 0) begin
          found <= 1'b1;
          if (found) run[4'(total_coeff - 5'd1)] <= zcount;
          zcount <= '0;
          total_coeff <= total_coeff + 5'd1;
          if (!t1_done && (c == 1 || c == -1) && trailing_ones < 2'd3) begin
            t1_sign[trailing_ones] <= c[15];
            trailing_ones <= trailing_ones + 2'd1;
          end else begin
            t1_done <= 1'b1;
            level[level_count[3:0]] <= c;
            level_count <= level_count + 5'd1;
          end
        end else if (found) begin
          zcount <= zcount + 4'd1;
          total_zeros <= total_zeros + 4'd1;
        end
        if (idx == 5'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (c != 0 && found) run[4'(total_coeff - 5'd1)] <= zcount;
          if (c != 0) run[4'(total_coeff)] <= 4'd0;
          else if (found) run[4'(total_coeff - 5'd1)] <= zcount + 4'd1;
        end
        idx <= idx - 5'd1;
      end
    end
  end
endmodule
