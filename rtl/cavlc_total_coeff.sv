// cavlc_total_coeff: coeff_token code of a block (TotalCoeff and TrailingOnes).
//
// Three cycles after start: cycle 1 forms nC from the neighbouring blocks'
// non-zero counts (both available: (nL + nU + 1) >> 1; one available: that
// one; none: 0; chroma DC: -1), cycle 2 picks one of the five code tables
// from nC, cycle 3 reads the table (h264_pkg::coeff_token).
// availability: bit 0 = left block available, bit 1 = upper block available.
module cavlc_total_coeff
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rstn,
  input  logic        start,
  input  logic        chroma_dc,
  input  logic [5:0]  nL,
  input  logic [5:0]  nU,
  input  logic [1:0]  availability,
  input  logic [4:0]  total_coeff,
  input  logic [1:0]  trailing_ones,
  output logic        done,
  output logic [4:0]  total_coeff_length,
  output logic [15:0] total_coeff_code
);
  logic              v1, v2;
  logic signed [6:0] nc;
  logic [2:0]        tab;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      v1 <= 1'b0; v2 <= 1'b0; done <= 1'b0; nc <= '0; tab <= '0;
      total_coeff_length <= '0; total_coeff_code <= '0;
    end else begin
      v1 <= start;
      v2 <= v1;
      done <= v2;
      if (start) begin
        if (chroma_dc)                 nc <= -7'sd1;
        else case (availability)
          2'b11:   nc <= 7'((7'(nL) + 7'(nU) + 7'd1) >> 1);
          2'b01:   nc <= 7'(nL);
          2'b10:   nc <= 7'(nU);
          default: nc <= '0;
        endcase
      end
      if (v1) tab <= nc_table(nc);
      if (v2) begin
        vlc16_t r;
        r = coeff_token(tab, total_coeff, trailing_ones);
        total_coeff_length <= r.len;
        total_coeff_code   <= r.code;
      end
    end
  end
endmodule
