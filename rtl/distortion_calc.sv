// distortion_calc: SATD distortion D = (sum |T(i,j)| + 1) >> 1 of a Hadamard block.
//
// An adder tree sums the sixteen absolute values of the transformed residual;
// the result is registered, so distortion_valid follows hadamard_valid by one
// cycle.  The one-cycle latency is this design's choice.
module distortion_calc
  import h264_pkg::*;
(
  input  logic clk,
  input  logic rstn,
  input  logic hadamard_valid,
  input  logic signed [12:0] result [16],
  output logic distortion_valid,
  output logic [15:0] distortion
);

  logic [16:0] sum;
  always_comb begin
    sum = 17'd1;
    for (int i = 0; i < 16; i++) begin
      logic signed [13:0] v;
      logic        [13:0] a;
      v = 14'(result[i]);
      a = (v < 0) ? -v : v;
      sum += 17'(a);
    end
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      distortion_valid <= 1'b0;
      distortion       <= '0;
    end else begin
      distortion_valid <= hadamard_valid;
      if (hadamard_valid) distortion <= sum[16:1];
    end
  end

endmodule
