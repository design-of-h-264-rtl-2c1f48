// tb_distortion_calc: self-checking test of the SATD unit.
// Random Hadamard outputs (including the +-4080 extremes); the expected value
// (sum of |h| + 1) / 2 is computed here.  Latency must be one cycle.
module tb_distortion_calc;
  logic clk = 0, rstn = 0, hv = 0, dv;
  logic signed [12:0] result [16];
  logic [15:0] distortion;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  distortion_calc dut (.clk, .rstn, .hadamard_valid(hv), .result, .distortion_valid(dv), .distortion);
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int s;
    repeat (3) @(negedge clk); rstn = 1;
    for (int t = 0; t < 500; t++) begin
      s = 0;
      for (int i = 0; i < 16; i++) begin
        int v;
        v = (t == 0) ? -4080 : (t == 1) ? 4080 : int'($urandom_range(8160)) - 4080;
        result[i] = 13'(v);
        s += (v < 0) ? -v : v;
      end
      @(negedge clk) hv = 1;
      @(negedge clk) hv = 0;
      checks++; if (!dv) failures++;
      checks++; if (int'(distortion) != (s + 1) / 2) begin failures++; $display("got %0d exp %0d", distortion, (s+1)/2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
