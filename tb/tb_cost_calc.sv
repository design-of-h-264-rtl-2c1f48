// tb_cost_calc: self-checking test of J = D + lambda*R for nine modes with
// random distortions and rates; latency one cycle.
module tb_cost_calc;
  import h264_pkg::*;
  logic clk = 0, rstn = 0, dv = 0, cv;
  logic [15:0] d [NMODES];
  logic [8:0]  r [NMODES];
  logic [COST_W-1:0] c [NMODES];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cost_calc dut (.clk, .rstn, .distortion_valid(dv), .distortion(d), .rate(r), .cost_valid(cv), .cost(c));
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rstn = 1;
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < 9; k++) begin
        d[k] = (t == 0) ? 16'hffff : 16'($urandom);
        r[k] = (t == 0) ? 9'h1ff : 9'($urandom);
      end
      @(negedge clk) dv = 1;
      @(negedge clk) dv = 0;
      checks++; if (!cv) failures++;
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (int'(c[k]) != int'(d[k]) + int'(r[k])) begin failures++; $display("k %0d got %0d", k, c[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
