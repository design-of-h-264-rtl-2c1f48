// tb_hadamard4x4: self-checking test of the 4x4 Hadamard unit.
// Applies the worked example of the mode-decision chapter (first outputs
// -51, 1, 11, 7 / 17) and 300 random residual blocks; every output is compared
// with H*X*H' computed here with H = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1],
// and the latency (2 cycles from in_valid) is checked.
module tb_hadamard4x4;
  import h264_pkg::*;
  logic clk = 0, rstn = 0, in_valid = 0, hv;
  res_t res [16];
  logic signed [12:0] result [16];
  int checks = 0, failures = 0;
  int H [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
  always #5 clk = ~clk;
  hadamard4x4 dut (.clk, .rstn, .in_valid, .res, .hadamard_valid(hv), .result);

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int x [16], input bit show);
    int exp_y [16];
    int lat;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      exp_y[4*i+j] = 0;
      for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++)
        exp_y[4*i+j] += H[i][k] * x[4*k+l] * H[j][l];
    end
    for (int i = 0; i < 16; i++) res[i] = res_t'(x[i]);
    @(negedge clk) in_valid = 1;
    @(negedge clk) in_valid = 0;
    lat = 1;
    while (!hv && lat < 10) begin @(negedge clk); lat++; end
    checks++; if (lat != 2) begin failures++; $display("latency %0d", lat); end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(result[i]) != exp_y[i]) begin failures++; $display("r%0d got %0d exp %0d", i, result[i], exp_y[i]); end
    end
    if (show) $display("example: %0d %0d %0d %0d / %0d", result[0], result[1], result[2], result[3], result[4]);
  endtask

  initial begin
    int x [16];
    int ex [16] = '{-1,-3,-1,-2, -1,-4,-3,-2, -1,-4,-5,-4, -5,-6,-5,-4};
    repeat (3) @(negedge clk); rstn = 1;
    run(ex, 1);
    checks++; if (result[0] != -51 || result[1] != 1 || result[2] != 11 || result[3] != 7 || result[4] != 17) failures++;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 16; i++) x[i] = (t < 5) ? ((t % 2) ? 255 : -255) : int'($urandom_range(510)) - 255;
      run(x, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
