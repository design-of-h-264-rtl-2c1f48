// tb_forward_transform: self-checking test of the 4x4 forward core transform.
// First the worked example of the transform chapter (samples 85 83 79 91 ...
// give 1285 12 -11 -9 / 43 -106 95 -63 / -5 76 -21 13 / 94 -88 30 -24), then
// random residuals against Cf*X*Cf'.  Latency two cycles.
module tb_forward_transform;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  logic clk = 0, rstn = 0, iv = 0, ov;
  res_t x [16];
  coef_t y [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  forward_transform dut (.clk, .rstn, .residual_valid(iv), .res4x4(x), .integer_transform_valid(ov), .integer_transform(y));
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input blk_t a, input blk_t e);
    int lat;
    for (int i = 0; i < 16; i++) x[i] = res_t'(a[i]);
    @(negedge clk) iv = 1;
    @(negedge clk) iv = 0;
    lat = 1;
    while (!ov && lat < 10) begin @(negedge clk); lat++; end
    checks++; if (lat != 2) failures++;
    for (int i = 0; i < 16; i++) begin
      checks++; if (int'(y[i]) != e[i]) begin failures++; $display("i %0d got %0d exp %0d", i, y[i], e[i]); end
    end
  endtask
  initial begin
    blk_t a, e;
    blk_t s = '{85,83,79,91, 76,76,75,81, 79,83,86,89, 80,85,81,56};
    blk_t k = '{1285,12,-11,-9, 43,-106,95,-63, -5,76,-21,13, 94,-88,30,-24};
    repeat (3) @(negedge clk); rstn = 1;
    run(s, k);
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 16; i++) a[i] = (t == 0) ? 255 : (t == 1) ? -255 : int'($urandom_range(510)) - 255;
      e = fwd(a);
      run(a, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
