// tb_inverse_integer_transform: self-checking test of the 4x4 inverse core
// transform with the (x + 32) >> 6 rounding, against the reference model
// (rows first, then columns), with random rescaled coefficients and the
// rescaled QP 5 block of the worked example.  Latency three cycles.
module tb_inverse_integer_transform;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  logic clk = 0, rstn = 0, iv = 0, ov;
  dq_t d [16];
  itr_t r [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  inverse_integer_transform dut (.clk, .rstn, .inverse_quant_valid(iv), .inverse_quant(d), .inverse_trans_valid(ov), .inverse_trans(r));
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input blk_t a);
    int lat;
    blk_t e;
    e = inv(a);
    for (int i = 0; i < 16; i++) d[i] = dq_t'(a[i]);
    @(negedge clk) iv = 1;
    @(negedge clk) iv = 0;
    lat = 1;
    while (!ov && lat < 10) begin @(negedge clk); lat++; end
    checks++; if (lat != 3) begin failures++; $display("latency %0d", lat); end
    for (int i = 0; i < 16; i++) begin
      checks++; if (int'(r[i]) != e[i]) begin failures++; $display("i %0d got %0d exp %0d", i, r[i], e[i]); end
    end
  endtask
  initial begin
    blk_t a;
    repeat (3) @(negedge clk); rstn = 1;
    a = dequant(quant(fwd('{85,83,79,91, 76,76,75,81, 79,83,86,89, 80,85,81,56}), 5), 5);
    run(a);
    for (int t = 0; t < 500; t++) begin
      // values a residual block can produce at low QP
      for (int i = 0; i < 16; i++) a[i] = int'($urandom_range(2 * 65000)) - 65000;
      run(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
