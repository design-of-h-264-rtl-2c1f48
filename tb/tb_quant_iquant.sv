// tb_quant_iquant: self-checking test of forward quantisation and rescaling.
// The transform coefficients of the worked example are quantised at QP 5, 10,
// 20 and 40 and compared with the printed levels (285 2 -2 -1 ... at QP 5,
// only the DC value 5 at QP 40); then random coefficients at random QP are
// compared with the reference model.  quant_valid must come 4 cycles and
// inverse_quant_valid 7 cycles after the input.
module tb_quant_iquant;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  logic clk = 0, rstn = 0, iv = 0, busy, qv, iqv;
  coef_t w [16];
  logic [5:0] qp;
  qcoef_t z [16];
  dq_t dq [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  quant_iquant dut (.clk, .rstn, .integer_transform_valid(iv), .integer_transform(w), .qp, .busy,
                    .quant_valid(qv), .quant(z), .inverse_quant_valid(iqv), .inverse_quant(dq));
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input blk_t a, input int q, input blk_t ez);
    int lat;
    blk_t ed;
    ed = dequant(ez, q);
    for (int i = 0; i < 16; i++) w[i] = coef_t'(a[i]);
    qp = 6'(q);
    @(negedge clk) iv = 1;
    @(negedge clk) iv = 0;
    lat = 1;
    while (!qv && lat < 20) begin @(negedge clk); lat++; end
    checks++; if (lat != 4) begin failures++; $display("quant latency %0d", lat); end
    for (int i = 0; i < 16; i++) begin
      checks++; if (int'(z[i]) != ez[i]) begin failures++; $display("qp %0d i %0d got %0d exp %0d", q, i, z[i], ez[i]); end
    end
    while (!iqv && lat < 20) begin @(negedge clk); lat++; end
    checks++; if (lat != 7) begin failures++; $display("iquant latency %0d", lat); end
    for (int i = 0; i < 16; i++) begin
      checks++; if (int'(dq[i]) != ed[i]) begin failures++; $display("dq i %0d got %0d exp %0d", i, dq[i], ed[i]); end
    end
    while (busy) @(negedge clk);
  endtask
  initial begin
    blk_t a, e;
    blk_t k = '{1285,12,-11,-9, 43,-106,95,-63, -5,76,-21,13, 94,-88,30,-24};
    blk_t q5 = '{285,2,-2,-1, 6,-9,13,-5, -1,10,-4,2, 13,-8,4,-2};
    blk_t q10 = '{160,1,-1,-1, 3,-5,7,-3, 0,6,-2,1, 7,-4,2,-1};
    blk_t q20 = '{49,0,0,0, 1,-2,2,-1, 0,2,-1,0, 2,-1,1,0};
    blk_t q40 = '{5,0,0,0, 0,0,0,0, 0,0,0,0, 0,0,0,0};
    repeat (3) @(negedge clk); rstn = 1;
    run(k, 5, q5); run(k, 10, q10); run(k, 20, q20); run(k, 40, q40);
    for (int t = 0; t < 600; t++) begin
      int q;
      q = (t < 52) ? t : int'($urandom_range(51));
      for (int i = 0; i < 16; i++) a[i] = (t % 7 == 0) ? ((i % 2) ? 16320 : -16320) : int'($urandom_range(2 * 16320)) - 16320;
      e = quant(a, q);
      run(a, q, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
