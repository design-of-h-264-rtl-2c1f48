// tb_exp_golomb: self-checking test of the Exp-Golomb coder.
// ue(v) for k = 0..63, se(v) for every 6-bit value (e.g. se(4) is 0001000,
// 7 bits), me(v) for the intra and inter coded_block_pattern values of the
// standard's mapping (the first sixteen code numbers of each, written out
// here), and te(v) with range 0..1 (one inverted bit) and wider ranges.  The
// expected code is code_num + 1 in 2*floor(log2(code_num + 1)) + 1 bits;
// the delay from start to valid must be 4 (ue, se, te), 6 (me) or 2 (one-bit
// te) cycles.
module tb_exp_golomb;
  import h264_pkg::*;
  logic clk = 0, rstn = 0, st = 0, mp = 0, tm1 = 0, busy, vld;
  logic [5:0] k;
  eg_map_e mode;
  logic [3:0] len;
  logic [12:0] code;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  exp_golomb dut (.clk, .rstn, .exp_golomb_start(st), .exp_golomb_k_param(k), .exp_golomb_mode(mode),
                  .exp_golomb_mode_p(mp), .exp_golomb_te_max1(tm1), .exp_golomb_busy(busy),
                  .exp_golomb_valid(vld), .exp_golomb_length(len), .exp_golomb_output(code));
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input eg_map_e md, input int kk, input bit p, input bit one, input int cn, input int elat);
    int lat, m, el, ec;
    if (one) begin el = 1; ec = (kk == 0) ? 1 : 0; end
    else begin
      m = 0; while ((cn + 1) >> (m + 1) != 0) m++;
      el = 2 * m + 1; ec = cn + 1;
    end
    mode = md; k = 6'(kk); mp = p; tm1 = one;
    @(negedge clk) st = 1;
    @(negedge clk) st = 0;
    lat = 1;
    while (!vld && lat < 20) begin @(negedge clk); lat++; end
    checks++; if (lat != elat) begin failures++; $display("mode %0d latency %0d", md, lat); end
    checks++; if (int'(len) != el || int'(code) != ec) begin failures++; $display("mode %0d k %0d got %0d/%0d exp %0d/%0d", md, kk, code, len, ec, el); end
    @(negedge clk);
  endtask
  initial begin
    int intra_cbp [16] = '{47, 31, 15, 0, 23, 27, 29, 30, 7, 11, 13, 14, 39, 43, 45, 46};
    int inter_cbp [16] = '{0, 16, 1, 2, 4, 8, 32, 3, 5, 10, 12, 15, 47, 7, 11, 13};
    int v;
    repeat (3) @(negedge clk); rstn = 1;
    for (int i = 0; i < 64; i++) run(EG_UE, i, 0, 0, i, 4);
    for (int i = 0; i < 64; i++) begin
      v = (i >= 32) ? i - 64 : i;
      run(EG_SE, i, 0, 0, v > 0 ? 2 * v - 1 : -2 * v, 4);
    end
    for (int i = 0; i < 16; i++) run(EG_ME, intra_cbp[i], 0, 0, i, 6);
    for (int i = 0; i < 16; i++) run(EG_ME, inter_cbp[i], 1, 0, i, 6);
    run(EG_TE, 0, 0, 1, 0, 2);
    run(EG_TE, 1, 0, 1, 0, 2);
    for (int i = 0; i < 10; i++) run(EG_TE, i, 0, 0, i, 4);
    // se(4) -> 0001000
    run(EG_SE, 4, 0, 0, 7, 4);
    checks++; if (code != 13'b0001000 || len != 4'd7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
