// tb_mode_select_4x4: self-checking test of the whole 4x4 mode decision.
// Random residual sets, usable-mode masks, neighbour modes and QP; the
// expected mode is the lowest-numbered usable mode with the smallest
// J = SATD + lambda * (1 for the most probable mode, 4 otherwise), all
// computed here.  The chosen residual and cost are compared too, and the
// result must appear 6 cycles after res_valid.
module tb_mode_select_4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  logic clk = 0, rstn = 0, rv = 0, bv, la, ua;
  res_t res [NMODES][16], br [16];
  logic [8:0] ms;
  mode_t lm, um, bm, mpm;
  logic [5:0] qp;
  logic [COST_W-1:0] bc;
  int checks = 0, failures = 0, hist [9];
  always #5 clk = ~clk;
  mode_select_4x4 dut (.clk, .rstn, .res_valid(rv), .res, .mode_status(ms), .left_mode(lm), .upper_mode(um),
                       .left_avail(la), .upper_avail(ua), .qp, .best_4x4_mode_valid(bv), .best_4x4_mode(bm),
                       .mpm_out(mpm), .best_cost(bc), .best_res(br));
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int lat, em, ec, c, m, lam, amp;
    blk_t x;
    repeat (3) @(negedge clk); rstn = 1;
    for (int t = 0; t < 1500; t++) begin
      qp = 6'($urandom_range(51));
      lam = lambda(int'(qp));
      lm = 4'($urandom_range(8)); um = 4'($urandom_range(8));
      la = 1'($urandom); ua = 1'($urandom);
      m = (la && ua) ? ((lm < um) ? int'(lm) : int'(um)) : 2;
      ms = 9'($urandom) | 9'b000000100;
      amp = (t % 3 == 0) ? 3 : (t % 3 == 1) ? 20 : 255;
      em = -1; ec = 0;
      for (int k = 0; k < 9; k++) begin
        for (int i = 0; i < 16; i++) begin x[i] = int'($urandom_range(2 * amp)) - amp; res[k][i] = res_t'(x[i]); end
        c = satd(x) + ((k == m) ? lam : 4 * lam);
        if (ms[k] && (em < 0 || c < ec)) begin em = k; ec = c; end
      end
      @(negedge clk) rv = 1;
      @(negedge clk) rv = 0;
      lat = 1;
      while (!bv && lat < 20) begin @(negedge clk); lat++; end
      checks++; if (lat != 6) begin failures++; $display("latency %0d", lat); end
      checks++; if (int'(bm) != em) begin failures++; $display("t %0d mode got %0d exp %0d", t, bm, em); end
      checks++; if (int'(bc) != ec) begin failures++; $display("cost got %0d exp %0d", bc, ec); end
      checks++; if (int'(mpm) != m) failures++;
      for (int i = 0; i < 16; i++) begin checks++; if (br[i] != res[em][i]) failures++; end
      hist[em]++;
    end
    for (int k = 0; k < 9; k++) begin checks++; if (hist[k] == 0) begin failures++; $display("mode %0d never chosen", k); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
