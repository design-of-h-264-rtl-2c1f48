// tb_find_best_mode: self-checking test of the final mode choice.  First the
// worked example (group minima 1372 / 2012 / 2012, mode_info 100 / 010 / 100,
// best mode 2), then random groups; the expected mode, cost and residual
// (that of the chosen mode) are worked out here.  Latency one cycle.
module tb_find_best_mode;
  import h264_pkg::*;
  logic clk = 0, rstn = 0, mv = 0, bv;
  logic [COST_W-1:0] mn [3], bc;
  logic [2:0] mi [3];
  res_t res [NMODES][16], br [16];
  mode_t bm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  find_best_mode dut (.clk, .rstn, .minimum_valid(mv), .minimum_number(mn), .mode_info(mi), .res,
                      .best_4x4_mode_valid(bv), .best_4x4_mode(bm), .best_cost(bc), .best_res(br));
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input int em, input int ec);
    @(negedge clk) mv = 1;
    @(negedge clk) mv = 0;
    checks++; if (!bv) failures++;
    checks++; if (int'(bm) != em) begin failures++; $display("mode got %0d exp %0d", bm, em); end
    checks++; if (int'(bc) != ec) begin failures++; $display("cost got %0d exp %0d", bc, ec); end
    for (int i = 0; i < 16; i++) begin checks++; if (br[i] != res[em][i]) failures++; end
  endtask
  initial begin
    int best, bi;
    repeat (3) @(negedge clk); rstn = 1;
    for (int m = 0; m < 9; m++) for (int i = 0; i < 16; i++) res[m][i] = 9'($urandom);
    mn[0] = 1372; mn[1] = 2012; mn[2] = 2012;
    mi[0] = 3'b100; mi[1] = 3'b010; mi[2] = 3'b100;
    run(2, 1372);
    for (int t = 0; t < 500; t++) begin
      for (int m = 0; m < 9; m++) for (int i = 0; i < 16; i++) res[m][i] = 9'($urandom);
      for (int g = 0; g < 3; g++) begin
        mn[g] = 22'($urandom_range((t % 2) ? 3 : 5000));
        mi[g] = 3'(1 << $urandom_range(2));
      end
      best = int'(mn[0]); bi = 0;
      for (int g = 1; g < 3; g++) if (int'(mn[g]) < best) begin best = int'(mn[g]); bi = g; end
      run(3 * bi + (mi[bi] == 3'b001 ? 0 : mi[bi] == 3'b010 ? 1 : 2), best);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
