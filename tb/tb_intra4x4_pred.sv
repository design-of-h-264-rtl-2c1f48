// tb_intra4x4_pred: self-checking test of the nine-mode 4x4 predictor.
// Random neighbour samples under all eight availability combinations (plus
// all-0 / all-255 edges); each mode marked usable must match the reference
// model of the standard's equations, mode_status must match the availability
// rules, and pred_valid must follow in_valid by two cycles.
module tb_intra4x4_pred;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  logic clk = 0, rstn = 0, iv = 0, au, al, aur, pv;
  pix_t top [8], left [4], corner;
  pix_t pr [NMODES][16];
  logic [8:0] ms;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  intra4x4_pred dut (.clk, .rstn, .in_valid(iv), .top, .left, .corner, .avail_up(au), .avail_left(al),
                     .avail_ur(aur), .pred_valid(pv), .pred(pr), .mode_status(ms));
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t8 [8], l4 [4], m, p [9][16], lat;
    bit v [9];
    repeat (3) @(negedge clk); rstn = 1;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 8; i++) begin t8[i] = (t < 8) ? 0 : (t < 16) ? 255 : int'($urandom_range(255)); top[i] = 8'(t8[i]); end
      for (int i = 0; i < 4; i++) begin l4[i] = (t < 8) ? 255 : (t < 16) ? 0 : int'($urandom_range(255)); left[i] = 8'(l4[i]); end
      m = int'($urandom_range(255)); corner = 8'(m);
      {aur, al, au} = 3'(t);
      if (!au) aur = 0;
      h264_ref_pkg::pred(t8, l4, m, au, al, aur, p, v);
      @(negedge clk) iv = 1;
      @(negedge clk) iv = 0;
      lat = 1;
      while (!pv && lat < 10) begin @(negedge clk); lat++; end
      checks++; if (lat != 2) failures++;
      for (int k = 0; k < 9; k++) begin
        checks++; if (ms[k] != v[k]) begin failures++; $display("status mode %0d", k); end
        if (v[k]) for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'(pr[k][i]) != p[k][i]) begin failures++; $display("t %0d mode %0d px %0d got %0d exp %0d", t, k, i, pr[k][i], p[k][i]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
