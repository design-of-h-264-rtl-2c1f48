// tb_most_probable_mode: exhaustive test of the most probable mode rule:
// min(left, upper) when both neighbours are available, otherwise DC (2).
module tb_most_probable_mode;
  import h264_pkg::*;
  mode_t l, u, m;
  logic la, ua;
  int checks = 0, failures = 0;
  most_probable_mode dut (.left_mode(l), .upper_mode(u), .left_avail(la), .upper_avail(ua), .mpm(m));
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int e;
    for (int a = 0; a < 4; a++)
      for (int i = 0; i < 9; i++)
        for (int j = 0; j < 9; j++) begin
          l = 4'(i); u = 4'(j); la = a[0]; ua = a[1];
          #1;
          e = (a == 3) ? ((i < j) ? i : j) : 2;
          checks++; if (int'(m) != e) begin failures++; $display("l=%0d u=%0d a=%0d got %0d", i, j, a, m); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
