// tb_rate_calc: self-checking test of the rate term.  For every QP the
// expected lambda is round(sqrt(0.85 * 2^((QP-12)/3))) (at least 1), computed
// here in floating point; the most probable mode gets lambda, the others
// 4 * lambda (the 23 / 92 of the QP 40 example).  Latency one cycle.
module tb_rate_calc;
  import h264_pkg::*;
  logic clk = 0, rstn = 0, iv = 0, rv;
  logic [5:0] qp;
  mode_t mpm;
  logic [8:0] rate [NMODES];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rate_calc dut (.clk, .rstn, .in_valid(iv), .qp, .mpm, .rate_valid(rv), .rate);
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int lam;
    real r;
    repeat (3) @(negedge clk); rstn = 1;
    for (int q = 0; q < 52; q++)
      for (int m = 0; m < 9; m++) begin
        r = $sqrt(0.85 * (2.0 ** ((q - 12) / 3.0)));
        lam = int'($floor(r + 0.5));
        if (lam < 1) lam = 1;
        qp = 6'(q); mpm = 4'(m);
        @(negedge clk) iv = 1;
        @(negedge clk) iv = 0;
        checks++; if (!rv) failures++;
        for (int k = 0; k < 9; k++) begin
          checks++;
          if (int'(rate[k]) != ((k == m) ? lam : 4 * lam)) begin
            failures++; $display("qp %0d mode %0d got %0d lam %0d", q, k, rate[k], lam);
          end
        end
        if (q == 40 && m == 0) begin
          checks++; if (rate[0] != 23 || rate[1] != 92) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
