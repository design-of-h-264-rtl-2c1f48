// tb_find_min3: self-checking test of the three-way minimum.  Modes whose
// probable_modes bit is 0 count as cost 2^22-1 (4194303); the expected
// minimum and the one-hot mode_info (lowest index wins a tie) are worked out
// here.  Includes the example with modes 3..5 all invalid.  Latency one cycle.
module tb_find_min3;
  import h264_pkg::*;
  logic clk = 0, rstn = 0, cv = 0, mv;
  logic [COST_W-1:0] cost [3], mn;
  logic [2:0] pm, mi;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  find_min3 dut (.clk, .rstn, .cost_valid(cv), .cost, .probable_modes(pm), .minimum_valid(mv),
                 .minimum_number(mn), .mode_info(mi));
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int e [3], best, bi;
    repeat (3) @(negedge clk); rstn = 1;
    for (int t = 0; t < 600; t++) begin
      pm = (t == 0) ? 3'b000 : 3'($urandom);
      for (int k = 0; k < 3; k++) begin
        cost[k] = (t % 3 == 0) ? 22'($urandom_range(4)) : 22'($urandom_range(4000));
        e[k] = pm[k] ? int'(cost[k]) : 4194303;
      end
      best = e[0]; bi = 0;
      for (int k = 1; k < 3; k++) if (e[k] < best) begin best = e[k]; bi = k; end
      @(negedge clk) cv = 1;
      @(negedge clk) cv = 0;
      checks++; if (!mv) failures++;
      checks++; if (int'(mn) != best) begin failures++; $display("min got %0d exp %0d", mn, best); end
      checks++; if (mi != 3'(1 << bi)) begin failures++; $display("info got %b exp %0d", mi, bi); end
      if (t == 0) begin checks++; if (mn != 22'd4194303) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
