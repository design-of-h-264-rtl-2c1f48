// tb_residual_calc: self-checking test of the nine residual subtractors
// (original - prediction, 9-bit signed) with random and extreme samples;
// res_valid must follow pred_valid by two cycles.
module tb_residual_calc;
  import h264_pkg::*;
  logic clk = 0, rstn = 0, pv = 0, rv;
  pix_t orig [16], pr [NMODES][16];
  res_t res [NMODES][16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  residual_calc dut (.clk, .rstn, .pred_valid(pv), .orig, .pred(pr), .res_valid(rv), .res);
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int lat;
    repeat (3) @(negedge clk); rstn = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 16; i++) begin
        orig[i] = (t == 0) ? 8'd0 : (t == 1) ? 8'd255 : 8'($urandom);
        for (int k = 0; k < 9; k++) pr[k][i] = (t == 0) ? 8'd255 : (t == 1) ? 8'd0 : 8'($urandom);
      end
      @(negedge clk) pv = 1;
      @(negedge clk) pv = 0;
      for (int i = 0; i < 16; i++) orig[i] = 8'($urandom);   // inputs only need to hold for one cycle
      lat = 1;
      while (!rv && lat < 10) begin @(negedge clk); lat++; end
      checks++; if (lat != 2) failures++;
    end
    // value check with inputs held
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 16; i++) begin
        orig[i] = 8'($urandom);
        for (int k = 0; k < 9; k++) pr[k][i] = 8'($urandom);
      end
      @(negedge clk) pv = 1;
      @(negedge clk) pv = 0;
      @(negedge clk);
      for (int k = 0; k < 9; k++) for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(res[k][i]) != int'(orig[i]) - int'(pr[k][i])) begin failures++; $display("k %0d i %0d", k, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
