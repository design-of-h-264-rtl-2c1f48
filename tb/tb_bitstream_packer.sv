// tb_bitstream_packer: self-checking test of the 32-bit word packer.
// Random codes of 1..32 bits (with gaps between them) are appended to a
// reference bit queue; every output word must equal the next 32 queued bits,
// and after flush the last word must hold the remaining bits followed by
// zeros.  words_out and pending are checked as well.
module tb_bitstream_packer;
  logic clk = 0, rstn = 0, iv = 0, fl = 0, ov, pend;
  logic [31:0] code, w, wo;
  logic [5:0] len;
  int checks = 0, failures = 0, nwords = 0;
  bit qb [$];
  always #5 clk = ~clk;
  bitstream_packer dut (.clk, .rstn, .in_valid(iv), .in_code(code), .in_len(len), .flush(fl),
                        .bitstream_valid(ov), .bitstream(w), .words_out(wo), .pending(pend));
  always @(posedge clk) if (ov) begin
    logic [31:0] e;
    e = '0;
    for (int i = 31; i >= 0; i--) e[i] = (qb.size() > 0) ? qb.pop_front() : 1'b0;
    checks++; if (w != e) begin failures++; $display("word %0d got %h exp %h", nwords, w, e); end
    nwords++;
  end
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int l;
    repeat (3) @(negedge clk); rstn = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      l = (t % 5 == 0) ? 32 : int'($urandom_range(1, 32));
      code = $urandom; len = 6'(l);
      iv = ($urandom_range(3) != 0);
      if (iv) for (int i = l - 1; i >= 0; i--) qb.push_back(code[i]);
    end
    @(negedge clk) iv = 0;
    @(negedge clk);
    checks++; if (pend != (qb.size() != 0)) failures++;
    while (pend) begin @(negedge clk) fl = 1; @(negedge clk) fl = 0; end
    repeat (3) @(negedge clk);
    checks++; if (qb.size() != 0) begin failures++; $display("%0d bits left", qb.size()); end
    checks++; if (int'(wo) != nwords) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
