// tb_cavlc: self-checking test of the CAVLC coder.
// The worked example of the entropy-coding chapter (block 5 2 0 0 / -1 -2 0 0
// / 0 1 -1 0 / 0 0 0 0, nC = 0) must give the printed bit string
// 0000000101 10 01 11 010 000010 011 0010010 ... as produced by the reference
// model; then random blocks (sparse and dense, small and large levels up to
// +-2063) with random neighbour counts and availability are compared bit for
// bit with the reference model.  The codes are collected from the outputs in
// stream order: coeff_token, trailing-one signs, the level FIFO writes,
// total_zeros, run_before codes.
module tb_cavlc;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  logic clk = 0, rstn = 0, st = 0, rd = 0;
  qcoef_t q [16], q2 [4];
  logic [5:0] nL, nU;
  logic [1:0] av;
  logic [4:0] tcn, tcl, lrn;
  logic [15:0] tcc;
  logic [1:0] t1l;
  logic [2:0] t1;
  logic [3:0] tzl;
  logic [8:0] tz;
  logic [5:0] rl;
  logic [27:0] rc;
  logic rdy, nxt, scan, lw;
  logic [32:0] ld;
  int checks = 0, failures = 0;
  bit lev_bits [$];
  int lev_n;
  always #5 clk = ~clk;
  cavlc dut (.clk, .rstn, .q4x4(q), .q2x2(q2), .cavlc_start(st), .nL, .nU, .availability(av),
             .block_type(BT_LUMA4X4), .data_read(rd), .total_coeff_number(tcn), .data_ready(rdy),
             .process_next_block(nxt), .block_scanning(scan), .total_coeff_length(tcl), .total_coeff(tcc),
             .trailing_one_length(t1l), .trailing_one(t1), .total_zeros_length(tzl), .total_zeros(tz),
             .run_data_length(rl), .run_data(rc), .levelfifo_wrreq(lw), .levelfifo_data(ld), .level_read_number(lrn));
  always @(posedge clk) if (lw) begin
    for (int i = int'(ld[32:28]) - 1; i >= 0; i--) lev_bits.push_back(ld[i]);
    lev_n++;
  end
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input blk_t c, input int na, input int nb, input bit al, input bit au, output string s);
    bit got [$], exp_q [$];
    int tot, lat;
    for (int i = 0; i < 16; i++) q[i] = qcoef_t'(c[i]);
    nL = 6'(na); nU = 6'(nb); av = {au, al};
    cavlc(exp_q, c, nc_of(na, nb, al, au), tot);
    lev_bits = {}; lev_n = 0;
    @(negedge clk) st = 1;
    @(negedge clk) st = 0;
    lat = 0;
    while (!rdy && lat < 200) begin @(negedge clk); lat++; end
    for (int i = int'(tcl) - 1; i >= 0; i--) got.push_back(tcc[i]);
    for (int i = int'(t1l) - 1; i >= 0; i--) got.push_back(t1[i]);
    got = {got, lev_bits};
    for (int i = int'(tzl) - 1; i >= 0; i--) got.push_back(tz[i]);
    for (int i = int'(rl) - 1; i >= 0; i--) got.push_back(rc[i]);
    checks++; if (int'(tcn) != tot) failures++;
    checks++; if (int'(lrn) != lev_n) failures++;
    checks++;
    if (got != exp_q) begin
      failures++;
      $write("mismatch got "); foreach (got[i]) $write("%0d", got[i]);
      $write(" exp "); foreach (exp_q[i]) $write("%0d", exp_q[i]); $display("");
    end
    s = "";
    foreach (got[i]) s = {s, got[i] ? "1" : "0"};
    @(negedge clk) rd = 1;
    @(negedge clk) rd = 0;
    checks++; if (scan) failures++;
  endtask
  initial begin
    blk_t c;
    string s;
    for (int i = 0; i < 4; i++) q2[i] = '0;
    repeat (3) @(negedge clk); rstn = 1;
    run('{5,2,0,0, -1,-2,0,0, 0,1,-1,0, 0,0,0,0}, 0, 0, 0, 0, s);
    $display("example: %s", s);
    checks++; if (s.substr(0, 24) != "0000000101100111010000010") begin failures++; $display("example prefix differs"); end
    for (int t = 0; t < 3000; t++) begin
      int dens, amp;
      dens = $urandom_range(16);
      amp = (t % 10 == 0) ? 2063 : (t % 3 == 0) ? 40 : 2;
      for (int i = 0; i < 16; i++) begin
        c[i] = ($urandom_range(15) < dens) ? int'($urandom_range(2 * amp)) - amp : 0;
      end
      run(c, $urandom_range(16), $urandom_range(16), 1'($urandom), 1'($urandom), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
