// tb_flow_ctrl_4x4: self-checking test of the 4x4 block coding loop on its own.
//
// Setup:
// - The testbench models the line RAM itself: 1-cycle read latency, four
//   samples per word, leftmost sample in bits 7:0.
// - It announces the three macroblock rows of a 64x48 frame with row_ready,
//   alternating between bank 0 and bank 1, and waits for row_done after each one.
// - The frame mixes flat, striped, ramp, diagonal and random macroblocks.
// - out_space is withdrawn at random to stall the loop.
//
// Reference: every block is coded independently with h264_ref_pkg. The
// model covers:
// - neighbour availability, including the above-right rule;
// - the nine predictions and the SATD + lambda cost;
// - transform, quantisation and reconstruction.
//
// Checked for each block record:
// - the sixteen levels;
// - out_avail;
// - the most-probable-mode flag and remaining mode;
// - nA and nB, where the neighbour exists.
// Each macroblock's closing record must carry the expected
// coded_block_pattern. row_done must release the right bank.
//
// Parameters: MAX_WIDTH 64, QP 28.
// Timing: the watchdog ends the run after 200000 cycles.
module tb_flow_ctrl_4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int MAXW = 64, FW = 64, FH = 48, QPV = 28;
  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] qp = 6'(QPV);
  logic frame_start = 1'b0, row_ready = 1'b0, row_bank = 1'b0;
  logic [7:0] row_index = '0, mbs_per_row = 8'(FW / 16);
  logic row_done, row_done_bank, rd_en, rd_bank;
  logic [3:0] rd_line;
  logic [$clog2(MAXW/4)-1:0] rd_word;
  logic [31:0] rd_data;
  logic out_space = 1'b1, out_valid, out_mb_end, out_prev_flag, idle;
  qcoef_t out_quant [16];
  logic [4:0] out_nA, out_nB;
  logic [1:0] out_avail;
  logic [2:0] out_rem_mode;
  logic [3:0] out_cbp;

  flow_ctrl_4x4 #(.MAX_WIDTH(MAXW)) dut (.*);

  int checks = 0, failures = 0;
  int img [FH][FW];
  int rec [FH][FW];
  int mode_map [FH/4][FW/4];
  int nz_map [FH/4][FW/4];

  // expected records, in output order
  typedef struct {
    bit   mb_end;
    int   cbp;
    blk_t z;
    bit   au, al, flag;
    int   rem, na, nb;
  } exp_t;
  exp_t expq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // line RAM model: the bank holds the row last announced in it
  int bank_row [2];
  always_ff @(posedge clk)
    if (rd_en)
      for (int k = 0; k < 4; k++)
        rd_data[8*k +: 8] <= 8'(img[16 * bank_row[rd_bank] + int'(rd_line)][4 * int'(rd_word) + k]);

  function automatic void reference();
    int order_x [16] = '{0,1,0,1, 2,3,2,3, 0,1,0,1, 2,3,2,3};
    int order_y [16] = '{0,0,1,1, 0,0,1,1, 2,2,3,3, 2,2,3,3};
    for (int mby = 0; mby < FH / 16; mby++)
      for (int mbx = 0; mbx < FW / 16; mbx++) begin
        int cbp;
        exp_t e;
        cbp = 0;
        for (int b = 0; b < 16; b++) begin
          int bx, by, x0, y0, t8 [8], l4 [4], cr, p [9][16], best, bc, c, lam, mpm, tot;
          bit au, al, aur, v [9];
          blk_t r, z, w;
          bx = order_x[b]; by = order_y[b];
          x0 = mbx * 16 + bx * 4; y0 = mby * 16 + by * 4;
          au = y0 > 0; al = x0 > 0;
          if (by == 0) aur = au && (x0 + 4 < FW);
          else if (bx == 3) aur = 0;
          else begin
            aur = 0;
            for (int k = 0; k < b; k++) if (order_x[k] == bx + 1 && order_y[k] == by - 1) aur = 1;
          end
          for (int i = 0; i < 8; i++) t8[i] = au ? rec[y0 - 1][(x0 + i < FW) ? x0 + i : FW - 1] : 0;
          for (int i = 0; i < 4; i++) l4[i] = al ? rec[y0 + i][x0 - 1] : 0;
          cr = (au && al) ? rec[y0 - 1][x0 - 1] : 0;
          pred(t8, l4, cr, au, al, aur, p, v);
          mpm = (au && al) ? ((mode_map[y0/4][x0/4-1] < mode_map[y0/4-1][x0/4]) ?
                              mode_map[y0/4][x0/4-1] : mode_map[y0/4-1][x0/4]) : 2;
          lam = lambda(QPV);
          best = -1; bc = 0;
          for (int k = 0; k < 9; k++) if (v[k]) begin
            for (int i = 0; i < 16; i++) r[i] = img[y0 + i/4][x0 + i%4] - p[k][i];
            c = satd(r) + ((k == mpm) ? lam : 4 * lam);
            if (best < 0 || c < bc) begin best = k; bc = c; end
          end
          for (int i = 0; i < 16; i++) r[i] = img[y0 + i/4][x0 + i%4] - p[best][i];
          z = quant(fwd(r), QPV);
          w = inv(dequant(z, QPV));
          for (int i = 0; i < 16; i++) rec[y0 + i/4][x0 + i%4] = clip255(p[best][i] + w[i]);
          mode_map[y0/4][x0/4] = best;
          tot = 0;
          for (int i = 0; i < 16; i++) if (z[i] != 0) tot++;
          nz_map[y0/4][x0/4] = tot;
          if (tot > 0) cbp |= 1 << ((by / 2) * 2 + bx / 2);
          e.mb_end = 0; e.cbp = 0; e.z = z; e.au = au; e.al = al;
          e.flag = (best == mpm);
          e.rem = (best < mpm) ? best : best - 1;
          e.na = al ? nz_map[y0/4][x0/4-1] : 0;
          e.nb = au ? nz_map[y0/4-1][x0/4] : 0;
          expq.push_back(e);
        end
        e.mb_end = 1; e.cbp = cbp;
        expq.push_back(e);
      end
  endfunction

  int recs = 0;
  always @(posedge clk) if (rstn && out_valid) begin
    exp_t e;
    recs++;
    if (expq.size() == 0) check(0, "unexpected record");
    else begin
      e = expq.pop_front();
      check(out_mb_end == e.mb_end, $sformatf("record %0d: mb_end %0d", recs, out_mb_end));
      if (e.mb_end) check(int'(out_cbp) == e.cbp, $sformatf("cbp %0d exp %0d", out_cbp, e.cbp));
      else begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 16; i++) if (int'(out_quant[i]) != e.z[i]) ok = 0;
        check(ok, $sformatf("record %0d: levels", recs));
        check(out_avail == {e.au, e.al}, $sformatf("record %0d: avail", recs));
        check(out_prev_flag == e.flag, $sformatf("record %0d: mpm flag", recs));
        if (!e.flag) check(int'(out_rem_mode) == e.rem, $sformatf("record %0d: rem mode", recs));
        if (e.al) check(int'(out_nA) == e.na, $sformatf("record %0d: nA", recs));
        if (e.au) check(int'(out_nB) == e.nb, $sformatf("record %0d: nB", recs));
      end
    end
  end

  // random back-pressure from the consumer
  always @(posedge clk) out_space <= ($urandom_range(3) != 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        case (((y / 16) * (FW / 16) + x / 16) % 6)
          0: img[y][x] = 100;
          1: img[y][x] = ((x % 4) < 2) ? 40 : 200;
          2: img[y][x] = 8 * (x % 16) + 4 * (y % 16);
          3: img[y][x] = (((x + y) % 6) < 3) ? 20 : 230;
          4: img[y][x] = (((x - y + 64) % 6) < 3) ? 50 : 210;
          default: img[y][x] = $urandom_range(255);
        endcase
    reference();
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    @(posedge clk); frame_start <= 1'b1;
    @(posedge clk); frame_start <= 1'b0;
    for (int row = 0; row < FH / 16; row++) begin
      bank_row[row[0]] = row;
      row_ready <= 1'b1; row_bank <= row[0]; row_index <= 8'(row);
      @(posedge clk); row_ready <= 1'b0;
      do @(posedge clk); while (!row_done);
      check(row_done_bank == row[0], $sformatf("row_done_bank for row %0d", row));
    end
    repeat (20) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d records missing", expq.size()));
    check(idle, "not idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
