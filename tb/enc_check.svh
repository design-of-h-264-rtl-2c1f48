// enc_check.svh: body shared by the encoder-level testbenches.
//
// The including module defines FW, FH (frame size), NFR (frames), QPV (the
// encoder's QP) and instantiates the encoder as dut with clk / rstn /
// active_frame / active_line / pixel_valid / pixel_data / bitstream_valid /
// bitstream / overrun / frame_done.  Each frame is a patchwork of
// macroblock-sized patterns (flat, stripes, diagonal edges, ramps, noise) so
// that every prediction mode wins somewhere.  The frame is sent as
// Y Y C Y Y C ... with a line blanking of one line width, and the expected
// bit stream is produced here by a reference encoder built from
// h264_ref_pkg (prediction, mode decision, transform, quantisation,
// reconstruction, CAVLC, coded_block_pattern) and compared word by word.
// Every mechanism is counted (each of the nine modes chosen, most probable
// mode hits and misses, top-right substitution, picture borders, all four
// nC tables, trailing ones, level suffix growth, escape codes, zero and
// non-zero coded_block_pattern); a mechanism that never occurs is a failure.
// A last frame without blanking must raise overrun.

  int checks = 0, failures = 0;
  bit exp_bits [$];
  int words = 0;
  bit checking = 1;
  int cnt_mode [9], cnt_mpm_hit, cnt_mpm_miss, cnt_ur_sub, cnt_ur_used, cnt_left_border, cnt_top_border;
  int cnt_tab [4], cnt_t1, cnt_suffix_grow, cnt_big, cnt_cbp0, cnt_cbpnz, cnt_tc0;

  always #5 clk = ~clk;

  always @(posedge clk) if (rstn && bitstream_valid && checking) begin
    logic [31:0] e;
    e = '0;
    for (int i = 31; i >= 0; i--) e[i] = (exp_bits.size() > 0) ? exp_bits.pop_front() : 1'b0;
    checks++;
    if (bitstream != e) begin
      failures++;
      if (failures < 4) $display("word %0d got %h exp %h", words, bitstream, e);
    end
    words++;
  end

  initial begin
    #(WATCHDOG_TIME); failures++;
    $display("watchdog: words %0d", words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int img [FH][FW];
  int rec [FH][FW];
  int mode_map [FH/4][FW/4];
  int nz_map [FH/4][FW/4];

  function automatic int pattern(int f, int x, int y);
    int mb, t, lx, ly;
    if (f == 1 && y < 16) return 100;
    mb = (y / 16) * (FW / 16) + x / 16 + f * 5;
    lx = x % 16; ly = y % 16;
    case (mb % 12)
      0: return 100;
      1: return (lx % 4 < 2) ? 40 : 200;
      2: return (ly % 4 < 2) ? 30 : 220;
      3: return ((lx + ly) % 6 < 3) ? 20 : 230;
      4: return ((lx - ly + 32) % 6 < 3) ? 50 : 210;
      5: return $urandom_range(255);
      6: return 8 * lx + 4 * ly;
      7: return ((2 * lx + ly) % 8 < 4) ? 10 : 240;
      8: return ((lx + 2 * ly) % 8 < 4) ? 60 : 190;
      9: return ((2 * lx - ly + 64) % 8 < 4) ? 15 : 245;
      10: return ((lx - 2 * ly + 64) % 8 < 4) ? 25 : 225;
      default: return 128 + $urandom_range(20) - 10;
    endcase
  endfunction

  function automatic void putb(longint code, int len);
    for (int i = len - 1; i >= 0; i--) exp_bits.push_back(code[i]);
  endfunction

  // reference encoder for one frame
  function automatic void encode_frame();
    int intra_cbp [48] = '{47, 31, 15, 0, 23, 27, 29, 30, 7, 11, 13, 14, 39, 43, 45, 46, 16, 3, 5, 10, 12, 19, 21, 26,
                           28, 35, 37, 42, 44, 1, 2, 4, 8, 17, 18, 20, 24, 6, 9, 22, 25, 32, 33, 34, 36, 40, 38, 41};
    int order_x [16] = '{0,1,0,1, 2,3,2,3, 0,1,0,1, 2,3,2,3};
    int order_y [16] = '{0,0,1,1, 0,0,1,1, 2,2,3,3, 2,2,3,3};
    int nbits;
    nbits = 0;
    for (int mby = 0; mby < FH / 16; mby++)
      for (int mbx = 0; mbx < FW / 16; mbx++) begin
        int cbp, cn, m, code;
        cbp = 0;
        for (int b = 0; b < 16; b++) begin
          int bx, by, x0, y0, t8 [8], l4 [4], cr, p [9][16], best, bc, c, lam, mpm, tot, nc;
          bit au, al, aur, v [9];
          blk_t o, r, z, w;
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
          mpm = (au && al) ? ((mode_map[y0/4][x0/4-1] < mode_map[y0/4-1][x0/4]) ? mode_map[y0/4][x0/4-1] : mode_map[y0/4-1][x0/4]) : 2;
          lam = lambda(QPV);
          best = -1; bc = 0;
          for (int k = 0; k < 9; k++) if (v[k]) begin
            for (int i = 0; i < 16; i++) r[i] = img[y0 + i/4][x0 + i%4] - p[k][i];
            c = satd(r) + ((k == mpm) ? lam : 4 * lam);
            if (best < 0 || c < bc) begin best = k; bc = c; end
          end
          for (int i = 0; i < 16; i++) o[i] = img[y0 + i/4][x0 + i%4] - p[best][i];
          z = quant(fwd(o), QPV);
          w = inv(dequant(z, QPV));
          for (int i = 0; i < 16; i++) rec[y0 + i/4][x0 + i%4] = clip255(p[best][i] + w[i]);
          mode_map[y0/4][x0/4] = best;
          // statistics
          cnt_mode[best]++;
          if (best == mpm) cnt_mpm_hit++; else cnt_mpm_miss++;
          if (au && !aur && (best == 3 || best == 7)) cnt_ur_sub++;
          if (aur && (best == 3 || best == 7)) cnt_ur_used++;
          if (!al) cnt_left_border++;
          if (!au) cnt_top_border++;
          // syntax
          if (best == mpm) putb(1, 1);
          else putb((best < mpm) ? best : best - 1, 4);
          nc = nc_of(al ? nz_map[y0/4][x0/4-1] : 0, au ? nz_map[y0/4-1][x0/4] : 0, al, au);
          cnt_tab[nc < 2 ? 0 : nc < 4 ? 1 : nc < 8 ? 2 : 3]++;
          cavlc(exp_bits, z, nc, tot);
          nz_map[y0/4][x0/4] = tot;
          if (tot == 0) cnt_tc0++;
          begin
            int nt1, big;
            nt1 = 0; big = 0;
            for (int i = 0; i < 16; i++) begin
              if (z[i] == 1 || z[i] == -1) nt1++;
              if (z[i] > 3 || z[i] < -3) big++;
            end
            if (nt1 > 0) cnt_t1++;
            if (big > 1) cnt_suffix_grow++;
            for (int i = 0; i < 16; i++) if (z[i] > 15 || z[i] < -15) cnt_big++;
          end
          if (tot > 0) cbp |= 1 << ((by / 2) * 2 + bx / 2);
        end
        cn = 0;
        for (int i = 0; i < 48; i++) if (intra_cbp[i] == cbp) cn = i;
        m = 0; while ((cn + 1) >> (m + 1) != 0) m++;
        putb(cn + 1, 2 * m + 1);
        if (cbp == 0) cnt_cbp0++; else cnt_cbpnz++;
      end
    while (exp_bits.size() % 32 != 0) exp_bits.push_back(1'b0);
  endfunction

  task automatic send_frame(input int f, input int blank);
    @(negedge clk) active_frame = 1;
    repeat (5) @(negedge clk);
    for (int y = 0; y < FH; y++) begin
      active_line = 1;
      for (int x = 0; x < FW; x += 2) begin
        pixel_valid = 1; pixel_data = 8'(img[y][x]);     @(negedge clk);
        pixel_data = 8'(img[y][x + 1]);                  @(negedge clk);
        pixel_data = 8'($urandom);                        @(negedge clk);   // chroma
      end
      pixel_valid = 0; active_line = 0;
      repeat (blank) @(negedge clk);
    end
    active_frame = 0;
  endtask

  initial begin
    int v;
    active_frame = 0; active_line = 0; pixel_valid = 0; pixel_data = 0;
    repeat (5) @(negedge clk); rstn = 1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      for (int y = 0; y < FH; y++) for (int x = 0; x < FW; x++) begin
        v = pattern(f, x, y);
        img[y][x] = v < 0 ? 0 : v > 255 ? 255 : v;
      end
      encode_frame();
      send_frame(f, FW);
      while (!frame_done) @(negedge clk);
      repeat (20) @(negedge clk);
      checks++; if (exp_bits.size() != 0) begin failures++; $display("frame %0d: %0d bits missing", f, exp_bits.size()); end
      checks++; if (overrun) begin failures++; $display("frame %0d: overrun", f); end
      exp_bits = {};
    end
    // mechanisms
    for (int k = 0; k < 9; k++) begin checks++; if (cnt_mode[k] == 0) begin failures++; $display("mode %0d never chosen", k); end end
    foreach (cnt_tab[i]) begin checks++; if (cnt_tab[i] == 0) begin failures++; $display("nC table %0d never used", i); end end
    checks++; if (cnt_mpm_hit == 0) begin failures++; $display("no MPM hit"); end
    checks++; if (cnt_mpm_miss == 0) begin failures++; $display("no MPM miss"); end
    checks++; if (cnt_ur_sub == 0) begin failures++; $display("no top-right substitution"); end
    checks++; if (cnt_ur_used == 0) begin failures++; $display("no top-right use"); end
    checks++; if (cnt_left_border == 0 || cnt_top_border == 0) begin failures++; $display("no border"); end
    checks++; if (cnt_t1 == 0) begin failures++; $display("no trailing ones"); end
    checks++; if (cnt_suffix_grow == 0) begin failures++; $display("no suffix growth"); end
    checks++; if (cnt_big == 0) begin failures++; $display("no large level"); end
    checks++; if (cnt_cbp0 == 0 || cnt_cbpnz == 0) begin failures++; $display("cbp cases missing"); end
    checks++; if (cnt_tc0 == 0) begin failures++; $display("no empty block"); end
    $display("modes %0d %0d %0d %0d %0d %0d %0d %0d %0d  mpm %0d/%0d  ur %0d/%0d  tab %0d %0d %0d %0d  big %0d cbp0 %0d",
             cnt_mode[0], cnt_mode[1], cnt_mode[2], cnt_mode[3], cnt_mode[4], cnt_mode[5], cnt_mode[6], cnt_mode[7], cnt_mode[8],
             cnt_mpm_hit, cnt_mpm_miss, cnt_ur_sub, cnt_ur_used, cnt_tab[0], cnt_tab[1], cnt_tab[2], cnt_tab[3], cnt_big, cnt_cbp0);
    // overrun: frames with one blank cycle per line are more than the encoder can take
    checking = 0;
    send_frame(0, 1);
    send_frame(0, 1);
    repeat (100) @(negedge clk);
    checks++; if (!overrun) begin failures++; $display("overrun never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
