// h264_ref_pkg: behavioural reference model used by the testbenches.
//
// Written straight from the equations of the standard, independently of the
// RTL: 4x4 intra prediction (nine modes and their availability), the forward
// core transform, quantisation |Z| = (|W|*MF + f) >> (15 + QP/6) with
// f = 682 << (4 + QP/6) and the +-2063 limit, rescaling W' = Z*V << QP/6, the
// inverse transform (rows, then columns, then (x + 32) >> 6), the Hadamard
// SATD, the Lagrange multiplier from its floating-point formula and a CAVLC
// bit writer.  Only the variable-length code tables (coeff_token, total_zeros,
// run_before) are taken from h264_pkg; everything else is recomputed here.
package h264_ref_pkg;

  typedef int blk_t [16];

  function automatic int clip255(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // p(x, y) of the standard for x = -1..7 at y = -1, or x = -1 and y = 0..3
  function automatic int pn(input int top [8], input int left [4], input int m, input int x, input int y);
    if (y == -1) return (x == -1) ? m : top[x];
    return left[y];
  endfunction

  // 9 predictions, raster order; valid[k] says whether mode k may be used
  function automatic void pred(input int top_in [8], input int left [4], input int m,
                               input bit au, input bit al, input bit aur,
                               output int p [9][16], output bit valid [9]);
    int t [8];
    for (int i = 0; i < 8; i++) t[i] = (i >= 4 && !aur) ? top_in[3] : top_in[i];
    valid = '{au, al, 1'b1, au, au && al, au && al, au && al, au, al};
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
      int k, z, s;
      k = 4 * y + x;
      p[0][k] = t[x];
      p[1][k] = left[y];
      s = 0;
      if (au && al) begin for (int i = 0; i < 4; i++) s += t[i] + left[i]; p[2][k] = (s + 4) >> 3; end
      else if (al) begin for (int i = 0; i < 4; i++) s += left[i]; p[2][k] = (s + 2) >> 2; end
      else if (au) begin for (int i = 0; i < 4; i++) s += t[i]; p[2][k] = (s + 2) >> 2; end
      else p[2][k] = 128;
      if (x == 3 && y == 3) p[3][k] = (t[6] + 3 * t[7] + 2) >> 2;
      else p[3][k] = (t[x+y] + 2 * t[x+y+1] + t[x+y+2] + 2) >> 2;
      if (x > y) p[4][k] = (pn(t,left,m,x-y-2,-1) + 2*pn(t,left,m,x-y-1,-1) + pn(t,left,m,x-y,-1) + 2) >> 2;
      else if (x < y) p[4][k] = (pn(t,left,m,-1,y-x-2) + 2*pn(t,left,m,-1,y-x-1) + pn(t,left,m,-1,y-x) + 2) >> 2;
      else p[4][k] = (pn(t,left,m,0,-1) + 2*m + pn(t,left,m,-1,0) + 2) >> 2;
      z = 2 * x - y;
      if (z >= 0 && z % 2 == 0) p[5][k] = (pn(t,left,m,x-(y>>1)-1,-1) + pn(t,left,m,x-(y>>1),-1) + 1) >> 1;
      else if (z > 0) p[5][k] = (pn(t,left,m,x-(y>>1)-2,-1) + 2*pn(t,left,m,x-(y>>1)-1,-1) + pn(t,left,m,x-(y>>1),-1) + 2) >> 2;
      else if (z == -1) p[5][k] = (left[0] + 2*m + t[0] + 2) >> 2;
      else p[5][k] = (pn(t,left,m,-1,y-1) + 2*pn(t,left,m,-1,y-2) + pn(t,left,m,-1,y-3) + 2) >> 2;
      z = 2 * y - x;
      if (z >= 0 && z % 2 == 0) p[6][k] = (pn(t,left,m,-1,y-(x>>1)-1) + pn(t,left,m,-1,y-(x>>1)) + 1) >> 1;
      else if (z > 0) p[6][k] = (pn(t,left,m,-1,y-(x>>1)-2) + 2*pn(t,left,m,-1,y-(x>>1)-1) + pn(t,left,m,-1,y-(x>>1)) + 2) >> 2;
      else if (z == -1) p[6][k] = (left[0] + 2*m + t[0] + 2) >> 2;
      else p[6][k] = (pn(t,left,m,x-1,-1) + 2*pn(t,left,m,x-2,-1) + pn(t,left,m,x-3,-1) + 2) >> 2;
      if (y % 2 == 0) p[7][k] = (t[x+(y>>1)] + t[x+(y>>1)+1] + 1) >> 1;
      else p[7][k] = (t[x+(y>>1)] + 2*t[x+(y>>1)+1] + t[x+(y>>1)+2] + 2) >> 2;
      z = x + 2 * y;
      if (z > 5) p[8][k] = left[3];
      else if (z == 5) p[8][k] = (left[2] + 3 * left[3] + 2) >> 2;
      else if (z % 2 == 0) p[8][k] = (left[y+(x>>1)] + left[y+(x>>1)+1] + 1) >> 1;
      else p[8][k] = (left[y+(x>>1)] + 2*left[y+(x>>1)+1] + left[y+(x>>1)+2] + 2) >> 2;
    end
  endfunction

  function automatic blk_t fwd(input blk_t x);
    int c [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
    blk_t y;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      y[4*i+j] = 0;
      for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++)
        y[4*i+j] += c[i][k] * x[4*k+l] * c[j][l];
    end
    return y;
  endfunction

  function automatic int pclass(input int i);
    int r, c;
    r = i / 4; c = i % 4;
    if (r % 2 == 0 && c % 2 == 0) return 0;
    if (r % 2 == 1 && c % 2 == 1) return 1;
    return 2;
  endfunction

  function automatic blk_t quant(input blk_t w, input int qp);
    int mft [6][3] = '{'{13107,5243,8066}, '{11916,4660,7490}, '{10082,4194,6554},
                       '{9362,3647,5825}, '{8192,3355,5243}, '{7282,2893,4559}};
    blk_t z;
    longint a;
    for (int i = 0; i < 16; i++) begin
      a = w[i] < 0 ? -w[i] : w[i];
      a = (a * mft[qp % 6][pclass(i)] + (longint'(682) << (4 + qp / 6))) >> (15 + qp / 6);
      if (a > 2063) a = 2063;
      z[i] = w[i] < 0 ? -int'(a) : int'(a);
    end
    return z;
  endfunction

  function automatic blk_t dequant(input blk_t z, input int qp);
    int vt [6][3] = '{'{10,16,13}, '{11,18,14}, '{13,20,16}, '{14,23,18}, '{16,25,20}, '{18,29,23}};
    blk_t w;
    for (int i = 0; i < 16; i++) w[i] = (z[i] * vt[qp % 6][pclass(i)]) <<< (qp / 6);
    return w;
  endfunction

  function automatic blk_t inv(input blk_t d);
    blk_t f, r;
    int e0, e1, e2, e3;
    for (int i = 0; i < 4; i++) begin
      e0 = d[4*i] + d[4*i+2]; e1 = d[4*i] - d[4*i+2];
      e2 = (d[4*i+1] >>> 1) - d[4*i+3]; e3 = d[4*i+1] + (d[4*i+3] >>> 1);
      f[4*i] = e0 + e3; f[4*i+1] = e1 + e2; f[4*i+2] = e1 - e2; f[4*i+3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin
      e0 = f[j] + f[8+j]; e1 = f[j] - f[8+j];
      e2 = (f[4+j] >>> 1) - f[12+j]; e3 = f[4+j] + (f[12+j] >>> 1);
      r[j] = (e0 + e3 + 32) >>> 6; r[4+j] = (e1 + e2 + 32) >>> 6;
      r[8+j] = (e1 - e2 + 32) >>> 6; r[12+j] = (e0 - e3 + 32) >>> 6;
    end
    return r;
  endfunction

  function automatic int satd(input blk_t x);
    int h [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
    int s, v;
    s = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      v = 0;
      for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++) v += h[i][k] * x[4*k+l] * h[j][l];
      s += v < 0 ? -v : v;
    end
    return (s + 1) >> 1;
  endfunction

  function automatic int lambda(input int qp);
    int l;
    l = int'($floor($sqrt(0.85 * (2.0 ** ((qp - 12) / 3.0))) + 0.5));
    return l < 1 ? 1 : l;
  endfunction

  // ---------------- CAVLC ----------------
  int scan4 [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};

  // append a code to a bit queue (msb first)
  function automatic void put(ref bit q [$], input longint code, input int len);
    for (int i = len - 1; i >= 0; i--) q.push_back(code[i]);
  endfunction

  function automatic int nc_of(input int na, input int nb, input bit al, input bit au);
    if (al && au) return (na + nb + 1) >> 1;
    if (al) return na;
    if (au) return nb;
    return 0;
  endfunction

  // CAVLC of a 16-coefficient luma block (raster order) with the given nC
  function automatic void cavlc(ref bit q [$], input blk_t c, input int nc, output int total);
    int s [16], lv [16], nlev, tc, t1, tz, last, sl, lc, pre, tab;
    h264_pkg::vlc16_t v;
    bit stop_t1;
    for (int i = 0; i < 16; i++) s[i] = c[scan4[i]];
    tc = 0; t1 = 0; tz = 0; last = -1; nlev = 0; stop_t1 = 0;
    for (int i = 15; i >= 0; i--) if (s[i] != 0) begin
      if (last < 0) last = i;
      tc++;
      if (!stop_t1 && t1 < 3 && (s[i] == 1 || s[i] == -1)) t1++;
      else stop_t1 = 1;
      lv[nlev++] = s[i];
    end
    for (int i = 0; i < last; i++) if (s[i] == 0) tz++;
    total = tc;
    tab = nc < 2 ? 0 : nc < 4 ? 1 : nc < 8 ? 2 : 3;
    v = h264_pkg::coeff_token(3'(tab), 5'(tc), 2'(t1));
    put(q, longint'(v.code), int'(v.len));
    for (int i = 0; i < t1; i++) put(q, lv[i] < 0 ? 1 : 0, 1);
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      lc = lv[i] > 0 ? 2 * lv[i] - 2 : -2 * lv[i] - 1;
      if (i == t1 && t1 < 3) lc -= 2;
      if (sl == 0) begin
        if (lc < 14) put(q, 1, lc + 1);
        else if (lc < 30) begin put(q, 1, 15); put(q, lc - 14, 4); end
        else begin put(q, 1, 16); put(q, lc - 30, 12); end
      end else begin
        if (lc < (15 << sl)) begin pre = lc >> sl; put(q, 1, pre + 1); put(q, lc & ((1 << sl) - 1), sl); end
        else begin put(q, 1, 16); put(q, lc - (15 << sl), 12); end
      end
      if (sl == 0) sl = 1;
      if ((lv[i] < 0 ? -lv[i] : lv[i]) > (3 << (sl - 1)) && sl < 6) sl++;
    end
    if (tc > 0 && tc < 16) begin
      v = h264_pkg::total_zeros_code(1'b0, 5'(tc), 4'(tz));
      put(q, longint'(v.code), int'(v.len));
    end
    begin
      int zl, run, k;
      zl = tz; k = 0;
      for (int i = last; i >= 0 && k < tc - 1; i--) if (s[i] != 0) begin
        run = 0;
        for (int j = i - 1; j >= 0 && s[j] == 0; j--) run++;
        if (zl > 0) begin
          v = h264_pkg::run_before_code(4'(zl > 7 ? 7 : zl), 4'(run));
          put(q, longint'(v.code), int'(v.len));
        end
        zl -= run; k++;
      end
    end
  endfunction
endpackage
