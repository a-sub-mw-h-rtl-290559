// me_ref_pkg: reference models for the motion estimation testbenches.
//
// Holds a reference picture (search-window plane, 80 x 256) and a current
// picture (template plane, 16 x 56) and computes, with plain loops and
// textbook formulas, what the hardware must produce: block SADs, the
// integer search (initial candidates, 1D diamond search, FSLB Mode-1
// candidates), H.264 quarter-sample interpolation straight from the
// standard's equations, 4x4 SATD by matrix products, Exp-Golomb lengths and
// the 35-point sub-pel search with 4x4 SATD reuse.
package me_ref_pkg;

  int refp [256][80];
  int curp [56][16];

  typedef struct { int x; int y; } v2_t;

  // ------------------------------------------------------------ pictures
  function automatic void make_pictures(int seed);
    for (int y = 0; y < 256; y++)
      for (int x = 0; x < 80; x++) begin
        real v;
        v = 128.0 + 55.0 * $sin((x + seed) / 6.0) + 45.0 * $cos((y * 1.3 + seed) / 7.0)
            + 10.0 * $sin((x + y) / 3.0);
        refp[y][x] = int'(v) + ($urandom % 5);
        if (refp[y][x] < 0) refp[y][x] = 0;
        if (refp[y][x] > 255) refp[y][x] = 255;
      end
  endfunction

  // ------------------------------------------------------------ integer
  function automatic int sad(int tx, int ty, int sx, int sy, int w, int h);
    int s = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int d;
        d = curp[ty + r][tx + c] - refp[sy + r][sx + c];
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  function automatic int clampi(int v, int sr);
    return v > sr ? sr : (v < -sr ? -sr : v);
  endfunction

  // block geometry of A, B, C, D
  function automatic void geom(int b, output int bx, output int by, output int bw, output int bh);
    bx = (b == 3) ? 8 : 0;
    by = (b == 1) ? 8 : 0;
    bw = (b < 2) ? 16 : 8;
    bh = (b < 2) ? 8 : 16;
  endfunction

  function automatic int bsad(int b, int tx, int ty, int swx, int swy, v2_t v);
    int bx, by, bw, bh;
    geom(b, bx, by, bw, bh);
    return sad(tx + bx, ty + by, swx + v.x + bx, swy + v.y + by, bw, bh);
  endfunction

  // integer search; results: blocks A..D, Mode 1
  function automatic void ime_ref(int tx, int ty, int swx, int swy, int sr, v2_t cand [7],
                                  output v2_t mvb [4], output int sadb [4],
                                  output v2_t mv1, output int sad1, output int cyc);
    v2_t cm [8];
    // cycles: a 16-row SIMD match takes 16 issue + 3 drain cycles; a
    // systolic pass over 8 line pairs of P points 8*(P+1) + 3; direction
    // decision 1
    cyc = 7 * 19 + 8 * 19;
    for (int b = 0; b < 4; b++) sadb[b] = 65535;
    for (int i = 0; i < 7; i++) begin
      v2_t c;
      c.x = clampi(cand[i].x, sr);
      c.y = clampi(cand[i].y, sr);
      for (int b = 0; b < 4; b++) begin
        int s;
        s = bsad(b, tx, ty, swx, swy, c);
        if (s < sadb[b]) begin sadb[b] = s; mvb[b] = c; end
      end
    end
    for (int b = 0; b < 4; b++) begin
      v2_t ctr;
      ctr = mvb[b];
      for (int it = 0; it < 2; it++) begin
        int ds [4];
        v2_t dv [4];
        int dmin, n, kmin, smin;
        dv[0] = '{-1, 0}; dv[1] = '{1, 0}; dv[2] = '{0, -1}; dv[3] = '{0, 1};
        for (int d = 0; d < 4; d++) begin
          v2_t p;
          p.x = ctr.x + dv[d].x;
          p.y = ctr.y + dv[d].y;
          if (p.x < -sr || p.x > sr || p.y < -sr || p.y > sr) ds[d] = 65535;
          else ds[d] = bsad(b, tx, ty, swx, swy, p);
        end
        dmin = 0;
        for (int d = 1; d < 4; d++) if (ds[d] < ds[dmin]) dmin = d;
        // points along the direction while inside the range, at most 8
        n = 0;
        kmin = 0;
        smin = 1 << 30;
        for (int k = 0; k < 8; k++) begin
          v2_t p;
          int s;
          p.x = ctr.x + k * dv[dmin].x;
          p.y = ctr.y + k * dv[dmin].y;
          if (p.x < -sr || p.x > sr || p.y < -sr || p.y > sr) break;
          n++;
          s = bsad(b, tx, ty, swx, swy, p);
          if (s < smin) begin smin = s; kmin = k; end
        end
        cyc += 2 * (8 * 4 + 3) + 1 + 8 * (n + 1) + 3;
        mvb[b].x = ctr.x + kmin * dv[dmin].x;
        mvb[b].y = ctr.y + kmin * dv[dmin].y;
        sadb[b] = smin;
        if (kmin == 0) break;
        ctr = mvb[b];
      end
    end
    cm[0].x = clampi(cand[0].x, sr);
    cm[0].y = clampi(cand[0].y, sr);
    for (int b = 0; b < 4; b++) cm[b + 1] = mvb[b];
    cm[5].x = (mvb[0].x + mvb[1].x) >>> 1;
    cm[5].y = (mvb[0].y + mvb[1].y) >>> 1;
    cm[6].x = (mvb[2].x + mvb[3].x) >>> 1;
    cm[6].y = (mvb[2].y + mvb[3].y) >>> 1;
    cm[7].x = (mvb[0].x + mvb[1].x + mvb[2].x + mvb[3].x) >>> 2;
    cm[7].y = (mvb[0].y + mvb[1].y + mvb[2].y + mvb[3].y) >>> 2;
    sad1 = 1 << 30;
    for (int i = 0; i < 8; i++) begin
      int s;
      s = sad(tx, ty, swx + cm[i].x, swy + cm[i].y, 16, 16);
      if (s < sad1) begin sad1 = s; mv1 = cm[i]; end
    end
  endfunction

  // ------------------------------------------------------------ sub-pel
  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int b1(int x, int y);  // unrounded horizontal half at (x+1/2, y)
    return refp[y][x-2] - 5 * refp[y][x-1] + 20 * refp[y][x] + 20 * refp[y][x+1]
           - 5 * refp[y][x+2] + refp[y][x+3];
  endfunction

  function automatic int h1(int x, int y);  // unrounded vertical half at (x, y+1/2)
    return refp[y-2][x] - 5 * refp[y-1][x] + 20 * refp[y][x] + 20 * refp[y+1][x]
           - 5 * refp[y+2][x] + refp[y+3][x];
  endfunction

  function automatic int jj(int x, int y);
    int s;
    s = h1(x-2, y) - 5 * h1(x-1, y) + 20 * h1(x, y) + 20 * h1(x+1, y) - 5 * h1(x+2, y) + h1(x+3, y);
    return clip((s + 512) >>> 10);
  endfunction

  // luma sample at quarter-pel position (x4, y4) of the reference plane,
  // H.264 clause 8.4.2.2.2
  function automatic int interp(int x4, int y4);
    int x, y, fx, fy, G, H, M, b, h, j, s, m;
    x = x4 >>> 2; y = y4 >>> 2; fx = x4 & 3; fy = y4 & 3;
    G = refp[y][x]; H = refp[y][x+1]; M = refp[y+1][x];
    b = clip((b1(x, y) + 16) >>> 5);
    h = clip((h1(x, y) + 16) >>> 5);
    s = clip((b1(x, y+1) + 16) >>> 5);
    m = clip((h1(x+1, y) + 16) >>> 5);
    j = jj(x, y);
    case ({fx[1:0], fy[1:0]})
      4'b0000: return G;
      4'b0100: return (G + b + 1) >> 1;
      4'b1000: return b;
      4'b1100: return (H + b + 1) >> 1;
      4'b0001: return (G + h + 1) >> 1;
      4'b0010: return h;
      4'b0011: return (M + h + 1) >> 1;
      4'b0101: return (b + h + 1) >> 1;
      4'b1101: return (b + m + 1) >> 1;
      4'b0111: return (h + s + 1) >> 1;
      4'b1111: return (m + s + 1) >> 1;
      4'b1001: return (b + j + 1) >> 1;
      4'b1011: return (j + s + 1) >> 1;
      4'b0110: return (h + j + 1) >> 1;
      4'b1110: return (j + m + 1) >> 1;
      default: return j;
    endcase
  endfunction

  // 4x4 SATD: sum |H D H^T| with the order-4 Hadamard matrix
  function automatic int satd4(int d [16]);
    int Hm [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int t [4][4];
    int s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += Hm[i][k] * d[4*k + j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int u = 0;
        for (int k = 0; k < 4; k++) u += t[i][k] * Hm[j][k];
        s += (u < 0) ? -u : u;
      end
    return s;
  endfunction

  // length of the se(v) Exp-Golomb code
  function automatic int se_len(int v);
    int code, len;
    code = (v > 0) ? 2 * v - 1 : -2 * v;
    len = 1;
    while ((1 << ((len + 1) / 2)) - 1 <= code) len += 2;
    return len;
  endfunction

  // partition rectangles (x, y, w, h) in the order of the result table
  function automatic void part_rect(int p, output int x, output int y, output int w, output int h);
    if (p == 0) begin x = 0; y = 0; w = 16; h = 16; end
    else if (p < 3) begin x = 0; y = 8 * (p - 1); w = 16; h = 8; end
    else if (p < 5) begin x = 8 * (p - 3); y = 0; w = 8; h = 16; end
    else if (p < 9) begin x = 8 * ((p - 5) % 2); y = 8 * ((p - 5) / 2); w = 8; h = 8; end
    else if (p < 17) begin x = 8 * ((p - 9) % 2); y = 4 * ((p - 9) / 2); w = 8; h = 4; end
    else if (p < 25) begin x = 4 * ((p - 17) % 4); y = 8 * ((p - 17) / 4); w = 4; h = 8; end
    else begin x = 4 * ((p - 25) % 4); y = 4 * ((p - 25) / 4); w = 4; h = 4; end
  endfunction

  // sub-pel search; mv[0..4] = MV_Mode1, MV_A..MV_D; pmv in quarter pels
  function automatic void sme_ref(int tx, int ty, int swx, int swy, v2_t mv [5], v2_t pmv, int lambda,
                                  output v2_t bmv [41], output int bcost [41]);
    int ax [5] = '{0, 0, 0, 0, 8};
    int ay [5] = '{0, 0, 8, 0, 0};
    int aw [5] = '{16, 16, 16, 8, 8};
    int ah [5] = '{16, 8, 8, 16, 16};
    for (int p = 0; p < 41; p++) bcost[p] = 32'h00FFFFFF;
    for (int c = 0; c < 5; c++) begin
      bit dupc [5];
      for (int r = 1; r < 5; r++) dupc[r] = (mv[r].x == mv[0].x && mv[r].y == mv[0].y);
      if (c > 0 && dupc[c]) continue;
      for (int pt = 0; pt < 35; pt++) begin
        int qx, qy, mvx, mvy, mc;
        int st [4][4];
        qx = pt % 5 - 2;
        qy = pt / 5 - 3;
        mvx = 4 * mv[c].x + qx;
        mvy = 4 * mv[c].y + qy;
        mc = lambda * (se_len(mvx - pmv.x) + se_len(mvy - pmv.y));
        for (int by = 0; by < 4; by++)
          for (int bx = 0; bx < 4; bx++) begin
            int d [16];
            for (int i = 0; i < 16; i++) begin
              int x, y;
              x = 4 * bx + i % 4;
              y = 4 * by + i / 4;
              d[i] = curp[ty + y][tx + x] - interp(4 * (swx + x) + mvx, 4 * (swy + y) + mvy);
            end
            st[by][bx] = satd4(d);
          end
        for (int p = 0; p < 41; p++) begin
          int x, y, w, h, s;
          bit ev;
          part_rect(p, x, y, w, h);
          if (p == 0) ev = (c == 0);
          else if (p < 5) ev = (c == p) || (c == 0 && dupc[p]);
          else ev = (x >= ax[c] && y >= ay[c] && x + w <= ax[c] + aw[c] && y + h <= ay[c] + ah[c]);
          if (!ev) continue;
          s = mc;
          for (int yy = y / 4; yy < (y + h) / 4; yy++)
            for (int xx = x / 4; xx < (x + w) / 4; xx++) s += st[yy][xx];
          if (s < bcost[p]) begin bcost[p] = s; bmv[p].x = mvx; bmv[p].y = mvy; end
        end
      end
    end
  endfunction

endpackage
