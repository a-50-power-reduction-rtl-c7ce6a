// h264_ref_pkg: reference models used by the testbenches.
//
// Straightforward, per-sample models of what the decoder stages compute,
// written independently of the RTL datapaths: inverse quantisation with flat
// scaling and the 4x4 inverse transform in its direct (butterfly-free) form,
// Intra_16x16 luma and intra chroma prediction, quarter-sample luma and
// eighth-sample chroma motion compensation, and the mapping between the
// 4-samples-per-word buffer layout and sample positions in an MB.
// Sample index of an MB: luma y*16 + x, Cb 256 + y*8 + x, Cr 320 + y*8 + x.
package h264_ref_pkg;

  typedef int blk16_t [16];
  typedef int mb_t [384];

  function automatic int clip255(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // Sample index of sample j (0..3) of buffer word a (0..95).
  function automatic int word_sample(int a, int j);
    if (a < 64) return (a / 4) * 16 + (a % 4) * 4 + j;
    else begin
      int c, r;
      c = (a - 64) / 16;
      r = (a - 64) % 16;
      return 256 + c * 64 + (r / 2) * 8 + (r % 2) * 4 + j;
    end
  endfunction

  // Sample index of (row r, column j) of 4x4 block b (0..23).
  function automatic int block_sample(int b, int r, int j);
    if (b < 16) return ((b / 4) * 4 + r) * 16 + (b % 4) * 4 + j;
    else begin
      int k;
      k = b - 16;
      return 256 + (k / 4) * 64 + (((k % 4) / 2) * 4 + r) * 8 + (k % 2) * 4 + j;
    end
  endfunction

  function automatic int scale_v(int qm, int i, int j);
    int t0 [6] = '{10, 11, 13, 14, 16, 18};
    int t1 [6] = '{16, 18, 20, 23, 25, 29};
    int t2 [6] = '{13, 14, 16, 18, 20, 23};
    if (i % 2 == 0 && j % 2 == 0) return t0[qm];
    if (i % 2 == 1 && j % 2 == 1) return t1[qm];
    return t2[qm];
  endfunction

  // 1-D inverse transform in direct form.
  function automatic void itr(input int a0, a1, a2, a3, output int f0, f1, f2, f3);
    f0 = a0 + a1 + a2 + (a3 >>> 1);
    f1 = a0 + (a1 >>> 1) - a2 - a3;
    f2 = a0 - (a1 >>> 1) - a2 + a3;
    f3 = a0 - a1 + a2 - (a3 >>> 1);
  endfunction

  function automatic blk16_t iq_idct_ref(blk16_t c, int qp);
    blk16_t d, h, r;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        d[i*4+j] = (c[i*4+j] * scale_v(qp % 6, i, j)) * (1 << (qp / 6));
    for (int i = 0; i < 4; i++)
      itr(d[i*4], d[i*4+1], d[i*4+2], d[i*4+3], h[i*4], h[i*4+1], h[i*4+2], h[i*4+3]);
    for (int j = 0; j < 4; j++) begin
      int g0, g1, g2, g3;
      itr(h[j], h[4+j], h[8+j], h[12+j], g0, g1, g2, g3);
      r[j] = (g0 + 32) >>> 6; r[4+j] = (g1 + 32) >>> 6;
      r[8+j] = (g2 + 32) >>> 6; r[12+j] = (g3 + 32) >>> 6;
    end
    return r;
  endfunction

  // Neighbours of one MB.
  typedef struct {
    bit at, al;
    int ty [16]; int ly [16]; int tly;
    int tc [2][8]; int lc [2][8]; int tlc [2];
  } nbr_t;

  function automatic mb_t intra_ref(nbr_t n, int lmode, int cmode);
    mb_t s;
    int st, sl, dc, hh, vv, a, b, c;
    // luma
    st = 0; sl = 0;
    for (int i = 0; i < 16; i++) begin st += n.ty[i]; sl += n.ly[i]; end
    if (n.at && n.al) dc = (st + sl + 16) >> 5;
    else if (n.at)    dc = (st + 8) >> 4;
    else if (n.al)    dc = (sl + 8) >> 4;
    else              dc = 128;
    hh = 0; vv = 0;
    for (int i = 0; i <= 7; i++) begin
      hh += (i + 1) * (n.ty[8+i] - ((6 - i < 0) ? n.tly : n.ty[6-i]));
      vv += (i + 1) * (n.ly[8+i] - ((6 - i < 0) ? n.tly : n.ly[6-i]));
    end
    a = 16 * (n.ly[15] + n.ty[15]);
    b = (5 * hh + 32) >>> 6;
    c = (5 * vv + 32) >>> 6;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        case (lmode)
          0: s[y*16+x] = n.ty[x];
          1: s[y*16+x] = n.ly[y];
          2: s[y*16+x] = dc;
          default: s[y*16+x] = clip255((a + b * (x - 7) + c * (y - 7) + 16) >>> 5);
        endcase
    // chroma
    for (int k = 0; k < 2; k++) begin
      hh = 0; vv = 0;
      for (int i = 0; i <= 3; i++) begin
        hh += (i + 1) * (n.tc[k][4+i] - ((2 - i < 0) ? n.tlc[k] : n.tc[k][2-i]));
        vv += (i + 1) * (n.lc[k][4+i] - ((2 - i < 0) ? n.tlc[k] : n.lc[k][2-i]));
      end
      a = 16 * (n.lc[k][7] + n.tc[k][7]);
      b = (34 * hh + 32) >>> 6;
      c = (34 * vv + 32) >>> 6;
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          int v;
          case (cmode)
            0: begin
              int xo, yo, s4t, s4l;
              xo = (x / 4) * 4; yo = (y / 4) * 4;
              s4t = 0; s4l = 0;
              for (int i = 0; i < 4; i++) begin s4t += n.tc[k][xo+i]; s4l += n.lc[k][yo+i]; end
              if ((xo == 0 && yo == 0) || (xo > 0 && yo > 0)) begin
                if (n.at && n.al) v = (s4t + s4l + 4) >> 3;
                else if (n.al)    v = (s4l + 2) >> 2;
                else if (n.at)    v = (s4t + 2) >> 2;
                else              v = 128;
              end else if (xo > 0) begin
                if (n.at)         v = (s4t + 2) >> 2;
                else if (n.al)    v = (s4l + 2) >> 2;
                else              v = 128;
              end else begin
                if (n.al)         v = (s4l + 2) >> 2;
                else if (n.at)    v = (s4t + 2) >> 2;
                else              v = 128;
              end
            end
            1: v = n.lc[k][y];
            2: v = n.tc[k][x];
            default: v = clip255((a + b * (x - 3) + c * (y - 3) + 16) >>> 5);
          endcase
          s[256 + k*64 + y*8 + x] = v;
        end
    end
    return s;
  endfunction

  function automatic nbr_t rand_nbr(bit force_both);
    nbr_t n;
    n.at = force_both ? 1'b1 : 1'($urandom_range(0, 1));
    n.al = force_both ? 1'b1 : 1'($urandom_range(0, 1));
    for (int i = 0; i < 16; i++) begin n.ty[i] = $urandom_range(0, 255); n.ly[i] = $urandom_range(0, 255); end
    n.tly = $urandom_range(0, 255);
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 8; i++) begin n.tc[k][i] = $urandom_range(0, 255); n.lc[k][i] = $urandom_range(0, 255); end
      n.tlc[k] = $urandom_range(0, 255);
    end
    return n;
  endfunction

  // Reference window of an inter MB: luma [row][col] covers (x-2, y-2) to
  // (x+18, y+18) of the integer-displaced MB; chroma 9x9 per component.
  typedef struct {
    int y [21][21];
    int c [2][9][9];
  } refwin_t;

  function automatic refwin_t rand_refwin();
    refwin_t w;
    int mode;
    mode = $urandom_range(0, 3);
    for (int r = 0; r < 21; r++)
      for (int c = 0; c < 21; c++)
        w.y[r][c] = (mode == 0) ? ((($urandom_range(0, 1)) != 0) ? 255 : 0) : $urandom_range(0, 255);
    for (int k = 0; k < 2; k++)
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++) w.c[k][r][c] = $urandom_range(0, 255);
    return w;
  endfunction

  function automatic int lp(refwin_t w, int x, int y);
    return w.y[y + 2][x + 2];
  endfunction

  function automatic int t6(int e, int f, int g, int h, int i, int j);
    return e - 5 * f + 20 * g + 20 * h - 5 * i + j;
  endfunction

  // Luma sample at integer position (x, y) of the MB, fraction (fx, fy) in
  // quarter samples, with the letters of the H.264 sample naming.
  function automatic int luma_qpel(refwin_t w, int x, int y, int fx, int fy);
    int G, H, M, b, h, m, s, j, j1;
    int grid [4][4];
    G = lp(w, x, y); H = lp(w, x + 1, y); M = lp(w, x, y + 1);
    b = clip255((t6(lp(w, x-2, y), lp(w, x-1, y), G, H, lp(w, x+2, y), lp(w, x+3, y)) + 16) >>> 5);
    s = clip255((t6(lp(w, x-2, y+1), lp(w, x-1, y+1), M, lp(w, x+1, y+1), lp(w, x+2, y+1), lp(w, x+3, y+1)) + 16) >>> 5);
    h = clip255((t6(lp(w, x, y-2), lp(w, x, y-1), G, M, lp(w, x, y+2), lp(w, x, y+3)) + 16) >>> 5);
    m = clip255((t6(lp(w, x+1, y-2), lp(w, x+1, y-1), H, lp(w, x+1, y+1), lp(w, x+1, y+2), lp(w, x+1, y+3)) + 16) >>> 5);
    // centre from vertical intermediates filtered horizontally
    j1 = 0;
    begin
      int v [6];
      for (int d = -2; d <= 3; d++)
        v[d + 2] = t6(lp(w, x+d, y-2), lp(w, x+d, y-1), lp(w, x+d, y), lp(w, x+d, y+1), lp(w, x+d, y+2), lp(w, x+d, y+3));
      j1 = t6(v[0], v[1], v[2], v[3], v[4], v[5]);
    end
    j = clip255((j1 + 512) >>> 10);
    grid[0] = '{G, (G + b + 1) >> 1, b, (H + b + 1) >> 1};
    grid[1] = '{(G + h + 1) >> 1, (b + h + 1) >> 1, (b + j + 1) >> 1, (b + m + 1) >> 1};
    grid[2] = '{h, (h + j + 1) >> 1, j, (j + m + 1) >> 1};
    grid[3] = '{(M + h + 1) >> 1, (h + s + 1) >> 1, (j + s + 1) >> 1, (m + s + 1) >> 1};
    return grid[fy][fx];
  endfunction

  function automatic mb_t inter_ref(refwin_t w, int mvx, int mvy);
    mb_t o;
    int dx, dy;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) o[y*16+x] = luma_qpel(w, x, y, mvx % 4, mvy % 4);
    dx = mvx % 8; dy = mvy % 8;
    for (int k = 0; k < 2; k++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          o[256 + k*64 + y*8 + x] = ((8-dx)*(8-dy)*w.c[k][y][x] + dx*(8-dy)*w.c[k][y][x+1] +
                                     (8-dx)*dy*w.c[k][y+1][x] + dx*dy*w.c[k][y+1][x+1] + 32) >> 6;
    return o;
  endfunction

endpackage
