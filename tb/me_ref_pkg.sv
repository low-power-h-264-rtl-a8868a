// me_ref_pkg: reference model used by the testbenches of the motion
// estimator. It recomputes partition costs, running minima, the partition
// decision and the two-step search directly from pixel arrays, with plain
// integer arithmetic and loops, independently of the RTL's structure.
package me_ref_pkg;

  typedef int cost41_t [41];

  // Search-area arrays are declared at the largest side the testbenches
  // use (P1 = 16: 2*16+16 = 48); smaller search areas use the top-left part.
  localparam int SA_MAX = 48;

  // Partition geometry: top-left (x, y), width, height of partition p,
  // in pixels, following the numbering documented in me_pkg.
  function automatic void part_geom(input int p, output int x, output int y,
                                    output int w, output int h);
    if (p < 16)      begin x = (p % 4) * 4;        y = (p / 4) * 4;        w = 4;  h = 4;  end
    else if (p < 24) begin x = ((p-16) % 2) * 8;   y = ((p-16) / 2) * 4;   w = 8;  h = 4;  end
    else if (p < 32) begin x = ((p-24) % 4) * 4;   y = ((p-24) / 4) * 8;   w = 4;  h = 8;  end
    else if (p < 36) begin x = ((p-32) % 2) * 8;   y = ((p-32) / 2) * 8;   w = 8;  h = 8;  end
    else if (p < 38) begin x = 0;                  y = (p-36) * 8;         w = 16; h = 8;  end
    else if (p < 40) begin x = (p-38) * 8;         y = 0;                  w = 8;  h = 16; end
    else             begin x = 0;                  y = 0;                  w = 16; h = 16; end
  endfunction

  // Cost of every partition for a 16x16 block of differences d[y][x].
  function automatic void costs_from_diff(ref int d [16][16], output cost41_t c);
    for (int p = 0; p < 41; p++) begin
      int x, y, w, h;
      part_geom(p, x, y, w, h);
      c[p] = 0;
      for (int yy = y; yy < y + h; yy++)
        for (int xx = x; xx < x + w; xx++)
          c[p] += d[yy][xx];
    end
  endfunction

  // SAD (low = 0) or DPC on the two MSBs (low = 1) between the current
  // block and the 16x16 search-area block whose top-left pixel is (sx, sy).
  function automatic void match(ref int cur [16][16], ref int sa [SA_MAX][SA_MAX],
                                input int sx, input int sy, input bit low,
                                output cost41_t c);
    int d [16][16];
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        int a, b;
        a = cur[y][x];
        b = sa[sy + y][sx + x];
        if (low) d[y][x] = ((a >> 6) != (b >> 6)) ? 1 : 0;
        else     d[y][x] = (a > b) ? a - b : b - a;
      end
    costs_from_diff(d, c);
  endfunction

  // One pass: serpentine scan of candidates [cx-r, cx+r-1] x [cy-r, cy+r-1],
  // column by column, downward in even columns and upward in odd ones; the
  // first strictly lower cost wins. The search area's pixel (p1, p1) is
  // displacement (0, 0).
  function automatic void search(ref int cur [16][16], ref int sa [SA_MAX][SA_MAX],
                                 input int p1, input int cx, input int cy,
                                 input int r, input bit low,
                                 output cost41_t mn, output int mvx [41],
                                 output int mvy [41]);
    cost41_t c;
    for (int p = 0; p < 41; p++) begin mn[p] = 65535; mvx[p] = 0; mvy[p] = 0; end
    for (int i = 0; i < 2*r; i++)
      for (int k = 0; k < 2*r; k++) begin
        int j, dx, dy;
        j  = (i % 2 == 0) ? k : 2*r - 1 - k;
        dx = cx - r + i;
        dy = cy - r + j;
        match(cur, sa, dx + p1, dy + p1, low, c);
        for (int p = 0; p < 41; p++)
          if (c[p] < mn[p]) begin mn[p] = c[p]; mvx[p] = dx; mvy[p] = dy; end
      end
  endfunction

  // Partition decision: mode 0..3 = 16x16, 16x8, 8x16, 8x8; sub 0..3 =
  // 8x8, 8x4, 4x8, 4x4; lowest summed cost, ties to the earlier choice.
  function automatic void decide(input cost41_t mn, input int mvx [41],
                                 input int mvy [41], output int mode,
                                 output int sub [4], output int total,
                                 output int vx [16], output int vy [16]);
    int sc [4];
    int mc [4];
    int owner [16];
    for (int q = 0; q < 4; q++) begin
      int by8, bx8, s [4];
      by8 = q / 2; bx8 = q % 2;
      s[0] = mn[32 + q];
      s[1] = mn[16 + (2*by8)*2 + bx8] + mn[16 + (2*by8+1)*2 + bx8];
      s[2] = mn[24 + by8*4 + 2*bx8] + mn[24 + by8*4 + 2*bx8 + 1];
      s[3] = mn[(2*by8)*4 + 2*bx8] + mn[(2*by8)*4 + 2*bx8 + 1]
           + mn[(2*by8+1)*4 + 2*bx8] + mn[(2*by8+1)*4 + 2*bx8 + 1];
      sub[q] = 0; sc[q] = s[0];
      for (int k = 1; k < 4; k++) if (s[k] < sc[q]) begin sc[q] = s[k]; sub[q] = k; end
    end
    mc[0] = mn[40];
    mc[1] = mn[36] + mn[37];
    mc[2] = mn[38] + mn[39];
    mc[3] = sc[0] + sc[1] + sc[2] + sc[3];
    mode = 0; total = mc[0];
    for (int k = 1; k < 4; k++) if (mc[k] < total) begin total = mc[k]; mode = k; end
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++) begin
        int q;
        q = (by/2)*2 + bx/2;
        case (mode)
          0: owner[by*4+bx] = 40;
          1: owner[by*4+bx] = 36 + by/2;
          2: owner[by*4+bx] = 38 + bx/2;
          default:
            case (sub[q])
              0: owner[by*4+bx] = 32 + q;
              1: owner[by*4+bx] = 16 + by*2 + bx/2;
              2: owner[by*4+bx] = 24 + (by/2)*4 + bx;
              default: owner[by*4+bx] = by*4 + bx;
            endcase
        endcase
        vx[by*4+bx] = mvx[owner[by*4+bx]];
        vy[by*4+bx] = mvy[owner[by*4+bx]];
      end
  endfunction

  // Centre of the second search: floor((min + max) / 2) of the four 8x8
  // vectors per component, clamped to [-lim, lim].
  function automatic int centre_of(input int a, input int b, input int c,
                                   input int d, input int lim);
    int lo, hi, m;
    lo = a; hi = a;
    if (b < lo) lo = b; if (c < lo) lo = c; if (d < lo) lo = d;
    if (b > hi) hi = b; if (c > hi) hi = c; if (d > hi) hi = d;
    m = lo + hi;
    m = (m < 0) ? -((-m + 1) / 2) : m / 2;
    if (m > lim)  m = lim;
    if (m < -lim) m = -lim;
    return m;
  endfunction

endpackage
