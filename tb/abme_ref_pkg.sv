// abme_ref_pkg: behavioural reference model of the all-binary motion
// estimator, used by the testbenches to work out expected results
// independently of the RTL. Images are flat dynamic arrays indexed y*w+x.
//
// binarize : H_A threshold (four-neighbour sum + 4, divided by 4, clipped
//            to 255, zero outside the frame), S = (F >= threshold), and the
//            half-size frame of the thresholds at even (x, y).
// sod_at   : number of differing bits between an n x n current block and
//            the reference block displaced by (dx, dy).
// fs_search: full search in raster order (dy outer, dx inner), first
//            minimum wins, points whose reference block leaves the frame
//            excluded.
// l2_search: six-candidate coarse search plus four-point tuning, or the
//            nine-point zero tuning when all candidates are zero.
package abme_ref_pkg;

  typedef int img_t[];

  function automatic void binarize(input img_t f, input int w, input int h,
                                   output img_t s, output img_t dec);
    s   = new[w * h];
    dec = new[(w / 2) * (h / 2)];
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        int sum, t;
        sum = 0;
        if (x > 0)     sum += f[y * w + x - 1];
        if (x < w - 1) sum += f[y * w + x + 1];
        if (y > 0)     sum += f[(y - 1) * w + x];
        if (y < h - 1) sum += f[(y + 1) * w + x];
        t = (sum + 4) / 4;
        if (t > 255) t = 255;
        s[y * w + x] = (f[y * w + x] >= t) ? 1 : 0;
        if (x % 2 == 0 && y % 2 == 0) dec[(y / 2) * (w / 2) + x / 2] = t;
      end
    end
  endfunction

  function automatic int sod_at(input img_t cur, input img_t rf, input int w,
                                input int n, input int bx, input int by,
                                input int dx, input int dy);
    int s;
    s = 0;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++)
        s += cur[(by + y) * w + bx + x] ^ rf[(by + dy + y) * w + bx + dx + x];
    return s;
  endfunction

  function automatic bit in_frame(input int w, input int h, input int n,
                                input int px, input int py);
    return px >= 0 && py >= 0 && px <= w - n && py <= h - n;
  endfunction

  function automatic void fs_search(input img_t cur, input img_t rf, input int w,
                                    input int h, input int n, input int rng,
                                    input int bx, input int by, input int cx,
                                    input int cy, output int mx, output int my,
                                    output int best, output bit found);
    found = 0;
    mx = cx;
    my = cy;
    best = -1;
    for (int dv = -rng; dv <= rng; dv++)
      for (int du = -rng; du <= rng; du++)
        if (in_frame(w, h, n, bx + cx + du, by + cy + dv)) begin
          int s;
          s = sod_at(cur, rf, w, n, bx, by, cx + du, cy + dv);
          if (!found || s < best) begin
            found = 1;
            best = s;
            mx = cx + du;
            my = cy + dv;
          end
        end
  endfunction

  function automatic void l2_search(input img_t cur, input img_t rf, input int w,
                                    input int h, input int bx, input int by,
                                    input int cxs[6], input int cys[6],
                                    output int mx, output int my, output int best,
                                    output bit zero_tuned, output int points);
    int px[16], py[16], np;
    bit have;
    have = 0;
    mx = 0;
    my = 0;
    best = -1;
    points = 0;
    zero_tuned = 1;
    for (int k = 0; k < 6; k++) if (cxs[k] != 0 || cys[k] != 0) zero_tuned = 0;
    if (zero_tuned) begin
      px = '{0, 0, 0, -1, -2, 1, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      py = '{0, -1, -2, 0, 0, 0, 0, 1, 2, 0, 0, 0, 0, 0, 0, 0};
      np = 9;
    end else begin
      for (int k = 0; k < 6; k++) begin px[k] = cxs[k]; py[k] = cys[k]; end
      np = 6;
    end
    for (int pass = 0; pass < 2; pass++) begin
      for (int k = 0; k < np; k++) begin
        if (in_frame(w, h, 8, bx + px[k], by + py[k])) begin
          int s;
          s = sod_at(cur, rf, w, 8, bx, by, px[k], py[k]);
          points++;
          if (!have || s < best) begin
            have = 1;
            best = s;
            mx = px[k];
            my = py[k];
          end
        end
      end
      if (zero_tuned || pass == 1) break;
      px[0] = mx;     py[0] = my - 1;
      px[1] = mx - 1; py[1] = my;
      px[2] = mx + 1; py[2] = my;
      px[3] = mx;     py[3] = my + 1;
      np = 4;
    end
  endfunction

endpackage
