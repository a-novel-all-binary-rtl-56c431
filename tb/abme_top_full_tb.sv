// abme_top_full_tb: end-to-end test of the motion estimator at its default
// size, a 352 x 288 (CIF) picture with 22 x 18 macroblocks, over eight frames
// (one stored reference, two still, five panning). Frames are windows of a larger smoothly textured image, so the
// true motion is known: three still frames, then a steady pan of (+3, -2)
// pixels per frame. Every macroblock result (vector,
// Level-3 SoD, static flag, zero-tuning flag) is compared with a reference
// model that builds the binary pyramids and runs the three search levels
// independently of the RTL. It counts how often each mechanism happens and
// fails if one never does: Level-2 zero tuning, coarse selection, the static
// +-1 refinement, pixel-input stalls while a frame is searched, and a
// macroblock that found the true pan vector.
module abme_top_full_tb;
  import abme_pkg::*;
  import abme_ref_pkg::*;
  localparam int W = 352, H = 288, SR = 16;
  localparam int MBW = W / 16, MBH = H / 16, NMB = MBW * MBH;
  localparam int NFRAMES = 8;
  localparam int MARGIN = 64;
  localparam int WW = W + 2 * MARGIN, WH = H + 2 * MARGIN;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pix_valid = 0, pix_ready, static_skip_en = 1;
  logic [7:0] pix;
  logic mv_valid, mv_static, mv_zero_tuned, frame_done;
  logic [$clog2(MBW)-1:0] mv_mbx;
  logic [$clog2(MBH)-1:0] mv_mby;
  mv_t mv;
  logic [8:0] mv_sod;

  abme_top dut (.*);

  // ---------------------------------------------------------------- stimulus
  img_t world;
  int ox[NFRAMES], oy[NFRAMES];

  function automatic img_t frame_img(int k);
    img_t f = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        f[y * W + x] = world[(y + oy[k] + MARGIN) * WW + x + ox[k] + MARGIN];
    return f;
  endfunction

  // ---------------------------------------------------------------- model
  img_t s3[2], s2[2], s1[2];   // [0] reference, [1] current
  int cur_x[NMB], cur_y[NMB], prev_x[NMB], prev_y[NMB], rep[NMB];
  // Expected results in output order: mb, x, y, sod, static, zero tuned.
  typedef struct { int mb, x, y, sod; bit st, zt; } res_t;
  res_t expq[$];

  function automatic int clampi(int v, int lim);
    return v > lim ? lim : (v < -lim ? -lim : v);
  endfunction

  task automatic model_frame(img_t f, bit skip_en);
    img_t d3, d2, d1;
    s3[0] = s3[1]; s2[0] = s2[1]; s1[0] = s1[1];
    binarize(f, W, H, s3[1], d3);
    binarize(d3, W / 2, H / 2, s2[1], d2);
    binarize(d2, W / 4, H / 4, s1[1], d1);
    for (int mb = 0; mb < NMB; mb++) begin
      int mbx, mby, m1x, m1y, m2x, m2y, m3x, m3y, sod1, sod2, sod3, np, cx[6], cy[6], lim;
      bit f1, f3, zt, st;
      res_t e;
      mbx = mb % MBW; mby = mb / MBW;
      lim = SR / 2 - 2;
      st = skip_en && rep[mb] >= 3;
      zt = 0;
      if (st) begin
        fs_search(s3[1], s3[0], W, H, 16, 1, 16 * mbx, 16 * mby,
                  clampi(prev_x[mb], SR - 1), clampi(prev_y[mb], SR - 1), m3x, m3y, sod3, f3);
      end else begin
        fs_search(s1[1], s1[0], W / 4, H / 4, 4, SR / 4 - 1, 4 * mbx, 4 * mby, 0, 0, m1x, m1y, sod1, f1);
        cx[0] = 0; cy[0] = 0;
        cx[1] = clampi(2 * m1x, lim); cy[1] = clampi(2 * m1y, lim);
        cx[2] = (mby > 0 && mbx < MBW - 1) ? clampi(cur_x[mb - MBW + 1] >>> 1, lim) : 0;
        cy[2] = (mby > 0 && mbx < MBW - 1) ? clampi(cur_y[mb - MBW + 1] >>> 1, lim) : 0;
        cx[3] = (mby > 0) ? clampi(cur_x[mb - MBW] >>> 1, lim) : 0;
        cy[3] = (mby > 0) ? clampi(cur_y[mb - MBW] >>> 1, lim) : 0;
        cx[4] = (mbx > 0) ? clampi(cur_x[mb - 1] >>> 1, lim) : 0;
        cy[4] = (mbx > 0) ? clampi(cur_y[mb - 1] >>> 1, lim) : 0;
        cx[5] = clampi(prev_x[mb] >>> 1, lim); cy[5] = clampi(prev_y[mb] >>> 1, lim);
        l2_search(s2[1], s2[0], W / 2, H / 2, 8 * mbx, 8 * mby, cx, cy, m2x, m2y, sod2, zt, np);
        fs_search(s3[1], s3[0], W, H, 16, R_LV3, 16 * mbx, 16 * mby, 2 * m2x, 2 * m2y, m3x, m3y, sod3, f3);
      end
      e.mb = mb; e.x = m3x; e.y = m3y; e.sod = sod3; e.st = st; e.zt = zt;
      expq.push_back(e);
      rep[mb] = (m3x == prev_x[mb] && m3y == prev_y[mb]) ? (rep[mb] == 7 ? 7 : rep[mb] + 1) : 0;
      cur_x[mb] = m3x; cur_y[mb] = m3y;
    end
    for (int mb = 0; mb < NMB; mb++) begin prev_x[mb] = cur_x[mb]; prev_y[mb] = cur_y[mb]; end
  endtask

  // ---------------------------------------------------------------- checking
  int n_zero = 0, n_coarse = 0, n_static = 0, n_stall = 0, n_true = 0, results = 0;
  int frame_k;

  always @(posedge clk) begin
    if (rst_n && mv_valid) begin
      int mb, gx, gy;
      res_t e;
      mb = int'(mv_mby) * MBW + int'(mv_mbx);
      gx = int'(mv.dx);
      gy = int'(mv.dy);
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected result for mb %0d", mb);
      end else begin
        e = expq.pop_front();
        if (mb != e.mb || gx != e.x || gy != e.y || int'(mv_sod) != e.sod ||
            mv_static != e.st || mv_zero_tuned != e.zt) begin
          failures++;
          $display("FAIL result %0d mb %0d: got (%0d,%0d) sod %0d st %0d zt %0d, exp mb %0d (%0d,%0d) sod %0d st %0d zt %0d",
                   results, mb, gx, gy, mv_sod, mv_static, mv_zero_tuned,
                   e.mb, e.x, e.y, e.sod, e.st, e.zt);
        end
      end
      if (mv_static) n_static++;
      else if (mv_zero_tuned) n_zero++;
      else n_coarse++;
      if ((gx == 3 && gy == -2) || (gx == -5 && gy == 4)) n_true++;
      results++;
    end
    if (rst_n && pix_valid && !pix_ready) n_stall++;
  end

  initial begin
    img_t f;
    int vx, vy;
    world = new[WW * WH];
    for (int y = 0; y < WH; y++)
      for (int x = 0; x < WW; x++)
        world[y * WW + x] = int'(128.0 + 55.0 * $sin(0.23 * x + 0.05 * y) + 45.0 * $cos(0.19 * y - 0.07 * x))
                            + $urandom_range(0, 8);
    ox[0] = 0; oy[0] = 0;
    for (int k = 1; k < NFRAMES; k++) begin
      vx = (k < 3) ? 0 : (k < 10) ? 3 : -5;
      vy = (k < 3) ? 0 : (k < 10) ? -2 : 4;
      ox[k] = ox[k - 1] + vx; oy[k] = oy[k - 1] + vy;
    end
    for (int mb = 0; mb < NMB; mb++) begin
      cur_x[mb] = 0; cur_y[mb] = 0; prev_x[mb] = 0; prev_y[mb] = 0; rep[mb] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < NFRAMES; k++) begin
      int px;
      frame_k = k;
      f = frame_img(k);
      if (k == 0) begin
        img_t d3, d2, d1;
        binarize(f, W, H, s3[1], d3);
        binarize(d3, W / 2, H / 2, s2[1], d2);
        binarize(d2, W / 4, H / 4, s1[1], d1);
      end else begin
        model_frame(f, static_skip_en);
      end
      px = 0;
      while (px < W * H) begin
        pix_valid = 1;
        pix = 8'(f[px]);
        @(posedge clk);
        if (pix_ready) px++;
        #1;
      end
      pix_valid = 0;
      // the next frame is offered at once and waits while this one is searched
    end
    while (!frame_done) begin @(posedge clk); #1; end
    repeat (2) @(posedge clk);
    checks++;
    if (results != (NFRAMES - 1) * NMB || expq.size() != 0) begin
      failures++; $display("FAIL %0d results, exp %0d", results, (NFRAMES - 1) * NMB);
    end
    $display("zero tuning %0d, coarse %0d, static %0d, stall cycles %0d, true pan vector %0d",
             n_zero, n_coarse, n_static, n_stall, n_true);
    checks += 5;
    if (n_zero == 0)   begin failures++; $display("FAIL zero tuning never happened"); end
    if (n_coarse == 0) begin failures++; $display("FAIL coarse selection never happened"); end
    if (n_static == 0) begin failures++; $display("FAIL static refinement never happened"); end
    if (n_stall == 0)  begin failures++; $display("FAIL input never stalled"); end
    if (n_true == 0)   begin failures++; $display("FAIL pan vector never found"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
