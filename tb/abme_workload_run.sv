// abme_workload_run: drives one abme_top of a given size and search range
// through a short synthetic sequence and checks every macroblock result
// against the reference model. It is the body shared by the workload
// testbench, which instantiates it once per picture format and range.
//
// Frames are windows of a larger textured image (three sinusoids of
// unrelated frequencies plus a little noise): the first frame is still, then
// the window pans by (VX, VY) pixels per frame, so the true motion is known.
// The model builds the binary pyramids of each frame and runs Level 1,
// Level 2 and Level 3 exactly as the design does; the vector, its SoD and
// the two path flags of each result must agree. The static skip is
// disabled, since a run of a few frames never reaches it. done rises when
// all frames have been searched; checks and failures then hold the counts,
// including one check that the pan vector was found at least once and one
// on the number of results. A private watchdog ends the run as failed
// after MAXCYC cycles.
module abme_workload_run
  import abme_pkg::*;
  import abme_ref_pkg::*;
#(
  parameter int W = 176,
  parameter int H = 144,
  parameter int SR = 16,
  parameter int NFRAMES = 4,
  parameter int VX = 3,
  parameter int VY = -2,
  parameter int MAXCYC = 4000000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int MBW = W / 16, MBH = H / 16, NMB = MBW * MBH;
  localparam int AVX = VX < 0 ? -VX : VX, AVY = VY < 0 ? -VY : VY;
  localparam int MARGIN = NFRAMES * (AVX > AVY ? AVX : AVY) + 8;
  localparam int WW = W + 2 * MARGIN, WH = H + 2 * MARGIN;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pix_valid = 0, pix_ready, static_skip_en = 0;
  logic [7:0] pix;
  logic mv_valid, mv_static, mv_zero_tuned, frame_done;
  logic [$clog2(MBW)-1:0] mv_mbx;
  logic [$clog2(MBH)-1:0] mv_mby;
  mv_t mv;
  logic [8:0] mv_sod;

  abme_top #(.W(W), .H(H), .SR(SR)) dut (.*);

  img_t world;
  img_t s3[2], s2[2], s1[2];   // [0] reference, [1] current
  int cur_x[NMB], cur_y[NMB], prev_x[NMB], prev_y[NMB];
  typedef struct { int mb, x, y, sod; bit st, zt; } res_t;
  res_t expq[$];
  int n_true = 0, results = 0;

  function automatic img_t frame_img(int k);
    img_t f = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        f[y * W + x] = world[(y + k * VY + MARGIN) * WW + x + k * VX + MARGIN];
    return f;
  endfunction

  function automatic int clampi(int v, int lim);
    return v > lim ? lim : (v < -lim ? -lim : v);
  endfunction

  task automatic model_frame(img_t f);
    img_t d3, d2, d1;
    s3[0] = s3[1]; s2[0] = s2[1]; s1[0] = s1[1];
    binarize(f, W, H, s3[1], d3);
    binarize(d3, W / 2, H / 2, s2[1], d2);
    binarize(d2, W / 4, H / 4, s1[1], d1);
    for (int mb = 0; mb < NMB; mb++) begin
      int mbx, mby, m1x, m1y, m2x, m2y, m3x, m3y, sod1, sod2, sod3, np, cx[6], cy[6], lim;
      bit f1, f3, zt;
      res_t e;
      mbx = mb % MBW; mby = mb / MBW;
      lim = SR / 2 - 2;
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
      e.mb = mb; e.x = m3x; e.y = m3y; e.sod = sod3; e.st = 0; e.zt = zt;
      expq.push_back(e);
      cur_x[mb] = m3x; cur_y[mb] = m3y;
    end
    for (int mb = 0; mb < NMB; mb++) begin prev_x[mb] = cur_x[mb]; prev_y[mb] = cur_y[mb]; end
  endtask

  always @(posedge clk) begin
    if (rst_n && mv_valid) begin
      int mb, gx, gy;
      res_t e;
      mb = int'(mv_mby) * MBW + int'(mv_mbx);
      gx = int'(mv.dx);
      gy = int'(mv.dy);
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL %0dx%0d +-%0d: unexpected result for mb %0d", W, H, SR, mb);
      end else begin
        e = expq.pop_front();
        if (mb != e.mb || gx != e.x || gy != e.y || int'(mv_sod) != e.sod ||
            mv_static != e.st || mv_zero_tuned != e.zt) begin
          failures++;
          $display("FAIL %0dx%0d +-%0d mb %0d: got (%0d,%0d) sod %0d zt %0d, exp mb %0d (%0d,%0d) sod %0d zt %0d",
                   W, H, SR, mb, gx, gy, mv_sod, mv_zero_tuned, e.mb, e.x, e.y, e.sod, e.zt);
        end
      end
      if (gx == VX && gy == VY) n_true++;
      results++;
    end
  end

  initial begin
    img_t f;
    done = 0; checks = 0; failures = 0;
    world = new[WW * WH];
    for (int y = 0; y < WH; y++)
      for (int x = 0; x < WW; x++)
        world[y * WW + x] = int'(128.0 + 45.0 * $sin(0.23 * x + 0.05 * y) + 35.0 * $cos(0.19 * y - 0.07 * x)
                                 + 25.0 * $sin(0.061 * x + 0.043 * y + 0.011 * x * y / 16.0))
                            + $urandom_range(0, 8);
    for (int mb = 0; mb < NMB; mb++) begin
      cur_x[mb] = 0; cur_y[mb] = 0; prev_x[mb] = 0; prev_y[mb] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < NFRAMES; k++) begin
      int px;
      f = frame_img(k);
      if (k == 0) begin
        img_t d3, d2, d1;
        binarize(f, W, H, s3[1], d3);
        binarize(d3, W / 2, H / 2, s2[1], d2);
        binarize(d2, W / 4, H / 4, s1[1], d1);
      end else begin
        model_frame(f);
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
    end
    while (!frame_done) begin @(posedge clk); #1; end
    repeat (2) @(posedge clk);
    checks += 2;
    if (results != (NFRAMES - 1) * NMB || expq.size() != 0) begin
      failures++; $display("FAIL %0dx%0d +-%0d: %0d results, exp %0d", W, H, SR, results, (NFRAMES - 1) * NMB);
    end
    if (n_true == 0) begin
      failures++; $display("FAIL %0dx%0d +-%0d: pan vector never found", W, H, SR);
    end
    $display("%0dx%0d +-%0d: %0d results, pan vector (%0d,%0d) found %0d times",
             W, H, SR, results, VX, VY, n_true);
    done = 1;
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    if (!done) begin
      failures++;
      $display("FAIL %0dx%0d +-%0d: watchdog expired", W, H, SR);
      done = 1;
    end
  end
endmodule
