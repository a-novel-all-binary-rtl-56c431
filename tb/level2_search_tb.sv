// level2_search_tb: Level-2 candidate search on 8x8 blocks of a random
// binary frame pair held in a bin_layer_mem. Each block is searched with
// all-zero candidates (zero tuning), with random candidate sets (coarse
// selection and tuning), and with candidates that point outside the frame.
// The chosen vector, its SoD, the zero-tuning flag and the number of points
// evaluated are compared with the reference model, and the run time must
// be 11 cycles per evaluated point plus one per skipped point, plus one.
module level2_search_tb;
  import abme_pkg::*;
  import abme_ref_pkg::*;
  localparam int W = 48, H = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_zero = 0, n_coarse = 0;

  logic bank = 0, we = 0, rd;
  logic [5:0] wa, ca, ra;
  logic [W-1:0] wd, cd, rdat;
  logic start = 0, done, zt;
  logic [15:0] bx, by;
  mv_t cand [NUM_CAND];
  mv_t mv;
  logic [6:0] sod;
  logic [3:0] points;

  bin_layer_mem #(.W(W), .H(H)) mem (.clk, .bank_sel(bank), .wr_en(we), .wr_addr(wa),
    .wr_data(wd), .rd_cur_en(rd), .rd_cur_addr(ca), .rd_cur_data(cd),
    .rd_ref_en(rd), .rd_ref_addr(ra), .rd_ref_data(rdat));
  level2_search #(.W(W), .H(H)) dut (.clk, .rst_n, .start, .blk_x(bx), .blk_y(by), .cand,
    .rd_en(rd), .rd_cur_addr(ca), .rd_ref_addr(ra), .rd_cur_data(cd), .rd_ref_data(rdat),
    .done, .best_mv(mv), .best_sod(sod), .zero_tuned(zt), .points);

  img_t rf, cu;

  task automatic load(int sx, int sy);
    rf = new[W * H];
    cu = new[W * H];
    for (int i = 0; i < W * H; i++) rf[i] = $urandom_range(0, 1);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int xx, yy;
        xx = x + sx; yy = y + sy;
        cu[y * W + x] = (xx >= 0 && xx < W && yy >= 0 && yy < H) ? rf[yy * W + xx] : 0;
        if ($urandom_range(0, 9) == 0) cu[y * W + x] ^= 1;
      end
    for (int b = 0; b < 2; b++) begin
      bank = b[0];
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) wd[x] = (b == 0) ? rf[y * W + x][0] : cu[y * W + x][0];
        wa = 6'(y); we = 1; @(posedge clk); #1;
      end
    end
    we = 0;
    bank = 1;
  endtask

  task automatic search(int bxi, int byi, int cxs[6], int cys[6]);
    int mx, my, best, np, lat, listed;
    bit ez;
    l2_search(cu, rf, W, H, bxi, byi, cxs, cys, mx, my, best, ez, np);
    for (int k = 0; k < 6; k++) begin cand[k].dx = 8'(cxs[k]); cand[k].dy = 8'(cys[k]); end
    bx = 16'(bxi); by = 16'(byi);
    start = 1; @(posedge clk); #1; start = 0;
    lat = 1;
    while (!done && lat < 500) begin @(posedge clk); #1; lat++; end
    listed = ez ? 9 : 10;
    if (ez) n_zero++; else n_coarse++;
    checks += 4;
    if (zt !== ez) begin failures++; $display("FAIL zero_tuned %0d exp %0d", zt, ez); end
    if (int'(points) != np) begin failures++; $display("FAIL points %0d exp %0d", points, np); end
    if (lat != 11 * np + (listed - np) + 1) begin
      failures++; $display("FAIL latency %0d for %0d points", lat, np);
    end
    if (int'(mv.dx) != mx || int'(mv.dy) != my || int'(sod) != best) begin
      failures++;
      $display("FAIL blk (%0d,%0d): got (%0d,%0d) %0d exp (%0d,%0d) %0d", bxi, byi,
               mv.dx, mv.dy, sod, mx, my, best);
    end
  endtask

  initial begin
    int cx[6], cy[6];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      load($urandom_range(0, 6) - 3, $urandom_range(0, 6) - 3);
      for (int byi = 0; byi < H; byi += 8)
        for (int bxi = 0; bxi < W; bxi += 8) begin
          cx = '{0, 0, 0, 0, 0, 0};
          cy = '{0, 0, 0, 0, 0, 0};
          search(bxi, byi, cx, cy);
          for (int k = 1; k < 6; k++) begin
            cx[k] = $urandom_range(0, 12) - 6;
            cy[k] = $urandom_range(0, 12) - 6;
          end
          search(bxi, byi, cx, cy);
          // a single non-zero candidate still selects coarse search
          cx = '{0, 0, 0, 0, 0, 0};
          cy = '{0, 0, 0, 0, 0, 0};
          cx[$urandom_range(1, 5)] = 1;
          search(bxi, byi, cx, cy);
        end
    end
    checks++;
    if (n_zero == 0 || n_coarse == 0) begin failures++; $display("FAIL a search mode never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
