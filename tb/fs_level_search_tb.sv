// fs_level_search_tb: full-search unit at the Level-1 configuration
// (4x4 blocks, +-3) and the Level-3 configuration (16x16 blocks, +-2), each
// reading a bin_layer_mem holding a random binary reference frame and a
// current frame made from it by a global shift plus noise. Blocks at the
// frame corners and edges, random centre vectors and reduced ranges
// (rng = 1, the static refinement) are included. The chosen vector, its
// SoD and the found flag are compared with the reference model, and done
// must come exactly 2R+N+3 cycles after start.
module fs_level_search_tb;
  import abme_pkg::*;
  import abme_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- Level-1 configuration
  localparam int W1 = 32, H1 = 24, N1 = 4, R1 = 3;
  logic m1_bank = 0, m1_we = 0, a_rd;
  logic [4:0] m1_wa, a_ca, a_ra;
  logic [W1-1:0] m1_wd, a_cd, a_rdat;
  logic a_start = 0, a_done, a_found;
  logic [15:0] a_bx, a_by;
  mv_t a_ctr, a_mv;
  logic [3:0] a_rng;
  logic [4:0] a_sod;
  bin_layer_mem #(.W(W1), .H(H1)) mem1 (.clk, .bank_sel(m1_bank), .wr_en(m1_we), .wr_addr(m1_wa),
    .wr_data(m1_wd), .rd_cur_en(a_rd), .rd_cur_addr(a_ca), .rd_cur_data(a_cd),
    .rd_ref_en(a_rd), .rd_ref_addr(a_ra), .rd_ref_data(a_rdat));
  fs_level_search #(.W(W1), .H(H1), .N(N1), .R(R1)) dut1 (.clk, .rst_n, .start(a_start),
    .blk_x(a_bx), .blk_y(a_by), .ctr(a_ctr), .rng(a_rng), .rd_en(a_rd), .rd_cur_addr(a_ca),
    .rd_ref_addr(a_ra), .rd_cur_data(a_cd), .rd_ref_data(a_rdat), .done(a_done),
    .best_mv(a_mv), .best_sod(a_sod), .found(a_found));

  // ---- Level-3 configuration
  localparam int W3 = 64, H3 = 48, N3 = 16, R3 = 2;
  logic m3_bank = 0, m3_we = 0, b_rd;
  logic [5:0] m3_wa, b_ca, b_ra;
  logic [W3-1:0] m3_wd, b_cd, b_rdat;
  logic b_start = 0, b_done, b_found;
  logic [15:0] b_bx, b_by;
  mv_t b_ctr, b_mv;
  logic [3:0] b_rng;
  logic [8:0] b_sod;
  bin_layer_mem #(.W(W3), .H(H3)) mem3 (.clk, .bank_sel(m3_bank), .wr_en(m3_we), .wr_addr(m3_wa),
    .wr_data(m3_wd), .rd_cur_en(b_rd), .rd_cur_addr(b_ca), .rd_cur_data(b_cd),
    .rd_ref_en(b_rd), .rd_ref_addr(b_ra), .rd_ref_data(b_rdat));
  fs_level_search #(.W(W3), .H(H3), .N(N3), .R(R3)) dut3 (.clk, .rst_n, .start(b_start),
    .blk_x(b_bx), .blk_y(b_by), .ctr(b_ctr), .rng(b_rng), .rd_en(b_rd), .rd_cur_addr(b_ca),
    .rd_ref_addr(b_ra), .rd_cur_data(b_cd), .rd_ref_data(b_rdat), .done(b_done),
    .best_mv(b_mv), .best_sod(b_sod), .found(b_found));

  img_t rf1, cu1, rf3, cu3;

  function automatic img_t make_ref(int w, int h);
    img_t r = new[w * h];
    for (int i = 0; i < w * h; i++) r[i] = $urandom_range(0, 1);
    return r;
  endfunction

  function automatic img_t make_cur(img_t r, int w, int h, int sx, int sy);
    img_t c = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int xx = x + sx, yy = y + sy;
        c[y * w + x] = (xx >= 0 && xx < w && yy >= 0 && yy < h) ? r[yy * w + xx] : $urandom_range(0, 1);
        if ($urandom_range(0, 15) == 0) c[y * w + x] ^= 1;
      end
    return c;
  endfunction

  task automatic load1();
    rf1 = make_ref(W1, H1);
    cu1 = make_cur(rf1, W1, H1, $urandom_range(0, 4) - 2, $urandom_range(0, 4) - 2);
    for (int b = 0; b < 2; b++) begin
      m1_bank = b[0];
      for (int y = 0; y < H1; y++) begin
        for (int x = 0; x < W1; x++) m1_wd[x] = (b == 0) ? rf1[y * W1 + x][0] : cu1[y * W1 + x][0];
        m1_wa = 5'(y); m1_we = 1; @(posedge clk); #1;
      end
    end
    m1_we = 0;
    m1_bank = 1;
  endtask

  task automatic load3();
    rf3 = make_ref(W3, H3);
    cu3 = make_cur(rf3, W3, H3, $urandom_range(0, 6) - 3, $urandom_range(0, 6) - 3);
    for (int b = 0; b < 2; b++) begin
      m3_bank = b[0];
      for (int y = 0; y < H3; y++) begin
        for (int x = 0; x < W3; x++) m3_wd[x] = (b == 0) ? rf3[y * W3 + x][0] : cu3[y * W3 + x][0];
        m3_wa = 6'(y); m3_we = 1; @(posedge clk); #1;
      end
    end
    m3_we = 0;
    m3_bank = 1;
  endtask

  task automatic search1(int bx, int by, int cx, int cy, int rng);
    int mx, my, best, lat;
    bit found;
    fs_search(cu1, rf1, W1, H1, N1, rng, bx, by, cx, cy, mx, my, best, found);
    a_bx = 16'(bx); a_by = 16'(by); a_ctr.dx = 8'(cx); a_ctr.dy = 8'(cy); a_rng = 4'(rng);
    a_start = 1; @(posedge clk); #1; a_start = 0;
    lat = 1;
    while (!a_done && lat < 200) begin @(posedge clk); #1; lat++; end
    checks += 3;
    if (lat != 2 * R1 + N1 + 3) begin failures++; $display("FAIL L1 latency %0d", lat); end
    if (a_found !== found) begin failures++; $display("FAIL L1 found %0d exp %0d", a_found, found); end
    if (found && (int'(a_mv.dx) != mx || int'(a_mv.dy) != my || int'(a_sod) != best)) begin
      failures++;
      $display("FAIL L1 blk (%0d,%0d) ctr (%0d,%0d) rng %0d: got (%0d,%0d) %0d exp (%0d,%0d) %0d",
               bx, by, cx, cy, rng, a_mv.dx, a_mv.dy, a_sod, mx, my, best);
    end
  endtask

  task automatic search3(int bx, int by, int cx, int cy, int rng);
    int mx, my, best, lat;
    bit found;
    fs_search(cu3, rf3, W3, H3, N3, rng, bx, by, cx, cy, mx, my, best, found);
    b_bx = 16'(bx); b_by = 16'(by); b_ctr.dx = 8'(cx); b_ctr.dy = 8'(cy); b_rng = 4'(rng);
    b_start = 1; @(posedge clk); #1; b_start = 0;
    lat = 1;
    while (!b_done && lat < 200) begin @(posedge clk); #1; lat++; end
    checks += 3;
    if (lat != 2 * R3 + N3 + 3) begin failures++; $display("FAIL L3 latency %0d", lat); end
    if (b_found !== found) begin failures++; $display("FAIL L3 found %0d exp %0d", b_found, found); end
    if (found && (int'(b_mv.dx) != mx || int'(b_mv.dy) != my || int'(b_sod) != best)) begin
      failures++;
      $display("FAIL L3 blk (%0d,%0d) ctr (%0d,%0d) rng %0d: got (%0d,%0d) %0d exp (%0d,%0d) %0d",
               bx, by, cx, cy, rng, b_mv.dx, b_mv.dy, b_sod, mx, my, best);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      load1();
      for (int by = 0; by < H1; by += N1)
        for (int bx = 0; bx < W1; bx += N1)
          search1(bx, by, 0, 0, R1);
      for (int k = 0; k < 30; k++)
        search1(N1 * $urandom_range(0, W1 / N1 - 1), N1 * $urandom_range(0, H1 / N1 - 1),
                $urandom_range(0, 6) - 3, $urandom_range(0, 6) - 3, $urandom_range(1, R1));
      search1(0, 0, -9, -9, R1);   // no valid point at all
      load3();
      for (int by = 0; by < H3; by += N3)
        for (int bx = 0; bx < W3; bx += N3)
          search3(bx, by, 2 * ($urandom_range(0, 4) - 2), 2 * ($urandom_range(0, 4) - 2), R3);
      for (int k = 0; k < 20; k++)
        search3(N3 * $urandom_range(0, W3 / N3 - 1), N3 * $urandom_range(0, H3 / N3 - 1),
                $urandom_range(0, 8) - 4, $urandom_range(0, 8) - 4, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
