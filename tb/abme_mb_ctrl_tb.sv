// abme_mb_ctrl_tb: runs the macroblock sequencer against behavioural
// search units played by the testbench (random vectors, random latencies)
// on a 4 x 3 macroblock frame. It checks the macroblock order, the block
// positions and centres sent to each level, the six Level-2 candidates
// against a model of the vector fields (halving, edge zeros, clamping),
// the Level-3 centre (twice the Level-2 vector), the reported results, the
// bank flip per frame, that the first frame is not searched, and the
// static path: after a vector has stayed the same for four frames only a
// +-1 Level-3 refinement around it runs, unless static_skip_en is low.
module abme_mb_ctrl_tb;
  import abme_pkg::*;
  localparam int W = 64, H = 48, SR = 16, MBW = W / 16, MBH = H / 16, NMB = MBW * MBH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_static = 0, n_full = 0;

  logic frame_built = 0, static_skip_en = 0, busy, bank_sel;
  logic l1_start, l2_start, l3_start, l1_done = 0, l2_done = 0, l3_done = 0, l2_zero_tuned = 0;
  logic [15:0] l1_bx, l1_by, l2_bx, l2_by, l3_bx, l3_by;
  mv_t l1_ctr, l3_ctr, l1_mv, l2_mv, l3_mv, mv_out;
  mv_t l2_cand [NUM_CAND];
  logic [3:0] l1_rng, l3_rng;
  logic [8:0] l3_sod, mv_sod;
  logic mv_valid, mv_static, mv_zero_tuned, frame_done;
  logic [1:0] mv_mbx, mv_mby;

  abme_mb_ctrl #(.W(W), .H(H), .SR(SR)) dut (.*);

  int cur_x[NMB], cur_y[NMB], prev_x[NMB], prev_y[NMB], rep[NMB];
  int fix_x[NMB], fix_y[NMB];

  function automatic int clampi(int v, int lim);
    return v > lim ? lim : (v < -lim ? -lim : v);
  endfunction
  function automatic int half(int v);
    return clampi(v >>> 1, SR / 2 - 2);
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // One frame; mode 0: random vectors, 1: fixed per-macroblock vectors.
  task automatic frame(int mode, bit skip_en);
    bit bank0;
    static_skip_en = skip_en;
    bank0 = bank_sel;
    frame_built = 1; @(posedge clk); #1; frame_built = 0;
    for (int mb = 0; mb < NMB; mb++) begin
      int mbx, mby, v1x, v1y, v2x, v2y, fx, fy, ex[6], ey[6];
      bit stat;
      mbx = mb % MBW; mby = mb / MBW;
      stat = skip_en && rep[mb] >= 3;
      while (!l1_start && !l3_start) begin @(posedge clk); #1; end
      if (stat) begin
        n_static++;
        chk(l3_start && !l1_start, "static macroblock must go straight to Level 3");
        chk(int'(l3_ctr.dx) == clampi(prev_x[mb], SR - 1) && int'(l3_ctr.dy) == clampi(prev_y[mb], SR - 1),
            "static centre");
        chk(l3_rng == 4'd1, "static range");
      end else begin
        n_full++;
        chk(l1_start && !l3_start, "Level 1 first");
        chk(int'(l1_bx) == 4 * mbx && int'(l1_by) == 4 * mby && l1_ctr == '0 && l1_rng == 4'(SR / 4 - 1),
            "Level-1 block / centre / range");
        @(posedge clk); #1;
        wait_cycles($urandom_range(0, 5));
        v1x = $urandom_range(0, 6) - 3; v1y = $urandom_range(0, 6) - 3;
        l1_mv.dx = 8'(v1x); l1_mv.dy = 8'(v1y); l1_done = 1; @(posedge clk); #1; l1_done = 0;
        while (!l2_start) begin chk(!l1_start && !l3_start, "no other start while Level 2 pending"); @(posedge clk); #1; end
        ex[0] = 0; ey[0] = 0;
        ex[1] = clampi(2 * v1x, SR / 2 - 2); ey[1] = clampi(2 * v1y, SR / 2 - 2);
        ex[2] = (mby > 0 && mbx < MBW - 1) ? half(cur_x[mb - MBW + 1]) : 0;
        ey[2] = (mby > 0 && mbx < MBW - 1) ? half(cur_y[mb - MBW + 1]) : 0;
        ex[3] = (mby > 0) ? half(cur_x[mb - MBW]) : 0;
        ey[3] = (mby > 0) ? half(cur_y[mb - MBW]) : 0;
        ex[4] = (mbx > 0) ? half(cur_x[mb - 1]) : 0;
        ey[4] = (mbx > 0) ? half(cur_y[mb - 1]) : 0;
        ex[5] = half(prev_x[mb]); ey[5] = half(prev_y[mb]);
        chk(int'(l2_bx) == 8 * mbx && int'(l2_by) == 8 * mby, "Level-2 block");
        for (int k = 0; k < 6; k++)
          chk(int'(l2_cand[k].dx) == ex[k] && int'(l2_cand[k].dy) == ey[k],
              $sformatf("mb %0d candidate %0d (%0d,%0d) exp (%0d,%0d)", mb, k,
                        l2_cand[k].dx, l2_cand[k].dy, ex[k], ey[k]));
        @(posedge clk); #1;
        wait_cycles($urandom_range(0, 5));
        v2x = $urandom_range(0, 14) - 7; v2y = $urandom_range(0, 14) - 7;
        l2_mv.dx = 8'(v2x); l2_mv.dy = 8'(v2y); l2_zero_tuned = 1'($urandom_range(0, 1));
        l2_done = 1; @(posedge clk); #1; l2_done = 0;
        while (!l3_start) begin @(posedge clk); #1; end
        chk(int'(l3_ctr.dx) == 2 * v2x && int'(l3_ctr.dy) == 2 * v2y && l3_rng == 4'(R_LV3),
            "Level-3 centre is twice the Level-2 vector");
      end
      chk(int'(l3_bx) == 16 * mbx && int'(l3_by) == 16 * mby, "Level-3 block");
      @(posedge clk); #1;
      wait_cycles($urandom_range(0, 5));
      if (mode == 1) begin fx = fix_x[mb]; fy = fix_y[mb]; end
      else begin fx = $urandom_range(0, 32) - 16; fy = $urandom_range(0, 32) - 16; end
      l3_mv.dx = 8'(fx); l3_mv.dy = 8'(fy); l3_sod = 9'($urandom_range(0, 256));
      l3_done = 1; @(posedge clk); #1; l3_done = 0;
      chk(mv_valid && int'(mv_mbx) == mbx && int'(mv_mby) == mby && int'(mv_out.dx) == fx &&
          int'(mv_out.dy) == fy && mv_sod == l3_sod && mv_static == stat, "result");
      rep[mb] = (fx == prev_x[mb] && fy == prev_y[mb]) ? (rep[mb] == 7 ? 7 : rep[mb] + 1) : 0;
      cur_x[mb] = fx; cur_y[mb] = fy;
    end
    while (!frame_done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    chk(bank_sel != bank0, "bank flips after a frame");
    chk(!busy, "idle after the frame");
    for (int mb = 0; mb < NMB; mb++) begin prev_x[mb] = cur_x[mb]; prev_y[mb] = cur_y[mb]; end
  endtask

  initial begin
    bit b0;
    for (int mb = 0; mb < NMB; mb++) begin
      cur_x[mb] = 0; cur_y[mb] = 0; prev_x[mb] = 0; prev_y[mb] = 0; rep[mb] = 0;
      fix_x[mb] = $urandom_range(0, 32) - 16; fix_y[mb] = $urandom_range(0, 32) - 16;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // first frame: stored only
    b0 = bank_sel;
    frame_built = 1; @(posedge clk); #1; frame_built = 0;
    for (int k = 0; k < 5; k++) begin
      chk(!l1_start && !l3_start, "first frame is not searched");
      @(posedge clk); #1;
    end
    chk(bank_sel != b0, "bank flips after the first frame");
    frame(0, 1);
    frame(0, 1);
    for (int f = 0; f < 6; f++) frame(1, 1);
    frame(1, 0);
    frame(0, 1);
    chk(n_static > 0 && n_full > 0, "both paths used");
    $display("static macroblocks %0d, full searches %0d", n_static, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
