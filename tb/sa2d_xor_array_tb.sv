// sa2d_xor_array_tb: feeds random reference windows and current blocks to
// the 2-D systolic array at the Level-1 size (N = 4, R = 3, 49 PEs) and the
// Level-3 size (N = 16, R = 2, 25 PEs), following the row schedule of the
// array, and compares every one of the (2R+1)^2 SoDs with a direct count.
// It also checks that done comes exactly 2R+N steps after the first one,
// and repeats a block with idle cycles between steps.
module sa2d_xor_array_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;


  // Level-1 size
  localparam int N1 = 4, R1 = 3, P1 = 2 * R1 + 1, WW1 = 2 * R1 + N1;
  logic a_start = 0, a_step = 0, a_done;
  logic [WW1-1:0] a_ref;
  logic [N1-1:0]  a_cur;
  logic [4:0]     a_sod [P1*P1];
  sa2d_xor_array #(.N(N1), .R(R1)) dut1 (.clk, .rst_n, .start(a_start), .step(a_step),
    .ref_row(a_ref), .cur_row(a_cur), .done(a_done), .sod(a_sod));

  // Level-3 size
  localparam int N3 = 16, R3 = 2, P3 = 2 * R3 + 1, WW3 = 2 * R3 + N3;
  logic b_start = 0, b_step = 0, b_done;
  logic [WW3-1:0] b_ref;
  logic [N3-1:0]  b_cur;
  logic [8:0]     b_sod [P3*P3];
  sa2d_xor_array #(.N(N3), .R(R3)) dut3 (.clk, .rst_n, .start(b_start), .step(b_step),
    .ref_row(b_ref), .cur_row(b_cur), .done(b_done), .sod(b_sod));

  task automatic block1(input bit gaps);
    logic [WW1-1:0] win [WW1];
    logic [N1-1:0]  blk [N1];
    int steps_to_done;
    for (int r = 0; r < WW1; r++) win[r] = WW1'($urandom);
    for (int r = 0; r < N1; r++) blk[r] = N1'($urandom);
    a_start = 1; @(posedge clk); #1; a_start = 0;
    steps_to_done = -1;
    for (int s = 0; s < WW1; s++) begin
      a_step = 1;
      a_ref = win[s];
      a_cur = (s >= 2 * R1 - 1 && s - 2 * R1 + 1 < N1) ? blk[s - 2 * R1 + 1] : N1'($urandom);
      @(posedge clk); #1;
      a_step = 0;
      if (s < WW1 - 1) begin
        checks++;
        if (a_done) begin failures++; $display("FAIL L1 done early at step %0d", s); end
      end
      if (gaps) repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
    checks++;
    if (!a_done && !gaps) begin failures++; $display("FAIL L1 done not one cycle after the last step"); end
    for (int j = 0; j < P1; j++)
      for (int i = 0; i < P1; i++) begin
        int e = 0;
        for (int r = 0; r < N1; r++) e += $countones(blk[r] ^ win[r + j][i +: N1]);
        checks++;
        if (int'(a_sod[j*P1+i]) != e) begin
          failures++; $display("FAIL L1 (%0d,%0d) sod %0d exp %0d", i - R1, j - R1, a_sod[j*P1+i], e);
        end
      end
  endtask

  task automatic block3(input bit gaps);
    logic [WW3-1:0] win [WW3];
    logic [N3-1:0]  blk [N3];
    for (int r = 0; r < WW3; r++) win[r] = WW3'($urandom);
    for (int r = 0; r < N3; r++) blk[r] = N3'($urandom);
    b_start = 1; @(posedge clk); #1; b_start = 0;
    for (int s = 0; s < WW3; s++) begin
      b_step = 1;
      b_ref = win[s];
      b_cur = (s >= 2 * R3 - 1 && s - 2 * R3 + 1 < N3) ? blk[s - 2 * R3 + 1] : N3'($urandom);
      @(posedge clk); #1;
      b_step = 0;
      if (s < WW3 - 1) begin
        checks++;
        if (b_done) begin failures++; $display("FAIL L3 done early at step %0d", s); end
      end
      if (gaps) repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
    checks++;
    if (!b_done && !gaps) begin failures++; $display("FAIL L3 done not one cycle after the last step"); end
    for (int j = 0; j < P3; j++)
      for (int i = 0; i < P3; i++) begin
        int e = 0;
        for (int r = 0; r < N3; r++) e += $countones(blk[r] ^ win[r + j][i +: N3]);
        checks++;
        if (int'(b_sod[j*P3+i]) != e) begin
          failures++; $display("FAIL L3 (%0d,%0d) sod %0d exp %0d", i - R3, j - R3, b_sod[j*P3+i], e);
        end
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 30; k++) block1(k % 3 == 2);
    for (int k = 0; k < 30; k++) block3(k % 3 == 2);
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
