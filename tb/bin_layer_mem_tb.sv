// bin_layer_mem_tb: fills the current bank with random rows, flips the bank
// select, fills the other bank, and reads both ports back with their
// one-cycle latency: the reference port must return the first frame and
// the current port the second.
module bin_layer_mem_tb;
  localparam int W = 88, H = 72;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic bank_sel = 0, wr_en = 0, rd_cur_en = 0, rd_ref_en = 0;
  logic [6:0] wr_addr, rd_cur_addr, rd_ref_addr;
  logic [W-1:0] wr_data, rd_cur_data, rd_ref_data;
  logic [W-1:0] f0 [H], f1 [H];

  bin_layer_mem #(.W(W), .H(H)) dut (.*);

  initial begin
    for (int y = 0; y < H; y++)
      for (int b = 0; b < W; b += 32) begin
        f0[y][b +: 32] = $urandom;
        f1[y][b +: 32] = $urandom;
      end
    @(posedge clk); #1;
    for (int y = 0; y < H; y++) begin
      wr_en = 1; wr_addr = 7'(y); wr_data = f0[y];
      @(posedge clk); #1;
    end
    bank_sel = 1;
    for (int y = 0; y < H; y++) begin
      wr_en = 1; wr_addr = 7'(y); wr_data = f1[y];
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int k = 0; k < 300; k++) begin
      int yc, yr;
      yc = $urandom_range(0, H - 1);
      yr = $urandom_range(0, H - 1);
      rd_cur_en = 1; rd_ref_en = 1;
      rd_cur_addr = 7'(yc); rd_ref_addr = 7'(yr);
      @(posedge clk); #1;
      rd_cur_en = 0; rd_ref_en = 0;
      checks += 2;
      if (rd_cur_data !== f1[yc]) begin failures++; $display("FAIL cur row %0d", yc); end
      if (rd_ref_data !== f0[yr]) begin failures++; $display("FAIL ref row %0d", yr); end
      // data must hold while the ports are idle
      @(posedge clk); #1;
      checks++;
      if (rd_cur_data !== f1[yc]) begin failures++; $display("FAIL hold row %0d", yc); end
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
