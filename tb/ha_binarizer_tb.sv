// ha_binarizer_tb: streams random frames (one with gaps in in_valid, two
// without, one all-255 to hit the threshold clip) through the pyramid
// stage and compares every binary row and every decimated pixel with the
// reference model. Without gaps the stage takes one pixel per cycle and
// finishes W cycles after the last pixel: done must come W*(H+1) cycles
// after the first pixel.
module ha_binarizer_tb;
  import abme_ref_pkg::*;
  localparam int W = 24, H = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, row_valid, dec_valid, done;
  logic [7:0] in_pix, dec_pix;
  logic [3:0] row_y;
  logic [W-1:0] row_bits;

  ha_binarizer #(.W(W), .H(H)) dut (.*);

  img_t f, s, d;
  int rows_seen, dec_seen;

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && row_valid) begin
      logic [W-1:0] e;
      int yy, v;
      yy = int'(row_y);
      for (int x = 0; x < W; x++) begin
        v = s[yy * W + x];
        e[x] = (v != 0);
      end
      checks++;
      if (row_bits !== e || int'(row_y) != rows_seen) begin
        failures++; $display("FAIL row %0d got %b exp %b", row_y, row_bits, e);
      end
      rows_seen++;
    end
    if (rst_n && dec_valid) begin
      checks++;
      if (int'(dec_pix) != d[dec_seen]) begin
        failures++; $display("FAIL dec %0d got %0d exp %0d", dec_seen, dec_pix, d[dec_seen]);
      end
      dec_seen++;
    end
  end

  task automatic frame(input int kind, input bit gaps);
    int cyc;
    f = new[W * H];
    for (int i = 0; i < W * H; i++)
      case (kind)
        0: f[i] = $urandom_range(0, 255);
        1: f[i] = 255;
        default: f[i] = ($urandom_range(0, 1) != 0) ? 255 : $urandom_range(0, 3);
      endcase
    binarize(f, W, H, s, d);
    rows_seen = 0;
    dec_seen = 0;
    cyc = 0;
    for (int i = 0; i < W * H; i++) begin
      while (gaps && $urandom_range(0, 3) == 0) begin
        in_valid = 0; @(posedge clk); #1; cyc++;
      end
      in_valid = 1; in_pix = 8'(f[i]);
      checks++;
      if (!in_ready) begin failures++; $display("FAIL not ready during input"); end
      @(posedge clk); #1; cyc++;
    end
    in_valid = 0;
    while (!done) begin
      if (in_ready) begin
        checks++; failures++; $display("FAIL ready during bottom-row flush");
      end
      @(posedge clk); #1; cyc++;
    end
    if (!gaps) begin
      checks++;
      if (cyc != W * (H + 1)) begin failures++; $display("FAIL frame took %0d cycles, exp %0d", cyc, W * (H + 1)); end
    end
    @(posedge clk); #1;
    checks += 2;
    if (rows_seen != H) begin failures++; $display("FAIL %0d rows", rows_seen); end
    if (dec_seen != (W / 2) * (H / 2)) begin failures++; $display("FAIL %0d decimated", dec_seen); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    frame(0, 1);
    frame(0, 0);
    frame(1, 0);
    frame(2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
