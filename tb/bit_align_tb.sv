// bit_align_tb: random rows and start columns, including starts left of
// column 0 and past the right edge; each output bit is compared with the
// row bit it should come from, or zero outside the row.
module bit_align_tb;
  localparam int W = 88, OW = 10;
  int checks = 0, failures = 0;
  logic [W-1:0] row;
  logic signed [15:0] start;
  logic [OW-1:0] out;

  bit_align #(.W(W), .OW(OW), .SW(16)) dut (.row, .start, .out);

  initial begin
    for (int k = 0; k < 2000; k++) begin
      logic [OW-1:0] exp;
      for (int b = 0; b < W; b += 32) row[b +: 32] = $urandom;
      start = 16'($signed($urandom_range(0, W + 2 * OW + 4)) - OW - 2);
      if (k < 40) start = 16'(k - 20);
      #1;
      for (int i = 0; i < OW; i++) begin
        int idx;
        idx = int'(start) + i;
        exp[i] = (idx >= 0 && idx < W) ? row[idx] : 1'b0;
      end
      checks++;
      if (out !== exp) begin failures++; $display("FAIL start %0d out %b exp %b", start, out, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
