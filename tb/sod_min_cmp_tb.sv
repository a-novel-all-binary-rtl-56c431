// sod_min_cmp_tb: random SoD vectors and valid masks (49 entries, 5-bit
// SoDs, as for Level 1), checked against a scan in the testbench: the
// smallest valid value, the lowest index among equal minima, and the empty
// case.
module sod_min_cmp_tb;
  localparam int C = 49, SW = 5;
  int checks = 0, failures = 0;
  logic [SW-1:0] sod [C];
  logic valid [C];
  logic any;
  logic [5:0] idx;
  logic [SW-1:0] best;

  sod_min_cmp #(.COUNT(C), .SW(SW)) dut (.sod, .valid, .any, .best_idx(idx), .best_sod(best));

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int emin, eidx;
      for (int i = 0; i < C; i++) begin
        sod[i] = SW'($urandom_range(0, 16));
        valid[i] = (k % 10 == 9) ? 1'b0 : ($urandom_range(0, 3) != 0);
      end
      #1;
      emin = 1000; eidx = -1;
      for (int i = 0; i < C; i++)
        if (valid[i] && int'(sod[i]) < emin) begin emin = sod[i]; eidx = i; end
      checks++;
      if (eidx < 0) begin
        if (any !== 1'b0) begin failures++; $display("FAIL empty set reported"); end
      end else if (!any || int'(idx) != eidx || int'(best) != emin) begin
        failures++;
        $display("FAIL idx %0d sod %0d exp %0d %0d", idx, best, eidx, emin);
      end
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
