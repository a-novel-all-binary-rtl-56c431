// abme_workloads_tb: runs the motion estimator on the picture formats and
// search ranges of its intended use, each through a short panning sequence
// checked macroblock by macroblock against the reference model:
//   QCIF 176 x 144, search range +-16, pan (3, -2) per frame;
//   CCIR601 720 x 480, search range +-16, pan (3, -2);
//   CIF 352 x 288, search range +-32, pan (21, -13) (beyond +-16);
//   CIF 352 x 288, search range +-64, pan (37, -27) (beyond +-32).
// The default CIF +-16 case has its own testbench. The four runs proceed
// side by side, each with its own clock; the result line sums them.
module abme_workloads_tb;
  logic d0, d1, d2, d3;
  int   c0, c1, c2, c3, f0, f1, f2, f3;

  abme_workload_run #(.W(176), .H(144), .SR(16), .NFRAMES(4), .VX(3),  .VY(-2))  u_qcif  (.done(d0), .checks(c0), .failures(f0));
  abme_workload_run #(.W(720), .H(480), .SR(16), .NFRAMES(3), .VX(3),  .VY(-2))  u_ccir  (.done(d1), .checks(c1), .failures(f1));
  abme_workload_run #(.W(352), .H(288), .SR(32), .NFRAMES(3), .VX(21), .VY(-13)) u_cif32 (.done(d2), .checks(c2), .failures(f2));
  abme_workload_run #(.W(352), .H(288), .SR(64), .NFRAMES(3), .VX(37), .VY(-27)) u_cif64 (.done(d3), .checks(c3), .failures(f3));

  initial begin
    #1;
    wait (d0 && d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end

  // Watchdog for the whole run (each run also has its own).
  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
