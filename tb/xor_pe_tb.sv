// xor_pe_tb: drives random rows into one processing element (N = 16 and
// N = 4) and compares the accumulated sum of differences with a count made
// in the testbench, including the all-bits-differ case (SoD = N*N) and the
// restart of the accumulator by clr.
module xor_pe_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en16 = 0, clr16 = 0, en4 = 0, clr4 = 0;
  logic [15:0] c16, r16;
  logic [3:0]  c4, r4;
  logic [8:0]  s16;
  logic [4:0]  s4;

  xor_pe #(.N(16)) dut16 (.clk, .rst_n, .en(en16), .clr(clr16), .cur(c16), .ref_bits(r16), .sod(s16));
  xor_pe #(.N(4))  dut4  (.clk, .rst_n, .en(en4),  .clr(clr4),  .cur(c4),  .ref_bits(r4),  .sod(s4));

  task automatic block16(input int mode);
    int exp = 0;
    for (int row = 0; row < 16; row++) begin
      c16 = 16'($urandom);
      r16 = (mode == 1) ? ~c16 : (mode == 2) ? c16 : 16'($urandom);
      exp += $countones(c16 ^ r16);
      en16 = 1; clr16 = (row == 0);
      @(posedge clk); #1;
    end
    en16 = 0;
    checks++;
    if (s16 !== 9'(exp)) begin failures++; $display("FAIL N=16 mode %0d sod %0d exp %0d", mode, s16, exp); end
  endtask

  task automatic block4(input int mode);
    int exp = 0;
    for (int row = 0; row < 4; row++) begin
      c4 = 4'($urandom);
      r4 = (mode == 1) ? ~c4 : 4'($urandom);
      exp += $countones(c4 ^ r4);
      en4 = 1; clr4 = (row == 0);
      @(posedge clk); #1;
      // hold a cycle with en low: value must not move
      en4 = 0;
      @(posedge clk); #1;
    end
    checks++;
    if (s4 !== 5'(exp)) begin failures++; $display("FAIL N=4 mode %0d sod %0d exp %0d", mode, s4, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    block16(1);
    block16(2);
    for (int k = 0; k < 40; k++) block16(0);
    block4(1);
    for (int k = 0; k < 40; k++) block4(0);
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
