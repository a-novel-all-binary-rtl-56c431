// xor_pe: processing element of the binary block-matching array.
//
// Each enabled cycle it XORs one N-bit row of the current block with one
// N-bit row of the reference block, counts the ones of the result (the
// "decoder") and adds the count to its accumulator. The accumulator input
// is switched to zero by clr for the first row of a block, so after N
// enabled cycles sod holds the bit-wise sum of differences of the block.
// XOR, ones-counting decoder, delay element and the zero/feedback switch
// follow the processor drawing of the parallel 2-D block-matching array.
// The accumulator has clog2(N*N+1) bits, one more than 2*log2(N), so that a
// block in which every bit differs (SoD = N*N) is still represented.
// Timing: sod is registered and valid the cycle after the last row.
module xor_pe #(
  parameter int N  = 16,
  localparam int SW = $clog2(N * N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  input  logic [N-1:0]  cur,
  input  logic [N-1:0]  ref_bits,
  output logic [SW-1:0] sod
);

  logic [N-1:0]          diff;
  logic [$clog2(N+1)-1:0] ones;

  always_comb begin
    diff = cur ^ ref_bits;
    ones = '0;
    for (int k = 0; k < N; k++) ones += $clog2(N+1)'(diff[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sod <= '0;
    else if (en) sod <= (clr ? SW'(0) : sod) + SW'(ones);
  end

endmodule
