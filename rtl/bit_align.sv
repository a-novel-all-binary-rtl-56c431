// bit_align: bit alignment of binary reference or current data.
//
// Returns OW consecutive bits of a W-bit binary row starting at the signed
// column start: out[k] = row[start + k], zero where start + k falls outside
// the row. This is the shift that lines a reference window up with the
// current block before the XOR; the zero fill outside the frame is a choice
// of this implementation (such positions are never part of a valid check
// point). Purely combinational; start may range from -OW to W.
module bit_align #(
  parameter int W  = 352,
  parameter int OW = 20,
  parameter int SW = $clog2(W + OW + 1) + 1
) (
  input  logic [W-1:0]        row,
  input  logic signed [SW-1:0] start,
  output logic [OW-1:0]       out
);

  localparam int EW = W + 2 * OW;

  logic [EW-1:0] ext;
  logic [EW-1:0] shifted;
  logic signed [SW:0] sh;

  always_comb begin
    ext = {{OW{1'b0}}, row, {OW{1'b0}}};
    sh  = (SW+1)'(start) + (SW+1)'(OW);
    if (sh < 0) sh = '0;
    if (sh > (SW+1)'(W + OW)) sh = (SW+1)'(W + OW);
    shifted = ext >> sh;
    out = shifted[OW-1:0];
  end

endmodule
