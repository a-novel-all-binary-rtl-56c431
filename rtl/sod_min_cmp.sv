// sod_min_cmp: comparator that picks the best check point.
//
// Among the COUNT sums of differences whose valid bit is set it returns the
// smallest value and its index. Ties go to the lowest index, so the order in
// which the caller lists its check points decides between equal SoDs. any
// is low, and best_sod all ones, when no check point is valid. The
// comparator itself is only named in the architecture description; the
// linear scan and the tie rule are choices of this implementation.
// Purely combinational.
module sod_min_cmp #(
  parameter int COUNT = 25,
  parameter int SW    = 9,
  localparam int IW = (COUNT > 1) ? $clog2(COUNT) : 1
) (
  input  logic [SW-1:0] sod   [COUNT],
  input  logic          valid [COUNT],
  output logic          any,
  output logic [IW-1:0] best_idx,
  output logic [SW-1:0] best_sod
);

  always_comb begin
    any      = 1'b0;
    best_idx = '0;
    best_sod = '1;
    for (int k = 0; k < COUNT; k++) begin
      if (valid[k] && (!any || sod[k] < best_sod)) begin
        any      = 1'b1;
        best_idx = IW'(k);
        best_sod = sod[k];
      end
    end
  end

endmodule
