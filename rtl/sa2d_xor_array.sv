// sa2d_xor_array: 2-D systolic array for binary full-search block matching.
//
// (2R+1) x (2R+1) processing elements compute the sum of differences (SoD)
// of an N x N current block against every reference block of a +-R window
// at once. Each step the array takes one (2R+N)-bit row of the reference
// window; the demultiplexer hands bits [i +: N] (horizontal offset i-R) to
// PE row i, and inside a PE row the reference row moves one PE to the left
// per step through a delay element, so PE (i, j) sees the window row that
// entered 2R-j steps earlier (vertical offset j-R). One current-block row is
// broadcast to all PEs per step after a one-step delay element. All
// reference bits are read exactly once: a block takes 2R+N steps, the first
// 2R of which fill the pipeline. This is the parallel 2-D architecture
// described for the Level-1 and Level-3 searches; the delay elements, the
// demultiplexer and the PE follow its drawing.
//
// Interface: pulse start (R >= 1) at least one cycle before the first step. On step k
// (k = 0 .. 2R+N-1) ref_row must hold window row k; cur_row must hold
// current row k-2R+1 on steps 2R-1 .. 2R+N-2 (ignored otherwise). done
// pulses the cycle after step 2R+N-1; from then until the next start, sod[]
// holds the SoDs, index j*(2R+1)+i for offset (dx, dy) = (i-R, j-R).
module sa2d_xor_array #(
  parameter int N = 16,
  parameter int R = 2,
  localparam int P  = 2 * R + 1,
  localparam int WW = 2 * R + N,
  localparam int SW = $clog2(N * N + 1),
  localparam int CW = $clog2(WW + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          step,
  input  logic [WW-1:0] ref_row,
  input  logic [N-1:0]  cur_row,
  output logic          done,
  output logic [SW-1:0] sod [P*P]
);

  logic [CW-1:0] cnt;
  logic [N-1:0]  cur_q;                 // delay element on the current path
  logic [N-1:0]  chain [P][P-1];        // reference delay elements per PE row
  logic [N-1:0]  pe_ref [P][P];
  logic          pe_en, pe_clr;

  // Demultiplexer and reference delay chain.
  always_comb begin
    for (int i = 0; i < P; i++) begin
      for (int j = 0; j < P - 1; j++) pe_ref[i][j] = chain[i][j];
      pe_ref[i][P-1] = ref_row[i +: N];
    end
  end

  always_ff @(posedge clk) begin
    if (step) begin
      cur_q <= cur_row;
      for (int i = 0; i < P; i++) begin
        for (int j = 0; j < P - 2; j++) chain[i][j] <= chain[i][j+1];
        chain[i][P-2] <= ref_row[i +: N];
      end
    end
  end

  // Step counter: the PEs accumulate on steps 2R .. 2R+N-1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cnt <= '0;
      end else if (step) begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(WW - 1)) done <= 1'b1;
      end
    end
  end

  assign pe_en  = step && (cnt >= CW'(2 * R));
  assign pe_clr = (cnt == CW'(2 * R));

  for (genvar gi = 0; gi < P; gi++) begin : g_row
    for (genvar gj = 0; gj < P; gj++) begin : g_col
      xor_pe #(.N(N)) u_pe (
        .clk     (clk),
        .rst_n   (rst_n),
        .en      (pe_en),
        .clr     (pe_clr),
        .cur     (cur_q),
        .ref_bits(pe_ref[gi][gj]),
        .sod     (sod[gj*P + gi])
      );
    end
  end

endmodule
