// bin_layer_mem: on-chip storage of one binary pyramid level.
//
// Binary frames need one bit per pixel, so a whole row of a level is one
// memory word (bit x = column x). Two banks hold the frame being built
// ("current") and the previous frame ("reference"); bank_sel names the
// current bank and flipping it turns the current frame into the reference
// for the next one. Storing the binary levels compactly on chip, and reading
// the reference window once per row, follow the architecture description;
// the row-per-word organisation and the two-bank swap are choices of this
// implementation.
//
// Ports: one row-write port into the current bank, one read port on each
// bank. Reads are synchronous: data appear the cycle after rd_*_en.
module bin_layer_mem #(
  parameter int W = 352,
  parameter int H = 288,
  localparam int AW = $clog2(H)
) (
  input  logic          clk,
  input  logic          bank_sel,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_cur_en,
  input  logic [AW-1:0] rd_cur_addr,
  output logic [W-1:0]  rd_cur_data,
  input  logic          rd_ref_en,
  input  logic [AW-1:0] rd_ref_addr,
  output logic [W-1:0]  rd_ref_data
);

  logic [W-1:0] bank0 [H];
  logic [W-1:0] bank1 [H];

  always_ff @(posedge clk) begin
    if (wr_en && !bank_sel) bank0[wr_addr] <= wr_data;
    if (wr_en &&  bank_sel) bank1[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_cur_en) rd_cur_data <= bank_sel ? bank1[rd_cur_addr] : bank0[rd_cur_addr];
    if (rd_ref_en) rd_ref_data <= bank_sel ? bank0[rd_ref_addr] : bank1[rd_ref_addr];
  end

endmodule
