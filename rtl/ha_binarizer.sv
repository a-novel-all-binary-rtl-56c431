// ha_binarizer: builds one level of the binary pyramid from an 8-bit frame.
//
// For each pixel F(x,y) the H_A low-pass filter forms the threshold
//   Fbar(x,y) = (F(x-1,y) + F(x+1,y) + F(x,y-1) + F(x,y+1) + ROUND) >> 2
// with pixels outside the frame read as zero, and the binary pixel is
//   S(x,y) = (F(x,y) >= Fbar(x,y)).
// Fbar at even x and even y is passed on as the next (half-size) level's
// frame. The filter, the zero border, the ">= threshold" rule, the rounding
// constant 4 and the decimation by two follow the algorithm description.
// Saturating Fbar to 8 bits, keeping the even-indexed samples, and the
// streaming line-buffer structure are choices of this implementation.
//
// Interface: pixels arrive in raster order on in_valid/in_pix (one per cycle
// at most) while in_ready is high. Two line buffers hold the previous two
// rows, so the pixel of row y is finished when the pixel below it arrives.
// After the last input row the block feeds itself one row of zeros (W cycles,
// in_ready low) to finish the bottom row, then pulses done.
// Outputs are registered: row_valid carries a complete binary row, bit x of
// row_bits being column x; dec_valid/dec_pix carry the decimated frame in
// raster order. A pixel's results leave one cycle after the pixel below it
// has entered.
module ha_binarizer #(
  parameter int W     = 352,
  parameter int H     = 288,
  parameter int ROUND = abme_pkg::HA_ROUND,
  localparam int XW = $clog2(W),
  localparam int YW = $clog2(H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [7:0]    in_pix,
  output logic          row_valid,
  output logic [YW-1:0] row_y,
  output logic [W-1:0]  row_bits,
  output logic          dec_valid,
  output logic [7:0]    dec_pix,
  output logic          done
);

  logic [7:0]    lb0 [W];   // row y-2 (top neighbours)
  logic [7:0]    lb1 [W];   // row y-1 (centre row)
  logic [7:0]    prev_c;    // centre of the previous step = left neighbour
  logic [XW-1:0] xi;
  logic [YW-1:0] yi;
  logic [W-1:0]  rowbuf;

  logic          flushing, step, out_en;
  logic [7:0]    b, c, top, left, right;
  logic [9:0]    sum;
  logic [10:0]   fsum;
  logic [7:0]    fbar;
  logic          sbit;

  assign flushing = (yi == YW'(H));
  assign in_ready = !flushing;
  assign step     = flushing || in_valid;
  assign out_en   = (yi != '0);

  always_comb begin
    b     = flushing ? 8'd0 : in_pix;
    c     = lb1[xi];
    top   = (yi >= YW'(2)) ? lb0[xi] : 8'd0;
    left  = (xi != '0) ? prev_c : 8'd0;
    right = (xi != XW'(W - 1)) ? lb1[xi + 1'b1] : 8'd0;
    sum   = 10'(top) + 10'(b) + 10'(left) + 10'(right);
    fsum  = (11'(sum) + 11'(ROUND)) >> 2;
    fbar  = (fsum > 11'd255) ? 8'd255 : fsum[7:0];
    sbit  = (c >= fbar);
  end

  always_ff @(posedge clk) begin
    if (step) begin
      lb0[xi] <= lb1[xi];
      lb1[xi] <= b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xi        <= '0;
      yi        <= '0;
      prev_c    <= '0;
      rowbuf    <= '0;
      row_valid <= 1'b0;
      row_y     <= '0;
      row_bits  <= '0;
      dec_valid <= 1'b0;
      dec_pix   <= '0;
      done      <= 1'b0;
    end else begin
      row_valid <= 1'b0;
      dec_valid <= 1'b0;
      done      <= 1'b0;
      if (step) begin
        prev_c <= c;
        if (out_en) begin
          rowbuf[xi] <= sbit;
          if (xi == XW'(W - 1)) begin
            row_valid <= 1'b1;
            row_y     <= yi - 1'b1;
            row_bits  <= {sbit, rowbuf[W-2:0]};
          end
          if (!xi[0] && yi[0]) begin
            // output row yi-1 is even when yi is odd
            dec_valid <= 1'b1;
            dec_pix   <= fbar;
          end
        end
        if (xi == XW'(W - 1)) begin
          xi <= '0;
          if (flushing) begin
            yi   <= '0;
            done <= 1'b1;
          end else begin
            yi <= yi + 1'b1;
          end
        end else begin
          xi <= xi + 1'b1;
        end
      end
    end
  end

endmodule
