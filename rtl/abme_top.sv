// abme_top: all-binary motion estimator (ABME) for one luminance stream.
//
// Motion estimation is done entirely on 1-bit pictures. Each incoming frame
// is turned into a three-level binary pyramid (full, half and quarter size)
// by comparing every pixel with the average of its four neighbours; the
// binary levels are stored on chip, and block matching counts differing
// bits (XOR, then ones count) instead of summing absolute differences.
// Per 16x16 macroblock the vector is found coarse to fine: a +-3 full search
// of the 4x4 Level-1 block, a six-candidate search with tuning of the 8x8
// Level-2 block, and a +-2 refinement of the 16x16 Level-3 block, the
// Level-1 and Level-3 searches running on 2-D systolic XOR arrays.
//
// Structure: three ha_binarizer stages in a chain (each passes its
// decimated low-pass frame to the next), three bin_layer_mem stores with a
// current and a reference bank, fs_level_search for Level 1 (N=4, R=SR/4-1)
// and Level 3 (N=16, R=2), level2_search, and abme_mb_ctrl sequencing the
// macroblocks. Operation alternates between building a frame (pixels
// accepted, one per cycle) and searching it (pix_ready low). The first frame
// after reset only becomes the reference. The two-phase schedule is a
// choice of this design.
//
// Interface: pixels in raster order on pix_valid/pix_ready/pix. For every
// macroblock of every frame after the first, mv_valid pulses with the
// macroblock position, the vector in full-resolution pixels (reference
// position minus current position, within +-SR), its Level-3 SoD, and
// whether the static path or Level-2 zero tuning was taken. frame_done
// pulses when a frame has been finished.
module abme_top
  import abme_pkg::*;
#(
  parameter int W  = 352,
  parameter int H  = 288,
  parameter int SR = 16,
  localparam int MBW  = W / 16,
  localparam int MBH  = H / 16,
  localparam int XW   = $clog2(MBW),
  localparam int YW   = $clog2(MBH),
  localparam int L3SW = $clog2(N_LV3 * N_LV3 + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pix_valid,
  output logic            pix_ready,
  input  logic [7:0]      pix,
  input  logic            static_skip_en,
  output logic            mv_valid,
  output logic [XW-1:0]   mv_mbx,
  output logic [YW-1:0]   mv_mby,
  output mv_t             mv,
  output logic [L3SW-1:0] mv_sod,
  output logic            mv_static,
  output logic            mv_zero_tuned,
  output logic            frame_done
);

  localparam int W3 = W,     H3 = H;
  localparam int W2 = W / 2, H2 = H / 2;
  localparam int W1 = W / 4, H1 = H / 4;
  localparam int R1 = SR / 4 - 1;

  logic bank_sel;

  // ---------------------------------------------------------------- pyramid
  logic build_en, b3_ready;
  logic b3_row_v, b2_row_v, b1_row_v;
  logic [$clog2(H3+1)-1:0] b3_row_y;
  logic [$clog2(H2+1)-1:0] b2_row_y;
  logic [$clog2(H1+1)-1:0] b1_row_y;
  logic [W3-1:0] b3_row;
  logic [W2-1:0] b2_row;
  logic [W1-1:0] b1_row;
  logic b3_dec_v, b2_dec_v, b1_dec_v;
  logic [7:0] b3_dec, b2_dec, b1_dec;
  logic b3_done, b2_done, b1_done;
  logic b2_ready, b1_ready;

  assign pix_ready = build_en && b3_ready;

  ha_binarizer #(.W(W3), .H(H3)) u_bin3 (
    .clk(clk), .rst_n(rst_n), .in_valid(pix_valid && build_en), .in_ready(b3_ready),
    .in_pix(pix), .row_valid(b3_row_v), .row_y(b3_row_y), .row_bits(b3_row),
    .dec_valid(b3_dec_v), .dec_pix(b3_dec), .done(b3_done));

  ha_binarizer #(.W(W2), .H(H2)) u_bin2 (
    .clk(clk), .rst_n(rst_n), .in_valid(b3_dec_v), .in_ready(b2_ready),
    .in_pix(b3_dec), .row_valid(b2_row_v), .row_y(b2_row_y), .row_bits(b2_row),
    .dec_valid(b2_dec_v), .dec_pix(b2_dec), .done(b2_done));

  ha_binarizer #(.W(W1), .H(H1)) u_bin1 (
    .clk(clk), .rst_n(rst_n), .in_valid(b2_dec_v), .in_ready(b1_ready),
    .in_pix(b2_dec), .row_valid(b1_row_v), .row_y(b1_row_y), .row_bits(b1_row),
    .dec_valid(b1_dec_v), .dec_pix(b1_dec), .done(b1_done));

  // The decimated stream of a stage always arrives while the next stage
  // takes input, never during its bottom-row flush.
  a_b2_ready: assert property (@(posedge clk) disable iff (!rst_n) b3_dec_v |-> b2_ready);
  a_b1_ready: assert property (@(posedge clk) disable iff (!rst_n) b2_dec_v |-> b1_ready);

  // A frame is built when all three stages have finished.
  logic d3, d2, d1, frame_built, ctrl_frame_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      build_en    <= 1'b1;
      d3          <= 1'b0;
      d2          <= 1'b0;
      d1          <= 1'b0;
      frame_built <= 1'b0;
    end else begin
      frame_built <= 1'b0;
      if (b3_done) build_en <= 1'b0;
      if (ctrl_frame_done) build_en <= 1'b1;
      if ((d3 || b3_done) && (d2 || b2_done) && (d1 || b1_done)) begin
        d3          <= 1'b0;
        d2          <= 1'b0;
        d1          <= 1'b0;
        frame_built <= 1'b1;
      end else begin
        d3 <= d3 || b3_done;
        d2 <= d2 || b2_done;
        d1 <= d1 || b1_done;
      end
    end
  end

  // ---------------------------------------------------------------- storage
  logic l1_rd, l2_rd, l3_rd;
  logic [$clog2(H1)-1:0] l1_ca, l1_ra;
  logic [$clog2(H2)-1:0] l2_ca, l2_ra;
  logic [$clog2(H3)-1:0] l3_ca, l3_ra;
  logic [W1-1:0] l1_cd, l1_rdat;
  logic [W2-1:0] l2_cd, l2_rdat;
  logic [W3-1:0] l3_cd, l3_rdat;

  bin_layer_mem #(.W(W3), .H(H3)) u_mem3 (
    .clk(clk), .bank_sel(bank_sel), .wr_en(b3_row_v), .wr_addr($clog2(H3)'(b3_row_y)),
    .wr_data(b3_row), .rd_cur_en(l3_rd), .rd_cur_addr(l3_ca), .rd_cur_data(l3_cd),
    .rd_ref_en(l3_rd), .rd_ref_addr(l3_ra), .rd_ref_data(l3_rdat));

  bin_layer_mem #(.W(W2), .H(H2)) u_mem2 (
    .clk(clk), .bank_sel(bank_sel), .wr_en(b2_row_v), .wr_addr($clog2(H2)'(b2_row_y)),
    .wr_data(b2_row), .rd_cur_en(l2_rd), .rd_cur_addr(l2_ca), .rd_cur_data(l2_cd),
    .rd_ref_en(l2_rd), .rd_ref_addr(l2_ra), .rd_ref_data(l2_rdat));

  bin_layer_mem #(.W(W1), .H(H1)) u_mem1 (
    .clk(clk), .bank_sel(bank_sel), .wr_en(b1_row_v), .wr_addr($clog2(H1)'(b1_row_y)),
    .wr_data(b1_row), .rd_cur_en(l1_rd), .rd_cur_addr(l1_ca), .rd_cur_data(l1_cd),
    .rd_ref_en(l1_rd), .rd_ref_addr(l1_ra), .rd_ref_data(l1_rdat));

  // ---------------------------------------------------------------- search
  logic        l1_start, l2_start, l3_start;
  logic [15:0] l1_bx, l1_by, l2_bx, l2_by, l3_bx, l3_by;
  mv_t         l1_ctr, l3_ctr, l1_mv, l2_mv, l3_mv;
  logic [3:0]  l1_rng, l3_rng;
  mv_t         l2_cand [NUM_CAND];
  logic        l1_done, l2_done, l3_done, l2_zt;
  logic        l1_found, l3_found;
  logic [$clog2(N_LV1*N_LV1+1)-1:0] l1_sod;
  logic [$clog2(N_LV2*N_LV2+1)-1:0] l2_sod;
  logic [L3SW-1:0] l3_sod;
  logic [3:0]  l2_points;

  fs_level_search #(.W(W1), .H(H1), .N(N_LV1), .R(R1)) u_lv1 (
    .clk(clk), .rst_n(rst_n), .start(l1_start), .blk_x(l1_bx), .blk_y(l1_by),
    .ctr(l1_ctr), .rng(l1_rng), .rd_en(l1_rd), .rd_cur_addr(l1_ca), .rd_ref_addr(l1_ra),
    .rd_cur_data(l1_cd), .rd_ref_data(l1_rdat), .done(l1_done), .best_mv(l1_mv),
    .best_sod(l1_sod), .found(l1_found));

  level2_search #(.W(W2), .H(H2)) u_lv2 (
    .clk(clk), .rst_n(rst_n), .start(l2_start), .blk_x(l2_bx), .blk_y(l2_by),
    .cand(l2_cand), .rd_en(l2_rd), .rd_cur_addr(l2_ca), .rd_ref_addr(l2_ra),
    .rd_cur_data(l2_cd), .rd_ref_data(l2_rdat), .done(l2_done), .best_mv(l2_mv),
    .best_sod(l2_sod), .zero_tuned(l2_zt), .points(l2_points));

  fs_level_search #(.W(W3), .H(H3), .N(N_LV3), .R(R_LV3)) u_lv3 (
    .clk(clk), .rst_n(rst_n), .start(l3_start), .blk_x(l3_bx), .blk_y(l3_by),
    .ctr(l3_ctr), .rng(l3_rng), .rd_en(l3_rd), .rd_cur_addr(l3_ca), .rd_ref_addr(l3_ra),
    .rd_cur_data(l3_cd), .rd_ref_data(l3_rdat), .done(l3_done), .best_mv(l3_mv),
    .best_sod(l3_sod), .found(l3_found));

  logic ctrl_busy;

  abme_mb_ctrl #(.W(W), .H(H), .SR(SR)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .frame_built(frame_built), .static_skip_en(static_skip_en),
    .busy(ctrl_busy), .bank_sel(bank_sel),
    .l1_start(l1_start), .l1_bx(l1_bx), .l1_by(l1_by), .l1_ctr(l1_ctr), .l1_rng(l1_rng),
    .l1_done(l1_done), .l1_mv(l1_mv),
    .l2_start(l2_start), .l2_bx(l2_bx), .l2_by(l2_by), .l2_cand(l2_cand),
    .l2_done(l2_done), .l2_mv(l2_mv), .l2_zero_tuned(l2_zt),
    .l3_start(l3_start), .l3_bx(l3_bx), .l3_by(l3_by), .l3_ctr(l3_ctr), .l3_rng(l3_rng),
    .l3_done(l3_done), .l3_mv(l3_mv), .l3_sod(l3_sod),
    .mv_valid(mv_valid), .mv_mbx(mv_mbx), .mv_mby(mv_mby), .mv_out(mv),
    .mv_sod(mv_sod), .mv_static(mv_static), .mv_zero_tuned(mv_zero_tuned),
    .frame_done(ctrl_frame_done));

  assign frame_done = ctrl_frame_done;

  // Searches only run on a complete frame, and every search has a valid
  // centre point (the block itself lies inside the frame).
  a_no_build_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl_busy |-> !pix_ready);
  a_l1_found: assert property (@(posedge clk) disable iff (!rst_n) l1_done |-> l1_found);
  a_l3_found: assert property (@(posedge clk) disable iff (!rst_n) l3_done |-> l3_found);

endmodule
