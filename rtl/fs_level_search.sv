// fs_level_search: full-search binary block matching around a centre vector.
//
// Finds, for the N x N block at (blk_x, blk_y) of the current binary frame,
// the reference position within +-rng (rng <= R) of the centre vector ctr
// with the smallest bit-wise sum of differences (SoD = number of differing
// bits). Used for Level 1 (N = 4, +-3 around zero) and Level 3 (N = 16, +-2
// around twice the Level-2 vector, or +-1 for a static macroblock).
//
// How it works: the data loader reads the (2R+N) rows of the reference
// window and the N rows of the current block from the binary layer memory,
// one row each per cycle; bit alignment cuts the (2R+N) window bits and the
// N block bits out of the rows; the 2-D systolic array turns them into all
// (2R+1)^2 SoDs in 2R+N steps, each reference bit being fetched once; the
// comparator then picks the smallest. The loader/aligner/array/comparator
// chain follows the Level-1 and Level-3 paths of the algorithm's data flow
// and the 2-D array architecture. Check points whose reference block is not
// wholly inside the frame are excluded, and ties go to the first point in
// raster order (dy outer, dx inner); both are choices of this design.
//
// Interface: pulse start with the inputs valid; they are captured. The
// memory ports issue synchronous row reads (data expected the next cycle).
// done pulses exactly 2R+N+3 cycles after start, with best_mv (absolute
// vector = ctr + offset), best_sod and found (low when no point was valid,
// best_mv then equals ctr).
module fs_level_search
  import abme_pkg::*;
#(
  parameter int W = 352,
  parameter int H = 288,
  parameter int N = 16,
  parameter int R = 2,
  localparam int P  = 2 * R + 1,
  localparam int WW = 2 * R + N,
  localparam int SW = $clog2(N * N + 1),
  localparam int AW = $clog2(H),
  localparam int IW = $clog2(P * P)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   blk_x,
  input  logic [15:0]   blk_y,
  input  mv_t           ctr,
  input  logic [3:0]    rng,
  output logic          rd_en,
  output logic [AW-1:0] rd_cur_addr,
  output logic [AW-1:0] rd_ref_addr,
  input  logic [W-1:0]  rd_cur_data,
  input  logic [W-1:0]  rd_ref_data,
  output logic          done,
  output mv_t           best_mv,
  output logic [SW-1:0] best_sod,
  output logic          found
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;
  state_e state;

  logic signed [15:0] bx, by, cx, cy;
  logic [3:0]         rg;
  logic [$clog2(WW+1)-1:0] t;
  logic               step_q, ref_ok_q;

  // Row addresses of this cycle's reads.
  logic signed [15:0] ref_row, cur_row;
  always_comb begin
    ref_row     = by + cy - 16'(R) + 16'(t);
    cur_row     = by + 16'(t) - 16'(2 * R - 1);
    rd_en       = (state == S_RUN);
    rd_ref_addr = (ref_row >= 0 && ref_row < 16'(H)) ? AW'(ref_row) : '0;
    rd_cur_addr = (cur_row >= 0 && cur_row < 16'(H)) ? AW'(cur_row) : '0;
  end

  // Bit alignment of the rows read last cycle.
  logic [WW-1:0] ref_win, ref_bits;
  logic [N-1:0]  cur_bits;
  logic signed [15:0] ref_col0;
  assign ref_col0 = bx + cx - 16'(R);

  bit_align #(.W(W), .OW(WW), .SW(16)) u_align_ref (
    .row(rd_ref_data), .start(ref_col0), .out(ref_win));
  bit_align #(.W(W), .OW(N), .SW(16)) u_align_cur (
    .row(rd_cur_data), .start(bx), .out(cur_bits));

  assign ref_bits = ref_ok_q ? ref_win : '0;

  logic          arr_done;
  logic [SW-1:0] sod [P*P];

  sa2d_xor_array #(.N(N), .R(R)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start && state == S_IDLE),
    .step   (step_q),
    .ref_row(ref_bits),
    .cur_row(cur_bits),
    .done   (arr_done),
    .sod    (sod)
  );

  // Which check points may be chosen.
  logic valid [P*P];
  always_comb begin
    for (int j = 0; j < P; j++) begin
      for (int i = 0; i < P; i++) begin
        automatic int du = i - R;
        automatic int dv = j - R;
        automatic int px = int'(bx) + int'(cx) + du;
        automatic int py = int'(by) + int'(cy) + dv;
        valid[j*P + i] = (du <= int'(rg)) && (-du <= int'(rg)) &&
                         (dv <= int'(rg)) && (-dv <= int'(rg)) &&
                         (px >= 0) && (px <= W - N) && (py >= 0) && (py <= H - N);
      end
    end
  end

  logic          c_any;
  logic [IW-1:0] c_idx;
  logic [SW-1:0] c_sod;

  sod_min_cmp #(.COUNT(P * P), .SW(SW)) u_cmp (
    .sod(sod), .valid(valid), .any(c_any), .best_idx(c_idx), .best_sod(c_sod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      bx       <= '0;
      by       <= '0;
      cx       <= '0;
      cy       <= '0;
      rg       <= '0;
      t        <= '0;
      step_q   <= 1'b0;
      ref_ok_q <= 1'b0;
      done     <= 1'b0;
      best_mv  <= '0;
      best_sod <= '0;
      found    <= 1'b0;
    end else begin
      done   <= 1'b0;
      step_q <= (state == S_RUN);
      ref_ok_q <= (ref_row >= 0 && ref_row < 16'(H));
      case (state)
        S_IDLE: if (start) begin
          bx    <= blk_x;
          by    <= blk_y;
          cx    <= 16'(ctr.dx);
          cy    <= 16'(ctr.dy);
          rg    <= (rng > 4'(R)) ? 4'(R) : rng;
          t     <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          t <= t + 1'b1;
          if (t == $bits(t)'(WW - 1)) state <= S_WAIT;
        end
        S_WAIT: if (arr_done) begin
          found <= c_any;
          if (c_any) begin
            best_mv.dx <= mvc_t'(cx + 16'(int'(c_idx) % P) - 16'(R));
            best_mv.dy <= mvc_t'(cy + 16'(int'(c_idx) / P) - 16'(R));
            best_sod   <= c_sod;
          end else begin
            best_mv.dx <= mvc_t'(cx);
            best_mv.dy <= mvc_t'(cy);
            best_sod   <= '1;
          end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
