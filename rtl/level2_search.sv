// level2_search: Level-2 search of the binary pyramid (8 x 8 blocks).
//
// Instead of a full search, Level 2 examines a handful of check points:
//  * coarse selection: the six candidate vectors (centre/zero, twice the
//    Level-1 vector, upper-right, upper, left, previous-frame co-located),
//    followed by tuning at the four points one pixel up, left, right and
//    down of the best candidate;
//  * zero tuning, when all six candidates are zero: the zero vector and the
//    eight points one and two pixels up, left, right and down of it.
// The point with the smallest SoD is the result. The candidate set, the two
// tuning patterns and the all-zero test follow the algorithm description.
// The candidates arrive already scaled to Level-2 pixels; the order of the
// points (which decides ties, the earlier point winning), skipping points
// whose reference block leaves the frame, and evaluating duplicate
// candidates again are choices of this design.
//
// How it works: one xor_pe processing element evaluates a point row by row,
// one 8-bit row of the current block and the bit-aligned row of the
// reference block per cycle; a point takes 11 cycles, a skipped point 1.
// Interface: pulse start with blk_x/blk_y (block corner, Level-2 pixels) and
// cand[] valid; they are captured. Synchronous row reads as in
// fs_level_search. done pulses with best_mv, best_sod, zero_tuned (the zero
// pattern was used) and points (number of points evaluated).
module level2_search
  import abme_pkg::*;
#(
  parameter int W = 176,
  parameter int H = 144,
  parameter int N = N_LV2,
  localparam int SW = $clog2(N * N + 1),
  localparam int AW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   blk_x,
  input  logic [15:0]   blk_y,
  input  mv_t           cand [NUM_CAND],
  output logic          rd_en,
  output logic [AW-1:0] rd_cur_addr,
  output logic [AW-1:0] rd_ref_addr,
  input  logic [W-1:0]  rd_cur_data,
  input  logic [W-1:0]  rd_ref_data,
  output logic          done,
  output mv_t           best_mv,
  output logic [SW-1:0] best_sod,
  output logic          zero_tuned,
  output logic [3:0]    points
);

  typedef enum logic [2:0] {S_IDLE, S_POINT, S_ROWS, S_DRAIN, S_CMP} state_e;
  typedef enum logic [1:0] {PH_COARSE, PH_TUNE, PH_ZERO} phase_e;

  state_e state;
  phase_e phase;
  logic signed [15:0] bx, by;
  mv_t    cands [NUM_CAND];
  mv_t    centre;
  logic [3:0] idx;
  logic [2:0] r;
  mv_t    pt;            // point under evaluation
  logic   have_best;

  // Point list.
  mv_t    pt_next;
  logic   last_idx;
  always_comb begin
    pt_next  = centre;
    last_idx = 1'b0;
    case (phase)
      PH_COARSE: begin
        pt_next  = cands[(idx < 4'(NUM_CAND)) ? 3'(idx) : 3'd0];
        last_idx = (idx == 4'(NUM_CAND - 1));
      end
      PH_TUNE: begin
        case (idx)
          4'd0:    pt_next.dy = centre.dy - 1'b1;   // up
          4'd1:    pt_next.dx = centre.dx - 1'b1;   // left
          4'd2:    pt_next.dx = centre.dx + 1'b1;   // right
          default: pt_next.dy = centre.dy + 1'b1;   // down
        endcase
        last_idx = (idx == 4'd3);
      end
      default: begin  // PH_ZERO, centre is zero
        case (idx)
          4'd0:    ;
          4'd1:    pt_next.dy = -8'sd1;
          4'd2:    pt_next.dy = -8'sd2;
          4'd3:    pt_next.dx = -8'sd1;
          4'd4:    pt_next.dx = -8'sd2;
          4'd5:    pt_next.dx =  8'sd1;
          4'd6:    pt_next.dx =  8'sd2;
          4'd7:    pt_next.dy =  8'sd1;
          default: pt_next.dy =  8'sd2;
        endcase
        last_idx = (idx == 4'd8);
      end
    endcase
  end

  logic pt_ok;
  always_comb begin
    automatic int px = int'(bx) + int'(pt_next.dx);
    automatic int py = int'(by) + int'(pt_next.dy);
    pt_ok = (px >= 0) && (px <= W - N) && (py >= 0) && (py <= H - N);
  end

  // Row reads and alignment.
  logic signed [15:0] ref_y;
  assign rd_en       = (state == S_ROWS);
  assign rd_cur_addr = AW'(by + 16'(r));
  assign ref_y       = by + 16'(pt.dy) + 16'(r);
  assign rd_ref_addr = AW'(ref_y);

  logic [N-1:0] cur_bits, ref_bits;
  logic signed [15:0] ref_x;
  assign ref_x = bx + 16'(pt.dx);
  bit_align #(.W(W), .OW(N), .SW(16)) u_align_cur (
    .row(rd_cur_data), .start(bx), .out(cur_bits));
  bit_align #(.W(W), .OW(N), .SW(16)) u_align_ref (
    .row(rd_ref_data), .start(ref_x), .out(ref_bits));

  logic          pe_en, pe_clr;
  logic [SW-1:0] pe_sod;
  xor_pe #(.N(N)) u_pe (
    .clk(clk), .rst_n(rst_n), .en(pe_en), .clr(pe_clr),
    .cur(cur_bits), .ref_bits(ref_bits), .sod(pe_sod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase      <= PH_COARSE;
      bx         <= '0;
      by         <= '0;
      centre     <= '0;
      idx        <= '0;
      r          <= '0;
      pt         <= '0;
      have_best  <= 1'b0;
      pe_en      <= 1'b0;
      pe_clr     <= 1'b0;
      done       <= 1'b0;
      best_mv    <= '0;
      best_sod   <= '1;
      zero_tuned <= 1'b0;
      points     <= '0;
      for (int k = 0; k < NUM_CAND; k++) cands[k] <= '0;
    end else begin
      done   <= 1'b0;
      pe_en  <= (state == S_ROWS);
      pe_clr <= (state == S_ROWS) && (r == '0);
      case (state)
        S_IDLE: if (start) begin
          automatic logic all_zero = 1'b1;
          for (int k = 0; k < NUM_CAND; k++) begin
            cands[k] <= cand[k];
            if (cand[k] != '0) all_zero = 1'b0;
          end
          bx         <= blk_x;
          by         <= blk_y;
          centre     <= '0;
          idx        <= '0;
          have_best  <= 1'b0;
          best_mv    <= '0;
          best_sod   <= '1;
          points     <= '0;
          zero_tuned <= all_zero;
          phase      <= all_zero ? PH_ZERO : PH_COARSE;
          state      <= S_POINT;
        end
        S_POINT: begin
          if (pt_ok) begin
            pt    <= pt_next;
            r     <= '0;
            state <= S_ROWS;
          end else if (last_idx) begin
            // nothing to evaluate here: move on
            if (phase == PH_COARSE) begin
              phase  <= PH_TUNE;
              centre <= best_mv;
              idx    <= '0;
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_ROWS: begin
          r <= r + 1'b1;
          if (r == 3'(N - 1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_CMP;
        S_CMP: begin
          points <= points + 1'b1;
          if (!have_best || pe_sod < best_sod) begin
            have_best <= 1'b1;
            best_sod  <= pe_sod;
            best_mv   <= pt;
          end
          if (last_idx) begin
            if (phase == PH_COARSE) begin
              phase  <= PH_TUNE;
              centre <= (!have_best || pe_sod < best_sod) ? pt : best_mv;
              idx    <= '0;
              state  <= S_POINT;
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end else begin
            idx   <= idx + 1'b1;
            state <= S_POINT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
