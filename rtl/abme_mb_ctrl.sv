// abme_mb_ctrl: macroblock sequencer of the all-binary motion estimator.
//
// Once the three binary levels of a frame are built (frame_built), it walks
// the macroblocks in raster order. For each one it runs
//   Level 1: full search +-R1 (R1 = SR/4 - 1) of the 4x4 block around zero;
//   Level 2: candidate search of the 8x8 block with the six candidates
//            centre (zero), 2 x Level-1 vector, upper-right, upper, left
//            and previous-frame co-located vectors;
//   Level 3: full search +-2 of the 16x16 block around 2 x Level-2 vector.
// A macroblock whose final vector was identical over the last four frames
// is static: if static_skip_en is set, Levels 1 and 2 are skipped and Level
// 3 only refines +-1 around its previous vector. The level sequence, the
// candidate set, the doubling between levels and the four-frame static rule
// follow the algorithm description. Choices of this design: the first frame
// after reset is only stored as reference, not searched; neighbour vectors
// (full-resolution) are halved by an arithmetic shift for Level 2; missing
// neighbours at the frame edge count as zero; Level-2 candidates are clamped
// to +-(SR/2 - 2) and the static centre to +-(SR - 1), which keeps every
// final vector within +-SR; the static rule counts three consecutive
// repetitions (saturating at 7), compared against the previous frame's
// vector, zero before the first searched frame.
//
// Interface: the l1_/l2_/l3_ ports drive the three search units (start
// pulses, results on their done pulses). mv_valid pulses once per
// macroblock with its position, vector, Level-3 SoD and path flags;
// frame_done pulses after the last macroblock (or after storing the first
// frame), and bank_sel flips with it so the frame just processed becomes
// the reference.
//
// Some output bits are constant on purpose: the Level-1 centre (always
// zero), the Level-1 range, the C candidate (the zero vector) and the
// low and high bits of the block coordinates (multiples of the block size,
// far below 2^16). The search units take them as inputs because the same
// unit serves Level 1, Level 3 and the static refinement; synthesis removes
// the constant logic.
module abme_mb_ctrl
  import abme_pkg::*;
#(
  parameter int W  = 352,
  parameter int H  = 288,
  parameter int SR = 16,
  localparam int MBW = W / 16,
  localparam int MBH = H / 16,
  localparam int XW  = $clog2(MBW),
  localparam int YW  = $clog2(MBH),
  localparam int L3SW = $clog2(N_LV3 * N_LV3 + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            frame_built,
  input  logic            static_skip_en,
  output logic            busy,
  output logic            bank_sel,
  // Level 1
  output logic            l1_start,
  output logic [15:0]     l1_bx,
  output logic [15:0]     l1_by,
  output mv_t             l1_ctr,
  output logic [3:0]      l1_rng,
  input  logic            l1_done,
  input  mv_t             l1_mv,
  // Level 2
  output logic            l2_start,
  output logic [15:0]     l2_bx,
  output logic [15:0]     l2_by,
  output mv_t             l2_cand [NUM_CAND],
  input  logic            l2_done,
  input  mv_t             l2_mv,
  input  logic            l2_zero_tuned,
  // Level 3
  output logic            l3_start,
  output logic [15:0]     l3_bx,
  output logic [15:0]     l3_by,
  output mv_t             l3_ctr,
  output logic [3:0]      l3_rng,
  input  logic            l3_done,
  input  mv_t             l3_mv,
  input  logic [L3SW-1:0] l3_sod,
  // Results
  output logic            mv_valid,
  output logic [XW-1:0]   mv_mbx,
  output logic [YW-1:0]   mv_mby,
  output mv_t             mv_out,
  output logic [L3SW-1:0] mv_sod,
  output logic            mv_static,
  output logic            mv_zero_tuned,
  output logic            frame_done
);

  localparam int R1      = SR / 4 - 1;
  localparam int CAND_LIM = SR / 2 - 2;
  localparam int STAT_LIM = SR - 1;

  typedef enum logic [2:0] {S_IDLE, S_MB, S_L1W, S_L2S, S_L2W, S_L3S, S_L3W, S_END} state_e;
  state_e state;

  mv_t        cur_field  [MBH*MBW];
  mv_t        prev_field [MBH*MBW];
  logic [2:0] rep_cnt    [MBH*MBW];
  logic       has_ref;
  logic [XW-1:0] mbx;
  logic [YW-1:0] mby;
  mv_t        mv1, mv2;
  logic       zt, is_static;

  int mb;
  assign mb = int'(mby) * MBW + int'(mbx);

  function automatic mv_t half_clamp(input mv_t v);
    mv_t o;
    o.dx = clamp_mvc(v.dx >>> 1, CAND_LIM);
    o.dy = clamp_mvc(v.dy >>> 1, CAND_LIM);
    return o;
  endfunction

  // Level-2 candidates of the current macroblock.
  always_comb begin
    l2_cand[CAND_C]      = '0;
    l2_cand[CAND_LV1].dx = clamp_mvc(mv1.dx <<< 1, CAND_LIM);
    l2_cand[CAND_LV1].dy = clamp_mvc(mv1.dy <<< 1, CAND_LIM);
    l2_cand[CAND_UR]     = (mby != '0 && int'(mbx) < MBW - 1) ? half_clamp(cur_field[mb - MBW + 1]) : '0;
    l2_cand[CAND_U]      = (mby != '0) ? half_clamp(cur_field[mb - MBW]) : '0;
    l2_cand[CAND_L]      = (mbx != '0) ? half_clamp(cur_field[mb - 1]) : '0;
    l2_cand[CAND_P]      = half_clamp(prev_field[mb]);
  end

  logic static_mb;
  assign static_mb = static_skip_en && (rep_cnt[mb] >= 3'(STATIC_REPEATS));

  always_comb begin
    l1_start = (state == S_MB) && !static_mb;
    l1_bx    = 16'(int'(mbx) * N_LV1);
    l1_by    = 16'(int'(mby) * N_LV1);
    l1_ctr   = '0;
    l1_rng   = 4'(R1);
    l2_start = (state == S_L2S);
    l2_bx    = 16'(int'(mbx) * N_LV2);
    l2_by    = 16'(int'(mby) * N_LV2);
    l3_start = ((state == S_MB) && static_mb) || (state == S_L3S);
    l3_bx    = 16'(int'(mbx) * N_LV3);
    l3_by    = 16'(int'(mby) * N_LV3);
    if (state == S_MB) begin
      l3_ctr.dx = clamp_mvc(prev_field[mb].dx, STAT_LIM);
      l3_ctr.dy = clamp_mvc(prev_field[mb].dy, STAT_LIM);
      l3_rng    = 4'(R_STATIC);
    end else begin
      l3_ctr.dx = mv2.dx <<< 1;
      l3_ctr.dy = mv2.dy <<< 1;
      l3_rng    = 4'(R_LV3);
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      has_ref       <= 1'b0;
      bank_sel      <= 1'b0;
      mbx           <= '0;
      mby           <= '0;
      mv1           <= '0;
      mv2           <= '0;
      zt            <= 1'b0;
      is_static     <= 1'b0;
      mv_valid      <= 1'b0;
      mv_mbx        <= '0;
      mv_mby        <= '0;
      mv_out        <= '0;
      mv_sod        <= '0;
      mv_static     <= 1'b0;
      mv_zero_tuned <= 1'b0;
      frame_done    <= 1'b0;
      for (int k = 0; k < MBH * MBW; k++) begin
        cur_field[k]  <= '0;
        prev_field[k] <= '0;
        rep_cnt[k]    <= '0;
      end
    end else begin
      mv_valid   <= 1'b0;
      frame_done <= 1'b0;
      case (state)
        S_IDLE: if (frame_built) begin
          if (!has_ref) begin
            has_ref    <= 1'b1;
            bank_sel   <= !bank_sel;
            frame_done <= 1'b1;
          end else begin
            mbx   <= '0;
            mby   <= '0;
            state <= S_MB;
          end
        end
        S_MB: begin
          is_static <= static_mb;
          zt        <= 1'b0;
          state     <= static_mb ? S_L3W : S_L1W;
        end
        S_L1W: if (l1_done) begin
          mv1   <= l1_mv;
          state <= S_L2S;
        end
        S_L2S: state <= S_L2W;
        S_L2W: if (l2_done) begin
          mv2   <= l2_mv;
          zt    <= l2_zero_tuned;
          state <= S_L3S;
        end
        S_L3S: state <= S_L3W;
        S_L3W: if (l3_done) begin
          cur_field[mb] <= l3_mv;
          if (l3_mv == prev_field[mb])
            rep_cnt[mb] <= (rep_cnt[mb] == 3'd7) ? 3'd7 : rep_cnt[mb] + 1'b1;
          else
            rep_cnt[mb] <= '0;
          mv_valid      <= 1'b1;
          mv_mbx        <= mbx;
          mv_mby        <= mby;
          mv_out        <= l3_mv;
          mv_sod        <= l3_sod;
          mv_static     <= is_static;
          mv_zero_tuned <= zt;
          if (int'(mbx) == MBW - 1) begin
            mbx <= '0;
            if (int'(mby) == MBH - 1) state <= S_END;
            else begin
              mby   <= mby + 1'b1;
              state <= S_MB;
            end
          end else begin
            mbx   <= mbx + 1'b1;
            state <= S_MB;
          end
        end
        S_END: begin
          for (int k = 0; k < MBH * MBW; k++) prev_field[k] <= cur_field[k];
          bank_sel   <= !bank_sel;
          frame_done <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
