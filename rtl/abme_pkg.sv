// abme_pkg: types and constants shared by the all-binary motion estimator.
//
// The estimator works on a three-level binary pyramid. Level 3 is the full
// frame with 16x16 macroblocks, Level 2 is half size with 8x8 blocks and
// Level 1 is quarter size with 4x4 blocks; one block of each level covers the
// same picture area. The block sizes, the +-3 Level-1 window, the +-2
// Level-3 window, the +-1 static refinement and the four-frame static rule
// follow the algorithm description. The vector width, the candidate order
// code and the rounding constant's use as a parameter are choices of this
// implementation.
package abme_pkg;

  // Width of one signed motion-vector component (pixels of its level).
  localparam int MVW = 8;

  typedef logic signed [MVW-1:0] mvc_t;

  // A motion vector: horizontal then vertical displacement.
  typedef struct packed {
    mvc_t dx;
    mvc_t dy;
  } mv_t;

  localparam mv_t MV_ZERO = '{dx: '0, dy: '0};

  // Block edge per pyramid level.
  localparam int N_LV1 = 4;
  localparam int N_LV2 = 8;
  localparam int N_LV3 = 16;

  // Search ranges of the full-search levels.
  localparam int R_LV3    = 2;   // Level-3 refinement window +-2
  localparam int R_STATIC = 1;   // refinement of a static macroblock +-1

  // A macroblock whose vector was the same in the last four frames is
  // static: three consecutive repetitions of the vector.
  localparam int STATIC_REPEATS = 3;

  // Rounding constant added to the four-neighbour sum before the divide by
  // four in the H_A filter.
  localparam int HA_ROUND = 4;

  // Level-2 candidate slots, in the order they are examined.
  typedef enum logic [2:0] {
    CAND_C   = 3'd0,  // centre, zero vector
    CAND_LV1 = 3'd1,  // twice the Level-1 vector
    CAND_UR  = 3'd2,  // upper-right macroblock
    CAND_U   = 3'd3,  // upper macroblock
    CAND_L   = 3'd4,  // left macroblock
    CAND_P   = 3'd5   // co-located macroblock of the previous frame
  } cand_e;

  localparam int NUM_CAND = 6;

  // Clamp a vector component to +-lim.
  function automatic mvc_t clamp_mvc(input mvc_t v, input int lim);
    if (int'(v) > lim) return mvc_t'(lim);
    if (int'(v) < -lim) return mvc_t'(-lim);
    return v;
  endfunction

endpackage
