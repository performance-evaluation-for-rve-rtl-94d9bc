// sw_pkg: types and constants shared by the Smith-Waterman RVE accelerator.
//
// Characters are DNA bases coded in CHAR_W = 2 bits (A, C, G, T); H-matrix
// scores are unsigned SCORE_W = 16-bit values (H is never negative in local
// alignment). Arithmetic that can go negative (diagonal plus a mismatch
// score, a neighbour minus the gap penalty) uses the signed type sscore_t,
// one bit wider. The character coding, the widths and the default
// match/mismatch scores are this design's choices; the source design only
// says that a match score and a mismatch score exist.
package sw_pkg;

  localparam int CHAR_W  = 2;
  localparam int SCORE_W = 16;

  typedef logic [CHAR_W-1:0]         char_t;
  typedef logic [SCORE_W-1:0]        score_t;
  typedef logic signed [SCORE_W:0]   sscore_t;

  localparam int DEF_MATCH    = 2;
  localparam int DEF_MISMATCH = -1;

  // Run controller states of the top level.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_CLEAR = 2'd1,
    ST_RUN   = 2'd2,
    ST_DRAIN = 2'd3
  } run_state_t;

  function automatic score_t smax(input score_t a, input score_t b);
    return (a > b) ? a : b;
  endfunction

endpackage
