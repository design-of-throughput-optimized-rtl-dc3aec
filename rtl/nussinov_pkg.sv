// nussinov_pkg: types and functions shared by the Nussinov array.
//
// Bases are 3-bit codes (A, C, G, U, plus an "unknown" code that never
// pairs). Scores are SCORE_W-bit unsigned counts of base pairs. The width
// of both follows the 8-bit datapath and 3-bit characters of array B; the
// base encoding and the pairing rule (Watson-Crick pairs plus the G-U
// wobble pair, each worth one point) are this design's own choice.
package nussinov_pkg;

  localparam int unsigned BASE_W  = 3;
  localparam int unsigned SCORE_W = 8;

  typedef logic [BASE_W-1:0]  base_t;
  typedef logic [SCORE_W-1:0] score_t;

  typedef enum logic [BASE_W-1:0] {
    BASE_A = 3'd0,
    BASE_C = 3'd1,
    BASE_G = 3'd2,
    BASE_U = 3'd3,
    BASE_N = 3'd4
  } base_e;

  // delta(a, b): 1 when the two bases may form a pair, else 0.
  function automatic score_t pair_score(base_t a, base_t b);
    logic hit;
    hit = (a == BASE_A && b == BASE_U) || (a == BASE_U && b == BASE_A) ||
          (a == BASE_G && b == BASE_C) || (a == BASE_C && b == BASE_G) ||
          (a == BASE_G && b == BASE_U) || (a == BASE_U && b == BASE_G);
    return hit ? score_t'(1) : score_t'(0);
  endfunction

  // Total array latency in clocks from the cycle the first base window of
  // an instance is presented to the controller to the cycle the last PE
  // holds S(1,N): (2s+1)(N-1) - 3s - 1 for s PE stages.
  function automatic int unsigned array_latency(int unsigned n, int unsigned s);
    return (2*s + 1)*(n - 1) - 3*s - 1;
  endfunction

endpackage
