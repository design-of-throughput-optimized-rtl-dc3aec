// nussinov_pe: one processing element of the Nussinov array.
//
// PE(d,k) evaluates, for one sub-sequence interval (i, j = i+d) per clock,
// the k-th step of the split maximisation of the Nussinov recurrence
//   S(i,j) = max( S(i+1,j-1) + delta(x_i, x_{j-1}),
//                 max over i<m<j of S(i,m) + S(m,j) )
// where S(i,j) scores the bases x_i .. x_{j-1}. Step k tries the two splits
// m = i+k and m = j-k at once:
//   P(i,j,k) = max( P(i,j,k+1), A + B, C + D )
//   A = S(i,i+k), B = S(i+k,j), C = S(i,j-k), D = S(j-k,j).
// The PEs of the bottom row (k = 1, BOTTOM = 1) also add the base-pair term
// pair_in + delta(xl_in, xr_in) and so produce the final S(i,j).
//
// The combinational result passes through STAGES registers (p_out). With
// more than one stage these are the extra link registers that a relaxed
// schedule [-2s, 2s+1, -s] puts in front of every PE, left at the output so
// that synthesis retiming can move them into the adder/max tree.
//
// The PE also forwards the operands its neighbours need, each through the
// number of registers the schedule gives that link (s = STAGES):
//   a_out  = a_in  delayed 2s+1   (to PE(d+1,k))
//   d_out  = d_in  delayed 2s     (to PE(d+1,k))
//   b_out  = b_in  delayed s      (to PE(d+1,k+1))
//   c_out  = c_in  delayed s+1    (to PE(d+1,k+1))
// and in the bottom row the base streams and its own results:
//   xl_out = xl_in delayed 2s+1,  xr_out = xr_in delayed 2s
//   res_b  = p_out delayed s,  res_c = p_out delayed s+1,
//   res_p  = p_out delayed 3s+1.
// Outputs that a PE of the other kind does not produce are driven to zero.
// No reset: every value is read only in the cycle the schedule makes it
// valid. The recurrence split into the 3-D domain of the text, the link
// delays and the operand names are derived from the published schedule and
// projection; the exact PE contents are this design's own.
module nussinov_pe
  import nussinov_pkg::*;
#(
  parameter int unsigned STAGES = 1,
  parameter bit          BOTTOM = 1'b0
) (
  input  logic   clk,
  input  score_t p_in,
  input  score_t a_in,
  input  score_t b_in,
  input  score_t c_in,
  input  score_t d_in,
  input  score_t pair_in,
  input  base_t  xl_in,
  input  base_t  xr_in,
  output score_t p_out,
  output score_t a_out,
  output score_t b_out,
  output score_t c_out,
  output score_t d_out,
  output base_t  xl_out,
  output base_t  xr_out,
  output score_t res_b,
  output score_t res_c,
  output score_t res_p
);

  score_t sum_ab, sum_cd, pair_term, best;

  always_comb begin
    sum_ab    = a_in + b_in;
    sum_cd    = c_in + d_in;
    pair_term = BOTTOM ? score_t'(pair_in + pair_score(xl_in, xr_in)) : '0;
    best      = p_in;
    if (sum_ab    > best) best = sum_ab;
    if (sum_cd    > best) best = sum_cd;
    if (pair_term > best) best = pair_term;
  end

  link_delay #(.W(SCORE_W), .DEPTH(STAGES)) u_p (.clk, .din(best), .dout(p_out));
  link_delay #(.W(SCORE_W), .DEPTH(STAGES)) u_b (.clk, .din(b_in), .dout(b_out));
  link_delay #(.W(SCORE_W), .DEPTH(STAGES + 1)) u_c (.clk, .din(c_in), .dout(c_out));

  if (BOTTOM) begin : g_bottom
    // A and D are the constant S of a single base (zero) in this row.
    assign a_out = '0;
    assign d_out = '0;
    link_delay #(.W(BASE_W), .DEPTH(2*STAGES + 1)) u_xl (.clk, .din(xl_in), .dout(xl_out));
    link_delay #(.W(BASE_W), .DEPTH(2*STAGES)) u_xr (.clk, .din(xr_in), .dout(xr_out));
    link_delay #(.W(SCORE_W), .DEPTH(STAGES)) u_rb (.clk, .din(p_out), .dout(res_b));
    link_delay #(.W(SCORE_W), .DEPTH(1)) u_rc (.clk, .din(res_b), .dout(res_c));
    link_delay #(.W(SCORE_W), .DEPTH(2*STAGES)) u_rp (.clk, .din(res_c), .dout(res_p));
  end else begin : g_upper
    link_delay #(.W(SCORE_W), .DEPTH(2*STAGES + 1)) u_a (.clk, .din(a_in), .dout(a_out));
    link_delay #(.W(SCORE_W), .DEPTH(2*STAGES)) u_d (.clk, .din(d_in), .dout(d_out));
    assign xl_out = '0;
    assign xr_out = '0;
    assign res_b  = '0;
    assign res_c  = '0;
    assign res_p  = '0;
  end

endmodule
