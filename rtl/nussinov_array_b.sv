// nussinov_array_b: the throughput-optimized Nussinov array "B".
//
// The 3-D Nussinov domain {(i,j,k) : 1<=i<=j<=N, 1<=k<=(j-i)/2} is projected
// along u = [1,1,0]. All points with the same d = j-i and k share one PE, so
// the array is a triangle of PE(d,k), 2<=d<=N-1, 1<=k<=floor(d/2): 900 PEs
// for N = 61. Point (i, i+d, k) runs at time t = i + (2s+1)d - s*k (the
// schedule [-2s, 2s+1, -s], s = STAGES), so each PE works on i = 1, 2, ...
// in consecutive clocks: the array is fully utilised and a new instance can
// enter every N-2 clocks, the largest number of points any PE (the d = 2
// column) holds.
//
// Links (registers per hop, from the schedule):
//   partial P     PE(d,k+1) -> PE(d,k)        s     (inside p_out)
//   A = S(i,i+k)  PE(d,k)   -> PE(d+1,k)      2s+1, injected from PE(k,1)
//                                                   into PE(2k,k) after (s+1)k
//   D = S(j-k,j)  PE(d,k)   -> PE(d+1,k)      2s,   injected from PE(k,1)
//                                                   into PE(2k,k) after s*k
//   B = S(i+k,j)  PE(d,k)   -> PE(d+1,k+1)    s,    enters row 1 from PE(d-1,1)
//   C = S(i,j-k)  PE(d,k)   -> PE(d+1,k+1)    s+1,  enters row 1 from PE(d-1,1)
//   pair S(i+1,j-1)         PE(d-2,1)->PE(d,1) 3s+1
//   bases x_i / x_{j-1} along row 1           2s+1 / 2s
// Scores of one or zero bases are the constant 0 and are tied off. The
// base stream enters at PE(2,1) only: one window (x_i, x_{i+1}) per clock.
//
// Interface: xl_in/xr_in are the window of point i at PE(2,1); result is
// S(1,N) of an instance array_latency(N,STAGES) - 1 clocks after the window
// i = 1 is presented here (the controller adds one input register). There
// is no control inside the array. Projection, schedule, PE count and
// serial loading follow the text; the dependence structure that realises
// them is this design's own derivation.
module nussinov_array_b
  import nussinov_pkg::*;
#(
  parameter int unsigned N      = 61,
  parameter int unsigned STAGES = 1
) (
  input  logic   clk,
  input  base_t  xl_in,
  input  base_t  xr_in,
  output score_t result
);

  localparam int unsigned KMAX = (N - 1) / 2;

  score_t p_o   [N][KMAX+1];
  score_t a_o   [N][KMAX+1];
  score_t b_o   [N][KMAX+1];
  score_t c_o   [N][KMAX+1];
  score_t d_o   [N][KMAX+1];
  base_t  xl_o  [N];
  base_t  xr_o  [N];
  score_t res_b [N];
  score_t res_c [N];
  score_t res_p [N];
  score_t a_inj [KMAX+1];
  score_t d_inj [KMAX+1];

  for (genvar d = 0; d < N; d++) begin : g_d
    for (genvar k = 0; k <= KMAX; k++) begin : g_k
      if (d >= 2 && k >= 1 && 2*k <= d) begin : g_pe
        score_t p_i, a_i, b_i, c_i, d_i, pair_i;
        base_t  xl_i, xr_i;

        if (2*(k+1) <= d) begin : g_pin
          assign p_i = p_o[d][k+1];
        end else begin : g_ptop
          assign p_i = '0;
        end
        if (k == 1) begin : g_row1
          assign a_i    = '0;
          assign d_i    = '0;
          assign b_i    = (d >= 3) ? res_b[d-1] : '0;
          assign c_i    = (d >= 3) ? res_c[d-1] : '0;
          assign pair_i = (d >= 4) ? res_p[d-2] : '0;
          assign xl_i   = (d == 2) ? xl_in : xl_o[d-1];
          assign xr_i   = (d == 2) ? xr_in : xr_o[d-1];
        end else begin : g_upper
          assign a_i    = (d == 2*k) ? a_inj[k] : a_o[d-1][k];
          assign d_i    = (d == 2*k) ? d_inj[k] : d_o[d-1][k];
          assign b_i    = b_o[d-1][k-1];
          assign c_i    = c_o[d-1][k-1];
          assign pair_i = '0;
          assign xl_i   = '0;
          assign xr_i   = '0;
        end

        if (k == 1) begin : g_bot
          nussinov_pe #(.STAGES(STAGES), .BOTTOM(1'b1)) u_pe (
            .clk, .p_in(p_i), .a_in(a_i), .b_in(b_i), .c_in(c_i), .d_in(d_i),
            .pair_in(pair_i), .xl_in(xl_i), .xr_in(xr_i),
            .p_out(p_o[d][k]), .a_out(a_o[d][k]), .b_out(b_o[d][k]),
            .c_out(c_o[d][k]), .d_out(d_o[d][k]), .xl_out(xl_o[d]),
            .xr_out(xr_o[d]), .res_b(res_b[d]), .res_c(res_c[d]),
            .res_p(res_p[d]));
        end else begin : g_up
          base_t  unused_xl, unused_xr;
          score_t unused_rb, unused_rc, unused_rp;
          nussinov_pe #(.STAGES(STAGES), .BOTTOM(1'b0)) u_pe (
            .clk, .p_in(p_i), .a_in(a_i), .b_in(b_i), .c_in(c_i), .d_in(d_i),
            .pair_in(pair_i), .xl_in(xl_i), .xr_in(xr_i),
            .p_out(p_o[d][k]), .a_out(a_o[d][k]), .b_out(b_o[d][k]),
            .c_out(c_o[d][k]), .d_out(d_o[d][k]), .xl_out(unused_xl),
            .xr_out(unused_xr), .res_b(unused_rb), .res_c(unused_rc),
            .res_p(unused_rp));
        end
      end else begin : g_none
        assign p_o[d][k] = '0;
        assign a_o[d][k] = '0;
        assign b_o[d][k] = '0;
        assign c_o[d][k] = '0;
        assign d_o[d][k] = '0;
        if (k == 0 && d < 2) begin : g_row_tie
          assign xl_o[d]  = '0;
          assign xr_o[d]  = '0;
          assign res_b[d] = '0;
          assign res_c[d] = '0;
          assign res_p[d] = '0;
        end
      end
    end
  end

  // Long links from the row-1 result of length k to the first PE that
  // uses it as a left (A) or right (D) operand, PE(2k,k).
  for (genvar k = 0; k <= KMAX; k++) begin : g_inj
    if (k >= 2) begin : g_link
      link_delay #(.W(SCORE_W), .DEPTH((STAGES + 1) * k)) u_a (
        .clk, .din(p_o[k][1]), .dout(a_inj[k]));
      link_delay #(.W(SCORE_W), .DEPTH(STAGES * k)) u_d (
        .clk, .din(p_o[k][1]), .dout(d_inj[k]));
    end else begin : g_tie
      assign a_inj[k] = '0;
      assign d_inj[k] = '0;
    end
  end

  assign result = p_o[N-1][1];

endmodule
