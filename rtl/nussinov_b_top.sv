// nussinov_b_top: Nussinov RNA folding engine built on the
// throughput-optimized systolic array B.
//
// The engine scores RNA sequences of L = N-1 bases (N = 61: 60 bases) by
// the maximum number of nested base pairs. Many short sequences are folded
// back to back: the array holds up to ceil(latency / (N-2)) sequences at
// once and accepts a new one every N-2 clocks, half the period of the
// latency-optimal array, while each sequence takes
// (2s+1)(N-3) clocks from first to last computation (174 for N = 61, s = 1).
// STAGES = s sets how many registers each PE has for retiming: the schedule
// becomes [-2s, 2s+1, -s]; the pipelining period stays N-2 clocks.
//
// Interface (all synchronous to clk):
//   in_valid/in_first/in_xl/in_xr  one base window (x_i, x_{i+1}) per clock,
//                                  i = 1 .. N-2, in_first on i = 1,
//                                  consecutive clocks within a sequence
//   in_ready                       high when a new sequence may start
//   out_valid/out_score            one clock pulse with the score, issued
//                                  array_latency(N, STAGES) + 1 clocks
//                                  after in_first
//   proto_err                      sticky flag for a broken load
// rst_n is a synchronous active-low reset of the controller only.
module nussinov_b_top
  import nussinov_pkg::*;
#(
  parameter int unsigned N      = 61,
  parameter int unsigned STAGES = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  base_t  in_xl,
  input  base_t  in_xr,
  output logic   in_ready,
  output logic   out_valid,
  output score_t out_score,
  output logic   proto_err
);

  base_t  arr_xl, arr_xr;
  score_t arr_result;

  array_controller #(.N(N), .STAGES(STAGES)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_first, .in_xl, .in_xr, .in_ready,
    .arr_xl, .arr_xr, .arr_result, .out_valid, .out_score, .proto_err);

  nussinov_array_b #(.N(N), .STAGES(STAGES)) u_array (
    .clk, .xl_in(arr_xl), .xr_in(arr_xr), .result(arr_result));

endmodule
