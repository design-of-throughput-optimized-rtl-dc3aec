// tb_nussinov_b_stages6: the engine with six PE stages, the deepest
// pipelining point of the published clock-frequency sweep (schedule
// [-12, 13, -6]), for sequences of 20 bases (N = 21). Scores, latency
// (array_latency(21, 6) + 1 clocks) and the unchanged period of N-2 clocks
// are checked by nussinov_harness.
module tb_nussinov_b_stages6;
  import nussinov_pkg::*;

  logic   clk, rst_n, in_valid, in_first, in_ready, out_valid, proto_err, finished;
  base_t  in_xl, in_xr;
  score_t out_score;

  nussinov_b_top #(.N(21), .STAGES(6)) dut (.*);

  nussinov_harness #(.N(21), .STAGES(6), .NSEQ(40), .MAX_CYCLES(20000),
                     .GAP_EVERY(0), .PAD(0)) u_h (.*);

  initial begin
    wait (finished);
    $finish;
  end

endmodule
