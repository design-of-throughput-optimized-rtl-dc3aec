// tb_nussinov_b_rna41: throughput run for the speed measurement workload,
// RNAs of 41 bases (array built with N = 42, one PE stage). 300 random
// sequences are fed back to back with no gap; the harness checks every
// score and that the stream takes exactly (300-1)*40 + latency + 1 clocks,
// i.e. one sequence per N-2 = 40 clocks.
module tb_nussinov_b_rna41;
  import nussinov_pkg::*;

  logic   clk, rst_n, in_valid, in_first, in_ready, out_valid, proto_err, finished;
  base_t  in_xl, in_xr;
  score_t out_score;

  nussinov_b_top #(.N(42), .STAGES(1)) dut (.*);

  nussinov_harness #(.N(42), .STAGES(1), .NSEQ(300), .MAX_CYCLES(40000),
                     .GAP_EVERY(0), .PAD(0)) u_h (.*);

  initial begin
    wait (finished);
    $finish;
  end

endmodule
