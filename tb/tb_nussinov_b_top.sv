// tb_nussinov_b_top: end-to-end test of the Nussinov engine at a reduced
// size (sequences of 12 bases, N = 13) with two PE stages, so that the
// relaxed schedule [-4, 5, -2] is exercised. See nussinov_harness for what
// is driven and checked.
module tb_nussinov_b_top;
  import nussinov_pkg::*;

  logic   clk, rst_n, in_valid, in_first, in_ready, out_valid, proto_err, finished;
  base_t  in_xl, in_xr;
  score_t out_score;

  nussinov_b_top #(.N(13), .STAGES(2)) dut (.*);

  nussinov_harness #(.N(13), .STAGES(2), .NSEQ(16), .MAX_CYCLES(20000)) u_h (.*);

  initial begin
    wait (finished);
    $finish;
  end

endmodule
