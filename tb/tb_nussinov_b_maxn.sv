// tb_nussinov_b_maxn: the engine built for RNAs of 81 bases (N = 82,
// 1640 PEs), the largest array B that was reported to fit the target FPGA.
// 20 random sequences go in back to back; nussinov_harness checks every
// score, the latency and one sequence per N-2 = 80 clocks.
module tb_nussinov_b_maxn;
  import nussinov_pkg::*;

  logic   clk, rst_n, in_valid, in_first, in_ready, out_valid, proto_err, finished;
  base_t  in_xl, in_xr;
  score_t out_score;

  nussinov_b_top #(.N(82), .STAGES(1)) dut (.*);

  nussinov_harness #(.N(82), .STAGES(1), .NSEQ(20), .MAX_CYCLES(40000),
                     .GAP_EVERY(0), .PAD(0)) u_h (.*);

  initial begin
    wait (finished);
    $finish;
  end

endmodule
