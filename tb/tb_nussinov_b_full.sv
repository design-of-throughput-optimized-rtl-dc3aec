// tb_nussinov_b_full: the Nussinov engine at its default size (sequences
// of 60 bases, N = 61, 900 PEs, one PE stage), folding a stream of random
// sequences end to end. Every second sequence is a 41-base RNA padded with
// 19 unknown bases, the RNA length of the published speed measurement.
// See nussinov_harness for what is driven and checked.
module tb_nussinov_b_full;
  import nussinov_pkg::*;

  logic   clk, rst_n, in_valid, in_first, in_ready, out_valid, proto_err, finished;
  base_t  in_xl, in_xr;
  score_t out_score;

  nussinov_b_top dut (.*);

  nussinov_harness #(.N(61), .STAGES(1), .NSEQ(24), .MAX_CYCLES(20000), .GAP_EVERY(4), .PAD(19)) u_h (.*);

  initial begin
    wait (finished);
    $finish;
  end

endmodule
