// tb_nussinov_array_b: the bare PE array (no controller) with N = 10
// (sequences of 9 bases) and three PE stages, schedule [-6, 7, -3]. The
// testbench plays the controller: it presents one base window per clock,
// sequences back to back every N-2 clocks, and reads `result` exactly
// array_latency(N, STAGES) - 1 clocks after the first window of each
// sequence reaches the array, comparing it with the reference model.
// Fixed sequences (no pairs possible, all pairs possible) come first.
module tb_nussinov_array_b;
  import nussinov_pkg::*;
  import nussinov_ref_pkg::*;

  localparam int N      = 10;
  localparam int STAGES = 3;
  localparam int LAT    = int'(array_latency(N, STAGES));
  localparam int NSEQ   = 20;

  logic   clk = 1'b0;
  base_t  xl, xr;
  score_t result;
  int checks = 0, failures = 0, cyc = 0, n_res = 0;
  int due_cyc [$];
  int due_val [$];
  bit done = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  nussinov_array_b #(.N(N), .STAGES(STAGES)) dut (.clk, .xl_in(xl), .xr_in(xr), .result);

  always @(negedge clk) begin
    if (due_cyc.size() != 0 && due_cyc[0] == cyc) begin
      int e;
      void'(due_cyc.pop_front());
      e = due_val.pop_front();
      checks++;
      n_res++;
      if (int'(result) != e) begin
        failures++;
        $display("FAIL @%0d: result %0d expected %0d", cyc, result, e);
      end
    end
  end

  initial begin
    base_t seq[$];
    xl = base_t'(BASE_N);
    xr = base_t'(BASE_N);
    @(negedge clk);
    for (int n = 0; n < NSEQ; n++) begin
      if (n == 0) begin
        seq.delete();
        repeat (N - 1) seq.push_back(base_t'(BASE_A));
      end else if (n == 1) begin
        seq.delete();
        for (int m = 0; m < N - 1; m++)
          seq.push_back((m < (N - 1) / 2) ? base_t'(BASE_G) : base_t'(BASE_C));
      end else begin
        rand_seq(N - 1, seq);
      end
      due_cyc.push_back(cyc + LAT - 1);
      due_val.push_back(ref_score(seq));
      for (int i = 0; i < N - 2; i++) begin
        xl = seq[i];
        xr = seq[i+1];
        @(negedge clk);
      end
    end
    xl = base_t'(BASE_N);
    xr = base_t'(BASE_N);
    while (due_cyc.size() != 0) @(negedge clk);
    checks++;
    if (n_res != NSEQ) begin
      failures++;
      $display("FAIL: %0d results checked, expected %0d", n_res, NSEQ);
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
