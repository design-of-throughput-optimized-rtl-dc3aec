// nussinov_harness: stimulus and checker for the complete Nussinov engine.
//
// It makes the clock and reset, feeds NSEQ random RNA sequences of N-1
// bases as base windows, mostly back to back (a new sequence on the clock
// after the previous load) and sometimes after an idle gap, and compares
// every out_score with the reference model in nussinov_ref_pkg. It also
// checks the timing: each score must appear exactly
// array_latency(N, STAGES) + 1 clocks after its in_first, back-to-back
// sequences must give results N-2 clocks apart, and in_ready must be high
// whenever a load is allowed to begin. Finally it breaks a load on purpose,
// expects the protocol error flag, resets, and folds one more sequence.
// Each mechanism (back-to-back start, idle gap, several sequences in the
// array at once, protocol error) must happen at least once. With
// GAP_EVERY = 0 there are no gaps, and the whole stream must take
// (NSEQ-1)(N-2) + latency + 1 clocks. With PAD > 0 every second sequence is
// a shorter RNA padded with unknown bases, and its score must equal the
// reference score of the short RNA alone.
module nussinov_harness
  import nussinov_pkg::*;
  import nussinov_ref_pkg::*;
#(
  parameter int unsigned N          = 13,
  parameter int unsigned STAGES     = 1,
  parameter int unsigned NSEQ       = 12,
  parameter int unsigned MAX_CYCLES = 20000,
  // every GAP_EVERY-th sequence follows an idle gap; 0: all back to back
  parameter int unsigned GAP_EVERY  = 4,
  // if PAD > 0, every second sequence carries only N-1-PAD real bases,
  // padded with unknown bases, and must score as the short sequence alone
  parameter int unsigned PAD        = 0
) (
  output logic   clk,
  output logic   rst_n,
  output logic   in_valid,
  output logic   in_first,
  output base_t  in_xl,
  output base_t  in_xr,
  input  logic   in_ready,
  input  logic   out_valid,
  input  score_t out_score,
  input  logic   proto_err,
  // raised once TB_RESULT has been printed; the testbench then ends the run
  output logic   finished
);

  localparam int unsigned LAT    = array_latency(N, STAGES);
  localparam int unsigned PERIOD = N - 2;

  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_score[$];
  int exp_start[$];
  int exp_b2b[$];
  int n_b2b = 0, n_gap = 0, n_err = 0, max_inflight = 0, n_out = 0, n_pad = 0;
  int first_start = -1, stream_end = -1;
  int last_out_cyc = -1;
  bit done = 0;

  initial finished = 1'b0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Result monitor: value, latency and spacing.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      if (exp_score.size() == 0) begin
        check(0, "result with no sequence outstanding");
      end else begin
        int e, s, b;
        e = exp_score.pop_front();
        s = exp_start.pop_front();
        b = exp_b2b.pop_front();
        check(int'(out_score) == e,
              $sformatf("score %0d, expected %0d", out_score, e));
        check(cyc - s == LAT + 1,
              $sformatf("latency %0d, expected %0d", cyc - s, LAT + 1));
        if (b != 0)
          check(cyc - last_out_cyc == PERIOD,
                $sformatf("spacing %0d, expected %0d", cyc - last_out_cyc, PERIOD));
      end
      last_out_cyc = cyc;
    end
    if (exp_score.size() > max_inflight) max_inflight = exp_score.size();
  end

  task automatic idle();
    in_valid = 1'b0;
    in_first = 1'b0;
    in_xl    = base_t'(BASE_N);
    in_xr    = base_t'(BASE_N);
  endtask

  // Present one sequence, one window per clock; stop after `upto` windows.
  task automatic load(base_t seq[$], int upto);
    for (int i = 0; i < upto; i++) begin
      in_valid = 1'b1;
      in_first = (i == 0);
      in_xl    = seq[i];
      in_xr    = seq[i+1];
      @(negedge clk);
    end
  endtask

  initial begin
    base_t seq[$];
    int gap;
    rst_n = 1'b0;
    idle();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(in_ready == 1'b1, "in_ready after reset");

    for (int n = 0; n < int'(NSEQ); n++) begin
      gap = (GAP_EVERY > 0 && n % int'(GAP_EVERY) == int'(GAP_EVERY) - 1) ?
            int'($urandom_range(1, 7)) : 0;
      if (gap > 0) begin
        idle();
        repeat (gap) @(negedge clk);
        n_gap++;
      end else if (n > 0) begin
        n_b2b++;
      end
      rand_seq(N - 1, seq);
      check(in_ready == 1'b1, "in_ready at start of a load");
      if (PAD > 0 && n % 2 == 1) begin
        base_t short_seq[$];
        short_seq = seq[0:N-2-PAD];
        for (int m = N - 1 - int'(PAD); m < N - 1; m++) seq[m] = base_t'(BASE_N);
        exp_score.push_back(ref_score(short_seq));
        n_pad++;
      end else begin
        exp_score.push_back(ref_score(seq));
      end
      if (n == 0) first_start = cyc;
      exp_start.push_back(cyc);
      exp_b2b.push_back((n > 0 && gap == 0) ? 1 : 0);
      load(seq, N - 2);
      if (n == 0) check(in_ready == 1'b1, "in_ready after a full load");
    end
    idle();
    check(proto_err == 1'b0, "no protocol error for legal loads");
    while (exp_score.size() != 0) @(negedge clk);
    stream_end = last_out_cyc;
    if (GAP_EVERY == 0) begin
      check(stream_end - first_start == int'((NSEQ - 1) * PERIOD + LAT + 1),
            $sformatf("stream of %0d took %0d clocks, expected %0d", NSEQ,
                      stream_end - first_start, (NSEQ - 1) * PERIOD + LAT + 1));
      $display("throughput: %0d sequences in %0d clocks (one per %0d clocks, latency %0d)",
               NSEQ, stream_end - first_start, PERIOD, LAT + 1);
    end
    repeat (2 * N) @(negedge clk);

    // A broken load: two windows, then a missing one.
    rand_seq(N - 1, seq);
    load(seq, 2);
    check(in_ready == 1'b0, "in_ready low during a load");
    idle();
    @(negedge clk);
    check(proto_err == 1'b1, "protocol error flagged");
    if (proto_err) n_err++;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(proto_err == 1'b0, "protocol error cleared by reset");

    // One more sequence after the reset.
    rand_seq(N - 1, seq);
    exp_score.push_back(ref_score(seq));
    exp_start.push_back(cyc);
    exp_b2b.push_back(0);
    load(seq, N - 2);
    idle();
    while (exp_score.size() != 0) @(negedge clk);
    repeat (LAT + 4) @(negedge clk);

    check(n_out == int'(NSEQ) + 1, $sformatf("%0d results for %0d sequences", n_out, NSEQ + 1));
    check(n_b2b > 0, "back-to-back start happened");
    if (GAP_EVERY > 0) check(n_gap > 0, "idle gap happened");
    if (PAD > 0) check(n_pad > 0, "padded sequence folded");
    check(max_inflight >= 2, "several sequences in flight at once");
    check(n_err > 0, "protocol error happened");
    $display("mechanisms: back_to_back=%0d gaps=%0d max_in_flight=%0d proto_err=%0d padded=%0d results=%0d",
             n_b2b, n_gap, max_inflight, n_err, n_pad, n_out);
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    finished = 1'b1;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      finished = 1'b1;
    end
  end

endmodule
