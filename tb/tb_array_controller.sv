// tb_array_controller: the controller alone (N = 8, one stage) with a
// stand-in array result that changes every clock (the clock count), so the
// captured score shows the exact capture cycle. Checks: the base windows
// reach the array one clock later; in_ready drops for the rest of a load
// and returns on its last window; out_valid pulses once,
// array_latency(N,1) + 1 clocks after in_first, with the result of the
// right cycle; back-to-back loads give results N-2 clocks apart; each of
// the three kinds of broken load sets proto_err, and reset clears it.
module tb_array_controller;
  import nussinov_pkg::*;

  localparam int N   = 8;
  localparam int LAT = int'(array_latency(N, 1));

  logic   clk = 1'b0;
  logic   rst_n, in_valid, in_first, in_ready, out_valid, proto_err;
  base_t  in_xl, in_xr, arr_xl, arr_xr;
  score_t arr_result, out_score;
  int checks = 0, failures = 0, cyc = 0;
  int starts [$];
  int n_out = 0;
  bit done = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign arr_result = score_t'(cyc);

  array_controller #(.N(N), .STAGES(1)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // results: timing and captured value
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      chk(starts.size() != 0, "unexpected out_valid");
      if (starts.size() != 0) begin
        int s;
        s = starts.pop_front();
        chk(cyc - s == LAT + 1, $sformatf("latency %0d", cyc - s));
        // captured in the clock before out_valid rose: count cyc-1
        chk(out_score == score_t'(cyc - 1), $sformatf("captured %0d", out_score));
      end
    end
  end

  task automatic idle();
    in_valid = 0;
    in_first = 0;
  endtask

  task automatic load(int upto);
    for (int i = 0; i < upto; i++) begin
      in_valid = 1;
      in_first = (i == 0);
      in_xl = base_t'($urandom_range(4));
      in_xr = base_t'($urandom_range(4));
      if (i == 0) begin
        chk(in_ready == 1'b1, "in_ready at start");
        starts.push_back(cyc);
      end else begin
        chk(in_ready == 1'b0, "in_ready low during load");
      end
      @(negedge clk);
      chk(arr_xl == in_xl && arr_xr == in_xr, "window registered to array");
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(proto_err == 1'b0, "proto_err cleared by reset");
    starts.delete();
  endtask

  initial begin
    rst_n = 0;
    idle();
    in_xl = '0;
    in_xr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // three back-to-back loads, a gap, one more
    repeat (3) load(N - 2);
    idle();
    repeat (4) @(negedge clk);
    load(N - 2);
    idle();
    repeat (LAT + 4) @(negedge clk);
    chk(n_out == 4, $sformatf("%0d results", n_out));
    chk(proto_err == 1'b0, "no error on legal loads");
    // broken load 1: missing window
    load(2);
    idle();
    @(negedge clk);
    chk(proto_err == 1'b1, "missing window flagged");
    do_reset();
    // broken load 2: in_first in the middle of a load
    load(2);
    in_valid = 1;
    in_first = 1;
    @(negedge clk);
    chk(proto_err == 1'b1, "restart during load flagged");
    idle();
    do_reset();
    // broken load 3: window with no load in progress
    in_valid = 1;
    in_first = 0;
    @(negedge clk);
    idle();
    @(negedge clk);
    chk(proto_err == 1'b1, "orphan window flagged");
    do_reset();
    repeat (LAT + 4) @(negedge clk);
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
