// array_controller: input sequencing and output capture for the Nussinov
// array, built from shift registers rather than counters.
//
// Loading: the array takes its bases serially through one PE, one window
// (x_i, x_{i+1}), i = 1 .. N-2, per clock. A load starts with in_first and
// must then run on consecutive clocks, because the array has no stall.
// A one-hot token enters a shift register of N-3 bits on in_first and walks
// through it while the rest of the load arrives; in_ready is high when no
// token is in flight, i.e. a new instance may start. The next instance can
// start on the clock right after the last window of the previous one, so
// instances enter every N-2 clocks (the block pipelining period of the
// array). A missing window during a load, a second in_first during a load
// or a window with no load in progress sets the sticky proto_err flag.
//
// Output: the same in_first token also enters a shift register as long as
// the array latency, array_latency(N, STAGES) bits. When it leaves, the
// array's result port holds S(1,N) of that instance; it is registered into
// out_score and out_valid pulses for one clock. The score appears
// array_latency(N, STAGES) + 1 clocks after in_first.
//
// The windows are registered once (arr_xl/arr_xr) before they reach the
// array. Reset (rst_n, synchronous, active low) clears the tokens and the
// error flag. The serial loading and the shift-register style follow the
// text; the window protocol and the error flag are this design's own.
module array_controller
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
  output base_t  arr_xl,
  output base_t  arr_xr,
  input  score_t arr_result,
  output logic   out_valid,
  output score_t out_score,
  output logic   proto_err
);

  localparam int unsigned LOADW = N - 3;
  localparam int unsigned LAT   = array_latency(N, STAGES);

  logic [LOADW-1:0] load_tok;
  logic [LAT-1:0]   out_tok;
  logic             busy, start, bad;

  assign busy     = |load_tok;
  assign in_ready = !busy;
  assign start    = in_valid && in_first && !busy;
  assign bad      = (busy && (!in_valid || in_first)) ||
                    (!busy && in_valid && !in_first);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      load_tok  <= '0;
      out_tok   <= '0;
      out_valid <= 1'b0;
      out_score <= '0;
      proto_err <= 1'b0;
    end else begin
      load_tok  <= {load_tok[LOADW-2:0], start};
      out_tok   <= {out_tok[LAT-2:0], start};
      out_valid <= out_tok[LAT-1];
      if (out_tok[LAT-1]) out_score <= arr_result;
      if (bad) proto_err <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    arr_xl <= in_xl;
    arr_xr <= in_xr;
  end

  // Results of two instances can never be closer than the pipelining period.
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid)
    else $error("array_controller: results closer than one pipelining period");

endmodule
