// link_delay: the delay registers of one systolic link.
//
// In a space-time mapped array every dependency link carries a value from
// one PE to another with a fixed number of clocks of delay, set by the
// schedule. This module is that chain of registers: a plain shift register
// of DEPTH stages (DEPTH = 0 is a wire). It has no enable and no reset,
// because the array runs every clock and a value is only read in the cycle
// the schedule says it is valid; a synthesis tool may map long chains to
// shift-register primitives, and retiming may pull the first stages into
// the logic that feeds them.
//
// Timing: dout(t) = din(t - DEPTH).
module link_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      sr[0] <= din;
      for (int unsigned n = 1; n < DEPTH; n++) sr[n] <= sr[n-1];
    end
    assign dout = sr[DEPTH-1];
  end

endmodule
