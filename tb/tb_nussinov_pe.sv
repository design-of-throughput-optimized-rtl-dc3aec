// tb_nussinov_pe: drives random operands into a bottom-row PE (two stages)
// and an upper PE (one stage) every clock and checks each output against
// a model: the max of the partial result, both split sums and (bottom row
// only) the base-pair term, after STAGES clocks; and every forwarded
// operand after the number of clocks its link has.
module tb_nussinov_pe;
  import nussinov_pkg::*;
  import nussinov_ref_pkg::*;

  localparam int HIST = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  typedef struct packed {
    score_t p, a, b, c, d, pair;
    base_t  xl, xr;
  } op_t;

  op_t    opb, opu;
  score_t bp, ba, bb, bc, bd, brb, brc, brp;
  base_t  bxl, bxr;
  score_t up, ua, ub, uc, ud, urb, urc, urp;
  base_t  uxl, uxr;

  nussinov_pe #(.STAGES(2), .BOTTOM(1'b1)) dut_b (
    .clk, .p_in(opb.p), .a_in(opb.a), .b_in(opb.b), .c_in(opb.c), .d_in(opb.d),
    .pair_in(opb.pair), .xl_in(opb.xl), .xr_in(opb.xr),
    .p_out(bp), .a_out(ba), .b_out(bb), .c_out(bc), .d_out(bd),
    .xl_out(bxl), .xr_out(bxr), .res_b(brb), .res_c(brc), .res_p(brp));

  nussinov_pe #(.STAGES(1), .BOTTOM(1'b0)) dut_u (
    .clk, .p_in(opu.p), .a_in(opu.a), .b_in(opu.b), .c_in(opu.c), .d_in(opu.d),
    .pair_in(opu.pair), .xl_in(opu.xl), .xr_in(opu.xr),
    .p_out(up), .a_out(ua), .b_out(ub), .c_out(uc), .d_out(ud),
    .xl_out(uxl), .xr_out(uxr), .res_b(urb), .res_c(urc), .res_p(urp));

  op_t hb [$];
  op_t hu [$];
  int  eb [$];
  int  eu [$];
  int checks = 0, failures = 0;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int model(op_t o, bit bottom);
    int m;
    m = int'(o.p);
    if (int'(o.a) + int'(o.b) > m) m = int'(o.a) + int'(o.b);
    if (int'(o.c) + int'(o.d) > m) m = int'(o.c) + int'(o.d);
    if (bottom && int'(o.pair) + ref_delta(o.xl, o.xr) > m)
      m = int'(o.pair) + ref_delta(o.xl, o.xr);
    return m;
  endfunction

  function automatic op_t rand_op();
    op_t o;
    o.p    = score_t'($urandom_range(60));
    o.a    = score_t'($urandom_range(60));
    o.b    = score_t'($urandom_range(60));
    o.c    = score_t'($urandom_range(60));
    o.d    = score_t'($urandom_range(60));
    o.pair = score_t'($urandom_range(120));
    o.xl   = base_t'($urandom_range(4));
    o.xr   = base_t'($urandom_range(4));
    return o;
  endfunction

  // index of the value presented n clocks ago
  function automatic int ago(int sz, int n);
    return sz - n;
  endfunction

  initial begin
    int sz;
    opb = '0;
    opu = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      sz = hb.size();
      if (sz >= HIST) begin
        // bottom PE, s = 2: p 2, b 2, c 3, xl 5, xr 4, res_b 4, res_c 5, res_p 9
        chk(int'(bp),  eb[ago(sz, 2)],           "bottom p_out");
        chk(int'(bb),  int'(hb[ago(sz, 2)].b),   "bottom b_out");
        chk(int'(bc),  int'(hb[ago(sz, 3)].c),   "bottom c_out");
        chk(int'(bxl), int'(hb[ago(sz, 5)].xl),  "bottom xl_out");
        chk(int'(bxr), int'(hb[ago(sz, 4)].xr),  "bottom xr_out");
        chk(int'(brb), eb[ago(sz, 4)],           "bottom res_b");
        chk(int'(brc), eb[ago(sz, 5)],           "bottom res_c");
        chk(int'(brp), eb[ago(sz, 9)],           "bottom res_p");
        // upper PE, s = 1: p 1, a 3, b 1, c 2, d 2
        chk(int'(up),  eu[ago(sz, 1)],           "upper p_out");
        chk(int'(ua),  int'(hu[ago(sz, 3)].a),   "upper a_out");
        chk(int'(ub),  int'(hu[ago(sz, 1)].b),   "upper b_out");
        chk(int'(uc),  int'(hu[ago(sz, 2)].c),   "upper c_out");
        chk(int'(ud),  int'(hu[ago(sz, 2)].d),   "upper d_out");
      end
      opb = rand_op();
      opu = rand_op();
      // now and then make the base-pair term the winner
      if (t % 5 == 0) begin
        opb.xl = base_t'(BASE_G);
        opb.xr = base_t'(BASE_C);
        opb.pair = 8'd100;
      end
      hb.push_back(opb);
      hu.push_back(opu);
      eb.push_back(model(opb, 1'b1));
      eu.push_back(model(opu, 1'b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
