// tb_bae_regular_engine: checks the regular encoding engine against the
// bit-serial reference (bae_ref_pkg::encode_decision) on random legal
// intervals, all 64 probability states, both MPS values and both bin
// values: renormalized ivlLow/ivlRange, outstanding count, next pStateIdx,
// next valMps and the bit event list.  Also checks that a disabled engine
// changes nothing.  Combinational block: one check set every 1 ns step.
module tb_bae_regular_engine;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  logic                en, bin, valmps;
  logic [LOW_W-1:0]    low;
  logic [RANGE_W-1:0]  range;
  logic [OUTSTD_W-1:0] outstd;
  logic [PSTATE_W-1:0] pstate;
  logic [LOW_W-1:0]    o_low;
  logic [RANGE_W-1:0]  o_range;
  logic [OUTSTD_W-1:0] o_outstd;
  logic                o_valmps;
  logic [PSTATE_W-1:0] o_pstate;
  bae_evs_t            o_ev;

  int checks = 0, failures = 0;
  int lps_seen = 0, mps_flip_seen = 0, deep_renorm_seen = 0;

  bae_regular_engine dut (
    .i_bae_en(en), .i_bae_bin(bin), .i_bae_low(low), .i_bae_range(range),
    .i_bae_outstd(outstd), .i_bae_valmps(valmps), .i_bae_pstate(pstate),
    .o_bae_r_low(o_low), .o_bae_r_range(o_range), .o_bae_r_outstd(o_outstd),
    .o_bae_r_valmps(o_valmps), .o_bae_r_pstate(o_pstate), .o_bae_r_ev(o_ev)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (low=%0d range=%0d p=%0d mps=%0d bin=%0d)",
                                  what, got, exp, low, range, pstate, valmps, bin);
    end
  endtask

  task automatic one(int l, int r, int o, int p, int m, int b);
    coder_t c;
    int ps, ms;
    int evq[$];
    en = 1; low = LOW_W'(l); range = RANGE_W'(r); outstd = OUTSTD_W'(o);
    pstate = PSTATE_W'(p); valmps = m[0]; bin = b[0];
    c.low = l; c.range = r; c.outstd = o; ps = p; ms = m;
    encode_decision(c, b, ps, ms, evq);
    #1;
    check("low", int'(o_low), c.low);
    check("range", int'(o_range), c.range);
    check("outstd", int'(o_outstd), c.outstd);
    check("pstate", int'(o_pstate), ps);
    check("valmps", int'(o_valmps), ms);
    for (int i = 0; i < EV_SLOTS; i++)
      check("event", int'(o_ev[i]), (i < evq.size()) ? evq[i] : int'(EV_NONE));
    if (b != m) lps_seen++;
    if (ms != m) mps_flip_seen++;
    if (evq.size() >= 5) deep_renorm_seen++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, l;
    // every state, both MPS values, both bins, near the range extremes
    for (int p = 0; p < 64; p++)
      for (int m = 0; m < 2; m++)
        for (int b = 0; b < 2; b++) begin
          one(0, 256, 3, p, m, b);
          one(1024 - 510, 510, 0, p, m, b);
          r = 256 + int'($urandom_range(0, 254));
          l = int'($urandom_range(0, 1024 - r));
          one(l, r, int'($urandom_range(0, 40)), p, m, b);
        end
    // random legal intervals
    repeat (20000) begin
      r = 256 + int'($urandom_range(0, 254));
      l = int'($urandom_range(0, 1024 - r));
      one(l, r, int'($urandom_range(0, 1000)), int'($urandom_range(0, 63)),
          int'($urandom_range(0, 1)), int'($urandom_range(0, 1)));
    end
    // disabled engine passes its inputs through and reports no event
    en = 0; low = 10'd300; range = 9'd400; outstd = 16'd7; pstate = 6'd20; valmps = 1; bin = 0;
    #1;
    check("dis low", int'(o_low), 300);
    check("dis range", int'(o_range), 400);
    check("dis outstd", int'(o_outstd), 7);
    check("dis pstate", int'(o_pstate), 20);
    check("dis ev", int'(o_ev[0]), int'(EV_NONE));
    check("lps seen", int'(lps_seen > 0), 1);
    check("mps flip seen", int'(mps_flip_seen > 0), 1);
    check("deep renorm seen", int'(deep_renorm_seen > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
