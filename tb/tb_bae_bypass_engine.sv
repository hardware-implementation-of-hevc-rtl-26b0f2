// tb_bae_bypass_engine: checks the bypass encoding engine against the
// bit-serial reference (bae_ref_pkg::encode_bypass) on random legal
// intervals and both bin values, including the three outcomes (PutBit(1),
// PutBit(0), outstanding bit) at their thresholds, and the disabled case.
module tb_bae_bypass_engine;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  logic                en, bin;
  logic [LOW_W-1:0]    low;
  logic [RANGE_W-1:0]  range;
  logic [OUTSTD_W-1:0] outstd;
  logic [LOW_W-1:0]    o_low;
  logic [OUTSTD_W-1:0] o_outstd;
  bae_ev_e             o_ev;

  int checks = 0, failures = 0;
  int seen [6];

  bae_bypass_engine dut (
    .i_bae_en(en), .i_bae_bin(bin), .i_bae_low(low), .i_bae_range(range),
    .i_bae_outstd(outstd), .o_bae_p_low(o_low), .o_bae_p_outstd(o_outstd),
    .o_bae_p_ev(o_ev)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (low=%0d range=%0d bin=%0d)",
                                  what, got, exp, low, range, bin);
    end
  endtask

  task automatic one(int l, int r, int o, int b);
    coder_t c;
    int evq[$];
    en = 1; low = LOW_W'(l); range = RANGE_W'(r); outstd = OUTSTD_W'(o); bin = b[0];
    c.low = l; c.range = r; c.outstd = o;
    encode_bypass(c, b, evq);
    #1;
    check("low", int'(o_low), c.low);
    check("outstd", int'(o_outstd), c.outstd);
    check("one event", evq.size(), 1);
    check("event", int'(o_ev), evq[0]);
    seen[evq[0]]++;
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
    // thresholds: 2*low exactly 512 and 1024, and just below
    one(256, 300, 5, 0);
    one(255, 300, 5, 0);
    one(512, 300, 5, 0);
    one(511, 300, 5, 0);
    one(300, 424, 9, 1);   // 600 + 424 = 1024
    one(299, 424, 9, 1);   // 1022
    repeat (20000) begin
      r = 256 + int'($urandom_range(0, 254));
      l = int'($urandom_range(0, 1024 - r));
      one(l, r, int'($urandom_range(0, 1000)), int'($urandom_range(0, 1)));
    end
    en = 0; low = 10'd700; range = 9'd300; outstd = 16'd3; bin = 1;
    #1;
    check("dis low", int'(o_low), 700);
    check("dis outstd", int'(o_outstd), 3);
    check("dis ev", int'(o_ev), int'(EV_NONE));
    check("put0 seen", int'(seen[EV_PUT0] > 0), 1);
    check("put1 seen", int'(seen[EV_PUT1] > 0), 1);
    check("outstanding seen", int'(seen[EV_OUT] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
