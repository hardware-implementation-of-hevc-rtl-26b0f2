// tb_bae_term_engine: checks the termination engine against the bit-serial
// reference (bae_ref_pkg::encode_terminate): the 0 bin (range - 2 with a
// possible single renormalization shift) and the 1 bin (flush: seven shifts,
// the final PutBit and the two raw bits), on random legal intervals, plus
// the disabled case.
module tb_bae_term_engine;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  logic                en, bin;
  logic [LOW_W-1:0]    low;
  logic [RANGE_W-1:0]  range;
  logic [OUTSTD_W-1:0] outstd;
  logic [LOW_W-1:0]    o_low;
  logic [RANGE_W-1:0]  o_range;
  logic [OUTSTD_W-1:0] o_outstd;
  bae_evs_t            o_ev;

  int checks = 0, failures = 0;
  int flush_seen = 0, shift0_seen = 0, shift1_seen = 0;

  bae_term_engine dut (
    .i_bae_en(en), .i_bae_bin(bin), .i_bae_low(low), .i_bae_range(range),
    .i_bae_outstd(outstd), .o_bae_t_low(o_low), .o_bae_t_range(o_range),
    .o_bae_t_outstd(o_outstd), .o_bae_t_ev(o_ev)
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
    encode_terminate(c, b, evq);
    #1;
    check("low", int'(o_low), c.low);
    check("range", int'(o_range), c.range);
    check("outstd", int'(o_outstd), c.outstd);
    for (int i = 0; i < EV_SLOTS; i++)
      check("event", int'(o_ev[i]), (i < evq.size()) ? evq[i] : int'(EV_NONE));
    if (b != 0) flush_seen++;
    else if (evq.size() == 0) shift0_seen++;
    else shift1_seen++;
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
    one(0, 256, 0, 0);
    one(0, 257, 0, 0);
    one(0, 258, 2, 0);
    one(514, 510, 4, 1);
    repeat (20000) begin
      r = 256 + int'($urandom_range(0, 254));
      l = int'($urandom_range(0, 1024 - r));
      one(l, r, int'($urandom_range(0, 1000)), int'($urandom_range(0, 1)));
    end
    en = 0; low = 10'd100; range = 9'd300; outstd = 16'd1; bin = 1;
    #1;
    check("dis low", int'(o_low), 100);
    check("dis range", int'(o_range), 300);
    check("dis ev", int'(o_ev[0]), int'(EV_NONE));
    check("flush seen", int'(flush_seen > 0), 1);
    check("no-shift seen", int'(shift0_seen > 0), 1);
    check("one-shift seen", int'(shift1_seen > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
