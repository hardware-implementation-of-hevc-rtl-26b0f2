// tb_bae_renorm: checks the one-cycle renormalizer against the loop form
// (bae_ref_pkg::renorm) for every range from 2 to 511 (0 to 7 shifts) with
// random ivlLow values that keep ivlLow + ivlRange <= 1024.
module tb_bae_renorm;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  localparam int STEPS = 8;

  logic [LOW_W-1:0]    low, o_low;
  logic [RANGE_W-1:0]  range, o_range;
  logic [OUTSTD_W-1:0] outstd, o_outstd;
  bae_ev_e             o_ev [STEPS];

  int checks = 0, failures = 0;
  int shift_seen [9];

  bae_renorm #(.MAX_STEPS(STEPS)) dut (
    .i_low(low), .i_range(range), .i_outstd(outstd),
    .o_low(o_low), .o_range(o_range), .o_outstd(o_outstd), .o_ev(o_ev)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (low=%0d range=%0d)",
                                  what, got, exp, low, range);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coder_t c;
    int evq[$];
    for (int r = 2; r < 512; r++) begin
      repeat (20) begin
        c.range = r;
        c.low = int'($urandom_range(0, 1024 - r));
        c.outstd = int'($urandom_range(0, 3));
        low = LOW_W'(c.low); range = RANGE_W'(c.range); outstd = OUTSTD_W'(c.outstd);
        evq.delete();
        renorm(c, evq);
        #1;
        check("low", int'(o_low), c.low);
        check("range", int'(o_range), c.range);
        check("outstd", int'(o_outstd), c.outstd);
        for (int i = 0; i < STEPS; i++)
          check("event", int'(o_ev[i]), (i < evq.size()) ? evq[i] : int'(EV_NONE));
        shift_seen[evq.size()]++;
      end
    end
    for (int s = 0; s <= 7; s++) check("shift count seen", int'(shift_seen[s] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
