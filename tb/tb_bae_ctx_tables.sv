// tb_bae_ctx_tables: checks the probability-state tables.  All 256
// rangeTabLps entries and 64 transIdxLps entries are compared with the
// reference tables in bae_ref_pkg, transIdxMps with its rule (+1, held at
// 62 and 63), and the LPS table is checked for its shape: non-increasing
// along pStateIdx, increasing along qRangeIdx except in the last state, and
// every entry small enough that the MPS sub-range stays positive.
module tb_bae_ctx_tables;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  logic [PSTATE_W-1:0] pstate, o_lps, o_mps;
  logic [1:0]          qidx;
  logic [7:0]          o_rlps;

  int checks = 0, failures = 0;
  int tab [64][4];

  bae_ctx_tables dut (
    .i_pstate(pstate), .i_qidx(qidx), .o_range_lps(o_rlps),
    .o_trans_lps(o_lps), .o_trans_mps(o_mps)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (p=%0d q=%0d)",
                                  what, got, exp, pstate, qidx);
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
    for (int p = 0; p < 64; p++) begin
      for (int q = 0; q < 4; q++) begin
        pstate = PSTATE_W'(p); qidx = 2'(q);
        #1;
        tab[p][q] = int'(o_rlps);
        check("rangeTabLps", int'(o_rlps), RTAB[p * 4 + q]);
        // smallest range of this qRangeIdx is 256 + 64q
        check("mps range positive", int'(int'(o_rlps) < 256 + 64 * q), 1);
      end
      check("transIdxLps", int'(o_lps), TLPS[p]);
      check("transIdxMps", int'(o_mps), (p < 62) ? p + 1 : p);
      check("lps not above state", int'(int'(o_lps) <= p || p == 63), 1);
    end
    // spot values of the standard table
    check("tab[0][3]", tab[0][3], 240);
    check("tab[62][0]", tab[62][0], 6);
    check("tab[63][2]", tab[63][2], 2);
    for (int p = 1; p < 63; p++)
      for (int q = 0; q < 4; q++)
        check("non-increasing in state", int'(tab[p][q] <= tab[p-1][q]), 1);
    for (int p = 0; p < 63; p++)
      for (int q = 1; q < 4; q++)
        check("increasing in qRangeIdx", int'(tab[p][q] > tab[p][q-1]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
