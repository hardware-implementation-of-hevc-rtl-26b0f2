// tb_bae_mux: drives distinct random values on the three engines' result
// ports and checks that each mode selects exactly its engine's values (and,
// for bypass, the current range and its one event in slot 0).
module tb_bae_mux;
  import bae_pkg::*;

  bae_mode_e           mode;
  logic [RANGE_W-1:0]  cur_range, r_range, t_range, o_range;
  logic [LOW_W-1:0]    p_low, r_low, t_low, o_low;
  logic [OUTSTD_W-1:0] p_out, r_out, t_out, o_out;
  bae_ev_e             p_ev;
  bae_evs_t            r_ev, t_ev, o_ev;

  int checks = 0, failures = 0;

  bae_mux dut (
    .i_mode(mode), .i_cur_range(cur_range),
    .i_p_low(p_low), .i_p_outstd(p_out), .i_p_ev(p_ev),
    .i_r_low(r_low), .i_r_range(r_range), .i_r_outstd(r_out), .i_r_ev(r_ev),
    .i_t_low(t_low), .i_t_range(t_range), .i_t_outstd(t_out), .i_t_ev(t_ev),
    .o_bae_low(o_low), .o_bae_range(o_range), .o_bae_outstd(o_out), .o_bae_ev(o_ev)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (mode=%0d)", what, got, exp, mode);
    end
  endtask

  function automatic bae_evs_t rand_ev();
    bae_evs_t e;
    for (int i = 0; i < EV_SLOTS; i++) e[i] = bae_ev_e'($urandom_range(0, 5));
    return e;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) begin
      cur_range = RANGE_W'($urandom); r_range = RANGE_W'($urandom); t_range = RANGE_W'($urandom);
      p_low = LOW_W'($urandom); r_low = LOW_W'($urandom); t_low = LOW_W'($urandom);
      p_out = OUTSTD_W'($urandom); r_out = OUTSTD_W'($urandom); t_out = OUTSTD_W'($urandom);
      p_ev = bae_ev_e'($urandom_range(1, 3)); r_ev = rand_ev(); t_ev = rand_ev();
      mode = MODE_REGULAR; #1;
      check("r low", int'(o_low), int'(r_low));
      check("r range", int'(o_range), int'(r_range));
      check("r outstd", int'(o_out), int'(r_out));
      check("r ev", int'(o_ev == r_ev), 1);
      mode = MODE_BYPASS; #1;
      check("p low", int'(o_low), int'(p_low));
      check("p range", int'(o_range), int'(cur_range));
      check("p outstd", int'(o_out), int'(p_out));
      check("p ev slot 0", int'(o_ev[0]), int'(p_ev));
      for (int i = 1; i < EV_SLOTS; i++) check("p ev rest", int'(o_ev[i]), int'(EV_NONE));
      mode = MODE_TERM; #1;
      check("t low", int'(o_low), int'(t_low));
      check("t range", int'(o_range), int'(t_range));
      check("t outstd", int'(o_out), int'(t_out));
      check("t ev", int'(o_ev == t_ev), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
