// tb_bae_controller: checks the controller on its own.  The testbench plays
// the multiplexer with a simple rule (low + 3, range xor 1, outstanding + 1)
// so that every stored update is visible.  Checked per syntax element: the
// state sequence 0, 1, 3, 2, ..., 0 of the timing chart; o_bae_period for
// exactly N cycles starting two cycles after the strobe; o_bae_finish one
// cycle after the last bin; the bins presented in order (bit k of the bin
// string in the k-th bin cycle); the engine enabled for each bin, against a
// table of expected modes written out here; the interval stored after every
// bin; reset and i_bae_init values.
module tb_bae_controller;
  import bae_pkg::*;

  logic clk = 0, rst_m_n = 0;
  logic                valid = 0, init = 0, mps = 0;
  logic [BIN_W-1:0]    bin_str = '0;
  logic [BINNUM_W-1:0] num = '0;
  logic [SYN_W-1:0]    syn = '0;
  logic [PSTATE_W-1:0] pstate = '0;
  logic [LOW_W-1:0]    mux_low, eng_low;
  logic [RANGE_W-1:0]  mux_range, eng_range;
  logic [OUTSTD_W-1:0] mux_outstd, eng_outstd;
  logic eng_bin, eng_valmps, en_r, en_p, en_t, period, finish, ready;
  logic [PSTATE_W-1:0] eng_pstate;
  logic [BINNUM_W-1:0] bin_idx;
  bae_mode_e  mode;
  bae_state_e state;

  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  bae_controller dut (
    .clk(clk), .rst_m_n(rst_m_n), .i_bi_syn_valid(valid), .i_bi_bin(bin_str),
    .i_bi_bin_num(num), .i_bi_syn_idx(syn), .i_bae_pstate(pstate), .i_bae_mps(mps),
    .i_bae_init(init), .i_mux_low(mux_low), .i_mux_range(mux_range),
    .i_mux_outstd(mux_outstd), .o_eng_low(eng_low), .o_eng_range(eng_range),
    .o_eng_outstd(eng_outstd), .o_eng_bin(eng_bin), .o_eng_pstate(eng_pstate),
    .o_eng_valmps(eng_valmps), .o_en_regular(en_r), .o_en_bypass(en_p),
    .o_en_term(en_t), .o_mode(mode), .o_bae_period(period), .o_bae_finish(finish),
    .o_bae_ready(ready), .o_bae_bin_idx(bin_idx), .o_state(state)
  );

  assign mux_low    = eng_low + 10'd3;
  assign mux_range  = eng_range ^ 9'd1;
  assign mux_outstd = eng_outstd + 16'd1;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  // expected mode: 0 regular, 1 bypass, 2 terminate
  function automatic int exp_mode(int s, int k);
    case (s)
      0, 1, 2:            return 2;
      5, 6, 7, 8, 15, 16, 29, 30, 32, 35, 40, 41: return 1;
      4, 17, 20:          return (k < 1) ? 0 : 1;
      22:                 return (k < 2) ? 0 : 1;
      13:                 return (k < 3) ? 0 : 1;
      31:                 return (k < 5) ? 0 : 1;
      default:            return 0;
    endcase
  endfunction

  task automatic send(int s, int n, logic [BIN_W-1:0] b);
    int l, r, o;
    @(negedge clk);
    check("ready before", int'(ready), 1);
    syn = SYN_W'(s); num = BINNUM_W'(n); bin_str = b; valid = 1;
    @(negedge clk);
    valid = 0; bin_str = ~b; syn = '0;  // inputs only sampled with the strobe
    check("state load", int'(state), 1);
    check("no period in load", int'(period), 0);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      check("state", int'(state), (k == 0) ? 3 : 2);
      check("period", int'(period), 1);
      check("ready low", int'(ready), 0);
      check("bin idx", int'(bin_idx), k);
      check("bin value", int'(eng_bin), int'(b[k]));
      check("mode", int'(mode), exp_mode(s, k));
      check("one enable", int'(en_r) + int'(en_p) + int'(en_t), 1);
      check("enable matches mode", int'(en_r) * 0 + int'(en_p) * 1 + int'(en_t) * 2, exp_mode(s, k));
      pstate = PSTATE_W'($urandom); mps = 1'($urandom);
      #1;
      check("pstate to engine", int'(eng_pstate), int'(pstate));
      check("mps to engine", int'(eng_valmps), int'(mps));
      l = int'(eng_low); r = int'(eng_range); o = int'(eng_outstd);
      @(posedge clk); #1;
      check("stored low", int'(eng_low), (l + 3) % 1024);
      check("stored range", int'(eng_range), r ^ 1);
      check("stored outstd", int'(eng_outstd), (o + 1) % 65536);
      check("finish timing", int'(finish), int'(k == n - 1));
    end
    @(negedge clk);
    check("state idle", int'(state), 0);
    check("period low after", int'(period), 0);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check("reset low", int'(eng_low), 0);
    check("reset range", int'(eng_range), 510);
    check("reset outstd", int'(eng_outstd), 0);
    check("reset state", int'(state), 0);
    @(negedge clk); rst_m_n = 1;
    // the example of the timing chart: syntax element 13, bin_str 101, 3 bin_str
    send(13, 3, 32'b101);
    send(0, 1, 32'b1);
    send(37, 1, 32'b0);
    send(31, 9, 32'b1_1011_1111);
    send(40, 32, 32'hDEAD_BEEF);
    for (int s = 0; s < 42; s++) send(s, int'($urandom_range(1, 12)), BIN_W'($urandom));
    // i_bae_init restarts the interval
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    check("init low", int'(eng_low), 0);
    check("init range", int'(eng_range), 510);
    check("init outstd", int'(eng_outstd), 0);
    send(9, 2, 32'b10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
