// tb_bae_top: end-to-end test of the binary arithmetic encoder at its
// default configuration.
//
// The testbench plays the three neighbours of the encoder: a binarizer that
// offers random syntax elements (all syntax element kinds, 1 to 32 bins,
// regular bins biased towards the current MPS so that long MPS runs, LPS
// bins and state flips all occur), a context modeler with a 128-entry
// context table (context chosen from the syntax element and bin index) and a
// bit packer that turns the event outputs into bits.  Each slice starts with
// i_bae_init and ends with end_of_slice_segment_flag = 1, which flushes the
// encoder; some slices also carry end_of_slice_segment_flag = 0 bins.
//
// Checks:
//  - after every bin, o_bae_low/o_bae_range/o_bae_outstd and the context
//    update against the bit-serial reference encoder (bae_ref_pkg);
//  - the whole bitstream of each slice against the reference bitstream;
//  - the bitstream decodes (reference arithmetic decoder) to the bins sent;
//  - one bin per cycle: an N-bin element offered in cycle t has its bins in
//    cycles t+2 .. t+1+N and o_bae_finish in cycle t+2+N.
// Each mechanism of the design is counted and must occur at least once.
module tb_bae_top;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  localparam int NCTX     = 128;
  localparam int SLICES   = 24;
  localparam int ELEMENTS = 150;

  logic clk = 0, rst_m_n = 0;
  logic                syn_valid = 0, init = 0;
  logic [BIN_W-1:0]    bin_str = '0;
  logic [BINNUM_W-1:0] bin_num = '0;
  logic [SYN_W-1:0]    syn_idx = '0;
  logic [PSTATE_W-1:0] i_pstate;
  logic                i_mps;
  logic [PSTATE_W-1:0] o_pstate;
  logic                o_mps;
  logic [RANGE_W-1:0]  o_range;
  logic [LOW_W-1:0]    o_low;
  logic [OUTSTD_W-1:0] o_outstd;
  logic                period, finish, ready;
  bae_mode_e           mode;
  logic [BINNUM_W-1:0] bin_idx;
  bae_evs_t            ev;

  bae_top dut (
    .clk(clk), .rst_m_n(rst_m_n), .i_bi_syn_valid(syn_valid), .i_bi_bin(bin_str),
    .i_bi_bin_num(bin_num), .i_bi_syn_idx(syn_idx), .i_bae_pstate(i_pstate),
    .i_bae_mps(i_mps), .i_bae_init(init), .o_bae_pstate(o_pstate), .o_bae_mps(o_mps),
    .o_bae_range(o_range), .o_bae_low(o_low), .o_bae_outstd(o_outstd),
    .o_bae_period(period), .o_bae_finish(finish), .o_bae_ready(ready),
    .o_bae_mode(mode), .o_bae_bin_idx(bin_idx), .o_bae_ev(ev)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  // ---------------------------------------------------------------- contexts
  int init_p [NCTX], init_m [NCTX];   // slice start values
  int hw_p [NCTX], hw_m [NCTX];       // context modeler feeding the encoder
  int ref_p [NCTX], ref_m [NCTX];     // reference encoder's copy

  function automatic int ctx_of(int s, int k);
    return (s * 3 + ((k > 2) ? 2 : k)) % NCTX;
  endfunction

  int cur_syn = 0;
  always_comb begin
    i_pstate = PSTATE_W'(hw_p[ctx_of(cur_syn, int'(bin_idx))]);
    i_mps    = hw_m[ctx_of(cur_syn, int'(bin_idx))][0];
  end

  // the context modeler stores the regular engine's update
  always @(posedge clk) begin
    if (period && mode == MODE_REGULAR) begin
      hw_p[ctx_of(cur_syn, int'(bin_idx))] <= int'(o_pstate);
      hw_m[ctx_of(cur_syn, int'(bin_idx))] <= int'(o_mps);
    end
  end

  // ------------------------------------------------------- bits and models
  bit_packer hw_bits  = new();
  bit_packer ref_bits = new();
  coder_t    ref_c;

  typedef struct {
    int low, range, outstd, pstate, mps, mode;
  } expect_t;
  expect_t exp_q[$];

  typedef struct {
    int syn, n;
    logic [BIN_W-1:0] b;
  } elem_t;
  elem_t sent[$];

  // mechanism counters
  int n_mps, n_lps, n_flip, n_deep, n_byp0, n_byp1, n_bypout, n_term0, n_flush;
  int n_carry, n_init, n_b2b, n_long, n_single, n_same_ctx;

  always @(posedge clk) begin
    if (period) begin
      for (int i = 0; i < EV_SLOTS; i++) begin
        if (ev[i] == EV_PUT1 && hw_bits.outstanding > 0) n_carry++;
        hw_bits.event_in(int'(ev[i]));
      end
    end
  end

  // per-bin comparison, taken just before the clock edge that stores it
  always @(negedge clk) begin
    if (period) begin
      expect_t e;
      if (exp_q.size() == 0) begin
        check("unexpected bin", 1, 0);
      end else begin
        e = exp_q.pop_front();
        check("mode", int'(mode), e.mode);
        check("low", int'(o_low), e.low);
        check("range", int'(o_range), e.range);
        check("outstd", int'(o_outstd), e.outstd);
        if (e.mode == int'(MODE_REGULAR)) begin
          check("pstate", int'(o_pstate), e.pstate);
          check("mps", int'(o_mps), e.mps);
        end
      end
    end
  end

  // Encode one element with the reference, queue the expected results.
  function automatic void ref_encode(int s, int n, logic [BIN_W-1:0] b);
    int evq[$];
    for (int k = 0; k < n; k++) begin
      expect_t e;
      bae_mode_e md;
      int c;
      md = bin_mode(SYN_W'(s), BINNUM_W'(k));
      c = ctx_of(s, k);
      evq.delete();
      case (md)
        MODE_REGULAR: begin
          if (int'(b[k]) == ref_m[c]) n_mps++;
          else begin
            n_lps++;
            if (ref_p[c] == 0) n_flip++;
          end
          if (k > 0 && bin_mode(SYN_W'(s), BINNUM_W'(k - 1)) == MODE_REGULAR &&
              ctx_of(s, k - 1) == c) n_same_ctx++;
          encode_decision(ref_c, int'(b[k]), ref_p[c], ref_m[c], evq);
          if (evq.size() >= 2) n_deep++;
        end
        MODE_BYPASS: begin
          encode_bypass(ref_c, int'(b[k]), evq);
          if (evq[0] == int'(EV_PUT0)) n_byp0++;
          else if (evq[0] == int'(EV_PUT1)) n_byp1++;
          else n_bypout++;
        end
        default: begin
          encode_terminate(ref_c, int'(b[k]), evq);
          if (b[k]) n_flush++; else n_term0++;
        end
      endcase
      foreach (evq[i]) ref_bits.event_in(evq[i]);
      e.low = ref_c.low; e.range = ref_c.range; e.outstd = ref_c.outstd;
      e.pstate = ref_p[c]; e.mps = ref_m[c]; e.mode = int'(md);
      exp_q.push_back(e);
    end
  endfunction

  // Offer one element as soon as the encoder is ready; check its timing.
  task automatic send(int s, int n, logic [BIN_W-1:0] b);
    int t0, first_period, periods;
    elem_t el;
    while (!ready) @(negedge clk);
    if (finish) n_b2b++;
    if (n == 1) n_single++;
    if (n == BIN_W) n_long++;
    ref_encode(s, n, b);
    el.syn = s; el.n = n; el.b = b;
    sent.push_back(el);
    cur_syn = s;
    syn_idx = SYN_W'(s); bin_num = BINNUM_W'(n); bin_str = b; syn_valid = 1;
    t0 = cycle;
    @(negedge clk);
    syn_valid = 0;
    first_period = -1; periods = 0;
    while (!finish) begin
      if (period) begin
        if (first_period < 0) first_period = cycle;
        periods++;
      end
      @(negedge clk);
      if (cycle - t0 > 100) break;
    end
    check("first bin two cycles after strobe", first_period - t0, 2);
    check("one bin per cycle", periods, n);
    check("finish after last bin", cycle - t0, n + 2);
  endtask

  // Random bin string: regular bins follow the reference's current MPS
  // most of the time.
  function automatic logic [BIN_W-1:0] make_bins(int s, int n);
    logic [BIN_W-1:0] b;
    int p [NCTX], m [NCTX];
    b = BIN_W'($urandom);
    for (int k = 0; k < n; k++) begin
      if (bin_mode(SYN_W'(s), BINNUM_W'(k)) == MODE_REGULAR) begin
        if ($urandom_range(0, 99) < 85) b[k] = ref_m[ctx_of(s, k)][0];
      end
    end
    return b;
  endfunction

  task automatic decode_slice();
    arith_decoder d = new();
    int dp [NCTX], dm [NCTX];
    int bin;
    dp = init_p; dm = init_m;
    d.start(hw_bits.bits);
    foreach (sent[i]) begin
      for (int k = 0; k < sent[i].n; k++) begin
        bae_mode_e md;
        int c;
        md = bin_mode(SYN_W'(sent[i].syn), BINNUM_W'(k));
        c = ctx_of(sent[i].syn, k);
        case (md)
          MODE_REGULAR: bin = d.decode_decision(dp[c], dm[c]);
          MODE_BYPASS:  bin = d.decode_bypass();
          default:      bin = d.decode_terminate();
        endcase
        check("decoded bin", bin, int'(sent[i].b[k]));
      end
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCTX; c++) begin
      init_p[c] = int'($urandom_range(0, 62));
      if (c % 5 == 0) init_p[c] = int'($urandom_range(0, 3));
      init_m[c] = int'($urandom_range(0, 1));
    end
    hw_p = init_p; hw_m = init_m;
    repeat (3) @(negedge clk);
    rst_m_n = 1;
    for (int sl = 0; sl < SLICES; sl++) begin
      // slice start: same starting contexts everywhere, encoder re-initialised
      for (int c = 0; c < NCTX; c++) begin
        init_p[c] = int'($urandom_range(0, 62));
        if (c % 4 == 0) init_p[c] = int'($urandom_range(0, 2));
        init_m[c] = int'($urandom_range(0, 1));
      end
      while (!ready) @(negedge clk);
      hw_p = init_p; hw_m = init_m; ref_p = init_p; ref_m = init_m;
      ref_c = coder_init();
      hw_bits.reset(); ref_bits.reset(); sent.delete();
      init = 1;
      @(negedge clk);
      init = 0;
      n_init++;
      check("init low", int'(dut.u_ctrl.low_q), 0);
      check("init range", int'(dut.u_ctrl.range_q), 510);
      for (int e = 0; e < ELEMENTS; e++) begin
        int s, n;
        s = int'($urandom_range(3, 41));
        case ($urandom_range(0, 9))
          0:       n = BIN_W;
          1, 2, 3: n = 1;
          default: n = int'($urandom_range(1, 12));
        endcase
        if (sl % 3 == 1 && e % 50 == 25) begin
          s = int'(SE_END_OF_SLICE_SEGMENT_FLAG); n = 1;
          send(s, n, '0);
        end else begin
          send(s, n, make_bins(s, n));
        end
      end
      send(int'(SE_END_OF_SLICE_SEGMENT_FLAG), 1, 1);
      // slice complete: compare bitstreams and decode
      check("bitstream length", hw_bits.bits.size(), ref_bits.bits.size());
      for (int i = 0; i < hw_bits.bits.size() && i < ref_bits.bits.size(); i++)
        check("bitstream bit", int'(hw_bits.bits[i]), int'(ref_bits.bits[i]));
      check("no pending bins", exp_q.size(), 0);
      decode_slice();
    end
    $display("mechanisms: mps=%0d lps=%0d mps_flip=%0d multi_shift=%0d same_ctx=%0d",
             n_mps, n_lps, n_flip, n_deep, n_same_ctx);
    $display("            bypass put0=%0d put1=%0d outstanding=%0d carry=%0d",
             n_byp0, n_byp1, n_bypout, n_carry);
    $display("            term0=%0d flush=%0d init=%0d back_to_back=%0d single=%0d 32bin=%0d",
             n_term0, n_flush, n_init, n_b2b, n_single, n_long);
    check("mechanism regular MPS", n_mps > 0, 1);
    check("mechanism regular LPS", n_lps > 0, 1);
    check("mechanism valMps flip", n_flip > 0, 1);
    check("mechanism multi-shift renorm", n_deep > 0, 1);
    check("mechanism same context back to back", n_same_ctx > 0, 1);
    check("mechanism bypass PutBit(0)", n_byp0 > 0, 1);
    check("mechanism bypass PutBit(1)", n_byp1 > 0, 1);
    check("mechanism bypass outstanding", n_bypout > 0, 1);
    check("mechanism carry into outstanding bits", n_carry > 0, 1);
    check("mechanism terminate 0", n_term0 > 0, 1);
    check("mechanism terminate 1 and flush", n_flush > 0, 1);
    check("mechanism init", n_init > 0, 1);
    check("mechanism element taken in finish cycle", n_b2b > 0, 1);
    check("mechanism single-bin element", n_single > 0, 1);
    check("mechanism 32-bin element", n_long > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
