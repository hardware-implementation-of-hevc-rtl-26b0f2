// tb_bae_workload: runs frame-sized synthetic syntax streams through the
// encoder at its default configuration, one frame (one slice) for each of
// the four picture sizes the architecture was evaluated with: 2560x1600,
// 1920x1080, 832x480 and 416x240.
//
// Each frame is cut into 64x64 coding tree units.  Per unit the testbench
// emits SAO syntax, a coding quadtree (split_cu_flag down to 8x8 with random
// decisions), intra prediction syntax per coding unit, a transform tree with
// coded block flags and, per 4x4 coefficient group, the residual syntax
// (coded_sub_block_flag, sig_coeff_flag, greater1/greater2 flags, signs and
// coeff_abs_level_remaining).  Bin values are random, regular bins biased
// towards the current MPS.  end_of_slice_segment_flag closes every unit,
// with 1 on the last one.  The stream is not a decodable HEVC picture; it
// reproduces the mix and structure of syntax elements of an intra frame.
//
// Checks, as in tb_bae_top: every bin's interval and context update against
// the bit-serial reference, the whole bitstream of each frame bit by bit,
// decoding back to the bins sent, and the one-bin-per-cycle timing.
module tb_bae_workload;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  localparam int NCTX     = 128;
  
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
    #2000000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_frame_bins;

  function automatic int rnd(int lo, int hi);
    return int'($urandom_range(hi, lo));
  endfunction

  // one syntax element with random bins
  task automatic se(bae_syn_e s, int n);
    if (n < 1) n = 1;
    if (n > BIN_W) n = BIN_W;
    n_frame_bins += n;
    send(int'(s), n, make_bins(int'(s), n));
  endtask

  task automatic residual_block(int log2size);
    int groups;
    groups = (1 << (2 * log2size)) / 16;
    se(SE_LAST_SIG_COEFF_PREFIX, rnd(1, 2 * log2size - 1));
    se(SE_LAST_SIG_COEFF_PREFIX, rnd(1, 2 * log2size - 1));
    if (log2size > 3 && rnd(0, 1) == 1) se(SE_LAST_SIG_COEFF_SUFFIX, rnd(1, log2size - 2));
    for (int g = 0; g < rnd(1, groups); g++) begin
      int nz;
      if (g > 0) se(SE_CODED_SUB_BLOCK_FLAG, 1);
      for (int k = 0; k < rnd(1, 16); k++) se(SE_SIG_COEFF_FLAG, 1);
      nz = rnd(1, 8);
      for (int k = 0; k < nz; k++) se(SE_COEFF_ABS_LEVEL_GREATER1, 1);
      se(SE_COEFF_ABS_LEVEL_GREATER2, 1);
      se(SE_COEFF_SIGN_FLAG, nz);
      for (int k = 0; k < rnd(0, 3); k++) se(SE_COEFF_ABS_LEVEL_REMAINING, rnd(1, 14));
    end
  endtask

  task automatic coding_unit(int log2size);
    se(SE_PRED_MODE_FLAG, 1);
    if (log2size == 3) se(SE_PART_MODE, 1);
    se(SE_PREV_INTRA_LUMA_PRED_FLAG, 1);
    if (rnd(0, 1) == 1) se(SE_MPM_IDX, rnd(1, 2));
    else se(SE_REM_INTRA_LUMA_PRED_MODE, 5);
    se(SE_INTRA_CHROMA_PRED_MODE, (rnd(0, 3) == 0) ? 1 : 3);
    if (log2size > 3) se(SE_SPLIT_TRANSFORM_FLAG, 1);
    se(SE_CBF_CHROMA, 1);
    se(SE_CBF_CHROMA, 1);
    se(SE_CBF_LUMA, 1);
    if (rnd(0, 3) != 0) residual_block((log2size > 5) ? 5 : log2size);
    if (rnd(0, 2) == 0) residual_block((log2size > 4) ? 4 : log2size - 1);
  endtask

  task automatic coding_quadtree(int log2size);
    int split;
    split = 0;
    if (log2size > 3) begin
      split = (rnd(0, 99) < 60) ? 1 : 0;
      se(SE_SPLIT_CU_FLAG, 1);
    end
    if (split == 1)
      for (int q = 0; q < 4; q++) coding_quadtree(log2size - 1);
    else
      coding_unit(log2size);
  endtask

  task automatic ctu(bit last);
    se(SE_SAO_MERGE_FLAG, 1);
    se(SE_SAO_TYPE_IDX, 2);
    for (int k = 0; k < 4; k++) se(SE_SAO_OFFSET_ABS, rnd(1, 7));
    se(SE_SAO_BAND_POSITION, 5);
    coding_quadtree(6);
    n_frame_bins++;
    send(int'(SE_END_OF_SLICE_SEGMENT_FLAG), 1, last ? 1 : 0);
  endtask

  localparam int NSIZES = 4;
  localparam int FRAME_W [NSIZES] = '{2560, 1920, 832, 416};
  localparam int FRAME_H [NSIZES] = '{1600, 1080, 480, 240};

  initial begin
    repeat (3) @(negedge clk);
    rst_m_n = 1;
    for (int f = 0; f < NSIZES; f++) begin
      int ctus, t_start;
      ctus = ((FRAME_W[f] + 63) / 64) * ((FRAME_H[f] + 63) / 64);
      for (int c = 0; c < NCTX; c++) begin
        init_p[c] = int'($urandom_range(0, 62));
        init_m[c] = int'($urandom_range(0, 1));
      end
      while (!ready) @(negedge clk);
      hw_p = init_p; hw_m = init_m; ref_p = init_p; ref_m = init_m;
      ref_c = coder_init();
      hw_bits.reset(); ref_bits.reset(); sent.delete();
      init = 1;
      @(negedge clk);
      init = 0;
      n_frame_bins = 0;
      t_start = cycle;
      for (int u = 0; u < ctus; u++) ctu(u == ctus - 1);
      check("bitstream length", hw_bits.bits.size(), ref_bits.bits.size());
      for (int i = 0; i < hw_bits.bits.size() && i < ref_bits.bits.size(); i++)
        check("bitstream bit", int'(hw_bits.bits[i]), int'(ref_bits.bits[i]));
      check("no pending bins", exp_q.size(), 0);
      check("flush reached", n_flush, f + 1);
      decode_slice();
      $display("frame %0dx%0d: %0d CTUs, %0d bins, %0d bits, %0d cycles",
               FRAME_W[f], FRAME_H[f], ctus, n_frame_bins, hw_bits.bits.size(),
               cycle - t_start);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
