// bae_top: HEVC CABAC binary arithmetic encoder (BAE), one bin per cycle.
//
// The encoder turns bins into the arithmetic codeword of HEVC CABAC.  Its
// state is the interval (ivlLow, 10 bits; ivlRange, 9 bits) and the count of
// outstanding bits whose value still depends on a later carry.  Three
// combinational engines compute the next state for the three bin kinds:
// regular (context-coded, with the probability-state update), bypass
// (probability one half) and terminate (end of slice, with the final flush).
// Each renormalizes in the same pass, using a leading-zero count of ivlRange
// instead of the bit-serial loop of the reference encoder.  The controller
// picks the engine for each bin, a multiplexer returns that engine's result,
// and the controller stores it for the next bin.
//
// Interface
//   clk, rst_m_n (active-low synchronous reset)
//   binarizer side: i_bi_syn_valid strobe with i_bi_syn_idx (syntax element,
//     numbering in bae_pkg), i_bi_bin (bin k in bit k), i_bi_bin_num; accepted
//     only while o_bae_ready is high.
//   context modeler side: during each bin cycle (o_bae_period high) the
//     modeler drives i_bae_pstate/i_bae_mps for the current bin
//     (o_bae_bin_idx) and, for a regular bin (o_bae_mode), stores the updated
//     o_bae_pstate/o_bae_mps at the clock edge.  i_bae_init (while idle)
//     restarts the interval, as at the start of a slice.
//   bitstream side: o_bae_ev lists, for the current bin cycle, the PutBit,
//     outstanding-bit and raw-write events in order (slot 0 first); a bit
//     packer expands them into the bitstream.  o_bae_low, o_bae_range and
//     o_bae_outstd show the updated interval in the bin's cycle.
//   o_bae_finish pulses one cycle after the last bin of a syntax element.
//
// Timing: an N-bin syntax element taken in cycle t is encoded in cycles
// t+2 .. t+1+N, one bin per cycle, with o_bae_finish in cycle t+2+N.
// The architecture (controller, three engines, multiplexer, one-cycle
// renormalization) and the port names follow the original design; the bit
// event outputs, o_bae_ready, o_bae_mode, o_bae_bin_idx and o_bae_outstd are
// this design's additions so that the encoder can be used and checked.
module bae_top
  import bae_pkg::*;
(
  input  logic                clk,
  input  logic                rst_m_n,
  input  logic                i_bi_syn_valid,
  input  logic [BIN_W-1:0]    i_bi_bin,
  input  logic [BINNUM_W-1:0] i_bi_bin_num,
  input  logic [SYN_W-1:0]    i_bi_syn_idx,
  input  logic [PSTATE_W-1:0] i_bae_pstate,
  input  logic                i_bae_mps,
  input  logic                i_bae_init,
  output logic [PSTATE_W-1:0] o_bae_pstate,
  output logic                o_bae_mps,
  output logic [RANGE_W-1:0]  o_bae_range,
  output logic [LOW_W-1:0]    o_bae_low,
  output logic [OUTSTD_W-1:0] o_bae_outstd,
  output logic                o_bae_period,
  output logic                o_bae_finish,
  output logic                o_bae_ready,
  output bae_mode_e           o_bae_mode,
  output logic [BINNUM_W-1:0] o_bae_bin_idx,
  output bae_evs_t            o_bae_ev
);

  // controller -> engines ("bus")
  logic [LOW_W-1:0]    c_low;
  logic [RANGE_W-1:0]  c_range;
  logic [OUTSTD_W-1:0] c_outstd;
  logic                c_bin;
  logic [PSTATE_W-1:0] c_pstate;
  logic                c_valmps;
  logic                en_r, en_p, en_t;
  bae_mode_e           mode;
  bae_state_e          state;

  // engines -> multiplexer
  logic [LOW_W-1:0]    p_low, r_low, t_low;
  logic [RANGE_W-1:0]  r_range, t_range;
  logic [OUTSTD_W-1:0] p_outstd, r_outstd, t_outstd;
  bae_ev_e             p_ev;
  bae_evs_t            r_ev, t_ev;

  // multiplexer -> controller and outputs
  logic [LOW_W-1:0]    m_low;
  logic [RANGE_W-1:0]  m_range;
  logic [OUTSTD_W-1:0] m_outstd;
  bae_evs_t            m_ev;

  bae_controller u_ctrl (
    .clk           (clk),
    .rst_m_n       (rst_m_n),
    .i_bi_syn_valid(i_bi_syn_valid),
    .i_bi_bin      (i_bi_bin),
    .i_bi_bin_num  (i_bi_bin_num),
    .i_bi_syn_idx  (i_bi_syn_idx),
    .i_bae_pstate  (i_bae_pstate),
    .i_bae_mps     (i_bae_mps),
    .i_bae_init    (i_bae_init),
    .i_mux_low     (m_low),
    .i_mux_range   (m_range),
    .i_mux_outstd  (m_outstd),
    .o_eng_low     (c_low),
    .o_eng_range   (c_range),
    .o_eng_outstd  (c_outstd),
    .o_eng_bin     (c_bin),
    .o_eng_pstate  (c_pstate),
    .o_eng_valmps  (c_valmps),
    .o_en_regular  (en_r),
    .o_en_bypass   (en_p),
    .o_en_term     (en_t),
    .o_mode        (mode),
    .o_bae_period  (o_bae_period),
    .o_bae_finish  (o_bae_finish),
    .o_bae_ready   (o_bae_ready),
    .o_bae_bin_idx (o_bae_bin_idx),
    .o_state       (state)
  );

  bae_bypass_engine u_bypass (
    .i_bae_en      (en_p),
    .i_bae_bin     (c_bin),
    .i_bae_low     (c_low),
    .i_bae_range   (c_range),
    .i_bae_outstd  (c_outstd),
    .o_bae_p_low   (p_low),
    .o_bae_p_outstd(p_outstd),
    .o_bae_p_ev    (p_ev)
  );

  bae_regular_engine u_regular (
    .i_bae_en      (en_r),
    .i_bae_bin     (c_bin),
    .i_bae_low     (c_low),
    .i_bae_range   (c_range),
    .i_bae_outstd  (c_outstd),
    .i_bae_valmps  (c_valmps),
    .i_bae_pstate  (c_pstate),
    .o_bae_r_low   (r_low),
    .o_bae_r_range (r_range),
    .o_bae_r_outstd(r_outstd),
    .o_bae_r_valmps(o_bae_mps),
    .o_bae_r_pstate(o_bae_pstate),
    .o_bae_r_ev    (r_ev)
  );

  bae_term_engine u_term (
    .i_bae_en      (en_t),
    .i_bae_bin     (c_bin),
    .i_bae_low     (c_low),
    .i_bae_range   (c_range),
    .i_bae_outstd  (c_outstd),
    .o_bae_t_low   (t_low),
    .o_bae_t_range (t_range),
    .o_bae_t_outstd(t_outstd),
    .o_bae_t_ev    (t_ev)
  );

  bae_mux u_mux (
    .i_mode      (mode),
    .i_cur_range (c_range),
    .i_p_low     (p_low),
    .i_p_outstd  (p_outstd),
    .i_p_ev      (p_ev),
    .i_r_low     (r_low),
    .i_r_range   (r_range),
    .i_r_outstd  (r_outstd),
    .i_r_ev      (r_ev),
    .i_t_low     (t_low),
    .i_t_range   (t_range),
    .i_t_outstd  (t_outstd),
    .i_t_ev      (t_ev),
    .o_bae_low   (m_low),
    .o_bae_range (m_range),
    .o_bae_outstd(m_outstd),
    .o_bae_ev    (m_ev)
  );

  assign o_bae_low    = m_low;
  assign o_bae_range  = m_range;
  assign o_bae_outstd = m_outstd;
  assign o_bae_mode   = mode;
  // Events only count in a bin cycle.
  assign o_bae_ev     = o_bae_period ? m_ev : '{default: EV_NONE};

  // Only the enabled engine may report events.
  a_one_engine: assert property (@(posedge clk) disable iff (!rst_m_n)
    $onehot0({en_r, en_p, en_t}));
  a_period_state: assert property (@(posedge clk) disable iff (!rst_m_n)
    o_bae_period == (state == ST_FIRST || state == ST_NEXT));

endmodule
