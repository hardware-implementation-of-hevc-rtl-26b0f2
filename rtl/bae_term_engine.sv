// bae_term_engine: encodes one terminating bin and, for a 1 bin, flushes the
// encoder.
//
// Follows the HEVC EncodeTerminate and EncodeFlush processes.  ivlRange is
// reduced by 2.  A 0 bin keeps ivlLow and renormalizes (at most one shift,
// since the reduced range is at least 254).  A 1 bin adds the reduced range
// to ivlLow, sets ivlRange to 2 and renormalizes (seven shifts), then emits
// PutBit(ivlLow[9]) and writes the two raw bits ivlLow[8] and 1, which ends
// the arithmetic codeword.  The same renormalizer serves both cases; a mux
// picks its range input (reduced range or the constant 2) and one its low
// input (ivlLow or the sum), as in the original engine drawing; doing the
// whole flush inside this engine is this design's reading of it.
//
// Interface (names as in the architecture): i_bae_en, i_bae_bin, i_bae_low,
// i_bae_range, i_bae_outstd in; o_bae_t_low, o_bae_t_range, o_bae_t_outstd
// out; o_bae_t_ev lists up to ten bit events (seven renormalization steps,
// the flush PutBit, two raw bits; this design's addition).  With i_bae_en
// low the values pass through and no events are produced.  After a flush the
// interval must be re-initialised before the next bin.  Combinational.
module bae_term_engine
  import bae_pkg::*;
(
  input  logic                i_bae_en,
  input  logic                i_bae_bin,
  input  logic [LOW_W-1:0]    i_bae_low,
  input  logic [RANGE_W-1:0]  i_bae_range,
  input  logic [OUTSTD_W-1:0] i_bae_outstd,
  output logic [LOW_W-1:0]    o_bae_t_low,
  output logic [RANGE_W-1:0]  o_bae_t_range,
  output logic [OUTSTD_W-1:0] o_bae_t_outstd,
  output bae_evs_t            o_bae_t_ev
);

  localparam int STEPS = 7;

  logic [RANGE_W-1:0]  range_m2;
  logic [RANGE_W-1:0]  m_range;
  logic [LOW_W-1:0]    m_low;
  logic [LOW_W-1:0]    rn_low;
  logic [RANGE_W-1:0]  rn_range;
  logic [OUTSTD_W-1:0] rn_outstd;
  bae_ev_e             rn_ev [STEPS];

  assign range_m2 = i_bae_range - RANGE_W'(2);
  assign m_range  = (i_bae_bin != 1'b0) ? RANGE_W'(2) : range_m2;
  assign m_low    = (i_bae_bin != 1'b0) ? i_bae_low + LOW_W'(range_m2) : i_bae_low;

  bae_renorm #(.MAX_STEPS(STEPS)) u_renorm (
    .i_low   (m_low),
    .i_range (m_range),
    .i_outstd(i_bae_outstd),
    .o_low   (rn_low),
    .o_range (rn_range),
    .o_outstd(rn_outstd),
    .o_ev    (rn_ev)
  );

  always_comb begin
    o_bae_t_ev     = '{default: EV_NONE};
    o_bae_t_low    = i_bae_low;
    o_bae_t_range  = i_bae_range;
    o_bae_t_outstd = i_bae_outstd;
    if (i_bae_en) begin
      for (int i = 0; i < STEPS; i++) o_bae_t_ev[i] = rn_ev[i];
      o_bae_t_low    = rn_low;
      o_bae_t_range  = rn_range;
      o_bae_t_outstd = rn_outstd;
      if (i_bae_bin != 1'b0) begin
        o_bae_t_ev[STEPS]     = rn_low[9] ? EV_PUT1 : EV_PUT0;
        o_bae_t_ev[STEPS + 1] = rn_low[8] ? EV_WR1 : EV_WR0;
        o_bae_t_ev[STEPS + 2] = EV_WR1;
        o_bae_t_outstd        = '0;
      end
    end
  end

endmodule
