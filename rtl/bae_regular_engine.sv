// bae_regular_engine: encodes one context-coded (regular) bin.
//
// Follows the HEVC EncodeDecision process.  qRangeIdx = ivlRange[7:6] and the
// context's pStateIdx select the LPS sub-range from rangeTabLps; the MPS
// sub-range is ivlRange minus it.  When the bin equals valMps (the
// "matching MPS" signal) the interval keeps its low end and takes the MPS
// sub-range, and the state moves along transIdxMps.  Otherwise ivlLow is
// raised by the MPS sub-range, ivlRange becomes the LPS sub-range, the state
// moves along transIdxLps, and valMps flips when pStateIdx was 0.  The result
// is renormalized in the same pass (bae_renorm, up to 8 shifts; the smallest
// LPS sub-range, 6, needs 6).  The datapath (three lookup tables, the
// subtractor and adder, the muxes steered by the matching-MPS comparison,
// the valMps flip logic) follows the original engine drawing.
//
// Interface (names as in the architecture): i_bae_en, i_bae_bin, i_bae_low,
// i_bae_range, i_bae_outstd, i_bae_valmps, i_bae_pstate in; the updated
// o_bae_r_low, o_bae_r_range, o_bae_r_outstd, o_bae_r_valmps, o_bae_r_pstate
// out.  o_bae_r_ev lists the renormalization's bit events (this design's
// addition).  With i_bae_en low the interval, context and outstanding count
// pass through unchanged and no events are produced.  Combinational: the
// controller registers the result at the end of the bin's cycle.
module bae_regular_engine
  import bae_pkg::*;
(
  input  logic                i_bae_en,
  input  logic                i_bae_bin,
  input  logic [LOW_W-1:0]    i_bae_low,
  input  logic [RANGE_W-1:0]  i_bae_range,
  input  logic [OUTSTD_W-1:0] i_bae_outstd,
  input  logic                i_bae_valmps,
  input  logic [PSTATE_W-1:0] i_bae_pstate,
  output logic [LOW_W-1:0]    o_bae_r_low,
  output logic [RANGE_W-1:0]  o_bae_r_range,
  output logic [OUTSTD_W-1:0] o_bae_r_outstd,
  output logic                o_bae_r_valmps,
  output logic [PSTATE_W-1:0] o_bae_r_pstate,
  output bae_evs_t            o_bae_r_ev
);

  localparam int STEPS = 8;

  logic [7:0]          range_lps;
  logic [PSTATE_W-1:0] trans_lps, trans_mps;
  logic                matching_mps;
  logic [RANGE_W-1:0]  range_mps;
  logic [RANGE_W-1:0]  m_range;
  logic [LOW_W-1:0]    m_low;
  logic [LOW_W-1:0]    rn_low;
  logic [RANGE_W-1:0]  rn_range;
  logic [OUTSTD_W-1:0] rn_outstd;
  bae_ev_e             rn_ev [STEPS];

  bae_ctx_tables u_tables (
    .i_pstate   (i_bae_pstate),
    .i_qidx     (i_bae_range[7:6]),
    .o_range_lps(range_lps),
    .o_trans_lps(trans_lps),
    .o_trans_mps(trans_mps)
  );

  assign matching_mps = (i_bae_bin == i_bae_valmps);
  assign range_mps    = i_bae_range - RANGE_W'(range_lps);
  assign m_range      = matching_mps ? range_mps : RANGE_W'(range_lps);
  assign m_low        = matching_mps ? i_bae_low : i_bae_low + LOW_W'(range_mps);

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
    o_bae_r_ev = '{default: EV_NONE};
    if (i_bae_en) begin
      o_bae_r_low    = rn_low;
      o_bae_r_range  = rn_range;
      o_bae_r_outstd = rn_outstd;
      o_bae_r_pstate = matching_mps ? trans_mps : trans_lps;
      o_bae_r_valmps = (!matching_mps && i_bae_pstate == '0) ? ~i_bae_valmps
                                                             : i_bae_valmps;
      for (int i = 0; i < STEPS; i++) o_bae_r_ev[i] = rn_ev[i];
    end else begin
      o_bae_r_low    = i_bae_low;
      o_bae_r_range  = i_bae_range;
      o_bae_r_outstd = i_bae_outstd;
      o_bae_r_pstate = i_bae_pstate;
      o_bae_r_valmps = i_bae_valmps;
    end
  end

endmodule
