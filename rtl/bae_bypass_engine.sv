// bae_bypass_engine: encodes one bypass (equiprobable) bin.
//
// Follows the HEVC EncodeBypass process.  ivlLow is doubled and, for a 1 bin,
// ivlRange is added; ivlRange itself does not change.  The 11-bit result
// then takes one renormalization step with doubled thresholds: at or above
// 1024 it emits PutBit(1) and loses 1024, below 512 it emits PutBit(0),
// otherwise it loses 512 and counts one more outstanding bit.  So a bypass
// bin always produces exactly one event.  Adder, mux and the single
// renormalization step follow the original engine drawing.
//
// Interface (names as in the architecture): i_bae_en, i_bae_bin, i_bae_low,
// i_bae_range, i_bae_outstd in; o_bae_p_low, o_bae_p_outstd out; o_bae_p_ev
// is the bin's single bit event (this design's addition).  With i_bae_en low
// the values pass through and no event is produced.  Combinational.
module bae_bypass_engine
  import bae_pkg::*;
(
  input  logic                i_bae_en,
  input  logic                i_bae_bin,
  input  logic [LOW_W-1:0]    i_bae_low,
  input  logic [RANGE_W-1:0]  i_bae_range,
  input  logic [OUTSTD_W-1:0] i_bae_outstd,
  output logic [LOW_W-1:0]    o_bae_p_low,
  output logic [OUTSTD_W-1:0] o_bae_p_outstd,
  output bae_ev_e             o_bae_p_ev
);

  logic [LOW_W:0] m_bae_p_low;   // doubled ivlLow, plus ivlRange for a 1 bin

  assign m_bae_p_low = (i_bae_bin != 1'b0) ? {i_bae_low, 1'b0} + (LOW_W+1)'(i_bae_range)
                                           : {i_bae_low, 1'b0};

  always_comb begin
    o_bae_p_ev     = EV_NONE;
    o_bae_p_low    = i_bae_low;
    o_bae_p_outstd = i_bae_outstd;
    if (i_bae_en) begin
      if (m_bae_p_low >= 11'd1024) begin
        o_bae_p_ev     = EV_PUT1;
        o_bae_p_low    = LOW_W'(m_bae_p_low - 11'd1024);
        o_bae_p_outstd = '0;
      end else if (m_bae_p_low < 11'd512) begin
        o_bae_p_ev     = EV_PUT0;
        o_bae_p_low    = LOW_W'(m_bae_p_low);
        o_bae_p_outstd = '0;
      end else begin
        o_bae_p_ev     = EV_OUT;
        o_bae_p_low    = LOW_W'(m_bae_p_low - 11'd512);
        o_bae_p_outstd = i_bae_outstd + 1'b1;
      end
    end
  end

endmodule
