// bae_mux: output multiplexer of the binary arithmetic encoder.
//
// Selects, by the current bin's encoding mode, the updated ivlLow, ivlRange,
// outstanding count and bit events of the engine that encoded the bin (the
// bypass engine's single event goes to slot 0).  The
// bypass engine does not change ivlRange, so for a bypass bin the range
// comes from i_cur_range, the value the controller holds.  The selected
// values go both to the encoder's output ports and back to the controller,
// which stores them for the next bin.  Combinational.  The multiplexer and
// its outputs are the original architecture's; selecting by the bin's mode,
// and the event outputs, are this design's.
module bae_mux
  import bae_pkg::*;
(
  input  bae_mode_e           i_mode,
  input  logic [RANGE_W-1:0]  i_cur_range,
  // bypass engine
  input  logic [LOW_W-1:0]    i_p_low,
  input  logic [OUTSTD_W-1:0] i_p_outstd,
  input  bae_ev_e             i_p_ev,
  // regular engine
  input  logic [LOW_W-1:0]    i_r_low,
  input  logic [RANGE_W-1:0]  i_r_range,
  input  logic [OUTSTD_W-1:0] i_r_outstd,
  input  bae_evs_t            i_r_ev,
  // termination engine
  input  logic [LOW_W-1:0]    i_t_low,
  input  logic [RANGE_W-1:0]  i_t_range,
  input  logic [OUTSTD_W-1:0] i_t_outstd,
  input  bae_evs_t            i_t_ev,
  // selected result
  output logic [LOW_W-1:0]    o_bae_low,
  output logic [RANGE_W-1:0]  o_bae_range,
  output logic [OUTSTD_W-1:0] o_bae_outstd,
  output bae_evs_t            o_bae_ev
);

  always_comb begin
    unique case (i_mode)
      MODE_BYPASS: begin
        o_bae_low    = i_p_low;
        o_bae_range  = i_cur_range;
        o_bae_outstd = i_p_outstd;
        o_bae_ev     = '{default: EV_NONE};
        o_bae_ev[0]  = i_p_ev;
      end
      MODE_TERM: begin
        o_bae_low    = i_t_low;
        o_bae_range  = i_t_range;
        o_bae_outstd = i_t_outstd;
        o_bae_ev     = i_t_ev;
      end
      default: begin
        o_bae_low    = i_r_low;
        o_bae_range  = i_r_range;
        o_bae_outstd = i_r_outstd;
        o_bae_ev     = i_r_ev;
      end
    endcase
  end

endmodule
