// bae_renorm: one-cycle renormalization (RenormE) of the arithmetic coder.
//
// The HEVC encoder renormalizes with a loop that doubles ivlRange until it is
// at least 256, and on each pass emits a bit (ivlLow < 256: PutBit(0);
// ivlLow >= 512: PutBit(1) and ivlLow -= 512) or counts an outstanding bit
// (otherwise, ivlLow -= 256), then doubles ivlLow.  Here the number of passes
// comes from a leading-zero detector on ivlRange, and the passes are unrolled
// into MAX_STEPS copies of one step, so the whole renormalization takes one
// combinational pass.  ivlRange is shifted left by the count in one go.
//
// Each pass looks only at bits 9 and 8 of the current ivlLow: bit 9 set means
// PutBit(1), bit 8 set (bit 9 clear) means one more outstanding bit, both
// clear means PutBit(0).  A PutBit clears the outstanding count (those bits
// are released with it); the outstanding bit increments it.
//
// Interface: i_low/i_range/i_outstd are the interval after the engine's
// arithmetic; o_low/o_range/o_outstd are the renormalized values; o_ev lists
// the passes' events (EV_PUT0/EV_PUT1/EV_OUT), pass 0 in slot 0, EV_NONE in
// unused slots.  Inputs must satisfy
// i_low + i_range <= 1024, which the coder keeps by construction.
// Combinational, no clock.  One-cycle renormalization through a ZLD is the
// original architecture's idea; the chain of unrolled passes and the event
// list are this design's.
module bae_renorm
  import bae_pkg::*;
#(
  parameter int MAX_STEPS = 8
) (
  input  logic [LOW_W-1:0]    i_low,
  input  logic [RANGE_W-1:0]  i_range,
  input  logic [OUTSTD_W-1:0] i_outstd,
  output logic [LOW_W-1:0]    o_low,
  output logic [RANGE_W-1:0]  o_range,
  output logic [OUTSTD_W-1:0] o_outstd,
  output bae_ev_e             o_ev [MAX_STEPS]
);

  logic [3:0] zld_count;
  logic [3:0] shift;

  bae_zld #(.W(RANGE_W), .CW(4)) u_zld (
    .i_value(i_range),
    .o_count(zld_count)
  );

  assign shift   = (zld_count > 4'(MAX_STEPS)) ? 4'(MAX_STEPS) : zld_count;

  always_comb begin
    logic [LOW_W-1:0]    low;
    logic [OUTSTD_W-1:0] outstd;
    low    = i_low;
    outstd = i_outstd;
    for (int i = 0; i < MAX_STEPS; i++) begin
      o_ev[i] = EV_NONE;
      if (4'(i) < shift) begin
        if (low[9]) begin
          o_ev[i] = EV_PUT1;
          low[9]  = 1'b0;
          outstd  = '0;
        end else if (low[8]) begin
          o_ev[i] = EV_OUT;
          low[8]  = 1'b0;
          outstd  = outstd + 1'b1;
        end else begin
          o_ev[i] = EV_PUT0;
          outstd  = '0;
        end
        low = {low[LOW_W-2:0], 1'b0};
      end
    end
    o_low    = low;
    o_outstd = outstd;
    o_range  = i_range << shift;
  end

endmodule
