// bae_zld: leading-zero detector (ZLD) for ivlRange.
//
// o_count is the number of zeros above the most significant one of i_value,
// i.e. how many left shifts bring the value's top bit to a one; W when the
// value is zero.  Written as a priority scan from the top bit, which
// synthesis turns into a small priority encoder.  Combinational.
// The original architecture renormalizes in one cycle from a ZLD of
// ivlRange; how the ZLD itself is built is this design's choice.
module bae_zld #(
  parameter int W  = 9,
  parameter int CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  i_value,
  output logic [CW-1:0] o_count
);

  always_comb begin
    o_count = CW'(W);
    for (int i = 0; i < W; i++) begin
      if (i_value[i]) o_count = CW'(W - 1 - i);
    end
  end

endmodule
