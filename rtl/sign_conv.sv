// Sign conversion stage of the VHBCSE constant multiplier.
//
// The coefficient h is a 17-bit two's complement number. The multiplier
// core only handles a 16-bit non-negative operand, so for a negative h
// (sign bit h[16] = 1) the lower 16 bits are replaced by their one's
// complement. Since -h = ~h + 1, that leaves hm = |h| - 1; the missing
// "+1" (one extra x) and the final negation are put back by the final
// addition stage (final_add). For h >= 0, hm = h[15:0].
//
// Interface: h in, hm (the multiplexed coefficient) and neg (= h[16]) out.
// Purely combinational. The one's-complement-and-select step follows the
// architecture; handing the sign on as a separate flag is this design's way
// of telling the final stage which version to pick.
module sign_conv
  import vhbcse_pkg::*;
(
  input  logic [H_W-1:0]  h,
  output logic [HM_W-1:0] hm,
  output logic            neg
);
  assign neg = h[H_W-1];
  assign hm  = neg ? ~h[HM_W-1:0] : h[HM_W-1:0];
endmodule
