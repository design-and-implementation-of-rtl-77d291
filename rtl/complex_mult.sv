// complex_mult: fixed-point complex multiplier used by the FFT butterfly.
//
// p = a * w with a and w in Q1.14.  The four real products are formed at full
// width, combined, and rounded back to Q1.14 (round half up, then arithmetic
// shift).  The result is not saturated: with |w| <= 1 and the butterfly's
// scaling the product stays in range.  Purely combinational.  The document
// names a fixed-point complex multiplier in front of the butterfly; the
// rounding rule is this design's own.
module complex_mult
  import pdsch_pkg::*;
#(
  parameter int W    = 16,
  parameter int FRAC = 14
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] w_re,
  input  logic signed [W-1:0] w_im,
  output logic signed [W:0]   p_re,   // one guard bit
  output logic signed [W:0]   p_im
);
  logic signed [2*W+1:0] re_full, im_full;

  always_comb begin
    re_full = (2*W+2)'(a_re * w_re) - (2*W+2)'(a_im * w_im) + (2*W+2)'(2**(FRAC-1));
    im_full = (2*W+2)'(a_re * w_im) + (2*W+2)'(a_im * w_re) + (2*W+2)'(2**(FRAC-1));
    p_re    = (W+1)'(re_full >>> FRAC);
    p_im    = (W+1)'(im_full >>> FRAC);
  end
endmodule
