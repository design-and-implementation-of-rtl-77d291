// fft_butterfly: radix-2 decimation-in-time butterfly.
//
// Computes A = (a + b*W) / 2 and B = (a - b*W) / 2.  The product b*W comes from
// complex_mult.  The halving on every stage keeps a 1024-point transform inside
// the 16-bit range; over log2(N) stages the FFT output is the DFT divided by N.
// The division by 2 rounds half up.  Combinational; the FFT controller
// registers the results into its data RAMs.  The butterfly equations are the
// document's; the per-stage scaling is this design's way of avoiding overflow.
module fft_butterfly
  import pdsch_pkg::*;
#(
  parameter int W    = 16,
  parameter int FRAC = 14
) (
  input  logic signed [W-1:0] a_re, a_im,
  input  logic signed [W-1:0] b_re, b_im,
  input  logic signed [W-1:0] w_re, w_im,
  output logic signed [W-1:0] y0_re, y0_im,
  output logic signed [W-1:0] y1_re, y1_im
);
  logic signed [W:0]   bw_re, bw_im;
  logic signed [W+1:0] s0_re, s0_im, s1_re, s1_im;

  complex_mult #(.W(W), .FRAC(FRAC)) u_mult (
    .a_re(b_re), .a_im(b_im), .w_re(w_re), .w_im(w_im),
    .p_re(bw_re), .p_im(bw_im)
  );

  always_comb begin
    s0_re = (W+2)'(a_re) + (W+2)'(bw_re) + (W+2)'(1);
    s0_im = (W+2)'(a_im) + (W+2)'(bw_im) + (W+2)'(1);
    s1_re = (W+2)'(a_re) - (W+2)'(bw_re) + (W+2)'(1);
    s1_im = (W+2)'(a_im) - (W+2)'(bw_im) + (W+2)'(1);
    y0_re = W'(s0_re >>> 1);
    y0_im = W'(s0_im >>> 1);
    y1_re = W'(s1_re >>> 1);
    y1_im = W'(s1_im >>> 1);
  end
endmodule
