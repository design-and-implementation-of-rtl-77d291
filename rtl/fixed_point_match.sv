// fixed_point_match: rescales the FFT output to the demapper's input format.
//
// The FFT halves its data on every stage, so its bins come out as DFT / N.
// The demapper compares the symbols with constellation points in Q1.14, so the
// bins are multiplied back up by 2^SHIFT (arithmetic left shift) and saturated
// to the 16-bit range.  With the default SHIFT = 7 a time signal whose mean
// power sits about 16 dB below full scale maps onto unit-power constellations.
// One register stage; valid and the side-band tag (TAG_W bits, e.g. the bin
// index) travel with the data.  The document places such a matching stage
// between the FFT and the demapper; the shift amount is this design's own.
module fixed_point_match
  import pdsch_pkg::*;
#(
  parameter int W     = 16,
  parameter int SHIFT = 7,
  parameter int TAG_W = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic [TAG_W-1:0]    in_tag,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic [TAG_W-1:0]    out_tag
);
  localparam int WW = W + SHIFT;

  function automatic logic signed [W-1:0] scale_sat(input logic signed [W-1:0] x);
    logic signed [WW-1:0] y;
    y = WW'(x) <<< SHIFT;
    if (y > WW'(2**(W-1) - 1))   return (W)'(2**(W-1) - 1);
    if (y < -WW'(2**(W-1) - 1))  return -(W)'(2**(W-1) - 1);
    return W'(y);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_re  <= scale_sat(in_re);
        out_im  <= scale_sat(in_im);
        out_tag <= in_tag;
      end
    end
  end
endmodule
