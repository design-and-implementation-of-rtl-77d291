// cp_removal: drops the cyclic prefix in front of every OFDM symbol.
//
// Time-domain samples arrive one per cycle (in_valid).  A sample counter walks
// through each symbol: the first CP samples are discarded and the following
// NFFT samples are passed to the FFT.  With the normal cyclic prefix the CP is
// 144*k*2^-mu basic units, and 16*k units longer for the first symbol of every
// half subframe (symbols l = 0 and l = 7*2^mu).  At an FFT size of 1024 this is
// 72 samples, or 80 for the long symbols; the extended prefix is 256 samples
// for every symbol.  The defaults follow that formula for NFFT = 1024.
//
// Interface: in_valid/in_re/in_im from the sample source; out_valid/out_re/
// out_im carry the kept samples with out_first on the first sample of a symbol
// and out_last on the last.  out_sym is the index of the symbol within the half
// subframe.  One cycle of latency; no back-pressure (the source must not send
// samples the FFT cannot take, see the top level).  The choice of which symbol
// is "long" from a running symbol counter after reset is this design's own.
module cp_removal
  import pdsch_pkg::*;
#(
  parameter int NFFT        = 1024,
  parameter int CP_LEN      = 72,   // normal CP, samples
  parameter int CP_LONG     = 80,   // CP of symbols 0 and 7*2^mu
  parameter int SYM_PER_HALF = 7,   // 7*2^mu symbols per half subframe (mu = 0)
  parameter bit EXTENDED    = 1'b0, // extended cyclic prefix
  parameter int CP_EXT      = 256
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_re,
  input  sample_t in_im,
  output logic    out_valid,
  output sample_t out_re,
  output sample_t out_im,
  output logic    out_first,
  output logic    out_last,
  output logic [$clog2(SYM_PER_HALF+1)-1:0] out_sym
);
  localparam int CW = $clog2(NFFT + CP_EXT + CP_LONG + 1);
  localparam int SW = $clog2(SYM_PER_HALF+1);

  logic [CW-1:0] cnt;
  logic [SW-1:0] sym;
  logic [CW-1:0] cp_now;

  always_comb begin
    if (EXTENDED)       cp_now = CW'(CP_EXT);
    else if (sym == '0) cp_now = CW'(CP_LONG);
    else                cp_now = CW'(CP_LEN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      sym       <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_sym   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      if (in_valid) begin
        if (cnt >= cp_now) begin
          out_valid <= 1'b1;
          out_re    <= in_re;
          out_im    <= in_im;
          out_first <= (cnt == cp_now);
          out_last  <= (cnt == cp_now + CW'(NFFT - 1));
          out_sym   <= sym;
        end
        if (cnt == cp_now + CW'(NFFT - 1)) begin
          cnt <= '0;
          sym <= (sym == SW'(SYM_PER_HALF - 1)) ? '0 : sym + 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
