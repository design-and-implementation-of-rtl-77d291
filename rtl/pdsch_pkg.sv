// pdsch_pkg: constants and small helpers shared by the PDSCH receive chain.
//
// Number formats: time samples, frequency-domain symbols and soft bits are
// 16-bit two's complement.  Samples and symbols use 1 sign bit, 1 integer bit
// and 14 fraction bits (Q1.14), the format chosen for the 64-QAM path.  The LDPC
// decoder reads the same 16-bit soft values; its min-sum arithmetic does not
// depend on where the binary point sits.  CRC polynomials and the Gold-sequence
// offset are the 5G NR values (TS 38.212 / 38.211).
// Every module imports the whole package, so lint reports the constants a
// given module does not use (for example the CRC16 and CRC24C polynomials,
// which no block of this chain needs, and FRAC_W, kept for reference).
package pdsch_pkg;

  localparam int SAMPLE_W = 16;   // width of a real or imaginary sample
  localparam int FRAC_W   = 14;   // fraction bits of the Q1.14 format
  localparam int LLR_W    = 16;   // width of a soft bit

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [LLR_W-1:0]    llr_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // CRC generator polynomials without the x^L term (TS 38.212 5.1)
  localparam logic [23:0] CRC24A_POLY = 24'h864CFB;
  localparam logic [23:0] CRC24B_POLY = 24'h800063;
  localparam logic [23:0] CRC24C_POLY = 24'hB2B117;
  localparam logic [15:0] CRC16_POLY  = 16'h1021;

  // Offset of the scrambling Gold sequence (TS 38.211 5.2.1)
  localparam int GOLD_NC = 1600;

  // Largest and smallest soft values
  localparam llr_t LLR_MAX = llr_t'(2**(LLR_W-1) - 1);
  localparam llr_t LLR_MIN = llr_t'(-(2**(LLR_W-1) - 1));

  // Saturate a wide signed value to a soft value
  function automatic llr_t sat_llr(input logic signed [31:0] v);
    if (v > 32'(LLR_MAX)) return LLR_MAX;
    if (v < 32'(LLR_MIN)) return LLR_MIN;
    return llr_t'(v);
  endfunction

endpackage
