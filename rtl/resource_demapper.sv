// resource_demapper: extracts the PDSCH resource elements from one slot's
// resource grid.
//
// Write side: every FFT output bin is written into a grid RAM of NSC x NSYM
// complex words at (subcarrier k, symbol l).  Read side: the indices of the
// PDSCH resource elements (those not carrying DM-RS, PT-RS or other channels)
// are supplied as a stream (idx_valid/idx_ready, idx_k, idx_l); for every index
// the stored symbol appears on out_* one cycle later.  The output register is
// held while out_ready is low, and a new index is only taken when the register
// is free or being emptied.  The index generator (which subcarriers and symbols
// belong to the PDSCH allocation, and the mapping of subcarriers onto FFT bins)
// is outside this block, as in the document, where the indices are an input.
// Writing and reading the same location in the same cycle returns the old
// value.
module resource_demapper
  import pdsch_pkg::*;
#(
  parameter int NSC  = 1024,  // FFT bins per symbol
  parameter int NSYM = 14,    // OFDM symbols per slot
  parameter int W    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // grid write (from the FFT)
  input  logic                     wr_valid,
  input  logic [$clog2(NSC)-1:0]   wr_k,
  input  logic [$clog2(NSYM)-1:0]  wr_l,
  input  logic signed [W-1:0]      wr_re,
  input  logic signed [W-1:0]      wr_im,
  // index stream
  input  logic                     idx_valid,
  output logic                     idx_ready,
  input  logic [$clog2(NSC)-1:0]   idx_k,
  input  logic [$clog2(NSYM)-1:0]  idx_l,
  // extracted symbols
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [W-1:0]      out_re,
  output logic signed [W-1:0]      out_im
);
  localparam int KW = $clog2(NSC);
  localparam int LW = $clog2(NSYM);
  localparam int DEPTH = NSC * NSYM;
  localparam int AW = $clog2(DEPTH);

  logic [2*W-1:0] grid [DEPTH];

  function automatic logic [AW-1:0] addr(input logic [LW-1:0] l, input logic [KW-1:0] k);
    return AW'(l) * AW'(NSC) + AW'(k);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_valid) grid[addr(wr_l, wr_k)] <= {wr_re, wr_im};
  end

  assign idx_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (idx_ready) begin
      out_valid <= idx_valid;
      if (idx_valid) {out_re, out_im} <= grid[addr(idx_l, idx_k)];
    end
  end
endmodule
