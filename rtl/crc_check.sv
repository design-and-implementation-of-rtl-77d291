// crc_check: checks and removes the CRC at the end of a bit stream.
//
// The stream b_0 .. b_{B-1} is the payload a_0 .. a_{A-1} followed by the L
// parity bits.  A Galois-type LFSR divides the whole stream by the generator
// polynomial (POLY holds its coefficients below x^L); the stream is error free
// when the remainder is zero.  The last L bits are held back in a shift
// register, so only the A payload bits are passed on: each new bit pushes the
// bit received L bits earlier out to out_bit.
//
// Interface: in_valid/in_ready/in_bit, in_last on the final parity bit;
// out_valid/out_ready/out_bit carry the payload (ready passes straight through,
// no bit is lost when out_ready is low).  One cycle after in_last, done pulses
// and ok tells whether the remainder was zero; ok stays until the next block.
// The LFSR division and the removal of the parity bits follow the document;
// streaming the payload before the verdict is this design's choice (a consumer
// that must not use unchecked data buffers it, as desegmentation does).
// Defaults: CRC24A, the polynomial of the transport block CRC.
module crc_check
  import pdsch_pkg::*;
#(
  parameter int          L    = 24,
  parameter logic [L-1:0] POLY = L'(CRC24A_POLY)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  input  logic in_last,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit,
  output logic done,
  output logic ok
);
  logic [L-1:0]         crc;
  logic [L-1:0]         hold;    // last L bits received
  logic [$clog2(L+1)-1:0] fill;  // how many of them are valid

  logic [L-1:0] crc_next;
  always_comb begin
    crc_next = {crc[L-2:0], 1'b0};
    if (crc[L-1] ^ in_bit) crc_next = crc_next ^ POLY;
  end

  assign in_ready  = out_ready;
  assign out_valid = in_valid && (fill == ($bits(fill))'(L));
  assign out_bit   = hold[L-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc  <= '0;
      hold <= '0;
      fill <= '0;
      done <= 1'b0;
      ok   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid && in_ready) begin
        if (in_last) begin
          crc  <= '0;
          fill <= '0;
          done <= 1'b1;
          ok   <= (crc_next == '0);
        end else begin
          crc  <= crc_next;
          hold <= {hold[L-2:0], in_bit};
          if (fill != ($bits(fill))'(L)) fill <= fill + 1'b1;
        end
      end
    end
  end
endmodule
