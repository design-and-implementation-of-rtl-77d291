// descrambler: removes the PDSCH scrambling with the length-31 Gold sequence.
//
// c(n) = x1(n+Nc) xor x2(n+Nc) with Nc = 1600,
// x1(n+31) = x1(n+3) xor x1(n),                      x1 = 1, 0, 0, ... at start,
// x2(n+31) = x2(n+3) xor x2(n+2) xor x2(n+1) xor x2(n), x2 = c_init at start,
// c_init = n_RNTI * 2^15 + q * 2^14 + n_ID (TS 38.211 7.3.1.1).
// Both sequences are 31-bit shift registers holding x(n) .. x(n+30).
//
// Operation: a rising edge on enable loads the registers from rnti, nid and q
// and the block then clocks them Nc times with busy high (1600 cycles).  After
// that each input accepted (valid_in && !busy) is descrambled and presented
// combinationally on data_out/valid_out, and the registers step once.  After
// data_len inputs the block returns to idle (busy high again) until the next
// rising edge of enable.
//
// With DW = 1 (the document's interface) a data bit is XORed with c(n).  With
// DW > 1 the data is a two's-complement soft value whose sign is flipped where
// c(n) = 1, which is the same operation on log-likelihood ratios; the chain's
// top level uses this form.  The LFSR equations, initial values, Nc and the
// port list follow the document; the combinational output, the return to idle
// and the soft-value mode are this design's own.
module descrambler
  import pdsch_pkg::*;
#(
  parameter int DW = 1,
  parameter int NC = GOLD_NC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic [15:0]          rnti,
  input  logic [9:0]           nid,
  input  logic                 q,
  input  logic [16:0]          data_len,
  input  logic                 valid_in,
  input  logic signed [DW-1:0] data_in,
  output logic                 valid_out,
  output logic signed [DW-1:0] data_out,
  output logic                 busy,
  output logic                 c_out        // current Gold sequence bit
);
  typedef enum logic [1:0] {S_IDLE, S_WARM, S_RUN} state_t;
  state_t state;

  logic [30:0] x1, x2;
  logic [10:0] warm_cnt;
  logic [16:0] data_cnt;
  logic        en_d;
  logic        c;

  function automatic logic [30:0] step_x1(input logic [30:0] s);
    return {s[3] ^ s[0], s[30:1]};
  endfunction
  function automatic logic [30:0] step_x2(input logic [30:0] s);
    return {s[3] ^ s[2] ^ s[1] ^ s[0], s[30:1]};
  endfunction

  assign c         = x1[0] ^ x2[0];
  assign c_out     = c;
  assign busy      = (state != S_RUN);
  assign valid_out = valid_in && (state == S_RUN);

  always_comb begin
    if (DW == 1)  data_out = data_in ^ DW'(c);
    else if (c)   data_out = (data_in == {1'b1, {(DW-1){1'b0}}}) ? {1'b0, {(DW-1){1'b1}}} : -data_in;
    else          data_out = data_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      x1       <= '0;
      x2       <= '0;
      warm_cnt <= '0;
      data_cnt <= '0;
      en_d     <= 1'b0;
    end else begin
      en_d <= enable;
      unique case (state)
        S_IDLE: if (enable && !en_d) begin
          x1       <= 31'd1;
          x2       <= 31'({rnti, q, 4'b0000, nid});   // rnti*2^15 + q*2^14 + nid
          warm_cnt <= '0;
          data_cnt <= '0;
          state    <= (NC == 0) ? S_RUN : S_WARM;
        end
        S_WARM: begin
          x1       <= step_x1(x1);
          x2       <= step_x2(x2);
          warm_cnt <= warm_cnt + 1'b1;
          if (warm_cnt == 11'(NC - 1)) state <= S_RUN;
        end
        S_RUN: if (valid_in) begin
          x1       <= step_x1(x1);
          x2       <= step_x2(x2);
          data_cnt <= data_cnt + 1'b1;
          if (data_cnt == data_len - 1'b1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
