// desegmentation: joins the decoded code blocks back into one transport block.
//
// Each of the no_segments code blocks arrives as data_len bits (K = 10*Zc for
// base graph 2): K' = K - F data and CRC bits followed by F filler bits.  For
// every block the block
//   1. drops the filler bits,
//   2. runs the other K' bits through a CRC24B check (crc_check) that strips
//      the crc_bits parity bits and stores the K' - L payload bits in a buffer,
//   3. once the CRC verdict is known, sends the buffered payload on out_*.
// With a single code block the transmitter adds no code block CRC; crc_bits = 0
// then passes all K' bits.  The output of all blocks together is the transport
// block with its own CRC24A, which the top level checks.
//
// Interface: start (one-cycle pulse) latches the sizes; bits enter on
// in_valid/in_ready/in_bit; payload leaves on out_valid/out_ready/out_bit with
// out_last on the very last bit; done pulses after it.  seg_ok is set when all
// code block CRCs passed; fail_count counts the blocks that failed.  A failing
// block is still sent on, so that the stream keeps its length; the transport
// block CRC will then fail too.  Sizes and the order filler removal, CRC24B
// check, concatenation follow the document; forwarding failed blocks is this
// design's choice.
// The inner CRC24B stage's in_ready is not looked at (lint lists it as
// unused): its out_ready is tied high, so it takes every bit it is offered.
module desegmentation
  import pdsch_pkg::*;
#(
  parameter int KMAX = 3840
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] data_len,     // K, bits per code block incl. fillers
  input  logic [6:0]  filler_bits,  // F
  input  logic [4:0]  crc_bits,     // L of the code block CRC (24 or 0)
  input  logic [2:0]  no_segments,  // C
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_bit,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_bit,
  output logic        out_last,
  output logic        done,
  output logic        seg_ok,
  output logic [2:0]  fail_count
);
  localparam int AW = $clog2(KMAX + 1);

  typedef enum logic [2:0] {S_IDLE, S_IN, S_CHK, S_OUT} state_t;
  state_t state;

  logic          buf_mem [KMAX];
  logic [11:0]   k_r;
  logic [6:0]    f_r;
  logic          use_crc;
  logic [2:0]    c_r, seg;
  logic [11:0]   icnt;
  logic [AW-1:0] wptr, rptr;
  logic          crc_seen, crc_pass;

  // CRC24B check of the data + CRC part of the block
  logic is_data, data_last;
  logic cc_out_valid, cc_out_bit, cc_done, cc_ok, cc_in_ready;
  assign is_data   = (icnt < k_r - 12'(f_r));
  assign data_last = (icnt == k_r - 12'(f_r) - 12'd1);

  crc_check #(.L(24), .POLY(CRC24B_POLY)) u_crc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(state == S_IN && in_valid && is_data && use_crc),
    .in_ready(cc_in_ready), .in_bit(in_bit), .in_last(data_last),
    .out_valid(cc_out_valid), .out_ready(1'b1), .out_bit(cc_out_bit),
    .done(cc_done), .ok(cc_ok)
  );

  assign in_ready = (state == S_IN);

  logic wr_en, wr_bit;
  always_comb begin
    if (use_crc) begin
      wr_en  = cc_out_valid;
      wr_bit = cc_out_bit;
    end else begin
      wr_en  = (state == S_IN) && in_valid && is_data;
      wr_bit = in_bit;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) buf_mem[wptr[$clog2(KMAX)-1:0]] <= wr_bit;
  end

  assign out_valid = (state == S_OUT);
  assign out_bit   = buf_mem[rptr[$clog2(KMAX)-1:0]];
  assign out_last  = (state == S_OUT) && (rptr == wptr - 1'b1) && (seg == c_r - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      k_r        <= '0;
      f_r        <= '0;
      use_crc    <= 1'b0;
      c_r        <= 3'd1;
      seg        <= '0;
      icnt       <= '0;
      wptr       <= '0;
      rptr       <= '0;
      crc_seen   <= 1'b0;
      crc_pass   <= 1'b0;
      done       <= 1'b0;
      seg_ok     <= 1'b0;
      fail_count <= '0;
    end else begin
      done <= 1'b0;
      if (cc_done) begin
        crc_seen <= 1'b1;
        crc_pass <= cc_ok;
      end
      if (wr_en) wptr <= wptr + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          k_r        <= data_len;
          f_r        <= filler_bits;
          use_crc    <= (crc_bits != '0);
          c_r        <= no_segments;
          seg        <= '0;
          icnt       <= '0;
          wptr       <= '0;
          crc_seen   <= 1'b0;
          seg_ok     <= 1'b1;
          fail_count <= '0;
          state      <= S_IN;
        end
        S_IN: if (in_valid) begin
          icnt <= icnt + 1'b1;
          if (icnt == k_r - 12'd1) state <= S_CHK;
        end
        S_CHK: if (crc_seen || !use_crc) begin
          if (use_crc && !crc_pass) begin
            seg_ok     <= 1'b0;
            fail_count <= fail_count + 1'b1;
          end
          rptr  <= '0;
          state <= S_OUT;
        end
        S_OUT: if (out_ready) begin
          rptr <= rptr + 1'b1;
          if (rptr == wptr - 1'b1) begin
            icnt     <= '0;
            wptr     <= '0;
            crc_seen <= 1'b0;
            if (seg == c_r - 1'b1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              seg   <= seg + 1'b1;
              state <= S_IN;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
