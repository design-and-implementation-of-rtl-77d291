// rate_recovery: LDPC de-rate matching of a transport block (BG2).
//
// For each of the C code blocks the block
//   1. works out its rate-matched length E_r (TS 38.212 5.4.2.1):
//        Q = G / Qm;  E_r = Qm*floor(Q/C) for r <= C - (Q mod C) - 1,
//                     E_r = Qm*ceil(Q/C)  otherwise,
//   2. deinterleaves the E_r soft values it receives (deinterleaver), and
//   3. writes them back into the circular buffer d[0..NCB-1] of the LDPC code
//      word, starting at k0 (0, 13Zc, 25Zc or 43Zc for redundancy versions 0..3)
//      and skipping the filler positions [K'-2Zc, K-2Zc), wrapping at NCB.
//      Values that land on an occupied position (repetition, E > NCB) are
//      added, which is soft combining.  Positions that were punctured or never
//      sent stay 0 ("unknown"); filler positions read out as the largest
//      positive value, a known 0 bit.
//   4. streams the NCB buffer values out (out_valid/out_ready, out_last on the
//      last value of a code block) and clears the buffer as it goes.
// NCB = 50*Zc is the buffer of base graph 2 without its first two systematic
// columns, which the transmitter never sends; the LDPC decoder restores those
// as zeros.
//
// Start: a one-cycle pulse on start latches g_total, c_seg, qm, rv, k_prime and
// k_cb.  done pulses after the last code block has been sent out.  After reset
// the buffer is cleared (NCB cycles, in_ready low).  The E_r rule, Zc = 384,
// NCB = 19200 and the filler handling follow the document; the streaming
// structure, soft combining and the k0 table for rv > 0 are taken from the
// standard and are this design's additions.
// Lint lists two unused signals: the deinterleaver's out_last (the block
// counts E_r itself) and the top three bits of the E_r product, which cannot
// be set for E_r <= EMAX and are computed only to keep the arithmetic exact.
module rate_recovery
  import pdsch_pkg::*;
#(
  parameter int ZC   = 384,
  parameter int NCB  = 50 * ZC,
  parameter int EMAX = 8192,
  parameter int DW   = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [16:0]         g_total,   // coded bits of the transport block
  input  logic [2:0]          c_seg,     // number of code blocks
  input  logic [3:0]          qm,        // modulation order
  input  logic [1:0]          rv,        // redundancy version
  input  logic [11:0]         k_prime,   // data + CRC bits per code block
  input  logic [11:0]         k_cb,      // code block size with fillers (10*Zc)
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [DW-1:0] out_data,
  output logic                out_last,
  output logic [2:0]          out_seg,
  output logic                done
);
  localparam int AW = $clog2(NCB + 1);
  localparam int EW = $clog2(EMAX + 1);
  typedef logic signed [DW-1:0] val_t;

  val_t buf_mem [NCB];

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_SETUP, S_IN, S_OUT} state_t;
  state_t state;

  logic [16:0]   g_r;
  logic [2:0]    c_r, seg;
  logic [3:0]    qm_r;
  logic [1:0]    rv_r;
  logic [AW-1:0] fill_s, fill_e, pos, optr;
  logic [EW-1:0] e_len;

  // E_r of the current code block
  logic [16:0] q_all, q_div, q_mod;
  logic [16:0] e_calc;
  always_comb begin
    q_all = g_r / 17'(qm_r);
    q_div = q_all / 17'(c_r);
    q_mod = q_all % 17'(c_r);
    if (17'(seg) <= 17'(c_r) - q_mod - 17'd1) e_calc = 17'(qm_r) * q_div;
    else                                       e_calc = 17'(qm_r) * (q_div + 17'd1);
  end

  function automatic logic [AW-1:0] k0_of(input logic [1:0] r);
    unique case (r)
      2'd0: return '0;
      2'd1: return AW'((13 * NCB / (50 * ZC)) * ZC);
      2'd2: return AW'((25 * NCB / (50 * ZC)) * ZC);
      default: return AW'((43 * NCB / (50 * ZC)) * ZC);
    endcase
  endfunction

  // deinterleaver in front of the buffer
  logic          di_in_ready, di_out_valid, di_out_last, di_done;
  logic [DW-1:0] di_out_data;

  deinterleaver #(.EMAX(EMAX), .DW(DW)) u_deint (
    .clk(clk), .rst_n(rst_n),
    .e_len(e_len), .qm(qm_r),
    .in_valid(in_valid && state == S_IN), .in_ready(di_in_ready), .in_data(in_data),
    .out_valid(di_out_valid), .out_ready(state == S_IN),
    .out_data(di_out_data), .out_last(di_out_last), .done(di_done)
  );

  assign in_ready = (state == S_IN) && di_in_ready;

  // placement of one deinterleaved value
  logic [AW-1:0] wpos;
  logic signed [DW:0] acc;
  always_comb begin
    wpos = (pos >= fill_s && pos < fill_e) ? fill_e : pos;
    if (wpos >= AW'(NCB)) wpos = '0;
    acc  = (DW+1)'(buf_mem[wpos[$clog2(NCB)-1:0]]) + (DW+1)'($signed(di_out_data));
  end

  function automatic val_t sat(input logic signed [DW:0] v);
    if (v > (DW+1)'(2**(DW-1) - 1))  return val_t'(2**(DW-1) - 1);
    if (v < -(DW+1)'(2**(DW-1) - 1)) return -val_t'(2**(DW-1) - 1);
    return val_t'(v);
  endfunction

  assign out_valid = (state == S_OUT);
  assign out_data  = (optr >= fill_s && optr < fill_e) ? val_t'(2**(DW-1) - 1)
                                                       : buf_mem[optr[$clog2(NCB)-1:0]];
  assign out_last  = (state == S_OUT) && (optr == AW'(NCB - 1));
  assign out_seg   = seg;

  always_ff @(posedge clk) begin
    if (state == S_CLEAR)
      buf_mem[optr[$clog2(NCB)-1:0]] <= '0;
    else if (state == S_IN && di_out_valid)
      buf_mem[wpos[$clog2(NCB)-1:0]] <= sat(acc);
    else if (state == S_OUT && out_ready)
      buf_mem[optr[$clog2(NCB)-1:0]] <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_CLEAR;
      g_r    <= '0;
      c_r    <= 3'd1;
      qm_r   <= 4'd6;
      rv_r   <= '0;
      seg    <= '0;
      fill_s <= '0;
      fill_e <= '0;
      pos    <= '0;
      optr   <= '0;
      e_len  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_CLEAR: begin
          optr <= optr + 1'b1;
          if (optr == AW'(NCB - 1)) begin
            optr  <= '0;
            state <= S_IDLE;
          end
        end
        S_IDLE: if (start) begin
          g_r    <= g_total;
          c_r    <= c_seg;
          qm_r   <= qm;
          rv_r   <= rv;
          fill_s <= AW'(k_prime) - AW'(2 * ZC);
          fill_e <= AW'(k_cb) - AW'(2 * ZC);
          seg    <= '0;
          state  <= S_SETUP;
        end
        S_SETUP: begin
          e_len <= EW'(e_calc);
          pos   <= k0_of(rv_r);
          state <= S_IN;
        end
        S_IN: begin
          if (di_out_valid) pos <= (wpos == AW'(NCB - 1)) ? '0 : wpos + 1'b1;
          if (di_done) begin
            optr  <= '0;
            state <= S_OUT;
          end
        end
        S_OUT: if (out_ready) begin
          optr <= optr + 1'b1;
          if (optr == AW'(NCB - 1)) begin
            optr <= '0;
            if (seg == c_r - 1'b1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              seg   <= seg + 1'b1;
              state <= S_SETUP;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
