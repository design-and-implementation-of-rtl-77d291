// punctured_retrieval: recovers the 2*Zc punctured systematic bits and joins
// them with the decoder's decisions.
//
// The transmitter never sends the first PUNC*ZC code bits.  Each of them takes
// part in a number of parity checks; in a check whose other bits are all known
// the XOR of those bits is an estimate of the missing one (single parity check
// decoding).  The block walks through the same base-graph entry list as the
// decoder (cfg_* port), row by row:
//   - for every bit of check row m it reads the hard decision hd[n] through
//     hd_raddr/hd_rdata and XORs the bits of the non-punctured columns;
//   - if the row holds exactly one punctured bit, the XOR is a vote for that
//     bit; votes are counted per punctured bit (ones and total).
// Rows with more than one punctured bit give no estimate and are skipped.
// The final value of a punctured bit is the majority of its votes (repetition
// decoding); with no votes or a tie the decoder's own decision is kept.
// Afterwards the KB*ZC systematic bits are streamed out (out_valid/out_ready):
// the voted bits for n < PUNC*ZC and hd[n] for the rest.  done pulses after the
// last bit; it releases the decoder.
//
// The SPC-per-row estimate, the majority vote and the concatenation with the
// decoder output follow the document.  The document forms hard decisions from
// the received values scaled by 2/sigma^2 (nine multipliers); the scaling
// cannot change a sign, and this design takes the decoder's decisions instead,
// which also covers bits that were never transmitted.
module punctured_retrieval
  import pdsch_pkg::*;
#(
  parameter int ZC        = 384,
  parameter int NB        = 52,
  parameter int KB        = 10,   // systematic column blocks
  parameter int PUNC      = 2,
  parameter int MAX_EDGES = 197,
  parameter int VW        = 6     // vote counter width
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           cfg_we,
  input  logic [$clog2(MAX_EDGES)-1:0]   cfg_addr,
  input  logic [$clog2(NB)-1:0]          cfg_col,
  input  logic [9:0]                     cfg_shift,
  input  logic                           cfg_last,
  input  logic [$clog2(MAX_EDGES+1)-1:0] cfg_n_edges,
  input  logic                           start,
  output logic [$clog2(NB*ZC)-1:0]       hd_raddr,
  input  logic                           hd_rdata,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic                           out_data,
  output logic                           out_last,
  output logic                           done,
  output logic [15:0]                    vote_rows   // rows that voted, last run
);
  localparam int NAW = $clog2(NB * ZC);
  localparam int NP  = PUNC * ZC;
  localparam int PAW = (NP > 1) ? $clog2(NP) : 1;
  localparam int KW  = $clog2(KB * ZC + 1);
  localparam int EAW = $clog2(MAX_EDGES);
  localparam int ENW = $clog2(MAX_EDGES + 1);
  localparam int ZW  = (ZC > 1) ? $clog2(ZC) : 1;
  localparam int SW  = ZW + 1;
  localparam int CW  = $clog2(NB);

  logic [CW-1:0] e_col   [MAX_EDGES];
  logic [ZW-1:0] e_shift [MAX_EDGES];
  logic          e_last  [MAX_EDGES];
  logic [VW-1:0] v_ones  [NP];
  logic [VW-1:0] v_tot   [NP];

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      e_col[cfg_addr]   <= cfg_col;
      e_shift[cfg_addr] <= ZW'(cfg_shift % 10'(ZC));
      e_last[cfg_addr]  <= cfg_last;
    end
  end

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_ROW, S_OUT} state_t;
  state_t state;

  logic [EAW-1:0] k, row_start;
  logic [ZW-1:0]  z;
  logic [KW-1:0]  ocnt;
  logic           x_acc;
  logic [1:0]     p_cnt;
  logic [PAW-1:0] p_idx;

  // column of the current edge
  logic [SW-1:0]  zs;
  logic [NAW-1:0] n_col;
  logic           is_punc;
  always_comb begin
    zs = SW'(z) + SW'(e_shift[k]);
    if (zs >= SW'(ZC)) zs = zs - SW'(ZC);
    n_col   = NAW'(e_col[k]) * NAW'(ZC) + NAW'(zs);
    is_punc = (e_col[k] < CW'(PUNC));
  end

  // row result including the current (last) edge
  logic           x_fin;
  logic [1:0]     p_fin;
  logic [PAW-1:0] pi_fin;
  always_comb begin
    x_fin  = is_punc ? x_acc : (x_acc ^ hd_rdata);
    p_fin  = (is_punc && p_cnt != 2'd3) ? p_cnt + 1'b1 : p_cnt;
    pi_fin = is_punc ? PAW'(n_col) : p_idx;
  end

  assign hd_raddr = (state == S_OUT) ? NAW'(ocnt) : n_col;

  // output of one systematic bit
  logic [PAW-1:0] o_p;
  logic           o_bit;
  always_comb begin
    o_p   = PAW'(ocnt);
    o_bit = hd_rdata;
    if (ocnt < KW'(NP) && v_tot[o_p] != '0) begin
      if ({v_ones[o_p], 1'b0} > {1'b0, v_tot[o_p]})      o_bit = 1'b1;
      else if ({v_ones[o_p], 1'b0} < {1'b0, v_tot[o_p]}) o_bit = 1'b0;
    end
  end

  assign out_valid = (state == S_OUT);
  assign out_data  = o_bit;
  assign out_last  = (state == S_OUT) && (ocnt == KW'(KB * ZC - 1));

  // vote counters
  always_ff @(posedge clk) begin
    if (state == S_CLEAR) begin
      v_ones[PAW'(ocnt)] <= '0;
      v_tot[PAW'(ocnt)]  <= '0;
    end else if (state == S_ROW && e_last[k] && p_fin == 2'd1) begin
      if (v_tot[pi_fin] != '1) begin
        v_tot[pi_fin]  <= v_tot[pi_fin] + 1'b1;
        v_ones[pi_fin] <= v_ones[pi_fin] + VW'(x_fin);
      end
    end else if (state == S_OUT && out_ready && ocnt < KW'(NP)) begin
      v_ones[o_p] <= '0;
      v_tot[o_p]  <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      k         <= '0;
      row_start <= '0;
      z         <= '0;
      ocnt      <= '0;
      x_acc     <= 1'b0;
      p_cnt     <= '0;
      p_idx     <= '0;
      done      <= 1'b0;
      vote_rows <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_CLEAR: begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == KW'(NP - 1)) begin
            ocnt  <= '0;
            state <= S_IDLE;
          end
        end
        S_IDLE: if (start) begin
          k         <= '0;
          row_start <= '0;
          z         <= '0;
          x_acc     <= 1'b0;
          p_cnt     <= '0;
          vote_rows <= '0;
          state     <= S_ROW;
        end
        S_ROW: begin
          if (e_last[k]) begin
            if (p_fin == 2'd1) vote_rows <= vote_rows + 1'b1;
            x_acc <= 1'b0;
            p_cnt <= '0;
            if (z == ZW'(ZC - 1)) begin
              z <= '0;
              if (ENW'(k) + 1'b1 == cfg_n_edges) begin
                ocnt  <= '0;
                state <= S_OUT;
              end else begin
                k         <= k + 1'b1;
                row_start <= k + 1'b1;
              end
            end else begin
              z <= z + 1'b1;
              k <= row_start;
            end
          end else begin
            x_acc <= x_fin;
            p_cnt <= p_fin;
            p_idx <= pi_fin;
            k     <= k + 1'b1;
          end
        end
        S_OUT: if (out_ready) begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == KW'(KB * ZC - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
