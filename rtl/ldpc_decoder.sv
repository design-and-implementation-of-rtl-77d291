// ldpc_decoder: quasi-cyclic LDPC decoder with the min-sum algorithm.
//
// Code: a parity-check matrix H expanded from a base graph of up to MAX_EDGES
// non-empty entries.  Every entry (row block i, column block j, shift V) stands
// for a ZC x ZC identity matrix cyclically shifted by P = V mod ZC.  The base
// graph is written through the cfg_* port as a list of entries in row order,
// cfg_last marking the last entry of a row block; cfg_n_edges gives the length
// of the list.  The list is data, not logic: base graph 2 of TS 38.212 (42 x 52,
// Zc = 384) is the configuration the receive chain is sized for.
//
// Decoding (flooding schedule, one edge per clock):
//   load   the (NB-PUNC)*ZC received soft values are accepted on in_*; the
//          first PUNC*ZC columns, which are punctured, start at 0.
//   init   for every column n: hard decision hd[n] = (total belief < 0), and
//          the new total of this iteration starts from the channel value.
//   row    for every check row m = i*ZC + z and each of its edges:
//          pass 1 forms q = total_prev[n] - R[e] (R = 0 in iteration 0) and
//                 tracks min1 = min |q|, the edge giving min1, min2 (the
//                 second minimum), the product of the signs and the parity of
//                 the hard decisions (syndrome of row m);
//          pass 2 writes R[e] = sign(q) * P * (e == argmin ? min2 : min1) and
//                 adds it to total_new[n]  (column sum = channel + all R).
//   stop   if every row's syndrome was 0, the hard decisions taken at init are
//          a codeword and decoding ends (early stop).  Otherwise, after
//          MAX_ITER iterations, hd is taken from the last totals.
// An iteration takes NB*ZC + 2*ZC*(edges) cycles.
//
// Results: done goes high and stays high until release; hd_raddr/hd_rdata
// read the decided bits, llr_raddr/llr_rdata the final total beliefs;
// iter_count and converged describe the run.
//
// Min-sum with two minima, the sign product, column sums and the hard-decision
// rule follow the document, as do Zc = 384, base graph 2 dimensions, the
// punctured first 2*Zc columns and 20 iterations.  The serial one-edge-per-cycle
// datapath, the RAM organisation and the early stop are this design's own.
module ldpc_decoder
  import pdsch_pkg::*;
#(
  parameter int ZC        = 384,
  parameter int NB        = 52,   // base graph columns
  parameter int PUNC      = 2,    // punctured leading column blocks
  parameter int MAX_EDGES = 197,  // non-empty base graph entries
  parameter int MAX_ITER  = 20,
  parameter int DW        = 16,   // soft value width
  parameter int TW        = 22    // total belief width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // base graph
  input  logic                         cfg_we,
  input  logic [$clog2(MAX_EDGES)-1:0] cfg_addr,
  input  logic [$clog2(NB)-1:0]        cfg_col,
  input  logic [9:0]                   cfg_shift,
  input  logic                         cfg_last,
  input  logic [$clog2(MAX_EDGES+1)-1:0] cfg_n_edges,
  // soft input
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic signed [DW-1:0]         in_data,
  // results
  output logic                         done,
  input  logic                         release_i,
  input  logic [$clog2(NB*ZC)-1:0]     hd_raddr,
  output logic                         hd_rdata,
  input  logic [$clog2(NB*ZC)-1:0]     llr_raddr,
  output logic signed [TW-1:0]         llr_rdata,
  output logic [$clog2(MAX_ITER+1)-1:0] iter_count,
  output logic                         converged
);
  localparam int NCOL = NB * ZC;
  localparam int NAW  = $clog2(NCOL);
  localparam int NCH  = (NB - PUNC) * ZC;
  localparam int EAW  = $clog2(MAX_EDGES);
  localparam int ENW  = $clog2(MAX_EDGES + 1);
  localparam int ZW   = (ZC > 1) ? $clog2(ZC) : 1;
  localparam int SW   = ZW + 1;
  localparam int MAW  = $clog2(MAX_EDGES * ZC);
  localparam int ITW  = $clog2(MAX_ITER + 1);
  localparam int CW   = $clog2(NB);

  typedef logic signed [DW-1:0] msg_t;
  typedef logic signed [TW-1:0] tot_t;
  typedef logic [DW-2:0]        mag_t;

  // ---------------- memories ----------------
  logic [CW-1:0] e_col   [MAX_EDGES];
  logic [ZW-1:0] e_shift [MAX_EDGES];
  logic          e_last  [MAX_EDGES];
  msg_t          chan    [NCH];
  tot_t          tot     [2*NCOL];   // two banks: [0, NCOL) and [NCOL, 2*NCOL)
  msg_t          rmsg    [MAX_EDGES * ZC];
  logic          hd      [NCOL];

  // address of column n in bank b of the total-belief RAM
  function automatic logic [NAW:0] ta(input logic b, input logic [NAW-1:0] n);
    return b ? (NAW+1)'(NCOL) + (NAW+1)'(n) : (NAW+1)'(n);
  endfunction

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      e_col[cfg_addr]   <= cfg_col;
      e_shift[cfg_addr] <= ZW'(cfg_shift % 10'(ZC));
      e_last[cfg_addr]  <= cfg_last;
    end
  end

  // ---------------- control state ----------------
  typedef enum logic [2:0] {S_LOAD, S_INIT, S_ROW, S_FINAL, S_DONE} state_t;
  state_t state;

  logic [NAW:0]   cnt;        // load / init / final column counter
  logic [EAW-1:0] k;          // current edge
  logic [EAW-1:0] row_start;  // first edge of the current row block
  logic [ZW-1:0]  z;          // row within the row block
  logic           pass2;
  logic           pb;         // bank of the previous totals
  logic [ITW-1:0] iter;
  logic           unsat;
  mag_t           min1, min2;
  logic [EAW-1:0] argmin;
  logic           sgn_prod, synd;

  // ---------------- per-edge datapath ----------------
  logic [SW-1:0]  zs;
  logic [NAW-1:0] n_col;
  logic [MAW-1:0] m_addr;
  tot_t           t_prev, q;
  msg_t           r_old, r_new;
  mag_t           q_mag, mag_sel;
  logic           q_neg;

  function automatic msg_t chan_val(input logic [NAW-1:0] n);
    if (n < NAW'(PUNC * ZC)) return '0;
    return chan[n - NAW'(PUNC * ZC)];
  endfunction

  always_comb begin
    zs     = SW'(z) + SW'(e_shift[k]);
    if (zs >= SW'(ZC)) zs = zs - SW'(ZC);
    n_col  = NAW'(e_col[k]) * NAW'(ZC) + NAW'(zs);
    m_addr = MAW'(k) * MAW'(ZC) + MAW'(z);
    t_prev = (iter == '0) ? TW'(chan_val(n_col)) : tot[ta(pb, n_col)];
    r_old  = (iter == '0) ? '0 : rmsg[m_addr];
    q      = t_prev - TW'(r_old);
    q_neg  = q[TW-1];
    if (q_neg) q_mag = (-q > TW'(2**(DW-1) - 1)) ? mag_t'(2**(DW-1) - 1) : mag_t'(-q);
    else       q_mag = (q  > TW'(2**(DW-1) - 1)) ? mag_t'(2**(DW-1) - 1) : mag_t'(q);
    mag_sel = (k == argmin) ? min2 : min1;
    r_new   = (sgn_prod ^ q_neg) ? -msg_t'({1'b0, mag_sel}) : msg_t'({1'b0, mag_sel});
  end

  function automatic tot_t sat_add(input tot_t a, input msg_t b);
    logic signed [TW:0] s;
    s = (TW+1)'(a) + (TW+1)'(b);
    if (s > (TW+1)'(2**(TW-1) - 1))  return tot_t'(2**(TW-1) - 1);
    if (s < -(TW+1)'(2**(TW-1) - 1)) return -tot_t'(2**(TW-1) - 1);
    return tot_t'(s);
  endfunction

  // ---------------- memory writes ----------------
  logic [NAW-1:0] cidx;
  tot_t           init_prev;
  assign cidx      = cnt[NAW-1:0];
  assign init_prev = (iter == '0) ? TW'(chan_val(cidx)) : tot[ta(pb, cidx)];

  always_ff @(posedge clk) begin
    unique case (state)
      S_LOAD:  if (in_valid) chan[cnt[$clog2(NCH)-1:0]] <= in_data;
      S_INIT: begin
        hd[cidx]       <= init_prev[TW-1];
        tot[ta(~pb, cidx)] <= TW'(chan_val(cidx));
      end
      S_ROW: if (pass2) begin
        rmsg[m_addr]      <= r_new;
        tot[ta(~pb, n_col)] <= sat_add(tot[ta(~pb, n_col)], r_new);
      end
      S_FINAL: hd[cidx] <= tot[ta(~pb, cidx)][TW-1];
      default: ;
    endcase
  end

  // ---------------- sequencing ----------------
  logic bank_out;   // bank holding the totals behind hd

  assign in_ready   = (state == S_LOAD);
  assign done       = (state == S_DONE);
  assign hd_rdata   = hd[hd_raddr];
  assign llr_rdata  = tot[ta(bank_out, llr_raddr)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_LOAD;
      cnt        <= '0;
      k          <= '0;
      row_start  <= '0;
      z          <= '0;
      pass2      <= 1'b0;
      pb         <= 1'b0;
      iter       <= '0;
      unsat      <= 1'b0;
      min1       <= '1;
      min2       <= '1;
      argmin     <= '0;
      sgn_prod   <= 1'b0;
      synd       <= 1'b0;
      iter_count <= '0;
      converged  <= 1'b0;
      bank_out   <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == (NAW+1)'(NCH - 1)) begin
            cnt   <= '0;
            iter  <= '0;
            pb    <= 1'b0;
            state <= S_INIT;
          end
        end
        S_INIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == (NAW+1)'(NCOL - 1)) begin
            cnt       <= '0;
            k         <= '0;
            row_start <= '0;
            z         <= '0;
            pass2     <= 1'b0;
            unsat     <= 1'b0;
            min1      <= '1;
            min2      <= '1;
            sgn_prod  <= 1'b0;
            synd      <= 1'b0;
            state     <= S_ROW;
          end
        end
        S_ROW: begin
          if (!pass2) begin
            // pass 1: minima, sign product, syndrome
            if (q_mag < min1) begin
              min2   <= min1;
              min1   <= q_mag;
              argmin <= k;
            end else if (q_mag < min2) begin
              min2 <= q_mag;
            end
            sgn_prod <= sgn_prod ^ q_neg;
            synd     <= synd ^ hd[n_col];
            if (e_last[k]) begin
              pass2 <= 1'b1;
              k     <= row_start;
            end else begin
              k <= k + 1'b1;
            end
          end else begin
            // pass 2: new messages and column sums (written above)
            if (e_last[k]) begin
              if (synd) unsat <= 1'b1;
              pass2    <= 1'b0;
              min1     <= '1;
              min2     <= '1;
              sgn_prod <= 1'b0;
              synd     <= 1'b0;
              if (z == ZW'(ZC - 1)) begin
                z <= '0;
                if (ENW'(k) + 1'b1 == cfg_n_edges) begin
                  // end of the iteration
                  if (!(unsat || synd)) begin
                    converged  <= 1'b1;
                    iter_count <= iter;
                    bank_out   <= pb;
                    state      <= S_DONE;
                  end else if (iter == ITW'(MAX_ITER - 1)) begin
                    converged  <= 1'b0;
                    iter_count <= iter + 1'b1;
                    bank_out   <= ~pb;
                    cnt        <= '0;
                    state      <= S_FINAL;
                  end else begin
                    iter  <= iter + 1'b1;
                    pb    <= ~pb;
                    cnt   <= '0;
                    state <= S_INIT;
                  end
                end else begin
                  k         <= k + 1'b1;
                  row_start <= k + 1'b1;
                end
              end else begin
                z <= z + 1'b1;
                k <= row_start;
              end
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        S_FINAL: begin
          cnt <= cnt + 1'b1;
          if (cnt == (NAW+1)'(NCOL - 1)) begin
            cnt   <= '0;
            state <= S_DONE;
          end
        end
        S_DONE: if (release_i) begin
          cnt   <= '0;
          state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
