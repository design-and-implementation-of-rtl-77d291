// fft: N-point radix-2 decimation-in-time FFT with a single butterfly.
//
// The transform works in place on two data RAMs of N words, one for the real
// and one for the imaginary parts, each read at two addresses at once (the two
// butterfly inputs).  Twiddle factors W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N),
// k < N/2, sit in a ROM that is computed at elaboration.
//
// Operation, one symbol at a time:
//   LOAD    N samples are accepted (in_valid && in_ready) and written at the
//           bit-reversed address of their index, so the DIT stages can work in
//           natural order and the result comes out in natural order.
//   COMPUTE log2(N) stages of N/2 butterflies, one butterfly per cycle.  In
//           stage s butterfly b reads a = x[i], b = x[i + 2^s] with
//           i = (b / 2^s) * 2^(s+1) + b mod 2^s, and twiddle index
//           (b mod 2^s) * N / 2^(s+1).  Both results are written back the same
//           cycle.  Every stage halves its outputs (see fft_butterfly).
//   UNLOAD  the N bins X[0..N-1] are presented on out_* with out_idx; a bin is
//           taken when out_valid && out_ready.
// For N = 1024 a symbol takes 1024 load cycles, 5120 butterfly cycles and 1024
// output cycles.  Output = DFT(input) / N.
//
// One butterfly serving all stages, the real/imaginary RAM split, the twiddle
// ROM and bit-reversed input ordering follow the document; the handshake and
// the per-stage scaling are this design's choices.
module fft
  import pdsch_pkg::*;
#(
  parameter int N    = 1024,
  parameter int W    = 16,
  parameter int FRAC = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im,
  output logic [$clog2(N)-1:0] out_idx,
  output logic                 out_last,
  output logic                 busy
);
  localparam int LOGN = $clog2(N);

  typedef logic signed [W-1:0] word_t;
  typedef word_t tw_tab_t [N/2];

  function automatic tw_tab_t gen_tw(input bit imag);
    tw_tab_t t;
    real ang, v;
    for (int k = 0; k < N/2; k++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(N);
      v    = imag ? -$sin(ang) : $cos(ang);
      t[k] = word_t'($rtoi($floor(v * real'(2**FRAC) + 0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t TW_RE = gen_tw(1'b0);
  localparam tw_tab_t TW_IM = gen_tw(1'b1);

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] a);
    for (int i = 0; i < LOGN; i++) bitrev[i] = a[LOGN-1-i];
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_COMP, S_OUT} state_t;
  state_t state;

  word_t mem_re [N];
  word_t mem_im [N];

  logic [LOGN-1:0]          cnt;     // load / unload index, butterfly index
  logic [$clog2(LOGN+1)-1:0] stage;

  // butterfly addressing
  logic [LOGN-1:0] ia, ib, span_mask;
  logic [LOGN-2:0] twi;
  logic [LOGN-2:0] bidx;
  always_comb begin
    bidx      = cnt[LOGN-2:0];
    span_mask = LOGN'((1 << stage) - 1);
    ia        = LOGN'(((LOGN)'(bidx) & ~span_mask) << 1) | (LOGN'(bidx) & span_mask);
    ib        = ia | LOGN'(1 << stage);
    twi       = (LOGN-1)'((LOGN'(bidx) & span_mask) << (LOGN - 1 - int'(stage)));
  end

  word_t y0_re, y0_im, y1_re, y1_im;
  fft_butterfly #(.W(W), .FRAC(FRAC)) u_bfly (
    .a_re(mem_re[ia]), .a_im(mem_im[ia]),
    .b_re(mem_re[ib]), .b_im(mem_im[ib]),
    .w_re(TW_RE[twi]), .w_im(TW_IM[twi]),
    .y0_re(y0_re), .y0_im(y0_im), .y1_re(y1_re), .y1_im(y1_im)
  );

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_re    = mem_re[cnt];
  assign out_im    = mem_im[cnt];
  assign out_idx   = cnt;
  assign out_last  = (state == S_OUT) && (cnt == LOGN'(N-1));
  assign busy      = (state != S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stage <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N-1)) begin
            cnt   <= '0;
            stage <= '0;
            state <= S_COMP;
          end
        end
        S_COMP: begin
          if (cnt == LOGN'(N/2-1)) begin
            cnt <= '0;
            if (stage == ($bits(stage))'(LOGN-1)) state <= S_OUT;
            else                                  stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_OUT: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N-1)) begin
            cnt   <= '0;
            state <= S_LOAD;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // data RAMs: written by the loader or by the butterfly
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem_re[bitrev(cnt)] <= in_re;
      mem_im[bitrev(cnt)] <= in_im;
    end else if (state == S_COMP) begin
      mem_re[ia] <= y0_re;
      mem_im[ia] <= y0_im;
      mem_re[ib] <= y1_re;
      mem_im[ib] <= y1_im;
    end
  end
endmodule
