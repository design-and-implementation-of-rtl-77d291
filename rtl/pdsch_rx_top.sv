// pdsch_rx_top: 5G NR PDSCH receive chain, single antenna, single codeword,
// 64-QAM, LDPC base graph 2.
//
// Time-domain samples -> cp_removal -> fft (1024 points) -> fixed_point_match
// -> resource_demapper (slot grid, PDSCH resource elements read by index)
// -> llr_demapper (6 soft bits per symbol) -> llr_serializer -> descrambler
// -> rate_recovery (E per code block, deinterleaving, circular buffer)
// -> ldpc_decoder (min-sum) -> punctured_retrieval (first 2*Zc bits, joins the
// systematic bits) -> desegmentation (fillers, CRC24B, concatenation)
// -> crc_check (CRC24A of the transport block) -> transport block bits.
//
// Soft values run from the demapper to the decoder as 16-bit two's complement,
// positive meaning "bit 0".  The slot is processed in two phases: the 14 OFDM
// symbols are transformed and written into the grid (grid_full rises), then the
// PDSCH resource element indices are fed on idx_* and everything downstream is
// driven by them.  A one-cycle pulse on start, given before the indices, arms
// the descrambler (it needs Nc = 1600 cycles to warm up), rate_recovery and
// desegmentation with the transport block parameters.  The base graph of the
// LDPC code is written through cfg_* before decoding.
//
// Interface summary: samples on smp_valid/smp_ready/smp_re/smp_im; transport
// block bits on out_valid/out_bit/out_last (no back-pressure); tb_done pulses
// after the last bit with tb_crc_ok (CRC24A) and cb_crc_ok (all code block
// CRCs).  ldpc_iters/ldpc_converged describe the last decoded code block.
// cb_done pulses once per code block after punctured-bit retrieval, with
// punct_votes (check rows that voted) and cb_fail_count (code blocks whose
// CRC24B failed so far).  One slot is handled at a time: the grid is freed
// and the symbol counter cleared by tb_done, so the next slot's samples wait
// on smp_ready until then.
//
// Left unconnected on purpose (lint reports them as unused): cp_first,
// fft_busy, ds_c, rr_last, rr_done, rr_seg, pr_last, dsg_done and the CRC24A
// stage's in_ready (its out_ready is tied high, so it never stalls).  Inside
// the sub-blocks the deinterleaver's out_last and the top bits of the E
// calculation in rate_recovery, and desegmentation's view of its CRC stage's
// in_ready, are likewise not needed.  The package also holds the CRC24C and
// CRC16 polynomials and a FRAC_W constant that this chain does not use.
//
// The chain order and block functions follow the document; the two-phase slot
// handling, the handshakes and the soft-value path through descrambler and
// rate recovery are this design's own.
module pdsch_rx_top
  import pdsch_pkg::*;
#(
  parameter int NFFT      = 1024,
  parameter int CP_LEN    = 72,
  parameter int CP_LONG   = 80,
  parameter int NSYM      = 14,
  parameter int FPM_SHIFT = 7,
  parameter int ZC        = 384,
  parameter int NB        = 52,
  parameter int KB        = 10,
  parameter int PUNC      = 2,
  parameter int MAX_EDGES = 197,
  parameter int MAX_ITER  = 20,
  parameter int EMAX      = 8192,
  parameter int KMAX      = 3840
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // time-domain samples
  input  logic                           smp_valid,
  output logic                           smp_ready,
  input  sample_t                        smp_re,
  input  sample_t                        smp_im,
  output logic                           grid_full,
  // PDSCH resource element indices
  input  logic                           idx_valid,
  output logic                           idx_ready,
  input  logic [$clog2(NFFT)-1:0]        idx_k,
  input  logic [$clog2(NSYM)-1:0]        idx_l,
  // transport block parameters
  input  logic                           start,
  input  logic [15:0]                    rnti,
  input  logic [9:0]                     nid,
  input  logic [16:0]                    g_total,
  input  logic [2:0]                     c_seg,
  input  logic [3:0]                     qm,
  input  logic [1:0]                     rv,
  input  logic [11:0]                    k_prime,
  input  logic [11:0]                    k_cb,
  input  logic [6:0]                     filler_bits,
  input  logic [4:0]                     crc_bits,
  // LDPC base graph
  input  logic                           cfg_we,
  input  logic [$clog2(MAX_EDGES)-1:0]   cfg_addr,
  input  logic [$clog2(NB)-1:0]          cfg_col,
  input  logic [9:0]                     cfg_shift,
  input  logic                           cfg_last,
  input  logic [$clog2(MAX_EDGES+1)-1:0] cfg_n_edges,
  // transport block out
  output logic                           out_valid,
  output logic                           out_bit,
  output logic                           out_last,
  output logic                           tb_done,
  output logic                           tb_crc_ok,
  output logic                           cb_crc_ok,
  output logic [$clog2(MAX_ITER+1)-1:0]  ldpc_iters,
  output logic                           ldpc_converged,
  output logic                           cb_done,
  output logic [15:0]                    punct_votes,
  output logic [2:0]                     cb_fail_count
);
  localparam int KW = $clog2(NFFT);
  localparam int LW = $clog2(NSYM);
  localparam int QM = 6;

  // ---------------- OFDM front end ----------------
  logic    cp_valid, cp_first, cp_last;
  sample_t cp_re, cp_im;
  logic [2:0] cp_sym_unused;
  logic    fft_in_ready, fft_out_valid, fft_out_last, fft_busy;
  sample_t fft_re, fft_im;
  logic [KW-1:0] fft_idx;

  cp_removal #(.NFFT(NFFT), .CP_LEN(CP_LEN), .CP_LONG(CP_LONG)) u_cp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(smp_valid && smp_ready), .in_re(smp_re), .in_im(smp_im),
    .out_valid(cp_valid), .out_re(cp_re), .out_im(cp_im),
    .out_first(cp_first), .out_last(cp_last), .out_sym(cp_sym_unused)
  );

  // hold the source while the FFT is busy; the sample in cp_removal's output
  // register is always taken because the FFT stays in load until it has N
  assign smp_ready = fft_in_ready && !(cp_valid && cp_last) && !grid_full;

  fft #(.N(NFFT)) u_fft (
    .clk(clk), .rst_n(rst_n),
    .in_valid(cp_valid), .in_ready(fft_in_ready), .in_re(cp_re), .in_im(cp_im),
    .out_valid(fft_out_valid), .out_ready(1'b1), .out_re(fft_re), .out_im(fft_im),
    .out_idx(fft_idx), .out_last(fft_out_last), .busy(fft_busy)
  );

  logic    fpm_valid;
  sample_t fpm_re, fpm_im;
  logic [KW:0] fpm_tag;

  fixed_point_match #(.SHIFT(FPM_SHIFT), .TAG_W(KW + 1)) u_fpm (
    .clk(clk), .rst_n(rst_n),
    .in_valid(fft_out_valid), .in_re(fft_re), .in_im(fft_im), .in_tag({fft_out_last, fft_idx}),
    .out_valid(fpm_valid), .out_re(fpm_re), .out_im(fpm_im), .out_tag(fpm_tag)
  );

  logic [LW:0] sym_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      sym_cnt <= '0;
    else if (tb_done)                                sym_cnt <= '0;
    else if (fpm_valid && fpm_tag[KW] && !grid_full) sym_cnt <= sym_cnt + 1'b1;
  end
  assign grid_full = (sym_cnt == (LW+1)'(NSYM));

  // ---------------- resource de-mapping and soft demodulation ----------------
  logic    rd_valid, rd_ready;
  sample_t rd_re, rd_im;

  resource_demapper #(.NSC(NFFT), .NSYM(NSYM)) u_rdm (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(fpm_valid && !grid_full), .wr_k(fpm_tag[KW-1:0]), .wr_l(LW'(sym_cnt)),
    .wr_re(fpm_re), .wr_im(fpm_im),
    .idx_valid(idx_valid), .idx_ready(idx_ready), .idx_k(idx_k), .idx_l(idx_l),
    .out_valid(rd_valid), .out_ready(rd_ready), .out_re(rd_re), .out_im(rd_im)
  );

  logic dm_valid;
  llr_t dm_llr [QM];

  llr_demapper #(.QM(QM)) u_dmap (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rd_valid && rd_ready), .in_re(rd_re), .in_im(rd_im),
    .out_valid(dm_valid), .llr_out(dm_llr)
  );

  logic ser_valid, ser_ready;
  llr_t ser_data;

  llr_serializer #(.QM(QM)) u_ser (
    .clk(clk), .rst_n(rst_n),
    .launch(rd_valid && rd_ready), .can_launch(rd_ready),
    .in_valid(dm_valid), .in_llr(dm_llr),
    .out_valid(ser_valid), .out_ready(ser_ready), .out_data(ser_data)
  );

  // ---------------- descrambling and rate recovery ----------------
  logic ds_valid, ds_busy, ds_c;
  llr_t ds_data;
  logic rr_in_ready;

  descrambler #(.DW(LLR_W)) u_desc (
    .clk(clk), .rst_n(rst_n), .enable(start), .rnti(rnti), .nid(nid), .q(1'b0),
    .data_len(g_total), .valid_in(ser_valid && rr_in_ready), .data_in(ser_data),
    .valid_out(ds_valid), .data_out(ds_data), .busy(ds_busy), .c_out(ds_c)
  );
  assign ser_ready = rr_in_ready && !ds_busy;

  logic       rr_valid, rr_last, rr_done, dec_in_ready;
  llr_t       rr_data;
  logic [2:0] rr_seg;

  rate_recovery #(.ZC(ZC), .NCB((NB - PUNC) * ZC), .EMAX(EMAX), .DW(LLR_W)) u_rr (
    .clk(clk), .rst_n(rst_n), .start(start),
    .g_total(g_total), .c_seg(c_seg), .qm(qm), .rv(rv), .k_prime(k_prime), .k_cb(k_cb),
    .in_valid(ds_valid), .in_ready(rr_in_ready), .in_data(ds_data),
    .out_valid(rr_valid), .out_ready(dec_in_ready), .out_data(rr_data),
    .out_last(rr_last), .out_seg(rr_seg), .done(rr_done)
  );

  // ---------------- channel decoding ----------------
  logic                       dec_done, dec_done_d, pr_done;
  logic [$clog2(NB*ZC)-1:0]   hd_addr;
  logic                       hd_bit;
  logic signed [21:0]         dec_llr_unused;

  ldpc_decoder #(.ZC(ZC), .NB(NB), .PUNC(PUNC), .MAX_EDGES(MAX_EDGES), .MAX_ITER(MAX_ITER)) u_ldpc (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_col(cfg_col), .cfg_shift(cfg_shift),
    .cfg_last(cfg_last), .cfg_n_edges(cfg_n_edges),
    .in_valid(rr_valid), .in_ready(dec_in_ready), .in_data(rr_data),
    .done(dec_done), .release_i(pr_done), .hd_raddr(hd_addr), .hd_rdata(hd_bit),
    .llr_raddr('0), .llr_rdata(dec_llr_unused),
    .iter_count(ldpc_iters), .converged(ldpc_converged)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_done_d <= 1'b0;
    else        dec_done_d <= dec_done;
  end

  logic pr_valid, pr_bit, pr_last, ds_in_ready;

  punctured_retrieval #(.ZC(ZC), .NB(NB), .KB(KB), .PUNC(PUNC), .MAX_EDGES(MAX_EDGES)) u_pr (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_col(cfg_col), .cfg_shift(cfg_shift),
    .cfg_last(cfg_last), .cfg_n_edges(cfg_n_edges),
    .start(dec_done && !dec_done_d), .hd_raddr(hd_addr), .hd_rdata(hd_bit),
    .out_valid(pr_valid), .out_ready(ds_in_ready), .out_data(pr_bit), .out_last(pr_last),
    .done(pr_done), .vote_rows(punct_votes)
  );

  // ---------------- transport block reassembly ----------------
  logic dsg_valid, dsg_bit, dsg_last, dsg_done;

  desegmentation #(.KMAX(KMAX)) u_deseg (
    .clk(clk), .rst_n(rst_n), .start(start),
    .data_len(k_cb), .filler_bits(filler_bits), .crc_bits(crc_bits), .no_segments(c_seg),
    .in_valid(pr_valid), .in_ready(ds_in_ready), .in_bit(pr_bit),
    .out_valid(dsg_valid), .out_ready(1'b1), .out_bit(dsg_bit), .out_last(dsg_last),
    .done(dsg_done), .seg_ok(cb_crc_ok), .fail_count(cb_fail_count)
  );

  logic tb_in_ready;

  crc_check #(.L(24), .POLY(CRC24A_POLY)) u_tbcrc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(dsg_valid), .in_ready(tb_in_ready), .in_bit(dsg_bit), .in_last(dsg_last),
    .out_valid(out_valid), .out_ready(1'b1), .out_bit(out_bit),
    .done(tb_done), .ok(tb_crc_ok)
  );

  assign cb_done = pr_done;

  // the last payload bit leaves together with the last CRC bit
  assign out_last = out_valid && dsg_last;
endmodule
