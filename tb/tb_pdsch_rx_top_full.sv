// tb_pdsch_rx_top_full: end-to-end self-checking test of pdsch_rx_top (full size, default parameters: 1024-point FFT, Zc = 384, base graph 2 dimensions, the document's transport block of 14856 bits in 4 code blocks, G = 15000).
//
// The test contains a complete transmitter model that mirrors the receive
// chain step by step: transport block with CRC24A, segmentation into C code
// blocks with CRC24B and filler bits, LDPC encoding with the quasi-cyclic code
// written into the receiver's base-graph port, rate matching (circular buffer
// from k0, fillers skipped, E_r per block), bit interleaving, Gold-sequence
// scrambling (c_init = RNTI*2^15 + NID), Gray 64-QAM mapping, placement on
// the resource grid, inverse DFT (scaled so that the receiver's FFT and
// fixed-point matching give back the constellation), additive noise and the
// cyclic prefix (long prefix on symbols 0 and 7).  Samples are fed with random
// gaps and the PDSCH indices follow once grid_full is high.
//
// Checked per slot: every decoded transport block bit, tb_crc_ok, cb_crc_ok
// and cb_fail_count against the expected outcome, the number of bits and
// out_last.  Counted and required to occur at least once over the run:
// long-CP symbols, FFT symbols (grid_full), source stalls (smp_ready low),
// index stalls, filler bits, repetition of the circular buffer (E > NCB - F),
// redundancy version > 0, LDPC early stop, LDPC runs to MAX_ITER, punctured-bit
// votes, code block CRC failure, transport block CRC pass and failure.
// The base graph is built by the test in the shape of base graph 2: a core of
// NCORE rows with a dual-diagonal parity part, then extension rows that each
// add one degree-1 parity column; every row holds one of the two punctured
// column blocks.  The receiver takes any base graph through its
// configuration port.
module tb_pdsch_rx_top_full;
  import pdsch_pkg::*;
  // ---------------- configuration ----------------
  localparam int NFFT = 1024, CPL = 72, CPLONG = 80, NSYMS = 14;
  localparam int ZC = 384, NBB = 52, KBB = 10, PN = 2, MAXE = 197, MAX_ITER = 20;
  localparam int K_LO = 200, K_NUM = 210;
  localparam int TIMEOUT = 20000000, WATCHDOG = 40000000;
  localparam int NCORE = 4;
  localparam int NCB = (NBB - PN) * ZC;
  localparam int MBB = NBB - KBB;
  localparam int KCB = KBB * ZC;
  localparam int KW = $clog2(NFFT);
  localparam int CW_COLS = $clog2(NBB);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- DUT ----------------
  logic smp_valid = 0, smp_ready, grid_full;
  logic signed [15:0] smp_re = 0, smp_im = 0;
  logic idx_valid = 0, idx_ready;
  logic [KW-1:0] idx_k = 0;
  logic [3:0] idx_l = 0;
  logic start = 0;
  logic [15:0] rnti = 0;
  logic [9:0] nid = 0;
  logic [16:0] g_total = 0;
  logic [2:0] c_seg = 0;
  logic [3:0] qm = 6;
  logic [1:0] rv = 0;
  logic [11:0] k_prime = 0, k_cb = 0;
  logic [6:0] filler_bits = 0;
  logic [4:0] crc_bits = 24;
  logic cfg_we = 0, cfg_last = 0;
  logic [$clog2(MAXE)-1:0] cfg_addr = 0;
  logic [CW_COLS-1:0] cfg_col = 0;
  logic [9:0] cfg_shift = 0;
  logic [$clog2(MAXE+1)-1:0] cfg_n_edges = 0;
  logic out_valid, out_bit, out_last, tb_done, tb_crc_ok, cb_crc_ok, ldpc_converged, cb_done;
  logic [$clog2(MAX_ITER+1)-1:0] ldpc_iters;
  logic [15:0] punct_votes;
  logic [2:0] cb_fail_count;

  pdsch_rx_top  dut (
    .clk, .rst_n, .smp_valid, .smp_ready, .smp_re, .smp_im, .grid_full,
    .idx_valid, .idx_ready, .idx_k, .idx_l, .start, .rnti, .nid, .g_total, .c_seg,
    .qm, .rv, .k_prime, .k_cb, .filler_bits, .crc_bits, .cfg_we, .cfg_addr, .cfg_col,
    .cfg_shift, .cfg_last, .cfg_n_edges, .out_valid, .out_bit, .out_last, .tb_done,
    .tb_crc_ok, .cb_crc_ok, .ldpc_iters, .ldpc_converged, .cb_done, .punct_votes,
    .cb_fail_count);

  // ---------------- mechanism counters ----------------
  int m_long_cp, m_fft_sym, m_smp_stall, m_idx_stall, m_fillers, m_repeat, m_rv;
  int m_early, m_maxit, m_votes, m_cb_fail, m_tb_pass, m_tb_fail, m_cb;

  always @(posedge clk) if (rst_n) begin
    if (smp_valid && !smp_ready) m_smp_stall++;
    if (idx_valid && !idx_ready) m_idx_stall++;
    if (cb_done) begin
      m_cb++;
      if (ldpc_converged && int'(ldpc_iters) < MAX_ITER) m_early++;
      if (!ldpc_converged && int'(ldpc_iters) == MAX_ITER) m_maxit++;
      if (punct_votes != 0) m_votes++;
    end
  end

  // ---------------- base graph ----------------
  int ecol [MAXE], esh [MAXE], erow [MAXE];
  bit elast [MAXE];
  int ne;

  task automatic build_graph();
    ne = 0;
    for (int i = 0; i < MBB; i++) begin
      ecol[ne] = i % 2;               esh[ne] = $urandom_range(0, 383); erow[ne] = i; ne++;
      ecol[ne] = 2 + i % (KBB - 2);   esh[ne] = $urandom_range(0, 383); erow[ne] = i; ne++;
      if (i > 0 && i < NCORE) begin ecol[ne] = KBB + i - 1; esh[ne] = 0; erow[ne] = i; ne++; end
      ecol[ne] = KBB + i; esh[ne] = 0; erow[ne] = i; ne++;
    end
    for (int e = 0; e < ne; e++) elast[e] = (e == ne - 1) || (erow[e + 1] != erow[e]);
  endtask

  task automatic load_graph();
    for (int k = 0; k < ne; k++) begin
      cfg_we <= 1'b1; cfg_addr <= ($clog2(MAXE))'(k); cfg_col <= CW_COLS'(ecol[k]);
      cfg_shift <= 10'(esh[k]); cfg_last <= elast[k];
      @(posedge clk);
    end
    cfg_we <= 1'b0; cfg_n_edges <= ($clog2(MAXE+1))'(ne);
  endtask

  // ---------------- transmitter model ----------------
  bit tbits [$];          // transport block payload (expected output)
  bit gbits [$];          // G coded bits after scrambling
  int re_k [$], re_l [$]; // PDSCH resource elements in mapping order
  real cs [NFFT], sn [NFFT];

  function automatic void crc_append(ref bit v [$], input logic [23:0] poly);
    bit work [$];
    logic [24:0] g;
    int a;
    g = {1'b1, poly};
    a = v.size();
    work = v;
    for (int i = 0; i < 24; i++) work.push_back(0);
    for (int i = 0; i < a; i++) if (work[i]) for (int j = 0; j <= 24; j++) work[i + j] ^= g[24 - j];
    for (int i = 0; i < 24; i++) v.push_back(work[a + i]);
  endfunction

  function automatic void ldpc_encode(ref bit cw [NBB * ZC]);
    for (int i = 0; i < MBB; i++)
      for (int z = 0; z < ZC; z++) begin
        bit p;
        p = (i > 0 && i < NCORE) ? cw[(KBB + i - 1) * ZC + z] : 1'b0;
        for (int e = 0; e < ne; e++)
          if (erow[e] == i && ecol[e] < KBB) p ^= cw[ecol[e] * ZC + (z + esh[e] % ZC) % ZC];
        cw[(KBB + i) * ZC + z] = p;
      end
  endfunction

  function automatic int k0_of(int r);
    int f;
    f = (r == 0) ? 0 : (r == 1) ? 13 : (r == 2) ? 25 : 43;
    return (f * NCB / (50 * ZC)) * ZC;
  endfunction

  // builds tbits, gbits for one transport block
  task automatic build_tb(input int c, input int kp, input int G, input int r,
                          input logic [15:0] rn, input logic [9:0] ni);
    bit tb [$];
    int A, Bc, Q, qq;
    bit x1 [$], x2 [$];
    logic [30:0] cinit;
    A = c * (kp - 24) - 24;
    tbits.delete(); gbits.delete();
    for (int i = 0; i < A; i++) tbits.push_back(1'($urandom));
    tb = tbits;
    crc_append(tb, CRC24A_POLY);
    Q = 6;
    qq = G / Q;
    for (int s = 0; s < c; s++) begin
      bit blk [$];
      bit cw [NBB * ZC];
      int E, pos;
      bit e [$];
      for (int i = 0; i < kp - 24; i++) blk.push_back(tb[s * (kp - 24) + i]);
      crc_append(blk, CRC24B_POLY);
      for (int i = 0; i < NBB * ZC; i++) cw[i] = 0;
      for (int i = 0; i < kp; i++) cw[i] = blk[i];
      ldpc_encode(cw);
      E = (s <= c - (qq % c) - 1) ? Q * (qq / c) : Q * (qq / c + 1);
      if (E > NCB - (KCB - kp)) m_repeat++;
      pos = k0_of(r);
      for (int k = 0; k < E; k++) begin
        while (pos >= kp - PN * ZC && pos < KCB - PN * ZC) pos = (pos + 1) % NCB;
        e.push_back(cw[PN * ZC + pos]);
        pos = (pos + 1) % NCB;
      end
      for (int j = 0; j < E / Q; j++)
        for (int i = 0; i < Q; i++) gbits.push_back(e[i * (E / Q) + j]);
      m_fillers += KCB - kp;
    end
    // scrambling
    cinit = {rn, 1'b0, 4'b0, ni};
    for (int i = 0; i < 31; i++) begin x1.push_back(i == 0); x2.push_back(cinit[i]); end
    for (int i = 0; i < 1600 + G; i++) begin
      x1.push_back(x1[i + 3] ^ x1[i]);
      x2.push_back(x2[i + 3] ^ x2[i + 2] ^ x2[i + 1] ^ x2[i]);
    end
    for (int i = 0; i < G; i++) gbits[i] ^= x1[i + 1600] ^ x2[i + 1600];
  endtask

  function automatic real lvl(bit a, bit b, bit c);
    return real'((1 - 2 * int'(a)) * (4 - (1 - 2 * int'(b)) * (2 - (1 - 2 * int'(c))))) / $sqrt(42.0);
  endfunction

  function automatic int noise(real sigma);
    real a, s;
    a = sigma / 1.1547;
    s = 0;
    for (int i = 0; i < 4; i++) s += (real'($urandom_range(0, 20000)) / 10000.0 - 1.0) * a;
    return $rtoi(s);
  endfunction

  // modulates gbits onto the grid and sends the slot's samples
  task automatic send_slot(input real sigma_t);
    real gr [NSYMS][NFFT], gi [NSYMS][NFFT];
    for (int l = 0; l < NSYMS; l++)
      for (int k = 0; k < NFFT; k++) begin
        // reference signals / other users: random QPSK
        gr[l][k] = ($urandom_range(0, 1) ? 0.7071 : -0.7071);
        gi[l][k] = ($urandom_range(0, 1) ? 0.7071 : -0.7071);
      end
    for (int n = 0; n < gbits.size() / 6; n++) begin
      gr[re_l[n]][re_k[n]] = lvl(gbits[6*n], gbits[6*n+2], gbits[6*n+4]);
      gi[re_l[n]][re_k[n]] = lvl(gbits[6*n+1], gbits[6*n+3], gbits[6*n+5]);
    end
    for (int l = 0; l < NSYMS; l++) begin
      int xr [NFFT], xi [NFFT];
      int cp;
      for (int n = 0; n < NFFT; n++) begin
        real ar, ai;
        ar = 0; ai = 0;
        for (int k = 0; k < NFFT; k++) begin
          int t;
          t = (k * n) % NFFT;
          ar += gr[l][k] * cs[t] - gi[l][k] * sn[t];
          ai += gr[l][k] * sn[t] + gi[l][k] * cs[t];
        end
        xr[n] = $rtoi(ar * 16384.0 / 128.0) + noise(sigma_t);
        xi[n] = $rtoi(ai * 16384.0 / 128.0) + noise(sigma_t);
      end
      cp = (l % 7 == 0) ? CPLONG : CPL;
      if (l % 7 == 0) m_long_cp++;
      for (int n = 0; n < cp + NFFT; n++) begin
        int m;
        m = (n < cp) ? NFFT - cp + n : n - cp;
        while ($urandom_range(0, 15) == 0) begin smp_valid <= 1'b0; @(posedge clk); end
        smp_valid <= 1'b1; smp_re <= 16'(xr[m]); smp_im <= 16'(xi[m]);
        @(posedge clk);
        while (!smp_ready) @(posedge clk);
      end
    end
    smp_valid <= 1'b0;
  endtask

  // ---------------- one slot ----------------
  task automatic run_slot(input string name, input int c, input int kp, input int G,
                          input int r, input real sigma_t, input bit expect_ok);
    bit got [$];
    int nre, t;
    logic [15:0] rn;
    logic [9:0] ni;
    rn = 16'($urandom); ni = 10'($urandom);
    build_tb(c, kp, G, r, rn, ni);
    if (r != 0) m_rv++;
    nre = G / 6;
    // PDSCH REs: symbols other than 2 and 11, subcarriers from K_LO upwards
    re_k.delete(); re_l.delete();
    for (int l = 0; l < NSYMS && re_k.size() < nre; l++)
      if (l != 2 && l != 11)
        for (int k = K_LO; k < NFFT && re_k.size() < nre; k++)
          if (k < K_LO + K_NUM) begin re_k.push_back(k); re_l.push_back(l); end
    // parameters and start
    rnti <= rn; nid <= ni; g_total <= 17'(G); c_seg <= 3'(c); rv <= 2'(r);
    k_prime <= 12'(kp); k_cb <= 12'(KCB); filler_bits <= 7'(KCB - kp); crc_bits <= 5'd24;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    send_slot(sigma_t);
    t = 0;
    while (!grid_full && t < 200000) begin @(posedge clk); t++; end
    m_fft_sym += grid_full ? NSYMS : 0;
    fork
      begin
        for (int n = 0; n < nre; n++) begin
          while ($urandom_range(0, 7) == 0) begin idx_valid <= 1'b0; @(posedge clk); end
          idx_valid <= 1'b1; idx_k <= KW'(re_k[n]); idx_l <= 4'(re_l[n]);
          @(posedge clk);
          while (!idx_ready) @(posedge clk);
        end
        idx_valid <= 1'b0;
      end
      begin
        t = 0;
        while (!tb_done && t < TIMEOUT) begin
          @(posedge clk);
          t++;
          if (out_valid) begin
            got.push_back(out_bit);
            checks++;
            if (out_last != (got.size() == tbits.size())) begin
              failures++; $display("ERROR: %s: out_last at bit %0d", name, got.size());
            end
          end
        end
      end
    join
    checks++;
    if (!tb_done) begin failures++; $display("ERROR: %s: no tb_done", name); end
    checks++;
    if (got.size() != tbits.size()) begin
      failures++; $display("ERROR: %s: %0d bits out, want %0d", name, got.size(), tbits.size());
    end
    if (expect_ok) begin
      int nerr;
      nerr = 0;
      for (int i = 0; i < tbits.size() && i < got.size(); i++) if (got[i] != tbits[i]) nerr++;
      checks++;
      if (nerr != 0 || !tb_crc_ok || !cb_crc_ok || cb_fail_count != 0) begin
        failures++;
        $display("ERROR: %s: %0d bit errors, tb_crc_ok %b cb_crc_ok %b fails %0d", name, nerr,
                 tb_crc_ok, cb_crc_ok, cb_fail_count);
      end
    end else begin
      checks++;
      if (tb_crc_ok || cb_crc_ok || cb_fail_count == 0) begin
        failures++; $display("ERROR: %s: corrupted block reported good", name);
      end
    end
    if (tb_crc_ok) m_tb_pass++; else m_tb_fail++;
    if (!cb_crc_ok) m_cb_fail++;
    $display("%s: G=%0d rv=%0d bits=%0d tb_crc_ok=%b cb_crc_ok=%b cb_fails=%0d last iters=%0d",
             name, G, r, got.size(), tb_crc_ok, cb_crc_ok, cb_fail_count, ldpc_iters);
    repeat (5) @(posedge clk);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("ERROR: mechanism not exercised: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NFFT; t++) begin
      cs[t] = $cos(2.0 * 3.14159265358979 * t / NFFT);
      sn[t] = $sin(2.0 * 3.14159265358979 * t / NFFT);
    end
    build_graph();
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_graph();
    repeat (NCB + 10) @(posedge clk);
    run_slot("transport block 14856 bits", 4, 3744, 15000, 0, 100.0, 1'b1);
    $display("mechanisms:");
    need("long cyclic prefix symbols", m_long_cp);
    need("FFT symbols into the grid", m_fft_sym);
    need("sample source stalls", m_smp_stall);
    need("index stalls", m_idx_stall);
    need("filler bits", m_fillers);
    need("code blocks decoded", m_cb);
    need("LDPC early stop", m_early);
    need("punctured-bit votes", m_votes);
    need("TB CRC pass", m_tb_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
