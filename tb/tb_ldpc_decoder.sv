// tb_ldpc_decoder: self-checking test of ldpc_decoder.
// Part 1, worked example (Zc = 1, 4 x 7 parity-check matrix, no puncturing):
//   received r = [0.2 -0.3 1.2 -0.5 0.8 0.6 -1.1] (scaled by 1000).  One
//   min-sum iteration must give the column sums [-1 -0.4 1.1 -0.6 0.4 0.7
//   -0.7] and the hard decision 1101001, which satisfies every check, so the
//   decoder must stop early after one iteration.
// Part 2, a quasi-cyclic code (Zc = 16, 8 x 14 base graph, dual-diagonal
//   parity part, first 2 column blocks punctured, random shifts): random
//   information bits are encoded by back-substitution, sent as BPSK soft
//   values with noise, and the decoded 224 bits (including the punctured
//   ones) must equal the code word.  A noise-only frame must run all 20
//   iterations and report converged = 0.  The release handshake and the
//   relation hard decision = sign(total belief) are checked as well.
module tb_ldpc_decoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- part 1 DUT ----------------
  logic a_cfg_we = 0, a_cfg_last = 0, a_in_valid = 0, a_release = 0;
  logic [4:0] a_cfg_addr = 0;
  logic [2:0] a_cfg_col = 0;
  logic [4:0] a_n_edges = 0;
  logic signed [15:0] a_in_data = 0;
  logic a_in_ready, a_done, a_hd, a_conv;
  logic [2:0] a_hd_addr = 0, a_llr_addr = 0;
  logic signed [21:0] a_llr;
  logic [4:0] a_iters;

  ldpc_decoder #(.ZC(1), .NB(7), .PUNC(0), .MAX_EDGES(17)) dut_a (
    .clk, .rst_n, .cfg_we(a_cfg_we), .cfg_addr(a_cfg_addr), .cfg_col(a_cfg_col),
    .cfg_shift(10'd0), .cfg_last(a_cfg_last), .cfg_n_edges(a_n_edges),
    .in_valid(a_in_valid), .in_ready(a_in_ready), .in_data(a_in_data),
    .done(a_done), .release_i(a_release), .hd_raddr(a_hd_addr), .hd_rdata(a_hd),
    .llr_raddr(a_llr_addr), .llr_rdata(a_llr), .iter_count(a_iters), .converged(a_conv));

  // ---------------- part 2 DUT ----------------
  localparam int Z = 16, NBB = 14, KBB = 6, MBB = 8, PN = 2;
  logic b_cfg_we = 0, b_cfg_last = 0, b_in_valid = 0, b_release = 0;
  logic [5:0] b_cfg_addr = 0, b_n_edges = 0;
  logic [3:0] b_cfg_col = 0;
  logic [9:0] b_cfg_shift = 0;
  logic signed [15:0] b_in_data = 0;
  logic b_in_ready, b_done, b_hd, b_conv;
  logic [7:0] b_hd_addr = 0, b_llr_addr = 0;
  logic signed [21:0] b_llr;
  logic [4:0] b_iters;

  ldpc_decoder #(.ZC(Z), .NB(NBB), .PUNC(PN), .MAX_EDGES(40)) dut_b (
    .clk, .rst_n, .cfg_we(b_cfg_we), .cfg_addr(b_cfg_addr), .cfg_col(b_cfg_col),
    .cfg_shift(b_cfg_shift), .cfg_last(b_cfg_last), .cfg_n_edges(b_n_edges),
    .in_valid(b_in_valid), .in_ready(b_in_ready), .in_data(b_in_data),
    .done(b_done), .release_i(b_release), .hd_raddr(b_hd_addr), .hd_rdata(b_hd),
    .llr_raddr(b_llr_addr), .llr_rdata(b_llr), .iter_count(b_iters), .converged(b_conv));

  // base graph of part 2
  int ecol [40], esh [40];
  bit elast [40];
  int ne;
  bit cw [NBB * Z];

  task automatic build_graph();
    ne = 0;
    for (int i = 0; i < MBB; i++) begin
      int c1, c2;
      c1 = 2 + $urandom_range(0, 1);
      c2 = 4 + $urandom_range(0, 1);
      ecol[ne] = i % 2; esh[ne] = $urandom_range(0, 383); elast[ne] = 0; ne++;
      ecol[ne] = c1;    esh[ne] = $urandom_range(0, 383); elast[ne] = 0; ne++;
      ecol[ne] = c2;    esh[ne] = $urandom_range(0, 383); elast[ne] = 0; ne++;
      if (i > 0) begin ecol[ne] = KBB + i - 1; esh[ne] = 0; elast[ne] = 0; ne++; end
      ecol[ne] = KBB + i; esh[ne] = 0; elast[ne] = 1; ne++;
    end
  endtask

  task automatic encode();
    for (int n = 0; n < KBB * Z; n++) cw[n] = 1'($urandom);
    for (int n = KBB * Z; n < NBB * Z; n++) cw[n] = 0;
    for (int i = 0; i < MBB; i++)
      for (int z = 0; z < Z; z++) begin
        bit p;
        p = (i > 0) ? cw[(KBB + i - 1) * Z + z] : 1'b0;
        for (int e = 0; e < ne; e++) begin
          // edges of row i
          int r, cnt;
          r = 0; cnt = 0;
          for (int f = 0; f < e; f++) if (elast[f]) r++;
          if (r == i && ecol[e] < KBB) p ^= cw[ecol[e] * Z + (z + esh[e] % Z) % Z];
        end
        cw[(KBB + i) * Z + z] = p;
      end
  endtask

  task automatic run_b(input bit noise_only, input int amp, input int sigma);
    int errs;
    for (int n = PN * Z; n < NBB * Z; n++) begin
      int v;
      v = (cw[n] ? -amp : amp) + ($urandom_range(0, 2 * sigma) - sigma) + ($urandom_range(0, 2 * sigma) - sigma);
      if (noise_only) v = $urandom_range(0, 2000) - 1000;
      b_in_valid <= 1'b1; b_in_data <= 16'(v);
      @(posedge clk);
      while (!b_in_ready) @(posedge clk);
    end
    b_in_valid <= 1'b0;
    while (!b_done) @(posedge clk);
    errs = 0;
    for (int n = 0; n < NBB * Z; n++) begin
      b_hd_addr <= 8'(n); b_llr_addr <= 8'(n);
      @(posedge clk);
      #1;
      if (b_hd != cw[n]) errs++;
      checks++;
      if (b_hd != (b_llr < 0)) begin failures++; if (failures < 10) $display("ERROR: hd/llr sign bit %0d", n); end
    end
    checks++;
    if (noise_only) begin
      if (b_conv || b_iters != 5'd20) begin failures++; $display("ERROR: noise frame conv=%b iters=%0d", b_conv, b_iters); end
    end else begin
      if (errs != 0 || !b_conv) begin failures++; $display("ERROR: frame with %0d bit errors conv=%b iters=%0d", errs, b_conv, b_iters); end
    end
    $display("frame: noise_only=%0d iters=%0d conv=%0d bit errors=%0d", noise_only, b_iters, b_conv, errs);
    b_release <= 1'b1;
    @(posedge clk);
    b_release <= 1'b0;
    @(posedge clk);
    checks++;
    if (b_done || !b_in_ready) begin failures++; $display("ERROR: release did not return to load"); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hm [4][7] = '{'{1,1,1,0,1,0,0}, '{0,1,1,1,0,1,0}, '{1,1,0,1,0,0,1}, '{1,0,1,0,1,1,1}};
    int r [7] = '{200, -300, 1200, -500, 800, 600, -1100};
    int sum1 [7] = '{-1000, -400, 1100, -600, 400, 700, -700};
    bit hd1 [7] = '{1,1,0,1,0,0,1};
    int e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- part 1 ----
    e = 0;
    for (int i = 0; i < 4; i++) begin
      int last;
      for (int j = 0; j < 7; j++) if (hm[i][j]) last = j;
      for (int j = 0; j < 7; j++) if (hm[i][j]) begin
        a_cfg_we <= 1'b1; a_cfg_addr <= 5'(e); a_cfg_col <= 3'(j); a_cfg_last <= (j == last);
        e++;
        @(posedge clk);
      end
    end
    a_cfg_we <= 1'b0; a_n_edges <= 5'(e);
    for (int n = 0; n < 7; n++) begin
      a_in_valid <= 1'b1; a_in_data <= 16'(r[n]);
      @(posedge clk);
    end
    a_in_valid <= 1'b0;
    while (!a_done) @(posedge clk);
    checks++;
    if (!a_conv || a_iters != 5'd1) begin failures++; $display("ERROR: example conv=%b iters=%0d", a_conv, a_iters); end
    for (int n = 0; n < 7; n++) begin
      a_hd_addr <= 3'(n); a_llr_addr <= 3'(n);
      @(posedge clk);
      #1;
      checks++;
      if (a_hd != hd1[n] || a_llr != sum1[n]) begin
        failures++;
        $display("ERROR: example bit %0d hd %b sum %0d (want %b %0d)", n, a_hd, a_llr, hd1[n], sum1[n]);
      end
    end
    // ---- part 2 ----
    build_graph();
    for (int k = 0; k < ne; k++) begin
      b_cfg_we <= 1'b1; b_cfg_addr <= 6'(k); b_cfg_col <= 4'(ecol[k]);
      b_cfg_shift <= 10'(esh[k]); b_cfg_last <= elast[k];
      @(posedge clk);
    end
    b_cfg_we <= 1'b0; b_n_edges <= 6'(ne);
    for (int f = 0; f < 4; f++) begin
      encode();
      run_b(1'b0, 1000, f < 2 ? 500 : 750);
    end
    encode();
    run_b(1'b1, 0, 0);
    encode();
    run_b(1'b0, 3000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
