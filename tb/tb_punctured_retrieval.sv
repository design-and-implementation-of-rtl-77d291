// tb_punctured_retrieval: self-checking test of punctured_retrieval.
// Small quasi-cyclic code (Zc = 16, 8 x 14 base graph, 6 systematic column
// blocks, first 2 punctured).  Rows 0..6 contain exactly one punctured column
// block, row 7 contains both (it must be skipped).  The hard-decision memory
// the block reads holds a valid code word whose punctured bits have been
// replaced by random values; in a second run a few non-punctured bits are
// also flipped so that votes disagree.  A reference model in the test
// computes each row's parity vote, the majority per punctured bit (tie or no
// vote -> keep the stored decision) and the expected 96-bit output.  The
// number of voting rows (7 x 16) and the done pulse are checked too.
module tb_punctured_retrieval;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int Z = 16, NBB = 14, KBB = 6, MBB = 8, PN = 2;
  logic cfg_we = 0, cfg_last = 0, start = 0, out_ready = 0;
  logic [5:0] cfg_addr = 0, cfg_n_edges = 0;
  logic [3:0] cfg_col = 0;
  logic [9:0] cfg_shift = 0;
  logic [7:0] hd_raddr;
  logic hd_rdata, out_valid, out_data, out_last, done;
  logic [15:0] vote_rows;

  punctured_retrieval #(.ZC(Z), .NB(NBB), .KB(KBB), .PUNC(PN), .MAX_EDGES(48)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_col, .cfg_shift, .cfg_last, .cfg_n_edges,
    .start, .hd_raddr, .hd_rdata, .out_valid, .out_ready, .out_data, .out_last, .done,
    .vote_rows);

  bit hdm [NBB * Z];
  assign hd_rdata = hdm[hd_raddr];

  int ecol [48], esh [48], erow [48];
  bit elast [48];
  int ne;
  bit cw [NBB * Z];
  bit expo [KBB * Z];

  task automatic build_graph();
    ne = 0;
    for (int i = 0; i < MBB; i++) begin
      ecol[ne] = i % 2; esh[ne] = $urandom_range(0, 383); ne++;
      if (i == 7) begin ecol[ne] = 0; esh[ne] = $urandom_range(0, 383); ne++; end
      ecol[ne] = 2 + $urandom_range(0, 1); esh[ne] = $urandom_range(0, 383); ne++;
      ecol[ne] = 4 + $urandom_range(0, 1); esh[ne] = $urandom_range(0, 383); ne++;
      if (i > 0) begin ecol[ne] = KBB + i - 1; esh[ne] = 0; ne++; end
      ecol[ne] = KBB + i; esh[ne] = 0; ne++;
    end
    for (int e = 0, r = 0; e < ne; e++) begin
      erow[e] = r;
      elast[e] = (e == ne - 1) || (ecol[e + 1] < KBB && ecol[e] >= KBB);
      if (elast[e]) r++;
    end
  endtask

  function automatic int colof(int e, int z);
    return ecol[e] * Z + (z + esh[e] % Z) % Z;
  endfunction

  task automatic encode();
    for (int n = 0; n < KBB * Z; n++) cw[n] = 1'($urandom);
    for (int i = 0; i < MBB; i++)
      for (int z = 0; z < Z; z++) begin
        bit p;
        p = (i > 0) ? cw[(KBB + i - 1) * Z + z] : 1'b0;
        for (int e = 0; e < ne; e++)
          if (erow[e] == i && ecol[e] < KBB) p ^= cw[colof(e, z)];
        cw[(KBB + i) * Z + z] = p;
      end
  endtask

  task automatic reference(output int nvote_rows);
    int ones [PN * Z], tot [PN * Z];
    for (int n = 0; n < PN * Z; n++) begin ones[n] = 0; tot[n] = 0; end
    nvote_rows = 0;
    for (int i = 0; i < MBB; i++)
      for (int z = 0; z < Z; z++) begin
        int np, pidx;
        bit x;
        np = 0; x = 0; pidx = 0;
        for (int e = 0; e < ne; e++) if (erow[e] == i) begin
          if (ecol[e] < PN) begin np++; pidx = colof(e, z); end
          else x ^= hdm[colof(e, z)];
        end
        if (np == 1) begin tot[pidx]++; ones[pidx] += x; nvote_rows++; end
      end
    for (int n = 0; n < KBB * Z; n++) begin
      expo[n] = hdm[n];
      if (n < PN * Z && tot[n] > 0) begin
        if (2 * ones[n] > tot[n]) expo[n] = 1;
        else if (2 * ones[n] < tot[n]) expo[n] = 0;
      end
    end
  endtask

  task automatic run(input int flips);
    int nv, n, nd, nerr_true;
    encode();
    for (int m = 0; m < NBB * Z; m++) hdm[m] = cw[m];
    for (int m = 0; m < PN * Z; m++) hdm[m] = 1'($urandom);
    for (int f = 0; f < flips; f++) begin
      int m;
      m = $urandom_range(PN * Z, NBB * Z - 1);
      hdm[m] = !hdm[m];
    end
    reference(nv);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    n = 0; nd = 0; nerr_true = 0;
    while (n < KBB * Z) begin
      out_ready <= 1'($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != expo[n] || out_last != (n == KBB * Z - 1)) begin
          failures++;
          if (failures < 10) $display("ERROR: bit %0d got %b want %b", n, out_data, expo[n]);
        end
        if (n < PN * Z && out_data != cw[n]) nerr_true++;
        n++;
      end
    end
    out_ready <= 1'b0;
    repeat (2) begin @(posedge clk); if (done) nd++; end
    checks++;
    if (nd != 1 || vote_rows != 16'(nv) || nv != 7 * Z) begin
      failures++; $display("ERROR: done %0d vote_rows %0d want %0d", nd, vote_rows, nv);
    end
    if (flips == 0) begin
      checks++;
      if (nerr_true != 0) begin failures++; $display("ERROR: %0d punctured bits not recovered", nerr_true); end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_graph();
    for (int k = 0; k < ne; k++) begin
      cfg_we <= 1'b1; cfg_addr <= 6'(k); cfg_col <= 4'(ecol[k]);
      cfg_shift <= 10'(esh[k]); cfg_last <= elast[k];
      @(posedge clk);
    end
    cfg_we <= 1'b0; cfg_n_edges <= 6'(ne);
    repeat (40) @(posedge clk);
    run(0);
    run(0);
    run(12);
    run(30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
