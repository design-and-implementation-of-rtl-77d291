// tb_desegmentation: self-checking test of desegmentation (KMAX = 3840).
// Reference transmitter model: each code block is K' - 24 random payload bits,
// its CRC24B (polynomial long division), then F filler bits (sent as 0).
// Cases:
//   A  the document's transport block: C = 4, K = 3840, F = 96, L = 24; the
//      output must be the 4 x 3720 = 14880 payload bits in order, seg_ok = 1.
//   B  the same sizes with one bit of block 2 flipped: all 14880 bits still
//      come out, seg_ok = 0 and fail_count = 1.
//   C  one code block without CRC (L = 0), K = 200, F = 10: 190 bits out.
// out_ready is random; out_last and the single done pulse are checked.
module tb_desegmentation;
  import pdsch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, in_valid = 0, in_bit = 0, out_ready = 0;
  logic [11:0] data_len = 0;
  logic [6:0] filler_bits = 0;
  logic [4:0] crc_bits = 0;
  logic [2:0] no_segments = 0;
  logic in_ready, out_valid, out_bit, out_last, done, seg_ok;
  logic [2:0] fail_count;

  desegmentation dut (.clk, .rst_n, .start, .data_len, .filler_bits, .crc_bits,
    .no_segments, .in_valid, .in_ready, .in_bit, .out_valid, .out_ready, .out_bit,
    .out_last, .done, .seg_ok, .fail_count);

  bit blk [4][3840];
  bit payload [$];
  bit got [$];
  int n_done = 0, last_at = -1;

  always @(posedge clk) if (rst_n) begin
    out_ready <= 1'($urandom_range(0, 3) != 0);
    if (out_valid && out_ready) begin
      got.push_back(out_bit);
      if (out_last) last_at = got.size() - 1;
    end
    if (done) n_done++;
  end

  task automatic make_block(input int b, input int kp, input int k, input bit crc);
    bit work [3840 + 24];
    logic [24:0] g;
    int a;
    g = {1'b1, CRC24B_POLY};
    a = crc ? kp - 24 : kp;
    for (int i = 0; i < a; i++) begin blk[b][i] = 1'($urandom); payload.push_back(blk[b][i]); end
    if (crc) begin
      for (int i = 0; i < a; i++) work[i] = blk[b][i];
      for (int i = a; i < a + 24; i++) work[i] = 0;
      for (int i = 0; i < a; i++) if (work[i]) for (int j = 0; j <= 24; j++) work[i + j] ^= g[24 - j];
      for (int i = 0; i < 24; i++) blk[b][a + i] = work[a + i];
    end
    for (int i = kp; i < k; i++) blk[b][i] = 0;
  endtask

  task automatic run(input string name, input int c, input int k, input int f, input int l,
                     input int flip_blk, input bit exp_ok);
    int nb;
    payload.delete(); got.delete(); n_done = 0; last_at = -1;
    for (int b = 0; b < c; b++) make_block(b, k - f, k, l != 0);
    data_len <= 12'(k); filler_bits <= 7'(f); crc_bits <= 5'(l); no_segments <= 3'(c);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int b = 0; b < c; b++)
      for (int i = 0; i < k; i++) begin
        in_valid <= 1'b1;
        in_bit <= blk[b][i] ^ (b == flip_blk && i == 100);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    in_valid <= 1'b0;
    nb = payload.size();
    for (int t = 0; t < 20000 && n_done == 0; t++) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (got.size() != nb || n_done != 1 || last_at != nb - 1) begin
      failures++;
      $display("ERROR: %s: %0d bits (want %0d), done %0d, last at %0d", name, got.size(), nb, n_done, last_at);
    end
    for (int i = 0; i < nb && i < got.size(); i++) begin
      bit e;
      e = payload[i];
      if (flip_blk >= 0 && i == flip_blk * (k - f - l) + 100) e = !e;
      checks++;
      if (got[i] != e) begin
        failures++;
        if (failures < 10) $display("ERROR: %s: bit %0d", name, i);
      end
    end
    checks++;
    if (seg_ok != exp_ok || fail_count != (exp_ok ? 3'd0 : 3'd1)) begin
      failures++; $display("ERROR: %s: seg_ok %b fail_count %0d", name, seg_ok, fail_count);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    run("A", 4, 3840, 96, 24, -1, 1'b1);
    run("B", 4, 3840, 96, 24, 2, 1'b0);
    run("C", 1, 200, 10, 0, -1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
