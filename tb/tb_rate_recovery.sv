// tb_rate_recovery: self-checking test of rate_recovery.
// A reference transmitter-side model builds, for every code block, the
// rate-matched sequence e from the circular buffer (start k0, skip fillers,
// wrap at NCB), interleaves it, and gives the block random soft values in that
// order.  The expected output buffer is the sum of all values that landed on
// each position (saturated), 0 for positions never sent and +32767 for the
// filler positions.
// Case A (default parameters, the document's transport block): G = 15000,
//   C = 4, Qm = 6, K' = 3744, K = 3840, rv 0 -> E = 3750 per block.
// Case B (Zc = 16, NCB = 800): G = 4002, C = 2, Qm = 6, rv 2, so that the
//   E_r rule gives unequal blocks (1998 and 2004) and the buffer wraps more
//   than twice (soft combining of repeated values).
module tb_rate_recovery;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0;
  logic [16:0] g_total = 0;
  logic [2:0] c_seg = 0;
  logic [3:0] qm = 0;
  logic [1:0] rv = 0;
  logic [11:0] k_prime = 0, k_cb = 0;
  logic in_valid = 0, out_ready = 0;
  logic signed [15:0] in_data = 0;

  logic a_in_ready, a_out_valid, a_out_last, a_done;
  logic signed [15:0] a_out_data;
  logic [2:0] a_out_seg;
  logic b_in_ready, b_out_valid, b_out_last, b_done;
  logic signed [15:0] b_out_data;
  logic [2:0] b_out_seg;
  logic sel_b = 0;

  rate_recovery dut_a (.clk, .rst_n, .start(start && !sel_b), .g_total, .c_seg, .qm, .rv,
    .k_prime, .k_cb, .in_valid(in_valid && !sel_b), .in_ready(a_in_ready), .in_data,
    .out_valid(a_out_valid), .out_ready, .out_data(a_out_data), .out_last(a_out_last),
    .out_seg(a_out_seg), .done(a_done));
  rate_recovery #(.ZC(16)) dut_b (.clk, .rst_n, .start(start && sel_b), .g_total, .c_seg,
    .qm, .rv, .k_prime, .k_cb, .in_valid(in_valid && sel_b), .in_ready(b_in_ready), .in_data,
    .out_valid(b_out_valid), .out_ready, .out_data(b_out_data), .out_last(b_out_last),
    .out_seg(b_out_seg), .done(b_done));

  wire in_ready = sel_b ? b_in_ready : a_in_ready;
  wire out_valid = sel_b ? b_out_valid : a_out_valid;
  wire out_last = sel_b ? b_out_last : a_out_last;
  wire [2:0] out_seg = sel_b ? b_out_seg : a_out_seg;
  wire done = sel_b ? b_done : a_done;
  wire signed [15:0] out_data = sel_b ? b_out_data : a_out_data;

  int expv [19200];

  task automatic run(input bit b, input int zc, input int G, input int C, input int Q,
                     input int r, input int kp, input int kc);
    int ncb, k0, qq, got_done;
    ncb = 50 * zc;
    k0 = (r == 0) ? 0 : (r == 1) ? 13 * zc : (r == 2) ? 25 * zc : 43 * zc;
    sel_b <= b;
    g_total <= 17'(G); c_seg <= 3'(C); qm <= 4'(Q); rv <= 2'(r);
    k_prime <= 12'(kp); k_cb <= 12'(kc);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    qq = G / Q;
    got_done = 0;
    for (int seg = 0; seg < C; seg++) begin
      int E, pos, n;
      int e [8192];
      int f [8192];
      E = (seg <= C - (qq % C) - 1) ? Q * (qq / C) : Q * (qq / C + 1);
      for (int i = 0; i < ncb; i++) expv[i] = 0;
      pos = k0;
      for (int k = 0; k < E; k++) begin
        while (pos >= kp - 2 * zc && pos < kc - 2 * zc) pos = (pos + 1) % ncb;
        e[k] = $urandom_range(0, 4000) - 2000;
        expv[pos] += e[k];
        if (expv[pos] > 32767) expv[pos] = 32767;
        if (expv[pos] < -32767) expv[pos] = -32767;
        pos = (pos + 1) % ncb;
      end
      for (int i = kp - 2 * zc; i < kc - 2 * zc; i++) expv[i] = 32767;
      for (int i = 0; i < Q; i++)
        for (int j = 0; j < E / Q; j++) f[i + j * Q] = e[i * (E / Q) + j];
      for (int k = 0; k < E; k++) begin
        in_valid <= 1'b1; in_data <= 16'(f[k]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if ($urandom_range(0, 7) == 0) begin in_valid <= 1'b0; @(posedge clk); end
      end
      in_valid <= 1'b0;
      n = 0;
      while (n < ncb) begin
        out_ready <= 1'($urandom_range(0, 3) != 0);
        @(posedge clk);
        if (done) got_done++;
        if (out_valid && out_ready) begin
          checks++;
          if (int'(out_data) != expv[n] || out_last != (n == ncb - 1) || out_seg != 3'(seg)) begin
            failures++;
            if (failures < 10) $display("ERROR: zc=%0d seg %0d pos %0d got %0d want %0d last %b",
                                        zc, seg, n, out_data, expv[n], out_last);
          end
          n++;
        end
      end
      out_ready <= 1'b0;
    end
    repeat (3) begin @(posedge clk); if (done) got_done++; end
    checks++;
    if (got_done != 1) begin failures++; $display("ERROR: done pulses %0d", got_done); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (19300) @(posedge clk);   // buffer clear after reset
    run(1'b0, 384, 15000, 4, 6, 0, 3744, 3840);
    run(1'b1, 16, 4002, 2, 6, 2, 150, 160);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
