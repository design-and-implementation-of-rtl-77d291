// tb_descrambler: self-checking test of descrambler.
// The reference Gold sequence is built here from the two recursions on plain
// bit arrays (x1, x2 of length Nc + n + 31).  Checks: the warm-up lasts Nc =
// 1600 cycles; for n_ID = n_RNTI = 0 the sequence starts 0,0,0,0,0,0,1,0,0,0,
// 0,1,1,0,1 (published value for this case); for random RNTI/NID every output
// bit equals data XOR c(n); the soft-value instance flips the sign where
// c(n) = 1; the block returns to busy after data_len values.
module tb_descrambler;
  import pdsch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        enable = 0, valid_in = 0, q = 0;
  logic [15:0] rnti = 0;
  logic [9:0]  nid = 0;
  logic [16:0] data_len = 0;
  logic        data_in = 0;
  logic        valid_out, busy, c_out;
  logic        data_out;
  logic signed [15:0] sdata_in = 0, sdata_out;
  logic        s_valid_out, s_busy, s_c;

  descrambler dut (.clk, .rst_n, .enable, .rnti, .nid, .q, .data_len, .valid_in,
                   .data_in, .valid_out, .data_out, .busy, .c_out);
  descrambler #(.DW(16)) dut_soft (.clk, .rst_n, .enable, .rnti, .nid, .q, .data_len,
                   .valid_in, .data_in(sdata_in), .valid_out(s_valid_out),
                   .data_out(sdata_out), .busy(s_busy), .c_out(s_c));

  localparam int NC = 1600;
  localparam int LEN = 300;
  bit cref [LEN];

  function automatic void ref_seq(input logic [15:0] r, input logic [9:0] n, input bit qq);
    bit x1 [NC + LEN + 31];
    bit x2 [NC + LEN + 31];
    logic [30:0] cinit;
    cinit = {r, qq, 4'b0, n};
    for (int i = 0; i < 31; i++) begin
      x1[i] = (i == 0);
      x2[i] = cinit[i];
    end
    for (int i = 0; i < NC + LEN; i++) begin
      x1[i + 31] = x1[i + 3] ^ x1[i];
      x2[i + 31] = x2[i + 3] ^ x2[i + 2] ^ x2[i + 1] ^ x2[i];
    end
    for (int i = 0; i < LEN; i++) cref[i] = x1[i + NC] ^ x2[i + NC];
  endfunction

  task automatic run(input logic [15:0] r, input logic [9:0] n, input int len);
    int warm;
    ref_seq(r, n, 1'b0);
    rnti <= r; nid <= n; data_len <= 17'(len);
    @(posedge clk);
    enable <= 1'b1;
    @(posedge clk);
    enable <= 1'b0;
    warm = 0;
    @(posedge clk);
    while (busy) begin warm++; @(posedge clk); end
    checks++;
    if (warm < NC - 2 || warm > NC + 2) begin
      failures++; $display("ERROR: warm-up took %0d cycles", warm);
    end
    for (int i = 0; i < len; i++) begin
      logic d;
      logic signed [15:0] s;
      d = 1'($urandom);
      s = 16'($urandom_range(0, 20000)) - 16'sd10000;
      data_in <= d; sdata_in <= s; valid_in <= 1'b1;
      #1;
      checks++;
      if (!valid_out || data_out !== (d ^ cref[i])) begin
        failures++; if (failures < 10) $display("ERROR: bit %0d out %b want %b", i, data_out, d ^ cref[i]);
      end
      checks++;
      if (sdata_out !== (cref[i] ? -s : s)) begin
        failures++; if (failures < 10) $display("ERROR: soft %0d out %0d", i, sdata_out);
      end
      @(posedge clk);
      // occasional idle cycles
      if ($urandom_range(0, 4) == 0) begin valid_in <= 1'b0; @(posedge clk); end
    end
    valid_in <= 1'b0;
    @(posedge clk);
    checks++;
    if (!busy) begin failures++; $display("ERROR: not busy after data_len values"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp0 [15] = '{0,0,0,0,0,0,1,0,0,0,0,1,1,0,1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // published start of the sequence for NID = RNTI = 0
    ref_seq(16'd0, 10'd0, 1'b0);
    for (int i = 0; i < 15; i++) begin
      checks++;
      if (cref[i] != exp0[i]) begin failures++; $display("ERROR: reference c(%0d)", i); end
    end
    run(16'd0, 10'd0, 40);
    run(16'h1234, 10'd517, LEN);
    run(16'(($urandom)), 10'($urandom), 123);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
