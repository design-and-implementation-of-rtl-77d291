// tb_crc_check: self-checking test of crc_check with CRC24A.
// Random payloads get their CRC from a reference long division written here
// (bit array, polynomial with its x^24 term); the block must pass the payload
// through unchanged and report ok.  A second run with one flipped bit must
// report a failure.  Also checks that back-pressure (out_ready low) loses no bit.
module tb_crc_check;
  import pdsch_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_bit = 0, in_last = 0, out_ready = 1;
  logic in_ready, out_valid, out_bit, done, ok;
  int checks = 0, failures = 0;

  crc_check dut (.*);

  localparam int A = 200;
  logic msg [A + 24];
  logic got [$];

  function automatic void ref_crc(input int a_len);
    logic [24:0] g;
    logic work [A + 24];
    g = {1'b1, CRC24A_POLY};
    for (int i = 0; i < a_len; i++) work[i] = msg[i];
    for (int i = a_len; i < a_len + 24; i++) work[i] = 1'b0;
    for (int i = 0; i < a_len; i++)
      if (work[i]) for (int j = 0; j <= 24; j++) work[i + j] ^= g[24 - j];
    for (int i = 0; i < 24; i++) msg[a_len + i] = work[a_len + i];
  endfunction

  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_bit);

  task automatic send(input int flip);
    got.delete();
    for (int i = 0; i < A + 24; i++) begin
      in_valid <= 1'b1;
      in_bit   <= msg[i] ^ (i == flip);
      in_last  <= (i == A + 23);
      out_ready <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      while (!in_ready) begin
        out_ready <= 1'b1;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    out_ready <= 1'b1;
    @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < A; i++) msg[i] = 1'($urandom);
      ref_crc(A);
      send(-1);
      checks++;
      if (!ok) begin failures++; $display("ERROR: good block reported bad (t=%0d)", t); end
      checks++;
      if (got.size() != A) begin failures++; $display("ERROR: %0d payload bits, want %0d", got.size(), A); end
      else begin
        int bad = 0;
        for (int i = 0; i < A; i++) if (got[i] !== msg[i]) bad++;
        checks++;
        if (bad) begin failures++; $display("ERROR: %0d payload bits differ", bad); end
      end
      send($urandom_range(0, A + 23));
      checks++;
      if (ok) begin failures++; $display("ERROR: corrupted block reported good"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
