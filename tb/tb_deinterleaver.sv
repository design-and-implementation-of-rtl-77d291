// tb_deinterleaver: self-checking test of deinterleaver.
// A reference interleaver (TS 38.212 5.4.2.2: write E values row by row into
// Qm rows, read column by column) builds the received order from a random
// block; the DUT must return the original order.  Random gaps on in_valid and
// random out_ready exercise the handshakes; out_last and done are checked.
// Blocks: E = 2250 with Qm = 6, E = 60
// with Qm = 2 and E = 3750 with Qm = 6 (one code block of the document).
module tb_deinterleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int EMAX = 8192;
  logic [13:0] e_len = 0;
  logic [3:0]  qm = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last, done;
  logic [15:0] in_data = 0, out_data;

  deinterleaver #(.EMAX(EMAX), .DW(16)) dut (.clk, .rst_n, .e_len, .qm, .in_valid,
    .in_ready, .in_data, .out_valid, .out_ready, .out_data, .out_last, .done);

  logic [15:0] e [EMAX];
  logic [15:0] f [EMAX];

  task automatic run(input int E, input int Q);
    int cols, k, got_done;
    cols = E / Q;
    for (int i = 0; i < E; i++) e[i] = 16'($urandom);
    for (int i = 0; i < Q; i++)
      for (int j = 0; j < cols; j++) f[i + j * Q] = e[i * cols + j];
    e_len <= 14'(E); qm <= 4'(Q);
    @(posedge clk);
    for (int n = 0; n < E; n++) begin
      while ($urandom_range(0, 3) == 0) begin in_valid <= 1'b0; @(posedge clk); end
      in_valid <= 1'b1; in_data <= f[n];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    k = 0; got_done = 0;
    while (k < E) begin
      out_ready <= 1'($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== e[k] || out_last !== (k == E - 1)) begin
          failures++;
          if (failures < 10) $display("ERROR: E=%0d k=%0d got %h want %h last %b", E, k, out_data, e[k], out_last);
        end
        k++;
      end
    end
    out_ready <= 1'b0;
    for (int t = 0; t < 3; t++) begin @(posedge clk); if (done) got_done++; end
    checks++;
    if (got_done != 1) begin failures++; $display("ERROR: done pulses %0d", got_done); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(2250, 6);
    run(60, 2);
    run(3750, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
