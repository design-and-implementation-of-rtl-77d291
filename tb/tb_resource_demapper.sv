// tb_resource_demapper: self-checking test of resource_demapper (defaults:
// 1024 subcarriers x 14 symbols).  The whole grid is written with random
// values, then a list of 3000 (k, l) positions (random, plus all of symbol 13)
// is requested through the index handshake while out_ready is toggled at
// random.  Every returned symbol must equal the stored grid value, in request
// order, and none may be lost or repeated under back-pressure.
module tb_resource_demapper;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_valid = 0, idx_valid = 0, idx_ready, out_valid, out_ready = 0;
  logic [9:0] wr_k = 0, idx_k = 0;
  logic [3:0] wr_l = 0, idx_l = 0;
  logic signed [15:0] wr_re = 0, wr_im = 0, out_re, out_im;

  resource_demapper dut (.clk, .rst_n, .wr_valid, .wr_k, .wr_l, .wr_re, .wr_im,
    .idx_valid, .idx_ready, .idx_k, .idx_l, .out_valid, .out_ready, .out_re, .out_im);

  logic [31:0] grid [14][1024];
  int req_k [$], req_l [$];
  int n_req, n_got, stalls;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer
  always @(posedge clk) if (rst_n) begin
    out_ready <= 1'($urandom_range(0, 2) != 0);
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      int k, l;
      k = req_k.pop_front();
      l = req_l.pop_front();
      checks++;
      if ({out_re, out_im} !== grid[l][k]) begin
        failures++;
        if (failures < 10) $display("ERROR: (%0d,%0d) got %h want %h", k, l, {out_re, out_im}, grid[l][k]);
      end
      n_got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 14; l++)
      for (int k = 0; k < 1024; k++) begin
        grid[l][k] = $urandom;
        wr_valid <= 1'b1; wr_k <= 10'(k); wr_l <= 4'(l);
        {wr_re, wr_im} <= grid[l][k];
        @(posedge clk);
      end
    wr_valid <= 1'b0;
    n_req = 0;
    for (int i = 0; i < 3000; i++) begin
      int k, l;
      if (i < 1024) begin k = i; l = 13; end
      else begin k = $urandom_range(0, 1023); l = $urandom_range(0, 13); end
      idx_valid <= 1'b1; idx_k <= 10'(k); idx_l <= 4'(l);
      @(posedge clk);
      while (!idx_ready) @(posedge clk);
      req_k.push_back(k); req_l.push_back(l);
      n_req++;
    end
    idx_valid <= 1'b0;
    repeat (50) @(posedge clk);
    checks++;
    if (n_got != n_req) begin failures++; $display("ERROR: %0d of %0d returned", n_got, n_req); end
    checks++;
    if (stalls == 0) begin failures++; $display("ERROR: back-pressure never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
