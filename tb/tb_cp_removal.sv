// tb_cp_removal: self-checking test of cp_removal.
// A source sends 14 OFDM symbols (one slot, normal prefix: 80 samples for
// symbols 0 and 7, 72 for the others, 1024 useful samples each) with random
// idle cycles.  Each sample carries its running index on in_re and its symbol
// number on in_im, so the test knows exactly which samples must come out: the
// last 1024 of every symbol, in order, with out_first/out_last/out_sym set.
// A second instance with the extended prefix (256 samples) runs 4 symbols.
module tb_cp_removal;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic signed [15:0] in_re = 0, in_im = 0;
  logic out_valid, out_first, out_last, x_valid, x_first, x_last;
  logic signed [15:0] out_re, out_im, x_re, x_im;
  logic [2:0] out_sym, x_sym;

  cp_removal dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid, .out_re,
                  .out_im, .out_first, .out_last, .out_sym);
  cp_removal #(.EXTENDED(1'b1)) dut_ext (.clk, .rst_n, .in_valid, .in_re, .in_im,
                  .out_valid(x_valid), .out_re(x_re), .out_im(x_im), .out_first(x_first),
                  .out_last(x_last), .out_sym(x_sym));

  // expected output streams (index, symbol, first, last)
  int exp_n [$], exp_x [$];
  int n_long = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build the expectations
  initial begin
    int idx;
    idx = 0;
    for (int s = 0; s < 14; s++) begin
      int cp;
      cp = (s % 7 == 0) ? 80 : 72;
      for (int k = 0; k < 1024; k++) exp_n.push_back(idx + cp + k);
      idx += cp + 1024;
    end
    idx = 0;
    for (int s = 0; s < 14; s++) begin
      for (int k = 0; k < 1024; k++) if (idx + 256 + k < 14 * 1024 + 14 * 72 + 16)
        exp_x.push_back(idx + 256 + k);
      idx += 256 + 1024;
    end
  end

  // checker for the normal-prefix instance
  int got_n = 0, got_x = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      int e, s, k;
      e = exp_n[got_n];
      s = got_n / 1024;
      k = got_n % 1024;
      checks++;
      if (int'(unsigned'(out_re)) != (e & 16'hffff) || out_im != 16'(s) || out_first != (k == 0) ||
          out_last != (k == 1023) || out_sym != 3'(s % 7)) begin
        failures++;
        if (failures < 10) $display("ERROR: out %0d got idx %0d sym %0d want %0d", got_n, out_re, out_im, e);
      end
      if (k == 0 && s % 7 == 0 && int'(unsigned'(out_re)) == (e & 16'hffff)) n_long++;
      got_n++;
    end
    if (x_valid) begin
      checks++;
      if (got_x < exp_x.size() && (int'(unsigned'(x_re)) != (exp_x[got_x] & 16'hffff) ||
          x_first != (got_x % 1024 == 0) || x_last != (got_x % 1024 == 1023))) begin
        failures++;
        if (failures < 10) $display("ERROR: ext out %0d got idx %0d want %0d", got_x, x_re, exp_x[got_x]);
      end
      got_x++;
    end
  end

  initial begin
    int idx;
    repeat (3) @(posedge clk);
    rst_n = 1;
    idx = 0;
    for (int s = 0; s < 14; s++) begin
      int cp;
      cp = (s % 7 == 0) ? 80 : 72;
      for (int k = 0; k < cp + 1024; k++) begin
        while ($urandom_range(0, 9) == 0) begin in_valid <= 1'b0; @(posedge clk); end
        in_valid <= 1'b1; in_re <= 16'(idx); in_im <= 16'(s);
        idx++;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (got_n != 14 * 1024) begin failures++; $display("ERROR: %0d samples kept", got_n); end
    checks++;
    if (n_long != 2) begin failures++; $display("ERROR: long prefix symbols seen %0d", n_long); end
    checks++;
    if (got_x != exp_x.size()) begin failures++; $display("ERROR: ext kept %0d want %0d", got_x, exp_x.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
