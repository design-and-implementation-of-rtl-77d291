// tb_fixed_point_match: self-checking test of fixed_point_match.
// Reference: x * 2^7 saturated to +/-32767.  One value per cycle with random
// gaps; out_valid, data and tag must follow the input by exactly one cycle.
// Values are drawn so that both the linear range and the saturation occur.
module tb_fixed_point_match;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic signed [15:0] in_re = 0, in_im = 0, out_re, out_im;
  logic [9:0] in_tag = 0, out_tag;
  int n_sat = 0;

  fixed_point_match dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .in_tag,
                         .out_valid, .out_re, .out_im, .out_tag);

  function automatic int ref_scale(int x);
    int y;
    y = x * 128;
    if (y > 32767) return 32767;
    if (y < -32767) return -32767;
    return y;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pr, pi, pt;
    bit pv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pv = 0;
    for (int n = 0; n < 5000; n++) begin
      bit v;
      int r, i;
      v = ($urandom_range(0, 3) != 0);
      r = (n % 4 == 0) ? $urandom_range(0, 2000) - 1000 : $urandom_range(0, 512) - 256;
      i = (n % 5 == 0) ? $urandom_range(0, 65535) - 32768 : $urandom_range(0, 512) - 256;
      in_valid <= v; in_re <= 16'(r); in_im <= 16'(i); in_tag <= 10'(n);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== v) begin failures++; $display("ERROR: out_valid at %0d", n); end
      else if (v) begin
        checks++;
        if (out_re != ref_scale(r) || out_im != ref_scale(i) || out_tag != 10'(n)) begin
          failures++;
          if (failures < 10) $display("ERROR: n=%0d in (%0d,%0d) got (%0d,%0d) tag %0d", n, r, i, out_re, out_im, out_tag);
        end
        if (ref_scale(r) == 32767 || ref_scale(r) == -32767) n_sat++;
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("ERROR: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
