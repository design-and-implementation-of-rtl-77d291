// tb_complex_mult: self-checking test of complex_mult.
// Reference: the exact complex product in 64-bit integers, rounded half up
// and shifted right by 14 (floor((x + 2^13) / 2^14)).  Directed corner cases
// (zero, one, -1, j, largest magnitudes) plus 20000 random operand pairs,
// including twiddle-like w on the unit circle.  The block is combinational,
// so each result is checked after a short settle delay.
module tb_complex_mult;
  int checks = 0, failures = 0;
  logic signed [15:0] a_re, a_im, w_re, w_im;
  logic signed [16:0] p_re, p_im;

  complex_mult dut (.a_re, .a_im, .w_re, .w_im, .p_re, .p_im);

  function automatic longint rnd(longint x);
    longint y;
    y = x + 8192;
    return (y >= 0) ? (y / 16384) : -((-y + 16383) / 16384);
  endfunction

  task automatic check(int ar, int ai, int wr, int wi);
    longint er, ei;
    a_re = 16'(ar); a_im = 16'(ai); w_re = 16'(wr); w_im = 16'(wi);
    #1;
    er = rnd(longint'(a_re) * w_re - longint'(a_im) * w_im);
    ei = rnd(longint'(a_re) * w_im + longint'(a_im) * w_re);
    checks++;
    if (longint'(p_re) != er || longint'(p_im) != ei) begin
      failures++;
      if (failures < 10) $display("ERROR: (%0d,%0d)*(%0d,%0d) got (%0d,%0d) want (%0d,%0d)",
                                  a_re, a_im, w_re, w_im, p_re, p_im, er, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 16384, 0);
    check(1000, -2000, 16384, 0);
    check(1000, -2000, 0, -16384);
    check(-32768, 32767, 16384, 0);
    check(32767, 32767, 11585, -11585);
    check(-32768, -32768, -16384, 0);
    for (int i = 0; i < 10000; i++)
      check($urandom, $urandom, $urandom_range(0, 32767) - 16384, $urandom_range(0, 32767) - 16384);
    for (int i = 0; i < 10000; i++) begin
      real ph;
      ph = 6.283185307 * $urandom_range(0, 1023) / 1024.0;
      check($urandom, $urandom, $rtoi($cos(ph) * 16384.0), -$rtoi($sin(ph) * 16384.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
