// tb_fft_butterfly: self-checking test of fft_butterfly.
// Reference: b*W rounded as in the multiplier (half up, >> 14), then
// A = (a + bW + 1) >> 1 and B = (a - bW + 1) >> 1 in exact integers.  Also
// checked against real arithmetic: A ~ (a + bW)/2, B ~ (a - bW)/2 within
// 1 LSB.  W runs over twiddles W_1024^k; a and b are random values that
// keep the inputs in the range the FFT produces.
module tb_fft_butterfly;
  int checks = 0, failures = 0;
  logic signed [15:0] a_re, a_im, b_re, b_im, w_re, w_im;
  logic signed [15:0] y0_re, y0_im, y1_re, y1_im;

  fft_butterfly dut (.a_re, .a_im, .b_re, .b_im, .w_re, .w_im,
                     .y0_re, .y0_im, .y1_re, .y1_im);

  function automatic longint rdiv(longint x, int sh);
    longint y;
    y = x + (longint'(1) << (sh - 1));
    return y >>> sh;
  endfunction

  function automatic real absr(real x);
    return x < 0 ? -x : x;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int k;
      longint pr, pi, e0r, e0i, e1r, e1i;
      real ph, fr, fi;
      k = $urandom_range(0, 511);
      ph = 6.283185307179586 * k / 1024.0;
      a_re = 16'($urandom_range(0, 40000) - 20000);
      a_im = 16'($urandom_range(0, 40000) - 20000);
      b_re = 16'($urandom_range(0, 40000) - 20000);
      b_im = 16'($urandom_range(0, 40000) - 20000);
      w_re = 16'($rtoi($floor($cos(ph) * 16384.0 + 0.5)));
      w_im = 16'($rtoi($floor(-$sin(ph) * 16384.0 + 0.5)));
      #1;
      pr = rdiv(longint'(b_re) * w_re - longint'(b_im) * w_im, 14);
      pi = rdiv(longint'(b_re) * w_im + longint'(b_im) * w_re, 14);
      e0r = rdiv(a_re + pr, 1); e0i = rdiv(a_im + pi, 1);
      e1r = rdiv(a_re - pr, 1); e1i = rdiv(a_im - pi, 1);
      checks++;
      if (y0_re != e0r || y0_im != e0i || y1_re != e1r || y1_im != e1i) begin
        failures++;
        if (failures < 10) $display("ERROR: k=%0d got (%0d,%0d),(%0d,%0d) want (%0d,%0d),(%0d,%0d)",
                                    k, y0_re, y0_im, y1_re, y1_im, e0r, e0i, e1r, e1i);
      end
      fr = (real'(b_re) * $cos(ph) + real'(b_im) * $sin(ph));
      fi = (real'(b_im) * $cos(ph) - real'(b_re) * $sin(ph));
      checks++;
      if (absr(real'(y0_re) - (a_re + fr) / 2) > 1.5 || absr(real'(y1_im) - (a_im - fi) / 2) > 1.5) begin
        failures++;
        if (failures < 10) $display("ERROR: k=%0d real-arithmetic mismatch", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
