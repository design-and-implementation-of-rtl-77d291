// tb_llr_demapper: self-checking test of llr_demapper.
// Reference: the 64-QAM constellation of TS 38.211 5.1.5 in real arithmetic;
// for each bit the max-log LLR min_S1 |y-x|^2 - min_S0 |y-x|^2, scaled to
// Q1.14 and saturated.  One symbol enters per cycle (with random gaps); each
// LLR vector must appear exactly 3 cycles later and match within 4 LSB.
// For noisy copies of transmitted points the LLR signs must give back the
// transmitted bits (positive = 0).
module tb_llr_demapper;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic signed [15:0] in_re = 0, in_im = 0;
  logic signed [15:0] llr_out [6];

  llr_demapper dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid, .llr_out);

  localparam real S = 16384.0;
  real px [64], py [64];

  function automatic real lvl(int a, int b, int c);
    return real'((1 - 2*a) * (4 - (1 - 2*b) * (2 - (1 - 2*c)))) / $sqrt(42.0);
  endfunction

  function automatic int ref_llr(real yr, real yi, int b);
    real m0, m1, d;
    m0 = 1.0e9; m1 = 1.0e9;
    for (int p = 0; p < 64; p++) begin
      d = (yr - px[p]) ** 2 + (yi - py[p]) ** 2;
      if (((p >> (5 - b)) & 1) == 0) begin if (d < m0) m0 = d; end
      else if (d < m1) m1 = d;
    end
    d = (m1 - m0) * S;
    if (d > 32767.0) return 32767;
    if (d < -32767.0) return -32767;
    return $rtoi(d + (d >= 0 ? 0.5 : -0.5));
  endfunction

  // expected values queued per input cycle
  int exp_llr [$];
  int exp_bits [$];
  bit exp_v [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 64; p++) begin
      px[p] = lvl((p >> 5) & 1, (p >> 3) & 1, (p >> 1) & 1);
      py[p] = lvl((p >> 4) & 1, (p >> 2) & 1, p & 1);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      int e [6];
      int p, tag;
      real yr, yi;
      bit v;
      v = ($urandom_range(0, 5) != 0);
      tag = -1;
      if (n % 3 == 0) begin
        // anywhere in the range of the input format
        yr = real'($urandom_range(0, 60000)) / S - 1.83;
        yi = real'($urandom_range(0, 60000)) / S - 1.83;
      end else begin
        p  = $urandom_range(0, 63);
        tag = p;
        yr = px[p] + (real'($urandom_range(0, 1000)) - 500.0) / 500.0 * 0.07;
        yi = py[p] + (real'($urandom_range(0, 1000)) - 500.0) / 500.0 * 0.07;
      end
      in_re <= 16'($rtoi(yr * S));
      in_im <= 16'($rtoi(yi * S));
      in_valid <= v;
      yr = real'($rtoi(yr * S)) / S;
      yi = real'($rtoi(yi * S)) / S;
      for (int b = 0; b < 6; b++) e[b] = ref_llr(yr, yi, b);
      for (int b = 0; b < 6; b++) exp_llr.push_back(e[b]);
      exp_bits.push_back(tag);
      exp_v.push_back(v);
      @(posedge clk);
      if (exp_v.size() > 3) begin
        int ee [6];
        int tg;
        bit vv;
        for (int b = 0; b < 6; b++) ee[b] = exp_llr.pop_front();
        tg = exp_bits.pop_front();
        vv = exp_v.pop_front();
        checks++;
        if (out_valid !== vv) begin failures++; $display("ERROR: out_valid at %0d", n); end
        if (vv) for (int b = 0; b < 6; b++) begin
          int d;
          checks++;
          d = int'(llr_out[b]) - ee[b];
          if (d > 4 || d < -4) begin
            failures++;
            if (failures < 10) $display("ERROR: n=%0d bit %0d got %0d want %0d", n, b, llr_out[b], ee[b]);
          end
          if (tg >= 0) begin
            checks++;
            if ((llr_out[b] < 0) != (((tg >> (5 - b)) & 1) == 1)) begin
              failures++;
              if (failures < 10) $display("ERROR: hard decision n=%0d bit %0d", n, b);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
