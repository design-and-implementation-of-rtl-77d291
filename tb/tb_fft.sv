// tb_fft: self-checking test of the 1024-point fft (default parameters).
// Reference: direct DFT in real arithmetic divided by N (the block halves the
// values in each of its 10 stages).  Frames: a single complex tone (energy
// must land in one bin), random full-scale-limited noise, and an OFDM-like
// frame of QPSK values on a subset of bins passed through an inverse DFT.
// Every output bin must match within 4 LSB; out_idx, out_last, busy and the
// load/compute/output handshake are checked, with random out_ready stalls.
module tb_fft;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 1024;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last, busy;
  logic signed [15:0] in_re = 0, in_im = 0, out_re, out_im;
  logic [9:0] out_idx;

  fft dut (.clk, .rst_n, .in_valid, .in_ready, .in_re, .in_im, .out_valid,
           .out_ready, .out_re, .out_im, .out_idx, .out_last, .busy);

  int xr [N], xi [N];
  real cs [N], sn [N];

  task automatic run_frame(input string name);
    real er [N], ei [N];
    int k, cyc;
    // reference DFT / N
    for (int m = 0; m < N; m++) begin
      real ar, ai;
      ar = 0; ai = 0;
      for (int n = 0; n < N; n++) begin
        int t;
        t = (m * n) % N;
        ar += xr[n] * cs[t] + xi[n] * sn[t];
        ai += xi[n] * cs[t] - xr[n] * sn[t];
      end
      er[m] = ar / N; ei[m] = ai / N;
    end
    // load
    for (int n = 0; n < N; n++) begin
      in_valid <= 1'b1; in_re <= 16'(xr[n]); in_im <= 16'(xi[n]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if ($urandom_range(0, 7) == 0) begin in_valid <= 1'b0; @(posedge clk); end
    end
    in_valid <= 1'b0;
    @(posedge clk);
    checks++;
    if (!busy || in_ready) begin failures++; $display("ERROR: %s: not busy after load", name); end
    // unload
    k = 0; cyc = 0;
    while (k < N && cyc < 20000) begin
      out_ready <= 1'($urandom_range(0, 3) != 0);
      @(posedge clk);
      cyc++;
      if (out_valid && out_ready) begin
        real dr, di;
        dr = real'(out_re) - er[k];
        di = real'(out_im) - ei[k];
        checks++;
        if (dr > 4.0 || dr < -4.0 || di > 4.0 || di < -4.0 || out_idx != 10'(k) || out_last != (k == N-1)) begin
          failures++;
          if (failures < 10) $display("ERROR: %s bin %0d got (%0d,%0d) want (%f,%f) idx %0d",
                                      name, k, out_re, out_im, er[k], ei[k], out_idx);
        end
        k++;
      end
    end
    out_ready <= 1'b0;
    checks++;
    if (k != N) begin failures++; $display("ERROR: %s: only %0d bins", name, k); end
    @(posedge clk);
    checks++;
    if (!in_ready) begin failures++; $display("ERROR: %s: not ready for next frame", name); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < N; t++) begin
      cs[t] = $cos(2.0 * 3.14159265358979 * t / N);
      sn[t] = $sin(2.0 * 3.14159265358979 * t / N);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // tone in bin 37
    for (int n = 0; n < N; n++) begin
      xr[n] = $rtoi(8000.0 * cs[(37 * n) % N]);
      xi[n] = $rtoi(8000.0 * sn[(37 * n) % N]);
    end
    run_frame("tone");
    // random samples
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 16000) - 8000;
      xi[n] = $urandom_range(0, 16000) - 8000;
    end
    run_frame("noise");
    // QPSK on bins 100..399 through an inverse DFT
    begin
      real yr [N], yi [N];
      for (int n = 0; n < N; n++) begin yr[n] = 0; yi[n] = 0; end
      for (int m = 100; m < 400; m++) begin
        real ar, ai;
        ar = $urandom_range(0, 1) ? 1.0 : -1.0;
        ai = $urandom_range(0, 1) ? 1.0 : -1.0;
        for (int n = 0; n < N; n++) begin
          int t;
          t = (m * n) % N;
          yr[n] += ar * cs[t] - ai * sn[t];
          yi[n] += ar * sn[t] + ai * cs[t];
        end
      end
      for (int n = 0; n < N; n++) begin
        xr[n] = $rtoi(yr[n] * 200.0);
        xi[n] = $rtoi(yi[n] * 200.0);
      end
    end
    run_frame("ofdm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
