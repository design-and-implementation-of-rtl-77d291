// tb_llr_serializer: self-checking test of llr_serializer.
// The test plays the demapper: a symbol is launched only while can_launch is
// high, and its vector of 6 random soft bits arrives on in_valid 3 cycles
// later (the demapper latency).  The output stream, read with random
// out_ready, must be the vectors' elements in order, b_0 first, with nothing
// lost or repeated, and can_launch must stay low while a symbol is in flight
// or a vector is still being sent.
module tb_llr_serializer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic want = 0, launch, can_launch, in_valid = 0, out_valid, out_ready = 0;
  logic signed [15:0] in_llr [6];
  logic signed [15:0] out_data;

  llr_serializer dut (.clk, .rst_n, .launch, .can_launch, .in_valid, .in_llr,
                      .out_valid, .out_ready, .out_data);

  assign launch = want && can_launch && rst_n;

  int expq [$];
  logic signed [15:0] pipe [2][6];
  bit pv [2];
  int n_out = 0, n_launch = 0;

  initial for (int i = 0; i < 6; i++) in_llr[i] = 0;

  // demapper stand-in: the vector arrives 3 cycles after the launch edge
  always @(posedge clk) begin
    logic signed [15:0] v [6];
    bit go;
    go = launch;
    in_valid <= pv[1];
    in_llr   <= pipe[1];
    pv[1] <= pv[0]; pipe[1] <= pipe[0];
    pv[0] <= go;
    if (go) begin
      for (int i = 0; i < 6; i++) begin v[i] = 16'($urandom); expq.push_back(int'(v[i])); end
      pipe[0] <= v;
      n_launch++;
    end
    if (rst_n) begin
      checks++;
      if (can_launch && (pv[0] || pv[1] || out_valid)) begin
        failures++; $display("ERROR: can_launch while busy");
      end
    end
    if (out_valid && out_ready) begin
      int e;
      e = expq.pop_front();
      checks++;
      if (int'(out_data) != e) begin
        failures++; if (failures < 10) $display("ERROR: out %0d got %0d want %0d", n_out, out_data, e);
      end
      n_out++;
    end
    want      <= 1'($urandom_range(0, 2) != 0);
    out_ready <= 1'($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    checks++;
    if (n_launch < 100 || n_out < 6 * (n_launch - 1)) begin
      failures++; $display("ERROR: launched %0d symbols, %0d values out", n_launch, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
