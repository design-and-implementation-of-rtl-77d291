// llr_demapper: max-log soft demapper for Gray-mapped 64-QAM.
//
// For every received symbol y and every one of its six bits b_i the block
// finds the nearest constellation point whose label has b_i = 0 (set S0, 32
// points) and the nearest with b_i = 1 (set S1, 32 points) and outputs
//     LLR_i = min_S1 |y - x|^2 - min_S0 |y - x|^2,
// which is positive when the bit is more likely 0.  The noise scaling
// 1/(2 sigma^2) is left out: it is a common positive factor.
//
// Pipeline, one stage per cycle, so an LLR vector appears 3 cycles after its
// symbol and a new symbol can enter every cycle:
//   stage 1  squared Euclidean distance from y to all 64 points
//   stage 2  per bit, the minimum of the 32 S0 distances and of the 32 S1
//            distances, each found by a 5-level tree of comparators
//   stage 3  difference of the two minima, rounded back to the Q1.14 scale and
//            saturated to 16 bits
// The 64 distances are shared by the six bits (each bit splits the same 64
// points into its own S0 and S1).
//
// Constellation (TS 38.211 5.1.5): I = (1-2b0)(4-(1-2b2)(2-(1-2b4)))/sqrt(42),
// Q = (1-2b1)(4-(1-2b3)(2-(1-2b5)))/sqrt(42).  llr_out[i] belongs to b_i.
// Inputs in_re/in_im and outputs are Q1.14.  The three stages, the comparator
// tree and the 3-cycle latency follow the document; sharing the distances
// between bits and the output rounding are this design's own.
module llr_demapper
  import pdsch_pkg::*;
#(
  parameter int W    = 16,
  parameter int FRAC = 14,
  parameter int QM   = 6        // bits per symbol (64-QAM)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] llr_out [QM]
);
  localparam int NPT = 2**QM;
  localparam int DW  = 2*W + 2;          // distance width
  typedef logic [DW-1:0] dist_t;
  typedef logic signed [W-1:0] amp_t;
  typedef amp_t amp_tab_t [NPT];

  // amplitude of point p on one axis from its three axis bits (MSB first)
  function automatic amp_tab_t gen_axis(input bit q_axis);
    amp_tab_t t;
    int b0, b1, b2, lvl;
    real scale;
    scale = real'(2**FRAC) / $sqrt(42.0);
    for (int p = 0; p < NPT; p++) begin
      // label bits b0..b5: b0 is the MSB of p
      b0  = (p >> (QM - 1 - (q_axis ? 1 : 0))) & 1;
      b1  = (p >> (QM - 1 - (q_axis ? 3 : 2))) & 1;
      b2  = (p >> (QM - 1 - (q_axis ? 5 : 4))) & 1;
      lvl = (1 - 2*b0) * (4 - (1 - 2*b1) * (2 - (1 - 2*b2)));
      t[p] = amp_t'($rtoi($floor(real'(lvl) * scale + 0.5)));
    end
    return t;
  endfunction

  localparam amp_tab_t PT_I = gen_axis(1'b0);
  localparam amp_tab_t PT_Q = gen_axis(1'b1);

  // ---------------- stage 1: distances ----------------
  dist_t dsq [NPT];
  logic  v1, v2;

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPT; p++) begin
      logic signed [W:0] dx, dy;
      dx = (W+1)'(in_re) - (W+1)'(PT_I[p]);
      dy = (W+1)'(in_im) - (W+1)'(PT_Q[p]);
      dsq[p] <= DW'(dx * dx) + DW'(dy * dy);
    end
  end

  // ---------------- stage 2: minimum per bit and set ----------------
  function automatic dist_t tree_min(input dist_t v [NPT/2]);
    dist_t lvl [NPT/2];
    int n;
    lvl = v;
    n = NPT/2;
    while (n > 1) begin
      for (int i = 0; i < n/2; i++) lvl[i] = (lvl[2*i] < lvl[2*i+1]) ? lvl[2*i] : lvl[2*i+1];
      n = n / 2;
    end
    return lvl[0];
  endfunction

  dist_t min0 [QM];
  dist_t min1 [QM];

  always_ff @(posedge clk) begin
    for (int b = 0; b < QM; b++) begin
      dist_t s0 [NPT/2];
      dist_t s1 [NPT/2];
      int n0, n1;
      n0 = 0;
      n1 = 0;
      for (int p = 0; p < NPT; p++) begin
        if (((p >> (QM - 1 - b)) & 1) == 0) begin
          s0[n0] = dsq[p];
          n0++;
        end else begin
          s1[n1] = dsq[p];
          n1++;
        end
      end
      min0[b] <= tree_min(s0);
      min1[b] <= tree_min(s1);
    end
  end

  // ---------------- stage 3: difference ----------------
  always_ff @(posedge clk) begin
    for (int b = 0; b < QM; b++) begin
      logic signed [DW:0] diff, rnd;
      diff = (DW+1)'(min1[b]) - (DW+1)'(min0[b]);
      rnd  = (diff + (DW+1)'(2**(FRAC-1))) >>> FRAC;
      if (rnd > (DW+1)'(2**(W-1) - 1))       llr_out[b] <= W'(2**(W-1) - 1);
      else if (rnd < -(DW+1)'(2**(W-1) - 1)) llr_out[b] <= -W'(2**(W-1) - 1);
      else                                   llr_out[b] <= W'(rnd);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
  end
endmodule
