// llr_serializer: turns the demapper's vector of QM soft bits per symbol into
// a stream of one soft bit per cycle, b_0 first.
//
// The demapper pipeline cannot stall, so symbols are only launched into it
// when there is room: can_launch is high when no vector is held and no symbol
// is inside the demapper (launch is the upstream "symbol sent" strobe; the
// count of symbols in flight is kept here).  Output: out_valid/out_ready/
// out_data, one soft bit per accepted transfer.  Glue logic of this design;
// the document only says that the demapper output has QM soft bits per symbol.
module llr_serializer
  import pdsch_pkg::*;
#(
  parameter int QM = 6,
  parameter int W  = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                launch,
  output logic                can_launch,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_llr [QM],
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_data
);
  logic signed [W-1:0] hold [QM];
  logic [$clog2(QM+1)-1:0] left, idx;
  logic [2:0] inflight;

  assign can_launch = (left == '0) && (inflight == '0) && !in_valid;
  assign out_valid  = (left != '0);
  assign out_data   = hold[idx[$clog2(QM)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left     <= '0;
      idx      <= '0;
      inflight <= '0;
      for (int i = 0; i < QM; i++) hold[i] <= '0;
    end else begin
      if (launch && !in_valid)      inflight <= inflight + 1'b1;
      else if (!launch && in_valid) inflight <= inflight - 1'b1;
      if (in_valid) begin
        hold <= in_llr;
        left <= ($bits(left))'(QM);
        idx  <= '0;
      end else if (out_valid && out_ready) begin
        left <= left - 1'b1;
        idx  <= idx + 1'b1;
      end
    end
  end
endmodule
