// deinterleaver: undoes the 5G NR bit interleaver of one code block.
//
// The transmitter writes the E rate-matched bits e_k row by row into a matrix
// of Qm rows and E/Qm columns and reads it column by column:
//     f(i + j*Qm) = e(i*E/Qm + j),  i < Qm, j < E/Qm   (TS 38.212 5.4.2.2).
// The receiver stores the E received values f in a RAM in arrival order and
// reads them back in the order of e: output k = i*E/Qm + j comes from address
// J(i,j) = i + j*Qm.  The address is generated without multiplication: it
// starts at i and grows by Qm along a row, and the next row restarts at i+1.
//
// Operation: after e_len values have been accepted (in_valid && in_ready) the
// block switches to output and delivers e_len values on out_* (out_valid &&
// out_ready), flagging the last with out_last, then raises done for one cycle
// and accepts the next block.  e_len must be a multiple of qm, at most EMAX.
// DW is the width of one value: 1 for hard bits (the document's interface),
// 16 for soft values in the receive chain.  The matrix rule and the address
// recursion follow the document; the RAM-based streaming form and the
// handshake are this design's own.
module deinterleaver
  import pdsch_pkg::*;
#(
  parameter int EMAX = 8192,
  parameter int DW   = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(EMAX+1)-1:0] e_len,
  input  logic [3:0]               qm,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [DW-1:0]            in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [DW-1:0]            out_data,
  output logic                     out_last,
  output logic                     done
);
  localparam int AW = $clog2(EMAX+1);

  logic [DW-1:0] mem [EMAX];

  typedef enum logic {S_IN, S_OUT} state_t;
  state_t state;

  logic [AW-1:0] wcnt, rcnt, raddr, row_start;

  assign in_ready  = (state == S_IN);
  assign out_valid = (state == S_OUT);
  assign out_data  = mem[raddr[$clog2(EMAX)-1:0]];
  assign out_last  = (state == S_OUT) && (rcnt == e_len - 1'b1);

  always_ff @(posedge clk) begin
    if (state == S_IN && in_valid) mem[wcnt[$clog2(EMAX)-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IN;
      wcnt      <= '0;
      rcnt      <= '0;
      raddr     <= '0;
      row_start <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IN: if (in_valid) begin
          if (wcnt == e_len - 1'b1) begin
            wcnt      <= '0;
            rcnt      <= '0;
            raddr     <= '0;
            row_start <= '0;
            state     <= S_OUT;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        S_OUT: if (out_ready) begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == e_len - 1'b1) begin
            state <= S_IN;
            done  <= 1'b1;
          end else if (raddr + AW'(qm) >= e_len) begin
            // end of a row of the matrix: next row starts at i+1
            raddr     <= row_start + 1'b1;
            row_start <= row_start + 1'b1;
          end else begin
            raddr <= raddr + AW'(qm);
          end
        end
        default: state <= S_IN;
      endcase
    end
  end
endmodule
