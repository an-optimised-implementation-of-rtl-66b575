// seq_divider: sequential restoring binary divider.
//
// Divides an unsigned DW-bit dividend by a VW-bit divisor and returns the
// quotient and the remainder; in the RNS unit the remainder is the residue
// of the dividend for one modulus (binary-to-RNS conversion). The port set
// (start, dividend, divisor, busy, quotient, remainder) is that of the
// divider in the design's simulation waveform; the algorithm is this
// design's choice: one quotient bit per clock, most significant first.
//
// Timing: a start pulse while idle loads the operands on that clock edge.
// busy is high for the next DW clock cycles, one iteration per edge; at the
// edge that performs the last iteration busy falls and done rises for one
// cycle, and quotient/remainder are valid from then until the next start.
// A start while busy is ignored. With VW >= DW, division by zero yields an
// all-ones quotient and the dividend as remainder. Reset is asynchronous, active low.
module seq_divider #(
  parameter int unsigned DW = 32,   // dividend / quotient width
  parameter int unsigned VW = 32    // divisor / remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient,
  output logic [VW-1:0] remainder
);

  localparam int unsigned CW = $clog2(DW + 1);

  logic [VW-1:0] dvs_q;
  logic [CW-1:0] cnt_q;
  logic [VW:0]   trial;      // partial remainder shifted, one bit wider
  logic [VW:0]   diff;

  always_comb begin
    trial = {remainder, quotient[DW-1]};
    diff  = trial - {1'b0, dvs_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
      dvs_q     <= '0;
      cnt_q     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          quotient  <= dividend;
          remainder <= '0;
          dvs_q     <= divisor;
          cnt_q     <= CW'(DW);
        end
      end else begin
        // Restoring step: keep the difference when it is not negative.
        if (!diff[VW]) begin
          remainder <= diff[VW-1:0];
          quotient  <= {quotient[DW-2:0], 1'b1};
        end else begin
          remainder <= trial[VW-1:0];
          quotient  <= {quotient[DW-2:0], 1'b0};
        end
        cnt_q <= cnt_q - CW'(1);
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
