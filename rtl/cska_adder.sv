// cska_adder: square carry bypass adder, built as a concatenation-
// incrementation carry-skip adder (CI-CSKA).
//
// The W-bit operands are cut into stages whose sizes grow by one bit per
// stage from the least significant end (1, 2, 3, ... bits; the last stage
// takes what is left), the "square-root" sizing that gives the adder its
// name. Stage 1 is a plain ripple-carry adder (RCA) fed with cin. Every
// later stage j has:
//   * an Mj-bit RCA of full adders (S = A ^ B ^ C, C = AB + AC + BC) whose
//     carry input is tied to 0, giving an intermediate sum and a block carry;
//   * skip logic that forms the stage carry-out as
//       c_j = c_rca_j | (&intermediate_sum & c_(j-1)),
//     so an incoming carry bypasses the whole stage in one gate level;
//   * an incrementation block that adds the incoming carry c_(j-1) to the
//     intermediate sum to form the final sum bits.
// The RCAs of all stages work in parallel; only the skip gates lie on the
// carry chain. Using the AND of the intermediate sum bits as the stage's
// propagate signal is exact because the RCA ran with a zero carry-in. The
// stage sizing rule and the carry-in of 0 are this design's reading of the
// bypass adder; the document gives the full-adder equations and the stage
// structure. Purely combinational.
module cska_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  // Stage j (0-based) starts at bit j*(j+1)/2 and is j+1 bits wide.
  function automatic int unsigned stage_lo(int unsigned j);
    return j * (j + 1) / 2;
  endfunction

  function automatic int unsigned num_stages(int unsigned w);
    int unsigned q;
    q = 1;
    while (stage_lo(q) < w) q++;
    return q;
  endfunction

  localparam int unsigned NS = num_stages(W);

  for (genvar j = 0; j < NS; j++) begin : g_stage
    localparam int unsigned LO = stage_lo(j);
    localparam int unsigned SZ = (LO + j + 1 > W) ? (W - LO) : (j + 1);

    logic          c_in;    // carry entering this stage
    logic          c_out;   // carry leaving this stage (after skip logic)
    logic [SZ-1:0] s_int;   // RCA sum (with zero carry-in after stage 1)
    logic [SZ:0]   rc;      // RCA carries

    if (j == 0) begin : g_first
      assign c_in = cin;
    end else begin : g_next
      assign c_in = g_stage[j-1].c_out;
    end

    // Stage 1 ripples from the adder's carry input; later stages start
    // their RCA from 0 (concatenation).
    assign rc[0] = (j == 0) ? c_in : 1'b0;
    for (genvar i = 0; i < SZ; i++) begin : g_fa
      assign s_int[i] = a[LO+i] ^ b[LO+i] ^ rc[i];
      assign rc[i+1]  = (a[LO+i] & b[LO+i]) | (a[LO+i] & rc[i]) | (b[LO+i] & rc[i]);
    end

    if (j == 0) begin : g_plain
      assign c_out        = rc[SZ];
      assign sum[LO +: SZ] = s_int;
    end else begin : g_ci
      logic [SZ-1:0] ic;    // incrementation carries
      // Skip logic: the incoming carry bypasses the stage when every
      // intermediate sum bit is 1.
      assign c_out = rc[SZ] | ((&s_int) & c_in);
      // Incrementation block: add the incoming carry to the intermediate sum.
      assign ic[0] = c_in;
      for (genvar i = 0; i < SZ; i++) begin : g_inc
        assign sum[LO+i] = s_int[i] ^ ic[i];
        if (i + 1 < SZ) begin : g_c
          assign ic[i+1] = s_int[i] & ic[i];
        end
      end
    end
  end

  assign cout = g_stage[NS-1].c_out;

endmodule
