// mod_addsub: modular adder / subtractor for one RNS channel.
//
// Computes y = |a + b|_M (sub = 0) or y = |a - b|_M (sub = 1) for residues
// a, b in 0..M-1. Two carry bypass adders work on W+1 bits, W = ceil(log2 M):
//   1. s1 = a + b, or a - b as a + ~b + 1;
//   2. s2 = s1 - M (addition) or s1 + M (subtraction).
// For addition the result is s2 when it is not negative (a + b >= M), else
// s1; for subtraction it is s2 when s1 is negative (a < b), else s1. Both
// corrections are computed in parallel and one is selected, so the delay is
// two adders and a multiplexer. The two-adder structure is this design's
// choice; the document asks only for modular adders built from the carry
// bypass adder. Purely combinational.
module mod_addsub
  import rns_pkg::*;
#(
  parameter longint unsigned M = 17,
  localparam int unsigned    W = bits_for(M)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);

  logic [W:0] ax, bx, s1, s2, corr;
  logic       c1_unused, c2_unused;

  assign ax   = {1'b0, a};
  assign bx   = sub ? ~{1'b0, b} : {1'b0, b};
  // +M for subtraction, -M (two's complement on W+1 bits) for addition.
  assign corr = sub ? (W+1)'(M) : (W+1)'(~M + 64'd1);

  cska_adder #(.W(W+1)) u_s1 (.a(ax), .b(bx),   .cin(sub),  .sum(s1), .cout(c1_unused));
  cska_adder #(.W(W+1)) u_s2 (.a(s1), .b(corr), .cin(1'b0), .sum(s2), .cout(c2_unused));

  always_comb begin
    if (sub) y = s1[W] ? s2[W-1:0] : s1[W-1:0];
    else     y = s2[W] ? s1[W-1:0] : s2[W-1:0];
  end

endmodule
