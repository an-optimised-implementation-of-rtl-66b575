// mod_mul: modular multiplier for one RNS channel.
//
// Computes y = |a * b|_M for residues a, b in 0..M-1. The full 2W-bit
// product comes from the radix-16 Booth multiplier (booth16_mul); it is then
// reduced modulo the constant M. The document names the Booth multiplier but
// not the reduction: here it is a plain constant-modulus remainder, which a
// synthesis tool builds as a constant divider. For M = 2^n the reduction is
// just the low n bits. Purely combinational.
module mod_mul
  import rns_pkg::*;
#(
  parameter longint unsigned M = 17,
  localparam int unsigned    W = bits_for(M)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic [2*W-1:0] prod;

  booth16_mul #(.WA(W), .WB(W)) u_mul (.a(a), .b(b), .p(prod));

  assign y = W'(prod % (2*W)'(M));

endmodule
