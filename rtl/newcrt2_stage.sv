// newcrt2_stage: two-moduli residue-to-binary converter after New CRT II.
//
// For coprime moduli P1, P2 and residues x1 = |X|_P1, x2 = |X|_P2 it returns
//     X = x2 + | k0 * (x1 - x2) |_P1 * P2,      k0 * P2 = 1 (mod P1),
// the number in 0 .. P1*P2-1 with those residues. Only arithmetic modulo
// P1 is needed, never modulo the product P1*P2, which is what makes this
// converter cheap. k0 is computed at elaboration. The datapath is:
//   x2 reduced modulo P1 (only when P2 > P1), modular subtractor (carry
//   bypass adders), modular multiply by k0 (radix-16 Booth), a Booth
//   multiply by the constant P2, and a final carry bypass adder.
// The equation and the use of these arithmetic units are the document's;
// the order of operations in hardware is this design's. Stages chain into
// trees (newcrt2_conv8) because the output is itself a residue modulo
// P1*P2. The final adder is W1+W2 bits wide; when P1*P2 needs fewer bits
// its top bits are always 0 and are dropped (lint reports them unused).
// Purely combinational.
module newcrt2_stage
  import rns_pkg::*;
#(
  parameter longint unsigned P1 = 16,
  parameter longint unsigned P2 = 15,
  localparam int unsigned    W1 = bits_for(P1),
  localparam int unsigned    W2 = bits_for(P2),
  localparam int unsigned    WX = bits_for(P1 * P2)
) (
  input  logic [W1-1:0] x1,   // residue modulo P1
  input  logic [W2-1:0] x2,   // residue modulo P2
  output logic [WX-1:0] x     // value modulo P1*P2
);

  localparam longint unsigned K0 = mod_inverse(P2, P1);

  logic [W1-1:0]    x2r;      // x2 reduced modulo P1
  logic [W1-1:0]    d;        // |x1 - x2|_P1
  logic [W1-1:0]    t;        // |k0 * d|_P1
  logic [W1+W2-1:0] tp;       // t * P2
  logic [W1+W2-1:0] sum;
  logic             c_unused;

  if (P2 > P1) begin : g_red
    assign x2r = W1'(x2 % W2'(P1));
  end else begin : g_nored
    assign x2r = W1'(x2);
  end

  mod_addsub  #(.M(P1))             u_sub (.a(x1), .b(x2r), .sub(1'b1), .y(d));
  mod_mul     #(.M(P1))             u_k   (.a(d), .b(W1'(K0)), .y(t));
  booth16_mul #(.WA(W1), .WB(W2))   u_p2  (.a(t), .b(W2'(P2)), .p(tp));
  cska_adder  #(.W(W1+W2))          u_add (
    .a(tp), .b((W1+W2)'(x2)), .cin(1'b0), .sum(sum), .cout(c_unused)
  );

  assign x = WX'(sum);

endmodule
