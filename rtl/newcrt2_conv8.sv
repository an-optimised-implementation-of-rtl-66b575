// newcrt2_conv8: residue-to-binary converter for 8-element moduli sets,
// built by divide and conquer from New CRT II stages.
//
// Three levels of newcrt2_stage: four stages turn the residue pairs
// (x1,x2), (x3,x4), (x5,x6), (x7,x8) into numbers modulo P1P2, P3P4, P5P6
// and P7P8; two stages combine those into numbers modulo P1P2P3P4 and
// P5P6P7P8; a last stage gives X modulo the product of all eight moduli.
// Every stage combines a left value L (modulo PL) and a right value R
// (modulo PR) as
//     X = L + PL * | k * (R - L) |_PR ,   k * PL = 1 (mod PR),
// so the left modulus (P1, P3, P5, P7, then P1P2 and P5P6, then P1P2P3P4)
// is the constant multiplier, as labelled in the converter's block diagram.
// The tree shape is the document's. The eight moduli are not given there:
// the default is this design's conjugate set 32 +- k for k = 1, 3, 9, 15,
// i.e. {31, 33, 29, 35, 23, 41, 17, 47}, pairwise coprime, with a dynamic
// range of about 7.8e11 (40 bits). Any pairwise coprime set whose product
// fits in 63 bits may be given. Purely combinational.
module newcrt2_conv8
  import rns_pkg::*;
#(
  parameter longint unsigned P [8] = '{31, 33, 29, 35, 23, 41, 17, 47},
  localparam int unsigned    RW    = bits_for(max8(P)),
  localparam int unsigned    WX    = bits_for(P[0]*P[1]*P[2]*P[3]*P[4]*P[5]*P[6]*P[7])
) (
  input  logic [RW-1:0] x [8],   // x[i] = |X|_P[i]
  output logic [WX-1:0] y        // X
);

  function automatic longint unsigned max8(longint unsigned v [8]);
    longint unsigned m;
    m = 0;
    foreach (v[i]) if (v[i] > m) m = v[i];
    return m;
  endfunction

  localparam longint unsigned P01   = P[0] * P[1];
  localparam longint unsigned P23   = P[2] * P[3];
  localparam longint unsigned P45   = P[4] * P[5];
  localparam longint unsigned P67   = P[6] * P[7];
  localparam longint unsigned P0123 = P01 * P23;
  localparam longint unsigned P4567 = P45 * P67;

  // Level 1: four pairs.
  logic [bits_for(P01)-1:0]   z01;
  logic [bits_for(P23)-1:0]   z23;
  logic [bits_for(P45)-1:0]   z45;
  logic [bits_for(P67)-1:0]   z67;

  newcrt2_stage #(.P1(P[1]), .P2(P[0])) u_l1_0 (
    .x1(bits_for(P[1])'(x[1])), .x2(bits_for(P[0])'(x[0])), .x(z01));
  newcrt2_stage #(.P1(P[3]), .P2(P[2])) u_l1_1 (
    .x1(bits_for(P[3])'(x[3])), .x2(bits_for(P[2])'(x[2])), .x(z23));
  newcrt2_stage #(.P1(P[5]), .P2(P[4])) u_l1_2 (
    .x1(bits_for(P[5])'(x[5])), .x2(bits_for(P[4])'(x[4])), .x(z45));
  newcrt2_stage #(.P1(P[7]), .P2(P[6])) u_l1_3 (
    .x1(bits_for(P[7])'(x[7])), .x2(bits_for(P[6])'(x[6])), .x(z67));

  // Level 2: two halves.
  logic [bits_for(P0123)-1:0] z0123;
  logic [bits_for(P4567)-1:0] z4567;

  newcrt2_stage #(.P1(P23), .P2(P01)) u_l2_0 (.x1(z23), .x2(z01), .x(z0123));
  newcrt2_stage #(.P1(P67), .P2(P45)) u_l2_1 (.x1(z67), .x2(z45), .x(z4567));

  // Level 3: whole set.
  newcrt2_stage #(.P1(P4567), .P2(P0123)) u_l3 (.x1(z4567), .x2(z0123), .x(y));

endmodule
