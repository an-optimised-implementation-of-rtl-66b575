// rns_channel: one arithmetic channel of the residue number system.
//
// Each modulus of the RNS has its own channel, and the channels run in
// parallel with no carries between them. This channel applies the selected
// operation to two residues a, b (0..M-1):
//   OP_ADD: |a + b|_M   (mod_addsub, carry bypass adders)
//   OP_SUB: |a - b|_M   (mod_addsub)
//   OP_MUL: |a * b|_M   (mod_mul, radix-16 Booth multiplier)
// The unused code 3 gives 0. Purely combinational.
module rns_channel
  import rns_pkg::*;
#(
  parameter longint unsigned M = 17,
  localparam int unsigned    W = bits_for(M)
) (
  input  rns_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic [W-1:0] y_as, y_mul;

  mod_addsub #(.M(M)) u_addsub (.a(a), .b(b), .sub(op == OP_SUB), .y(y_as));
  mod_mul    #(.M(M)) u_mul    (.a(a), .b(b), .y(y_mul));

  always_comb begin
    unique case (op)
      OP_ADD, OP_SUB: y = y_as;
      OP_MUL:         y = y_mul;
      default:        y = '0;
    endcase
  end

endmodule
