// booth16_mul: unsigned WA x WB multiplier with radix-16 modified Booth
// recoding.
//
// The multiplier b is zero-extended by at least one bit (so its top window
// has a 0 sign bit), a 0 is appended below its LSB, and it is scanned in
// overlapping five-bit windows, four bits apart. Each window is recoded by a
// booth16_encoder into a digit in -8..+8, which selects one of the multiples
// 0, 1A .. 8A of the multiplicand and its sign. Only ceil((WB+1)/4)
// partial products result. The "hard" multiples 3A, 5A and 7A are formed
// once by carry bypass adders (7A as 8A - A); the others are shifts. The
// signed partial products are summed, in two's complement of WA+WB bits,
// by a chain of cska_adder instances; the product of two unsigned numbers
// always fits that width, so the wrap-around of the negative partial
// products cancels. The adder chain (rather than a compressor tree) is this
// design's choice. Purely combinational.
module booth16_mul #(
  parameter int unsigned WA = 16,
  parameter int unsigned WB = 16
) (
  input  logic [WA-1:0]    a,   // multiplicand
  input  logic [WB-1:0]    b,   // multiplier
  output logic [WA+WB-1:0] p    // a * b
);

  localparam int unsigned NG = (WB + 1 + 3) / 4;  // partial products
  localparam int unsigned WP = WA + WB;
  localparam int unsigned WM = WA + 4;            // width of 0..8 * a

  logic [4*NG:0] bx;   // {zero extension, b, appended 0}
  assign bx = {{(4*NG - WB){1'b0}}, b, 1'b0};

  // Hard multiples.
  logic [WM-1:0] a1, a2, a4, a8, a3, a5, a7;
  logic          c3_unused, c5_unused, c7_unused;
  assign a1 = WM'(a);
  assign a2 = a1 << 1;
  assign a4 = a1 << 2;
  assign a8 = a1 << 3;

  cska_adder #(.W(WM)) u_x3 (.a(a1), .b(a2),  .cin(1'b0), .sum(a3), .cout(c3_unused));
  cska_adder #(.W(WM)) u_x5 (.a(a1), .b(a4),  .cin(1'b0), .sum(a5), .cout(c5_unused));
  cska_adder #(.W(WM)) u_x7 (.a(a8), .b(~a1), .cin(1'b1), .sum(a7), .cout(c7_unused));

  logic [WP-1:0] pp  [NG];   // signed partial products, two's complement
  logic [WP-1:0] acc [NG];   // running sums

  for (genvar g = 0; g < NG; g++) begin : g_pp
    logic          neg;
    logic [3:0]    mag;
    logic [WM-1:0] mult;
    logic [WP-1:0] shifted;

    booth16_encoder u_enc (.win(bx[4*g +: 5]), .neg(neg), .mag(mag));

    always_comb begin
      unique case (mag)
        4'd1:    mult = a1;
        4'd2:    mult = a2;
        4'd3:    mult = a3;
        4'd4:    mult = a4;
        4'd5:    mult = a5;
        4'd6:    mult = a3 << 1;
        4'd7:    mult = a7;
        4'd8:    mult = a8;
        default: mult = '0;
      endcase
      shifted = WP'({{WP{1'b0}}, mult} << (4 * g));
      pp[g]   = neg ? (~shifted + WP'(1)) : shifted;
    end

    if (g == 0) begin : g_first
      assign acc[0] = pp[0];
    end else begin : g_add
      logic c_unused;
      cska_adder #(.W(WP)) u_acc (
        .a(acc[g-1]), .b(pp[g]), .cin(1'b0), .sum(acc[g]), .cout(c_unused)
      );
    end
  end

  assign p = acc[NG-1];

endmodule
