// booth16_encoder: radix-16 modified Booth digit encoder.
//
// One encoder looks at a five-bit window of the multiplier,
// win = {x[i+3], x[i+2], x[i+1], x[i], x[i-1]}, and produces the signed
// digit d = -8*x[i+3] + 4*x[i+2] + 2*x[i+1] + x[i] + x[i-1], in the range
// -8 .. +8, so the selected partial product is one of 0, +-1Y .. +-8Y. The
// digit is given as a sign (neg) and a magnitude (mag, 0..8); neg is never
// set together with a zero magnitude. The radix-16 recoding follows the
// document; computing the digit from the formula above rather than from a
// stored table, and the sign/magnitude output form, are this design's
// choices. Purely combinational.
module booth16_encoder (
  input  logic [4:0] win,  // {x[i+3], x[i+2], x[i+1], x[i], x[i-1]}
  output logic       neg,  // digit is negative
  output logic [3:0] mag   // digit magnitude, 0..8
);

  logic signed [5:0] digit;

  always_comb begin
    digit = -6'sd8 * $signed({5'd0, win[4]})
          +  6'sd4 * $signed({5'd0, win[3]})
          +  6'sd2 * $signed({5'd0, win[2]})
          +          $signed({5'd0, win[1]})
          +          $signed({5'd0, win[0]});
    neg = digit[5];
    mag = neg ? 4'(-digit) : 4'(digit);
  end

endmodule
