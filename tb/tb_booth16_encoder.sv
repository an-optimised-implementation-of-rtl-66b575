// tb_booth16_encoder: exhaustive check of the radix-16 Booth digit encoder.
// All 32 five-bit windows are applied; the expected digit for each comes
// from a hand-written recoding table (window 01100 is +6, 01110 is +7,
// 01111 is +8, 11100 is -2). Checks sign, magnitude and that zero is never
// negative.
module tb_booth16_encoder;
  logic [4:0] win;
  logic       neg;
  logic [3:0] mag;
  int checks = 0, failures = 0;

  // Expected digit for windows 0 .. 31.
  int expected [32] = '{ 0,  1,  1,  2,  2,  3,  3,  4,
                         4,  5,  5,  6,  6,  7,  7,  8,
                        -8, -7, -7, -6, -6, -5, -5, -4,
                        -4, -3, -3, -2, -2, -1, -1,  0};

  booth16_encoder dut (.win(win), .neg(neg), .mag(mag));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 32; w++) begin
      int got;
      win = 5'(w);
      #1;
      got = neg ? -int'(mag) : int'(mag);
      checks++;
      if (got != expected[w] || (neg && mag == 0)) begin
        failures++;
        $display("FAIL win=%05b digit=%0d expected %0d", win, got, expected[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
