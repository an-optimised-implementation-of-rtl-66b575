// tb_newcrt2_stage: exhaustive check of the two-moduli New CRT II converter.
// For every X in the dynamic range the residues are formed here and the
// converter must return X: moduli (16, 15) (the default), (17, 240) (the
// second reverse stage of the RNS unit) and (15, 17).
module tb_newcrt2_stage;
  logic [3:0]  x1a, x2a;
  logic [7:0]  ya;
  logic [4:0]  x1b;
  logic [7:0]  x2b;
  logic [11:0] yb;
  logic [3:0]  x1c;
  logic [4:0]  x2c;
  logic [7:0]  yc;
  int checks = 0, failures = 0;

  newcrt2_stage                         dut_a (.x1(x1a), .x2(x2a), .x(ya));
  newcrt2_stage #(.P1(17), .P2(240))    dut_b (.x1(x1b), .x2(x2b), .x(yb));
  newcrt2_stage #(.P1(15), .P2(17))     dut_c (.x1(x1c), .x2(x2c), .x(yc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4080; x++) begin
      x1a = 4'(x % 16); x2a = 4'(x % 15);
      x1b = 5'(x % 17); x2b = 8'(x % 240);
      x1c = 4'(x % 15); x2c = 5'(x % 17);
      #1;
      if (x < 240) begin
        checks++;
        if (int'(ya) != x) begin failures++; $display("FAIL (16,15) X=%0d got %0d", x, ya); end
      end
      if (x < 255) begin
        checks++;
        if (int'(yc) != x) begin failures++; $display("FAIL (15,17) X=%0d got %0d", x, yc); end
      end
      checks++;
      if (int'(yb) != x) begin failures++; $display("FAIL (17,240) X=%0d got %0d", x, yb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
