// tb_booth16_mul: checks the radix-16 Booth multiplier against the plain
// product. A 16x16 instance (the default size) gets corner cases and random
// operands; a 5x5 instance, the size of one RNS channel, is tested
// exhaustively; a 7x9 instance checks unequal widths.
module tb_booth16_mul;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  logic [6:0]  a7;
  logic [8:0]  b9;
  logic [15:0] p79;
  int checks = 0, failures = 0;

  booth16_mul                     dut16 (.a(a16), .b(b16), .p(p16));
  booth16_mul #(.WA(5), .WB(5))   dut5  (.a(a5),  .b(b5),  .p(p5));
  booth16_mul #(.WA(7), .WB(9))   dut79 (.a(a7),  .b(b9),  .p(p79));

  task automatic check16(logic [15:0] x, logic [15:0] y);
    logic [31:0] ref_p;
    a16 = x; b16 = y; #1;
    ref_p = 32'(x) * 32'(y);
    checks++;
    if (p16 !== ref_p) begin
      failures++;
      $display("FAIL 16x16 %0d * %0d = %0d, expected %0d", x, y, p16, ref_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16(0, 0);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'hFFFF, 1);
    check16(1, 16'hFFFF);
    check16(16'h8888, 16'h7777);
    check16(16'h7777, 16'h8888);
    for (int i = 0; i < 16; i++) check16(16'($urandom), 16'(i * 16'h1111));
    for (int i = 0; i < 3000; i++) check16(16'($urandom), 16'($urandom));
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a5 = 5'(x); b5 = 5'(y); #1;
        checks++;
        if (p5 !== 10'(x * y)) begin
          failures++;
          $display("FAIL 5x5 %0d * %0d = %0d", x, y, p5);
        end
      end
    for (int i = 0; i < 1000; i++) begin
      a7 = 7'($urandom); b9 = 9'($urandom); #1;
      checks++;
      if (p79 !== 16'(a7) * 16'(b9)) begin
        failures++;
        $display("FAIL 7x9 %0d * %0d = %0d", a7, b9, p79);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
