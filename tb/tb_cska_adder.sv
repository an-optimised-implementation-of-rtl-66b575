// tb_cska_adder: checks the carry bypass adder against the plain sum.
// The 32-bit default instance gets carries that skip every stage (all-ones
// plus carry-in), random operands and random operands whose stages are
// forced to propagate; a 5-bit and a 13-bit instance are tested
// exhaustively / randomly. Counts how often a carry crossed a whole stage
// by the skip path, and fails if that never happened.
module tb_cska_adder;
  logic [31:0] a, b, s;
  logic        cin, cout;
  logic [4:0]  a5, b5, s5;
  logic        c5, co5;
  logic [12:0] a13, b13, s13;
  logic        co13;
  int checks = 0, failures = 0, skips = 0;

  cska_adder              dut   (.a(a),   .b(b),   .cin(cin), .sum(s),   .cout(cout));
  cska_adder #(.W(5))     dut5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5),  .cout(co5));
  cska_adder #(.W(13))    dut13 (.a(a13), .b(b13), .cin(1'b0), .sum(s13), .cout(co13));

  task automatic check32(logic [31:0] x, logic [31:0] y, logic ci);
    logic [32:0] ref_s;
    a = x; b = y; cin = ci; #1;
    ref_s = 33'(x) + 33'(y) + 33'(ci);
    checks++;
    if ({cout, s} !== ref_s) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, expected %h", x, y, ci, {cout, s}, ref_s);
    end
    // A carry skips stage j (bits 1..2, 3..5, ...) when every bit of it
    // propagates and a carry enters it.
    for (int j = 1, lo = 1; lo < 32; j++) begin
      int sz = (lo + j + 1 > 32) ? 32 - lo : j + 1;
      logic [32:0] cin_bits = 33'(x) + 33'(y) + 33'(ci) ^ 33'(x) ^ 33'(y);
      if (((x ^ y) >> lo & ((32'd1 << sz) - 1)) == ((32'd1 << sz) - 1) && cin_bits[lo])
        skips++;
      lo += sz;
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
    check32(32'hFFFFFFFF, 0, 1);
    check32(32'hFFFFFFFF, 32'hFFFFFFFF, 1);
    check32(32'hAAAAAAAA, 32'h55555555, 1);
    check32(32'hAAAAAAAA, 32'h55555555, 0);
    check32(32'h7FFFFFFF, 1, 0);
    check32(0, 0, 0);
    for (int i = 0; i < 3000; i++) check32($urandom, $urandom, 1'($urandom));
    for (int i = 0; i < 2000; i++) begin
      automatic logic [31:0] x = $urandom;
      automatic logic [31:0] m = $urandom & $urandom;  // mostly propagate positions
      check32(x, ~x ^ m, 1'($urandom));
    end
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(x); b5 = 5'(y); c5 = 1'(c); #1;
          checks++;
          if ({co5, s5} !== 6'(x + y + c)) begin
            failures++;
            $display("FAIL 5-bit %0d + %0d + %0d = %0d", x, y, c, {co5, s5});
          end
        end
    for (int i = 0; i < 2000; i++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); #1;
      checks++;
      if ({co13, s13} !== 14'(a13) + 14'(b13)) begin
        failures++;
        $display("FAIL 13-bit %0d + %0d = %0d", a13, b13, {co13, s13});
      end
    end
    $display("carries that skipped a whole stage: %0d", skips);
    checks++;
    if (skips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
