// tb_mod_addsub: exhaustive check of the modular adder/subtractor for the
// three channel moduli 15, 16 and 17, and a random check for a 20-bit
// modulus (1038345) as used inside the 8-moduli converter.
module tb_mod_addsub;
  logic [4:0]  a17, b17, y17;
  logic [3:0]  a16, b16, y16, a15, b15, y15;
  logic [19:0] ab, bb, yb;
  logic        sub;
  int checks = 0, failures = 0;

  localparam longint unsigned MB = 1038345;

  mod_addsub              dut17 (.a(a17), .b(b17), .sub(sub), .y(y17));
  mod_addsub #(.M(16))    dut16 (.a(a16), .b(b16), .sub(sub), .y(y16));
  mod_addsub #(.M(15))    dut15 (.a(a15), .b(b15), .sub(sub), .y(y15));
  mod_addsub #(.M(MB))    dutb  (.a(ab),  .b(bb),  .sub(sub), .y(yb));

  function automatic longint unsigned expect_y(longint unsigned x, longint unsigned y,
                                               logic s, longint unsigned m);
    return s ? (x + m - y) % m : (x + y) % m;
  endfunction

  task automatic cmp(string name, longint unsigned got, longint unsigned exp_v,
                     longint unsigned x, longint unsigned y);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d sub=%b y=%0d expected %0d", name, x, y, sub, got, exp_v);
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
    for (int s = 0; s < 2; s++)
      for (int x = 0; x < 17; x++)
        for (int y = 0; y < 17; y++) begin
          sub = 1'(s);
          a17 = 5'(x); b17 = 5'(y);
          a16 = 4'(x % 16); b16 = 4'(y % 16);
          a15 = 4'(x % 15); b15 = 4'(y % 15);
          #1;
          cmp("m17", y17, expect_y(x, y, sub, 17), x, y);
          if (x < 16 && y < 16) cmp("m16", y16, expect_y(x, y, sub, 16), x, y);
          if (x < 15 && y < 15) cmp("m15", y15, expect_y(x, y, sub, 15), x, y);
        end
    for (int i = 0; i < 3000; i++) begin
      automatic longint unsigned x = $urandom % MB, y = $urandom % MB;
      if (i == 0) begin x = MB - 1; y = MB - 1; end
      if (i == 1) begin x = 0; y = MB - 1; end
      sub = 1'($urandom);
      ab = 20'(x); bb = 20'(y); #1;
      cmp("mbig", yb, expect_y(x, y, sub, MB), x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
