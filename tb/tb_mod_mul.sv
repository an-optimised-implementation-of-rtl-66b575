// tb_mod_mul: exhaustive check of the modular multiplier for the channel
// moduli 15, 16 and 17, and a random check for a 20-bit modulus.
module tb_mod_mul;
  logic [4:0]  a17, b17, y17;
  logic [3:0]  a16, b16, y16, a15, b15, y15;
  logic [19:0] ab, bb, yb;
  int checks = 0, failures = 0;

  localparam longint unsigned MB = 1038345;

  mod_mul              dut17 (.a(a17), .b(b17), .y(y17));
  mod_mul #(.M(16))    dut16 (.a(a16), .b(b16), .y(y16));
  mod_mul #(.M(15))    dut15 (.a(a15), .b(b15), .y(y15));
  mod_mul #(.M(MB))    dutb  (.a(ab),  .b(bb),  .y(yb));

  task automatic cmp(string name, longint unsigned got, longint unsigned exp_v,
                     longint unsigned x, longint unsigned y);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d y=%0d expected %0d", name, x, y, got, exp_v);
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
    for (int x = 0; x < 17; x++)
      for (int y = 0; y < 17; y++) begin
        a17 = 5'(x); b17 = 5'(y);
        a16 = 4'(x % 16); b16 = 4'(y % 16);
        a15 = 4'(x % 15); b15 = 4'(y % 15);
        #1;
        cmp("m17", y17, (x * y) % 17, x, y);
        if (x < 16 && y < 16) cmp("m16", y16, (x * y) % 16, x, y);
        if (x < 15 && y < 15) cmp("m15", y15, (x * y) % 15, x, y);
      end
    for (int i = 0; i < 3000; i++) begin
      automatic longint unsigned x = $urandom % MB, y = $urandom % MB;
      if (i == 0) begin x = MB - 1; y = MB - 1; end
      ab = 20'(x); bb = 20'(y); #1;
      cmp("mbig", yb, (x * y) % MB, x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
