// tb_newcrt2_conv8: checks the 8-moduli New CRT II converter at its default
// moduli {31, 33, 29, 35, 23, 41, 17, 47}. A random X below the dynamic
// range is split into residues here and the converter must return X; the
// ends of the range and values that hit a zero residue are included.
module tb_newcrt2_conv8;
  localparam longint unsigned P [8] = '{31, 33, 29, 35, 23, 41, 17, 47};
  localparam longint unsigned MT = 64'd31*33*29*35*23*41*17*47;

  logic [5:0]  x [8];
  logic [39:0] y;
  int checks = 0, failures = 0;

  newcrt2_conv8 dut (.x(x), .y(y));

  task automatic check(longint unsigned v);
    foreach (x[i]) x[i] = 6'(v % P[i]);
    #1;
    checks++;
    if (longint'(y) != longint'(v)) begin
      failures++;
      $display("FAIL X=%0d got %0d", v, y);
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
    check(0);
    check(1);
    check(MT - 1);
    check(MT / 2);
    check(31 * 33);
    check(29 * 35 * 23 * 41);
    for (int i = 0; i < 5000; i++)
      check(({32'($urandom), 32'($urandom)}) % MT);
    for (int i = 0; i < 200; i++)
      check(longint'($urandom % 1000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
