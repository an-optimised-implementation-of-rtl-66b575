// tb_rns_top: end-to-end test of the RNS unit and the 8-moduli converter at
// the default parameters (n = 4, moduli 15, 16, 17, 32-bit operands).
//
// Each operation is started with random or chosen operands; the testbench
// computes the expected residues, quotients and |a op b|_4080 itself and
// checks the DW + 2 cycle latency. It counts how often each mechanism
// occurred: addition, subtraction, multiplication, an operand beyond the
// dynamic range (reduced by forward conversion), a result that wrapped
// around the dynamic range (including negative differences), a start
// ignored while busy, and a conversion through the 8-moduli converter; a
// mechanism that never occurred counts as a failure. The example operand
// 2456 (residues 11, 8, 8) is included.
module tb_rns_top;
  import rns_pkg::*;
  localparam int DW = 32;
  localparam longint unsigned MR = 4080;
  localparam longint unsigned MODS [3] = '{15, 16, 17};
  localparam longint unsigned P8 [8] = '{31, 33, 29, 35, 23, 41, 17, 47};
  localparam longint unsigned MT = 64'd31*33*29*35*23*41*17*47;

  logic          clk = 0, rst_n = 0, start = 0;
  rns_op_e       op;
  logic [31:0]   a, b;
  logic          busy, done;
  logic [4:0]    a_res [3], b_res [3], y_res [3];
  logic [31:0]   a_quot [3], b_quot [3];
  logic [11:0]   result;
  logic [5:0]    c8_x [8];
  logic [39:0]   c8_y;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_mul = 0, n_reduce = 0, n_wrap = 0, n_ignored = 0, n_conv8 = 0;

  rns_top dut (.clk(clk), .rst_n(rst_n), .start(start), .op(op), .a(a), .b(b),
               .busy(busy), .done(done), .a_res(a_res), .b_res(b_res),
               .a_quot(a_quot), .b_quot(b_quot), .y_res(y_res), .result(result),
               .c8_x(c8_x), .c8_y(c8_y));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned ref_op(rns_op_e o, longint unsigned x, longint unsigned y,
                                             longint unsigned m);
    case (o)
      OP_ADD:  return (x + y) % m;
      OP_SUB:  return (x % m + m - y % m) % m;
      default: return ((x % m) * (y % m)) % m;
    endcase
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic run(rns_op_e o, logic [31:0] x, logic [31:0] y, bit poke);
    int lat;
    longint unsigned xa = x, yb = y, exact;
    @(negedge clk);
    op = o; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done && lat < 200) begin
      if (poke && lat == 3) begin
        start = 1; op = OP_MUL; a = ~x; b = ~y;   // must be ignored
        n_ignored++;
      end else start = 0;
      checks++;
      if (!busy) fail("busy low during an operation");
      @(negedge clk);
      lat++;
    end
    start = 0;
    checks++;
    if (lat != DW + 2) fail($sformatf("latency %0d, expected %0d", lat, DW + 2));
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (a_res[i] != 5'(xa % MODS[i]) || b_res[i] != 5'(yb % MODS[i]) ||
          a_quot[i] != 32'(xa / MODS[i]) || b_quot[i] != 32'(yb / MODS[i]))
        fail($sformatf("forward conversion of %0d, %0d mod %0d", xa, yb, MODS[i]));
      checks++;
      if (y_res[i] != 5'(ref_op(o, xa, yb, MODS[i])))
        fail($sformatf("channel %0d op %0d: %0d", i, o, y_res[i]));
    end
    checks++;
    if (result != 12'(ref_op(o, xa, yb, MR)))
      fail($sformatf("op %0d a=%0d b=%0d result %0d expected %0d", o, xa, yb, result,
                     ref_op(o, xa, yb, MR)));
    case (o)
      OP_ADD: begin n_add++; exact = xa % MR + yb % MR; end
      OP_SUB: begin n_sub++; exact = (xa % MR >= yb % MR) ? 0 : MR; end
      default: begin n_mul++; exact = (xa % MR) * (yb % MR); end
    endcase
    if (xa >= MR || yb >= MR) n_reduce++;
    if (exact >= MR) n_wrap++;
  endtask

  task automatic conv8(longint unsigned v);
    foreach (c8_x[i]) c8_x[i] = 6'(v % P8[i]);
    #1;
    checks++;
    n_conv8++;
    if (c8_y != 40'(v)) fail($sformatf("8-moduli conversion of %0d gave %0d", v, c8_y));
  endtask

  initial begin
    op = OP_ADD; a = 0; b = 0;
    foreach (c8_x[i]) c8_x[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(OP_ADD, 2456, 1000, 0);
    checks++;
    if (a_res[0] != 11 || a_res[1] != 8 || a_res[2] != 8) fail("residues of 2456");
    run(OP_MUL, 2456, 3, 0);
    run(OP_SUB, 100, 2456, 0);
    run(OP_ADD, 4079, 1, 0);
    run(OP_MUL, 4079, 4079, 0);
    run(OP_SUB, 0, 0, 1);
    run(OP_ADD, 32'hFFFFFFFF, 32'hFFFFFFFF, 0);
    for (int i = 0; i < 300; i++) begin
      automatic rns_op_e o = rns_op_e'($urandom % 3);
      automatic logic [31:0] x = (i % 2) ? 32'($urandom % MR) : $urandom;
      automatic logic [31:0] y = (i % 3) ? 32'($urandom % MR) : $urandom;
      run(o, x, y, i % 37 == 0);
    end
    for (int i = 0; i < 500; i++) conv8(({32'($urandom), 32'($urandom)}) % MT);
    conv8(MT - 1);
    conv8(0);
    $display("add=%0d sub=%0d mul=%0d reduced_operand=%0d wrapped=%0d ignored_start=%0d conv8=%0d",
             n_add, n_sub, n_mul, n_reduce, n_wrap, n_ignored, n_conv8);
    checks++; if (n_add == 0)     fail("no addition");
    checks++; if (n_sub == 0)     fail("no subtraction");
    checks++; if (n_mul == 0)     fail("no multiplication");
    checks++; if (n_reduce == 0)  fail("no operand beyond the dynamic range");
    checks++; if (n_wrap == 0)    fail("no wrapped result");
    checks++; if (n_ignored == 0) fail("no start while busy");
    checks++; if (n_conv8 == 0)   fail("no 8-moduli conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
