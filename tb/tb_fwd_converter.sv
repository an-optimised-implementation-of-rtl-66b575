// tb_fwd_converter: checks the binary-to-RNS forward converter with its
// default moduli {15, 16, 17} and 32-bit input: residues and quotients for
// the example 2456 (residues 11, 8, 8; quotients 163, 153, 144), the ends
// of the input range and random values, and the DW-cycle latency.
module tb_fwd_converter;
  localparam int DW = 32;
  localparam int MODS [3] = '{15, 16, 17};
  logic          clk = 0, rst_n = 0, start = 0;
  logic [31:0]   value;
  logic          busy, done;
  logic [4:0]    residue  [3];
  logic [31:0]   quotient [3];
  int checks = 0, failures = 0;

  fwd_converter dut (.clk(clk), .rst_n(rst_n), .start(start), .value(value),
                     .busy(busy), .done(done), .residue(residue), .quotient(quotient));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x);
    int lat = 0;
    @(negedge clk);
    value = x; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;  // clock edges since the edge that took start
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != DW) begin failures++; $display("FAIL latency %0d", lat); end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (int'(residue[i]) != int'(x % MODS[i]) || quotient[i] != x / MODS[i]) begin
        failures++;
        $display("FAIL %0d mod %0d: r=%0d q=%0d", x, MODS[i], residue[i], quotient[i]);
      end
    end
  endtask

  initial begin
    value = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(2456);
    checks++;
    if (residue[0] != 11 || residue[1] != 8 || residue[2] != 8 ||
        quotient[0] != 163 || quotient[1] != 153 || quotient[2] != 144) failures++;
    run(0);
    run(32'hFFFFFFFF);
    run(4079);
    run(4080);
    for (int i = 0; i < 200; i++) run($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
