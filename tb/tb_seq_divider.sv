// tb_seq_divider: checks the sequential divider at its default 32/32-bit
// size: quotient and remainder against the / and % operators, the latency
// (done exactly DW cycles after the start edge, busy high in between), that
// a start while busy is ignored, and division by zero. Includes the
// example 2456 / 15, 16, 17.
module tb_seq_divider;
  localparam int DW = 32;
  logic          clk = 0, rst_n = 0, start = 0;
  logic [31:0]   dividend, divisor, quotient, remainder;
  logic          busy, done;
  int checks = 0, failures = 0, cycles = 0, ignored_starts = 0;

  seq_divider dut (.clk(clk), .rst_n(rst_n), .start(start), .dividend(dividend),
                   .divisor(divisor), .busy(busy), .done(done),
                   .quotient(quotient), .remainder(remainder));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x, logic [31:0] d, bit poke_start);
    int lat;
    logic [31:0] q_exp, r_exp;
    @(negedge clk);
    dividend = x; divisor = d; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;  // clock edges since the edge that took start
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while dividing"); end
      if (poke_start && lat == 5) begin
        // Start while busy with other operands: must be ignored.
        start = 1; dividend = ~x; divisor = d + 1;
        ignored_starts++;
      end else start = 0;
      @(negedge clk);
      lat++;
      if (lat > 100) break;
    end
    start = 0;
    q_exp = (d == 0) ? 32'hFFFFFFFF : x / d;
    r_exp = (d == 0) ? x : x % d;
    checks++;
    if (lat != DW) begin failures++; $display("FAIL latency %0d, expected %0d", lat, DW); end
    checks++;
    if (quotient !== q_exp || remainder !== r_exp) begin
      failures++;
      $display("FAIL %0d / %0d = %0d r %0d, expected %0d r %0d", x, d, quotient, remainder, q_exp, r_exp);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy high with done"); end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    dividend = 0; divisor = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(2456, 15, 0);
    run(2456, 16, 0);
    run(2456, 17, 0);
    run(32'hFFFFFFFF, 1, 0);
    run(32'hFFFFFFFF, 32'hFFFFFFFF, 0);
    run(5, 7, 0);
    run(12345, 0, 0);
    run(32'hDEADBEEF, 17, 1);
    for (int i = 0; i < 300; i++) begin
      automatic logic [31:0] d = $urandom >> ($urandom % 32);
      if (d == 0) d = 1;
      run($urandom, d, i % 50 == 0);
    end
    checks++;
    if (ignored_starts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
