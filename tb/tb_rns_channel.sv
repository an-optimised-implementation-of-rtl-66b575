// tb_rns_channel: exhaustive check of one RNS channel (modulus 17, the
// default) for all three operations and the unused op code, plus a 2^n
// channel (modulus 16).
module tb_rns_channel;
  import rns_pkg::*;
  rns_op_e    op;
  logic [4:0] a, b, y;
  logic [3:0] a16, b16, y16;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_mul = 0;

  rns_channel           dut   (.op(op), .a(a),   .b(b),   .y(y));
  rns_channel #(.M(16)) dut16 (.op(op), .a(a16), .b(b16), .y(y16));

  function automatic int ref_op(rns_op_e o, int x, int z, int m);
    case (o)
      OP_ADD:  return (x + z) % m;
      OP_SUB:  return (x - z + m) % m;
      OP_MUL:  return (x * z) % m;
      default: return 0;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++)
      for (int x = 0; x < 17; x++)
        for (int z = 0; z < 17; z++) begin
          op = rns_op_e'(o);
          a = 5'(x); b = 5'(z);
          a16 = 4'(x % 16); b16 = 4'(z % 16);
          #1;
          checks++;
          if (int'(y) != ref_op(op, x, z, 17)) begin
            failures++;
            $display("FAIL m17 op=%0d a=%0d b=%0d y=%0d", o, x, z, y);
          end
          checks++;
          if (int'(y16) != ref_op(op, x % 16, z % 16, 16)) begin
            failures++;
            $display("FAIL m16 op=%0d a=%0d b=%0d y=%0d", o, x % 16, z % 16, y16);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
