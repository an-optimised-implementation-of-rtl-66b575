// rns_top: residue number system (RNS) arithmetic unit on the conjugate
// moduli set {2^n-1, 2^n, 2^n+1}, with a New CRT II reverse converter, and,
// beside it, the 8-moduli New CRT II converter.
//
// Datapath of the RNS unit (default n = 4, moduli 15, 16, 17, dynamic range
// M = 4080):
//   1. Forward conversion: two fwd_converter instances divide the DW-bit
//      binary operands a and b by each modulus in parallel (seq_divider) and
//      keep the remainders as residues.
//   2. Channel arithmetic: three rns_channel instances add, subtract or
//      multiply the residue pairs, each modulo its own modulus, with no
//      interaction between channels.
//   3. Reverse conversion by New CRT II, divide and conquer: the residues
//      modulo 2^n-1 and 2^n give a number modulo (2^n-1)2^n, which is then
//      combined with the residue modulo 2^n+1 into the result modulo M.
// The result is therefore |a op b|_M; results beyond the dynamic range wrap
// modulo M, and a negative difference appears as M minus its magnitude.
//
// The 8-moduli converter (newcrt2_conv8) is an independent combinational
// path: residues c8_x in, binary c8_y out.
//
// Timing of the RNS unit: start while idle (busy low) captures a, b and op.
// The dividers take DW cycles; one cycle later the channel results are
// registered (y_res), and one cycle after that result is registered and
// done pulses for one cycle: DW + 2 cycles from the start edge to done.
// a_res, b_res, a_quot hold the forward conversion until the next start.
// The sequencing, the registers between steps and the op encoding are this
// design's choices; the moduli set and the three steps follow the document.
// Reset is asynchronous, active low; the assertion at the end also uses it,
// synchronously, to stay quiet during reset (lint notes that double use).
module rns_top
  import rns_pkg::*;
#(
  parameter int unsigned     N      = 4,
  parameter int unsigned     DW     = 32,
  parameter longint unsigned P8 [8] = '{31, 33, 29, 35, 23, 41, 17, 47},
  localparam int unsigned    RW     = bits_for((64'd1 << N) + 2),
  localparam longint unsigned MR    = ((64'd1 << N) - 1) * (64'd1 << N) * ((64'd1 << N) + 1),
  localparam int unsigned    XW     = bits_for(MR),
  localparam int unsigned    RW8    = newcrt2_rw(P8),
  localparam int unsigned    XW8    = bits_for(P8[0]*P8[1]*P8[2]*P8[3]*P8[4]*P8[5]*P8[6]*P8[7])
) (
  input  logic           clk,
  input  logic           rst_n,
  // RNS arithmetic unit
  input  logic           start,
  input  rns_op_e        op,
  input  logic [DW-1:0]  a,
  input  logic [DW-1:0]  b,
  output logic           busy,
  output logic           done,
  output logic [RW-1:0]  a_res  [3],   // residues of a: mod 2^n-1, 2^n, 2^n+1
  output logic [RW-1:0]  b_res  [3],
  output logic [DW-1:0]  a_quot [3],   // quotients of a by each modulus
  output logic [DW-1:0]  b_quot [3],
  output logic [RW-1:0]  y_res  [3],   // residues of the result
  output logic [XW-1:0]  result,       // |a op b|_M
  // 8-moduli New CRT II converter
  input  logic [RW8-1:0] c8_x [8],
  output logic [XW8-1:0] c8_y
);

  function automatic int unsigned newcrt2_rw(longint unsigned v [8]);
    longint unsigned m;
    m = 0;
    foreach (v[i]) if (v[i] > m) m = v[i];
    return bits_for(m);
  endfunction

  localparam longint unsigned M0 = (64'd1 << N) - 1;
  localparam longint unsigned M1 = (64'd1 << N);
  localparam longint unsigned M2 = (64'd1 << N) + 1;
  localparam int unsigned     MODS [3] = '{int'(M0), int'(M1), int'(M2)};

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_EXEC} state_e;
  state_e  state_q;
  rns_op_e op_q;

  logic conv_start, a_busy, b_busy, a_done, b_done;

  assign conv_start = start && (state_q == S_IDLE);

  fwd_converter #(.NM(3), .DW(DW), .RW(RW), .MODULI(MODS)) u_fwd_a (
    .clk(clk), .rst_n(rst_n), .start(conv_start), .value(a),
    .busy(a_busy), .done(a_done), .residue(a_res), .quotient(a_quot));

  fwd_converter #(.NM(3), .DW(DW), .RW(RW), .MODULI(MODS)) u_fwd_b (
    .clk(clk), .rst_n(rst_n), .start(conv_start), .value(b),
    .busy(b_busy), .done(b_done), .residue(b_res), .quotient(b_quot));

  // Channel arithmetic, one channel per modulus.
  logic [bits_for(M0)-1:0] y0;
  logic [bits_for(M1)-1:0] y1;
  logic [bits_for(M2)-1:0] y2;

  rns_channel #(.M(M0)) u_ch0 (.op(op_q),
    .a(bits_for(M0)'(a_res[0])), .b(bits_for(M0)'(b_res[0])), .y(y0));
  rns_channel #(.M(M1)) u_ch1 (.op(op_q),
    .a(bits_for(M1)'(a_res[1])), .b(bits_for(M1)'(b_res[1])), .y(y1));
  rns_channel #(.M(M2)) u_ch2 (.op(op_q),
    .a(bits_for(M2)'(a_res[2])), .b(bits_for(M2)'(b_res[2])), .y(y2));

  // Reverse conversion: (mod 2^n-1, mod 2^n) -> mod (2^n-1)2^n -> mod M.
  logic [bits_for(M0*M1)-1:0] z01;
  logic [XW-1:0]              x_rev;

  newcrt2_stage #(.P1(M1), .P2(M0)) u_rev0 (
    .x1(bits_for(M1)'(y_res[1])), .x2(bits_for(M0)'(y_res[0])), .x(z01));
  newcrt2_stage #(.P1(M2), .P2(M0*M1)) u_rev1 (
    .x1(bits_for(M2)'(y_res[2])), .x2(z01), .x(x_rev));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      op_q    <= OP_ADD;
      done    <= 1'b0;
      result  <= '0;
      y_res   <= '{default: '0};
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          op_q    <= op;
          state_q <= S_CONV;
        end
        S_CONV: if (a_done && b_done) begin
          y_res[0] <= RW'(y0);
          y_res[1] <= RW'(y1);
          y_res[2] <= RW'(y2);
          state_q  <= S_EXEC;
        end
        S_EXEC: begin
          result  <= x_rev;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE) || a_busy || b_busy;

  newcrt2_conv8 #(.P(P8)) u_conv8 (.x(c8_x), .y(c8_y));

  // Both converters are started together and must finish together.
  assert property (@(posedge clk) disable iff (!rst_n) a_done == b_done);

endmodule
