// fwd_converter: binary-to-RNS forward converter.
//
// Converts one unsigned DW-bit binary number into its residues for the NM
// moduli MODULI[0..NM-1] by running one seq_divider per modulus in
// parallel; each divider's remainder is the residue and its quotient is
// also brought out. The default set is {15, 16, 17}, the conjugate set
// {2^n-1, 2^n, 2^n+1} with n = 4 that the design's divider simulation
// uses. Using a divider even for the modulus 2^n (where the residue is just
// the low bits) follows that simulation.
//
// Timing: start while idle launches all dividers; busy is high for DW
// cycles and done pulses for one cycle when every residue is valid. The
// outputs hold until the next start.
module fwd_converter #(
  parameter int unsigned NM            = 3,
  parameter int unsigned DW            = 32,
  parameter int unsigned RW            = 5,
  parameter int unsigned MODULI [NM]   = '{15, 16, 17}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] value,
  output logic          busy,
  output logic          done,
  output logic [RW-1:0] residue  [NM],
  output logic [DW-1:0] quotient [NM]
);

  logic [NM-1:0] busy_v, done_v;

  for (genvar i = 0; i < NM; i++) begin : g_div
    seq_divider #(.DW(DW), .VW(RW)) u_div (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start),
      .dividend (value),
      .divisor  (RW'(MODULI[i])),
      .busy     (busy_v[i]),
      .done     (done_v[i]),
      .quotient (quotient[i]),
      .remainder(residue[i])
    );
  end

  // All dividers start together and take the same number of cycles.
  assign busy = |busy_v;
  assign done = &done_v;

endmodule
