// rns_pkg: types and elaboration-time helpers shared by the residue number
// system (RNS) datapath.
//
// The RNS unit works on a conjugate moduli set {2^n-1, 2^n, 2^n+1}. Every
// constant a converter needs (the modular inverses k of the New CRT II
// equation, the products of moduli) is computed here by constant functions at
// elaboration, so no table is stored. rns_op_e encodes the per-channel
// operation; the encoding is this design's own choice.
package rns_pkg;

  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2
  } rns_op_e;

  // Multiplicative inverse of a modulo m (a and m coprime), by the extended
  // Euclidean algorithm. Returns 0 when m is 1 or the inverse does not exist.
  function automatic longint unsigned mod_inverse(longint unsigned a, longint unsigned m);
    longint r0, r1, t0, t1, q, tmp;
    if (m <= 1) return 0;
    r0 = longint'(m);
    r1 = longint'(a % m);
    t0 = 0;
    t1 = 1;
    while (r1 != 0) begin
      q   = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = t0 - q * t1; t0 = t1; t1 = tmp;
    end
    if (r0 != 1) return 0;
    if (t0 < 0) t0 += longint'(m);
    return $unsigned(t0);
  endfunction

  // Number of bits needed to hold the values 0 .. v-1 (at least 1).
  function automatic int unsigned bits_for(longint unsigned v);
    int unsigned b;
    b = 1;
    while ((64'd1 << b) < v) b++;
    return b;
  endfunction

endpackage
