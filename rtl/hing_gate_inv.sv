// hing_gate_inv: inverse of the 4x4 HNG gate, used in the decryption path.
//
// From P = A, Q = B, R = A^B^C, S = ((A^B)&C) ^ (A&B) ^ D it recovers
//   A = P, B = Q, C = R ^ P ^ Q, D = S ^ ((P ^ Q) & C) ^ (P & Q).
// The design only says that decryption runs the cipher through the same gates
// in the reverse order; the inverse equations are this design's own, derived
// from the forward gate. Purely combinational, no clock.
module hing_gate_inv (
  input  logic p,
  input  logic q,
  input  logic r,
  input  logic s,
  output logic a,
  output logic b,
  output logic c,
  output logic d
);
  assign a = p;
  assign b = q;
  assign c = r ^ p ^ q;
  assign d = s ^ ((p ^ q) & c) ^ (p & q);
endmodule
