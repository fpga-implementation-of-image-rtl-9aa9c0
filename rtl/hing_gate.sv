// hing_gate: 4x4 reversible HNG gate used on each nibble of the encryption path.
//
//   P = A
//   Q = B
//   R = A ^ B ^ C
//   S = ((A ^ B) & C) ^ (A & B) ^ D
//
// P, Q and R carry A, B and C through in recoverable form; S XORs D with a
// function of A, B and C, so D can be recovered too and the 16 input patterns
// map one-to-one onto the 16 output patterns. hing_gate_inv undoes it.
//
// The design's description prints S as (A^B)&(C^A)&(B^D). That function is
// not one-to-one (it throws away D whenever A == B), so decryption could not
// recover the pixel. The output S above is the standard HNG gate; it is the one
// that reproduces every cipher value of the design's published simulation.
// Purely combinational, no clock.
module hing_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
