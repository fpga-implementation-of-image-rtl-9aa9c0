// peres_gate: 3x3 reversible Peres gate, last stage of each encryption nibble.
//
//   P = A, Q = A ^ B, Z = (A & B) ^ C
//
// One-to-one on its 8 input patterns; peres_gate_inv undoes it. Function as
// defined by the design. Purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic z
);
  assign p = a;
  assign q = a ^ b;
  assign z = (a & b) ^ c;
endmodule
