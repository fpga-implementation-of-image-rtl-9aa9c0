// cnot_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// P = A passes the control line through, Q = A ^ B flips the target line when
// the control is 1. The gate is its own inverse: applying it twice gives back
// A and B, so the same gate serves in the encryption and in the decryption
// path. Purely combinational, no clock. Function as defined by the design.
module cnot_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
