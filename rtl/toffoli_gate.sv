// toffoli_gate: 3x3 reversible Toffoli gate (quantum cost 5).
//
// P = A, Q = B, R = A*B ^ C. The two controls pass through unchanged and the
// target line is flipped when both controls are 1. With C held at 0 the gate
// computes A AND B while regenerating both operands, which is how the square
// units form their partial products. Purely combinational; no clock.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
