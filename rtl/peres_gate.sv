// peres_gate: 3x3 reversible Peres gate (quantum cost 4).
//
// P = A, Q = A ^ B, R = A*B ^ C. It is a Toffoli gate followed by a CNOT on
// the second line. With C held at 0, Q is the sum and R the carry of a half
// adder. Purely combinational; no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
