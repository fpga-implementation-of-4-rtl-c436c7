// double_peres_gate: 4x4 reversible Double Peres gate (quantum cost 6).
//
// P = A, Q = A ^ B, R = A ^ B ^ D, S = (A ^ B)*D ^ A*B ^ C.
// With C held at 0 and D used as carry in, R is the sum and S the carry of a
// full adder. These equations are the gate's block-diagram form; the
// graphical form of the same gate found in some sources swaps the names of
// the C and D lines, which changes nothing but the labelling. Purely
// combinational; no clock.
module double_peres_gate (
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
  assign q = a ^ b;
  assign r = a ^ b ^ d;
  assign s = ((a ^ b) & d) ^ (a & b) ^ c;
endmodule
