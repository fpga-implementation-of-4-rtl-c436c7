// rev_half_adder: half adder built from one Peres gate.
//
// The Peres gate's C input is tied to the constant 0, so Q = A ^ B is the sum
// and R = A*B the carry. Output P (a copy of A) is not needed further and is
// brought out as the garbage line, so the gate stays a 3-in/3-out reversible
// block. One constant input, one garbage output, quantum cost 4.
// Purely combinational.
module rev_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry,
  output logic garbage
);
  peres_gate u_pg (
    .a (a),
    .b (b),
    .c (1'b0),
    .p (garbage),
    .q (sum),
    .r (carry)
  );
endmodule
