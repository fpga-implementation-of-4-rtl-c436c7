// rev_full_adder: full adder built from one Double Peres gate.
//
// The gate's C input is tied to the constant 0 and D carries the incoming
// carry, so R = A ^ B ^ Cin is the sum and S = (A ^ B)*Cin ^ A*B the carry
// out. P (= A) and Q (= A ^ B) are left over and come out as the two garbage
// lines, garbage[0] = P and garbage[1] = Q. One constant input, two garbage
// outputs, quantum cost 6. Purely combinational.
module rev_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [1:0] garbage
);
  double_peres_gate u_dpg (
    .a (a),
    .b (b),
    .c (1'b0),
    .d (cin),
    .p (garbage[0]),
    .q (garbage[1]),
    .r (sum),
    .s (cout)
  );
endmodule
