// rev_square4: 4-bit reversible square unit, sq = a * a.
//
// Six Toffoli gates in series (rev_pp_gen) form the reduced partial products
// a_i*a_j, i<j; the summation circuit rev_sum4 adds them together with the
// diagonal terms a_i in three full adders and three half adders. Totals, as
// published for this unit: 12 gates, quantum cost 60, 13 constant inputs
// (6 Toffoli, 3 Peres, 3 Double Peres, plus the zero line of sq[1]) and
// 9 garbage outputs, which are brought out on garbage.
// Purely combinational: sq follows a after the gate delays.
module rev_square4 (
  input  logic [3:0] a,
  output logic [7:0] sq,
  output logic [8:0] garbage
);
  import rev_square_pkg::*;

  // Cost figures of this netlist, counted by the same column rule that
  // shapes rev_sum_array; they come to 12, 60, 13 and 9.
  localparam int GATE_COUNT      = gate_count(4);
  localparam int QUANTUM_COST    = quantum_cost(4);
  localparam int CONSTANT_INPUTS = constant_inputs(4);
  localparam int GARBAGE_OUTPUTS = garbage_outputs(4);

  logic [3:0] a_reg;
  logic [5:0] pp;

  rev_pp_gen #(.N(4)) u_ppg (
    .a     (a),
    .a_out (a_reg),
    .pp    (pp)
  );

  rev_sum4 u_sum (
    .a       (a_reg),
    .pp      (pp),
    .p       (sq),
    .garbage (garbage)
  );
endmodule
