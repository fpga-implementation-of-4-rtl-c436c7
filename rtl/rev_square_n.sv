// rev_square_n: N-bit reversible square unit, sq = a * a (N = 8 by default,
// the 8x8 unit).
//
// rev_pp_gen forms the N(N-1)/2 reduced cross products with a series chain
// of Toffoli gates (target tied to 0); rev_sum_array adds them and the
// diagonal terms a_i column by column with Double Peres full adders and
// Peres half adders. For N = 8: 28 Toffoli gates, 21 full adders and 7 half
// adders, 56 gates, quantum cost 28*5 + 7*4 + 21*6 = 294, 57 constant
// inputs and 49 garbage outputs. The cost figures are exported as
// localparams computed from the same helpers that shape the array.
// Purely combinational: sq follows a after the gate delays.
module rev_square_n #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                                   a,
  output logic [2*N-1:0]                                 sq,
  output logic [rev_square_pkg::garbage_outputs(N)-1:0]  garbage
);
  import rev_square_pkg::*;

  localparam int GATE_COUNT      = gate_count(N);
  localparam int QUANTUM_COST    = quantum_cost(N);
  localparam int CONSTANT_INPUTS = constant_inputs(N);
  localparam int GARBAGE_OUTPUTS = garbage_outputs(N);

  logic [N-1:0]         a_reg;
  logic [num_pp(N)-1:0] pp;

  rev_pp_gen #(.N(N)) u_ppg (
    .a     (a),
    .a_out (a_reg),
    .pp    (pp)
  );

  rev_sum_array #(.N(N)) u_sum (
    .a       (a_reg),
    .pp      (pp),
    .p       (sq),
    .garbage (garbage)
  );
endmodule
