// rev_sum4: summation circuit of the 4-bit reversible square unit.
//
// Adds the reduced partial products of a 4-bit operand in carry-save fashion
// with three full adders (Double Peres gates) and three half adders (Peres
// gates). Column by column (weight 2^k):
//   p0 = a0, p1 = constant 0
//   col 2: HA(a1a0, a1)                 -> p2
//   col 3: HA(a2a0, c2)                 -> p3
//   col 4: FA(a1a2, a3a0, c3), HA(s, a2) -> p4   (two carries to col 5)
//   col 5: FA(a1a3, c4fa, c4ha)         -> p5
//   col 6: FA(a3a2, a3, c5)             -> p6, carry out -> p7
// This is the netlist of the published 4x4 summation diagram.
//
// Inputs: the operand lines a (as regenerated by the Toffoli chain) and the
// six products on pp in rev_pp_gen order (a0a1, a0a2, a0a3, a1a2, a1a3,
// a2a3). Outputs: the 8-bit square p and the 9 garbage lines of the adders
// (HA: 1 each, FA: 2 each). Combinational.
module rev_sum4 (
  input  logic [3:0] a,
  input  logic [5:0] pp,
  output logic [7:0] p,
  output logic [8:0] garbage
);
  logic a0a1, a0a2, a0a3, a1a2, a1a3, a2a3;
  logic c2, c3, c4f, c4h, c5, s4;

  assign {a2a3, a1a3, a1a2, a0a3, a0a2, a0a1} = pp;

  assign p[0] = a[0];
  assign p[1] = 1'b0;

  rev_half_adder u_ha2 (.a(a0a1), .b(a[1]), .sum(p[2]), .carry(c2),  .garbage(garbage[0]));
  rev_half_adder u_ha3 (.a(a0a2), .b(c2),   .sum(p[3]), .carry(c3),  .garbage(garbage[1]));
  rev_full_adder u_fa4 (.a(a1a2), .b(a0a3), .cin(c3),   .sum(s4),    .cout(c4f), .garbage(garbage[3:2]));
  rev_half_adder u_ha4 (.a(s4),   .b(a[2]), .sum(p[4]), .carry(c4h), .garbage(garbage[4]));
  rev_full_adder u_fa5 (.a(a1a3), .b(c4f),  .cin(c4h),  .sum(p[5]),  .cout(c5),  .garbage(garbage[6:5]));
  rev_full_adder u_fa6 (.a(a2a3), .b(a[3]), .cin(c5),   .sum(p[6]),  .cout(p[7]), .garbage(garbage[8:7]));
endmodule
