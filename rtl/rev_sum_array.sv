// rev_sum_array: summation circuit of an N-bit reversible square unit.
//
// Reduces the columns of the reduced partial-product matrix to the 2N-bit
// square. Column k holds, in this order, the cross products a_i*a_j with
// i+j+1 = k (ascending i), the carries coming from column k-1, and the
// diagonal term a_(k/2) when k is even. A column of height h >= 2 is reduced
// by a linear chain: full adders (Double Peres gates) take three bits first,
// each later full adder takes the running sum and two new bits, and a single
// half adder (Peres gate) takes the last bit when one is left over. A column
// of height h thus has (h-1)/2 full adders, (h-1)%2 half adders and sends
// h/2 carries to column k+1. Column 1 is empty and is the constant 0 line.
//
// For N=4 this gives exactly the published 4x4 summation (3 FA, 3 HA). For
// N=8 it gives 21 full adders and 7 half adders in columns 2..14, with 1, 1,
// 2, 2, 3, 3, 4, 3, 3, 2, 2, 1, 1 adders per column, i.e. rows of 13, 9, 5
// and 1 adders, the shape of the published 8x8 array. Which bits meet in
// which adder inside a column is this design's choice.
//
// Inputs: the operand a (regenerated by the Toffoli chain) and the cross
// products on pp in rev_pp_gen order. Outputs: the square p and the garbage
// lines of all adders (HA: P; FA: P, Q), column by column, adder by adder.
// Combinational.
module rev_sum_array #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                                   a,
  input  logic [rev_square_pkg::num_pp(N)-1:0]           pp,
  output logic [2*N-1:0]                                 p,
  output logic [rev_square_pkg::garbage_outputs(N)-1:0]  garbage
);
  import rev_square_pkg::*;

  for (genvar k = 0; k < 2 * N; k++) begin : g_col
    localparam int NX  = col_cross(N, k);
    localparam int ND  = col_diag(N, k);
    localparam int NCI = col_carry_in(N, k);
    localparam int H   = NX + ND + NCI;
    localparam int NF  = col_fa(N, k);
    localparam int NH  = col_ha(N, k);
    localparam int NA  = NF + NH;
    localparam int LO  = col_cross_lo(N, k);
    localparam int GO  = garbage_offset(N, k);

    // Column bits (at least one entry so that an empty column stays legal).
    logic [(H > 0 ? H : 1)-1:0]    bits;
    // Carries out of this column's adders, read by column k+1.
    logic [(NA > 0 ? NA : 1)-1:0]  co;
    // Running sums of the chain.
    logic [(NA > 0 ? NA : 1)-1:0]  s;

    for (genvar x = 0; x < NX; x++) begin : g_x
      assign bits[x] = pp[pp_index(N, LO + x, k - 1 - LO - x)];
    end
    if (NCI > 0) begin : g_ci
      assign bits[NX +: NCI] = g_col[k-1].co[NCI-1:0];
    end
    if (ND > 0) begin : g_d
      assign bits[H-1] = a[k/2];
    end
    if (H == 0) begin : g_empty
      assign bits[0] = 1'b0;
    end

    if (NA == 0) begin : g_pass
      assign co[0] = 1'b0;
      assign s[0]  = 1'b0;
      assign p[k]  = bits[0];
    end else begin : g_chain
      for (genvar m = 0; m < NF; m++) begin : g_fa
        rev_full_adder u_fa (
          .a       (m == 0 ? bits[0] : s[(m > 0 ? m - 1 : 0)]),
          .b       (bits[2*m+1]),
          .cin     (bits[2*m+2]),
          .sum     (s[m]),
          .cout    (co[m]),
          .garbage (garbage[GO+2*m +: 2])
        );
      end
      if (NH > 0) begin : g_ha
        rev_half_adder u_ha (
          .a       (NF == 0 ? bits[0] : s[(NF > 0 ? NF - 1 : 0)]),
          .b       (bits[H-1]),
          .sum     (s[NF]),
          .carry   (co[NF]),
          .garbage (garbage[GO+2*NF])
        );
      end
      assign p[k] = s[NA-1];
    end
  end
endmodule
