// rev_pp_gen: reduced partial-product generator of an N-bit square unit.
//
// Forms every cross product a_i*a_j (i<j) with one Toffoli gate each, its
// target input tied to the constant 0. The gates sit in series on the operand
// lines: gate g takes the operand lines as left by gate g-1 on its controls
// and hands the regenerated controls on to gate g+1, so the operand leaves
// the chain unchanged on a_out and no line is wasted as garbage. The gate
// order is (0,1) (0,2) .. (0,N-1) (1,2) .. (N-2,N-1), which is also the order
// of the products on pp (see rev_square_pkg::pp_index). The diagonal terms
// a_i*a_i need no gate: they equal a_i and are taken from a_out.
//
// N(N-1)/2 Toffoli gates and as many constant inputs. Combinational.
module rev_pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                            a,
  output logic [N-1:0]                            a_out,
  output logic [rev_square_pkg::num_pp(N)-1:0]    pp
);
  import rev_square_pkg::*;

  localparam int unsigned NPP = num_pp(N);

  // line[g] holds the operand lines in front of Toffoli gate g.
  logic [NPP:0][N-1:0] line;

  assign line[0] = a;

  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = i + 1; j < N; j++) begin : g_j
      localparam int unsigned G = pp_index(N, i, j);
      logic ctl_i, ctl_j;

      toffoli_gate u_tg (
        .a (line[G][i]),
        .b (line[G][j]),
        .c (1'b0),
        .p (ctl_i),
        .q (ctl_j),
        .r (pp[G])
      );

      localparam logic [N-1:0] BIT_I = N'(1) << i;
      localparam logic [N-1:0] BIT_J = N'(1) << j;

      assign line[G+1] = (line[G] & ~(BIT_I | BIT_J))
                       | ({N{ctl_i}} & BIT_I) | ({N{ctl_j}} & BIT_J);
    end
  end

  assign a_out = line[NPP];
endmodule
