// rev_square_pkg: constants and elaboration-time helpers shared by the
// reversible square units.
//
// The square of an N-bit operand a is formed from the reduced partial
// products of the squaring matrix: every cross term a_i*a_j (i<j) appears
// twice in an ordinary multiplier, so it is kept once and moved one column
// to the left (weight 2^(i+j+1)); every diagonal term a_i*a_i equals a_i and
// stays at weight 2^(2i). Column 1 is always empty and is tied to a constant
// zero line.
//
// The summation of both the 4-bit and the N-bit unit reduces each column
// with a linear chain of adders: full adders (Double Peres gates) while at
// least three bits are left, one half adder (Peres gate) when two are left.
// Each adder sends its carry to the next column. The functions below count
// the bits, adders and gates of this structure, so that the RTL generates
// exactly the adders the helpers count, and the cost figures (gate count,
// quantum cost, constant inputs, garbage outputs) follow from the same
// numbers. The per-gate quantum costs 5 (Toffoli), 4 (Peres) and 6 (Double
// Peres) are the published values of these gates.
package rev_square_pkg;

  localparam int unsigned QC_TOFFOLI = 5;
  localparam int unsigned QC_PERES   = 4;
  localparam int unsigned QC_DPG     = 6;

  // Number of cross products a_i*a_j, i<j, of an N-bit operand.
  function automatic int unsigned num_pp(input int unsigned n);
    return n * (n - 1) / 2;
  endfunction

  // Position of a_i*a_j (i<j) on the product bus. The order is the order of
  // the Toffoli chain: (0,1) (0,2) .. (0,n-1) (1,2) .. (n-2,n-1).
  function automatic int unsigned pp_index(input int unsigned n,
                                           input int unsigned i,
                                           input int unsigned j);
    return i * n - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

  // Lowest i of the cross terms in column k (i + j = k - 1, i < j < n).
  function automatic int col_cross_lo(input int n, input int k);
    int lo;
    lo = k - 1 - (n - 1);
    return (lo < 0) ? 0 : lo;
  endfunction

  // Number of cross terms a_i*a_j that land in column k.
  function automatic int col_cross(input int n, input int k);
    int cnt;
    cnt = 0;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++)
        if (i + j + 1 == k) cnt++;
    return cnt;
  endfunction

  // 1 when the diagonal term a_(k/2) lands in column k.
  function automatic int col_diag(input int n, input int k);
    return ((k % 2) == 0 && (k / 2) < n) ? 1 : 0;
  endfunction

  // Carries that column k receives from column k-1.
  function automatic int col_carry_in(input int n, input int k);
    int carry, h;
    carry = 0;
    for (int c = 0; c < k; c++) begin
      h     = col_cross(n, c) + col_diag(n, c) + carry;
      carry = h / 2;
    end
    return carry;
  endfunction

  // Bits to be reduced in column k.
  function automatic int col_height(input int n, input int k);
    return col_cross(n, k) + col_diag(n, k) + col_carry_in(n, k);
  endfunction

  // Full and half adders of column k (and therefore its carries out).
  function automatic int col_fa(input int n, input int k);
    int h;
    h = col_height(n, k);
    return (h >= 2) ? (h - 1) / 2 : 0;
  endfunction

  function automatic int col_ha(input int n, input int k);
    int h;
    h = col_height(n, k);
    return (h >= 2) ? (h - 1) % 2 : 0;
  endfunction

  // Totals over all 2n columns.
  function automatic int total_fa(input int n);
    int s;
    s = 0;
    for (int k = 0; k < 2 * n; k++) s += col_fa(n, k);
    return s;
  endfunction

  function automatic int total_ha(input int n);
    int s;
    s = 0;
    for (int k = 0; k < 2 * n; k++) s += col_ha(n, k);
    return s;
  endfunction

  // Garbage lines: a half adder leaves P=A, a full adder leaves P=A and Q=A^B.
  function automatic int garbage_offset(input int n, input int k);
    int s;
    s = 0;
    for (int c = 0; c < k; c++) s += 2 * col_fa(n, c) + col_ha(n, c);
    return s;
  endfunction

  function automatic int garbage_outputs(input int n);
    return garbage_offset(n, 2 * n);
  endfunction

  function automatic int gate_count(input int n);
    return num_pp(n) + total_fa(n) + total_ha(n);
  endfunction

  function automatic int quantum_cost(input int n);
    return QC_TOFFOLI * num_pp(n) + QC_PERES * total_ha(n) + QC_DPG * total_fa(n);
  endfunction

  // One constant zero per Toffoli (C), per Peres (C) and per Double Peres
  // (C), plus the zero line that forms output bit 1.
  function automatic int constant_inputs(input int n);
    return num_pp(n) + total_ha(n) + total_fa(n) + 1;
  endfunction

endpackage
