// rev_sum_array_tb: checks the generic column summation on its own.
// Instances at N = 8 (default), 4, 5 and 3 are fed consistent cross products
// formed by the testbench (pairs i<j in gate order) for every operand up to
// 8 bits, and p must equal a*a. The adder counts of the 8-bit array must be
// 28 in all, in rows of 13, 9, 5 and 1 (the box count of the published 8x8
// array), and those of the 4-bit array 3 full and 3 half adders.
module rev_sum_array_tb;
  import rev_square_pkg::*;

  logic [7:0]  a8;  logic [27:0] pp8; logic [15:0] p8;
  logic [3:0]  a4;  logic [5:0]  pp4; logic [7:0]  p4;
  logic [4:0]  a5;  logic [9:0]  pp5; logic [9:0]  p5;
  logic [2:0]  a3;  logic [2:0]  pp3; logic [5:0]  p3;
  int checks = 0, failures = 0;
  int rows [4];

  rev_sum_array             dut8 (.a(a8), .pp(pp8), .p(p8), .garbage());
  rev_sum_array #(.N(4))    dut4 (.a(a4), .pp(pp4), .p(p4), .garbage());
  rev_sum_array #(.N(5))    dut5 (.a(a5), .pp(pp5), .p(p5), .garbage());
  rev_sum_array #(.N(3))    dut3 (.a(a3), .pp(pp3), .p(p3), .garbage());

  function automatic logic [27:0] cross_products(input logic [7:0] x, input int n);
    logic [27:0] r;
    int idx;
    r = '0;
    idx = 0;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++) begin
        r[idx] = x[i] & x[j];
        idx++;
      end
    return r;
  endfunction

  task automatic check_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Rows of the 8-bit array: row r holds the columns with more than r adders.
    rows = '{default: 0};
    for (int k = 0; k < 16; k++)
      for (int r = 0; r < 4; r++)
        if (col_fa(8, k) + col_ha(8, k) > r) rows[r]++;
    check_eq("8-bit adders", total_fa(8) + total_ha(8), 28);
    check_eq("8-bit row 1", rows[0], 13);
    check_eq("8-bit row 2", rows[1], 9);
    check_eq("8-bit row 3", rows[2], 5);
    check_eq("8-bit row 4", rows[3], 1);
    check_eq("4-bit full adders", total_fa(4), 3);
    check_eq("4-bit half adders", total_ha(4), 3);

    for (int v = 0; v < 256; v++) begin
      a8 = 8'(v); pp8 = cross_products(a8, 8);
      a4 = 4'(v); pp4 = 6'(cross_products({4'b0, a4}, 4));
      a5 = 5'(v); pp5 = 10'(cross_products({3'b0, a5}, 5));
      a3 = 3'(v); pp3 = 3'(cross_products({5'b0, a3}, 3));
      #1;
      check_eq($sformatf("N=8 square of %0d", a8), int'(p8), int'(a8) * int'(a8));
      check_eq($sformatf("N=4 square of %0d", a4), int'(p4), int'(a4) * int'(a4));
      check_eq($sformatf("N=5 square of %0d", a5), int'(p5), int'(a5) * int'(a5));
      check_eq($sformatf("N=3 square of %0d", a3), int'(p3), int'(a3) * int'(a3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
