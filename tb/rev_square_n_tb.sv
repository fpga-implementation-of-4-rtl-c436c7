// rev_square_n_tb: checks the N-bit reversible square unit.
// The 8-bit unit (default size) is driven with all 256 operands and sq must
// equal a*a. A 4-bit instance of the same generic unit must reproduce the
// published 4x4 figures (12 gates, quantum cost 60, 13 constant inputs,
// 9 garbage outputs), and the 8-bit unit must come to 28 Toffoli gates plus
// 28 adders: 56 gates, quantum cost 294, 57 constant inputs, 49 garbage lines.
module rev_square_n_tb;
  logic [7:0]  a8;
  logic [15:0] sq8;
  logic [48:0] g8;
  logic [3:0]  a4;
  logic [7:0]  sq4;
  logic [8:0]  g4;
  int checks = 0, failures = 0;

  rev_square_n          dut8 (.a(a8), .sq(sq8), .garbage(g8));
  rev_square_n #(.N(4)) dut4 (.a(a4), .sq(sq4), .garbage(g4));

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
    check_eq("4-bit gate count", dut4.GATE_COUNT, 12);
    check_eq("4-bit quantum cost", dut4.QUANTUM_COST, 60);
    check_eq("4-bit constant inputs", dut4.CONSTANT_INPUTS, 13);
    check_eq("4-bit garbage outputs", dut4.GARBAGE_OUTPUTS, 9);
    check_eq("8-bit gate count", dut8.GATE_COUNT, 56);
    check_eq("8-bit quantum cost", dut8.QUANTUM_COST, 294);
    check_eq("8-bit constant inputs", dut8.CONSTANT_INPUTS, 57);
    check_eq("8-bit garbage outputs", dut8.GARBAGE_OUTPUTS, 49);
    for (int v = 0; v < 256; v++) begin
      a8 = 8'(v);
      a4 = 4'(v);
      #1;
      check_eq($sformatf("8-bit square of %0d", v), int'(sq8), v * v);
      check_eq($sformatf("4-bit square of %0d", a4), int'(sq4), int'(a4) * int'(a4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
