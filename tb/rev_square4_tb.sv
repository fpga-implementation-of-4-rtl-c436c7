// rev_square4_tb: checks the 4-bit reversible square unit.
// All 16 operands are applied and sq must equal a*a. The unit's cost figures
// must match the published ones for the 4x4 square unit: 12 gates, quantum
// cost 60, 13 constant inputs and 9 garbage outputs (also the width of the
// garbage port).
module rev_square4_tb;
  logic [3:0] a;
  logic [7:0] sq;
  logic [8:0] garbage;
  int checks = 0, failures = 0;

  rev_square4 dut (.a(a), .sq(sq), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    check_eq("gate count", dut.GATE_COUNT, 12);
    check_eq("quantum cost", dut.QUANTUM_COST, 60);
    check_eq("constant inputs", dut.CONSTANT_INPUTS, 13);
    check_eq("garbage outputs", dut.GARBAGE_OUTPUTS, 9);
    check_eq("garbage port width", $bits(garbage), 9);
    for (int v = 0; v < 16; v++) begin
      a = 4'(v);
      #1;
      check_eq($sformatf("square of %0d", v), int'(sq), v * v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
