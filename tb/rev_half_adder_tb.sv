// rev_half_adder_tb: exhaustive check of the Peres-gate half adder.
// For all four inputs, {carry,sum} must equal a+b and the garbage line must
// carry a copy of a.
module rev_half_adder_tb;
  logic a, b, sum, carry, garbage;
  int checks = 0, failures = 0;

  rev_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (2'({carry, sum}) != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b carry=%b sum=%b", a, b, carry, sum);
      end
      checks++;
      if (garbage != a) begin
        failures++;
        $display("FAIL garbage=%b a=%b", garbage, a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
