// rev_full_adder_tb: exhaustive check of the Double-Peres full adder.
// For all eight inputs, {cout,sum} must equal a+b+cin and the garbage lines
// must carry a (garbage[0]) and a^b (garbage[1]).
module rev_full_adder_tb;
  logic a, b, cin, sum, cout;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  rev_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (2'({cout, sum}) != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b cout=%b sum=%b", a, b, cin, cout, sum);
      end
      checks++;
      if (garbage != {a ^ b, a}) begin
        failures++;
        $display("FAIL garbage=%b", garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
