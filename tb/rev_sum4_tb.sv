// rev_sum4_tb: checks the 4-bit summation circuit on its own.
// For every 4-bit operand the testbench forms the six cross products itself
// (order a0a1 a0a2 a0a3 a1a2 a1a3 a2a3) and expects p = a*a. It also checks
// that p[1] is always 0 and that the garbage lines of the first half adder
// (column 2) and of the last full adder (column 6) hold the gates' left-over
// P and Q values.
module rev_sum4_tb;
  logic [3:0] a;
  logic [5:0] pp;
  logic [7:0] p;
  logic [8:0] garbage;
  int checks = 0, failures = 0;

  rev_sum4 dut (.a(a), .pp(pp), .p(p), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a  = 4'(v);
      pp = {a[2] & a[3], a[1] & a[3], a[1] & a[2], a[0] & a[3], a[0] & a[2], a[0] & a[1]};
      #1;
      checks++;
      if (int'(p) != v * v) begin
        failures++;
        $display("FAIL a=%0d p=%0d exp=%0d", v, p, v * v);
      end
      checks++;
      if (p[1] !== 1'b0) begin failures++; $display("FAIL p[1] not 0"); end
      checks++;
      if (garbage[0] !== (a[0] & a[1])) begin failures++; $display("FAIL HA col2 garbage"); end
      checks++;
      if (garbage[8:7] !== {(a[2] & a[3]) ^ a[3], a[2] & a[3]}) begin
        failures++;
        $display("FAIL FA col6 garbage=%b", garbage[8:7]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
