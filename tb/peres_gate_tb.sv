// peres_gate_tb: exhaustive check of the Peres gate.
// All 8 input patterns are applied; each output is compared with
// P=A, Q=A^B, R=A&B^C, and the 8 output patterns must all differ (the gate
// must be a bijection, i.e. reversible).
module peres_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== {a, a ^ b, (a & b) ^ c}) begin
        failures++;
        $display("FAIL in=%b out=%b", {a, b, c}, {p, q, r});
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b repeats", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
