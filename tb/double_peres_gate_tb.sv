// double_peres_gate_tb: exhaustive check of the Double Peres gate.
// All 16 input patterns are applied; outputs are compared with
// P=A, Q=A^B, R=A^B^D, S=(A^B)&D ^ A&B ^ C, and the 16 output patterns must
// all differ (the gate must be reversible).
module double_peres_gate_tb;
  logic a, b, c, d, p, q, r, s;
  logic [3:0] expd;
  logic [15:0] seen;
  int checks = 0, failures = 0;

  double_peres_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      expd[3] = a;
      expd[2] = a ^ b;
      expd[1] = a ^ b ^ d;
      expd[0] = ((a ^ b) & d) ^ (a & b) ^ c;
      checks++;
      if ({p, q, r, s} !== expd) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", {a, b, c, d}, {p, q, r, s}, expd);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b repeats", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
