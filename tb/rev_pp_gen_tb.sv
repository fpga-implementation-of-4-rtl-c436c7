// rev_pp_gen_tb: checks the Toffoli partial-product chain.
// The 8-bit generator (default size) is driven with all 256 operands and a
// 4-bit one with all 16. The expected product bus is built by walking the
// pairs (i,j), i<j, in gate order, and the regenerated operand lines must
// equal the operand.
module rev_pp_gen_tb;
  localparam int N8 = 8;
  localparam int N4 = 4;

  logic [N8-1:0]              a8, a8_out;
  logic [N8*(N8-1)/2-1:0]     pp8, exp8;
  logic [N4-1:0]              a4, a4_out;
  logic [N4*(N4-1)/2-1:0]     pp4, exp4;
  int checks = 0, failures = 0;
  int idx;

  rev_pp_gen dut8 (.a(a8), .a_out(a8_out), .pp(pp8));
  rev_pp_gen #(.N(N4)) dut4 (.a(a4), .a_out(a4_out), .pp(pp4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      a8 = 8'(v);
      a4 = 4'(v);
      #1;
      idx = 0;
      for (int i = 0; i < N8; i++)
        for (int j = i + 1; j < N8; j++) begin
          exp8[idx] = a8[i] & a8[j];
          idx++;
        end
      idx = 0;
      for (int i = 0; i < N4; i++)
        for (int j = i + 1; j < N4; j++) begin
          exp4[idx] = a4[i] & a4[j];
          idx++;
        end
      checks += 4;
      if (pp8 !== exp8) begin failures++; $display("FAIL N=8 a=%h pp=%h exp=%h", a8, pp8, exp8); end
      if (a8_out !== a8) begin failures++; $display("FAIL N=8 a_out=%h a=%h", a8_out, a8); end
      if (pp4 !== exp4) begin failures++; $display("FAIL N=4 a=%h pp=%h exp=%h", a4, pp4, exp4); end
      if (a4_out !== a4) begin failures++; $display("FAIL N=4 a_out=%h a=%h", a4_out, a4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
