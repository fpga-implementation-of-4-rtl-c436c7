// square_fpga_top_tb: end-to-end test of the board top at its default size.
// Every combination of the 4-bit switches (16) and the 8-bit switches (256)
// is set, as an operator would on the DIP switches, and both LED banks must
// show the square of their switches. The cases that exercise the ends of the
// carry chains are counted: the top LED of each bank lit (carry out of the
// last column), the all-zero and the all-one switch settings; a case that
// never occurs counts as a failure.
module square_fpga_top_tb;
  logic [3:0]  sw4;
  logic [7:0]  sw8;
  logic [7:0]  led4;
  logic [15:0] led8;
  int checks = 0, failures = 0;
  int msb4_lit = 0, msb8_lit = 0, zero_seen = 0, max_seen = 0;

  square_fpga_top dut (.sw4(sw4), .sw8(sw8), .led4(led4), .led8(led8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 256; y++) begin
        sw4 = 4'(x);
        sw8 = 8'(y);
        #1;
        checks++;
        if (int'(led4) != x * x) begin
          failures++;
          $display("FAIL sw4=%0d led4=%0d", x, led4);
        end
        checks++;
        if (int'(led8) != y * y) begin
          failures++;
          $display("FAIL sw8=%0d led8=%0d", y, led8);
        end
        if (led4[7])  msb4_lit++;
        if (led8[15]) msb8_lit++;
        if (x == 0 && y == 0) zero_seen++;
        if (x == 15 && y == 255) max_seen++;
      end
    end
    $display("4-bit LED7 lit %0d times, 8-bit LED15 lit %0d times, all-zero %0d, all-one %0d",
             msb4_lit, msb8_lit, zero_seen, max_seen);
    checks++;
    if (msb4_lit == 0 || msb8_lit == 0 || zero_seen == 0 || max_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
