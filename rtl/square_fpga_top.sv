// square_fpga_top: board-level top of the reversible square circuits.
//
// The 4-bit and the 8-bit square units stand side by side, each with its own
// DIP switches and LEDs: sw4 feeds the 4-bit unit and led4 shows its 8-bit
// square, sw8 feeds the 8-bit unit and led8 shows its 16-bit square. The
// garbage lines of the reversible gates are not wired to any pin. There is
// no clock: the LEDs follow the switches combinationally. Separate switch
// banks for the two units and active-high LEDs are this design's choice.
module square_fpga_top (
  input  logic [3:0]  sw4,
  input  logic [7:0]  sw8,
  output logic [7:0]  led4,
  output logic [15:0] led8
);
  rev_square4 u_sq4 (
    .a       (sw4),
    .sq      (led4),
    .garbage ()
  );

  rev_square_n #(.N(8)) u_sq8 (
    .a       (sw8),
    .sq      (led8),
    .garbage ()
  );
endmodule
