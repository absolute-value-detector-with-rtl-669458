// Absolute value converter for a 5-bit two's complement sample.
//
// The four magnitude bits x[3:0] go two ways. One copy is inverted by a bank
// of four inverters and fed to a 4-bit ripple-carry adder whose other operand
// is zero and whose carry-in is tied high, so the adder forms ~x + 1, the
// two's complement. A quad 2-to-1 selector then picks the raw bits when the
// sign bit x[4] is 0 and the adder's sum when it is 1. The strobe of the
// selector is tied active.
//
// Interface: x in, mag = |x| out, four bits. Combinational, no clock; the
// longest path runs through an inverter, the whole carry chain and the
// selector.
//
// The structure (inverters, adder with B = 0 and carry-in = 1, selector
// steered by the sign bit, 4-bit output) follows the design. One consequence
// is kept on purpose: the most negative input, -16 (5'b10000), has no 4-bit
// magnitude, and mag reads 0 for it because the adder's carry-out is left
// unused, exactly as in the design.
module abs_converter
  import avd_pkg::*;
(
  input  sample_t x,    // two's complement sample; x[4] is the sign
  output mag_t    mag   // |x| in four bits (0 for x = -16)
);
  mag_t x_inv;   // inverter bank output
  mag_t neg;     // ~x[3:0] + 1

  assign x_inv = ~x[MAG_W-1:0];

  ripple_adder #(.WIDTH(MAG_W)) u_adder (
    .a   (x_inv),
    .b   ('0),
    .cin (1'b1),
    .sum (neg),
    .cout()              // unused: the design leaves the carry-out open
  );

  quad_mux2 #(.WIDTH(MAG_W)) u_mux (
    .a       (x[MAG_W-1:0]),
    .b       (neg),
    .sel     (x[IN_W-1]),
    .strobe_n(1'b0),
    .y       (mag)
  );
endmodule
