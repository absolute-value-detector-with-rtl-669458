// 4-bit "greater than" comparator built only from NOT, NAND, NOR and XNOR
// gates: a_gt_b = 1 when the unsigned word a is larger than b.
//
// It evaluates the four cases of a > b from the most significant bit down:
//   t3 = a3 & ~b3
//   t2 = (a3 == b3) & a2 & ~b2
//   t1 = (a3 == b3) & (a2 == b2) & a1 & ~b1
//   t0 = (a3 == b3) & (a2 == b2) & (a1 == b1) & a0 & ~b0
// Each equality is an XNOR gate. Each term is a NAND followed by an
// inverter (t0 nests a 2-input NAND/NOT for a0 & ~b0 inside a 4-input NAND,
// which is the longest path). Pairs of terms are merged by 2-input NOR gates
// (t3,t2 and t1,t0), each re-inverted, and a final 2-input NOR and inverter
// give the OR of all four terms.
//
// Interface: a, b in, a_gt_b out. Combinational, no clock.
//
// The four cases, the gate types and the gate names (NOT5B, NAND1B, XNOR1B,
// 3NAND1B, 4NAND2B, 4NAND1B, NAND2B, NOR1B, NOR3B, NOR2B and the inverters
// around them, written here with a g_ prefix) follow the design. This
// implementation places the per-bit inverter on the threshold bit so that
// each term means a_i > b_i, and adds the final inverter g_not_out so the
// output is a > b; both are its own choices.
module magnitude_comparator
  import avd_pkg::*;
(
  input  mag_t a,       // magnitude |x|
  input  mag_t b,       // threshold
  output logic a_gt_b   // 1 when a > b
);
  // bitwise equality
  logic g_xnor1b, g_xnor2b, g_xnor3b;
  assign g_xnor1b = ~(a[3] ^ b[3]);
  assign g_xnor2b = ~(a[2] ^ b[2]);
  assign g_xnor3b = ~(a[1] ^ b[1]);

  // bit 3: a3 & ~b3
  logic g_not5b, g_nand1b, g_not1b;
  assign g_not5b  = ~b[3];
  assign g_nand1b = ~(a[3] & g_not5b);
  assign g_not1b  = ~g_nand1b;

  // bit 2: eq3 & a2 & ~b2
  logic g_not9b, g_3nand1b, g_not6b;
  assign g_not9b   = ~b[2];
  assign g_3nand1b = ~(g_xnor1b & a[2] & g_not9b);
  assign g_not6b   = ~g_3nand1b;

  // bit 1: eq3 & eq2 & a1 & ~b1
  logic g_not14b, g_4nand2b, g_not17b;
  assign g_not14b  = ~b[1];
  assign g_4nand2b = ~(g_xnor1b & g_xnor2b & a[1] & g_not14b);
  assign g_not17b  = ~g_4nand2b;

  // bit 0: eq3 & eq2 & eq1 & (a0 & ~b0)
  logic g_not10b, g_nand2b, g_not4b, g_4nand1b, g_not16b;
  assign g_not10b  = ~b[0];
  assign g_nand2b  = ~(a[0] & g_not10b);
  assign g_not4b   = ~g_nand2b;
  assign g_4nand1b = ~(g_xnor1b & g_xnor2b & g_xnor3b & g_not4b);
  assign g_not16b  = ~g_4nand1b;

  // merge the four terms
  logic g_nor1b, g_nor3b, g_not7b, g_not2b, g_nor2b, g_not_out;
  assign g_nor1b   = ~(g_not1b | g_not6b);
  assign g_nor3b   = ~(g_not17b | g_not16b);
  assign g_not7b   = ~g_nor1b;
  assign g_not2b   = ~g_nor3b;
  assign g_nor2b   = ~(g_not7b | g_not2b);   // 1 when no term is set: a <= b
  assign g_not_out = ~g_nor2b;

  assign a_gt_b = g_not_out;
endmodule
