// Ripple-carry adder: WIDTH full adders in a chain, the function of a
// 74LS283-type 4-bit binary adder.
//
// Stage i adds a[i], b[i] and the carry out of stage i-1; stage 0 takes cin
// and the last stage drives cout. The carry therefore ripples through all
// WIDTH cells, which is the adder's critical path. Combinational, no clock.
// The four-stage chain with carry-in and carry-out follows the design
// (WIDTH = 4); making the width a parameter is this implementation's choice.
module ripple_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,     // operand A
  input  logic [WIDTH-1:0] b,     // operand B
  input  logic             cin,   // carry into bit 0
  output logic [WIDTH-1:0] sum,   // A + B + cin, low WIDTH bits
  output logic             cout   // carry out of the top bit
);
  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
