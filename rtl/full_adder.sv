// One-bit full adder, the cell that the 4-bit ripple-carry adder repeats.
//
// sum = a ^ b ^ cin and cout = majority(a, b, cin). Purely combinational,
// no clock: the outputs follow the inputs. The cell and its use in a ripple
// chain follow the design; writing it as XOR/AND/OR equations is this
// implementation's choice, the design only names the cell.
module full_adder (
  input  logic a,     // operand bit A
  input  logic b,     // operand bit B
  input  logic cin,   // carry from the next lower bit
  output logic sum,   // sum bit
  output logic cout   // carry to the next higher bit
);
  logic p;  // propagate

  assign p    = a ^ b;
  assign sum  = p ^ cin;
  assign cout = (a & b) | (p & cin);
endmodule
