// full_adder: single-bit full adder, the (3,2) counter.
//
// Adds three bits of equal weight: x + y + cin = 2*cout + s. Used as the
// cell of the carry-save row (csa_row) and of the carry-propagate adder
// (ripple_carry_adder) that turn a double carry-save number back into plain
// binary. Combinational; the function is the standard full adder.
module full_adder (
  input  logic x,     // operand bit
  input  logic y,     // operand bit
  input  logic cin,   // carry in
  output logic s,     // sum bit, weight 1
  output logic cout   // carry out, weight 2
);

  logic p;

  assign p    = x ^ y;
  assign s    = p ^ cin;
  assign cout = (x & y) | (p & cin);

endmodule
