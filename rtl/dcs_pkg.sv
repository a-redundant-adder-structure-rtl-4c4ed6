// dcs_pkg: constants and types shared by the double carry-save (DCS) adder RTL.
//
// A DCS number of N digits is held as three N-bit vectors, packed as
// logic [2:0][N-1:0]: index 0 is Z^a, index 1 is Z^b, index 2 is Z^c, and the
// value is Z^a + Z^b + Z^c. Digit i is the bit triple {Z^c[i], Z^b[i], Z^a[i]},
// worth 0..3 times 2^i. The three-vector form and the 24-digit default size
// follow the adder this RTL implements; the operation encoding is this
// design's own choice.
package dcs_pkg;

  // Default operand width in digits (the 24-bit additions that were measured).
  localparam int unsigned DCS_N_DEFAULT = 24;

  // Vector indices inside a DCS number.
  localparam int unsigned PART_A = 0;  // counter sum bits, not shifted
  localparam int unsigned PART_B = 1;  // counter twos bits, shifted up one digit
  localparam int unsigned PART_C = 2;  // counter fours bits, shifted up two digits

  // Operation of the root node of the four-operand tree.
  typedef enum logic {
    OP_ADD = 1'b0,  // S = (A + B) + (C + D)
    OP_SUB = 1'b1   // S = (A + B) - (C + D)
  } dcs_op_e;

endpackage
