// csa_row: one row of (3,2) counters, a W-bit carry-save adder.
//
// Reduces three binary operands to a sum vector and a carry vector:
// x + y + z + cin = s + c + 2^W*cout. Column i holds a full adder on x[i],
// y[i], z[i]; its sum goes to s[i] and its carry to c[i+1]. c[0] is cin, and
// the carry of the top column leaves on cout. No carry runs along the row, so
// the delay is one full adder for any W. Combinational.
//
// This is the classical carry-save row; here it is the first step of the
// conversion of a three-vector double carry-save number to binary.
module csa_row #(
  parameter int unsigned W = dcs_pkg::DCS_N_DEFAULT  // bits per operand
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         cin,   // enters the carry vector at bit 0
  output logic [W-1:0] s,     // sum vector
  output logic [W-1:0] c,     // carry vector, bits already at their weight
  output logic         cout   // carry out of column W-1
);

  logic [W-1:0] carry;

  for (genvar i = 0; i < W; i++) begin : g_col
    full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (z[i]),
      .s   (s[i]),
      .cout(carry[i])
    );
  end

  if (W > 1) begin : g_shift
    assign c = {carry[W-2:0], cin};
  end else begin : g_one
    assign c = cin;
  end
  assign cout = carry[W-1];

endmodule
