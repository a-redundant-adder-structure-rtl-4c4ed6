// ripple_carry_adder: W-bit carry-propagate adder from a chain of full adders.
//
// x + y + cin = s + 2^W*cout. Bit i's full adder takes the carry of bit i-1,
// so the carry ripples from bit 0 to bit W-1 and the delay grows with W; on
// an FPGA the synthesis tool maps this chain onto the dedicated carry logic.
// Combinational. Used only for the final conversion of a redundant result to
// binary.
module ripple_carry_adder #(
  parameter int unsigned W = dcs_pkg::DCS_N_DEFAULT  // bits per operand
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (carry[i]),
      .s   (s[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[W];

endmodule
