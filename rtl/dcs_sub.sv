// dcs_sub: double carry-save subtractor, Z = X - Y (mod 2^N).
//
// Same single level of (6,3) counters as dcs_add, with every bit of Y
// inverted. Inverting one N-bit vector V gives 2^N - 1 - V, so inverting the
// three vectors of Y and adding 3 gives -Y mod 2^N. The 3 costs nothing: it is
// written into the two low positions of Z^c (weights 1 and 2), which the
// two-digit shift of the S2 vector leaves free. Z^b[0] stays 0.
//
// cout carries the counter bits that leave the top digit, with the weights
// given in dcs_add, so X + ~Y + 3 = Z + 2^N*(cout[0] + cout[1]) +
// 2^(N+1)*cout[2]. For a modular difference cout is ignored.
//
// The inversion and the added constant 3 follow the subtraction scheme this
// RTL implements; putting both constant ones in Z^c is this design's choice.
// Combinational.
module dcs_sub #(
  parameter int unsigned N = dcs_pkg::DCS_N_DEFAULT  // digits per operand, at least 2
) (
  input  logic [2:0][N-1:0] x,     // minuend X in DCS form
  input  logic [2:0][N-1:0] y,     // subtrahend Y in DCS form
  output logic [2:0][N-1:0] z,     // X - Y mod 2^N in DCS form
  output logic [2:0]        cout   // counter bits leaving the top digit
);

  if (N < 2) begin : g_bad_n
    $error("dcs_sub: N must be at least 2");
  end

  logic [2:0][N-1:0] s;

  counter_row_6_3 #(.W(N)) u_row (
    .x({~y, x}),
    .s(s)
  );

  assign z[dcs_pkg::PART_A] = s[0];
  assign z[dcs_pkg::PART_B] = s[1] << 1;
  assign z[dcs_pkg::PART_C] = (s[2] << 2) | N'(3);
  assign cout               = {s[2][N-1], s[2][N-2], s[1][N-1]};

endmodule
