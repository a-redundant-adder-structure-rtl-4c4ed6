// dcs_add: double carry-save adder, Z = X + Y.
//
// X, Y and Z are N-digit double carry-save numbers (see dcs_pkg): three bit
// vectors per number, each digit worth 0..3. The six bits of digit i of X and
// Y all have weight 2^i, so one (6,3) counter per digit adds them in a single
// LUT level. The counter outputs are then put back into DCS form:
//   Z^a = S0,  Z^b = S1 shifted up one digit,  Z^c = S2 shifted up two digits.
// The free positions this leaves (Z^b[0], Z^c[1:0]) are filled with 0.
// No carry runs along the word, so the delay does not depend on N.
//
// Arithmetic is modulo 2^N. The three counter bits that would land above
// digit N-1 come out on cout: cout[0] = S1 of digit N-1 and cout[1] = S2 of
// digit N-2 (each of weight 2^N), cout[2] = S2 of digit N-1 (weight 2^(N+1)),
// so X + Y = Z + 2^N*(cout[0] + cout[1]) + 2^(N+1)*cout[2].
//
// The structure follows the double carry-save addition it implements; the
// cout port and its bit order are this design's choice. Combinational.
module dcs_add #(
  parameter int unsigned N = dcs_pkg::DCS_N_DEFAULT  // digits per operand, at least 2
) (
  input  logic [2:0][N-1:0] x,     // operand X in DCS form
  input  logic [2:0][N-1:0] y,     // operand Y in DCS form
  output logic [2:0][N-1:0] z,     // X + Y mod 2^N in DCS form
  output logic [2:0]        cout   // counter bits leaving the top digit
);

  if (N < 2) begin : g_bad_n
    $error("dcs_add: N must be at least 2");
  end

  logic [2:0][N-1:0] s;

  counter_row_6_3 #(.W(N)) u_row (
    .x({y, x}),
    .s(s)
  );

  assign z[dcs_pkg::PART_A] = s[0];
  assign z[dcs_pkg::PART_B] = s[1] << 1;
  assign z[dcs_pkg::PART_C] = s[2] << 2;
  assign cout               = {s[2][N-1], s[2][N-2], s[1][N-1]};

endmodule
