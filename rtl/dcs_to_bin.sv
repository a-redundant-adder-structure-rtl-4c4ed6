// dcs_to_bin: double carry-save to binary conversion.
//
// A redundant result only has to be resolved when an ordinary binary value is
// needed. The value of a DCS number is Z^a + Z^b + Z^c, three binary vectors:
// one carry-save row (csa_row) reduces them to a sum and a carry vector, and a
// carry-propagate adder (ripple_carry_adder) adds those two. The result is
// taken modulo 2^N, matching the modular DCS adders; the carries out of the
// top bit are dropped. Combinational; its delay is one full adder plus an
// N-bit carry chain.
//
// That a carry-propagate adder finishes a redundant computation follows the
// design; the carry-save row in front of it is this design's choice for
// summing three vectors.
module dcs_to_bin #(
  parameter int unsigned N = dcs_pkg::DCS_N_DEFAULT  // digits
) (
  input  logic [2:0][N-1:0] z,    // number in DCS form
  output logic [N-1:0]      bin   // its value mod 2^N
);

  logic [N-1:0] s, c;
  logic         csa_cout, cpa_cout;

  csa_row #(.W(N)) u_csa (
    .x   (z[dcs_pkg::PART_A]),
    .y   (z[dcs_pkg::PART_B]),
    .z   (z[dcs_pkg::PART_C]),
    .cin (1'b0),
    .s   (s),
    .c   (c),
    .cout(csa_cout)
  );

  ripple_carry_adder #(.W(N)) u_cpa (
    .x   (s),
    .y   (c),
    .cin (1'b0),
    .s   (bin),
    .cout(cpa_cout)
  );

  // Carries above bit N-1 are discarded: the conversion is modulo 2^N.
  logic unused_cout;
  assign unused_cout = csa_cout ^ cpa_cout;

endmodule
