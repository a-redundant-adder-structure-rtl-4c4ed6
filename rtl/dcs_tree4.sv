// dcs_tree4: four-operand double carry-save addition tree.
//
// Computes S = (A + B) + (C + D) on N-digit double carry-save numbers with a
// double carry-save result: two dcs_add in the first level, one in the
// second, so two LUT levels from operands to result. With op = OP_SUB the
// root is a dcs_sub instead and S = (A + B) - (C + D). Results are modulo
// 2^N; the counter bits leaving the top digit are dropped.
//
// The two-level tree follows the four-operand test arrangement of the
// design; the subtracting root and the op input are this design's own
// addition, selecting between two roots after the counters. Combinational.
module dcs_tree4
  import dcs_pkg::*;
#(
  parameter int unsigned N = DCS_N_DEFAULT  // digits per operand, at least 2
) (
  input  dcs_op_e           op,  // OP_ADD or OP_SUB at the root
  input  logic [2:0][N-1:0] a,   // operands in DCS form
  input  logic [2:0][N-1:0] b,
  input  logic [2:0][N-1:0] c,
  input  logic [2:0][N-1:0] d,
  output logic [2:0][N-1:0] s    // result mod 2^N in DCS form
);

  logic [2:0][N-1:0] ab, cd, sum, diff;
  logic [2:0]        ab_cout, cd_cout, sum_cout, diff_cout;

  dcs_add #(.N(N)) u_add_ab (.x(a),  .y(b),  .z(ab),   .cout(ab_cout));
  dcs_add #(.N(N)) u_add_cd (.x(c),  .y(d),  .z(cd),   .cout(cd_cout));
  dcs_add #(.N(N)) u_add_rt (.x(ab), .y(cd), .z(sum),  .cout(sum_cout));
  dcs_sub #(.N(N)) u_sub_rt (.x(ab), .y(cd), .z(diff), .cout(diff_cout));

  // Carries out of the top digit are discarded: arithmetic is modulo 2^N.
  logic unused_cout;
  assign unused_cout = ^{ab_cout, cd_cout, sum_cout, diff_cout};

  assign s = (op == OP_SUB) ? diff : sum;

endmodule
