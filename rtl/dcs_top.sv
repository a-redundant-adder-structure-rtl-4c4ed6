// dcs_top: registered four-operand double carry-save adder.
//
// Four N-digit operands in double carry-save (DCS) form are added, or the
// second pair subtracted from the first, without any carry propagation:
//   op = OP_ADD: sum = (A + B) + (C + D)
//   op = OP_SUB: sum = (A + B) - (C + D)      (both mod 2^N)
// The datapath between registers is the two-level dcs_tree4, i.e. two 6-input
// LUT levels independent of N. The redundant result is also converted to
// binary (dcs_to_bin) in a stage of its own, so the carry chain never sits on
// the same path as the redundant adders.
//
// Pipeline (one operation may enter every cycle, no stalls):
//   cycle 0: in_valid high, operands and op sampled into the input registers
//   cycle 1: the tree works; its result is clocked into the sum register
//   cycle 2: sum_valid high, sum holds the DCS result; it is converted
//   cycle 3: bin_valid high, bin holds the binary result
// Measured from the clock edge that samples the inputs, sum is ready two
// edges later and bin three. rst_n is an active-low synchronous reset that
// clears the valid flags and all data registers.
//
// The tree follows the four-operand arrangement that was timed for this
// adder; the registers, the valid flags, the subtract option at the root and
// the conversion stage are this design's choices.
module dcs_top
  import dcs_pkg::*;
#(
  parameter int unsigned N = DCS_N_DEFAULT  // digits per operand, at least 2
) (
  input  logic              clk,
  input  logic              rst_n,      // synchronous, active low
  input  logic              in_valid,   // operands and op valid this cycle
  input  dcs_op_e           op,         // OP_ADD or OP_SUB
  input  logic [2:0][N-1:0] a,          // operands in DCS form
  input  logic [2:0][N-1:0] b,
  input  logic [2:0][N-1:0] c,
  input  logic [2:0][N-1:0] d,
  output logic              sum_valid,  // sum holds a new result
  output logic [2:0][N-1:0] sum,        // result in DCS form, mod 2^N
  output logic              bin_valid,  // bin holds a new result
  output logic [N-1:0]      bin         // result in binary, mod 2^N
);

  // Input registers.
  logic              in_q_valid;
  dcs_op_e           op_q;
  logic [2:0][N-1:0] a_q, b_q, c_q, d_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_q_valid <= 1'b0;
      op_q       <= OP_ADD;
      a_q        <= '0;
      b_q        <= '0;
      c_q        <= '0;
      d_q        <= '0;
    end else begin
      in_q_valid <= in_valid;
      if (in_valid) begin
        op_q <= op;
        a_q  <= a;
        b_q  <= b;
        c_q  <= c;
        d_q  <= d;
      end
    end
  end

  // Redundant addition: one register-to-register stage.
  logic [2:0][N-1:0] tree_s;

  dcs_tree4 #(.N(N)) u_tree (
    .op(op_q),
    .a (a_q),
    .b (b_q),
    .c (c_q),
    .d (d_q),
    .s (tree_s)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_valid <= 1'b0;
      sum       <= '0;
    end else begin
      sum_valid <= in_q_valid;
      if (in_q_valid) begin
        sum <= tree_s;
      end
    end
  end

  // Conversion to binary: a stage of its own.
  logic [N-1:0] conv;

  dcs_to_bin #(.N(N)) u_conv (
    .z  (sum),
    .bin(conv)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bin_valid <= 1'b0;
      bin       <= '0;
    end else begin
      bin_valid <= sum_valid;
      if (sum_valid) begin
        bin <= conv;
      end
    end
  end

  // Each redundant result is followed by its binary form one cycle later.
  a_bin_follows_sum : assert property (
    @(posedge clk) disable iff (!rst_n) sum_valid |=> bin_valid
  );

endmodule
