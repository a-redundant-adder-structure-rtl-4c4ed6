// counter_row_6_3: one level of (6,3) counters across W bit columns.
//
// Six binary operands X0..X5 of W bits are reduced column by column: the
// counter of column i counts the six bits of weight 2^i and returns s[0][i],
// s[1][i], s[2][i]. The sum of the operands is then S0 + 2*S1 + 4*S2, i.e.
// the three counter output vectors taken with shifts of 0, 1 and 2 positions.
// No signal crosses between columns, so the delay is one counter (one 6-input
// LUT) whatever W is. Purely combinational.
//
// The column-wise reduction follows the multi-operand counter scheme this RTL
// implements. The caller applies the shifts.
module counter_row_6_3 #(
  parameter int unsigned W = dcs_pkg::DCS_N_DEFAULT  // bits per operand
) (
  input  logic [5:0][W-1:0] x,  // x[j] is operand Xj
  output logic [2:0][W-1:0] s   // s[k][i] is bit k of the count of column i
);

  for (genvar i = 0; i < W; i++) begin : g_col
    logic [5:0] col;
    logic [2:0] cnt;

    always_comb begin
      for (int j = 0; j < 6; j++) begin
        col[j] = x[j][i];
      end
    end

    counter_6_3 u_cnt (
      .x(col),
      .s(cnt)
    );

    assign s[0][i] = cnt[0];
    assign s[1][i] = cnt[1];
    assign s[2][i] = cnt[2];
  end

endmodule
