// tb_counter_row_6_3: self-checking test of a row of (6,3) counters at the
// default width. Random and corner operand sets are applied; the check is
// that X0 + ... + X5 equals S0 + 2*S1 + 4*S2, with both sides computed as
// 64-bit integers, and that every column's count matches its six bits.
module tb_counter_row_6_3;
  localparam int W = dcs_pkg::DCS_N_DEFAULT;
  logic [5:0][W-1:0] x;
  logic [2:0][W-1:0] s;
  int checks = 0, failures = 0;

  counter_row_6_3 dut (.x(x), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned lhs, rhs;
    int col_bad;
    #1;
    lhs = 0;
    for (int j = 0; j < 6; j++) lhs += longint'(x[j]);
    rhs = longint'(s[0]) + 2 * longint'(s[1]) + 4 * longint'(s[2]);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL sum of operands %0d, weighted counter outputs %0d", lhs, rhs);
    end
    col_bad = 0;
    for (int i = 0; i < W; i++) begin
      int n;
      n = 0;
      for (int j = 0; j < 6; j++) n += int'(x[j][i]);
      if (n != int'({s[2][i], s[1][i], s[0][i]})) col_bad++;
    end
    checks++;
    if (col_bad != 0) begin
      failures++;
      $display("FAIL %0d columns with a wrong count", col_bad);
    end
  endtask

  initial begin
    x = '0;              check();
    x = '1;              check();
    for (int t = 0; t < 2000; t++) begin
      for (int j = 0; j < 6; j++) x[j] = W'({$urandom, $urandom});
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
