// tb_dcs_add: self-checking test of the double carry-save adder.
// Checks, for corner and random operands at the default 24 digits and
// exhaustively at 2 digits, that
//   val(X) + val(Y) = val(Z) + 2^N*(cout[0] + cout[1]) + 2^(N+1)*cout[2]
// where val(V) = V^a + V^b + V^c computed as 64-bit integers, and that the
// positions the shifts leave empty (Z^b[0], Z^c[1:0]) are zero.
module tb_dcs_add;
  localparam int N = dcs_pkg::DCS_N_DEFAULT;
  localparam int NS = 2;

  logic [2:0][N-1:0]  x, y, z;
  logic [2:0]         cout;
  logic [2:0][NS-1:0] xs, ys, zs;
  logic [2:0]         couts;
  int checks = 0, failures = 0;
  int digit3_seen = 0;

  dcs_add dut (.x(x), .y(y), .z(z), .cout(cout));
  dcs_add #(.N(NS)) dut_small (.x(xs), .y(ys), .z(zs), .cout(couts));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(input logic [2:0][N-1:0] v);
    return longint'(v[0]) + longint'(v[1]) + longint'(v[2]);
  endfunction

  function automatic longint vals(input logic [2:0][NS-1:0] v);
    return longint'(v[0]) + longint'(v[1]) + longint'(v[2]);
  endfunction

  task automatic check();
    longint lhs, rhs;
    #1;
    lhs = val(x) + val(y);
    rhs = val(z) + (longint'(cout[0]) + longint'(cout[1])) * (64'sd1 << N)
        + longint'(cout[2]) * (64'sd1 << (N + 1));
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL X=%0d Y=%0d: Z=%0d cout=%b", val(x), val(y), val(z), cout);
    end
    checks++;
    if (z[1][0] !== 1'b0 || z[2][1:0] !== 2'b00) begin
      failures++;
      $display("FAIL empty low positions not zero");
    end
    for (int i = 0; i < N; i++)
      if (z[0][i] && z[1][i] && z[2][i]) digit3_seen++;
  endtask

  initial begin
    x = '0; y = '0; check();
    x = '1; y = '1; check();
    x = '1; y = '0; check();
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 3; k++) begin
        x[k] = N'($urandom);
        y[k] = N'($urandom);
      end
      check();
    end
    // All 2^12 operand pairs of the 2-digit adder.
    for (int v = 0; v < 4096; v++) begin
      longint lhs, rhs;
      {ys, xs} = 12'(v);
      #1;
      lhs = vals(xs) + vals(ys);
      rhs = vals(zs) + (longint'(couts[0]) + longint'(couts[1])) * 4
          + longint'(couts[2]) * 8;
      checks++;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL 2-digit X=%0d Y=%0d: Z=%0d cout=%b", vals(xs), vals(ys), vals(zs), couts);
      end
    end
    checks++;
    if (digit3_seen == 0) begin
      failures++;
      $display("FAIL no result digit of value 3 was produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
