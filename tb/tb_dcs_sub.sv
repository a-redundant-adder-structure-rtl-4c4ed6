// tb_dcs_sub: self-checking test of the double carry-save subtractor.
// For corner and random operands at the default 24 digits and exhaustively
// at 2 digits it checks that val(Z) = val(X) - val(Y) mod 2^N and that
//   val(X) + val(~Y) + 3 = val(Z) + 2^N*(cout[0] + cout[1]) + 2^(N+1)*cout[2]
// with val(V) = V^a + V^b + V^c computed as 64-bit integers.
module tb_dcs_sub;
  localparam int N = dcs_pkg::DCS_N_DEFAULT;
  localparam int NS = 2;

  logic [2:0][N-1:0]  x, y, z;
  logic [2:0]         cout;
  logic [2:0][NS-1:0] xs, ys, zs;
  logic [2:0]         couts;
  int checks = 0, failures = 0;
  int negative_seen = 0;

  dcs_sub dut (.x(x), .y(y), .z(z), .cout(cout));
  dcs_sub #(.N(NS)) dut_small (.x(xs), .y(ys), .z(zs), .cout(couts));

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
    longint m, diff, lhs, rhs;
    #1;
    m = 64'sd1 << N;
    diff = (val(x) - val(y)) % m;
    if (diff < 0) begin
      diff += m;
      negative_seen++;
    end
    checks++;
    if (val(z) % m != diff) begin
      failures++;
      $display("FAIL X=%0d Y=%0d: Z=%0d, expected %0d mod 2^N", val(x), val(y), val(z), diff);
    end
    lhs = val(x) + val(~y) + 3;
    rhs = val(z) + (longint'(cout[0]) + longint'(cout[1])) * m + longint'(cout[2]) * 2 * m;
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL X=%0d Y=%0d: full sum %0d, outputs give %0d", val(x), val(y), lhs, rhs);
    end
  endtask

  initial begin
    x = '0; y = '0; check();
    x = '0; y = '1; check();
    x = '1; y = '1; check();
    x = '1; y = '0; check();
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 3; k++) begin
        x[k] = N'($urandom);
        y[k] = N'($urandom);
      end
      check();
    end
    for (int v = 0; v < 4096; v++) begin
      longint d;
      {ys, xs} = 12'(v);
      #1;
      d = (vals(xs) - vals(ys)) % 4;
      if (d < 0) d += 4;
      checks++;
      if (vals(zs) % 4 != d) begin
        failures++;
        $display("FAIL 2-digit X=%0d Y=%0d: Z=%0d", vals(xs), vals(ys), vals(zs));
      end
    end
    checks++;
    if (negative_seen == 0) begin
      failures++;
      $display("FAIL no negative difference was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
