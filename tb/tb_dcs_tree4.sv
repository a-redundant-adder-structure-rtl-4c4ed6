// tb_dcs_tree4: self-checking test of the four-operand DCS tree at the
// default 24 digits. Random and corner operands are applied with both ops;
// the result's value val(S) = S^a + S^b + S^c must equal (A+B)+(C+D) or
// (A+B)-(C+D) modulo 2^N, with the reference computed as 64-bit integers.
module tb_dcs_tree4;
  import dcs_pkg::*;
  localparam int N = DCS_N_DEFAULT;

  dcs_op_e op;
  logic [2:0][N-1:0] a, b, c, d, s;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;

  dcs_tree4 dut (.op(op), .a(a), .b(b), .c(c), .d(d), .s(s));

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

  task automatic check();
    longint m, e;
    #1;
    m = 64'sd1 << N;
    if (op == OP_SUB) begin
      e = (val(a) + val(b)) - (val(c) + val(d));
      n_sub++;
    end else begin
      e = (val(a) + val(b)) + (val(c) + val(d));
      n_add++;
    end
    e = e % m;
    if (e < 0) e += m;
    checks++;
    if (val(s) % m != e) begin
      failures++;
      $display("FAIL op=%s A=%0d B=%0d C=%0d D=%0d: S=%0d expected %0d",
               op.name(), val(a), val(b), val(c), val(d), val(s) % m, e);
    end
  endtask

  initial begin
    op = OP_ADD; a = '1; b = '1; c = '1; d = '1; check();
    op = OP_SUB; check();
    a = '0; b = '0; check();
    for (int t = 0; t < 4000; t++) begin
      op = dcs_op_e'($urandom_range(1, 0));
      for (int k = 0; k < 3; k++) begin
        a[k] = N'($urandom);
        b[k] = N'($urandom);
        c[k] = N'($urandom);
        d[k] = N'($urandom);
      end
      check();
    end
    checks++;
    if (n_add == 0 || n_sub == 0) begin
      failures++;
      $display("FAIL an operation was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
