// tb_csa_row: self-checking test of the carry-save row at the default width.
// For random and corner operands, x + y + z + cin must equal s + c + 2^W*cout
// (64-bit reference), and s must be the bitwise XOR of the three operands.
module tb_csa_row;
  localparam int W = dcs_pkg::DCS_N_DEFAULT;
  logic [W-1:0] x, y, z, s, c;
  logic cin, cout;
  int checks = 0, failures = 0;

  csa_row dut (.x(x), .y(y), .z(z), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint lhs, rhs;
    #1;
    lhs = longint'(x) + longint'(y) + longint'(z) + longint'(cin);
    rhs = longint'(s) + longint'(c) + longint'(cout) * (64'sd1 << W);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL x=%h y=%h z=%h cin=%b: s=%h c=%h cout=%b", x, y, z, cin, s, c, cout);
    end
    checks++;
    if (s != (x ^ y ^ z)) begin
      failures++;
      $display("FAIL sum vector is not x^y^z");
    end
  endtask

  initial begin
    x = '1; y = '1; z = '1; cin = 1'b1; check();
    x = '0; y = '0; z = '0; cin = 1'b0; check();
    for (int t = 0; t < 3000; t++) begin
      x = W'($urandom); y = W'($urandom); z = W'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
