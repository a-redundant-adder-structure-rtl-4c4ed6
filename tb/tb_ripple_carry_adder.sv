// tb_ripple_carry_adder: self-checking test of the carry-propagate adder at
// the default width: {cout, s} must equal x + y + cin for random operands and
// for the full-length carry ripple (all ones plus a carry in).
module tb_ripple_carry_adder;
  localparam int W = dcs_pkg::DCS_N_DEFAULT;
  logic [W-1:0] x, y, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint e;
    #1;
    e = longint'(x) + longint'(y) + longint'(cin);
    checks++;
    if (longint'({cout, s}) != e) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, got %b %h", x, y, cin, e, cout, s);
    end
  endtask

  initial begin
    x = '1; y = '0; cin = 1'b1; check();
    x = '1; y = '1; cin = 1'b1; check();
    x = '0; y = '0; cin = 1'b0; check();
    for (int t = 0; t < 3000; t++) begin
      x = W'($urandom); y = W'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
