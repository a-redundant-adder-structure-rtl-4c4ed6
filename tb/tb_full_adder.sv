// tb_full_adder: exhaustive self-checking test of the full adder against the
// full-adder truth table, written out below as {cout, s} for x, y, cin = 000
// .. 111, and against x + y + cin = 2*cout + s.
module tb_full_adder;
  logic x, y, cin, s, cout;
  int checks = 0, failures = 0;
  // {cout, s} for rows 000, 001, 010, 011, 100, 101, 110, 111 of x y cin.
  localparam logic [1:0] TABLE [8] = '{2'b00, 2'b01, 2'b01, 2'b10,
                                       2'b01, 2'b10, 2'b10, 2'b11};

  full_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, s} != TABLE[v]) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b: cout=%b s=%b", x, y, cin, cout, s);
      end
      checks++;
      if (int'(x) + int'(y) + int'(cin) != 2 * int'(cout) + int'(s)) begin
        failures++;
        $display("FAIL arithmetic identity at %b%b%b", x, y, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
