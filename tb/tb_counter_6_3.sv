// tb_counter_6_3: exhaustive self-checking test of the (6,3) counter.
// All 64 input patterns are applied; the expected count is built by testing
// each bit in turn and summing, and compared with s.
module tb_counter_6_3;
  logic [5:0] x;
  logic [2:0] s;
  int checks = 0, failures = 0;

  counter_6_3 dut (.x(x), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int expect_cnt;
      x = 6'(v);
      #1;
      expect_cnt = 0;
      for (int b = 0; b < 6; b++) if (((v >> b) & 1) == 1) expect_cnt++;
      checks++;
      if (int'(s) != expect_cnt) begin
        failures++;
        $display("FAIL x=%b s=%0d expected %0d", x, s, expect_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
