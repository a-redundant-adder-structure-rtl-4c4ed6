// tb_dcs_to_bin: self-checking test of the DCS-to-binary conversion at the
// default width: bin must equal (Z^a + Z^b + Z^c) mod 2^N, reference computed
// as a 64-bit integer, for random and all-ones inputs.
module tb_dcs_to_bin;
  localparam int N = dcs_pkg::DCS_N_DEFAULT;
  logic [2:0][N-1:0] z;
  logic [N-1:0] bin;
  int checks = 0, failures = 0;

  dcs_to_bin dut (.z(z), .bin(bin));

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
    e = (longint'(z[0]) + longint'(z[1]) + longint'(z[2])) % (64'sd1 << N);
    checks++;
    if (longint'(bin) != e) begin
      failures++;
      $display("FAIL %h + %h + %h: got %h expected %h", z[0], z[1], z[2], bin, e);
    end
  endtask

  initial begin
    z = '1; check();
    z = '0; check();
    z = '0; z[0] = '1; z[2] = N'(1); check();
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 3; k++) z[k] = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
