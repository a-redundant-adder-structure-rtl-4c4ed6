// tb_dcs_top: end-to-end self-checking test of dcs_top at its default size
// (24 digits), no parameters overridden.
//
// A stream of random four-operand operations, adds and subtracts mixed, is
// driven with random idle cycles between them and runs of back-to-back
// operations. Each operation's expected result (A+B)+(C+D) or (A+B)-(C+D)
// mod 2^N is computed from the operand values as 64-bit integers and queued
// with the cycle it entered. On sum_valid the redundant result's value must
// match and must arrive exactly 2 cycles after the input; on bin_valid the
// binary result must match and arrive 3 cycles after the input.
// It also counts how often each mechanism occurred: adds, subtracts,
// back-to-back operations, idle cycles, results that wrapped modulo 2^N,
// negative differences, and results whose Z^c vector carried a counter
// "fours" bit. Any count left at zero is a failure.
module tb_dcs_top;
  import dcs_pkg::*;
  localparam int N = DCS_N_DEFAULT;
  localparam int N_OPS = 5000;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  dcs_op_e op;
  logic [2:0][N-1:0] a, b, c, d;
  logic sum_valid, bin_valid;
  logic [2:0][N-1:0] sum;
  logic [N-1:0] bin;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_add = 0, n_sub = 0, n_b2b = 0, n_idle = 0, n_wrap = 0, n_neg = 0, n_fours = 0;

  typedef struct {
    longint expected;
    int     cycle_in;
  } txn_t;
  txn_t sum_q[$], bin_q[$];

  dcs_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op),
    .a(a), .b(b), .c(c), .d(d),
    .sum_valid(sum_valid), .sum(sum), .bin_valid(bin_valid), .bin(bin)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (4 * N_OPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(input logic [2:0][N-1:0] v);
    return longint'(v[0]) + longint'(v[1]) + longint'(v[2]);
  endfunction

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && sum_valid) begin
      txn_t t;
      checks++;
      if (sum_q.size() == 0) begin
        failures++;
        $display("FAIL sum_valid with no operation outstanding");
      end else begin
        t = sum_q.pop_front();
        if (val(sum) % (64'sd1 << N) != t.expected) begin
          failures++;
          $display("FAIL redundant result %0d expected %0d", val(sum) % (64'sd1 << N), t.expected);
        end
        checks++;
        if (cycle - t.cycle_in != 2) begin
          failures++;
          $display("FAIL redundant result after %0d cycles", cycle - t.cycle_in);
        end
        if ((sum[PART_C] >> 2) != '0) n_fours++;
      end
    end
    if (rst_n && bin_valid) begin
      txn_t t;
      checks++;
      if (bin_q.size() == 0) begin
        failures++;
        $display("FAIL bin_valid with no operation outstanding");
      end else begin
        t = bin_q.pop_front();
        if (longint'(bin) != t.expected) begin
          failures++;
          $display("FAIL binary result %h expected %h", bin, t.expected);
        end
        checks++;
        if (cycle - t.cycle_in != 3) begin
          failures++;
          $display("FAIL binary result after %0d cycles", cycle - t.cycle_in);
        end
      end
    end
  end

  initial begin
    bit prev_valid;
    rst_n = 1'b0;
    in_valid = 1'b0;
    op = OP_ADD;
    a = '0; b = '0; c = '0; d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    prev_valid = 1'b0;
    for (int i = 0; i < N_OPS; i++) begin
      longint ab, cd, e, m;
      txn_t t;
      // Idle cycles now and then.
      if ($urandom_range(3, 0) == 0) begin
        in_valid = 1'b0;
        n_idle++;
        prev_valid = 1'b0;
        @(posedge clk);
        #1;
      end
      in_valid = 1'b1;
      op = dcs_op_e'($urandom_range(1, 0));
      for (int k = 0; k < 3; k++) begin
        // Operands of small and full magnitude.
        if ($urandom_range(1, 0) == 0) begin
          a[k] = N'($urandom); b[k] = N'($urandom);
          c[k] = N'($urandom); d[k] = N'($urandom);
        end else begin
          a[k] = N'($urandom_range(255, 0)); b[k] = N'($urandom_range(255, 0));
          c[k] = N'($urandom_range(255, 0)); d[k] = N'($urandom_range(255, 0));
        end
      end
      m = 64'sd1 << N;
      ab = val(a) + val(b);
      cd = val(c) + val(d);
      if (op == OP_SUB) begin
        e = ab - cd;
        n_sub++;
        if (e < 0) n_neg++;
      end else begin
        e = ab + cd;
        n_add++;
      end
      if (e < 0 || e >= m) n_wrap++;
      e = e % m;
      if (e < 0) e += m;
      if (prev_valid) n_b2b++;
      prev_valid = 1'b1;
      t.expected = e;
      t.cycle_in = cycle + 1;  // sampled at the next rising edge
      sum_q.push_back(t);
      bin_q.push_back(t);
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (6) @(posedge clk);
    #1;
    checks++;
    if (sum_q.size() != 0 || bin_q.size() != 0) begin
      failures++;
      $display("FAIL %0d/%0d results never came out", sum_q.size(), bin_q.size());
    end
    $display("mechanisms: add=%0d sub=%0d back_to_back=%0d idle=%0d wrap=%0d negative=%0d fours=%0d",
             n_add, n_sub, n_b2b, n_idle, n_wrap, n_neg, n_fours);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_b2b == 0 || n_idle == 0 || n_wrap == 0 ||
        n_neg == 0 || n_fours == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
