// tb_integer7: 7-digit integer division on the hybrid divider (N = 16).
//
// Workload: dividends 1..9,999,999 and divisors 1..dividend. An integer
// division X / D with a k = 7 digit X is run by passing the divisor as
// D * 10^6 and n = 7, so that X < 10 * D * 10^6 holds for every D >= 1 and
// the quotient is floor(X / D), the remainder (X mod D) * 10^6.
// All pairs with X <= 250 are run, then random pairs over the full range.
// Each result is checked against integer division, and each operation count
// against the worst-case bound 6n + 5 = 47. The largest and the mean
// operation count are printed.
module tb_integer7;
  localparam int N  = 16;
  localparam int IW = $clog2(N + 1);
  localparam int K  = 7;

  logic               clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0]      num_digits;
  logic [4*N-1:0]     dividend, divisor, quotient, remainder;
  logic               busy, done, overflow;
  logic [15:0]        op_count;
  int checks = 0, failures = 0;
  longint total_ops = 0, runs = 0;
  int max_ops = 0;

  hybrid_divider #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [4*N-1:0] to_bcd(longint v);
    logic [4*N-1:0] r;
    for (int i = 0; i < N; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic longint from_bcd(logic [4*N-1:0] r);
    longint v = 0;
    for (int i = N - 1; i >= 0; i--) v = v * 10 + longint'(r[4*i +: 4]);
    return v;
  endfunction

  task automatic divide(longint x, longint d);
    @(negedge clk);
    dividend = to_bcd(x); divisor = to_bcd(d * 1000000); num_digits = IW'(K); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (overflow || from_bcd(quotient) != x / d || from_bcd(remainder) != (x % d) * 1000000
        || int'(op_count) > 6 * K + 5) begin
      failures++;
      $display("FAIL %0d / %0d: Q=%0d R=%0d ops=%0d ovf=%0d", x, d, from_bcd(quotient),
               from_bcd(remainder), op_count, overflow);
    end
    total_ops += longint'(op_count);
    runs++;
    if (int'(op_count) > max_ops) max_ops = int'(op_count);
  endtask

  initial begin
    num_digits = '0; dividend = '0; divisor = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (longint x = 1; x <= 250; x++)
      for (longint d = 1; d <= x; d++)
        divide(x, d);
    for (int k = 0; k < 150000; k++) begin
      longint x, d;
      x = longint'($urandom) % longint'(9999999) + 1;
      d = longint'($urandom) % x + 1;
      divide(x, d);
    end
    divide(9999999, 1);
    $display("divisions=%0d max operations=%0d mean operations=%0.2f", runs, max_ops,
             real'(total_ops) / real'(runs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
