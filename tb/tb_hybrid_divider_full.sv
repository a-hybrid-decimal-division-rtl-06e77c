// tb_hybrid_divider_full: the divider at its default size (N = 64 digits),
// running the operation-count workload of the published evaluation.
//
// Part 1 divides operands whose quotient is 9444...4 (n digits), the
// worst case of the hybrid algorithm, for every quotient length of the
// published table (1..10, 16, 32, 64) and checks that the operation count
// equals the table's hybrid column: 11, 17, 23, ..., 389. The divisor is
// D = 10^63 + 12345678901234567 and the dividend X = ceil(9444...4 * D /
// 10^(n-1)), both formed here with wide integers.
// Part 2 runs 20 random full-length divisions (n = 64) and checks that the
// mean cost lies between 3 and 4 operations per digit (3.5 is the expected
// average of the hybrid rule). Every result is checked
// against integer division of X * 10^(n-1) by D, and the latency against the
// operation count (one cycle per plain operation, one per digit, one load,
// one final correction).
module tb_hybrid_divider_full;
  localparam int N  = 64;
  localparam int IW = $clog2(N + 1);
  typedef logic signed [639:0] big_t;

  logic               clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0]      num_digits;
  logic [4*N-1:0]     dividend, divisor, quotient, remainder;
  logic               busy, done, overflow;
  logic [15:0]        op_count;
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_fix = 0, n_rest = 0;
  longint rand_ops = 0;

  hybrid_divider dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.state == hdiv_pkg::ST_FIX) n_fix++;
    if (dut.u_ctrl.state == hdiv_pkg::ST_RUN && dut.u_ctrl.changed && !dut.st.pre_ge_cur) n_rest++;
  end

  function automatic big_t pow10(int k);
    big_t r = 1;
    for (int i = 0; i < k; i++) r = r * 10;
    return r;
  endfunction

  function automatic logic [4*N-1:0] to_bcd(big_t v);
    logic [4*N-1:0] r;
    for (int i = 0; i < N; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic big_t from_bcd(logic [4*N-1:0] r);
    big_t v = 0;
    for (int i = N - 1; i >= 0; i--) v = v * 10 + big_t'(r[4*i +: 4]);
    return v;
  endfunction

  task automatic divide(big_t x, big_t d, int n, int exp_ops);
    longint t0, t1;
    big_t eq, er;
    int fix_before, rest_before;
    fix_before = n_fix; rest_before = n_rest;
    @(negedge clk);
    dividend = to_bcd(x); divisor = to_bcd(d); num_digits = IW'(n); start = 1;
    @(posedge clk); t0 = cycle;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    t1 = cycle;
    eq = (x * pow10(n - 1)) / d;
    er = (x * pow10(n - 1)) % d;
    checks += 3;
    if (overflow || from_bcd(quotient) != eq || from_bcd(remainder) != er) begin
      failures++;
      $display("FAIL n=%0d: quotient/remainder mismatch (overflow=%0d)", n, overflow);
    end
    if (exp_ops >= 0 && int'(op_count) != exp_ops) begin
      failures++;
      $display("FAIL n=%0d: %0d operations, table gives %0d", n, op_count, exp_ops);
    end
    // latency: load + plain operations + one decision cycle per digit + fix
    if (int'(t1 - t0) != 1 + int'(op_count) - (n_rest - rest_before) + n) begin
      failures++;
      $display("FAIL n=%0d: latency %0d cycles for %0d operations", n, t1 - t0, op_count);
    end
    $display("n=%0d operations=%0d cycles=%0d", n, op_count, t1 - t0);
  endtask

  int   tab_n   [13] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 16, 32, 64};
  int   tab_ops [13] = '{11, 17, 23, 29, 35, 41, 47, 53, 59, 65, 101, 197, 389};

  initial begin
    big_t d, x, qd;
    int   n;
    num_digits = '0; dividend = '0; divisor = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    d = pow10(63) + big_t'(64'd12345678901234567);
    for (int k = 0; k < 13; k++) begin
      n = tab_n[k];
      qd = 9;
      for (int i = 1; i < n; i++) qd = qd * 10 + 4;
      x = (qd * d + pow10(n - 1) - 1) / pow10(n - 1);
      divide(x, d, n, tab_ops[k]);
    end
    for (int k = 0; k < 20; k++) begin
      d = 0; x = 0;
      for (int i = 0; i < N; i++) d = d * 10 + big_t'($urandom) % big_t'(10);
      if (d == 0) d = 1;
      for (int i = 0; i < N; i++) x = x * 10 + big_t'($urandom) % big_t'(10);
      x = x % (10 * d < pow10(N) ? 10 * d : pow10(N));
      divide(x, d, N, -1);
      rand_ops += longint'(op_count);
    end
    // the hybrid rule averages about 3.5 operations per quotient digit
    $display("random 64-digit divisions: %0.2f operations per digit", real'(rand_ops) / (20.0 * N));
    checks++;
    if (real'(rand_ops) / (20.0 * N) < 3.0 || real'(rand_ops) / (20.0 * N) > 4.0) begin
      failures++;
      $display("FAIL mean operations per digit outside 3..4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
