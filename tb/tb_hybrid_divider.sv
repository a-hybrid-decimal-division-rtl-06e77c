// tb_hybrid_divider: end-to-end test of the hybrid decimal divider at N = 8.
//
// Each division is checked against a reference computed here with integer
// arithmetic: quotient floor(X*10^(n-1)/D), remainder, overflow for
// X >= 10*D, the exact number of add/subtract operations and the cycle
// latency predicted by a step-by-step integer model of the hybrid rule, and
// the worst-case bound 6n + 5 operations of the published table. It also
// counts how often each mechanism of the algorithm occurred (subtraction
// runs, addition runs, non-restoring digit ends, restoring digit ends, final
// sign correction, overflow abort, negative remainder carried into the next
// digit) and counts a failure for any that never did.
module tb_hybrid_divider;
  import hdiv_pkg::*;
  localparam int N  = 8;
  localparam int IW = $clog2(N + 1);
  typedef logic signed [127:0] big_t;

  logic               clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0]      num_digits;
  logic [4*N-1:0]     dividend, divisor, quotient, remainder;
  logic               busy, done, overflow;
  logic [15:0]        op_count;
  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_sub = 0, n_add = 0, n_nonrest = 0, n_rest = 0, n_fix = 0, n_ovf = 0, n_negcarry = 0;

  hybrid_divider #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (dut.ctl.arith && dut.ctl.save_pre && dut.ctl.sub)  n_sub++;
    if (dut.ctl.arith && dut.ctl.save_pre && !dut.ctl.sub) n_add++;
    if (dut.u_ctrl.state == ST_RUN && dut.u_ctrl.changed) begin
      if (dut.st.pre_ge_cur) n_nonrest++; else n_rest++;
      if (dut.ctl.shift && dut.st.pre_ge_cur && dut.st.cur_neg) n_negcarry++;
    end
    if (dut.u_ctrl.state == ST_FIX) n_fix++;
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

  // Integer model of the hybrid rule: operation count and latency.
  task automatic model(big_t x, big_t d, int n, output int ops, output int cyc, output bit ovf);
    big_t p = x, q = 0, pre = 0;
    int plain = 0, fix = 0;
    ops = 0; ovf = 0;
    for (int i = 0; i < n; i++) begin
      bit first = 1;
      if (i > 0) begin p = p * 10; q = q * 10; end
      forever begin
        if (!first && ((pre < 0) != (p < 0))) begin
          if (((pre < 0) ? -pre : pre) < ((p < 0) ? -p : p)) begin
            if (p < 0) begin p = p + d; q = q - 1; end
            else       begin p = p - d; q = q + 1; end
            ops++;
          end
          break;
        end
        if (i == 0 && p >= 0 && q >= 10) begin ovf = 1; cyc = plain + 2; return; end
        pre = p;
        if (p < 0) begin p = p + d; q = q - 1; end
        else       begin p = p - d; q = q + 1; end
        ops++; plain++; first = 0;
      end
    end
    if (p < 0) begin p = p + d; q = q - 1; ops++; fix = 1; end
    cyc = 1 + plain + n + fix;
  endtask

  task automatic divide(big_t x, big_t d, int n);
    longint t0, t1;
    int exp_ops, exp_cyc;
    bit exp_ovf;
    big_t exp_q, exp_r;
    @(negedge clk);
    dividend = to_bcd(x); divisor = to_bcd(d); num_digits = IW'(n); start = 1;
    @(posedge clk); t0 = cycle;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    t1 = cycle;
    if (n == 0 || n > N) n = N;    // the divider reads such n as N
    model(x, d, n, exp_ops, exp_cyc, exp_ovf);
    checks++;
    if (overflow != exp_ovf) begin
      failures++; $display("FAIL overflow X=%0d D=%0d n=%0d got %0d", x, d, n, overflow);
    end
    if (!exp_ovf) begin
      exp_q = (x * pow10(n - 1)) / d;
      exp_r = (x * pow10(n - 1)) % d;
      checks += 4;
      if (from_bcd(quotient) != exp_q || from_bcd(remainder) != exp_r) begin
        failures++; $display("FAIL X=%0d D=%0d n=%0d: Q=%0d R=%0d expected %0d %0d",
                             x, d, n, from_bcd(quotient), from_bcd(remainder), exp_q, exp_r);
      end
      if (int'(op_count) != exp_ops) begin
        failures++; $display("FAIL ops X=%0d D=%0d n=%0d: %0d expected %0d", x, d, n, op_count, exp_ops);
      end
      if (int'(op_count) > 6 * n + 5) begin
        failures++; $display("FAIL ops X=%0d D=%0d n=%0d: %0d above bound %0d", x, d, n, op_count, 6*n+5);
      end
      if (int'(t1 - t0) != exp_cyc) begin
        failures++; $display("FAIL latency X=%0d D=%0d n=%0d: %0d cycles expected %0d", x, d, n, t1 - t0, exp_cyc);
      end
    end
  endtask

  initial begin
    num_digits = '0; dividend = '0; divisor = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed cases
    divide(9, 1, 1);          // single digit 9: 11 operations
    divide(0, 1, 8);
    divide(1, 3, 8);          // 0.3333333
    divide(2, 3, 8);          // 0.6666666
    divide(99999999, 10000000, 8);
    divide(94444511, 10000007, 8);   // quotient 94444444: worst-case pattern
    divide(10, 1, 3);         // X >= 10*D: overflow
    divide(5, 0, 4);          // D = 0: overflow
    divide(12345678, 87654321, 8);
    divide(1, 7, 0);          // n = 0 is read as N
    // random cases with X < 10*D
    for (int k = 0; k < 400; k++) begin
      big_t d, x;
      int n;
      d = big_t'($urandom) % big_t'(99999999) + 1;
      x = big_t'({$urandom, $urandom}) % ((10 * d < pow10(N)) ? 10 * d : pow10(N));
      n = int'($urandom % N) + 1;
      divide(x, d, n);
    end
    checks += 7;
    if (n_sub == 0)      begin failures++; $display("FAIL no subtraction run"); end
    if (n_add == 0)      begin failures++; $display("FAIL no addition run"); end
    if (n_nonrest == 0)  begin failures++; $display("FAIL no non-restoring digit"); end
    if (n_rest == 0)     begin failures++; $display("FAIL no restoring digit"); end
    if (n_fix == 0)      begin failures++; $display("FAIL no final correction"); end
    if (n_negcarry == 0) begin failures++; $display("FAIL no negative remainder carried"); end
    n_ovf = 0;
    divide(20, 2, 2);
    if (!overflow) begin failures++; $display("FAIL no overflow abort"); end else n_ovf++;
    $display("mechanisms: sub=%0d add=%0d nonrestoring=%0d restoring=%0d fix=%0d negcarry=%0d overflow=%0d",
             n_sub, n_add, n_nonrest, n_rest, n_fix, n_negcarry, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
