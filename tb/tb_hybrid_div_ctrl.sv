// tb_hybrid_div_ctrl: tests the controller on its own at N = 8.
//
// The testbench holds an integer stand-in for the datapath: it applies each
// command word (load, add/subtract, save previous remainder, shift) to signed
// integers and feeds back the status flags. A correct controller must then
// leave quotient floor(X*10^(n-1)/D) and the matching remainder in that
// stand-in, flag overflow exactly when X >= 10*D, report the operation count
// of the hybrid rule (checked against the published worst-case bound
// 6n + 5), and keep busy/done consistent.
module tb_hybrid_div_ctrl;
  import hdiv_pkg::*;
  localparam int N  = 8;
  localparam int IW = $clog2(N + 1);

  logic          clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0] num_digits;
  dp_status_t    st;
  dp_ctrl_t      ctl;
  logic          busy, done, overflow;
  logic [15:0]   op_count;
  int checks = 0, failures = 0;

  // datapath stand-in
  longint cur_v, pre_v, q_v, d_v, x_in, d_in;

  hybrid_div_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    st.cur_neg    = cur_v < 0;
    st.pre_neg    = pre_v < 0;
    st.pre_ge_cur = ((pre_v < 0) ? -pre_v : pre_v) >= ((cur_v < 0) ? -cur_v : cur_v);
    st.q_ge10     = q_v >= 10;
  end

  always @(posedge clk) begin
    longint c, q;
    if (ctl.load) begin
      cur_v <= x_in; pre_v <= 0; q_v <= 0; d_v <= d_in;
    end else begin
      c = cur_v; q = q_v;
      if (ctl.arith) begin
        if (ctl.sub) begin c = c - d_v; q = q + 1; end
        else         begin c = c + d_v; q = q - 1; end
      end
      if (ctl.shift) begin c = c * 10; q = q * 10; end
      if (ctl.save_pre) pre_v <= cur_v;
      cur_v <= c; q_v <= q;
    end
  end

  task automatic divide(longint x, longint d, int n);
    longint p10 = 1;
    bit exp_ovf;
    for (int i = 1; i < n; i++) p10 = p10 * 10;
    @(negedge clk);
    x_in = x; d_in = d; num_digits = IW'(n); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not raised"); end
    while (!done) @(negedge clk);
    exp_ovf = (x >= 10 * d);
    checks++;
    if (overflow != exp_ovf || busy) begin
      failures++; $display("FAIL X=%0d D=%0d overflow=%0d busy=%0d", x, d, overflow, busy);
    end
    if (!exp_ovf) begin
      checks += 2;
      if (q_v != (x * p10) / d || cur_v != (x * p10) % d) begin
        failures++; $display("FAIL X=%0d D=%0d n=%0d: Q=%0d R=%0d", x, d, n, q_v, cur_v);
      end
      if (int'(op_count) > 6 * n + 5 || int'(op_count) < n) begin
        failures++; $display("FAIL X=%0d D=%0d n=%0d: %0d operations", x, d, n, op_count);
      end
    end
  endtask

  initial begin
    num_digits = '0; x_in = 0; d_in = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    divide(9, 1, 1);
    checks++;
    if (op_count != 11) begin failures++; $display("FAIL 9/1 used %0d operations, expected 11", op_count); end
    divide(94444511, 10000007, 8);
    checks++;
    if (op_count != 53) begin failures++; $display("FAIL 94444511/10000007 used %0d operations, expected 53", op_count); end
    divide(10, 1, 4);
    divide(3, 0, 4);
    for (int k = 0; k < 300; k++) begin
      longint d, x;
      d = longint'($urandom) % longint'(9999999) + 1;
      x = longint'($urandom) % (10 * d);
      if (x >= 100000000) x = x % 100000000;
      divide(x, d, int'($urandom % N) + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
