// tb_hybrid_div_datapath: tests the divider datapath at N = 4 with random
// command words and an integer model of its registers.
//
// After a load of random operands the testbench issues random mixes of
// add/subtract, save-previous and shift commands (keeping the model within
// the register range) and checks after every cycle: the signs of Cur_R and
// Pre_R, the |Pre_R| >= |Cur_R| flag when the two have opposite signs, the
// quotient >= 10 flag, and the BCD quotient and remainder outputs, which must
// equal the low N digits of the model values (ten's complement for negative
// ones).
module tb_hybrid_div_datapath;
  import hdiv_pkg::*;
  localparam int N = 4;
  localparam longint MODN = 10000;        // 10^N
  localparam longint LIM  = 500000;       // |Cur_R| bound, half of 10^(N+2)

  logic           clk = 0, rst_n = 0;
  dp_ctrl_t       ctl;
  logic [4*N-1:0] dividend, divisor, quotient, remainder;
  dp_status_t     st;
  int checks = 0, failures = 0;
  longint cur_v, pre_v, q_v, d_v;

  hybrid_div_datapath #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [4*N-1:0] to_bcd(longint v);
    logic [4*N-1:0] r;
    v = ((v % MODN) + MODN) % MODN;
    for (int i = 0; i < N; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic step(dp_ctrl_t c);
    longint nc, nq;
    @(negedge clk);
    ctl = c;
    nc = cur_v; nq = q_v;
    if (c.load) begin
      nc = 0;
      for (int i = N - 1; i >= 0; i--) nc = nc * 10 + longint'(dividend[4*i +: 4]);
      d_v = 0;
      for (int i = N - 1; i >= 0; i--) d_v = d_v * 10 + longint'(divisor[4*i +: 4]);
      pre_v = 0; nq = 0;
    end else begin
      if (c.arith) begin
        if (c.sub) begin nc = nc - d_v; nq = nq + 1; end
        else       begin nc = nc + d_v; nq = nq - 1; end
      end
      if (c.shift) begin nc = nc * 10; nq = nq * 10; end
      if (c.save_pre) pre_v = cur_v;
    end
    cur_v = nc; q_v = nq;
    @(posedge clk); #1;
    ctl = '0;
    checks += 4;
    if (st.cur_neg != (cur_v < 0) || st.pre_neg != (pre_v < 0)) begin
      failures++; $display("FAIL signs cur=%0d pre=%0d flags %0d %0d", cur_v, pre_v, st.cur_neg, st.pre_neg);
    end
    if ((cur_v < 0) != (pre_v < 0) &&
        st.pre_ge_cur != (((pre_v < 0) ? -pre_v : pre_v) >= ((cur_v < 0) ? -cur_v : cur_v))) begin
      failures++; $display("FAIL compare cur=%0d pre=%0d flag %0d", cur_v, pre_v, st.pre_ge_cur);
    end
    if (st.q_ge10 != (q_v >= 10)) begin
      failures++; $display("FAIL q_ge10 q=%0d flag %0d", q_v, st.q_ge10);
    end
    if (quotient != to_bcd(q_v) || remainder != to_bcd(cur_v)) begin
      failures++; $display("FAIL outputs q=%0d cur=%0d got %h %h", q_v, cur_v, quotient, remainder);
    end
  endtask

  initial begin
    dp_ctrl_t c;
    ctl = '0; dividend = '0; divisor = '0;
    cur_v = 0; pre_v = 0; q_v = 0; d_v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 200; run++) begin
      dividend = to_bcd(longint'($urandom) % longint'(MODN));
      divisor  = to_bcd(longint'($urandom) % longint'(MODN) + 1);
      c = '0; c.load = 1;
      step(c);
      for (int k = 0; k < 20; k++) begin
        c = '0;
        c.arith    = 1'($urandom);
        c.sub      = (cur_v >= 0);            // move toward zero, as the divider does
        c.save_pre = 1'($urandom);
        c.shift    = ($urandom % 4 == 0) && (cur_v * 10 < LIM / 2) && (cur_v * 10 > -LIM / 2)
                     && (q_v < 1000);
        if (c.arith && !c.sub && q_v == 0) c.arith = 0;   // quotient stays >= 0
        step(c);
      end
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
