// tb_rem_compare: checks |Pre_R| >= |Cur_R| at 6 digits for remainder pairs
// on opposite sides of zero (the only case the divider asks about), written
// as excess-3 ten's complement numbers, against an integer comparison.
module tb_rem_compare;
  localparam int D = 6;
  localparam longint MOD = 1000000;
  logic [4*D-1:0] pre_r, cur_r;
  logic           pre_ge_cur;
  int checks = 0, failures = 0;

  rem_compare #(.DIGITS(D)) dut (.pre_r(pre_r), .cur_r(cur_r), .pre_ge_cur(pre_ge_cur));

  // signed value -> ten's complement excess-3
  function automatic logic [4*D-1:0] to_ex3(longint v);
    logic [4*D-1:0] r;
    if (v < 0) v = v + MOD;
    for (int i = 0; i < D; i++) begin
      r[4*i +: 4] = 4'(v % 10 + 3);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic check(longint p, longint c);
    bit expv;
    pre_r = to_ex3(p); cur_r = to_ex3(c);
    #1;
    expv = ((p < 0) ? -p : p) >= ((c < 0) ? -c : c);
    checks++;
    if (pre_ge_cur != expv) begin
      failures++;
      $display("FAIL pre=%0d cur=%0d got %0d expected %0d", p, c, pre_ge_cur, expv);
    end
  endtask

  initial begin
    check(0, -1); check(1, -1); check(-1, 1); check(-1, 0); check(5, -6); check(-5, 6);
    check(49999, -50000); check(-49999, 50000); check(400000, -400000);
    for (int i = 0; i < 2000; i++) begin
      longint dv, p;
      dv = longint'($urandom) % longint'(99999) + 1;            // divisor
      p  = longint'($urandom) % dv;                   // 0 <= p < dv
      if ($urandom % 2 == 1) check(p, p - dv);             // subtraction crossed zero
      else              check(p - dv, p);             // addition crossed zero
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
