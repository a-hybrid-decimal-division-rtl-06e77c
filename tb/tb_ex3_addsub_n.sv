// tb_ex3_addsub_n: random and corner checks of the multi-digit excess-3
// adder/subtractor at 6 digits: results must equal (a + b) mod 10^6 and
// (a - b) mod 10^6 computed with integers, and carry_out must equal the
// decimal carry (a + b >= 10^6, or a >= b for a subtraction).
module tb_ex3_addsub_n;
  localparam int D = 6;
  localparam longint MOD = 1000000;
  logic [4*D-1:0] a, b, y;
  logic           sel, carry_out;
  int checks = 0, failures = 0;

  ex3_addsub_n #(.DIGITS(D)) dut (.a(a), .b(b), .sel(sel), .y(y), .carry_out(carry_out));

  function automatic logic [4*D-1:0] to_ex3(longint v);
    logic [4*D-1:0] r;
    for (int i = 0; i < D; i++) begin
      r[4*i +: 4] = 4'(v % 10 + 3);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic longint from_ex3(logic [4*D-1:0] r);
    longint v = 0;
    for (int i = D - 1; i >= 0; i--) v = v * 10 + longint'(r[4*i +: 4]) - 3;
    return v;
  endfunction

  task automatic check(longint va, longint vb, bit s);
    longint expv;
    bit     expc;
    a = to_ex3(va); b = to_ex3(vb); sel = s;
    #1;
    if (!s) begin expv = (va + vb) % MOD;       expc = (va + vb) >= MOD; end
    else    begin expv = (va - vb + MOD) % MOD; expc = va >= vb;         end
    checks++;
    if (from_ex3(y) != expv || carry_out != expc) begin
      failures++;
      $display("FAIL %0d %s %0d = %0d (cout %0d), expected %0d (cout %0d)",
               va, s ? "-" : "+", vb, from_ex3(y), carry_out, expv, expc);
    end
  endtask

  initial begin
    check(0, 0, 0); check(0, 0, 1); check(999999, 1, 0); check(0, 1, 1);
    check(123456, 123456, 1); check(500000, 499999, 1); check(999999, 999999, 0);
    for (int i = 0; i < 2000; i++)
      check(longint'($urandom) % longint'(MOD), longint'($urandom) % longint'(MOD), 1'($urandom));
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
