// tb_ex3_addsub_digit: exhaustive check of the one-digit excess-3
// add/subtract cell. For every pair of decimal digits, both operations and
// both values of the true incoming decimal carry c, the cell gets
// carry_in = c ^ sel (as a chain delivers it) and must return the excess-3
// code of the decimal digit of a + b + c (add) or a + (9 - b) + c (subtract)
// and a carry out when that sum reaches 10.
module tb_ex3_addsub_digit;
  logic [3:0] a, b, y;
  logic       sel, carry_in, carry_out;
  int checks = 0, failures = 0;

  ex3_addsub_digit dut (.a(a), .b(b), .sel(sel), .carry_in(carry_in),
                        .y(y), .carry_out(carry_out));

  initial begin
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < 2; c++)
        for (int da = 0; da < 10; da++)
          for (int db = 0; db < 10; db++) begin
            int t;
            a        = 4'(da + 3);
            b        = 4'(db + 3);
            sel      = s[0];
            carry_in = c[0] ^ s[0];
            #1;
            t = (s == 0) ? da + db + c : da + (9 - db) + c;
            checks++;
            if (int'(y) != (t % 10) + 3 || carry_out != (t >= 10)) begin
              failures++;
              $display("FAIL sel=%0d a=%0d b=%0d c=%0d: y=%0d cout=%0d, expected digit %0d cout %0d",
                       s, da, db, c, int'(y) - 3, carry_out, t % 10, t >= 10);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
