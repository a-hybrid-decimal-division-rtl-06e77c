// tb_ex3_to_bcd: exhaustive check of the excess-3 to BCD converter: every
// excess-3 code 3..12 must give its digit, other codes wrap modulo 16.
module tb_ex3_to_bcd;
  logic [3:0] ex3, bcd;
  int checks = 0, failures = 0;

  ex3_to_bcd dut (.ex3(ex3), .bcd(bcd));

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_v;
      ex3 = 4'(v);
      #1;
      exp_v = (v >= 3) ? v - 3 : v + 13;
      checks++;
      if (int'(bcd) != exp_v) begin
        failures++;
        $display("FAIL ex3=%b bcd=%0d expected %0d", ex3, bcd, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
