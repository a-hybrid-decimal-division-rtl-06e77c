// tb_bcd_to_ex3: exhaustive check of the BCD to excess-3 converter against
// the excess-3 code table (digit d -> d + 3, codes 10..15 wrap modulo 16).
module tb_bcd_to_ex3;
  logic [3:0] bcd, ex3;
  int checks = 0, failures = 0;
  // excess-3 code table of the ten decimal digits
  logic [3:0] table_ex3 [10] = '{4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111,
                                 4'b1000, 4'b1001, 4'b1010, 4'b1011, 4'b1100};

  bcd_to_ex3 dut (.bcd(bcd), .ex3(ex3));

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [3:0] exp_v;
      bcd = 4'(v);
      #1;
      exp_v = (v < 10) ? table_ex3[v] : 4'(v + 3);
      checks++;
      if (ex3 !== exp_v) begin
        failures++;
        $display("FAIL bcd=%0d ex3=%b expected %b", v, ex3, exp_v);
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
