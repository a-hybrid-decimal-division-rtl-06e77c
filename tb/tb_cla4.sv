// tb_cla4: exhaustive check of the 4-bit carry lookahead adder against
// integer addition over all 512 operand and carry combinations.
module tb_cla4;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < 512; i++) begin
      int expv;
      {cin, a, b} = 9'(i);
      #1;
      expv = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} != 5'(expv)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got %0d expected %0d", a, b, cin, {cout, s}, expv);
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
