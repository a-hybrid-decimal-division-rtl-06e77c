// rem_compare: magnitude comparison of the previous and current partial
// remainders, the "Pre_R >= Cur_R" decision of the hybrid division flow.
//
// When it is consulted the two remainders lie on opposite sides of zero and
// differ by one divisor. The block forms S = Pre_R + Cur_R with an excess-3
// adder chain; |Pre_R| >= |Cur_R| holds when S is zero or has the sign of
// Pre_R. Operands are DIGITS-digit excess-3 ten's complement numbers; the
// sign of one is bit 3 of its top digit. The adder-based method is this
// design's choice; the description gives only the decision. Combinational.
module rem_compare #(
  parameter int DIGITS = 66
) (
  input  logic [4*DIGITS-1:0] pre_r,
  input  logic [4*DIGITS-1:0] cur_r,
  output logic                pre_ge_cur
);
  logic [4*DIGITS-1:0] sum;
  logic                unused_carry;
  logic                sum_zero, sum_neg, pre_neg;

  ex3_addsub_n #(.DIGITS(DIGITS)) u_sum (
    .a(pre_r), .b(cur_r), .sel(1'b0), .y(sum), .carry_out(unused_carry)
  );

  always_comb begin
    sum_zero = 1'b1;
    for (int i = 0; i < DIGITS; i++)
      if (sum[4*i +: 4] != hdiv_pkg::EX3_ZERO) sum_zero = 1'b0;
    sum_neg    = sum[4*DIGITS-1];
    pre_neg    = pre_r[4*DIGITS-1];
    pre_ge_cur = sum_zero || (sum_neg == pre_neg);
  end
endmodule
