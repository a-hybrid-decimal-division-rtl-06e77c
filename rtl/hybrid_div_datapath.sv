// hybrid_div_datapath: registers and arithmetic of the hybrid decimal divider.
//
// Holds the current partial remainder Cur_R, the previous one Pre_R and the
// divisor D as W = N+2 digit excess-3 ten's complement numbers, and the
// quotient Q as an N+1 digit excess-3 counter. Per cycle, under the command
// word ctl from the controller:
//   load     Cur_R <= dividend, D <= divisor (both through BCD to excess-3
//            converters), Q <= 0, Pre_R <= 0. This is the load selector of
//            the one-digit cell diagram: the adder result otherwise feeds
//            back into the same register.
//   arith    Cur_R <= Cur_R - D and Q <= Q + 1 (sub = 1), or
//            Cur_R <= Cur_R + D and Q <= Q - 1 (sub = 0).
//   save_pre Pre_R <= Cur_R (the value before this cycle's operation).
//   shift    Cur_R and Q move one digit left (after arith, if both are set);
//            a zero digit enters at the bottom.
// The remainder adder is an N+2 digit chain of excess-3 add/subtract cells;
// the quotient counter uses an N+1 digit chain with a constant 1. Two extra
// remainder digits cover |Cur_R| < 10*D plus a sign; the extra quotient
// digit holds the transient value 10^n of an overshooting last digit.
// The carry out of the remainder chain is left unused: the sign of a
// remainder is read from its top digit instead.
// Status (all from registers): signs of Cur_R and Pre_R, |Pre_R| >= |Cur_R|
// and Q >= 10. Outputs quotient and remainder are the low N digits of Q and
// Cur_R converted back to BCD; they are final when the controller says so.
// The register organisation and number format are this design's choices;
// the operations are those of the hybrid division flow.
module hybrid_div_datapath
  import hdiv_pkg::*;
#(
  parameter int N = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dp_ctrl_t       ctl,
  input  logic [4*N-1:0] dividend,
  input  logic [4*N-1:0] divisor,
  output dp_status_t     st,
  output logic [4*N-1:0] quotient,
  output logic [4*N-1:0] remainder
);
  localparam int W  = N + 2;   // remainder digits
  localparam int QD = N + 1;   // quotient digits

  logic [4*W-1:0]  cur_r, pre_r, d_r;
  logic [4*QD-1:0] q_r;
  logic [4*W-1:0]  cur_n, p_res;
  logic [4*QD-1:0] q_n, q_res, q_one;
  logic [4*N-1:0]  x_ex3, d_ex3;
  logic            p_cout, q_cout;
  logic            q_hi_zero;

  // Input converters (BCD to excess-3) and output converters.
  for (genvar i = 0; i < N; i++) begin : g_conv
    bcd_to_ex3 u_x (.bcd(dividend[4*i +: 4]), .ex3(x_ex3[4*i +: 4]));
    bcd_to_ex3 u_d (.bcd(divisor[4*i +: 4]),  .ex3(d_ex3[4*i +: 4]));
    ex3_to_bcd u_q (.ex3(q_r[4*i +: 4]),   .bcd(quotient[4*i +: 4]));
    ex3_to_bcd u_r (.ex3(cur_r[4*i +: 4]), .bcd(remainder[4*i +: 4]));
  end

  always_comb begin
    q_one = {{(QD-1){EX3_ZERO}}, EX3_ONE};
  end

  // Remainder: Cur_R -/+ D.
  ex3_addsub_n #(.DIGITS(W)) u_rem_addsub (
    .a(cur_r), .b(d_r), .sel(ctl.sub), .y(p_res), .carry_out(p_cout)
  );

  // Quotient counter: Q +/- 1 (add when the remainder is reduced).
  ex3_addsub_n #(.DIGITS(QD)) u_quo_count (
    .a(q_r), .b(q_one), .sel(~ctl.sub), .y(q_res), .carry_out(q_cout)
  );

  // |Pre_R| >= |Cur_R|
  rem_compare #(.DIGITS(W)) u_cmp (
    .pre_r(pre_r), .cur_r(cur_r), .pre_ge_cur(st.pre_ge_cur)
  );

  always_comb begin
    cur_n = ctl.arith ? p_res : cur_r;
    q_n   = ctl.arith ? q_res : q_r;
    if (ctl.shift) begin
      cur_n = {cur_n[4*W-5:0], EX3_ZERO};
      q_n   = {q_n[4*QD-5:0], EX3_ZERO};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_r <= {W{EX3_ZERO}};
      pre_r <= {W{EX3_ZERO}};
      d_r   <= {W{EX3_ZERO}};
      q_r   <= {QD{EX3_ZERO}};
    end else if (ctl.load) begin
      cur_r <= {EX3_ZERO, EX3_ZERO, x_ex3};
      pre_r <= {W{EX3_ZERO}};
      d_r   <= {EX3_ZERO, EX3_ZERO, d_ex3};
      q_r   <= {QD{EX3_ZERO}};
    end else begin
      cur_r <= cur_n;
      q_r   <= q_n;
      if (ctl.save_pre) pre_r <= cur_r;
    end
  end

  always_comb begin
    st.cur_neg = cur_r[4*W-1];
    st.pre_neg = pre_r[4*W-1];
    q_hi_zero  = 1'b1;
    for (int i = 1; i < QD; i++)
      if (q_r[4*i +: 4] != EX3_ZERO) q_hi_zero = 1'b0;
    st.q_ge10  = !q_hi_zero;
  end

  // The quotient counter never leaves 0 .. 10^(N+1)-1: an increment gives no
  // carry out of the top digit, a decrement no borrow.
  a_q_range: assert property (@(posedge clk) disable iff (!rst_n)
                              (ctl.arith && !ctl.load) |-> (q_cout == !ctl.sub));
endmodule
