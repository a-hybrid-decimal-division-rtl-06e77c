// ex3_addsub_digit: one-digit excess-3 adder/subtractor cell.
//
// Adds (sel = 0) or subtracts (sel = 1) two excess-3 digits. For a
// subtraction the addend is XORed with sel, which turns an excess-3 digit
// into the excess-3 code of its 9's complement. The incoming carry is also
// XORed with sel, so the lowest digit of a subtraction gets the +1 of the
// ten's complement. A 4-bit carry lookahead adder (cla4) forms
// X = a + b' + cin. Because both operands carry a bias of three, X carries a
// bias of six: with no carry out the result is X - 3, with a carry out the
// 4-bit wrap has removed 16 = 10 + 6 and the result is X + 3. Four
// correction units (Add C=0, Add C=1, Sub C=0, Sub C=1) and a selector on
// {sel, carry_out} produce the excess-3 result, as in the block diagram of
// the cell.
//
// Departure from the written description: its subtraction equations also
// add one when the lower digit produced a carry. Here that carry already
// enters the adder through carry_in, so the subtraction units apply the same
// -3 / +3 as the addition units.
//
// Interface: carry_out is the raw adder carry (decimal carry for additions,
// "no borrow" for subtractions). A chain passes carry_out ^ sel into the
// next cell's carry_in (see ex3_addsub_n). Combinational.
module ex3_addsub_digit (
  input  hdiv_pkg::ex3_t a,
  input  hdiv_pkg::ex3_t b,
  input  logic           sel,
  input  logic           carry_in,
  output hdiv_pkg::ex3_t y,
  output logic           carry_out
);
  logic [3:0] b_c, x;
  logic [3:0] add_c0, add_c1, sub_c0, sub_c1;

  cla4 u_cla (.a(a), .b(b_c), .cin(carry_in ^ sel), .s(x), .cout(carry_out));

  always_comb begin
    b_c    = b ^ {4{sel}};
    add_c0 = x - 4'd3;
    add_c1 = x + 4'd3;
    sub_c0 = x - 4'd3;
    sub_c1 = x + 4'd3;
    unique case ({sel, carry_out})
      2'b00:   y = add_c0;
      2'b01:   y = add_c1;
      2'b10:   y = sub_c0;
      default: y = sub_c1;
    endcase
  end
endmodule
