// bcd_to_ex3: BCD to excess-3 digit converter.
//
// The excess-3 code of a decimal digit is the digit plus three. This is the
// converter placed in front of each operand of the one-digit add/subtract
// cell (the two input converters of the cell's block diagram). Codes 10..15
// are not BCD and simply wrap modulo 16, a choice of this design.
// Purely combinational, no clock.
module bcd_to_ex3 (
  input  hdiv_pkg::bcd_t bcd,
  output hdiv_pkg::ex3_t ex3
);
  always_comb ex3 = bcd + 4'd3;
endmodule
