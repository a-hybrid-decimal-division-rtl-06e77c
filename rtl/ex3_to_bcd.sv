// ex3_to_bcd: excess-3 to BCD digit converter.
//
// Removes the bias of three from an excess-3 digit so that quotient and
// remainder leave the divider as weighted BCD. Codes 0..2 are not excess-3
// and wrap modulo 16 (this design's choice). Purely combinational.
module ex3_to_bcd (
  input  hdiv_pkg::ex3_t ex3,
  output hdiv_pkg::bcd_t bcd
);
  always_comb bcd = ex3 - 4'd3;
endmodule
