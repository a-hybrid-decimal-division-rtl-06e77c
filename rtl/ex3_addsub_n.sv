// ex3_addsub_n: multi-digit excess-3 adder/subtractor.
//
// A chain of DIGITS one-digit cells (ex3_addsub_digit) computing a + b
// (sel = 0) or a - b (sel = 1) modulo 10^DIGITS; with ten's complement
// operands this is signed addition and subtraction. Digit 0 is bits [3:0].
// Each cell XORs its carry_in with sel, so the chain hands cell i the value
// carry_out(i-1) ^ sel: the cell's adder then sees the true decimal carry.
// Digit 0 gets carry_in = 0, which becomes the +1 of the ten's complement for
// a subtraction. The carry ripples from digit to digit (lookahead across
// digits is not part of the description); inside a digit it is looked ahead.
// carry_out is the raw carry of the top digit. Combinational.
module ex3_addsub_n #(
  parameter int DIGITS = 66
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                sel,
  output logic [4*DIGITS-1:0] y,
  output logic                carry_out
);
  logic [DIGITS-1:0] cout;
  logic [DIGITS-1:0] cin;

  assign cin[0] = 1'b0;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    if (i > 0) begin : g_link
      assign cin[i] = cout[i-1] ^ sel;
    end
    ex3_addsub_digit u_digit (
      .a(a[4*i +: 4]), .b(b[4*i +: 4]), .sel(sel), .carry_in(cin[i]),
      .y(y[4*i +: 4]), .carry_out(cout[i])
    );
  end

  assign carry_out = cout[DIGITS-1];
endmodule
