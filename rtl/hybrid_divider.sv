// hybrid_divider: iterative decimal divider using the hybrid restoring /
// non-restoring algorithm on excess-3 coded digits.
//
// The dividend X is taken as the first partial remainder and the divisor D
// is repeatedly subtracted or added, one operation per clock cycle, to form
// n quotient digits (n = num_digits, 1..N). For every digit the controller
// picks restoring or non-restoring behaviour by comparing the magnitudes of
// the remainders on both sides of the sign change, which bounds the work to
// at most six operations for every digit after the first. The adder is a
// chain of one-digit excess-3 add/subtract cells with carry lookahead inside
// each digit.
//
// Result: quotient = floor(X * 10^(n-1) / D) and
// remainder = X * 10^(n-1) - quotient * D, both N BCD digits, valid when
// done pulses. X must be less than 10*D (first quotient digit 0..9);
// otherwise, and for D = 0, the divider stops early with overflow = 1.
// op_count reports the number of divisor additions and subtractions used.
//
// Handshake: pulse (or hold) start while busy is low; operands are sampled in
// that cycle. busy stays high until the division ends; done is a one-cycle
// pulse in the cycle after the last register update, with busy low. Latency
// from start to done is 2 + (plain operations) + (n - 1) + (1 if a final
// correction is needed) cycles; see hybrid_div_ctrl.
// Reset is asynchronous, active low. N defaults to 64 digits, the largest
// quotient length the algorithm was evaluated for.
module hybrid_divider
  import hdiv_pkg::*;
#(
  parameter int N = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [$clog2(N+1)-1:0] num_digits,
  input  logic [4*N-1:0]         dividend,
  input  logic [4*N-1:0]         divisor,
  output logic                   busy,
  output logic                   done,
  output logic                   overflow,
  output logic [4*N-1:0]         quotient,
  output logic [4*N-1:0]         remainder,
  output logic [15:0]            op_count
);
  dp_ctrl_t   ctl;
  dp_status_t st;

  hybrid_div_ctrl #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .num_digits(num_digits),
    .st(st), .ctl(ctl), .busy(busy), .done(done), .overflow(overflow),
    .op_count(op_count)
  );

  hybrid_div_datapath #(.N(N)) u_dp (
    .clk(clk), .rst_n(rst_n), .ctl(ctl), .dividend(dividend), .divisor(divisor),
    .st(st), .quotient(quotient), .remainder(remainder)
  );
endmodule
