// Hybrid radix-4 divider, combinational, N-1 quotient digits (N = 9 gives
// 8 radix-4 digits, 16 bits of quotient).
// The dividend X is a fraction in [-1/2, 1/2) and the divisor Y a
// normalized mantissa in [1, 2). Both are first multiplied by a constant K
// (range reduction) so that the divisor falls in [1, 9/8); the scaled
// dividend is recoded to signed radix-4 digits. A stack of N-1 slices then
// runs the recurrence R(j+1) = 4*R(j) - q(j+1)*K*Y with quotient digits in
// {-2..2} chosen from the two leading remainder digits only, while
// on-the-fly conversion turns the digits into a two's complement quotient.
// Results (all combinational, valid one array delay after the inputs):
//   quo    : Q in units of 4^-(N-1), two's complement, 2N-1 bits
//   q_dig  : the quotient digits in the (add, u1, u2) code
//   rem    : final remainder digits, K*X = Q*K*Y + rem*4^-(N-1)*K*Y exactly
//   xs, ys : the scaled operands K*X and K*Y (x and y formats)
module hr4_divider_top
  import hr4_pkg::*;
#(
  parameter int unsigned N = 9
) (
  input  logic [2*N-3:0]    x,     // value x * 2^-(2N-2), two's complement
  input  logic [2*N-2:0]    y,     // value y * 2^-(2N-2), top bit set
  output qdigit_t [N-1:1]   q_dig,
  output logic [2*N-2:0]    quo,
  output sd_digit_t [N-1:1] rem,
  output logic [2*N-3:0]    xs,
  output logic [2*N-2:0]    ys
);
  sd_digit_t [N-1:1] x_sd;
  logic [N-1:2][1:0] y_dig;

  hr4_prescale #(.N(N)) u_pre (.x(x), .y(y), .xs(xs), .ys(ys), .x_sd(x_sd), .y_dig(y_dig));
  hr4_array    #(.N(N)) u_arr (.x(x_sd), .y(y_dig), .q(q_dig), .quo(quo), .rem(rem));
endmodule
