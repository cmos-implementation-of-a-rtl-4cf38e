// HEAD cell of a divider slice.
// Holds the quotient selector and one hybrid radix-4 adder for digit
// position 1. At that position the divisor digit is 0 for both Y and 2Y
// (the scaled divisor is 1.0(0|1)... in radix 4), so LOW_MUX reduces to
// my = u2 on both bits: the one's complement of a zero digit when the slice
// subtracts or produces minus zero. The adder adds this to r2 of the previous
// remainder; its weight-4 carry, and everything at weight 1, cancel by the
// choice of q and are dropped. The r++ bit of the new digit 1 comes from the
// first TAIL cell. Purely combinational.
module hr4_head
  import hr4_pkg::*;
(
  input  sd_digit_t r1,    // leading digit of R(j)
  input  sd_digit_t r2,    // second digit of R(j)
  output qdigit_t   q,     // q(j+1)
  output logic      s_p,   // r1+ of R(j+1)
  output logic      s_m2   // r1(2) of R(j+1)
);
  logic c4_unused;

  hr4_qsel      u_sel (.r1(r1), .r2(r2), .q(q));
  hr4_hyb_adder u_add (.my2(q.u2), .my1(q.u2), .r(r2),
                       .s_p(s_p), .s_m2(s_m2), .c4(c4_unused));
endmodule
