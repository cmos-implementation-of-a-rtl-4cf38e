// TAIL cell: digit position i (2 <= i <= n-1) of one divider slice.
// It forms digit i of -q*Y for the quotient digit coded by (add, u1, u2) and
// adds it to remainder digit r_(i+1) of the previous slice (the shift by 4
// of the recurrence is pure wiring).
//   UP_MUX : u1=0 selects digit i of Y (y_i), u1=1 digit i of 2Y, which is
//            (low bit of y_i, high bit of y_(i+1)).
//   LOW_MUX: (add,u2) = 00 -> 0, 01 -> complement, 10 -> true, 11 -> all ones,
//            i.e. my = add&x | u2&~x per bit.
// Subtracting uses the one's complement of the multiple; the missing +1 is
// injected at the least significant position by the slice (the u2 line).
// The multiplexer functions and the adder follow the document; the exact
// LOW_MUX code table is derived from its quotient-digit code table.
// Outputs: the r+ and r2 bits of new digit i and the weight-4 carry, which
// is the r++ bit of new digit i-1. Purely combinational.
module hr4_tail
  import hr4_pkg::*;
(
  input  logic [1:0] y,       // y_i: bit 1 weight 2, bit 0 weight 1
  input  logic       y_nxt2,  // high bit of y_(i+1) (0 for the last position)
  input  logic       add,
  input  logic       u1,
  input  logic       u2,
  input  sd_digit_t  r_in,    // r_(i+1) of the previous remainder
  output logic       s_p,     // r_i+ of the new remainder
  output logic       s_m2,    // r_i2 of the new remainder
  output logic       c4       // r_(i-1)++ of the new remainder
);
  logic x2, x1;   // UP_MUX outputs
  logic my2, my1; // LOW_MUX outputs

  always_comb begin
    x2  = u1 ? y[0]   : y[1];
    x1  = u1 ? y_nxt2 : y[0];
    my2 = (add & x2) | (u2 & ~x2);
    my1 = (add & x1) | (u2 & ~x1);
  end

  hr4_hyb_adder u_add (.my2(my2), .my1(my1), .r(r_in), .s_p(s_p), .s_m2(s_m2), .c4(c4));
endmodule
