// Shared types of the hybrid radix-4 divider.
//
// Remainder (and dividend) digits take values in {-2,-1,0,1,2} and are held
// in three wires: value = p + pp - 2*m2 (the r+, r++ and r2 bits of each
// digit). Zero, +1 and -1 each have two codes; +2 (p=pp=1, m2=0) and -2
// (m2=1, p=pp=0) have one. Divisor digits are conventional radix-4 digits
// {0,1,2,3} held as two bits, bit 1 of weight 2 and bit 0 of weight 1.
// Quotient digits use a sign-and-magnitude style code (add, u1, u2):
//   add=0: u2=0 -> 0,  u2=1 -> +1 (u1=0) or +2 (u1=1)
//   add=1: u2=0 -> -1 (u1=0) or -2 (u1=1),  u2=1 -> "minus zero"
// "Minus zero" adds the all-ones pattern plus one LSB, i.e. zero, but with a
// different split of the leading digit, which the quotient selector uses.
package hr4_pkg;

  typedef struct packed {
    logic m2;  // weight -2
    logic pp;  // weight +1 (r++), driven by the carry of the next lower position
    logic p;   // weight +1 (r+)
  } sd_digit_t;

  typedef struct packed {
    logic add;  // 1: add the divisor multiple (negative digit)
    logic u1;   // 1: the multiple is 2Y, 0: Y
    logic u2;   // see the table above; also the LSB injection of a subtraction
  } qdigit_t;

  localparam sd_digit_t SD_ZERO = '{m2: 1'b0, pp: 1'b0, p: 1'b0};

  // Value of a remainder digit.
  function automatic int sd_value(sd_digit_t d);
    return int'(d.p) + int'(d.pp) - 2 * int'(d.m2);
  endfunction

  // Value of a quotient digit code ("minus zero" is 0).
  function automatic int q_value(qdigit_t q);
    int mag;
    mag = q.u1 ? 2 : 1;
    if (!q.add) return q.u2 ? mag : 0;
    else        return q.u2 ? 0 : -mag;
  endfunction

endpackage
