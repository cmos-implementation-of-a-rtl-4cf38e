// QUOTIENT SELECTOR of the HEAD cell.
// Picks quotient digit q(j+1) from the two leading remainder digits r1, r2
// (weights 1 and 1/4 of 4*R(j)) so that the new leading digit
//   4*(r1 - q) + r2 - u2 + carry-in
// stays in {-2..2}. With E = 4*r1 + r2 the choice is:
//   E <= -7: -2    -6..-3: -1    -2..1: 0    2: minus zero    3..6: +1    7..10: +2
// (E = -1..1 could also take minus zero; this selector uses plain zero.)
// m2 and p2 flag r2 = -2 and r2 = +2. u1 and u2 are the document's sum-of-
// products forms; add is derived here from the selection rule above.
// Purely combinational.
module hr4_qsel
  import hr4_pkg::*;
(
  input  sd_digit_t r1,
  input  sd_digit_t r2,
  output qdigit_t   q
);
  logic m2, p2;                        // r2 = -2, r2 = +2
  logic r1_n2, r1_n1, r1_z, r1_p1, r1_p2; // r1 = -2, -1, 0, +1, +2

  always_comb begin
    m2    =  r2.m2 & ~r2.p & ~r2.pp;
    p2    = ~r2.m2 &  r2.p &  r2.pp;
    r1_n2 =  r1.m2 & ~r1.p & ~r1.pp;
    r1_n1 =  r1.m2 & (r1.p ^ r1.pp);
    r1_z  = (r1.m2 & r1.p & r1.pp) | (~r1.m2 & ~r1.p & ~r1.pp);
    r1_p1 = ~r1.m2 & (r1.p ^ r1.pp);
    r1_p2 = ~r1.m2 &  r1.p &  r1.pp;

    q.add = r1_n2 | (r1_n1 & ~p2) | (r1_z & p2) | (r1_p1 & m2);
    q.u1  = (~p2 & ~r1.p & ~r1.pp) | (~m2 & r1.p & r1.pp);
    q.u2  = r1_p1 | r1_p2 | (r1_z & p2);
  end
endmodule
