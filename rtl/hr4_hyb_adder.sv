// Hybrid radix-4 adder of one digit position: a PPM cell and a full adder.
// It adds a conventional digit my = 2*my2 + my1 (0..3, a digit of the
// selected divisor multiple) to a signed remainder digit r (-2..2):
//   my + r = 4*c4 + (s_p - 2*s_m2)
// The full adder sums the three weight-1 bits (my1, r.p, r.pp); its carry
// (weight 2) goes to the PPM together with my2 (+2) and r.m2 (-2). The PPM's
// +4 output c4 is the carry into the next more significant digit, where it
// becomes that digit's r++ bit; s_p and s_m2 are the r+ and r2 bits of the
// new digit of this position. The structure follows the document's TAIL
// cell figure. Purely combinational.
module hr4_hyb_adder
  import hr4_pkg::*;
(
  input  logic      my2,   // +2
  input  logic      my1,   // +1
  input  sd_digit_t r,     // remainder digit of the same weight
  output logic      s_p,   // new digit, r+ bit
  output logic      s_m2,  // new digit, r2 (-2) bit
  output logic      c4     // carry of weight 4 (r++ of the next higher digit)
);
  logic fa_c2;
  hr4_fa  u_fa  (.a(my1), .b(r.p), .c(r.pp), .s(s_p), .co(fa_c2));
  hr4_ppm u_ppm (.a(my2), .b(r.m2), .c(fa_c2), .o4(c4), .o2(s_m2));
endmodule
