// PPM (plus-plus-minus) cell of the hybrid radix-4 adder.
// Inputs: a and c of weight +2, b of weight -2. Outputs: o4 of weight +4
// and o2 of weight -2, such that 2a - 2b + 2c = 4*o4 - 2*o2.
// It is a full adder fed with (a, not b, c): a + (1-b) + c = 2*co + s, so
// a - b + c = 2*co - (1-s), giving o4 = co and o2 = not s. This reuse of the
// full adder with two inverters follows the document's cell design.
// Purely combinational.
module hr4_ppm (
  input  logic a,   // +2
  input  logic b,   // -2
  input  logic c,   // +2
  output logic o4,  // +4
  output logic o2   // -2
);
  logic s;
  hr4_fa u_fa (.a(a), .b(~b), .c(c), .s(s), .co(o4));
  assign o2 = ~s;
endmodule
