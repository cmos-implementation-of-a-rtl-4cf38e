// Full adder: a + b + c = 2*co + s.
// The divider builds both its FA and its PPM (plus-plus-minus) cells from
// this one cell, the PPM by inverting one input and the sum output.
// Purely combinational.
module hr4_fa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end
endmodule
