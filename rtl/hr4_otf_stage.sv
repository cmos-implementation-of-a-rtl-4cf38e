// One step of on-the-fly conversion of the signed-digit quotient.
// Keeps two two's complement forms of the quotient so far, Q and QM = Q - 1
// (in units of the last digit), and appends one radix-4 digit q in {-2..2}:
//   Q'  = 4Q + q        = q >= 0 ? {Q , q}     : {QM, q + 4}
//   QM' = 4Q + q - 1    = q >  0 ? {Q , q - 1} : {QM, q + 3}
// Only a 2-way selection and a 2-bit append are needed, so no carry ripples.
// The words are W bits wide and are shifted left by two with the top bits
// dropped, which is exact while the quotient fits in W bits. The document
// calls for this conversion and names the method; the two-register form
// used here is the standard one. Purely combinational.
module hr4_otf_stage
  import hr4_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  qdigit_t        q,
  input  logic [W-1:0]   q_in,    // Q so far
  input  logic [W-1:0]   qm_in,   // Q so far minus one unit
  output logic [W-1:0]   q_out,
  output logic [W-1:0]   qm_out
);
  logic pos, neg;

  always_comb begin
    pos = ~q.add &  q.u2;
    neg =  q.add & ~q.u2;
    if (neg) q_out = {qm_in[W-3:0], 1'b1, ~q.u1};
    else     q_out = {q_in[W-3:0], pos & q.u1, pos & ~q.u1};
    if (pos) qm_out = {q_in[W-3:0], 1'b0, q.u1};
    else     qm_out = {qm_in[W-3:0], ~(neg & q.u1), ~(neg & ~q.u1)};
  end
endmodule
