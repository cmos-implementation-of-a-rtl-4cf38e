// Divider array: N-1 identical combinational slices stacked, slice j
// turning R(j-1) into R(j) and producing quotient digit q(j), with one
// on-the-fly conversion stage beside each slice.
// Inputs: the dividend as signed digits (R(0) = X, digit i of weight 4^-i,
// |X| <= 2/3) and divisor digits 2..N-1 of a divisor in [1, 9/8).
// Outputs: the quotient digits, the quotient Q = sum q(j)*4^-j as a
// two's complement integer in units of 4^-(N-1) (2N-1 bits), and the final
// remainder R(N-1) as signed digits, so that
//   X = Q + R(N-1) * 4^-(N-1) * Y   exactly, with |R(N-1)| <= 2/3.
// No final correction of a negative remainder is made. Purely
// combinational: a result appears one array delay after the inputs.
module hr4_array
  import hr4_pkg::*;
#(
  parameter int unsigned N = 9
) (
  input  sd_digit_t [N-1:1] x,       // dividend digits
  input  logic [N-1:2][1:0] y,       // divisor digits 2..N-1
  output qdigit_t   [N-1:1] q,       // quotient digits q(1)..q(N-1)
  output logic      [2*N-2:0] quo,   // quotient, two's complement, units 4^-(N-1)
  output sd_digit_t [N-1:1] rem      // final remainder R(N-1)
);
  localparam int unsigned W = 2 * N - 1;

  sd_digit_t [N-1:1] r  [0:N-1];
  logic      [W-1:0] qc [0:N-1];
  logic      [W-1:0] qm [0:N-1];

  assign r[0]  = x;
  assign qc[0] = '0;
  assign qm[0] = '1;

  for (genvar j = 1; j <= N - 1; j++) begin : g_slice
    hr4_slice #(.N(N)) u_slice (.r_in(r[j-1]), .y(y), .q(q[j]), .r_out(r[j]));
    hr4_otf_stage #(.W(W)) u_otf (.q(q[j]), .q_in(qc[j-1]), .qm_in(qm[j-1]),
                                  .q_out(qc[j]), .qm_out(qm[j]));
  end

  assign quo = qc[N-1];
  assign rem = r[N-1];
endmodule
