// One slice of the divider: one step of R(j+1) = 4*R(j) - q(j+1)*Y.
// A HEAD cell picks q(j+1) from r1, r2 and forms new digit 1; an iterative
// logic array of TAIL cells (positions 2..N-1) adds the selected multiple of
// Y to the shifted remainder. Each TAIL's weight-4 carry is the r++ bit of
// the digit to its left; the r++ bit of the last digit is tied to u2, the +1
// that completes the one's complement of a subtracted multiple.
// Remainder digits are r[1] (weight 1/4) .. r[N-1] (weight 4^-(N-1)); the
// divisor is Y = 1 + y[2]/16 + ... + y[N-1]*4^-(N-1), with digit 1 zero and
// y[2] <= 1 (1 <= Y < 9/8), as the range reduction guarantees.
// Purely combinational; the carry ripples through one cell per position.
module hr4_slice
  import hr4_pkg::*;
#(
  parameter int unsigned N = 9   // quotient word length n (N-1 digits per remainder)
) (
  input  sd_digit_t [N-1:1] r_in,  // R(j)
  input  logic [N-1:2][1:0] y,     // divisor digits 2..N-1
  output qdigit_t           q,     // q(j+1)
  output sd_digit_t [N-1:1] r_out  // R(j+1)
);
  logic [N:2] c4;  // c4[i]: carry out of TAIL i (r++ of new digit i-1)

  hr4_head u_head (.r1(r_in[1]), .r2(r_in[2]), .q(q),
                   .s_p(r_out[1].p), .s_m2(r_out[1].m2));
  assign r_out[1].pp = c4[2];
  assign c4[N] = q.u2;

  for (genvar i = 2; i <= N - 1; i++) begin : g_tail
    hr4_tail u_tail (
      .y     (y[i]),
      .y_nxt2((i == N - 1) ? 1'b0 : y[(i == N - 1) ? i : i + 1][1]),
      .add   (q.add),
      .u1    (q.u1),
      .u2    (q.u2),
      .r_in  ((i == N - 1) ? SD_ZERO : r_in[(i == N - 1) ? i : i + 1]),
      .s_p   (r_out[i].p),
      .s_m2  (r_out[i].m2),
      .c4    (c4[i])
    );
    assign r_out[i].pp = c4[i + 1];
  end

endmodule
