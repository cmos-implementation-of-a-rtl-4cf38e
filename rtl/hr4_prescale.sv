// Range reduction of the operands.
// Multiplies divisor Y in [1,2) and dividend X by one constant K chosen from
// the four fraction bits of Y below the binary point, so that
// 1 <= K*Y < 1 + 1/8 as the divider array requires. Every K is a sum of
// three power-of-two terms, so K*Y is a three-operand addition done with one
// row of full adders (carry-save) and a carry-propagate adder:
//   index  0-1: 1/2+1/4+1/4     2: 1+1/16-1/8    3: 1/2+1/4+1/8
//          4-5: 1/2+1/4+1/16  6-7: 1/4+1/4+1/4  8-9: 1/2+1/8+1/16
//        10-11: 1/4+1/4+1/8    12: 1/2+1/16+1/32  13-15: 1/4+1/4+1/16
// Index 2 (1.125 <= Y < 1.1875) has no K made of three positive terms and
// uses a subtracted third term. The choice of K values is this design's
// own; the document gives the method, not the table. Products are formed
// exactly with G guard bits and then truncated toward minus infinity to the
// operand width. The scaled dividend is then recoded to signed digits by
// wiring only (radix-4 Booth recoding: digit = lo + hi_of_lower_pair - 2*hi).
// Interface: x is two's complement, value x * 2^-(2N-2), in [-1/2, 1/2);
// y is unsigned, value y * 2^-(2N-2), in [1, 2) (top bit set).
// The r++ wire of the last dividend digit is constant 0 (nothing lies below
// it). Purely combinational.
module hr4_prescale
  import hr4_pkg::*;
#(
  parameter int unsigned N = 9
) (
  input  logic [2*N-3:0]    x,
  input  logic [2*N-2:0]    y,
  output logic [2*N-3:0]    xs,     // K*X, same format as x
  output logic [2*N-2:0]    ys,     // K*Y, same format as y
  output sd_digit_t [N-1:1] x_sd,   // K*X as dividend digits
  output logic [N-1:2][1:0] y_dig   // digits 2..N-1 of K*Y
);
  localparam int unsigned G  = 5;            // largest shift in the K table
  localparam int unsigned WX = 2 * N - 2 + G;
  localparam int unsigned WY = 2 * N - 1 + G;

  logic [3:0] idx;
  logic [2:0] sa, sb, sc;   // shifts of the three terms
  logic       neg;          // third term subtracted

  always_comb begin
    idx = y[2*N-3 -: 4];
    neg = 1'b0;
    unique case (idx)
      4'd0, 4'd1:         begin sa = 3'd1; sb = 3'd2; sc = 3'd2; end
      4'd2:               begin sa = 3'd0; sb = 3'd4; sc = 3'd3; neg = 1'b1; end
      4'd3:               begin sa = 3'd1; sb = 3'd2; sc = 3'd3; end
      4'd4, 4'd5:         begin sa = 3'd1; sb = 3'd2; sc = 3'd4; end
      4'd6, 4'd7:         begin sa = 3'd2; sb = 3'd2; sc = 3'd2; end
      4'd8, 4'd9:         begin sa = 3'd1; sb = 3'd3; sc = 3'd4; end
      4'd10, 4'd11:       begin sa = 3'd2; sb = 3'd2; sc = 3'd3; end
      4'd12:              begin sa = 3'd1; sb = 3'd4; sc = 3'd5; end
      default:            begin sa = 3'd2; sb = 3'd2; sc = 3'd4; end
    endcase
  end

  // Three-term multiply: carry-save row of full adders, then one adder.
  logic signed [WX-1:0] xe, xt0, xt1, xt2, xsum, xcar, xprod;
  logic        [WY-1:0] ye, yt0, yt1, yt2, ysum, ycar, yprod;

  always_comb begin
    xe  = {x, {G{1'b0}}};
    ye  = {y, {G{1'b0}}};
    xt0 = xe >>> sa;
    xt1 = xe >>> sb;
    xt2 = neg ? ~(xe >>> sc) : (xe >>> sc);
    yt0 = ye >> sa;
    yt1 = ye >> sb;
    yt2 = neg ? ~(ye >> sc) : (ye >> sc);
    xsum = xt0 ^ xt1 ^ xt2;
    ysum = yt0 ^ yt1 ^ yt2;
    xcar = ((xt0 & xt1) | (xt0 & xt2) | (xt1 & xt2)) <<< 1;
    ycar = ((yt0 & yt1) | (yt0 & yt2) | (yt1 & yt2)) << 1;
    xcar[0] = neg;   // +1 completing the complemented third term
    ycar[0] = neg;
    xprod = xsum + xcar;
    yprod = ysum + ycar;
    xs = xprod[WX-1:G];
    ys = yprod[WY-1:G];
  end

  // Booth-style recoding of K*X and digit split of K*Y (wiring only).
  always_comb begin
    for (int i = 1; i <= N - 1; i++) begin
      x_sd[i].m2 = xs[2*(N-1-i)+1];
      x_sd[i].p  = xs[2*(N-1-i)];
      x_sd[i].pp = (i == N - 1) ? 1'b0 : xs[(i == N - 1) ? 0 : 2*(N-1-i)-1];
    end
    for (int i = 2; i <= N - 1; i++) y_dig[i] = ys[2*(N-1-i) +: 2];
  end
endmodule
