// rr_qdsel: radix-4 digit selection shared by reciprocal and square-root
// reciprocal.
//
// A short adder adds the top eight bits (three integer bits, five fraction
// bits) of the carry-save shifted residual 4w; dropping the last bit of the
// sum gives the seven-bit estimate y^ of 4w in sixteenths. D^ is D truncated to
// five fraction bits (32*D^, saturated to 16..31). The digit is
//   -2 if y^ < m_-1,  k if m_k <= y^ < m_k+1 (k = -1, 0, 1),  2 if y^ >= m_2.
// Adding five fraction bits before truncating keeps the estimate error below
// 1/16, which the constants need; D must be in conventional form.
// Combinational.
//
// The table follows the published selection function except for the one
// constant noted in rr_pkg. The 8-bit short adder (one bit wider than the
// published seven-bit estimate) and taking D^ exactly are this design's own:
// with the narrower estimate the residual left its bound in simulation.
module rr_qdsel
  import rr_pkg::*;
(
  input  logic [7:0] ys,   // 4w sum word, bits 2^2 .. 2^-5
  input  logic [7:0] yc,   // 4w carry word, same bits
  input  logic [6:0] dtop, // D, bits 2^1 .. 2^-5 (unsigned)
  output digit_t     p
);
  logic [7:0]        ysum;
  logic signed [6:0] y;
  logic [3:0]        i;

  always_comb begin
    ysum = ys + yc;
    y    = ysum[7:1];
    if (dtop < 7'd16)      i = 4'd0;
    else if (dtop > 7'd31) i = 4'd15;
    else                   i = 4'(dtop - 7'd16);

    if (y < M_M1[i])      p = -3'sd2;
    else if (y < M_0[i])  p = -3'sd1;
    else if (y < M_1[i])  p = 3'sd0;
    else if (y < M_2[i])  p = 3'sd1;
    else                  p = 3'sd2;
  end
endmodule
