// rr_recip_qdsel: radix-4 quotient-digit selection of the reciprocal unit.
//
// A 7-bit short adder adds the top bits (three integer bits, four fraction
// bits) of the two carry-save words of 4w; the sum y^ is the estimate of 4w in
// sixteenths, at most 2/16 below it. The divisor d lies in [1/2, 1), so its
// bits 2^-2 .. 2^-4 give the table row i = 16 d^ - 8. The digit is
//   -2 if y^ < m_-1(i),  k if m_k(i) <= y^ < m_k+1(i) (k = -1, 0, 1),
//    2 if y^ >= m_2(i).
// The constants (rr_pkg R_*) and the widths of both estimates follow the
// published selection function for the reciprocal unit. Combinational.
module rr_recip_qdsel
  import rr_pkg::*;
(
  input  logic [6:0] ys,   // 4w sum word, bits 2^2 .. 2^-4
  input  logic [6:0] yc,   // 4w carry word, same bits
  input  logic [2:0] dtop, // d, bits 2^-2 .. 2^-4
  output digit_t     q
);
  logic signed [6:0] y;

  always_comb begin
    y = ys + yc;
    if (y < R_M1[dtop])      q = -3'sd2;
    else if (y < R_0[dtop])  q = -3'sd1;
    else if (y < R_1[dtop])  q = 3'sd0;
    else if (y < R_2[dtop])  q = 3'sd1;
    else                     q = 3'sd2;
  end
endmodule
