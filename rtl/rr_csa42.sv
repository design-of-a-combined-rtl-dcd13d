// rr_csa42: W-bit 4-2 carry-save adder.
//
// Built from two rows of 3-2 counters: the first row adds a, b and c, the
// second adds its two outputs and d. Each row takes one carry-in at its
// least-significant carry position (cin0, cin1), so two negated operands can be
// completed without a carry-propagate adder. Combinational:
// s + cy == a + b + c + d + cin0 + cin1 (mod 2^W).
//
// The published design names the 4-2 adder only; building it from two 3-2 rows
// is this design's own choice.
module rr_csa42 #(
  parameter int unsigned W = 66
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic         cin0,
  input  logic         cin1,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] s1, c1;

  rr_csa32 #(.W(W)) u_row1 (.a(a),  .b(b),  .c(c), .cin(cin0), .s(s1), .cy(c1));
  rr_csa32 #(.W(W)) u_row2 (.a(s1), .b(c1), .c(d), .cin(cin1), .s(s),  .cy(cy));
endmodule
