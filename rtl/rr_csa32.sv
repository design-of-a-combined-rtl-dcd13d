// rr_csa32: W-bit 3-2 carry-save adder.
//
// Reduces three words to a sum word and a carry word. The carry word is the
// majority vector shifted one place left; its free least-significant bit takes
// the carry-in `cin`, which the datapath uses for the +1 of a two's-complement
// negation. Purely combinational: s + cy == a + b + c + cin (mod 2^W).
//
// The published design names the 3-2 adder only; the cell is a plain full
// adder row.
module rr_csa32 #(
  parameter int unsigned W = 66
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] maj;

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    cy  = {maj[W-2:0], cin};
  end
endmodule
