// rr_sq_mux: negated multiple of a word by the square of a radix-4 digit, the
// "+4 +1 +1 +4" 4-1 multiplexer of the datapath.
//
// p^2 takes only the values 0, 1 and 4, so the multiple is a selection among
// 0, x and 4x. The result is always subtracted in the recurrences, so the word
// is inverted and the +1 is handed on as `cin` to the next carry-save adder.
// Combinational: z + cin == -(p*p*x) (mod 2^W).
//
// The selection among 0, 1 and 4 follows the published design; the inversion
// with a deferred +1 is this design's own choice.
module rr_sq_mux
  import rr_pkg::*;
#(
  parameter int unsigned W = 66
) (
  input  logic [W-1:0] x,
  input  digit_t       p,
  output logic [W-1:0] z,
  output logic         cin
);
  logic [W-1:0] mag;

  always_comb begin
    unique case (p)
      3'sd2, -3'sd2: mag = x << 2;
      3'sd1, -3'sd1: mag = x;
      default:       mag = '0;
    endcase
    z   = ~mag;
    cin = 1'b1;
  end
endmodule
