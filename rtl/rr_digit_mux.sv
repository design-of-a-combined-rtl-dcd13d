// rr_digit_mux: multiple of a word by a radix-4 digit, the "-2 -1 +1 +2"
// 4-1 multiplexer of the datapath.
//
// Selects 0, x or 2x by the digit magnitude and inverts the word when the
// multiple is to be negative. The +1 that completes the negation is returned
// as `cin` for the following carry-save adder, so no carry propagates here.
// With SUB = 1 the block produces -p*x (the subtrahend of a recurrence), with
// SUB = 0 it produces +p*x. Combinational: z + cin == (+/-) p*x (mod 2^W).
//
// The 4-1 multiplexer follows the published design; the inversion with a
// deferred +1 is this design's own choice.
module rr_digit_mux
  import rr_pkg::*;
#(
  parameter int unsigned W   = 66,
  parameter bit          SUB = 1'b0
) (
  input  logic [W-1:0] x,
  input  digit_t       p,
  output logic [W-1:0] z,
  output logic         cin
);
  logic [W-1:0] mag;
  logic         neg;

  always_comb begin
    unique case (p)
      3'sd2, -3'sd2: mag = x << 1;
      3'sd1, -3'sd1: mag = x;
      default:       mag = '0;
    endcase
    neg = p[2] ^ SUB;
    z   = neg ? ~mag : mag;
    cin = neg;
  end
endmodule
