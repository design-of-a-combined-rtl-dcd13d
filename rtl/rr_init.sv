// rr_init: initial values of the combined recurrences.
//
// The operand is a 53-bit significand sig = 1.F. For the reciprocal d = sig/2
// lies in [1/2, 1). For the square-root reciprocal d = sig/2 when `ed` (even
// exponent adjustment) is set and d = sig/4 otherwise, so d lies in [1/4, 1).
// Reciprocal:  Q0 = 1 if d >= 3/4 else 2;  w0 = 1 - Q0 d;  D0 = d;  C0 = 0;
//              H0 = Q0 (2 - Q0 d).
// Square-root reciprocal: P0 = 1 if d >= 1/2 else 2;  w0 = (1 - d P0^2)/2;
//              D0 = P0 d;  C0 = d/8;  H0 = P0 (3 - d P0^2)/2.
// All values are exact in the FRAC-fraction-bit format for FRAC >= 57.
// Combinational; outputs are two's-complement words of INTB+FRAC bits.
//
// The initial values follow the published table; the fixed-point format and
// the `ed` input convention (ed = 1 for d in [1/2, 1)) are this design's own.
module rr_init
  import rr_pkg::*;
#(
  parameter int unsigned FRAC = FRAC_DEF,
  parameter int unsigned INTB = INTB_DEF,
  localparam int unsigned NW  = INTB + FRAC
) (
  input  logic [52:0]   sig,
  input  op_e           op,
  input  logic          ed,
  output logic [NW-1:0] w0,
  output logic [NW-1:0] d0,
  output logic [NW-1:0] c0,
  output logic [NW-1:0] h0,
  output logic [1:0]    p0   // integer part of the first result approximation
);
  localparam logic [NW-1:0] ONE = NW'(1) << FRAC;

  logic [NW-1:0] d, sig_w;

  always_comb begin
    sig_w = NW'(sig) << (FRAC - 52);                  // sig in [1,2)
    d     = (op == OP_RECIP || ed) ? (sig_w >> 1) : (sig_w >> 2);
    if (op == OP_RECIP) begin
      c0 = '0;
      d0 = d;
      if (d >= (NW'(3) << (FRAC - 2))) begin         // d >= 3/4
        p0 = 2'd1;
        w0 = ONE - d;
        h0 = (ONE << 1) - d;
      end else begin
        p0 = 2'd2;
        w0 = ONE - (d << 1);
        h0 = (ONE << 2) - (d << 2);
      end
    end else begin
      c0 = d >> 3;
      if (ed) begin                                  // d >= 1/2
        p0 = 2'd1;
        d0 = d;
        w0 = NW'($signed(ONE - d) >>> 1);
        h0 = NW'($signed(ONE + (ONE << 1) - d) >>> 1);
      end else begin
        p0 = 2'd2;
        d0 = d << 1;
        w0 = NW'($signed(ONE - (d << 2)) >>> 1);
        h0 = ONE + (ONE << 1) - (d << 2);
      end
    end
  end
endmodule
