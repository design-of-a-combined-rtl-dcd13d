// rr_approx_convert: digit extraction and conversion of the approximation H.
//
// The approximation recurrence keeps only a window of H in carry-save form:
// REG H holds Y = 16 X + T, where X is what remained of the window after the
// previous digit was taken off. Each cycle a 7-bit short adder adds the top
// bits (weights 2^8 .. 2^2) of the two words, giving S with
// 4S <= Y < 4S + 8. The signed radix-16 digit t = floor((S+3)/4) is shifted
// into on-the-fly registers (rr_otf_conv, Q and QM), and the window that is fed
// back keeps S - 4t (a value in -3..0) in its top bits, so |X| < 12 and every
// digit lies in -13..13. After G iterations the result times 2^52 equals
// Q + X/16 with X/16 in [-0.75, 0.5), so round to nearest picks QM when
// X < -8 and Q otherwise. `res` is combinational on the registers and includes
// the digit of the final window.
// With TAIL = 1 (reciprocal unit, whose approximation register is 16 times
// smaller) the final window X, rounded to the nearest integer (-12..12), is
// appended as one more signed digit, again by the Q/QM rule, so that the
// result times 2^52 is 16 Q + X.
// `hard` flags a final window from which rounding to nearest cannot be decided:
// the approximation lies below the true value by a bounded amount (the
// Newton-Raphson step approaches from below; the bound follows from the bound
// on the final residual), and `hard` is set whenever the true value could lie
// on the other side of a rounding boundary. Without TAIL the window is
// -9 <= X < -7.75 or X >= 7; with TAIL it is a fraction of X in [1/32, 1/2).
// Result format: 2 integer bits, 52 fraction bits.
//
// Follows the published design in converting H on the fly and rounding to
// nearest without a carry-propagate adder in the loop. Its own choice: the
// published converter adds the top bits and propagates a 1-or-2 increment into
// a pair of shift registers; here signed radix-16 digits and the Q/QM registers
// of rr_otf_conv are used instead, because the window can also decrease.
module rr_approx_convert
  import rr_pkg::*;
#(
  parameter int unsigned G    = G_APPROX_DEF,
  parameter int unsigned FRAC = FRAC_DEF,
  parameter int unsigned INTB = INTB_DEF,
  parameter bit          TAIL = 1'b0,  // result ends in a rounded extra digit
  localparam int unsigned NW  = INTB + FRAC,
  localparam int unsigned TW  = NW - FRAC - 2,     // top bits of the window
  localparam int unsigned QW  = 4 * (G + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          en,
  input  logic [NW-1:0] hs,       // REG H, sum word
  input  logic [NW-1:0] hc,       // REG H, carry word
  output logic [TW-1:0] xtop,     // top bits of the reduced window X (sum word)
  output logic signed [4:0] t,    // radix-16 digit taken this cycle
  output logic [53:0]   res,
  output logic          hard      // result may be rounded wrongly
);
  logic signed [TW-1:0] s, sr;
  logic [QW-1:0]        q, qm, q_nx, qm_nx;
  logic [NW-1:0]        xs, xsum;
  logic                 rdn;
  logic [NW-1:0]        xr;
  logic signed [4:0]    tl;
  logic [QW+3:0]        qt;

  rr_otf_conv #(.LOGR(4), .W(QW)) u_otf (
    .clk, .rst_n, .load, .init('0), .en, .t,
    .q, .qm, .q_nx, .qm_nx
  );

  always_comb begin
    s    = hs[NW-1:FRAC+2] + hc[NW-1:FRAC+2];          // short adder
    t    = 5'((s + $signed(TW'(3))) >>> 2);
    sr   = s - $signed(TW'(t) <<< 2);
    xtop = sr;
    // final rounding from the reduced window
    xs   = {sr, hs[FRAC+1:0]};
    xsum = xs + {{TW{1'b0}}, hc[FRAC+1:0]};
    rdn  = $signed(xsum) < -$signed(NW'(8) << FRAC);
    // TAIL: the remaining window, rounded to an integer, is one more digit
    xr   = xsum + (NW'(1) << (FRAC - 1));
    tl   = 5'($signed(xr) >>> FRAC);
    qt   = tl[4] ? {qm_nx, 4'(tl)} : {q_nx, 4'(tl)};
    if (TAIL) res = qt[53:0];
    else      res = rdn ? qm_nx[53:0] : q_nx[53:0];
    // rounding check: the true value exceeds the approximation by e, with
    // -1/4 <= e <= 1 (units of X) without TAIL and 0 <= e < 0.45 (units of
    // the last place) with TAIL; flag every window for which some such e moves
    // the value across a rounding boundary
    if (TAIL)
      hard = !xsum[FRAC-1] && (xsum[FRAC-2:FRAC-5] != '0);
    else
      hard = ($signed(xsum) >= -$signed(NW'(36) << (FRAC - 2)) &&
              $signed(xsum) <  -$signed(NW'(31) << (FRAC - 2))) ||
             $signed(xsum) >= $signed(NW'(7) << FRAC);
  end
endmodule
