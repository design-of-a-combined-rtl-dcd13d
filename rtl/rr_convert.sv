// rr_convert: result conversion and rounding of the digit-by-digit path.
//
// The radix-4 digits p_1..p_G are converted on the fly (rr_otf_conv, Q and QM
// registers) starting from the integer part P0. After G iterations Q holds
// P[G] with 2G fraction bits. A full-width adder forms the sign of the final
// carry-save residual: if it is negative P[G] is one unit above the true
// result and QM is the truncated result, otherwise Q is. The truncated value is
// then rounded to nearest at 52 fraction bits by adding its bit 2^-53 (ties
// cannot occur for these functions). `res` is combinational on the registers
// and valid once the G digits have been shifted in.
// PRE scales the result: the reciprocal unit builds 1/(4d), so it sets PRE = 2.
// Result format: 2 integer bits, 52 fraction bits.
//
// Conversion with Q and QM and correction by the residual sign follow the
// published design; the single incrementer used for rounding, in place of a
// table of Q/QM/QP cases, is this design's own simplification.
module rr_convert
  import rr_pkg::*;
#(
  parameter int unsigned G    = G_EXACT_DEF,
  parameter int unsigned NW   = INTB_DEF + FRAC_DEF,
  parameter int unsigned PRE  = 0,        // result = 2^PRE * converted value
  localparam int unsigned QW  = 2 + 2 * G
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [1:0]    p0,
  input  logic          en,
  input  digit_t        p,
  input  logic [NW-1:0] ws,       // final residual, carry-save
  input  logic [NW-1:0] wc,
  output logic [53:0]   res
);
  logic [QW-1:0] q, qm, q_nx, qm_nx, trunc;
  logic [NW-1:0] wsum;
  logic          neg;
  logic [53:0]   hi;
  logic          rbit;

  rr_otf_conv #(.LOGR(2), .W(QW)) u_otf (
    .clk, .rst_n, .load, .init(QW'(p0)), .en, .t(p),
    .q, .qm, .q_nx, .qm_nx
  );

  always_comb begin
    wsum  = ws + wc;
    neg   = wsum[NW-1];
    trunc = neg ? qm : q;
    hi    = 54'(trunc >> (2 * G - 52 - PRE));
    rbit  = trunc[2 * G - 53 - PRE];
    res   = hi + 54'(rbit);
  end
endmodule
