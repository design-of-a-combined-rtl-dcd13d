// rr_recip_unit: radix-4 reciprocal unit (reciprocal only).
//
// The single-operation unit from which the combined unit grew. A radix-4
// digit-by-digit recurrence (rr_recip_digit_recurrence) produces the digits of
// 1/(4d) from w[0] = 1/4, Q[0] = 0, and an overlapped recurrence
// (rr_recip_approx_recurrence) uses the same digits to perform one
// Newton-Raphson step from E[0] = 0. After G_APPROX = 14 iterations the
// approximation is converted (rr_approx_convert, with one extra rounded
// digit) into the result; with `exact` set the unit runs G_EXACT = 28
// digit-by-digit iterations and rounds from the sign of the final residual
// (rr_convert).
//
// Interface: `sig` is the significand 1.F (53 bits); the divisor is
// d = sig/2. `start` is accepted whenever the unit is not busy; `done` rises
// 15 edges later (29 in exact mode) and `result` (2 integer bits, 52 fraction
// bits, value in (1, 2]) stays valid until the next start. Results are
// rounded to nearest. The Newton-Raphson step here leaves an error of up to
// about 0.45 units in the last place, so about half of the approximations
// cannot be rounded directly (rr_approx_convert `hard`); for those the unit
// continues to 28 digit-by-digit iterations and `done` rises after 30 edges.
//
// The initial values, the selection table, the two recurrences and the
// iteration counts follow the published reciprocal unit; the handshake, the
// word format and the converter details are this design's own, shared with
// the combined unit.
module rr_recip_unit
  import rr_pkg::*;
#(
  parameter int unsigned FRAC     = FRAC_DEF,
  parameter int unsigned INTB     = INTB_DEF,
  parameter int unsigned G_APPROX = G_APPROX_DEF,
  parameter int unsigned G_EXACT  = G_EXACT_DEF,
  localparam int unsigned NW      = INTB + FRAC,
  localparam int unsigned TW      = NW - FRAC - 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        exact,
  input  logic [52:0] sig,
  output logic        busy,
  output logic        done,
  output logic [53:0] result
);
  logic          load, en, exact_q, hard;
  logic [NW-1:0] d0, ws, wc, qd, es, ec;
  logic          qd_ci;
  digit_t        q;
  logic [TW-1:0] xtop;
  logic [53:0]   res_exact, res_approx;

  rr_control #(.G_APPROX(G_APPROX), .G_EXACT(G_EXACT)) u_ctl (
    .clk, .rst_n, .start, .exact, .hard, .load, .en, .busy, .done, .exact_q
  );

  // d = sig / 2: sig has 52 fraction bits
  assign d0 = NW'(sig) << (FRAC - 53);

  rr_recip_digit_recurrence #(.FRAC(FRAC), .INTB(INTB)) u_dig (
    .clk, .rst_n, .load, .en, .d0, .ws, .wc, .q, .qd, .qd_ci
  );

  rr_recip_approx_recurrence #(.FRAC(FRAC), .INTB(INTB)) u_apx (
    .clk, .rst_n, .load, .en, .q, .ws, .wc, .qd, .qd_ci, .xtop, .es, .ec
  );

  rr_approx_convert #(.G(G_APPROX), .FRAC(FRAC), .INTB(INTB), .TAIL(1'b1)) u_aconv (
    .clk, .rst_n, .load, .en, .hs(es), .hc(ec), .xtop, .t(), .res(res_approx), .hard
  );

  rr_convert #(.G(G_EXACT), .NW(NW), .PRE(2)) u_conv (
    .clk, .rst_n, .load, .p0(2'd0), .en, .p(q), .ws, .wc, .res(res_exact)
  );

  assign result = exact_q ? res_exact : res_approx;
endmodule
