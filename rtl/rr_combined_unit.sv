// rr_combined_unit: radix-4 combined unit for the reciprocal and the square-root
// reciprocal of a double-precision significand.
//
// Two recurrences run side by side and share one digit per cycle. The
// digit-by-digit part (rr_digit_recurrence) produces radix-4 digits of 1/d or
// 1/sqrt(d); the approximation part (rr_approx_recurrence) uses the same
// digits to perform, as a digit recurrence, one Newton-Raphson step on the
// partial result, so after G_APPROX = 14 iterations (28 result bits from the
// digit part) the approximation already holds about 56 correct bits. Its
// window is converted on the fly and rounded by rr_approx_convert. With
// `exact` set the unit instead runs G_EXACT = 28 digit-by-digit iterations and
// returns the result rounded from the final residual sign (rr_convert).
//
// Interface: `sig` is the significand 1.F (53 bits). `op` selects 1/d with
// d = sig/2, or 1/sqrt(d) with d = sig/2 (ed = 1) or sig/4 (ed = 0).
// `start` is accepted whenever the unit is not busy; `done` rises 15 edges
// later (29 in exact mode) and `result` (2 integer bits, 52 fraction bits,
// value in (1, 2]) stays valid until the next start. Rounding is to nearest.
// When the final approximation window lies too close to a rounding boundary
// (rr_approx_convert `hard`, about 7 percent of operands) the unit does not
// raise `done` but continues the digit-by-digit recurrence to 28 iterations
// and returns that result instead, 30 edges after the start edge.
//
// The two recurrences, the shared digit selection, the initial values and the
// 15-cycle latency follow the published design. The start/busy/done
// handshake (the published unit restarts from reset), the common word format
// and the exact-mode input that chooses the 28-iteration result are this
// design's own choices. The fallback follows the published correct-rounding
// method; its error bound and check window are this design's own.
module rr_combined_unit
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
  input  op_e         op,
  input  logic        ed,
  input  logic        exact,
  input  logic [52:0] sig,
  output logic        busy,
  output logic        done,
  output logic [53:0] result
);
  logic          load, en, exact_q, hard;
  op_e           op_q;
  logic [NW-1:0] w0, d0, c0, h0;
  logic [1:0]    p0;
  logic [NW-1:0] ws, wc, d, wn_s, wn_c, hs, hc;
  digit_t        p;
  logic [TW-1:0] xtop;
  logic [53:0]   res_exact, res_approx;

  rr_control #(.G_APPROX(G_APPROX), .G_EXACT(G_EXACT)) u_ctl (
    .clk, .rst_n, .start, .exact, .hard, .load, .en, .busy, .done, .exact_q
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    op_q <= OP_RECIP;
    else if (load) op_q <= op;
  end

  rr_init #(.FRAC(FRAC), .INTB(INTB)) u_init (
    .sig, .op, .ed, .w0, .d0, .c0, .h0, .p0
  );

  rr_digit_recurrence #(.FRAC(FRAC), .INTB(INTB)) u_dig (
    .clk, .rst_n, .load, .en, .w0, .d0, .c0,
    .ws, .wc, .d, .p, .wn_s, .wn_c
  );

  rr_approx_recurrence #(.FRAC(FRAC), .INTB(INTB)) u_apx (
    .clk, .rst_n, .load, .en, .op(op_q), .h0, .p, .ws, .wc, .wn_s, .wn_c, .d,
    .xtop, .hs, .hc
  );

  rr_convert #(.G(G_EXACT), .NW(NW)) u_conv (
    .clk, .rst_n, .load, .p0, .en, .p, .ws, .wc, .res(res_exact)
  );

  rr_approx_convert #(.G(G_APPROX), .FRAC(FRAC), .INTB(INTB)) u_aconv (
    .clk, .rst_n, .load, .en, .hs, .hc, .xtop, .t(), .res(res_approx), .hard
  );

  assign result = exact_q ? res_exact : res_approx;
endmodule
