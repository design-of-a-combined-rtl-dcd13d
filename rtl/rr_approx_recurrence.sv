// rr_approx_recurrence: Newton-Raphson approximation part of the combined unit.
//
// Computes, overlapped with the digit-by-digit part and from its digits,
//   H[j+1] = 16 H[j] + p (2*4w[j] - p D'[j] + op*w[j+1])
// with D' = D/2 for the square-root reciprocal and D' = D for the reciprocal
// (op = 0 also forces the digit of the p*w[j+1] multiplexer to zero, so the
// same hardware evaluates E[j+1] = 16 E[j] + q (2*4w[j] - q d)). Adders, in
// order: 4-2 carry-save (16X and p*2rw, both carry-save), 3-2 carry-save
// (-p^2 D'), 4-2 carry-save (p*w[j+1]). REG H holds the carry-save result;
// the window fed back as X replaces the top bits of the sum word by `xtop`
// from rr_approx_convert, which has taken a digit off the top.
// `load` sets REG H to H[0]; `en` performs one iteration.
//
// The recurrence, the op multiplexer between D/2 and D and the AND gate on
// the w[j+1] term follow the published design. The fixed 66-bit word format
// and the window reduction by the converter are this design's own choices.
module rr_approx_recurrence
  import rr_pkg::*;
#(
  parameter int unsigned FRAC = FRAC_DEF,
  parameter int unsigned INTB = INTB_DEF,
  localparam int unsigned NW  = INTB + FRAC,
  localparam int unsigned TW  = NW - FRAC - 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          en,
  input  op_e           op,
  input  logic [NW-1:0] h0,
  input  digit_t        p,        // p_{j+1}
  input  logic [NW-1:0] ws,       // w[j]
  input  logic [NW-1:0] wc,
  input  logic [NW-1:0] wn_s,     // w[j+1]
  input  logic [NW-1:0] wn_c,
  input  logic [NW-1:0] d,        // D[j]
  input  logic [TW-1:0] xtop,
  output logic [NW-1:0] hs,       // REG H
  output logic [NW-1:0] hc
);
  logic [NW-1:0] xs, xc;
  logic [NW-1:0] m_s, m_c, m_d, m_ws, m_wc, dsel;
  logic          ci_s, ci_c, ci_d, ci_ws, ci_wc;
  logic [NW-1:0] s1, k1, s2, k2, hs_n, hc_n;
  digit_t        pw;

  always_comb begin
    xs   = {xtop, hs[FRAC+1:0]};
    xc   = {{TW{1'b0}}, hc[FRAC+1:0]};
    dsel = (op == OP_RSQRT) ? NW'($signed(d) >>> 1) : d;
    pw   = (op == OP_RSQRT) ? p : digit_t'(0);        // AND gate
  end

  // p * 2rw[j] = p * 8w[j]
  rr_digit_mux #(.W(NW), .SUB(1'b0)) u_rws (.x(ws << 3), .p, .z(m_s), .cin(ci_s));
  rr_digit_mux #(.W(NW), .SUB(1'b0)) u_rwc (.x(wc << 3), .p, .z(m_c), .cin(ci_c));
  rr_csa42 #(.W(NW)) u_csa1 (
    .a(xs << 4), .b(xc << 4), .c(m_s), .d(m_c), .cin0(ci_s), .cin1(ci_c),
    .s(s1), .cy(k1)
  );

  // - p^2 D'
  rr_sq_mux #(.W(NW)) u_pd (.x(dsel), .p, .z(m_d), .cin(ci_d));
  rr_csa32 #(.W(NW)) u_csa2 (.a(s1), .b(k1), .c(m_d), .cin(ci_d), .s(s2), .cy(k2));

  // + op * p * w[j+1]
  rr_digit_mux #(.W(NW), .SUB(1'b0)) u_wns (.x(wn_s), .p(pw), .z(m_ws), .cin(ci_ws));
  rr_digit_mux #(.W(NW), .SUB(1'b0)) u_wnc (.x(wn_c), .p(pw), .z(m_wc), .cin(ci_wc));
  rr_csa42 #(.W(NW)) u_csa3 (
    .a(s2), .b(k2), .c(m_ws), .d(m_wc), .cin0(ci_ws), .cin1(ci_wc),
    .s(hs_n), .cy(hc_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs <= '0;
      hc <= '0;
    end else if (load) begin
      hs <= h0;
      hc <= '0;
    end else if (en) begin
      hs <= hs_n;
      hc <= hc_n;
    end
  end
endmodule
