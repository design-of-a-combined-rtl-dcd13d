// rr_recip_approx_recurrence: Newton-Raphson approximation part of the
// reciprocal unit.
//
// Computes, overlapped with the digit-by-digit part and from its digits,
//   E[j+1] = 16 E[j] + q_{j+1} (2*4w[j] - q_{j+1} d)
// from E[0] = 0, so that E[j] = 16^(j-1) A[j], where A[j] = Q'(2 - d Q') is the
// Newton-Raphson step applied to Q' = 4 Q[j]. Adders, in order: a 3-2
// carry-save adder for 2rw[j] and the shared multiple -q d; a 4-1 multiplexer
// multiplying both of its words by q; a 4-2 carry-save adder adding them to
// 16 E[j]. REG E holds the carry-save result. As in the combined unit only a
// window of E is kept: its top bits are replaced by `xtop` from the converter,
// which has taken a radix-16 digit off the top.
// `load` clears REG E; `en` performs one iteration.
//
// The recurrence and the adder structure follow the published reciprocal unit.
// The window reduction and the common word format (which makes the published
// sign extension step unnecessary) are this design's own.
module rr_recip_approx_recurrence
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
  input  digit_t        q,        // q_{j+1}
  input  logic [NW-1:0] ws,       // w[j]
  input  logic [NW-1:0] wc,
  input  logic [NW-1:0] qd,       // -q_{j+1} d, inverted form
  input  logic          qd_ci,
  input  logic [TW-1:0] xtop,
  output logic [NW-1:0] es,       // REG E
  output logic [NW-1:0] ec
);
  logic [NW-1:0] xs, xc, s1, k1, m_s, m_c, es_n, ec_n;
  logic          ci_s, ci_c;

  always_comb begin
    xs = {xtop, es[FRAC+1:0]};
    xc = {{TW{1'b0}}, ec[FRAC+1:0]};
  end

  // 2rw[j] - q d = 8w[j] - q d
  rr_csa32 #(.W(NW)) u_csa1 (.a(ws << 3), .b(wc << 3), .c(qd), .cin(qd_ci), .s(s1), .cy(k1));

  // times q
  rr_digit_mux #(.W(NW), .SUB(1'b0)) u_ms (.x(s1), .p(q), .z(m_s), .cin(ci_s));
  rr_digit_mux #(.W(NW), .SUB(1'b0)) u_mc (.x(k1), .p(q), .z(m_c), .cin(ci_c));

  rr_csa42 #(.W(NW)) u_csa2 (
    .a(xs << 4), .b(xc << 4), .c(m_s), .d(m_c), .cin0(ci_s), .cin1(ci_c),
    .s(es_n), .cy(ec_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      es <= '0;
      ec <= '0;
    end else if (load) begin
      es <= '0;
      ec <= '0;
    end else if (en) begin
      es <= es_n;
      ec <= ec_n;
    end
  end
endmodule
