// rr_recip_digit_recurrence: digit-by-digit part of the reciprocal unit.
//
// Radix-4 reciprocal recurrence with a carry-save residual:
//   w[j+1]  = 4 w[j] - q_{j+1} d        (4-1 multiplexer, 3-2 carry-save adder)
//   q_{j+2} = SEL(4 w[j+1], d)           (short adder, rr_recip_qdsel)
// Registers: REG W (ws, wc), REG q (q_{j+1}) and the divisor d. `load` takes
// w[0] = 1/4 and d and selects q_1 in the same cycle; `en` performs one
// iteration. Starting from w[0] = 1/4 and Q[0] = 0 the digits build
// Q = 1/(4d) in [1/4, 1/2], and w[j] = 4^j (1/4 - d Q[j]) stays within
// (-2/3 d, 2/3 d). The multiple -q d (word `qd` plus carry-in `qd_ci`) is
// also handed to the approximation part, which shares it.
//
// The structure (multiplexer for w[0], digit multiplexer, 3-2 adder, short
// adder, selection, registers) and the initial values follow the published
// reciprocal unit. The common 66-bit word format is this design's own.
module rr_recip_digit_recurrence
  import rr_pkg::*;
#(
  parameter int unsigned FRAC = FRAC_DEF,
  parameter int unsigned INTB = INTB_DEF,
  localparam int unsigned NW  = INTB + FRAC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          en,
  input  logic [NW-1:0] d0,      // divisor, in [1/2, 1)
  output logic [NW-1:0] ws,      // w[j], sum word
  output logic [NW-1:0] wc,      // w[j], carry word
  output digit_t        q,       // q_{j+1}
  output logic [NW-1:0] qd,      // -q_{j+1} d, inverted form
  output logic          qd_ci    // +1 completing qd
);
  logic [NW-1:0] d, wn_s, wn_c, sel_s, sel_c, sel_d;
  digit_t        q_nx;

  rr_digit_mux #(.W(NW), .SUB(1'b1)) u_qd (.x(d), .p(q), .z(qd), .cin(qd_ci));

  rr_csa32 #(.W(NW)) u_csa (
    .a(ws << 2), .b(wc << 2), .c(qd), .cin(qd_ci), .s(wn_s), .cy(wn_c)
  );

  always_comb begin
    sel_s = load ? NW'(1) << (FRAC - 2) : wn_s;
    sel_c = load ? '0 : wn_c;
    sel_d = load ? d0 : d;
  end

  // bits 2^2..2^-4 of 4w are bits 2^0..2^-6 of w
  rr_recip_qdsel u_sel (
    .ys(sel_s[FRAC -: 7]), .yc(sel_c[FRAC -: 7]), .dtop(sel_d[FRAC-2 -: 3]), .q(q_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= '0;
      wc <= '0;
      d  <= '0;
      q  <= '0;
    end else if (load) begin
      ws <= NW'(1) << (FRAC - 2);
      wc <= '0;
      d  <= d0;
      q  <= q_nx;
    end else if (en) begin
      ws <= wn_s;
      wc <= wn_c;
      q  <= q_nx;
    end
  end
endmodule
