// rr_digit_recurrence: digit-by-digit part of the combined unit.
//
// Registers: residual w in carry-save form (REG W), D = d*P[j] (REG D),
// C = d*4^-(j+1)/2 (REG C) and the next digit p_{j+1} (REG P). One iteration:
//   w[j+1] = 4w[j] - p D[j] - p^2 C[j]   (4-2 carry-save adder)
//   D[j+1] = D[j] + 2 p C[j]             (carry-propagate adder)
//   C[j+1] = C[j] / 4
//   p_{j+2} = SEL(4w[j+1], D[j+1])        (rr_qdsel)
// The digit multiples come from rr_digit_mux / rr_sq_mux with their negation
// carries absorbed by the 4-2 adder. For the reciprocal C is 0, so D stays d
// and the recurrence is w[j+1] = 4w[j] - q d. `load` takes the initial values
// and selects p_1 from them in the same cycle; `en` performs one iteration.
// The next residual (wn_s, wn_c) is output combinationally for the
// approximation part, which needs w[j+1] within the same cycle.
//
// The recurrences and the registers follow the published design. Its own
// choices: initial values are loaded through the registers' input
// multiplexers, and D^ for the selection is read from the carry-propagate
// adder's output instead of a separate short adder.
module rr_digit_recurrence
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
  input  logic [NW-1:0] w0,
  input  logic [NW-1:0] d0,
  input  logic [NW-1:0] c0,
  output logic [NW-1:0] ws,      // w[j], sum word
  output logic [NW-1:0] wc,      // w[j], carry word
  output logic [NW-1:0] d,       // D[j]
  output digit_t        p,       // p_{j+1}
  output logic [NW-1:0] wn_s,    // w[j+1], combinational
  output logic [NW-1:0] wn_c
);
  logic [NW-1:0] c;
  logic [NW-1:0] pd, p2c, tpc, dn, cn;
  logic          pd_ci, p2c_ci, tpc_ci;
  logic [NW-1:0] sel_s, sel_c, sel_d;
  digit_t        p_nx;

  rr_digit_mux #(.W(NW), .SUB(1'b1)) u_pd  (.x(d),      .p, .z(pd),  .cin(pd_ci));
  rr_sq_mux    #(.W(NW))             u_p2c (.x(c),      .p, .z(p2c), .cin(p2c_ci));
  rr_digit_mux #(.W(NW), .SUB(1'b0)) u_tpc (.x(c << 1), .p, .z(tpc), .cin(tpc_ci));

  rr_csa42 #(.W(NW)) u_csa (
    .a(ws << 2), .b(wc << 2), .c(pd), .d(p2c), .cin0(pd_ci), .cin1(p2c_ci),
    .s(wn_s), .cy(wn_c)
  );

  always_comb begin
    dn = d + tpc + NW'(tpc_ci);                  // CPA
    cn = NW'($signed(c) >>> 2);
    // inputs of the selection: initial values or next-state values
    sel_s = load ? w0 : wn_s;
    sel_c = load ? '0 : wn_c;
    sel_d = load ? d0 : dn;
  end

  // selection works on 4*w: bits 2^2..2^-5 of 4w are bits 2^0..2^-7 of w
  rr_qdsel u_sel (
    .ys(sel_s[FRAC -: 8]), .yc(sel_c[FRAC -: 8]), .dtop(sel_d[FRAC+1 -: 7]), .p(p_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= '0;
      wc <= '0;
      d  <= '0;
      c  <= '0;
      p  <= '0;
    end else if (load) begin
      ws <= w0;
      wc <= '0;
      d  <= d0;
      c  <= c0;
      p  <= p_nx;
    end else if (en) begin
      ws <= wn_s;
      wc <= wn_c;
      d  <= dn;
      c  <= cn;
      p  <= p_nx;
    end
  end
endmodule
