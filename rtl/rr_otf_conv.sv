// rr_otf_conv: on-the-fly conversion of signed radix-2^LOGR digits.
//
// Two shift registers hold the converted value Q and QM = Q - 1 (in units of
// the last digit). Each enabled cycle both shift one digit left and take a new
// last digit:
//   t > 0 : Q <- (Q, t)          QM <- (Q, t-1)
//   t = 0 : Q <- (Q, 0)          QM <- (QM, r-1)
//   t < 0 : Q <- (QM, r-|t|)     QM <- (QM, r-1-|t|)
// so no carry or borrow ever propagates. `load` sets Q to `init` and QM to
// init-1. The next-state values are also output, so a result that needs the
// digit of the current cycle can be formed without waiting a clock.
// Digits must lie in (-r, r). Arithmetic is modulo 2^W.
//
// The update rules follow the standard on-the-fly conversion used by the
// published design; the QP register is left out since rounding never needs it.
module rr_otf_conv #(
  parameter int unsigned LOGR = 2,
  parameter int unsigned W    = 58
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [W-1:0]      init,
  input  logic              en,
  input  logic signed [LOGR:0] t,
  output logic [W-1:0]      q,
  output logic [W-1:0]      qm,
  output logic [W-1:0]      q_nx,
  output logic [W-1:0]      qm_nx
);
  localparam int unsigned R = 1 << LOGR;

  logic [LOGR-1:0] mag, dq, dqm;

  always_comb begin
    mag = t[LOGR] ? LOGR'(-t) : LOGR'(t);
    if (t > 0) begin
      dq    = mag;
      dqm   = mag - 1'b1;
      q_nx  = {q[W-1-LOGR:0], dq};
      qm_nx = {q[W-1-LOGR:0], dqm};
    end else if (t == 0) begin
      dq    = '0;
      dqm   = LOGR'(R - 1);
      q_nx  = {q[W-1-LOGR:0], dq};
      qm_nx = {qm[W-1-LOGR:0], dqm};
    end else begin
      dq    = LOGR'(R) - mag;            // r - |t|  (|t| >= 1 so fits)
      dqm   = LOGR'(R - 1) - mag;
      q_nx  = {qm[W-1-LOGR:0], dq};
      qm_nx = {qm[W-1-LOGR:0], dqm};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q  <= '0;
      qm <= '1;
    end else if (load) begin
      q  <= init;
      qm <= init - 1'b1;
    end else if (en) begin
      q  <= q_nx;
      qm <= qm_nx;
    end
  end
endmodule
