// rr_top: the two radix-4 units side by side.
//
// cu_*: the combined reciprocal / square-root reciprocal unit
// (rr_combined_unit), the main design. ru_*: the reciprocal-only unit
// (rr_recip_unit), the simpler design it was developed from, which uses its
// own initialisation and selection table. The units share nothing but the
// clock and reset; each has its own start/busy/done handshake and result
// (2 integer bits, 52 fraction bits). Both return the approximation result 15
// clock edges after an accepted start, or the digit-by-digit result after 29
// edges when their `exact` input is set.
//
// Keeping the two units separate follows the published work, which builds
// and evaluates them as separate units; the shared top is only a wrapper.
module rr_top
  import rr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // combined unit
  input  logic        cu_start,
  input  op_e         cu_op,
  input  logic        cu_ed,
  input  logic        cu_exact,
  input  logic [52:0] cu_sig,
  output logic        cu_busy,
  output logic        cu_done,
  output logic [53:0] cu_result,
  // reciprocal unit
  input  logic        ru_start,
  input  logic        ru_exact,
  input  logic [52:0] ru_sig,
  output logic        ru_busy,
  output logic        ru_done,
  output logic [53:0] ru_result
);
  rr_combined_unit u_cu (
    .clk, .rst_n, .start(cu_start), .op(cu_op), .ed(cu_ed), .exact(cu_exact),
    .sig(cu_sig), .busy(cu_busy), .done(cu_done), .result(cu_result)
  );

  rr_recip_unit u_ru (
    .clk, .rst_n, .start(ru_start), .exact(ru_exact), .sig(ru_sig),
    .busy(ru_busy), .done(ru_done), .result(ru_result)
  );
endmodule
