// rr_control: sequencing of the combined unit.
//
// A start request in IDLE or DONE is accepted at a clock edge: `load` is high
// in that cycle, so the initial values and the first digit are registered at
// the edge. The unit then iterates for G cycles (`en` high), where G is
// G_APPROX (approximation result) or G_EXACT (digit-by-digit result, chosen
// with `exact`). In DONE the result is valid and held until the next start.
// With the default 14 iterations `done` rises 15 clock edges after the start
// edge; with 28 iterations, 29.
// In the first DONE cycle of an approximation the converter reports through
// `hard` whether the result can be rounded directly. If not, `done` stays low,
// the mode switches to exact and the remaining G_EXACT - G_APPROX iterations
// run, so `done` rises 30 edges after the start edge.
//
// The cycle count (one initialisation cycle, then the iterations, the last of
// which completes conversion and rounding) follows the published design; the
// state machine and the handshake are this design's own. The fallback for
// results that cannot be rounded directly follows the published method; doing
// the check in an extra cycle is this design's choice.
module rr_control
  import rr_pkg::*;
#(
  parameter int unsigned G_APPROX = G_APPROX_DEF,
  parameter int unsigned G_EXACT  = G_EXACT_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic exact,
  input  logic hard,         // approximation cannot be rounded directly
  output logic load,
  output logic en,
  output logic busy,
  output logic done,
  output logic exact_q      // mode of the operation in progress
);
  typedef enum logic [1:0] {S_IDLE, S_ITER, S_DONE} state_e;

  state_e     state;
  logic [5:0] cnt;
  logic [5:0] last;
  logic       chk;
  logic       fresh;        // first cycle in DONE

  always_comb begin
    chk  = (state == S_DONE) && fresh && hard && !exact_q;
    load = start && (state != S_ITER) && !chk;
    en   = (state == S_ITER);
    busy = (state == S_ITER) || chk;
    done = (state == S_DONE) && !chk;
    last = exact_q ? 6'(G_EXACT - 1) : 6'(G_APPROX - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      exact_q <= 1'b0;
      fresh   <= 1'b0;
    end else if (chk) begin
      // fall back: continue the digit recurrence to G_EXACT iterations
      state   <= S_ITER;
      exact_q <= 1'b1;
      fresh   <= 1'b0;
    end else if (load) begin
      state   <= S_ITER;
      cnt     <= '0;
      exact_q <= exact;
      fresh   <= 1'b0;
    end else if (state == S_ITER) begin
      cnt <= cnt + 6'd1;
      if (cnt == last) begin
        state <= S_DONE;
        fresh <= 1'b1;
      end
    end else begin
      fresh <= 1'b0;
    end
  end
endmodule
