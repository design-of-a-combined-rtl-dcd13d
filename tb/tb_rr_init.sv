// tb_rr_init: checks the initial values for both operations over random and
// boundary significands. The expected values are formed with multiplications
// of the operand by the integer first approximation and compared exactly, and
// the identities w0 = (1 - d P0^2)/2, H0 = P0 (3 - d P0^2)/2 (square-root
// reciprocal) and w0 = 1 - d Q0, H0 = Q0 (2 - d Q0) (reciprocal) are checked
// in wide integer arithmetic scaled by 2^(2*FRAC).
module tb_rr_init;
  import rr_pkg::*;
  localparam int FRAC = 57, NW = 66;
  logic [52:0] sig;
  op_e op;
  logic ed;
  logic [NW-1:0] w0, d0, c0, h0;
  logic [1:0] p0;
  int checks = 0, failures = 0;
  int br [4];

  rr_init dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic signed [NW+1:0] got, input logic signed [NW+1:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s op=%0d ed=%0d sig=%h got=%h exp=%h", what, op, ed, sig, got, exp);
    end
  endtask

  initial begin
    logic signed [NW+1:0] one, d, pp, expw, exph;
    one = (NW+2)'(1) << FRAC;
    foreach (br[i]) br[i] = 0;
    for (int k = 0; k < 3000; k++) begin
      sig = {1'b1, 20'($urandom), 32'($urandom)};
      if (k == 0) sig = 53'h10_0000_0000_0000;
      if (k == 1) sig = 53'h1F_FFFF_FFFF_FFFF;
      if (k == 2) sig = 53'h18_0000_0000_0000;   // d = 3/4 exactly
      op = op_e'($urandom_range(0, 1));
      ed = 1'($urandom);
      #1;
      // d with FRAC fraction bits: sig has 52
      d = (op == OP_RECIP || ed) ? ((NW+2)'(sig) << (FRAC - 53)) : ((NW+2)'(sig) << (FRAC - 54));
      if (op == OP_RECIP) begin
        pp = (4 * d >= 3 * one) ? 1 : 2;
        expw = one - pp * d;
        exph = pp * (2 * one - pp * d);
        check("c0", $signed({2'b00, c0}), 0);
        check("d0", $signed({2'b00, d0}), d);
      end else begin
        pp = ed ? 1 : 2;
        expw = (one - pp * pp * d) / 2;
        exph = (pp * (3 * one - pp * pp * d)) / 2;
        check("c0", $signed({2'b00, c0}), d / 8);
        check("d0", $signed({2'b00, d0}), pp * d);
      end
      br[2 * int'(op) + int'(pp == 2)]++;
      check("p0", (NW+2)'(p0), pp);
      check("w0", (NW+2)'($signed(w0)), expw);
      check("h0", (NW+2)'($signed(h0)), exph);
    end
    foreach (br[i]) begin checks++; if (br[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
