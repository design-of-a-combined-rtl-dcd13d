// tb_rr_digit_recurrence: runs the digit-by-digit datapath for 28 iterations
// from initial values formed here, for random operands of both operations.
// Reciprocal: after every iteration the carry-save residual must equal
// 4^j (1 - d Q[j]) exactly and D must stay d. Square-root reciprocal: D must
// track d P[j] to within a few units of the last place, and the final P[28]
// must lie within 2 units of 4^-28 of 1/sqrt(d) (integer square root here).
// In both cases the residual must stay inside (-1, 1).
module tb_rr_digit_recurrence;
  import rr_pkg::*;
  localparam int FRAC = 57, NW = 66, G = 28;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [NW-1:0] w0, d0, c0, ws, wc, d, wn_s, wn_c;
  digit_t p;
  int checks = 0, failures = 0;

  rr_digit_recurrence dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [199:0] isqrt(input logic [399:0] n);
    logic [199:0] r = '0;
    for (int b = 199; b >= 0; b--) begin
      logic [199:0] c = r | (200'(1) << b);
      if (400'(c) * 400'(c) <= n) r = c;
    end
    return r;
  endfunction

  initial begin
    logic signed [199:0] one, dd, pint, wv, dv, err, z, pw;
    logic [52:0] sig;
    op_e op;
    logic e;
    one = 200'(1) << FRAC;
    w0 = '0; d0 = '0; c0 = '0;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 200; run++) begin
      sig = {1'b1, 20'($urandom), 32'($urandom)};
      op = op_e'(run % 2);
      e = 1'($urandom);
      dd = (op == OP_RECIP || e) ? (200'(sig) << (FRAC - 53)) : (200'(sig) << (FRAC - 54));
      if (op == OP_RECIP) begin
        pint = (4 * dd >= 3 * one) ? 1 : 2;
        w0 = NW'(one - pint * dd);
        d0 = NW'(dd);
        c0 = '0;
      end else begin
        pint = e ? 1 : 2;
        w0 = NW'((one - pint * pint * dd) >>> 1);
        d0 = NW'(pint * dd);
        c0 = NW'(dd >>> 3);
      end
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      pw = 1;
      for (int j = 1; j <= G; j++) begin
        pint = pint * 4 + 200'(p);
        pw = pw * 4;
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        wv = 200'($signed(NW'(ws + wc)));
        dv = 200'(d);
        checks++;
        if (wv >= one || wv <= -one) begin failures++; $display("FAIL residual bound run %0d j %0d", run, j); end
        if (op == OP_RECIP) begin
          checks += 2;
          if (wv != pw * one - dd * pint) begin failures++; $display("FAIL residual run %0d j %0d", run, j); end
          if (dv != dd) begin failures++; $display("FAIL D run %0d", run); end
        end else begin
          err = dv - (dd * pint) / pw;
          checks++;
          if (err > 64 || err < -64) begin failures++; $display("FAIL D run %0d j %0d err %0d", run, j, err); end
        end
      end
      if (op == OP_RSQRT) begin
        z = 200'(isqrt((400'(1) << (e ? 165 : 166)) / 400'(sig)));
        checks++;
        if (pint - z > 2 || z - pint > 2) begin
          failures++; $display("FAIL P run %0d P=%h z=%h", run, pint, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
