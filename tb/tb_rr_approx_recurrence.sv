// tb_rr_approx_recurrence: runs the approximation datapath next to the
// digit-by-digit datapath (which supplies the digits, w[j], w[j+1] and D[j])
// for random operands of both operations. The testbench takes a radix-16 digit
// off the top of REG H every cycle, as the converter would, and feeds back the
// reduced window. It evaluates
//   H[j+1] = 16 H[j] + p (8 w[j] - p D' + op p w[j+1]),  D' = D/2 or D,
// in exact wide integer arithmetic and checks after every iteration that the
// window plus everything taken off equals H[j]. After 14 iterations H/16^14
// must be within 2^-50 of 1/d (reciprocal).
module tb_rr_approx_recurrence;
  import rr_pkg::*;
  localparam int FRAC = 57, NW = 66, TW = NW - FRAC - 2, G = 14;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  op_e op;
  logic [NW-1:0] w0, d0, c0, h0, ws, wc, d, wn_s, wn_c, hs, hc;
  logic [TW-1:0] xtop;
  digit_t p;
  int checks = 0, failures = 0;

  rr_digit_recurrence u_dig (.clk, .rst_n, .load, .en, .w0, .d0, .c0, .ws, .wc, .d, .p, .wn_s, .wn_c);
  rr_approx_recurrence dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [255:0] one, dd, p0, h, ext, y, low, x, tq, wj, wj1, dj, dp, pv, tot;
    logic [52:0] sig;
    logic e;
    one = 256'(1) << FRAC;
    w0 = '0; d0 = '0; c0 = '0; h0 = '0; xtop = '0; op = OP_RECIP;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 200; run++) begin
      sig = {1'b1, 20'($urandom), 32'($urandom)};
      op = op_e'(run % 2);
      e = 1'($urandom);
      dd = (op == OP_RECIP || e) ? (256'(sig) << (FRAC - 53)) : (256'(sig) << (FRAC - 54));
      if (op == OP_RECIP) begin
        p0 = (4 * dd >= 3 * one) ? 1 : 2;
        w0 = NW'(one - p0 * dd); d0 = NW'(dd); c0 = '0;
        h = p0 * (2 * one - p0 * dd);
      end else begin
        p0 = e ? 1 : 2;
        w0 = NW'((one - p0 * p0 * dd) >>> 1); d0 = NW'(p0 * dd); c0 = NW'(dd >>> 3);
        h = (p0 * (3 * one - p0 * p0 * dd)) >>> 1;
      end
      h0 = NW'(h);
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      ext = 0;
      for (int j = 0; j <= G; j++) begin
        y = 256'($signed(NW'(hs + hc)));
        checks++;
        if (y + ext != h) begin failures++; $display("FAIL H run %0d j %0d", run, j); end
        if (j == G) break;
        // take a digit off the top (weight 16) and feed back the rest
        low = 256'(hs[FRAC+1:0]) + 256'(hc[FRAC+1:0]);
        tq = (y + 8 * one) >>> (FRAC + 4);
        x = y - 16 * tq * one;
        xtop = TW'((x - low) >>> (FRAC + 2));
        ext = 16 * (ext + 16 * tq * one);
        // reference recurrence from the digit datapath's values
        #1;
        wj = 256'($signed(NW'(ws + wc)));
        wj1 = 256'($signed(NW'(wn_s + wn_c)));
        dj = 256'($signed(d));
        dp = (op == OP_RSQRT) ? (dj >>> 1) : dj;
        pv = 256'(p);
        h = 16 * h + pv * (8 * wj) - pv * pv * dp + ((op == OP_RSQRT) ? pv * wj1 : 0);
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
      end
      if (op == OP_RECIP) begin
        // H / 16^G approximates 1/d: |H d - 16^G one^2| small
        tot = h * dd - (256'(1) << (4 * G + 2 * FRAC));
        checks++;
        if (tot < 0) tot = -tot;
        if (tot > (256'(1) << (4 * G + 2 * FRAC - 50))) begin
          failures++; $display("FAIL accuracy run %0d", run);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
