// tb_rr_recip_approx_recurrence: runs the reciprocal unit's approximation
// datapath next to its digit-by-digit datapath (which supplies the digits,
// w[j] and the multiple -q d) on random divisors. The testbench takes a
// radix-16 digit off the top of REG E every cycle, as the converter would, and
// feeds back the reduced window. It evaluates
//   E[j+1] = 16 E[j] + q (8 w[j] - q d)
// in exact wide integer arithmetic and checks after every iteration that the
// window plus everything taken off equals E[j]. After 14 iterations E/16^13
// must be within 2^-51 of 1/d.
module tb_rr_recip_approx_recurrence;
  import rr_pkg::*;
  localparam int FRAC = 57, NW = 66, TW = NW - FRAC - 2, G = 14;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [NW-1:0] d0, ws, wc, qd, es, ec;
  logic qd_ci;
  logic [TW-1:0] xtop;
  digit_t q;
  int checks = 0, failures = 0;

  rr_recip_digit_recurrence u_dig (.clk, .rst_n, .load, .en, .d0, .ws, .wc, .q, .qd, .qd_ci);
  rr_recip_approx_recurrence dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [255:0] one, dd, e, ext, y, low, x, tq, wj, qv, tot;
    logic [52:0] sig;
    one = 256'(1) << FRAC;
    d0 = '0; xtop = '0;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 200; run++) begin
      sig = {1'b1, 20'($urandom), 32'($urandom)};
      dd = 256'(sig) << (FRAC - 53);
      d0 = NW'(dd);
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      ext = 0;
      e = 0;
      for (int j = 0; j <= G; j++) begin
        y = 256'($signed(NW'(es + ec)));
        checks++;
        if (y + ext != e) begin failures++; $display("FAIL E run %0d j %0d", run, j); end
        if (j == G) break;
        low = 256'(es[FRAC+1:0]) + 256'(ec[FRAC+1:0]);
        tq = (y + 8 * one) >>> (FRAC + 4);
        x = y - 16 * tq * one;
        xtop = TW'((x - low) >>> (FRAC + 2));
        ext = 16 * (ext + 16 * tq * one);
        #1;
        wj = 256'($signed(NW'(ws + wc)));
        qv = 256'(q);
        e = 16 * e + qv * (8 * wj) - qv * qv * dd;
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
      end
      // E / 16^(G-1) approximates 1/d
      tot = e * dd - (256'(1) << (4 * (G - 1) + 2 * FRAC));
      checks++;
      if (tot < 0) tot = -tot;
      if (tot > (256'(1) << (4 * (G - 1) + 2 * FRAC - 51))) begin
        failures++; $display("FAIL accuracy run %0d", run);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
