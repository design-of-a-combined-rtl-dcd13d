// tb_rr_recip_digit_recurrence: runs the reciprocal digit recurrence for 28
// iterations on random divisors and on the ends of [1/2, 1). After every
// iteration the carry-save residual must equal 4^j (1/4 - d Q[j]) exactly,
// where Q[j] is built here from the digits the block selected, and must stay
// within 2/3 d in magnitude (the bound that makes the selection valid). The
// shared multiple must equal -q d, and after 28 digits Q must lie within
// 4^-28 of 1/(4d).
module tb_rr_recip_digit_recurrence;
  import rr_pkg::*;
  localparam int FRAC = 57, NW = 66;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [NW-1:0] d0, ws, wc, qd;
  logic qd_ci;
  digit_t q;
  int checks = 0, failures = 0;
  int c_neg = 0;

  rr_recip_digit_recurrence dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [255:0] one, dd, qq, w, wexp, m, err;
    logic [52:0] sig;
    one = 256'(1) << FRAC;
    d0 = '0;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 400; run++) begin
      sig = (run == 0) ? 53'h10_0000_0000_0000 : (run == 1) ? 53'h1F_FFFF_FFFF_FFFF
          : {1'b1, 20'($urandom), 32'($urandom)};
      dd = 256'(sig) << (FRAC - 53);
      d0 = NW'(dd);
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      qq = 0;
      for (int j = 0; j <= 28; j++) begin
        // w[j] = 4^j (1/4 - d Q[j]), Q[j] = qq / 4^j
        w = 256'($signed(NW'(ws + wc)));
        wexp = (256'(1) << (2 * j)) * (one >>> 2) - dd * qq;
        checks++;
        if (w != wexp) begin failures++; $display("FAIL w run %0d j %0d", run, j); end
        checks++;
        if (3 * (w < 0 ? -w : w) > 2 * dd) begin failures++; $display("FAIL bound run %0d j %0d", run, j); end
        if (j == 28) break;
        m = 256'($signed(NW'(qd + NW'(qd_ci))));
        checks++;
        if (m != -256'(q) * dd) begin failures++; $display("FAIL qd run %0d j %0d", run, j); end
        if (q < 0) c_neg++;
        qq = 4 * qq + 256'(q);
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
      end
      // |Q - 1/(4d)| <= 4^-28 * 2/3 / 4 ... checked as |4 d qq - 4^28| <= 4^28 * 4^-28 * 8/3 * d
      err = 4 * dd * qq - (256'(1) << (56 + FRAC));
      checks++;
      if (3 * (err < 0 ? -err : err) > 8 * dd) begin failures++; $display("FAIL result run %0d", run); end
    end
    checks++; if (c_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
