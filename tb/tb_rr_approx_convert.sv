// tb_rr_approx_convert: drives the approximation window through G+1 digit
// extractions. Each cycle the window is 16 X + T, where X is the reduced window
// the block returned (its top bits plus the low bits of the two words) and T a
// random term in (-16, 16); the window is presented as a random sum/carry
// split. The testbench tracks H = 16 H + T exactly and expects the result
// floor(H/16 + 1/2) in units of 2^-52. It also checks that each reduced window
// equals the window less 16 times the digit and stays in [-12, 8), and that the
// rounding check flags exactly the final windows -9 <= X < -7.75 and X >= 7.
// A second instance with the extra rounded digit (TAIL) must return
// floor(H + 1/2) and flag the windows whose fraction lies in [1/32, 1/2).
module tb_rr_approx_convert;
  localparam int FRAC = 57, NW = 66, TW = NW - FRAC - 2, G = 14;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [NW-1:0] hs, hc;
  logic [TW-1:0] xtop;
  logic signed [4:0] t;
  logic [53:0] res, res_t;
  logic hard, hard_t;
  int checks = 0, failures = 0, n_rdn = 0, n_hard = 0, n_hard_t = 0;

  rr_approx_convert dut (.*);
  // the same window converted with the extra rounded digit
  rr_approx_convert #(.TAIL(1'b1)) dut_t (
    .clk, .rst_n, .load, .en, .hs, .hc, .xtop(), .t(), .res(res_t), .hard(hard_t)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [159:0] h, y, x, tt, one, expv, fr;
    logic eh;
    one = 160'(1) << FRAC;
    hs = '0; hc = '0;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 300; run++) begin
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      h = one + 160'({$urandom, $urandom}) % (2 * one);      // H0 in [1, 3)
      y = h;
      for (int k = 0; k <= G; k++) begin
        hs = NW'({$urandom, $urandom, $urandom});
        hc = NW'(y) - hs;
        #1;
        x = 160'($signed({xtop, hs[FRAC+1:0]})) + 160'(hc[FRAC+1:0]);
        checks += 2;
        if (x != y - 16 * 160'(t) * one) begin
          failures++; $display("FAIL window run %0d k %0d", run, k);
        end
        if (x < -12 * one || x >= 8 * one) begin
          failures++; $display("FAIL range run %0d k %0d", run, k);
        end
        if (k == G) break;
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        tt = $signed(160'({$urandom, $urandom, $urandom}) % (32 * one)) - 16 * one;
        h = 16 * h + tt;
        y = 16 * x + tt;
      end
      expv = (h + 8 * one) >>> (FRAC + 4);
      if (x < -8 * one) n_rdn++;
      checks++;
      if (res != 54'(expv)) begin
        failures++;
        $display("FAIL run %0d got %h exp %h", run, res, 54'(expv));
      end
      // rounding check: -9 <= X < -7.75 or X >= 7 (units of the window)
      eh = (4 * x >= -36 * one && 4 * x < -31 * one) || x >= 7 * one;
      n_hard += int'(eh);
      checks++;
      if (hard != eh) begin failures++; $display("FAIL hard run %0d", run); end
      // extra digit: result = round(h), check when the fraction of X is in [1/32, 1/2)
      expv = (h + (one >>> 1)) >>> FRAC;
      fr = x & (one - 1);
      eh = fr >= (one >>> 5) && fr < (one >>> 1);
      n_hard_t += int'(eh);
      checks += 2;
      if (res_t != 54'(expv)) begin
        failures++;
        $display("FAIL tail run %0d got %h exp %h", run, res_t, 54'(expv));
      end
      if (hard_t != eh) begin failures++; $display("FAIL tail hard run %0d", run); end
    end
    checks++; if (n_rdn == 0 || n_hard == 0 || n_hard_t == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
