// tb_rr_combined_unit: end-to-end test of the combined reciprocal /
// square-root reciprocal unit at its default parameters.
//
// Drives random and corner-case significands in all four modes (reciprocal or
// square-root reciprocal, approximation or exact digit-by-digit result) and
// compares the result with the round-to-nearest value worked out here with
// wide integer arithmetic: 2^106/sig for the reciprocal and an integer square
// root for the square-root reciprocal. Reciprocals must match bit for bit;
// square-root reciprocals must be within one unit in the last place, and the
// number of correctly rounded results is reported. The latency from the start
// edge to `done` is checked (15 cycles, 29 in exact mode, 30 when an
// approximation falls back to the digit-by-digit result), and each mechanism
// (both operations, both modes, all four initial-value branches, negative
// digits, rounding down and up, the fallback) must occur at least once.
module tb_rr_combined_unit;
  import rr_pkg::*;

  localparam int NRAND = 400;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  op_e         op = OP_RECIP;
  logic        ed = 1'b0;
  logic        exact = 1'b0;
  logic [52:0] sig = '0;
  logic        busy, done;
  logic [53:0] result;

  int checks = 0, failures = 0;
  int n_exact_rn [4];
  int n_tests [4];
  int c_recip = 0, c_rsqrt = 0, c_approx = 0, c_exact = 0;
  int c_init [4];
  int c_negdig = 0, c_rdn = 0, c_rup = 0, c_fb = 0;

  rr_combined_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // negative digits entering the conversion registers
  always @(posedge clk) if (dut.en && dut.p < 0) c_negdig++;

  // floor(sqrt(n)) by bit-wise search
  function automatic logic [199:0] isqrt(input logic [399:0] n);
    logic [199:0] r = '0;
    for (int b = 199; b >= 0; b--) begin
      logic [199:0] c = r | (200'(1) << b);
      if (400'(c) * 400'(c) <= n) r = c;
    end
    return r;
  endfunction

  function automatic logic [53:0] expected(input op_e o, input logic e, input logic [52:0] s);
    logic [399:0] num;
    logic [199:0] z;
    if (o == OP_RECIP) begin
      num = (400'(1) << 106) / 400'(s);       // 2 * result * 2^52
      return 54'((num + 1) >> 1);
    end
    // result*2^52*2^8 = sqrt(2^(157+16)/sig) (ed=1) or sqrt(2^(158+16)/sig)
    num = (400'(1) << (e ? 173 : 174)) / 400'(s);
    z   = isqrt(num);
    return 54'((z + 128) >> 8);
  endfunction

  task automatic run_one(input op_e o, input logic e, input logic x, input logic [52:0] s);
    int cyc;
    logic [53:0] exp_v;
    int mode;
    logic fb;
    @(negedge clk);
    op = o; ed = e; exact = x; sig = s; start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    exp_v = expected(o, e, s);
    fb = !x && dut.exact_q;
    if (fb) c_fb++;
    mode = 2 * int'(o) + int'(x);
    n_tests[mode]++;
    // latency
    checks++;
    if (cyc != (x ? 29 : fb ? 30 : 15)) begin
      failures++;
      $display("FAIL latency %0d mode %0d", cyc, mode);
    end
    // value
    checks++;
    if (result == exp_v) n_exact_rn[mode]++;
    if (o == OP_RECIP ? (result != exp_v)
        : (result > exp_v + 1 || result + 1 < exp_v)) begin
      failures++;
      $display("FAIL op=%0d ed=%0d exact=%0d sig=%h got=%h exp=%h", o, e, x, s, result, exp_v);
    end
    if (o == OP_RECIP) c_recip++; else c_rsqrt++;
    if (x) c_exact++; else c_approx++;
    if (x && dut.u_conv.rbit) c_rup++;
    if (!x && dut.u_aconv.rdn) c_rdn++;
    c_init[2 * int'(o) + int'(dut.u_init.p0 == 2'd2)]++;
  endtask

  initial begin
    logic [52:0] s;
    foreach (n_tests[i]) begin n_tests[i] = 0; n_exact_rn[i] = 0; c_init[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // corner cases
    for (int m = 0; m < 4; m++) begin
      run_one(op_e'(m >> 1), 1'b0, m[0], 53'h10_0000_0000_0000);
      run_one(op_e'(m >> 1), 1'b1, m[0], 53'h10_0000_0000_0000);
      run_one(op_e'(m >> 1), 1'b0, m[0], 53'h1F_FFFF_FFFF_FFFF);
      run_one(op_e'(m >> 1), 1'b1, m[0], 53'h1F_FFFF_FFFF_FFFF);
      run_one(op_e'(m >> 1), 1'b1, m[0], 53'h18_0000_0000_0000);
    end
    for (int k = 0; k < NRAND; k++) begin
      s = {1'b1, 20'($urandom), 32'($urandom)};
      run_one(op_e'($urandom_range(0, 1)), 1'($urandom), 1'($urandom), s);
    end
    for (int m = 0; m < 4; m++)
      $display("mode op=%0d exact=%0d: %0d results, %0d correctly rounded",
               m >> 1, m & 1, n_tests[m], n_exact_rn[m]);
    $display("events: recip=%0d rsqrt=%0d approx=%0d exact=%0d init(Q0=1)=%0d init(Q0=2)=%0d init(P0=1)=%0d init(P0=2)=%0d neg_digits=%0d round_down=%0d round_up=%0d",
             c_recip, c_rsqrt, c_approx, c_exact, c_init[0], c_init[1], c_init[2], c_init[3],
             c_negdig, c_rdn, c_rup);
    $display("fallbacks to the digit-by-digit result: %0d", c_fb);
    foreach (c_init[i]) begin checks++; if (c_init[i] == 0) failures++; end
    checks++; if (c_recip == 0 || c_rsqrt == 0) failures++;
    checks++; if (c_approx == 0 || c_exact == 0) failures++;
    checks++; if (c_negdig == 0) failures++;
    checks++; if (c_rdn == 0 || c_rup == 0) failures++;
    checks++; if (c_fb == 0) failures++;
    // the approximation must be correctly rounded in the large majority of cases
    checks++; if (n_exact_rn[0] * 10 < n_tests[0] * 9 || n_exact_rn[2] * 10 < n_tests[2] * 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
