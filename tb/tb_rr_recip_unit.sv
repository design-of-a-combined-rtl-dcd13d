// tb_rr_recip_unit: end-to-end test of the reciprocal unit at its default
// parameters.
//
// Drives corner-case and random significands in both modes and compares the
// result with 1/d rounded to nearest, worked out here with wide integer
// arithmetic (2^106 / sig). Every result must match bit for bit: an
// approximation that cannot be rounded directly falls back to the
// digit-by-digit result. The latency from the start edge to `done` is checked
// (15 cycles, 29 in exact mode, 30 after a fallback), and each mechanism (both
// first digits, negative digits, a negative and a positive final rounded
// digit of the approximation, rounding up in exact mode, a negative final
// residual, a fallback and a direct rounding) must occur at least once.
module tb_rr_recip_unit;
  import rr_pkg::*;

  localparam int NRAND = 300;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        exact = 1'b0;
  logic [52:0] sig = '0;
  logic        busy, done;
  logic [53:0] result;

  int checks = 0, failures = 0;
  int n_tests [2];
  int n_rn [2];
  int c_q1 [3];
  int c_negdig = 0, c_tneg = 0, c_tpos = 0, c_rup = 0, c_wneg = 0, c_fb = 0;

  rr_recip_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.en && dut.q < 0) c_negdig++;

  function automatic logic [53:0] expected(input logic [52:0] s);
    logic [119:0] num;
    num = (120'(1) << 106) / 120'(s);       // 2 * result * 2^52
    return 54'((num + 1) >> 1);
  endfunction

  task automatic run_one(input logic x, input logic [52:0] s);
    int cyc;
    logic [53:0] exp_v;
    logic fb;
    @(negedge clk);
    exact = x; sig = s; start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    if (dut.q == 3'sd1) c_q1[1]++;
    else if (dut.q == 3'sd2) c_q1[2]++;
    else c_q1[0]++;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    exp_v = expected(s);
    fb = !x && dut.exact_q;
    if (fb) c_fb++;
    n_tests[x]++;
    checks++;
    if (cyc != (x ? 29 : fb ? 30 : 15)) begin
      failures++;
      $display("FAIL latency %0d exact=%0d", cyc, x);
    end
    checks++;
    if (result == exp_v) n_rn[x]++;
    if (result != exp_v) begin
      failures++;
      $display("FAIL exact=%0d sig=%h got=%h exp=%h", x, s, result, exp_v);
    end
    if (x) begin
      if (dut.u_conv.rbit) c_rup++;
      if (dut.u_conv.neg) c_wneg++;
    end else if (!fb) begin
      if (dut.u_aconv.tl < 0) c_tneg++;
      if (dut.u_aconv.tl > 0) c_tpos++;
    end
  endtask

  initial begin
    logic [52:0] s;
    foreach (n_tests[i]) begin n_tests[i] = 0; n_rn[i] = 0; end
    foreach (c_q1[i]) c_q1[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int x = 0; x < 2; x++) begin
      run_one(1'(x), 53'h10_0000_0000_0000);       // d = 1/2
      run_one(1'(x), 53'h10_0000_0000_0001);
      run_one(1'(x), 53'h17_FFFF_FFFF_FFFF);       // just below d = 3/4
      run_one(1'(x), 53'h18_0000_0000_0000);       // d = 3/4
      run_one(1'(x), 53'h1F_FFFF_FFFF_FFFF);       // largest d
    end
    for (int k = 0; k < NRAND; k++) begin
      s = {1'b1, 20'($urandom), 32'($urandom)};
      run_one(1'($urandom), s);
    end
    $display("approximation: %0d results, %0d correctly rounded", n_tests[0], n_rn[0]);
    $display("exact:         %0d results, %0d correctly rounded", n_tests[1], n_rn[1]);
    $display("fallbacks to the digit-by-digit result: %0d", c_fb);
    $display("events: q1=1 %0d q1=2 %0d other %0d neg_digits=%0d tail<0 %0d tail>0 %0d round_up=%0d neg_residual=%0d",
             c_q1[1], c_q1[2], c_q1[0], c_negdig, c_tneg, c_tpos, c_rup, c_wneg);
    checks++; if (c_q1[1] == 0 || c_q1[2] == 0 || c_q1[0] != 0) failures++;
    checks++; if (c_negdig == 0) failures++;
    checks++; if (c_tneg == 0 || c_tpos == 0) failures++;
    checks++; if (c_rup == 0 || c_wneg == 0) failures++;
    checks++; if (c_fb == 0 || c_fb == n_tests[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
