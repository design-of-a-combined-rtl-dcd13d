// tb_rr_top: end-to-end test of both units at their default parameters,
// running at the same time.
//
// Two threads drive the combined unit and the reciprocal unit independently
// with random significands in every mode. Each result is compared with the
// value rounded to nearest, worked out here with wide integer arithmetic
// (2^106 / sig, and an integer square root for the square-root reciprocal).
// Reciprocals must match bit for bit; square-root reciprocals must be within
// one unit in the last place. The latency (15 cycles, 29 in exact mode, 30
// after a fallback) is checked for every operation. Each mechanism must occur at least
// once: both operations and both modes of the combined unit, both modes of
// the reciprocal unit, both values of the first integer part or digit in each
// unit, negative digits in each unit, both units busy at the same time, and a
// fallback to the digit-by-digit result.
module tb_rr_top;
  import rr_pkg::*;

  localparam int NRAND = 60;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cu_start = 1'b0, cu_ed = 1'b0, cu_exact = 1'b0;
  op_e         cu_op = OP_RECIP;
  logic [52:0] cu_sig = '0;
  logic        cu_busy, cu_done;
  logic [53:0] cu_result;
  logic        ru_start = 1'b0, ru_exact = 1'b0;
  logic [52:0] ru_sig = '0;
  logic        ru_busy, ru_done;
  logic [53:0] ru_result;

  int checks = 0, failures = 0;
  int c_cu_mode [4];
  int c_ru_mode [2];
  int c_cu_p0 [2];
  int c_ru_q1 [2];
  int c_cu_neg = 0, c_ru_neg = 0, c_both = 0;
  int n_rn = 0, n_res = 0;

  rr_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.u_cu.en && dut.u_cu.p < 0) c_cu_neg++;
    if (dut.u_ru.en && dut.u_ru.q < 0) c_ru_neg++;
    if (cu_busy && ru_busy) c_both++;
  end

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
    if (o == OP_RECIP) begin
      num = (400'(1) << 106) / 400'(s);
      return 54'((num + 1) >> 1);
    end
    num = (400'(1) << (e ? 173 : 174)) / 400'(s);
    return 54'((isqrt(num) + 128) >> 8);
  endfunction

  int c_fb = 0;

  function automatic void check(input string u, input op_e o, input logic e, input logic x,
                                input logic fb, input logic [52:0] s, input logic [53:0] r,
                                input int cyc);
    logic [53:0] ev;
    ev = expected(o, e, s);
    checks += 2;
    if (fb) c_fb++;
    if (cyc != (x ? 29 : fb ? 30 : 15)) begin
      failures++;
      $display("FAIL %s latency %0d", u, cyc);
    end
    n_res++;
    if (r == ev) n_rn++;
    if (o == OP_RECIP ? (r != ev) : (r > ev + 1 || r + 1 < ev)) begin
      failures++;
      $display("FAIL %s op=%0d ed=%0d exact=%0d sig=%h got=%h exp=%h", u, o, e, x, s, r, ev);
    end
  endfunction

  task automatic run_cu();
    for (int k = 0; k < NRAND; k++) begin
      op_e o;
      logic e, x;
      logic [52:0] s;
      int cyc;
      o = op_e'(k % 2);
      x = 1'(k / 2);
      e = 1'($urandom);
      s = {1'b1, 20'($urandom), 32'($urandom)};
      @(negedge clk);
      cu_op = o; cu_ed = e; cu_exact = x; cu_sig = s; cu_start = 1'b1;
      @(posedge clk);
      #1 cu_start = 1'b0;
      c_cu_p0[int'(dut.u_cu.u_init.p0 == 2'd2)]++;
      cyc = 1;
      while (!cu_done) begin @(posedge clk); #1 cyc++; end
      c_cu_mode[2 * int'(o) + int'(x)]++;
      check("combined", o, e, x, !x && dut.u_cu.exact_q, s, cu_result, cyc);
    end
  endtask

  task automatic run_ru();
    for (int k = 0; k < NRAND; k++) begin
      logic x;
      logic [52:0] s;
      int cyc;
      x = 1'(k % 2);
      s = {1'b1, 20'($urandom), 32'($urandom)};
      @(negedge clk);
      ru_exact = x; ru_sig = s; ru_start = 1'b1;
      @(posedge clk);
      #1 ru_start = 1'b0;
      c_ru_q1[int'(dut.u_ru.q == 3'sd2)]++;
      cyc = 1;
      while (!ru_done) begin @(posedge clk); #1 cyc++; end
      c_ru_mode[int'(x)]++;
      check("reciprocal", OP_RECIP, 1'b0, x, !x && dut.u_ru.exact_q, s, ru_result, cyc);
    end
  endtask

  initial begin
    foreach (c_cu_mode[i]) c_cu_mode[i] = 0;
    foreach (c_ru_mode[i]) c_ru_mode[i] = 0;
    foreach (c_cu_p0[i]) c_cu_p0[i] = 0;
    foreach (c_ru_q1[i]) c_ru_q1[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      run_cu();
      run_ru();
    join
    $display("%0d results, %0d correctly rounded", n_res, n_rn);
    $display("events: cu modes %0d %0d %0d %0d, ru modes %0d %0d, cu P0/Q0=1 %0d =2 %0d, ru q1=1 %0d q1=2 %0d, neg digits cu %0d ru %0d, both busy %0d",
             c_cu_mode[0], c_cu_mode[1], c_cu_mode[2], c_cu_mode[3], c_ru_mode[0], c_ru_mode[1],
             c_cu_p0[0], c_cu_p0[1], c_ru_q1[0], c_ru_q1[1], c_cu_neg, c_ru_neg, c_both);
    foreach (c_cu_mode[i]) begin checks++; if (c_cu_mode[i] == 0) failures++; end
    foreach (c_ru_mode[i]) begin checks++; if (c_ru_mode[i] == 0) failures++; end
    foreach (c_cu_p0[i]) begin checks++; if (c_cu_p0[i] == 0) failures++; end
    foreach (c_ru_q1[i]) begin checks++; if (c_ru_q1[i] == 0) failures++; end
    checks++; if (c_cu_neg == 0 || c_ru_neg == 0) failures++;
    checks++; if (c_both == 0) failures++;
    checks++; if (c_fb == 0) failures++;
    $display("fallbacks: %0d", c_fb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
