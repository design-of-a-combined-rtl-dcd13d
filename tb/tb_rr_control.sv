// tb_rr_control: checks the sequencing: `load` only with an accepted start,
// exactly G cycles with `en` (14, or 28 in exact mode), `done` 15 (29) edges
// after the start edge and held until the next start, and starts ignored
// while busy. `hard` is driven at random: an approximation with `hard` set
// must fall back to 28 iterations and finish after 30 edges in exact mode.
module tb_rr_control;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, exact = 1'b0, hard = 1'b0;
  logic load, en, busy, done, exact_q;
  int checks = 0, failures = 0;

  rr_control dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_en, cyc, fb, n_fb = 0;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      exact = 1'($urandom);
      hard = 1'($urandom);
      fb = (!exact && hard) ? 1 : 0;
      n_fb += fb;
      start = 1'b1;
      #1;
      checks++; if (!load) begin failures++; $display("FAIL no load"); end
      @(posedge clk);
      @(negedge clk);
      start = 1'($urandom);        // a start while busy must be ignored
      n_en = 0; cyc = 1;
      while (!done) begin
        #1;
        if (load) begin failures++; $display("FAIL load while busy"); end
        if (en) n_en++;
        @(posedge clk);
        @(negedge clk);
        cyc++;
        start = 1'($urandom);
        if (cyc > 100) break;
      end
      start = 1'b0;
      checks += 2;
      if (n_en != ((exact || fb) ? 28 : 14)) begin failures++; $display("FAIL en count %0d", n_en); end
      if (cyc != (exact ? 29 : fb ? 30 : 15)) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (exact_q != (exact || fb)) begin failures++; $display("FAIL mode after fallback"); end
      repeat (3) @(negedge clk);
      checks++;
      if (!done || en) begin failures++; $display("FAIL done not held"); end
    end
    checks++; if (n_fb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
