// tb_rr_otf_conv: feeds random signed-digit strings to the on-the-fly
// converter in radix 4 and radix 16 and checks after every digit that Q equals
// init * r^j + sum of digits * r^(j-i) and that QM equals Q - 1, modulo 2^W.
module tb_rr_otf_conv;
  localparam int W4 = 58, W16 = 60;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [W4-1:0]  init4;
  logic signed [2:0] t4;
  logic signed [4:0] t16;
  logic [W4-1:0]  q4, qm4, qn4, qmn4;
  logic [W16-1:0] q16, qm16, qn16, qmn16;
  int checks = 0, failures = 0;

  rr_otf_conv #(.LOGR(2), .W(W4)) dut4 (
    .clk, .rst_n, .load, .init(init4), .en, .t(t4), .q(q4), .qm(qm4), .q_nx(qn4), .qm_nx(qmn4));
  rr_otf_conv #(.LOGR(4), .W(W16)) dut16 (
    .clk, .rst_n, .load, .init('0), .en, .t(t16), .q(q16), .qm(qm16), .q_nx(qn16), .qm_nx(qmn16));

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W4-1:0] v4;
    logic [W16-1:0] v16;
    t4 = '0; t16 = '0; init4 = '0;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      @(negedge clk);
      init4 = W4'($urandom_range(1, 2));
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      v4 = init4; v16 = '0;
      for (int j = 0; j < 28; j++) begin
        t4 = 3'($signed($urandom_range(0, 4)) - 2);
        t16 = 5'($signed($urandom_range(0, 30)) - 15);
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        v4 = W4'(v4 * 4 + W4'(t4));
        v16 = W16'(v16 * 16 + W16'(t16));
        checks += 4;
        if (q4 != v4) begin failures++; $display("FAIL q4 run %0d j %0d", run, j); end
        if (qm4 != W4'(v4 - 1)) begin failures++; $display("FAIL qm4 run %0d j %0d", run, j); end
        if (q16 != v16) begin failures++; $display("FAIL q16 run %0d j %0d", run, j); end
        if (qm16 != W16'(v16 - 1)) begin failures++; $display("FAIL qm16 run %0d j %0d", run, j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
