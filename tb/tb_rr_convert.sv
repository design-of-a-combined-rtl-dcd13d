// tb_rr_convert: loads a random integer part, shifts in 28 random radix-4
// digits and presents a random final residual split into sum and carry words.
// The expected result is the digit string's value, less one unit when the
// residual is negative, rounded to nearest at 52 fraction bits.
module tb_rr_convert;
  import rr_pkg::*;
  localparam int NW = 66, G = 28;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [1:0] p0;
  digit_t p;
  logic [NW-1:0] ws, wc;
  logic [53:0] res;
  int checks = 0, failures = 0, n_neg = 0, n_up = 0;

  rr_convert dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v;
    logic signed [NW-1:0] w;
    p = '0; ws = '0; wc = '0; p0 = 2'd1;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 300; run++) begin
      @(negedge clk);
      p0 = 2'($urandom_range(1, 2));
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      v = 64'(p0);
      for (int j = 0; j < G; j++) begin
        p = 3'($signed($urandom_range(0, 4)) - 2);
        if (j == 0) p = 3'sd1;
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        v = v * 4 + 64'(p);
      end
      w = $signed(NW'({$urandom, $urandom, $urandom})) >>> 10;
      if (run % 7 == 0) w = '0;
      ws = NW'({$urandom, $urandom, $urandom});
      wc = NW'(w) - ws;
      #1;
      if (w < 0) begin v = v - 1; n_neg++; end
      if (v[3]) n_up++;
      checks++;
      if (res != 54'((v >> 4) + 64'(v[3]))) begin
        failures++;
        $display("FAIL run %0d got %h exp %h", run, res, 54'((v >> 4) + 64'(v[3])));
      end
    end
    checks++; if (n_neg == 0 || n_up == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
