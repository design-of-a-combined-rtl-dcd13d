// tb_rr_csa32: random test of the 3-2 carry-save adder. Checks that the sum
// and carry words add up to a + b + c + cin modulo 2^W.
module tb_rr_csa32;
  localparam int W = 66;
  logic [W-1:0] a, b, c, s, cy;
  logic cin;
  int checks = 0, failures = 0;

  rr_csa32 #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      a = {$urandom, $urandom, $urandom}; b = {$urandom, $urandom, $urandom};
      c = {$urandom, $urandom, $urandom}; cin = 1'($urandom);
      if (k < 4) begin a = '1; b = '1; c = '1; cin = 1'(k); end
      #1;
      checks++;
      if (W'(s + cy) != W'(a + b + c + W'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h cin=%b", a, b, c, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
