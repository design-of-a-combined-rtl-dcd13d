// tb_rr_csa42: random test of the 4-2 carry-save adder. Checks that the sum
// and carry words add up to a + b + c + d + cin0 + cin1 modulo 2^W.
module tb_rr_csa42;
  localparam int W = 66;
  logic [W-1:0] a, b, c, d, s, cy;
  logic cin0, cin1;
  int checks = 0, failures = 0;

  rr_csa42 #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      a = {$urandom, $urandom, $urandom}; b = {$urandom, $urandom, $urandom};
      c = {$urandom, $urandom, $urandom}; d = {$urandom, $urandom, $urandom};
      cin0 = 1'($urandom); cin1 = 1'($urandom);
      #1;
      checks++;
      if (W'(s + cy) != W'(a + b + c + d + W'(cin0) + W'(cin1))) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h d=%h", a, b, c, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
