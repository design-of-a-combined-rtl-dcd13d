// tb_rr_sq_mux: checks the negated square-digit multiple -p*p*x for every
// digit and random words, modulo 2^W.
module tb_rr_sq_mux;
  import rr_pkg::*;
  localparam int W = 66;
  logic [W-1:0] x, z;
  logic cin;
  digit_t p;
  int checks = 0, failures = 0;

  rr_sq_mux #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      for (int v = -2; v <= 2; v++) begin
        x = {$urandom, $urandom, $urandom};
        p = digit_t'(v);
        #1;
        checks++;
        if (W'(z + W'(cin)) != W'(-(x * W'(v * v)))) begin
          failures++;
          $display("FAIL p=%0d x=%h", v, x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
