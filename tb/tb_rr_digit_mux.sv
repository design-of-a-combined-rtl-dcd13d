// tb_rr_digit_mux: checks both forms of the signed-digit multiple
// (SUB = 0 gives p*x, SUB = 1 gives -p*x) for every digit and random words;
// the returned word plus its carry must equal the product modulo 2^W.
module tb_rr_digit_mux;
  import rr_pkg::*;
  localparam int W = 66;
  logic [W-1:0] x, z0, z1;
  logic ci0, ci1;
  digit_t p;
  int checks = 0, failures = 0;

  rr_digit_mux #(.W(W), .SUB(1'b0)) dut_add (.x, .p, .z(z0), .cin(ci0));
  rr_digit_mux #(.W(W), .SUB(1'b1)) dut_sub (.x, .p, .z(z1), .cin(ci1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prod;
    for (int k = 0; k < 500; k++) begin
      for (int v = -2; v <= 2; v++) begin
        x = {$urandom, $urandom, $urandom};
        p = digit_t'(v);
        #1;
        prod = W'(x * W'(v));
        checks += 2;
        if (W'(z0 + W'(ci0)) != prod) begin failures++; $display("FAIL add p=%0d", v); end
        if (W'(z1 + W'(ci1)) != W'(-prod)) begin failures++; $display("FAIL sub p=%0d", v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
