// tb_rr_recip_qdsel: exhaustive test of the reciprocal unit's digit selection
// over all divisor estimates and all values of the 7-bit residual estimate,
// each split at random into a sum and a carry word. The expected digit is
// found by searching the constant rows written out below (sixteenths, indexed
// by 16*d^ - 8).
module tb_rr_recip_qdsel;
  import rr_pkg::*;
  logic [6:0] ys, yc;
  logic [2:0] dtop;
  digit_t q;
  int checks = 0, failures = 0;
  int mk [4][8] = '{'{-13, -15, -16, -18, -20, -20, -22, -24},
                    '{ -4,  -6,  -6,  -6,  -8,  -8,  -8,  -8},
                    '{  4,   4,   4,   4,   6,   6,   8,   8},
                    '{ 12,  14,  15,  16,  18,  20,  20,  24}};

  rr_recip_qdsel dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int rep = 0; rep < 8; rep++)
      for (int dv = 0; dv < 8; dv++)
        for (int yv = -64; yv < 64; yv++) begin       // 4w in 1/16 units
          dtop = 3'(dv);
          ys = 7'($urandom);
          yc = 7'(yv) - ys;
          #1;
          e = 2;
          for (int k = 3; k >= 0; k--) if (yv < mk[k][dv]) e = k - 2;
          checks++;
          if (int'(q) != e) begin
            failures++;
            $display("FAIL d=%0d y=%0d got %0d exp %0d", dv, yv, q, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
