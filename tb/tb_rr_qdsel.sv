// tb_rr_qdsel: exhaustive test of the digit selection over all D estimates and
// all residual estimates, with random splits of each estimate into sum and
// carry words. The expected digit is found by searching the selection-constant
// rows written out below (sixteenths, indexed by 32*D^ - 16 after saturation).
module tb_rr_qdsel;
  import rr_pkg::*;
  logic [7:0] ys, yc;
  logic [6:0] dtop;
  digit_t p;
  int checks = 0, failures = 0;
  int mk [4][16] = '{'{-13, -14, -14, -15, -16, -17, -17, -18, -18, -19, -20, -21, -21, -23, -24, -24},
                     '{ -5,  -5,  -5,  -6,  -6,  -6,  -7,  -7,  -7,  -8,  -8,  -8,  -9,  -9,  -9, -10},
                     '{  3,   4,   4,   4,   4,   4,   4,   5,   7,   7,   7,   7,   8,   8,   8,   8},
                     '{ 12,  13,  14,  14,  15,  15,  16,  17,  18,  18,  19,  19,  22,  22,  22,  22}};

  rr_qdsel dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i, y, e;
    for (int dv = 0; dv < 128; dv++) begin
      for (int yv = -128; yv < 128; yv++) begin       // 4w in 1/32 units
        dtop = 7'(dv);
        ys = 8'($urandom);
        yc = 8'(yv) - ys;
        #1;
        i = dv < 16 ? 0 : dv > 31 ? 15 : dv - 16;
        y = (yv < 0) ? -((-yv + 1) / 2) : yv / 2;     // floor(yv / 2)
        e = 2;
        for (int k = 3; k >= 0; k--) if (y < mk[k][i]) e = k - 2;
        checks++;
        if (int'(p) != e) begin
          failures++;
          $display("FAIL d=%0d y=%0d got %0d exp %0d", dv, y, p, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
