// tb_golay_weighting: exhaustive test of the weighting circuit. Every 11-bit
// input is applied; the weight is compared with a bit count done by the
// testbench, and the threshold flag is checked for thresholds 3 and 2.
module tb_golay_weighting;
  import golay_pkg::*;

  syndrome_t  a;
  logic [3:0] w3, w2;
  logic       le3, le2;
  int         checks = 0, failures = 0;

  golay_weighting #(.THRESH(3)) dut3 (.a(a), .weight(w3), .le_thresh(le3));
  golay_weighting #(.THRESH(2)) dut2 (.a(a), .weight(w2), .le_thresh(le2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_w;
    for (int v = 0; v < 2048; v++) begin
      a = 11'(v);
      #1;
      expect_w = 0;
      for (int i = 0; i < 11; i++) if (v & (1 << i)) expect_w++;
      checks += 4;
      if (int'(w3) != expect_w) begin
        failures++;
        $display("weight mismatch a=%h got %0d expected %0d", a, w3, expect_w);
      end
      if (int'(w2) != expect_w) failures++;
      if (le3 != (expect_w <= 3)) begin
        failures++;
        $display("le_thresh(3) mismatch a=%h", a);
      end
      if (le2 != (expect_w <= 2)) begin
        failures++;
        $display("le_thresh(2) mismatch a=%h", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
