// tb_golay_syndrome_calc: streams random 23-bit words back to back into the
// syndrome calculator, first received bit first, and compares the register
// in the cycle after each word's last bit with the remainder computed by the
// reference model. Also checks that a word boundary discards the previous
// remainder and that a gap (shift low) holds the register.
module tb_golay_syndrome_calc;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  logic      clk = 0, reset = 1, shift = 0, start = 0, din = 0;
  syndrome_t syndrome;
  int        checks = 0, failures = 0;

  golay_syndrome_calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_word(int unsigned w, bit gap);
    for (int b = 22; b >= 0; b--) begin
      shift <= 1;
      start <= (b == 22);
      din   <= w[b];
      @(posedge clk);
      if (gap && b == 10) begin
        // one idle cycle inside the word
        shift <= 0;
        din   <= ~w[b];
        @(posedge clk);
      end
    end
    shift <= 0;
    start <= 0;
  endtask

  initial begin
    int unsigned w;
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      w = (n == 0) ? 32'h0000_0800 : ($urandom & 32'h7F_FFFF);
      send_word(w, (n % 7) == 3);
      #1;
      checks++;
      if (syndrome != 11'(ref_mod(w))) begin
        failures++;
        $display("word %h: syndrome %h expected %h", w, syndrome, ref_mod(w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
