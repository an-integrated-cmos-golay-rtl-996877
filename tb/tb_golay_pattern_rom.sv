// tb_golay_pattern_rom: enumerates every error pattern of weight three or
// less (all 2048 coset leaders of the perfect Golay code), computes its
// syndrome with the reference model and checks the stored table: entries of
// the stored families must return the message part of the pattern, all
// others must read as not stored and zero.
module tb_golay_pattern_rom;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  syndrome_t syndrome;
  logic      stored;
  message_t  msg_err;
  int        checks = 0, failures = 0;
  int        n_stored = 0, n_leaders = 0;

  golay_pattern_rom dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [2048];

  task automatic check_pattern(int unsigned e);
    int unsigned m, p;
    bit          exp_stored;
    m = e >> 11;
    p = e & 32'h7FF;
    syndrome = 11'(ref_mod(e));
    #1;
    n_leaders++;
    checks++;
    if (seen[syndrome]) begin
      failures++;
      $display("syndrome %h reached twice", syndrome);
    end
    seen[syndrome] = 1;
    exp_stored = (m != 0) && !(m == 1 && ref_popcount(p) <= 2);
    if (exp_stored) n_stored++;
    if (stored != exp_stored ||
        msg_err != (exp_stored ? 12'(m) : 12'h000)) begin
      failures++;
      $display("pattern %h (syndrome %h): stored %b msg %h", e, syndrome,
               stored, msg_err);
    end
  endtask

  initial begin
    for (int i = 0; i < 2048; i++) seen[i] = 0;
    check_pattern(0);
    for (int i = 0; i < 23; i++) begin
      check_pattern(1 << i);
      for (int j = i + 1; j < 23; j++) begin
        check_pattern((1 << i) | (1 << j));
        for (int k = j + 1; k < 23; k++)
          check_pattern((1 << i) | (1 << j) | (1 << k));
      end
    end
    checks++;
    if (n_leaders != 2048) begin
      failures++;
      $display("enumerated %0d patterns, expected 2048", n_leaders);
    end
    $display("stored entries: %0d of 2048", n_stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
