// tb_golay_lookup_table: checks the complete look-up table module against
// the reference model. Every error pattern of weight three or less is
// turned into its syndrome; the module must return the message part of that
// pattern, the parity part where it gives one, and the path that the design
// assigns to it (direct for parity-only errors, generated for received bit
// 12 plus at most two parity errors, stored otherwise). Each path must be
// taken the number of times counted from the code's structure.
module tb_golay_lookup_table;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  syndrome_t syndrome;
  message_t  msg_err;
  syndrome_t par_err;
  lut_path_e path;
  int        checks = 0, failures = 0;
  int        n_direct = 0, n_gen = 0, n_stored = 0;

  golay_lookup_table dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pattern(int unsigned e);
    int unsigned m, p;
    lut_path_e   exp_path;
    m = e >> 11;
    p = e & 32'h7FF;
    if (m == 0)                              exp_path = PATH_DIRECT;
    else if (m == 1 && ref_popcount(p) <= 2) exp_path = PATH_GENERATED;
    else                                     exp_path = PATH_STORED;
    syndrome = 11'(ref_mod(e));
    #1;
    checks++;
    case (path)
      PATH_DIRECT:    n_direct++;
      PATH_GENERATED: n_gen++;
      PATH_STORED:    n_stored++;
      default: ;
    endcase
    if (path != exp_path || msg_err != 12'(m) ||
        (exp_path != PATH_STORED && par_err != 11'(p)) ||
        (exp_path == PATH_STORED && par_err != '0)) begin
      failures++;
      $display("pattern %h: path %s msg %h par %h", e, path.name(), msg_err,
               par_err);
    end
  endtask

  initial begin
    check_pattern(0);
    for (int i = 0; i < 23; i++) begin
      check_pattern(1 << i);
      for (int j = i + 1; j < 23; j++) begin
        check_pattern((1 << i) | (1 << j));
        for (int k = j + 1; k < 23; k++)
          check_pattern((1 << i) | (1 << j) | (1 << k));
      end
    end
    // direct: weight <= 3 over 11 bits = 1+11+55+165 = 232;
    // generated: 1+11+55 = 67; stored: the remaining 2048-232-67 = 1749
    checks += 3;
    if (n_direct != 232) begin failures++; $display("direct %0d", n_direct); end
    if (n_gen != 67)     begin failures++; $display("generated %0d", n_gen); end
    if (n_stored != 1749) begin failures++; $display("stored %0d", n_stored); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
