// tb_golay_pattern_gen: applies every syndrome, with the enable on and off,
// to the pattern generating circuit. The expected behaviour comes from the
// reference model: the circuit must recognise exactly the syndromes of the
// patterns "error in received bit 12 plus at most two parity errors", and
// return that pattern. All such patterns are also enumerated and checked.
module tb_golay_pattern_gen;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  syndrome_t syndrome;
  logic      enable;
  logic      hit;
  message_t  msg_err;
  syndrome_t par_err;
  int        checks = 0, failures = 0;

  golay_pattern_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // family membership table built from the reference model
  logic       fam   [2048];
  int unsigned fam_par [2048];

  initial begin
    int unsigned e, s;
    for (int i = 0; i < 2048; i++) begin
      fam[i] = 0;
      fam_par[i] = 0;
    end
    // bit 12 (degree 11) plus up to two parity errors; 11 stands for none
    for (int i = 0; i <= 11; i++)
      for (int j = i; j <= 11; j++) begin
        e = 32'h800;
        if (i < 11) e |= 1 << i;
        if (j < 11) e |= 1 << j;
        s = ref_mod(e);
        fam[s] = 1;
        fam_par[s] = e & 32'h7FF;
      end
    for (int en = 0; en < 2; en++)
      for (int v = 0; v < 2048; v++) begin
        syndrome = 11'(v);
        enable = 1'(en);
        #1;
        checks++;
        if (hit != (en == 1 && fam[v])) begin
          failures++;
          $display("syndrome %h enable %0d: hit %b", v, en, hit);
        end else if (hit) begin
          checks++;
          if (msg_err != 12'h001 || par_err != 11'(fam_par[v])) begin
            failures++;
            $display("syndrome %h: pattern %h/%h expected 001/%h", v,
                     msg_err, par_err, fam_par[v]);
          end
        end else begin
          checks++;
          if (msg_err != '0 || par_err != '0) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
