// tb_golay_decoder: end-to-end test of the serial Golay decoder at its
// default parameters.
//
// Words are sent back to back, first received bit first. The first word is
// the example of a message 000000000001 with parity 00000101000, i.e. the
// all-zero codeword with errors in received bits 12, 18 and 20; it must be
// corrected to zero by the pattern generating circuit. Then random messages
// are encoded by the reference model, hit by 0..3 random errors (chosen so
// that every part of the look-up table is exercised) and sent. Each output
// word is compared with the brute-force nearest-codeword decode, the error
// pattern with the errors actually injected, and the output latency (3
// clocks after the last bit) and the rate (one word per 23 clocks) are
// checked. A reset in the middle of a word checks that the word boundary
// is realigned. Each table path and error weight must occur at least once.
module tb_golay_decoder;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  logic      clk = 0, reset = 1, din = 0;
  message_t  msg_out;
  logic      msg_valid;
  message_t  err_pattern;
  syndrome_t syndrome;
  lut_path_e path;

  int checks = 0, failures = 0;
  int cyc = 0;

  golay_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  localparam int NWORDS = 400;

  initial begin
    #(10 * 23 * (NWORDS + 40));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int unsigned msg;       // transmitted message
    int unsigned rx;        // received word
    int unsigned err;       // injected error pattern
    int          last_cyc;  // cycle in which the last bit was on din
  } word_rec_t;

  word_rec_t sent [$];
  int        n_path [4];
  int        n_weight [4];
  int        n_out = 0;
  int        prev_out_cyc = -1;
  int        n_rate_ok = 0;
  int        n_realign = 0;

  // Error pattern that falls into the requested part of the table.
  function automatic int unsigned make_error(int cls);
    int unsigned e, w;
    case (cls)
      0: begin  // parity bits only, weight 0..3
        w = $urandom % 4;
        e = 0;
        while (ref_popcount(e) < w) e |= 1 << ($urandom % 11);
      end
      1: begin  // received bit 12 plus up to two parity errors
        w = $urandom % 3;
        e = 0;
        while (ref_popcount(e) < w) e |= 1 << ($urandom % 11);
        e |= 32'h800;
      end
      default: begin  // anything of weight 1..3 with a message error
        do e = ref_random_error(1 + $urandom % 3);
        while ((e >> 11) == 0 || ((e >> 11) == 1 && ref_popcount(e & 32'h7FF) <= 2));
      end
    endcase
    return e;
  endfunction

  task automatic send(int unsigned msg, int unsigned err, bit do_reset_first);
    word_rec_t r;
    r.msg = msg;
    r.err = err;
    r.rx  = ref_encode(msg) ^ err;
    for (int b = 22; b >= 0; b--) begin
      @(posedge clk);
      #1;
      reset = 0;
      din   = r.rx[b];
      r.last_cyc = cyc;
    end
    sent.push_back(r);
  endtask

  // Output checker.
  initial begin
    word_rec_t   r;
    int unsigned exp_msg;
    forever begin
      @(posedge clk);
      #2;
      if (msg_valid && !reset) begin
        n_out++;
        if (sent.size() == 0) begin
          failures++;
          $display("output with no word sent");
          continue;
        end
        r = sent.pop_front();
        exp_msg = ref_decode(r.rx);
        checks += 5;
        if (exp_msg != r.msg) begin
          failures++;
          $display("reference decode disagrees with sent message");
        end
        if (msg_out != 12'(exp_msg)) begin
          failures++;
          $display("rx %h: msg %h expected %h (path %s)", r.rx, msg_out,
                   exp_msg, path.name());
        end
        if (err_pattern != 12'(r.err >> 11)) begin
          failures++;
          $display("rx %h: error pattern %h expected %h", r.rx, err_pattern,
                   r.err >> 11);
        end
        if (syndrome != 11'(ref_mod(r.rx))) begin
          failures++;
          $display("rx %h: syndrome %h expected %h", r.rx, syndrome,
                   ref_mod(r.rx));
        end
        if (cyc != r.last_cyc + 3) begin
          failures++;
          $display("latency %0d expected 3", cyc - r.last_cyc);
        end
        if (prev_out_cyc >= 0 && cyc - prev_out_cyc == 23) n_rate_ok++;
        prev_out_cyc = cyc;
        n_path[path]++;
        n_weight[ref_popcount(r.err)]++;
      end
    end
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      n_path[i] = 0;
      n_weight[i] = 0;
    end
    repeat (3) @(posedge clk);
    // Example word: message 000000000001, parity 00000101000
    send(0, 32'h800 | 32'h020 | 32'h008, 0);
    for (int n = 0; n < NWORDS; n++) begin
      if (n == NWORDS / 2) begin
        // reset in the middle of a word: the partial word is dropped and the
        // next bit after reset starts a new word
        for (int b = 0; b < 9; b++) begin
          @(posedge clk);
          #1;
          din = 1'($urandom);
        end
        @(posedge clk);
        #1;
        reset = 1;
        sent.delete();
        repeat (2) @(posedge clk);
        prev_out_cyc = -1;
        n_realign++;
      end
      send($urandom % 4096, make_error(n % 3), 0);
    end
    repeat (8) @(posedge clk);
    checks += 9;
    if (sent.size() != 0) begin
      failures++;
      $display("%0d words never came out", sent.size());
    end
    if (n_path[PATH_DIRECT] == 0)    begin failures++; $display("direct path never taken"); end
    if (n_path[PATH_GENERATED] == 0) begin failures++; $display("generated path never taken"); end
    if (n_path[PATH_STORED] == 0)    begin failures++; $display("stored path never taken"); end
    if (n_path[PATH_NONE] != 0)      begin failures++; $display("no pattern found %0d times", n_path[PATH_NONE]); end
    for (int w = 0; w < 4; w++)
      if (n_weight[w] == 0) begin failures++; $display("no word with %0d errors", w); end
    if (n_rate_ok < NWORDS - 3) begin
      failures++;
      $display("only %0d outputs 23 clocks apart", n_rate_ok);
    end
    $display("words out %0d: direct %0d generated %0d stored %0d; errors 0/1/2/3: %0d/%0d/%0d/%0d; back-to-back %0d; realign %0d",
             n_out, n_path[PATH_DIRECT], n_path[PATH_GENERATED], n_path[PATH_STORED],
             n_weight[0], n_weight[1], n_weight[2], n_weight[3], n_rate_ok, n_realign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
