// tb_golay_decoder_recip: end-to-end test of the decoder built for the
// reciprocal Golay generator, g(x) = x^11 + x^10 + x^6 + x^5 + x^4 + x^2 + 1.
//
// The syndrome taps, the pattern generator constant and the stored table
// are all derived from the parameter G, so the same RTL must decode this
// code too. Random messages are encoded with the reference model for this
// generator, hit by 0..3 random errors and streamed back to back; every
// output is compared with the brute-force nearest-codeword decode, and all
// three table paths must be used.
module tb_golay_decoder_recip;
  import golay_pkg::*;
  import golay_ref_pkg::*;

  localparam int unsigned GR = 32'hC75;

  logic      clk = 0, reset = 1, din = 0;
  message_t  msg_out;
  logic      msg_valid;
  message_t  err_pattern;
  syndrome_t syndrome;
  lut_path_e path;
  int        checks = 0, failures = 0;
  int        n_path [4];

  golay_decoder #(.G(12'(GR))) dut (.*);

  always #5 clk = ~clk;

  localparam int NWORDS = 150;

  initial begin
    #(10 * 23 * (NWORDS + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned rx_q [$];

  initial begin
    int unsigned rx;
    forever begin
      @(posedge clk);
      #2;
      if (msg_valid) begin
        rx = rx_q.pop_front();
        checks += 2;
        if (msg_out != 12'(ref_decode(rx, GR))) begin
          failures++;
          $display("rx %h: msg %h expected %h", rx, msg_out, ref_decode(rx, GR));
        end
        if (syndrome != 11'(ref_mod(rx, GR))) failures++;
        n_path[path]++;
      end
    end
  end

  initial begin
    int unsigned rx, e;
    for (int i = 0; i < 4; i++) n_path[i] = 0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < NWORDS; n++) begin
      case (n % 3)
        0: e = ref_random_error($urandom % 4) & 32'h7FF;      // parity only
        1: e = 32'h800 | (1 << ($urandom % 11));               // bit 12 + 1
        default: e = ref_random_error(3);
      endcase
      rx = ref_encode($urandom % 4096, GR) ^ e;
      for (int b = 22; b >= 0; b--) begin
        @(posedge clk);
        #1;
        reset = 0;
        din = rx[b];
      end
      rx_q.push_back(rx);
    end
    repeat (6) @(posedge clk);
    checks += 4;
    if (rx_q.size() != 0) failures++;
    if (n_path[PATH_DIRECT] == 0) failures++;
    if (n_path[PATH_GENERATED] == 0) failures++;
    if (n_path[PATH_STORED] == 0) failures++;
    $display("direct %0d generated %0d stored %0d", n_path[PATH_DIRECT],
             n_path[PATH_GENERATED], n_path[PATH_STORED]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
