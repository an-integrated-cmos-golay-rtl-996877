// golay_decoder: serial decoder for the (23,12) Golay code, correcting up to
// three errors per 23-bit word.
//
// The received bits enter one per clock on `din`, words back to back, the
// first word starting with the first sample after reset. A synchronising
// flip-flop feeds two paths: the saving circuit, a delay line that keeps the
// word, and the syndrome calculator, which divides the word by g(x). Once a
// word is complete its syndrome goes to the look-up table. The table weighs
// the syndrome: weight three or less means the errors are all in the parity
// bits and the message is already right; otherwise the pattern generating
// circuit or the stored table supplies the message error pattern. The
// correction circuit XORs it with the saved message and registers the
// corrected 12-bit message.
//
// Interface: `reset` (synchronous, active high) also aligns the word
// boundary. `msg_out` carries the corrected message, first received bit in
// [11]; `msg_valid` is high for one clock per word. `err_pattern`,
// `syndrome` and `path` show, in the same clock, the message error pattern
// applied, the syndrome and which part of the table answered.
// Timing: one word per 23 clocks. The last bit of a word sampled on `din`
// in cycle t gives `msg_valid` in cycle t+3.
// The block structure follows the design description; the word-boundary
// counter, the reset alignment and the extra status outputs are choices of
// this implementation.
module golay_decoder
  import golay_pkg::*;
#(
  parameter logic [R:0] G = GEN_POLY  // generator polynomial, x^11..x^0
) (
  input  logic      clk,
  input  logic      reset,
  input  logic      din,
  output message_t  msg_out,
  output logic      msg_valid,
  output message_t  err_pattern,
  output syndrome_t syndrome,
  output lut_path_e path
);

  logic      din_sync;
  logic      sync_valid;   // din_sync holds a received bit
  logic [4:0] bit_pos;     // position of din_sync in its word, 0..22
  logic      word_done;    // syndrome and saved word are complete
  message_t  saved_msg;
  syndrome_t syn;
  message_t  msg_err;
  lut_path_e lut_path;
  message_t  corr_msg;
  logic      corr_valid;

  // Word framing: counts the synchronised bits modulo 23.
  always_ff @(posedge clk) begin
    if (reset) begin
      sync_valid <= 1'b0;
      bit_pos    <= '0;
      word_done  <= 1'b0;
    end else begin
      sync_valid <= 1'b1;
      word_done  <= sync_valid && (bit_pos == 5'(N - 1));
      if (sync_valid) bit_pos <= (bit_pos == 5'(N - 1)) ? '0 : bit_pos + 5'd1;
    end
  end

  golay_saving_circuit u_saving (
    .clk     (clk),
    .reset   (reset),
    .din     (din),
    .shift   (sync_valid),
    .din_sync(din_sync),
    .word    (),
    .message (saved_msg)
  );

  golay_syndrome_calc #(.G(G)) u_syndrome (
    .clk     (clk),
    .reset   (reset),
    .shift   (sync_valid),
    .start   (bit_pos == '0),
    .din     (din_sync),
    .syndrome(syn)
  );

  golay_lookup_table #(.G(G)) u_lut (
    .syndrome(syn),
    .msg_err (msg_err),
    .par_err (),
    .path    (lut_path)
  );

  golay_correction u_correction (
    .clk      (clk),
    .reset    (reset),
    .load     (word_done),
    .saved    (saved_msg),
    .err      (msg_err),
    .corrected(corr_msg),
    .valid    (corr_valid)
  );

  // Status registered alongside the corrected message.
  always_ff @(posedge clk) begin
    if (reset) begin
      err_pattern <= '0;
      syndrome    <= '0;
      path        <= PATH_NONE;
    end else if (word_done) begin
      err_pattern <= msg_err;
      syndrome    <= syn;
      path        <= lut_path;
    end
  end

  // The code is perfect: every syndrome has a pattern of weight <= 3, so
  // the table must always answer, and the bit counter never leaves 0..22.
  always_ff @(posedge clk) begin
    if (!reset) begin
      assert (!word_done || lut_path != PATH_NONE)
        else $error("no error pattern for syndrome %h", syn);
      assert (bit_pos < 5'(N)) else $error("bit counter out of range");
    end
  end

  assign msg_out   = corr_msg;
  assign msg_valid = corr_valid;

endmodule
