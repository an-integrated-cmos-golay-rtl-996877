// golay_correction: correction circuit, X = Y xor Z on the message bits.
//
// Each bit of the saved message is XORed with the bit of the error pattern
// at the same position, which flips every bit found to be in error. The
// result is captured in an output register when `load` is high, and
// `valid` follows `load` by one clock.
//
// Interface: `saved` and `err` are degree-indexed 12-bit vectors (bit [11]
// is the first received bit). Timing: `corrected` and `valid` change one
// clock after `load`. The XOR gates follow the design description; the
// output register and its load/valid handshake are choices of this
// implementation.
module golay_correction
  import golay_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     load,
  input  message_t saved,
  input  message_t err,
  output message_t corrected,
  output logic     valid
);

  always_ff @(posedge clk) begin
    if (reset) begin
      corrected <= '0;
      valid     <= 1'b0;
    end else begin
      valid <= load;
      if (load) corrected <= saved ^ err;
    end
  end

endmodule
