// golay_saving_circuit: delay line that keeps the received word for the
// correction stage.
//
// 24 cascaded D flip-flops: the first one synchronises the serial input to
// the clock and feeds both this delay line and the syndrome calculator; the
// other 23 hold the last 23 received bits. When a whole word has arrived,
// `word` holds it indexed by degree (word[22] is the first received bit) and
// `message` is its first 12 bits, the message part, that go to the
// correction circuit.
//
// Interface: `din` is sampled every clock; `shift` advances the 23-bit part.
// `din_sync` is the synchronised bit. Timing: a bit presented on `din` in
// cycle t appears on `din_sync` in cycle t+1 and at word[0] in cycle t+2.
// The 24 flip-flops and the 12-bit message output follow the design
// description; the shift enable and the synchronous reset are choices of
// this implementation.
module golay_saving_circuit
  import golay_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     din,
  input  logic     shift,
  output logic     din_sync,
  output word_t    word,
  output message_t message
);

  logic  sync_q;
  word_t line_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      sync_q <= 1'b0;
      line_q <= '0;
    end else begin
      sync_q <= din;
      if (shift) line_q <= {line_q[N-2:0], sync_q};
    end
  end

  assign din_sync = sync_q;
  assign word     = line_q;
  assign message  = line_q[N-1:R];

endmodule
