// golay_pattern_gen: pattern generating circuit of the look-up table.
//
// Handles the family of error patterns that contain an error in the lowest
// message bit (received bit 12, degree 11) plus at most two errors in the
// parity bits. For such a pattern the syndrome is Q xor E, with Q the
// syndrome of a single error at degree 11 (x^11 mod g(x)) and E the parity
// errors themselves. The circuit therefore XORs the syndrome with the
// constant Q, whose ones and zeros are wired to supply and ground, weighs
// the result with a weighting circuit, and when the weight is at most two
// (and `enable` is high) passes it through a row of AND gates as the parity
// part of the error pattern, together with the error in message bit 12.
//
// Interface and timing: purely combinational. `hit` is high when the
// syndrome belongs to this family. `msg_err` is the message part of the
// error pattern (bit [0] is received bit 12), `par_err` the parity part,
// both zero when `hit` is low.
// The XOR-with-constant, weighting and AND-gate structure follows the design
// description. The choice of Q as the syndrome of received bit 12 and the
// threshold of two are this implementation's reading of it.
module golay_pattern_gen
  import golay_pkg::*;
#(
  parameter logic [R:0] G = GEN_POLY
) (
  input  syndrome_t syndrome,
  input  logic      enable,
  output logic      hit,
  output message_t  msg_err,
  output syndrome_t par_err
);

  localparam syndrome_t Q = syndrome_of_degree(K - 1, G);

  syndrome_t  diff;
  logic       diff_small;

  assign diff = syndrome ^ Q;

  golay_weighting #(.THRESH(T - 1)) u_weighting (
    .a        (diff),
    .weight   (),
    .le_thresh(diff_small)
  );

  assign hit     = enable & diff_small;
  assign par_err = diff & {R{hit}};
  assign msg_err = {{(K-1){1'b0}}, hit};

endmodule
