// golay_lookup_table: look-up table module of the Golay decoder, built from
// a weighting circuit, the pattern generating circuit, the stored table and
// a set of OR gates.
//
// The syndrome is first weighed. A weight of three or less means that all
// errors lie in the 11 parity bits: the error pattern is the syndrome itself
// and the message needs no correction. Otherwise the identifying switch
// enables the pattern generating circuit, which recognises the family with
// an error in received bit 12, and the stored table, which holds the
// remaining families. The two candidate message error patterns are gated by
// their enables and merged with OR gates; at most one of them is non-zero.
//
// Interface and timing: purely combinational. `msg_err` is the 12-bit error
// pattern of the message (bit [j] is degree 11+j, i.e. received bit 12-j);
// `par_err` is the parity part where it is known from the syndrome (direct
// and generated families), zero for the stored families. `path` tells which
// of the three ways produced the pattern.
// The decision order follows the design's flow chart; the path encoding and
// the parity output are choices of this implementation.
module golay_lookup_table
  import golay_pkg::*;
#(
  parameter logic [R:0] G = GEN_POLY
) (
  input  syndrome_t syndrome,
  output message_t  msg_err,
  output syndrome_t par_err,
  output lut_path_e path
);

  logic       direct;       // weight <= 3: syndrome is the error pattern
  logic       gen_hit;
  message_t   gen_msg;
  syndrome_t  gen_par;
  logic       rom_stored;
  message_t   rom_msg;
  logic       rom_en;

  golay_weighting #(.THRESH(T)) u_weighting (
    .a        (syndrome),
    .weight   (),
    .le_thresh(direct)
  );

  golay_pattern_gen #(.G(G)) u_pattern_gen (
    .syndrome(syndrome),
    .enable  (!direct),
    .hit     (gen_hit),
    .msg_err (gen_msg),
    .par_err (gen_par)
  );

  golay_pattern_rom #(.G(G)) u_pattern_rom (
    .syndrome(syndrome),
    .stored  (rom_stored),
    .msg_err (rom_msg)
  );

  // Identifying switch: the stored table answers for the families that the
  // pattern generating circuit does not recognise.
  assign rom_en = !direct && !gen_hit;

  // OR gates merging the gated candidates.
  assign msg_err = gen_msg | (rom_msg & {K{rom_en}});
  assign par_err = (syndrome & {R{direct}}) | gen_par;

  always_comb begin
    if (direct)                    path = PATH_DIRECT;
    else if (gen_hit)              path = PATH_GENERATED;
    else if (rom_stored)           path = PATH_STORED;
    else                           path = PATH_NONE;
  end

endmodule
