// golay_pattern_rom: stored part of the look-up table.
//
// Holds, for every syndrome whose most probable error pattern is handled
// neither directly (errors only in the parity bits, where the syndrome equals
// the error pattern) nor by the pattern generating circuit (message bit 12
// plus at most two parity errors), the message part of that error pattern.
// All other entries are zero, so after synthesis only the stored families
// cost logic. The table has 2^11 = 2048 entries of 12 bits.
//
// The contents are computed at elaboration time: every pattern of weight
// three or less is enumerated (the Golay code is perfect, so these are
// exactly the 2048 coset leaders), its syndrome formed as the XOR of the
// single-bit syndromes x^k mod g(x), and its message part stored at that
// syndrome when it belongs to the stored families.
//
// Interface and timing: an asynchronous read, purely combinational.
// `stored` is high when the addressed entry belongs to the stored families;
// `msg_err[j]` is the error of message bit at degree 11+j.
// That such a table exists follows the design description; its word
// contents (message part only) and its form are choices of this
// implementation.
module golay_pattern_rom
  import golay_pkg::*;
#(
  parameter logic [R:0] G = GEN_POLY
) (
  input  syndrome_t syndrome,
  output logic      stored,
  output message_t  msg_err
);

  localparam int unsigned DEPTH = 1 << R;

  // {stored flag, message error pattern} per syndrome
  typedef logic [DEPTH-1:0][K:0] table_t;

  function automatic table_t build_table(logic [R:0] g);
    table_t    tbl;
    syndrome_t single [N];
    word_t     e;
    syndrome_t s;
    message_t  m;
    for (int d = 0; d < DEPTH; d++) tbl[d] = '0;
    for (int k = 0; k < N; k++) single[k] = syndrome_of_degree(k, g);
    // Positions N..N+2 stand for "no error", so that i < j < k covers every
    // pattern of weight 0..3.
    for (int i = 0; i < N + 3; i++)
      for (int j = i + 1; j < N + 3; j++)
        for (int k = j + 1; k < N + 3; k++) begin
          e = '0;
          s = '0;
          if (i < N) begin e[i] = 1'b1; s ^= single[i]; end
          if (j < N) begin e[j] = 1'b1; s ^= single[j]; end
          if (k < N) begin e[k] = 1'b1; s ^= single[k]; end
          m = e[N-1:R];
          if (m != '0 &&
              !(m == message_t'(1) && weight32(32'(e[R-1:0])) <= T - 1))
            tbl[s] = {1'b1, m};
        end
    return tbl;
  endfunction

  localparam table_t TABLE = build_table(G);

  assign {stored, msg_err} = TABLE[syndrome];

endmodule
