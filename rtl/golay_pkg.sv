// golay_pkg: constants and helper functions shared by the (23,12) Golay
// decoder blocks.
//
// A received word has N = 23 bits: K = 12 message bits followed by R = 11
// parity bits. Bits are numbered 1..23 in the order they arrive on the serial
// input. As a polynomial, bit 1 is the coefficient of x^22 and bit 23 that of
// x^0, so the message occupies degrees 22..11 and the parity degrees 10..0.
// Every vector in this design is indexed by degree: vector bit [k] is the
// coefficient of x^k, i.e. received bit number N-k.
//
// The generator polynomial is G(X) = X^11 + X^9 + X^7 + X^6 + X^5 + X + 1.
// Its reciprocal, X^11 + X^10 + X^6 + X^5 + X^4 + X^2 + 1, generates the
// mirror-image code and can be used instead by changing GEN_POLY. The
// functions below are used only at elaboration time, to derive the constant
// of the pattern generating circuit and the contents of the stored table.
package golay_pkg;

  localparam int unsigned N = 23;  // code length
  localparam int unsigned K = 12;  // message bits
  localparam int unsigned R = 11;  // parity bits = syndrome width
  localparam int unsigned T = 3;   // correctable errors, floor((7-1)/2)

  // Coefficients of x^11..x^0 of the generator polynomial.
  localparam logic [R:0] GEN_POLY = 12'b1010_1110_0011;

  typedef logic [R-1:0] syndrome_t;
  typedef logic [K-1:0] message_t;
  typedef logic [N-1:0] word_t;

  // Which part of the look-up table produced an error pattern.
  typedef enum logic [1:0] {
    PATH_NONE      = 2'd0,  // no pattern found (cannot occur for a perfect code)
    PATH_DIRECT    = 2'd1,  // syndrome weight <= 3: errors only in parity bits
    PATH_GENERATED = 2'd2,  // pattern generating circuit (bit 12 in error)
    PATH_STORED    = 2'd3   // stored table
  } lut_path_e;

  // One step of polynomial division by g(x): shift the remainder up one
  // degree, add the incoming coefficient at x^0 and reduce by g(x) when the
  // coefficient leaving x^10 is one.
  function automatic syndrome_t div_step(syndrome_t rem, logic din,
                                         logic [R:0] g = GEN_POLY);
    syndrome_t nxt;
    nxt = {rem[R-2:0], din};
    if (rem[R-1]) nxt = nxt ^ g[R-1:0];
    return nxt;
  endfunction

  // Remainder of x^deg modulo g(x): the syndrome of a single error at degree
  // deg (received bit N-deg).
  function automatic syndrome_t syndrome_of_degree(int unsigned deg,
                                                   logic [R:0] g = GEN_POLY);
    syndrome_t rem;
    rem = '0;
    for (int unsigned i = 0; i <= deg; i++)
      rem = div_step(rem, (i == 0) ? 1'b1 : 1'b0, g);
    return rem;
  endfunction

  // Syndrome of a whole 23-bit word (degree-indexed), by long division.
  function automatic syndrome_t syndrome_of_word(word_t w,
                                                 logic [R:0] g = GEN_POLY);
    syndrome_t rem;
    rem = '0;
    for (int i = N - 1; i >= 0; i--) rem = div_step(rem, w[i], g);
    return rem;
  endfunction

  // Number of ones in a vector of up to 32 bits.
  function automatic int unsigned weight32(logic [31:0] v);
    int unsigned c;
    c = 0;
    for (int i = 0; i < 32; i++) c += int'(v[i]);
    return c;
  endfunction

endpackage
