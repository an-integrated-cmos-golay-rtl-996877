// golay_ref_pkg: reference model of the (23,12) Golay code for the
// testbenches, written independently of the RTL.
//
// Words are plain integers: bit k is the coefficient of x^k, so bit 22 is
// the first transmitted bit, bits 22..11 the message and bits 10..0 the
// parity. Encoding is systematic, parity = x^11 m(x) mod g(x) with
// g(x) = x^11 + x^9 + x^7 + x^6 + x^5 + x + 1. Decoding is done by brute
// force: the codeword nearest in Hamming distance among all 4096. The
// division, encoding and decoding functions take the generator as an
// optional argument so that the reciprocal generator can be tested too.
package golay_ref_pkg;

  localparam int unsigned REF_G = 32'hAE3;  // x^11..x^0 coefficients

  // Remainder of a degree-22 polynomial modulo g(x).
  function automatic int unsigned ref_mod(int unsigned v,
                                         int unsigned g = REF_G);
    for (int d = 22; d >= 11; d--)
      if (v[d]) v = v ^ (g << (d - 11));
    return v & 32'h7FF;
  endfunction

  function automatic int unsigned ref_encode(int unsigned msg,
                                             int unsigned g = REF_G);
    int unsigned shifted;
    shifted = (msg & 32'hFFF) << 11;
    return shifted | ref_mod(shifted, g);
  endfunction

  function automatic int unsigned ref_popcount(int unsigned v);
    int unsigned c;
    c = 0;
    while (v != 0) begin
      c += v & 1;
      v = v >> 1;
    end
    return c;
  endfunction

  // Message of the codeword nearest to the received word.
  function automatic int unsigned ref_decode(int unsigned rx,
                                             int unsigned g = REF_G);
    int unsigned best, best_d, d;
    best = 0;
    best_d = 99;
    for (int unsigned m = 0; m < 4096; m++) begin
      d = ref_popcount(ref_encode(m, g) ^ rx);
      if (d < best_d) begin
        best_d = d;
        best = m;
      end
    end
    return best;
  endfunction

  // Random error pattern of the given weight (0..3) over 23 bits.
  function automatic int unsigned ref_random_error(int unsigned w);
    int unsigned e;
    e = 0;
    while (ref_popcount(e) < w) e |= 1 << ($urandom % 23);
    return e;
  endfunction

endpackage
