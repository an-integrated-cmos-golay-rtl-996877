// golay_syndrome_calc: serial syndrome calculator of the (23,12) Golay decoder.
//
// An 11-stage shift register with one XOR in front of every stage whose
// generator coefficient is one (six XORs for either Golay generator) divides
// the received polynomial by g(x). The word enters one bit per clock, first
// received bit (highest degree) first. After the 23rd bit has been shifted
// in, the register holds the remainder, which is the syndrome S = Y H^T.
//
// Interface: `shift` advances the register with `din`; `start` marks the
// first bit of a word, which is divided into an empty register so that words
// can follow each other with no gap. `syndrome[k]` is the coefficient of x^k.
// Timing: `syndrome` is valid in the cycle after the last bit of a word was
// shifted. Reset is synchronous and active high.
// The register length, the six XORs and the division itself follow the
// design description; the start input and the reset style are choices of
// this implementation.
module golay_syndrome_calc
  import golay_pkg::*;
#(
  parameter logic [R:0] G = GEN_POLY  // generator polynomial, x^11..x^0
) (
  input  logic      clk,
  input  logic      reset,
  input  logic      shift,
  input  logic      start,
  input  logic      din,
  output syndrome_t syndrome
);

  syndrome_t rem_q;
  syndrome_t base;
  logic      fb;

  // On the first bit of a word the previous remainder is dropped.
  assign base = start ? '0 : rem_q;
  assign fb   = base[R-1];

  always_ff @(posedge clk) begin
    if (reset) begin
      rem_q <= '0;
    end else if (shift) begin
      // Stage 0 takes the input plus feedback; stage k takes stage k-1 plus
      // feedback wherever g_k = 1 (g_11 = 1 is the feedback itself).
      rem_q[0] <= din ^ (fb & G[0]);
      for (int k = 1; k < R; k++) rem_q[k] <= base[k-1] ^ (fb & G[k]);
    end
  end

  assign syndrome = rem_q;

endmodule
