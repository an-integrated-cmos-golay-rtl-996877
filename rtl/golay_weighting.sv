// golay_weighting: weighting circuit, the population count of an 11-bit
// vector and a comparison with a threshold.
//
// Six half adders reduce the inputs in pairs (the sixth adds A11 to a
// constant zero), giving six 2-bit counts. Five 4-bit adders then sum them
// in a tree: two adders combine pairs of half-adder results, a third the
// last pair, a fourth the first two sums and the fifth the remaining two,
// producing the 4-bit weight (0..11). `le_thresh` is high when the weight
// does not exceed THRESH; it enables or disables the gates that follow.
//
// Interface and timing: purely combinational. The number of half adders and
// 4-bit adders follows the design description; the pairing of the tree and
// the threshold parameter are this implementation's reading of it.
module golay_weighting
  import golay_pkg::*;
#(
  parameter int unsigned THRESH = T  // largest weight that sets le_thresh
) (
  input  syndrome_t  a,
  output logic [3:0] weight,
  output logic       le_thresh
);

  logic [11:0] ax;               // inputs padded with a constant zero
  logic [1:0]  ha [6];           // half adder results {carry, sum}
  logic [3:0]  fa [5];           // 4-bit adder results

  assign ax = {1'b0, a};

  always_comb begin
    for (int i = 0; i < 6; i++)
      ha[i] = {ax[2*i] & ax[2*i+1], ax[2*i] ^ ax[2*i+1]};
    fa[0] = {2'b00, ha[0]} + {2'b00, ha[1]};
    fa[1] = {2'b00, ha[2]} + {2'b00, ha[3]};
    fa[2] = {2'b00, ha[4]} + {2'b00, ha[5]};
    fa[3] = fa[0] + fa[1];
    fa[4] = fa[3] + fa[2];
  end

  assign weight    = fa[4];
  assign le_thresh = (32'(weight) <= THRESH);

endmodule
