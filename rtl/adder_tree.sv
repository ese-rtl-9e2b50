// Adder Tree: sums the three contributions to one gate pre-activation.
//
// y = sat16(a + b + c), where a is the assembled SpMV result (W x_t + W y_{t-1}), b the peephole
// product and c the bias, all Q3.12. Built as two first-level adders and one second-level adder,
// as drawn in the architecture figure; the fourth leaf is tied to zero. Combinational.
// The three-input sum follows the gate equations; the 16-bit saturating format is this design's
// own choice.
module adder_tree
  import ese_pkg::*;
(
  input  act_t a,
  input  act_t b,
  input  act_t c,
  output act_t y
);
  logic signed [17:0] s0, s1;
  logic signed [18:0] s2;
  always_comb begin
    s0 = 18'(a) + 18'(b);
    s1 = 18'(c);
    s2 = 19'(s0) + 19'(s1);
    y  = sat_act(48'(s2));
  end
endmodule
