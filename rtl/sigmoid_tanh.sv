// Sigmoid/Tanh: fixed-point activation function unit.
//
// The sigmoid is a four-segment piecewise-linear approximation whose slopes are powers of two,
// so it needs only shifts and adds (this design's choice; the function's form is not given):
//   |x| >= 5          : 1
//   2.375 <= |x| < 5  : |x|/32 + 0.84375
//   1 <= |x| < 2.375  : |x|/8  + 0.625
//   |x| < 1           : |x|/4  + 0.5
//   x < 0             : 1 - sigmoid(|x|)
// Tanh uses tanh(x) = 2*sigmoid(2x) - 1. Input and output are Q3.12; the maximum error is about
// 0.019 for the sigmoid and 0.038 for tanh. The two middle segments meet 16 LSB apart at 2.375,
// so the output dips by that much there; the segment constants are kept as they are.
// mode_tanh selects the function. Combinational.
module sigmoid_tanh
  import ese_pkg::*;
(
  input  act_t x,
  input  logic mode_tanh,
  output act_t y
);
  logic signed [17:0] xs;     // x or 2x
  logic        [17:0] ax;     // |xs|
  logic        [17:0] sp;     // sigmoid(|xs|), Q12
  logic signed [18:0] sg;     // signed sigmoid(xs)
  always_comb begin
    xs = mode_tanh ? (18'(x) <<< 1) : 18'(x);
    ax = xs[17] ? 18'(-xs) : 18'(xs);
    if (ax >= 18'd20480)     sp = 18'd4096;
    else if (ax >= 18'd9728) sp = (ax >> 5) + 18'd3456;
    else if (ax >= 18'd4096) sp = (ax >> 3) + 18'd2560;
    else                     sp = (ax >> 2) + 18'd2048;
    sg = xs[17] ? (19'sd4096 - 19'(sp)) : 19'(sp);
    if (mode_tanh) y = sat_act(48'(20'(sg) <<< 1) - 48'sd4096);
    else           y = sat_act(48'(sg));
  end
endmodule
