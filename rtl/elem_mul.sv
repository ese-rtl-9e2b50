// ElemMul: element-wise fixed-point multiplier of the LSTM element-wise datapath.
//
// Computes y = sat16((a*b + c*d) >>> 12) on Q3.12 operands in one combinational step. With
// HAS_ADD = 0 the second product is left out and the unit is the plain multiplier used for the
// peephole term W_c (.) c; with HAS_ADD = 1 it is the multiply-add unit that forms
// c_t = f_t (.) c_{t-1} + g_t (.) i_t and m_t = o_t (.) h(c_t) (with c*d = 0).
// The rounding (floor, by arithmetic shift) and saturation are this design's choice.
module elem_mul
  import ese_pkg::*;
#(
  parameter bit HAS_ADD = 1'b0
) (
  input  act_t a,
  input  act_t b,
  input  act_t c,
  input  act_t d,
  output act_t y
);
  logic signed [47:0] p0, p1, s;
  always_comb begin
    p0 = 48'(a) * 48'(b);
    p1 = HAS_ADD ? 48'(c) * 48'(d) : 48'sd0;
    s  = (p0 + p1) >>> ACT_FRAC;
    y  = sat_act(s);
  end
endmodule
