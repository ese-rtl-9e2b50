// Element-wise unit of one channel: ElemMul -> Adder Tree -> Sigmoid/Tanh -> ElemMul(+add),
// with the H_t buffer that keeps the element-wise vectors of the time step.
//
// A job walks the vector one element per cycle through two register stages:
//   stage 0: read the assembled SpMV sum s (from the act-buffer bank not being written by the
//            SpMV), the peephole weight and bias of the element, and the cell state;
//            pre = s + w_c (.) c + b                                  (ElemMul, Adder Tree)
//   stage 1: gate = sigmoid(pre), h = tanh(c), then per job          (Sigmoid/Tanh, ElemMul)
//            EW_I: i = gate               EW_F: f = gate
//            EW_G: g = gate, c_t = f (.) c_{t-1} + g (.) i   (written over c_{t-1})
//            EW_O: o = gate, m_t = o (.) tanh(c_t)
//            EW_Y: y_t = s (the projection W_ym m_t), no activation
// EW_I, EW_F and EW_G use c_{t-1}; EW_O uses the new c_t (peephole of eq. 5). With zero_state
// set, c_{t-1} and y_{t-1} read as zero (first frame of a sequence).
// The H_t buffer holds i, f, c, m (NH each) and y (NY). m is read by the channel's feeder for
// the W_ym product and y by the feeder for the next step's recurrent products.
// One element per cycle, a second tanh instance for h(c_t) and the job split are this
// design's choices; the gate equations are the LSTM with peepholes and projection.
module ew_unit
  import ese_pkg::*;
#(
  parameter int NH = NH_DEF,
  parameter int NY = NY_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  ew_e                   job,
  input  logic                  zero_state,
  output logic                  done,
  output logic                  busy,
  // assembled SpMV result
  output logic [$clog2(NH)-1:0] idx,
  input  act_t                  s_val,
  // parameter vectors at idx
  input  act_t                  prm [NPRM],
  // m_t and y_{t-1} read ports for the ActQueue feeder
  input  logic [$clog2(NH)-1:0] m_raddr,
  output act_t                  m_rdata,
  input  logic [$clog2(NY)-1:0] y_raddr,
  output act_t                  y_rdata,
  // y_t stream towards the output buffer
  output logic                  y_valid,
  output logic [$clog2(NY)-1:0] y_idx,
  output act_t                  y_data
);
  localparam int HW = $clog2(NH);
  act_t ibuf [NH];
  act_t fbuf [NH];
  act_t cbuf [NH];
  act_t mbuf [NH];
  act_t ybuf [NY];

  ew_e          cur_job;
  logic         running;
  logic [HW:0]  len;
  // stage 0
  act_t         c0, pw0, b0, peep0, pre0;
  // stage 1
  logic         s1_valid;
  ew_e          s1_job;
  logic [HW-1:0] s1_idx;
  act_t         s1_pre, s1_c, s1_i, s1_f;
  act_t         gate, th, mac_a, mac_b, mac_c, mac_d, mac_y;

  assign len = (cur_job == EW_Y) ? (HW+1)'(NY) : (HW+1)'(NH);

  always_comb begin
    if (cur_job == EW_O)   c0 = cbuf[idx];
    else if (zero_state)   c0 = '0;
    else                   c0 = cbuf[idx];
    unique case (cur_job)
      EW_I:    begin pw0 = prm[P_WIC]; b0 = prm[P_BI]; end
      EW_F:    begin pw0 = prm[P_WFC]; b0 = prm[P_BF]; end
      EW_G:    begin pw0 = '0;         b0 = prm[P_BC]; end
      EW_O:    begin pw0 = prm[P_WOC]; b0 = prm[P_BO]; end
      default: begin pw0 = '0;         b0 = '0;        end
    endcase
  end

  elem_mul #(.HAS_ADD(1'b0)) u_peep (.a(pw0), .b(c0), .c('0), .d('0), .y(peep0));
  adder_tree u_tree (.a(s_val), .b(peep0), .c(b0), .y(pre0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      cur_job  <= EW_I;
      idx      <= '0;
      s1_valid <= 1'b0;
      s1_job   <= EW_I;
      s1_idx   <= '0;
      s1_pre   <= '0;
      s1_c     <= '0;
      s1_i     <= '0;
      s1_f     <= '0;
    end else begin
      s1_valid <= running;
      s1_job   <= cur_job;
      s1_idx   <= idx;
      s1_pre   <= pre0;
      s1_c     <= c0;
      s1_i     <= ibuf[idx];
      s1_f     <= fbuf[idx];
      if (start) begin
        running <= 1'b1;
        cur_job <= job;
        idx     <= '0;
      end else if (running) begin
        if ((HW+1)'(idx) == len - 1'b1) running <= 1'b0;
        else                            idx <= idx + 1'b1;
      end
    end
  end

  sigmoid_tanh u_sig  (.x(s1_pre), .mode_tanh(1'b0), .y(gate));
  sigmoid_tanh u_tanh (.x(s1_c),   .mode_tanh(1'b1), .y(th));

  always_comb begin
    if (s1_job == EW_G) begin
      mac_a = s1_f; mac_b = s1_c; mac_c = gate; mac_d = s1_i;
    end else begin
      mac_a = gate; mac_b = th;   mac_c = '0;   mac_d = '0;
    end
  end
  elem_mul #(.HAS_ADD(1'b1)) u_mac (.a(mac_a), .b(mac_b), .c(mac_c), .d(mac_d), .y(mac_y));

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      unique case (s1_job)
        EW_I:    ibuf[s1_idx] <= gate;
        EW_F:    fbuf[s1_idx] <= gate;
        EW_G:    cbuf[s1_idx] <= mac_y;
        EW_O:    mbuf[s1_idx] <= mac_y;
        default: ybuf[$clog2(NY)'(s1_idx)] <= s1_pre;
      endcase
    end
  end

  assign y_valid = s1_valid && (s1_job == EW_Y);
  assign y_idx   = $clog2(NY)'(s1_idx);
  assign y_data  = s1_pre;
  assign m_rdata = mbuf[m_raddr];
  assign y_rdata = zero_state ? '0 : ybuf[y_raddr];
  assign busy    = running || s1_valid;
  assign done    = !busy && !start;
endmodule
